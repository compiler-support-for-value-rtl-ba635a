// tb_vbbi_btb: checks the set-associative BTB against a reference model that
// keeps, per set, the ways in recency order. A small instance (16 entries,
// 4 ways, 4 sets) is driven with random lookups and updates on few keys so
// that sets overflow and LRU victims are chosen often; outputs of both read
// ports are compared every cycle. A full-size instance (4096 entries, 4 ways)
// gets a directed test: one jump PC with four hint values keeps four targets.
module tb_vbbi_btb;
  import vbbi_pkg::*;

  localparam int unsigned N = 16, W = 4, S = N / W;

  logic              clk = 0, rst_n = 0;
  logic              a_valid, a_hit, b_hit, u_valid, ready, f_ready;
  logic [ADDR_W-1:0] a_key, a_target, b_key, b_target, u_key, u_target;
  int checks = 0, failures = 0, evictions = 0;

  vbbi_btb #(.ENTRIES(N), .WAYS(W)) dut (.*);

  // full-size instance
  logic              fa_valid, fa_hit, fb_hit, fu_valid;
  logic [ADDR_W-1:0] fa_key, fa_target, fb_target, fu_key, fu_target;
  vbbi_btb full (
    .clk, .rst_n, .a_valid(fa_valid), .a_key(fa_key), .a_hit(fa_hit), .a_target(fa_target),
    .b_key(fa_key), .b_hit(fb_hit), .b_target(fb_target),
    .u_valid(fu_valid), .u_key(fu_key), .u_target(fu_target), .ready(f_ready)
  );

  always #5 clk = ~clk;

  // reference model: per set, ways in order MRU first
  logic              m_v   [S][W];
  logic [ADDR_W-1:0] m_key [S][W];
  logic [ADDR_W-1:0] m_tgt [S][W];
  int                m_ord [S][W];

  function automatic int unsigned set_of(input logic [ADDR_W-1:0] k);
    return int'(k[3:2]);
  endfunction

  function automatic int find(input logic [ADDR_W-1:0] k);
    int s = set_of(k);
    for (int w = 0; w < W; w++)
      if (m_v[s][w] && m_key[s][w][ADDR_W-1:2] == k[ADDR_W-1:2]) return w;
    return -1;
  endfunction

  task automatic touch(input int s, input int w);
    int pos = 0;
    for (int i = 0; i < W; i++) if (m_ord[s][i] == w) pos = i;
    for (int i = pos; i > 0; i--) m_ord[s][i] = m_ord[s][i-1];
    m_ord[s][0] = w;
  endtask

  task automatic check(input string what, input logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [ADDR_W-1:0] rkey();
    // 12 tags x 4 sets
    return {48'h0, 8'($urandom % 12), 6'($urandom % 4), 2'b00} + 64'h1_2000_0000;
  endfunction

  initial begin
    int wa, wb, wu, s;
    a_valid = 0; u_valid = 0; a_key = 0; b_key = 0; u_key = 0; u_target = 0;
    fa_valid = 0; fu_valid = 0; fa_key = 0; fu_key = 0; fu_target = 0;
    for (int i = 0; i < S; i++)
      for (int w = 0; w < W; w++) begin
        m_v[i][w] = 0; m_ord[i][w] = w;   // way 0 most recent
      end
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    #1;
    check("not ready after reset", !ready);
    repeat (S) @(posedge clk);
    #1;
    check("ready after one cycle per set", ready);

    for (int n = 0; n < 6000; n++) begin
      @(negedge clk);
      a_valid  = ($urandom % 4) != 0;
      a_key    = rkey();
      b_key    = rkey();
      u_valid  = ($urandom % 2) == 0;
      u_key    = ($urandom % 3 == 0) ? a_key : rkey();
      u_target = {$urandom, $urandom};
      #1;
      wa = find(a_key);
      wb = find(b_key);
      check("a_hit", a_hit == (wa >= 0));
      if (wa >= 0) check("a_target", a_target == m_tgt[set_of(a_key)][wa]);
      check("b_hit", b_hit == (wb >= 0));
      if (wb >= 0) check("b_target", b_target == m_tgt[set_of(b_key)][wb]);
      @(posedge clk);
      if (a_valid && wa >= 0) touch(set_of(a_key), wa);
      if (u_valid) begin
        s  = set_of(u_key);
        wu = find(u_key);
        if (wu < 0)
          for (int w = 0; w < W; w++) if (!m_v[s][w] && wu < 0) wu = w;
        if (wu < 0) begin
          wu = m_ord[s][W-1];
          evictions++;
        end
        m_v[s][wu] = 1; m_key[s][wu] = u_key; m_tgt[s][wu] = u_target;
        touch(s, wu);
      end
    end
    check("LRU evictions happened", evictions > 100);

    // full size: one jump PC, four hint values, four targets
    check("full size ready after 1024 cycles", f_ready);
    @(negedge clk);
    a_valid = 0; u_valid = 0;
    for (int h = 0; h < 4; h++) begin
      @(negedge clk);
      fu_valid = 1; fu_key = 64'h1_2002_2930 + 64'(4 * h); fu_target = 64'h1_2003_0000 + 64'(h * 256);
    end
    @(negedge clk);
    fu_valid = 0;
    for (int h = 0; h < 4; h++) begin
      fa_valid = 1; fa_key = 64'h1_2002_2930 + 64'(4 * h); #1;
      check("full hit", fa_hit && fb_hit);
      check("full target", fa_target == 64'h1_2003_0000 + 64'(h * 256));
      @(negedge clk);
    end
    fa_key = 64'h1_2002_2930 + 64'd16; #1;
    check("full miss", !fa_hit);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
