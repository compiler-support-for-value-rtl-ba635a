// tb_vbbi_hsb: checks the Hint Store Buffer against a reference model:
// recording of hint load addresses (no duplicates, round-robin replacement
// once all 32 entries are used) and the HIB write produced by a store that
// n_match a recorded address (lowest matching entry wins).
module tb_vbbi_hsb;
  import vbbi_pkg::*;

  localparam int unsigned E = 32;

  logic              clk = 0, rst_n = 0;
  logic              rec_valid, st_valid, hib_wr_valid;
  logic [ADDR_W-1:0] rec_addr, st_addr;
  logic [3:0]        rec_idx, hib_wr_idx;
  logic [DATA_W-1:0] st_value, hib_wr_value;
  int checks = 0, failures = 0, n_match = 0, wraps = 0;

  vbbi_hsb dut (.*);

  always #5 clk = ~clk;

  logic              m_v [E];
  logic [ADDR_W-1:0] m_a [E];
  logic [3:0]        m_i [E];
  int                m_ptr;

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

  function automatic logic [ADDR_W-1:0] raddr();
    return 64'h1_4000_0000 + 64'(($urandom % 48) * 4);
  endfunction

  initial begin
    logic present, ehit;
    logic [3:0] eidx;
    rec_valid = 0; st_valid = 0; rec_addr = 0; st_addr = 0; rec_idx = 0; st_value = 0;
    for (int i = 0; i < E; i++) m_v[i] = 0;
    m_ptr = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 8000; n++) begin
      @(negedge clk);
      rec_valid = ($urandom % 3) == 0;
      rec_addr  = raddr();
      rec_idx   = 4'($urandom % 3);
      st_valid  = ($urandom % 2) == 0;
      st_addr   = raddr();
      st_value  = {$urandom, $urandom};
      #1;
      ehit = 0; eidx = 0; present = 0;
      for (int i = 0; i < E; i++) begin
        if (m_v[i] && m_a[i] == rec_addr && m_i[i] == rec_idx) present = 1;
        if (st_valid && m_v[i] && m_a[i] == st_addr && !ehit) begin ehit = 1; eidx = m_i[i]; end
      end
      check("hib_wr_valid", hib_wr_valid == ehit);
      if (ehit) begin
        n_match++;
        check("hib_wr_idx", hib_wr_idx == eidx);
        check("hib_wr_value", hib_wr_value == st_value);
      end
      @(posedge clk);
      if (rec_valid && !present) begin
        m_v[m_ptr] = 1; m_a[m_ptr] = rec_addr; m_i[m_ptr] = rec_idx;
        m_ptr = (m_ptr + 1) % E;
        if (m_ptr == 0) wraps++;
      end
    end
    check("store matches happened", n_match > 100);
    check("replacement wrapped", wraps > 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
