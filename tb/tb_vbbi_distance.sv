// tb_vbbi_distance: hint-to-jump distance experiment on the full-size
// predictor.
//
// The published evaluation reports that the average dynamic distance between
// a hint instruction and its jump grows from 37 instructions (baseline
// compiler) to 88 (with hoisting, inlining and interprocedural analysis), and
// that a longer distance makes it more likely that the current hint is used.
// This testbench replays that situation with a simple timing model of a
// 4-wide pipeline: the hint instruction is fetched in cycle 0 and writes back
// WB_LAT = 20 cycles later (an assumed fetch-to-write-back latency for a deep
// pipeline); the jump is fetched distance/4 cycles after the hint. The hint
// value picks one of four targets at random.
//
// For each distance (37 and 88, each with overriding on and off) it counts
// how many jumps were predicted with the current hint at fetch, how many were
// predicted correctly at fetch, and how many were correct after overriding.
// Checks: at distance 88 every prediction after warm-up uses the current hint
// and is correct; at distance 37 the fetch prediction uses a stale hint, and
// with overriding on the final prediction is correct after warm-up, while
// with overriding off it is not.
module tb_vbbi_distance;
  import vbbi_pkg::*;

  localparam int WB_LAT = 20;
  localparam int ITERS  = 100;

  logic              clk = 0, rst_n = 0;
  logic              cfg_lsam_en, cfg_override_en;
  logic              f_valid, f_is_ind_jmp;
  logic [ADDR_W-1:0] f_pc;
  logic [INSN_W-1:0] f_insn;
  logic [JTAG_W-1:0] f_tag;
  logic              f_pred_hit, f_vbbi_hit, f_is_hint_inst;
  logic [ADDR_W-1:0] f_pred_target, f_btb_key;
  logic              wb_valid, wb_is_load;
  logic [ADDR_W-1:0] wb_pc, wb_ld_addr;
  logic [DATA_W-1:0] wb_value;
  logic              st_valid;
  logic [ADDR_W-1:0] st_addr;
  logic [DATA_W-1:0] st_value;
  logic              c_valid, c_is_vbbi, c_pred_hit, flush;
  logic [JTAG_W-1:0] c_tag;
  logic [ADDR_W-1:0] c_key, c_pred_target, c_target;
  logic              ov_valid, ov_redirect, ov_full, ready;
  logic [JTAG_W-1:0] ov_tag;
  logic [ADDR_W-1:0] ov_key, ov_target;

  vbbi_predictor dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  task automatic check(input string what, input logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [ADDR_W-1:0] tgt(input logic [ADDR_W-1:0] j, input int v);
    return j + 64'h8000 + 64'(v * 128);
  endfunction

  // One run: returns counts over the iterations after warm-up.
  task automatic run(input int distance, input logic ovr, input logic [ADDR_W-1:0] base,
                     output int n, output int n_cur, output int n_ok_fetch,
                     output int n_ok_final);
    logic [ADDR_W-1:0] h, j, key, ptgt;
    logic              phit, is_hint, cur;
    int                jc, last, v, tag;
    logic              seen [4];
    h = base;
    j = base + 64'(4 * distance);
    jc = distance / 4;
    last = (jc > WB_LAT ? jc : WB_LAT) + 3;
    n = 0; n_cur = 0; n_ok_fetch = 0; n_ok_final = 0;
    for (int i = 0; i < 4; i++) seen[i] = 0;
    cfg_override_en = ovr;
    tag = 0;
    is_hint = 0; key = 0; phit = 0; ptgt = 0; cur = 0;
    for (int it = 0; it < ITERS; it++) begin
      v = int'($urandom % 4);
      tag = (tag + 1) % 200;
      for (int c = 0; c <= last; c++) begin
        @(negedge clk);
        f_valid = 0; wb_valid = 0; c_valid = 0; c_is_vbbi = 0; f_is_ind_jmp = 0;
        if (c == 0) begin
          f_valid = 1; f_pc = h; f_insn = 32'h4c22_0c09;
        end
        if (c == jc) begin
          f_valid = 1; f_pc = j; f_is_ind_jmp = 1; f_tag = JTAG_W'(tag);
          f_insn = {6'h1a, 5'd31, 5'd1, 2'b00, 1'b1, 1'b0, 12'(distance)};
        end
        if (c == WB_LAT && is_hint) begin
          wb_valid = 1; wb_pc = h; wb_value = 64'(v);
        end
        if (c == last) begin
          c_valid = 1; c_is_vbbi = 1; c_tag = JTAG_W'(tag); c_key = key;
          c_pred_hit = phit; c_pred_target = ptgt; c_target = tgt(j, v);
        end
        #1;
        if (c == 0) is_hint = f_is_hint_inst;
        if (c == jc) begin
          key = f_btb_key; phit = f_pred_hit; ptgt = f_pred_target;
          cur = (f_btb_key == j + 64'(4 * v));
          if (it >= 8 && seen[v]) begin
            n++;
            if (cur) n_cur++;
            if (f_pred_hit && f_pred_target == tgt(j, v)) n_ok_fetch++;
          end
        end
        if (ov_valid && ov_tag == JTAG_W'(tag)) begin
          key = ov_key;
          if (ov_redirect) begin phit = 1; ptgt = ov_target; end
        end
        @(posedge clk);
      end
      if (it >= 8 && seen[v] && phit && ptgt == tgt(j, v)) n_ok_final++;
      if (it >= 1) seen[v] = 1;
    end
  endtask

  initial begin
    int n, nc, nf, nfin;
    f_valid = 0; f_is_ind_jmp = 0; f_pc = 0; f_insn = 0; f_tag = 0;
    wb_valid = 0; wb_is_load = 0; wb_pc = 0; wb_value = 0; wb_ld_addr = 0;
    st_valid = 0; st_addr = 0; st_value = 0;
    c_valid = 0; c_is_vbbi = 0; c_tag = 0; c_key = 0; c_pred_hit = 0;
    c_pred_target = 0; c_target = 0; flush = 0;
    cfg_lsam_en = 1; cfg_override_en = 1;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    wait (ready);

    run(88, 1'b1, 64'h1_2010_0000, n, nc, nf, nfin);
    $display("distance 88, overriding on : %0d jumps, current hint %0d, correct at fetch %0d, correct final %0d", n, nc, nf, nfin);
    check("88: jumps counted", n > 50);
    check("88: every fetch uses the current hint", nc == n);
    check("88: every fetch prediction correct", nf == n && nfin == n);

    run(37, 1'b1, 64'h1_2020_0000, n, nc, nf, nfin);
    $display("distance 37, overriding on : %0d jumps, current hint %0d, correct at fetch %0d, correct final %0d", n, nc, nf, nfin);
    check("37: jumps counted", n > 50);
    check("37: fetch uses a stale hint", nc < n);
    check("37: overriding repairs every prediction", nfin == n);

    run(37, 1'b0, 64'h1_2030_0000, n, nc, nf, nfin);
    $display("distance 37, overriding off: %0d jumps, current hint %0d, correct at fetch %0d, correct final %0d", n, nc, nf, nfin);
    check("37 no override: jumps counted", n > 50);
    check("37 no override: final = fetch prediction", nfin == nf);
    check("37 no override: fewer correct", nfin < n);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
