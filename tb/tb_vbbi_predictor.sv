// tb_vbbi_predictor: end-to-end test of the VBBI predictor at its default
// sizes (16-entry HIB, 32-entry HSB, 4K-entry 4-way BTB).
//
// The testbench plays the pipeline: it fetches instructions of a small
// program, writes back hint instructions, issues stores and commits jumps,
// one event per cycle. The program has
//   * a switch jump J whose hint instruction H lies 11 instructions before it
//     (hint field 8203); its target depends on the value H computes;
//   * the same switch compiled without a hint (J2), i.e. a plain BTB jump;
//   * a jump J3 whose hint instruction is a load from address A, with stores
//     to A in between (load-to-store address matching).
// Expected targets come from the program, not from the design. The test
// checks that VBBI learns one target per hint value while the plain BTB
// cannot, that a jump fetched before its hint is written back is re-predicted
// and redirected exactly one cycle after the write-back, that stores to a
// recorded load address update the hint, that the baseline configuration
// (both optimisations off) does neither, plus HIB replacement, BTB LRU
// eviction, a full override table and a flush. Each mechanism is counted and
// must occur at least once.
module tb_vbbi_predictor;
  import vbbi_pkg::*;

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

  // mechanism counters
  int n_hib_alloc = 0, n_hint_detect = 0, n_vbbi_pred = 0, n_btb_train = 0;
  int n_override = 0, n_redirect = 0, n_lsam = 0, n_baseline = 0;
  int n_evict = 0, n_full = 0, n_flush = 0, n_hib_replace = 0;
  // accuracy counters
  int vbbi_ok = 0, vbbi_n = 0, btb_ok = 0, btb_n = 0;

  always @(posedge clk) begin
    if (dut.u_hib.alloc_valid) n_hib_alloc++;
    if (dut.u_hib.st_valid)    n_lsam++;
  end

  task automatic check(input string what, input logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- program ----------------
  localparam logic [ADDR_W-1:0] H   = 64'h1_2002_28FC;          // mull (hint of J)
  localparam logic [ADDR_W-1:0] J   = H + 64'd44;               // jmp $31,($1),8203
  localparam logic [ADDR_W-1:0] J2  = 64'h1_2003_0010;          // jmp without hint
  localparam logic [ADDR_W-1:0] H3  = 64'h1_2004_0020;          // ldl (hint of J3)
  localparam logic [ADDR_W-1:0] J3  = H3 + 64'd80;              // 20 instructions later
  localparam logic [ADDR_W-1:0] A   = 64'h1_4000_0100;          // current_move[ply]

  function automatic logic [INSN_W-1:0] jmp_insn(input logic use_h, input int off);
    return {6'h1a, 5'd31, 5'd1, 2'b00, use_h, 1'b0, 12'(off)};
  endfunction
  function automatic logic [ADDR_W-1:0] tgt(input logic [ADDR_W-1:0] j, input int v);
    return j + 64'h4000 + 64'(v * 64);
  endfunction

  // ---------------- pipeline events, one per cycle ----------------
  task automatic idle();
    f_valid = 0; wb_valid = 0; st_valid = 0; c_valid = 0; flush = 0;
    f_is_ind_jmp = 0; wb_is_load = 0; c_is_vbbi = 0;
  endtask

  typedef struct {
    logic              hit;
    logic [ADDR_W-1:0] target;
    logic [ADDR_W-1:0] key;
    logic              vbbi;
    logic              is_hint;
  } pred_t;

  task automatic fetch(input logic [ADDR_W-1:0] pc, input logic [INSN_W-1:0] insn,
                       input logic jmp, input int tag, output pred_t p);
    @(negedge clk);
    idle();
    f_valid = 1; f_pc = pc; f_insn = insn; f_is_ind_jmp = jmp; f_tag = JTAG_W'(tag);
    #1;
    p.hit = f_pred_hit; p.target = f_pred_target; p.key = f_btb_key;
    p.vbbi = f_vbbi_hit; p.is_hint = f_is_hint_inst;
    if (f_is_hint_inst) n_hint_detect++;
    if (f_vbbi_hit)     n_vbbi_pred++;
    @(posedge clk);
  endtask

  task automatic writeback(input logic [ADDR_W-1:0] pc, input logic [DATA_W-1:0] v,
                           input logic ld, input logic [ADDR_W-1:0] addr);
    @(negedge clk);
    idle();
    wb_valid = 1; wb_pc = pc; wb_value = v; wb_is_load = ld; wb_ld_addr = addr;
    @(posedge clk);
  endtask

  task automatic store(input logic [ADDR_W-1:0] addr, input logic [DATA_W-1:0] v);
    @(negedge clk);
    idle();
    st_valid = 1; st_addr = addr; st_value = v;
    @(posedge clk);
  endtask

  task automatic commit(input int tag, input logic vb, input pred_t p,
                        input logic [ADDR_W-1:0] actual);
    @(negedge clk);
    idle();
    c_valid = 1; c_tag = JTAG_W'(tag); c_is_vbbi = vb; c_key = p.key;
    c_pred_hit = p.hit; c_pred_target = p.target; c_target = actual;
    if (!p.hit || p.target != actual) n_btb_train++;
    @(posedge clk);
  endtask

  // one cycle with nothing driven; returns the override outputs of that cycle
  task automatic observe(output logic v, output logic r, output logic [ADDR_W-1:0] t,
                         output logic [ADDR_W-1:0] k);
    @(negedge clk);
    idle();
    #1;
    v = ov_valid; r = ov_redirect; t = ov_target; k = ov_key;
    if (ov_valid)    n_override++;
    if (ov_redirect) n_redirect++;
    @(posedge clk);
  endtask

  // ---------------- scenario ----------------
  initial begin
    pred_t p, q;
    logic ovv, ovr;
    logic [ADDR_W-1:0] ovt, ovk;
    int v, vold, tag;
    logic seen [4];
    logic seen3 [4];

    idle();
    cfg_lsam_en = 1; cfg_override_en = 1;
    f_pc = 0; f_insn = 0; f_tag = 0; wb_pc = 0; wb_value = 0; wb_ld_addr = 0;
    st_addr = 0; st_value = 0; c_tag = 0; c_key = 0; c_pred_hit = 0;
    c_pred_target = 0; c_target = 0;
    for (int i = 0; i < 4; i++) begin seen[i] = 0; seen3[i] = 0; end
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    // the BTB clears one of its 1024 sets per cycle
    repeat (1023) @(posedge clk);
    #1;
    check("not ready before the sweep ends", !ready);
    @(posedge clk);
    #1;
    check("ready after 1024 cycles", ready);

    // 1. current hint: H writes back before J is fetched
    tag = 0;
    for (int it = 0; it < 200; it++) begin
      v = int'($urandom % 4);
      fetch(H, 32'h4c22_0c09, 0, 0, p);
      if (it > 0) check("H recognised as hint instruction", p.is_hint);
      if (p.is_hint) writeback(H, 64'(v), 0, 0);
      tag++;
      fetch(J, jmp_insn(1, 11), 1, tag, p);
      if (it > 0) begin
        check("J uses its HIB entry", p.vbbi);
        check("J key = PC + 4*hint", p.key == J + 64'(4 * v));
        vbbi_n++;
        if (p.hit && p.target == tgt(J, v)) vbbi_ok++;
        if (seen[v]) check("VBBI predicts the target of this hint value",
                           p.hit && p.target == tgt(J, v));
        seen[v] = (it > 0);
      end
      commit(tag, 1, p, tgt(J, v));
      // the same switch without a hint: a plain BTB entry
      tag++;
      fetch(J2, jmp_insn(0, 0), 1, tag, q);
      check("J2 does not use VBBI", !q.vbbi && q.key == J2);
      btb_n++;
      if (q.hit && q.target == tgt(J2, v)) btb_ok++;
      commit(tag, 0, q, tgt(J2, v));
    end
    $display("accuracy: VBBI %0d/%0d, plain BTB %0d/%0d", vbbi_ok, vbbi_n, btb_ok, btb_n);
    check("VBBI beats the plain BTB", vbbi_ok > btb_ok + 50);

    // 2. stale hint: J fetched before H writes back -> override
    vold = v;
    for (int it = 0; it < 20; it++) begin
      v = (vold + 1 + int'($urandom % 3)) % 4;     // a different value
      fetch(H, 32'h4c22_0c09, 0, 0, p);
      check("H recognised (stale case)", p.is_hint);
      tag++;
      fetch(J, jmp_insn(1, 11), 1, tag, p);
      check("stale prediction uses old hint", p.key == J + 64'(4 * vold));
      writeback(H, 64'(v), 0, 0);
      observe(ovv, ovr, ovt, ovk);
      check("re-prediction one cycle after write-back", ovv && ovk == J + 64'(4 * v));
      check("redirect to the target of the new hint", ovr && ovt == tgt(J, v));
      p.key = ovk; p.hit = 1; p.target = ovt;
      commit(tag, 1, p, tgt(J, v));
      vold = v;
    end

    // 3. load hint with stores to its address (load-to-store matching)
    for (int it = 0; it < 60; it++) begin
      v = int'($urandom % 4);
      if (it < 8) begin
        // the load executes and records its address
        fetch(H3, 32'ha020_0000, 0, 0, p);
        if (p.is_hint) writeback(H3, 64'(v), 1, A);
      end else begin
        // only a store to A gives the new value
        store(A, 64'(v));
      end
      tag++;
      fetch(J3, jmp_insn(1, 20), 1, tag, p);
      if (it >= 8) begin
        check("J3 key follows the stored value", p.vbbi && p.key == J3 + 64'(4 * v));
        if (seen3[v]) check("J3 predicted from stored hint", p.hit && p.target == tgt(J3, v));
      end
      if (it >= 1) seen3[v] = 1;
      commit(tag, 1, p, tgt(J3, v));
    end

    // 4. baseline configuration: no overriding, no load-to-store matching
    cfg_lsam_en = 0; cfg_override_en = 0;
    for (int it = 0; it < 10; it++) begin
      vold = v;
      v = (vold + 1) % 4;
      store(A, 64'(v));
      tag++;
      fetch(J3, jmp_insn(1, 20), 1, tag, p);
      check("baseline: store does not update hint", p.key == J3 + 64'(4 * vold));
      fetch(H, 32'h4c22_0c09, 0, 0, q);
      tag++;
      fetch(J, jmp_insn(1, 11), 1, tag, q);
      writeback(H, 64'(it), 0, 0);
      observe(ovv, ovr, ovt, ovk);
      check("baseline: no override", !ovv && !ovr);
      n_baseline++;
      commit(tag - 1, 1, p, tgt(J3, vold));
      commit(tag, 1, q, tgt(J, it % 4));
      v = vold;
    end
    cfg_lsam_en = 1; cfg_override_en = 1;

    // 5. HIB replacement: a jump whose hint maps to the same HIB entry as H
    tag++;
    fetch(J + 64'h400, jmp_insn(1, 11), 1, tag, p);   // hint PC = H + 0x400, same index
    check("other jump misses J's entry", !p.vbbi);
    commit(tag, 1, p, 64'h1_2005_0000);
    tag++;
    fetch(J, jmp_insn(1, 11), 1, tag, p);
    check("J lost its entry", !p.vbbi);
    if (!p.vbbi) n_hib_replace++;
    commit(tag, 1, p, tgt(J, 0));

    // 6. BTB LRU: five branches in one set
    for (int b = 0; b < 5; b++) begin
      tag++;
      fetch(64'h1_3000_0040 + 64'(b * 4096), jmp_insn(0, 0), 1, tag, p);
      commit(tag, 0, p, 64'h1_3100_0000 + 64'(b));
    end
    fetch(64'h1_3000_0040, jmp_insn(0, 0), 1, 0, p);
    check("LRU way evicted", !p.hit);
    if (!p.hit) n_evict++;
    fetch(64'h1_3000_0040 + 64'(4 * 4096), jmp_insn(0, 0), 1, 0, p);
    check("newest way kept", p.hit && p.target == 64'h1_3100_0004);

    // 7. override table full, then flush
    for (int k = 0; k < 9; k++) fetch(J3, jmp_insn(1, 20), 1, 100 + k, p);
    check("override table full", ov_full);
    if (ov_full) n_full++;
    @(negedge clk); idle(); flush = 1; @(posedge clk);
    @(negedge clk); idle(); #1;
    check("flush empties the override table", !ov_full);
    n_flush++;

    // every mechanism happened
    check("HIB allocation",        n_hib_alloc > 0);
    check("hint detection",        n_hint_detect > 0);
    check("VBBI prediction",       n_vbbi_pred > 0);
    check("BTB training",          n_btb_train > 0);
    check("re-prediction",         n_override > 0);
    check("redirect",              n_redirect > 0);
    check("load-to-store match",   n_lsam > 0);
    check("baseline mode",         n_baseline > 0);
    check("HIB replacement",       n_hib_replace > 0);
    check("BTB eviction",          n_evict > 0);
    check("override table full",   n_full > 0);
    check("flush",                 n_flush > 0);
    $display("mechanisms: alloc=%0d hint=%0d vbbi=%0d train=%0d override=%0d redirect=%0d lsam=%0d baseline=%0d replace=%0d evict=%0d full=%0d flush=%0d",
             n_hib_alloc, n_hint_detect, n_vbbi_pred, n_btb_train, n_override, n_redirect,
             n_lsam, n_baseline, n_hib_replace, n_evict, n_full, n_flush);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
