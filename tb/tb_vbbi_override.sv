// tb_vbbi_override: directed tests of target prediction overriding. The BTB
// is replaced by a fixed function of the key (target = key with its low five
// bits cleared; a miss when key bits 5..2 are all ones), so the expected
// re-prediction of every case can be written down. Covers: a hint change
// that changes the target (redirect), one that keeps it (no redirect), one
// that misses in the BTB, an unchanged hint, a change for another HIB entry,
// resolution, a change in the allocation cycle, two jumps on one entry
// (handled in consecutive cycles), a full table and a flush.
module tb_vbbi_override;
  import vbbi_pkg::*;

  logic              clk = 0, rst_n = 0, flush;
  logic              al_valid, al_pred_hit, ev_valid, b_hit, rs_valid;
  logic [7:0]        al_tag, rs_tag, re_tag;
  logic [ADDR_W-1:0] al_pc, al_pred_target, b_key, b_target, re_key, re_target, ev_jmp_pc;
  logic [3:0]        al_idx, ev_idx;
  logic [DATA_W-1:0] al_hint, ev_new;
  logic              re_valid, re_redirect, full;
  int checks = 0, failures = 0;

  vbbi_override dut (.*);

  // stand-in BTB
  assign b_hit    = b_key[5:2] != 4'hF;
  assign b_target = {b_key[ADDR_W-1:5], 5'b0};

  always #5 clk = ~clk;

  localparam logic [ADDR_W-1:0] P = 64'h1_2002_2900;

  task automatic check(input string what, input logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t: re_valid=%b tag=%0d key=%h redirect=%b target=%h",
               what, $time, re_valid, re_tag, re_key, re_redirect, re_target);
    end
  endtask

  task automatic idle();
    al_valid = 0; ev_valid = 0; rs_valid = 0; flush = 0;
  endtask

  // drive for one cycle, then look at the outputs of the next cycle
  task automatic step();
    @(posedge clk); #1;
    idle();
  endtask

  task automatic alloc(input int tag, input logic [ADDR_W-1:0] pc, input int idx,
                       input logic [DATA_W-1:0] hint);
    al_valid = 1; al_tag = 8'(tag); al_pc = pc; al_idx = 4'(idx); al_hint = hint;
    al_pred_hit = 1; al_pred_target = {(pc + 64'd4 * hint) >> 5, 5'b0};
  endtask

  // hint change of HIB entry idx, owned by the jump at pc
  task automatic ev(input int idx, input logic [DATA_W-1:0] v,
                    input logic [ADDR_W-1:0] pc);
    ev_valid = 1; ev_idx = 4'(idx); ev_new = v; ev_jmp_pc = pc;
  endtask

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    idle();
    al_tag = 0; al_pc = 0; al_idx = 0; al_hint = 0; al_pred_hit = 0; al_pred_target = 0;
    ev_idx = 0; ev_new = 0; rs_tag = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    #1;
    check("idle after reset", !re_valid && !full);

    alloc(1, P, 3, 0); step();
    check("no recheck after allocation", !re_valid);
    ev(3, 64'd8, P); step();
    check("recheck after change", re_valid && re_tag == 8'd1 && re_key == P + 64'd32);
    check("redirect to new target", re_redirect && re_target == P + 64'd32);
    step();
    check("recheck done", !re_valid);
    ev(3, 64'd8, P); step();
    check("same hint: no recheck", !re_valid);
    ev(5, 64'd1, P); step();
    check("other entry: no recheck", !re_valid);
    ev(3, 64'd9, P); step();
    check("same target: recheck", re_valid && re_key == P + 64'd36);
    check("same target: no redirect", !re_redirect);
    step();
    ev(3, 64'd15, P); step();
    check("BTB miss: recheck", re_valid && re_key == P + 64'd60);
    check("BTB miss: no redirect", !re_redirect);
    step();
    rs_valid = 1; rs_tag = 8'd1; step();
    ev(3, 64'd2, P); step();
    check("resolved: no recheck", !re_valid);

    // hint changes in the cycle the jump is allocated
    alloc(2, P + 64'h100, 6, 0); ev(6, 64'd8, P + 64'h100); step();
    check("change at allocation", re_valid && re_tag == 8'd2 && re_key == P + 64'h120 && re_redirect);
    step();

    // two instances of one jump, and another jump, on one HIB entry
    alloc(3, P + 64'h100, 6, 0); step();
    alloc(4, P + 64'h300, 6, 0); step();
    ev(6, 64'd9, P + 64'h100); step();
    check("first of two", re_valid && re_tag == 8'd2 && re_key == P + 64'h124 && !re_redirect);
    step();
    check("second of two", re_valid && re_tag == 8'd3 && re_key == P + 64'h124 && re_redirect);
    step();
    check("other jump on the entry left alone", !re_valid);

    // fill the table (8 entries, two in use)
    for (int t = 10; t < 16; t++) begin
      alloc(t, P + 64'(t * 'h1000), 9, 0); step();
    end
    check("table full", full);
    alloc(20, P + 64'h9000, 10, 0); step();
    ev(10, 64'd8, P + 64'h9000); step();
    check("untracked jump when full", !re_valid);

    // flush
    flush = 1; step();
    check("flush empties", !full);
    ev(9, 64'd8, P + 64'ha000); step();
    check("flushed: no recheck", !re_valid);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
