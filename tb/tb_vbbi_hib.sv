// tb_vbbi_hib: random allocations, write-backs and store writes against a
// reference model of the Hint Instruction Buffer. Checks the read port, the
// port priorities (allocation over write-back over store) and the hint change
// event, cycle by cycle, and that reset empties the buffer.
module tb_vbbi_hib;
  import vbbi_pkg::*;

  logic              clk = 0, rst_n = 0;
  logic [3:0]        rd_idx, alloc_idx, wb_idx, st_idx, ev_idx;
  logic              rd_valid, alloc_valid, wb_valid, st_valid, ev_valid;
  logic [ADDR_W-1:0] rd_jmp_pc, rd_hint_pc, alloc_jmp_pc, alloc_hint_pc, ev_jmp_pc;
  logic [DATA_W-1:0] rd_hint_value, wb_value, st_value, ev_old, ev_new;
  int checks = 0, failures = 0;

  vbbi_hib dut (.*);

  always #5 clk = ~clk;

  // reference model
  logic              m_v   [16];
  logic [ADDR_W-1:0] m_jpc [16];
  logic [ADDR_W-1:0] m_hpc [16];
  logic [DATA_W-1:0] m_val [16];

  task automatic check(input string what, input logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic       exp_ev;
    logic [3:0] exp_idx;
    logic [DATA_W-1:0] exp_new;
    alloc_valid = 0; wb_valid = 0; st_valid = 0; rd_idx = 0;
    alloc_idx = 0; wb_idx = 0; st_idx = 0; wb_value = 0; st_value = 0;
    alloc_jmp_pc = 0; alloc_hint_pc = 0;
    for (int i = 0; i < 16; i++) m_v[i] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int i = 0; i < 16; i++) begin
      rd_idx = 4'(i); #1;
      check("empty after reset", rd_valid == 1'b0);
    end
    for (int n = 0; n < 5000; n++) begin
      @(negedge clk);
      alloc_valid   = ($urandom % 5) == 0;
      alloc_idx     = 4'($urandom);
      alloc_jmp_pc  = {$urandom, $urandom};
      alloc_hint_pc = {$urandom, $urandom};
      wb_valid      = ($urandom % 2) == 0;
      wb_idx        = 4'($urandom);
      wb_value      = 64'($urandom % 16);
      st_valid      = ($urandom % 3) == 0;
      st_idx        = ($urandom % 2) ? wb_idx : 4'($urandom);
      st_value      = 64'($urandom % 16);
      rd_idx        = 4'($urandom);
      #1;
      // read port
      check("rd_valid", rd_valid == m_v[rd_idx]);
      if (m_v[rd_idx]) begin
        check("rd_jmp_pc", rd_jmp_pc == m_jpc[rd_idx]);
        check("rd_hint_pc", rd_hint_pc == m_hpc[rd_idx]);
        check("rd_hint_value", rd_hint_value == m_val[rd_idx]);
      end
      // expected event
      exp_ev = 0; exp_idx = 0; exp_new = 0;
      if (wb_valid && m_v[wb_idx]) begin
        exp_ev = 1; exp_idx = wb_idx; exp_new = wb_value;
      end else if (st_valid && m_v[st_idx]) begin
        exp_ev = 1; exp_idx = st_idx; exp_new = st_value;
      end
      if (alloc_valid && alloc_idx == exp_idx) exp_ev = 0;
      check("ev_valid", ev_valid == exp_ev);
      if (exp_ev) begin
        check("ev_idx", ev_idx == exp_idx);
        check("ev_new", ev_new == exp_new);
        check("ev_old", ev_old == m_val[exp_idx]);
        check("ev_jmp_pc", ev_jmp_pc == m_jpc[exp_idx]);
      end
      @(posedge clk);
      if (exp_ev) m_val[exp_idx] = exp_new;
      if (alloc_valid) begin
        m_v[alloc_idx]   = 1;
        m_jpc[alloc_idx] = alloc_jmp_pc;
        m_hpc[alloc_idx] = alloc_hint_pc;
        m_val[alloc_idx] = 0;
      end
    end
    // reset again empties the buffer
    @(negedge clk);
    alloc_valid = 0; wb_valid = 0; st_valid = 0;
    rst_n = 0; #1; rst_n = 1;
    for (int i = 0; i < 16; i++) begin
      rd_idx = 4'(i); #1;
      check("empty after second reset", rd_valid == 1'b0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
