// tb_vbbi_index_gen: drives random fetch cases (jump with and without a VBBI
// hint, other instructions, matching and non-matching HIB entries) and
// compares the HIB index, the hit and hint flags and the BTB key with an
// independent calculation.
module tb_vbbi_index_gen;
  import vbbi_pkg::*;

  logic              pc_valid, is_ind_jmp, use_vbbi, e_valid;
  logic [ADDR_W-1:0] pc, hint_pc, e_jmp_pc, e_hint_pc;
  logic [DATA_W-1:0] e_hint_value;
  logic [3:0]        hib_idx;
  logic              vbbi_jump, jmp_hit, is_hint_inst;
  logic [ADDR_W-1:0] hint_used, btb_key;
  int checks = 0, failures = 0;

  vbbi_index_gen dut (.*);

  task automatic check(input string what, input logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: pc=%h jmp=%b use=%b idx=%h key=%h", what, pc, is_ind_jmp, use_vbbi, hib_idx, btb_key);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic              ej, eh, jmp;
    logic [3:0]        eidx;
    logic [ADDR_W-1:0] ekey;
    repeat (4000) begin
      pc_valid     = ($urandom % 8) != 0;
      pc           = {$urandom, $urandom} & ~64'h3;
      is_ind_jmp   = $urandom % 2;
      use_vbbi     = $urandom % 2;
      hint_pc      = pc - 64'(($urandom % 64) * 4);
      e_valid      = ($urandom % 4) != 0;
      e_jmp_pc     = ($urandom % 2) ? pc : {$urandom, $urandom};
      e_hint_pc    = ($urandom % 2) ? pc : hint_pc;
      e_hint_value = ($urandom % 2) ? 64'($urandom % 8) : {$urandom, $urandom};
      #1;
      jmp  = pc_valid & is_ind_jmp & use_vbbi;
      eidx = jmp ? hint_pc[5:2] : pc[5:2];
      ej   = jmp & e_valid & (e_jmp_pc == pc);
      eh   = pc_valid & !is_ind_jmp & e_valid & (e_hint_pc == pc);
      ekey = ej ? pc + 64'd4 * e_hint_value : pc;
      check("vbbi_jump", vbbi_jump == jmp);
      check("hib_idx", hib_idx == eidx);
      check("jmp_hit", jmp_hit == ej);
      check("is_hint_inst", is_hint_inst == eh);
      check("hint_used", hint_used == (ej ? e_hint_value : 64'd0));
      check("btb_key", btb_key == ekey);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
