// tb_vbbi_hint_decode: checks the hint field decode and the hint PC against
// an independent calculation, for the worked encoding 8203 (use VBBI,
// positive offset, 11 instructions back) and for random instructions.
module tb_vbbi_hint_decode;
  import vbbi_pkg::*;

  logic [ADDR_W-1:0]     pc, hint_pc, exp_pc;
  logic [INSN_W-1:0]     insn;
  logic                  use_vbbi, neg_offset;
  logic [HINT_OFF_W-1:0] offset;
  int checks = 0, failures = 0;

  vbbi_hint_decode dut (.*);

  task automatic check(input string what, input logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: pc=%h insn=%h hint_pc=%h exp=%h", what, pc, insn, hint_pc, exp_pc);
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
    // jmp $31,($1),8203 : opcode 0x1a, ra 31, rb 1, type 0, hint 8203
    pc   = 64'h0000_0001_2002_2930;
    insn = {6'h1a, 5'd31, 5'd1, 2'b00, 14'd8203};
    exp_pc = pc - 64'd44;
    #1;
    check("example use", use_vbbi == 1'b1);
    check("example sign", neg_offset == 1'b0);
    check("example offset", offset == 12'd11);
    check("example hint_pc", hint_pc == exp_pc);

    repeat (2000) begin
      pc   = {$urandom, $urandom} & ~64'h3;
      insn = $urandom;
      // independent model: 4-byte instructions, bit 12 selects direction
      if (insn[12]) exp_pc = pc + 64'(insn[11:0]) * 64'd4;
      else          exp_pc = pc - 64'(insn[11:0]) * 64'd4;
      #1;
      check("random use", use_vbbi == insn[13]);
      check("random sign", neg_offset == insn[12]);
      check("random offset", offset == insn[11:0]);
      check("random hint_pc", hint_pc == exp_pc);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
