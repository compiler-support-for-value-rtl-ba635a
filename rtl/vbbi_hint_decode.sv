// vbbi_hint_decode: decodes the VBBI hint field of an Alpha indirect jump and
// computes the address of its hint instruction.
//
// The compiler writes into instruction bits 13..0 of the jump whether VBBI is
// used (bit 13), the direction of the offset (bit 12) and the distance in
// instructions between the jump and its hint instruction (bits 11..0). A
// positive offset means the hint instruction lies that many instructions
// before the jump; a negative one means it lies after it. Alpha instructions
// are four bytes long, so the hint PC is PC - 4*offset or PC + 4*offset.
// Example: a hint field of 8203 (bit 13 set, bit 12 clear, offset 11) names
// the instruction 44 bytes before the jump.
//
// Purely combinational. The field layout follows the published VBBI scheme; the
// reading of the sign (positive = hint before jump) is taken from its worked
// example, in which the hint instruction precedes the jump.
module vbbi_hint_decode
  import vbbi_pkg::*;
#(
  parameter int unsigned ADDR_W_P = ADDR_W
) (
  input  logic [ADDR_W_P-1:0]   pc,          // PC of the jump
  input  logic [INSN_W-1:0]     insn,        // instruction word
  output logic                  use_vbbi,    // jump carries a hint
  output logic                  neg_offset,  // hint lies after the jump
  output logic [HINT_OFF_W-1:0] offset,      // distance in instructions
  output logic [ADDR_W_P-1:0]   hint_pc      // address of the hint instruction
);

  alpha_jmp_t          f;
  logic [ADDR_W_P-1:0] byte_off;

  always_comb begin
    f          = alpha_jmp_t'(insn);
    use_vbbi   = f.use_vbbi;
    neg_offset = f.neg_offset;
    offset     = f.offset;
    byte_off   = ADDR_W_P'({f.offset, 2'b00});
    hint_pc    = f.neg_offset ? (pc + byte_off) : (pc - byte_off);
  end

endmodule
