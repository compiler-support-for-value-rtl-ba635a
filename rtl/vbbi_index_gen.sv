// vbbi_index_gen: fetch-side index logic of the VBBI predictor.
//
// For a fetched indirect jump that carries a VBBI hint, the Hint Instruction
// Buffer (HIB) is indexed with bits of the hint instruction's PC; for every
// other instruction it is indexed with bits of the instruction's own PC. The
// entry read back is then checked two ways:
//   * jump:      if the entry's jmp_pc equals this PC the entry belongs to the
//                jump, and its hint_value is added to the PC to form the BTB
//                lookup key; otherwise 0 is added (a plain PC-indexed lookup).
//                The hint is added to the word address (PC bits above 1..0),
//                i.e. key = PC + 4*hint, so that small hint values such as
//                switch case numbers land in different BTB sets (this
//                scaling is this design's choice);
//   * otherwise: if the entry's hint_pc equals this PC the instruction is the
//                hint instruction of some jump and must write its result into
//                the HIB at write-back (is_hint_inst).
// The muxes, the two comparators and the adder are those of the published
// VBBI block diagram; the HIB index is PC bits [IDX_W+1:2] (bits
// 5..2 for 16 entries). Purely combinational.
module vbbi_index_gen
  import vbbi_pkg::*;
#(
  parameter int unsigned ADDR_W_P    = ADDR_W,
  parameter int unsigned DATA_W_P    = DATA_W,
  parameter int unsigned HIB_ENTRIES_P = HIB_ENTRIES,
  localparam int unsigned IDX_W      = $clog2(HIB_ENTRIES_P)
) (
  input  logic                pc_valid,     // an instruction is fetched
  input  logic [ADDR_W_P-1:0] pc,
  input  logic                is_ind_jmp,   // it is an indirect jump
  input  logic                use_vbbi,     // its hint field says "use VBBI"
  input  logic [ADDR_W_P-1:0] hint_pc,      // from vbbi_hint_decode
  // HIB read port
  output logic [IDX_W-1:0]    hib_idx,
  input  logic                e_valid,
  input  logic [ADDR_W_P-1:0] e_jmp_pc,
  input  logic [ADDR_W_P-1:0] e_hint_pc,
  input  logic [DATA_W_P-1:0] e_hint_value,
  // results
  output logic                vbbi_jump,    // jump that wants a hint
  output logic                jmp_hit,      // HIB entry belongs to this jump
  output logic                is_hint_inst, // instruction is a hint instruction
  output logic [ADDR_W_P-1:0] hint_used,    // value added to the PC
  output logic [ADDR_W_P-1:0] btb_key       // PC + hint value (or PC + 0)
);

  always_comb begin
    vbbi_jump    = pc_valid && is_ind_jmp && use_vbbi;
    hib_idx      = vbbi_jump ? hint_pc[2 +: IDX_W] : pc[2 +: IDX_W];
    jmp_hit      = vbbi_jump && e_valid && (e_jmp_pc == pc);
    is_hint_inst = pc_valid && !is_ind_jmp && e_valid && (e_hint_pc == pc);
    hint_used    = jmp_hit ? ADDR_W_P'(e_hint_value) : '0;
    btb_key      = pc + {hint_used[ADDR_W_P-3:0], 2'b00};
  end

endmodule
