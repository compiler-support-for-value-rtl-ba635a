// vbbi_pkg: types and constants shared by the Value-Based BTB Indexing (VBBI)
// indirect branch predictor.
//
// VBBI stores several targets of one indirect jump at different BTB sets by
// adding the output value of a compiler-chosen "hint instruction" to the
// jump PC before indexing the BTB. The compiler places the distance from the
// jump back to its hint instruction in the unused low bits of the Alpha jump
// instruction; this package describes that field and the sizes of the
// buffers. The sizes (16-entry HIB, 32-entry HSB, 4K-entry 4-way BTB) and the
// hint field layout follow the published VBBI scheme; the widths of the jump
// tag and of the override table are this design's own choices.
package vbbi_pkg;

  // Alpha addresses and register values are 64 bits wide.
  localparam int unsigned ADDR_W = 64;
  localparam int unsigned DATA_W = 64;
  localparam int unsigned INSN_W = 32;

  // Tag that the pipeline gives each in-flight indirect jump (own choice).
  localparam int unsigned JTAG_W = 8;

  // Hint field of the Alpha jump format (instruction bits 13..0):
  //   bit 13     1 = use VBBI, 0 = no VBBI
  //   bit 12     0 = positive offset, 1 = negative offset
  //   bits 11..0 offset from the hint instruction, in instructions
  // Bits 15..14 hold the Alpha jump type, 20..16 Rb, 25..21 Ra, 31..26 opcode.
  localparam int unsigned HINT_OFF_W   = 12;

  typedef struct packed {
    logic [5:0]            opcode;
    logic [4:0]            ra;
    logic [4:0]            rb;
    logic [1:0]            jump_type;
    logic                  use_vbbi;
    logic                  neg_offset;
    logic [HINT_OFF_W-1:0] offset;
  } alpha_jmp_t;

  // Default sizes of the predictor's tables.
  localparam int unsigned HIB_ENTRIES = 16;
  localparam int unsigned HSB_ENTRIES = 32;
  localparam int unsigned BTB_ENTRIES = 4096;
  localparam int unsigned BTB_WAYS    = 4;

endpackage
