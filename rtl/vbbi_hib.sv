// vbbi_hib: Hint Instruction Buffer of the VBBI predictor.
//
// Each of the ENTRIES entries holds the PC of an indirect jump (jmp_pc), the
// PC of its hint instruction (hint_pc) and the latest output of that hint
// instruction (hint_value). The buffer is direct-mapped on bits of the hint
// instruction's PC, so the index is computed outside (vbbi_index_gen).
//
// Ports and timing:
//   * one combinational read port used at fetch (rd_idx -> rd_*);
//   * alloc: a VBBI jump whose entry is missing claims the entry at its hint
//     PC's index; jmp_pc and hint_pc are written and hint_value is cleared;
//   * wb: a hint instruction writes its result at write-back;
//   * st: the Hint Store Buffer writes a store value (load-to-store address
//     matching).
// All writes take effect at the rising clock edge. The write-back port wins
// over the store port on the same entry, and an allocation wins over both.
// For each accepted hint_value write the port ev_* reports the entry, the jump
// that owns it, the old and the new value in the same cycle, for target
// prediction overriding.
// Reset clears all valid bits. The three fields and the use of the buffer at
// fetch and write-back follow the published VBBI scheme; allocation, the port
// priorities and the event port are this design's own choices.
module vbbi_hib
  import vbbi_pkg::*;
#(
  parameter int unsigned ENTRIES  = HIB_ENTRIES,
  parameter int unsigned ADDR_W_P = ADDR_W,
  parameter int unsigned DATA_W_P = DATA_W,
  localparam int unsigned IDX_W   = $clog2(ENTRIES)
) (
  input  logic                clk,
  input  logic                rst_n,
  // fetch read port
  input  logic [IDX_W-1:0]    rd_idx,
  output logic                rd_valid,
  output logic [ADDR_W_P-1:0] rd_jmp_pc,
  output logic [ADDR_W_P-1:0] rd_hint_pc,
  output logic [DATA_W_P-1:0] rd_hint_value,
  // allocation by a jump
  input  logic                alloc_valid,
  input  logic [IDX_W-1:0]    alloc_idx,
  input  logic [ADDR_W_P-1:0] alloc_jmp_pc,
  input  logic [ADDR_W_P-1:0] alloc_hint_pc,
  // write-back of a hint instruction
  input  logic                wb_valid,
  input  logic [IDX_W-1:0]    wb_idx,
  input  logic [DATA_W_P-1:0] wb_value,
  // store value from the Hint Store Buffer
  input  logic                st_valid,
  input  logic [IDX_W-1:0]    st_idx,
  input  logic [DATA_W_P-1:0] st_value,
  // hint value change event
  output logic                ev_valid,
  output logic [IDX_W-1:0]    ev_idx,
  output logic [DATA_W_P-1:0] ev_old,
  output logic [DATA_W_P-1:0] ev_new,
  output logic [ADDR_W_P-1:0] ev_jmp_pc     // jump that owns the entry
);

  logic [ENTRIES-1:0]  valid_q;
  logic [ADDR_W_P-1:0] jmp_pc_q  [ENTRIES];
  logic [ADDR_W_P-1:0] hint_pc_q [ENTRIES];
  logic [DATA_W_P-1:0] value_q   [ENTRIES];

  assign rd_valid      = valid_q[rd_idx];
  assign rd_jmp_pc     = jmp_pc_q[rd_idx];
  assign rd_hint_pc    = hint_pc_q[rd_idx];
  assign rd_hint_value = value_q[rd_idx];

  // Select the hint_value write of this cycle.
  always_comb begin
    ev_valid = 1'b0;
    ev_idx   = wb_idx;
    ev_new   = wb_value;
    if (wb_valid && valid_q[wb_idx]) begin
      ev_valid = 1'b1;
    end else if (st_valid && valid_q[st_idx]) begin
      ev_valid = 1'b1;
      ev_idx   = st_idx;
      ev_new   = st_value;
    end
    if (alloc_valid && alloc_idx == ev_idx) ev_valid = 1'b0;
    ev_old    = value_q[ev_idx];
    ev_jmp_pc = jmp_pc_q[ev_idx];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_q <= '0;
    end else if (alloc_valid) begin
      valid_q[alloc_idx] <= 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (ev_valid) value_q[ev_idx] <= ev_new;
    if (alloc_valid) begin
      jmp_pc_q[alloc_idx]  <= alloc_jmp_pc;
      hint_pc_q[alloc_idx] <= alloc_hint_pc;
      value_q[alloc_idx]   <= '0;
    end
  end

endmodule
