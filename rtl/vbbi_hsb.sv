// vbbi_hsb: Hint Store Buffer for load-to-store address matching.
//
// When the hint instruction of a jump is a load, the value a later store
// writes to the same address is a fresher hint than the load's own result,
// which appears only when the load runs again. The HSB records, for each hint
// load that executes, its address together with the HIB entry the load
// feeds. Every store address is compared with all recorded addresses; on a
// match the store value is written as the hint value of that HIB entry.
//
// Organisation (this design's own choice): ENTRIES fully associative entries
// {valid, address, HIB index}. A recorded pair that is already present is not
// recorded twice; otherwise the next entry in round-robin order is replaced.
// Addresses are compared in full (byte address). When several entries match
// one store, the lowest-numbered one is used.
// Timing: the record takes effect at the rising edge; the HIB write request
// (hib_wr_*) is combinational from the store inputs, so the HIB is written at
// the same edge as the store is presented. Reset clears all entries. The
// 32-entry size and the matching rule follow the published VBBI scheme.
module vbbi_hsb
  import vbbi_pkg::*;
#(
  parameter int unsigned ENTRIES     = HSB_ENTRIES,
  parameter int unsigned HIB_ENTRIES_P = HIB_ENTRIES,
  parameter int unsigned ADDR_W_P    = ADDR_W,
  parameter int unsigned DATA_W_P    = DATA_W,
  localparam int unsigned IDX_W      = $clog2(HIB_ENTRIES_P),
  localparam int unsigned PTR_W      = $clog2(ENTRIES)
) (
  input  logic                clk,
  input  logic                rst_n,
  // record the address of an executed hint load
  input  logic                rec_valid,
  input  logic [ADDR_W_P-1:0] rec_addr,
  input  logic [IDX_W-1:0]    rec_idx,
  // a store
  input  logic                st_valid,
  input  logic [ADDR_W_P-1:0] st_addr,
  input  logic [DATA_W_P-1:0] st_value,
  // write of the store value into the HIB
  output logic                hib_wr_valid,
  output logic [IDX_W-1:0]    hib_wr_idx,
  output logic [DATA_W_P-1:0] hib_wr_value
);

  logic [ENTRIES-1:0]  valid_q;
  logic [ADDR_W_P-1:0] addr_q [ENTRIES];
  logic [IDX_W-1:0]    idx_q  [ENTRIES];
  logic [PTR_W-1:0]    ptr_q;

  logic rec_present;

  always_comb begin
    rec_present  = 1'b0;
    hib_wr_valid = 1'b0;
    hib_wr_idx   = '0;
    for (int unsigned i = 0; i < ENTRIES; i++) begin
      if (valid_q[i] && addr_q[i] == rec_addr && idx_q[i] == rec_idx)
        rec_present = 1'b1;
      if (st_valid && valid_q[i] && addr_q[i] == st_addr && !hib_wr_valid) begin
        hib_wr_valid = 1'b1;
        hib_wr_idx   = idx_q[i];
      end
    end
    hib_wr_value = st_value;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_q <= '0;
      ptr_q   <= '0;
    end else if (rec_valid && !rec_present) begin
      valid_q[ptr_q] <= 1'b1;
      ptr_q          <= (ptr_q == PTR_W'(ENTRIES - 1)) ? '0 : ptr_q + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (rec_valid && !rec_present) begin
      addr_q[ptr_q] <= rec_addr;
      idx_q[ptr_q]  <= rec_idx;
    end
  end

endmodule
