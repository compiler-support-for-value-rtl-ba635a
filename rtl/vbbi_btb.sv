// vbbi_btb: set-associative branch target buffer with LRU replacement.
//
// The BTB is looked up with a key rather than with the branch PC: for a VBBI
// jump the key is PC + 4*hint_value, for every other branch it is the PC.
// The key's bits [SET_W+1:2] select one of ENTRIES/WAYS sets and the bits
// above them form the tag, so one jump can own several entries, one per hint
// value. Each entry holds a valid bit, the tag and the full target address.
//
// Ports and timing:
//   * port A (fetch prediction) and port B (re-prediction for overriding)
//     are combinational reads: hit and target follow the key in the same
//     cycle. A hit on port A marks the way most recently used at the clock
//     edge; port B leaves the LRU state alone.
//   * the update port (commit) writes the correct target at the rising edge:
//     into the way that already holds the key, else into an invalid way,
//     else into the least recently used way, and marks it most recently used.
// Replacement keeps a true-LRU age (0 = most recent) per way and set. The
// arrays have no reset: after reset an initialisation sweep clears one set per
// cycle (valid bits off, ages in a fixed order), which takes SETS cycles.
// During the sweep `ready` is low, lookups miss and updates are dropped. This
// keeps all state in plain memories. Size, ways and LRU
// replacement follow the published VBBI scheme; the full-width tag, the key
// bits used for set and tag and the read/update port timing are this design's
// own choices.
module vbbi_btb
  import vbbi_pkg::*;
#(
  parameter int unsigned ENTRIES  = BTB_ENTRIES,
  parameter int unsigned WAYS     = BTB_WAYS,
  parameter int unsigned ADDR_W_P = ADDR_W,
  localparam int unsigned SETS    = ENTRIES / WAYS,
  localparam int unsigned SET_W   = $clog2(SETS),
  localparam int unsigned TAG_W   = ADDR_W_P - SET_W - 2,
  localparam int unsigned AGE_W   = (WAYS > 1) ? $clog2(WAYS) : 1
) (
  input  logic                clk,
  input  logic                rst_n,
  // port A: fetch prediction
  input  logic                a_valid,
  input  logic [ADDR_W_P-1:0] a_key,
  output logic                a_hit,
  output logic [ADDR_W_P-1:0] a_target,
  // port B: re-prediction
  input  logic [ADDR_W_P-1:0] b_key,
  output logic                b_hit,
  output logic [ADDR_W_P-1:0] b_target,
  // update at commit
  input  logic                u_valid,
  input  logic [ADDR_W_P-1:0] u_key,
  input  logic [ADDR_W_P-1:0] u_target,
  output logic                ready       // initialisation sweep finished
);

  typedef logic [WAYS-1:0][AGE_W-1:0] ages_t;

  ages_t           age_q [SETS];
  logic [WAYS-1:0] a_vld, b_vld, u_vld;

  // initialisation sweep
  logic             init_q;
  logic [SET_W-1:0] init_set_q;
  assign ready = !init_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      init_q     <= 1'b1;
      init_set_q <= '0;
    end else if (init_q) begin
      init_set_q <= init_set_q + 1'b1;
      if (init_set_q == SET_W'(SETS - 1)) init_q <= 1'b0;
    end
  end

  logic [SET_W-1:0] a_set, b_set, u_set;
  logic [TAG_W-1:0] a_tag, b_tag, u_tag;
  assign a_set = a_key[2 +: SET_W];
  assign b_set = b_key[2 +: SET_W];
  assign u_set = u_key[2 +: SET_W];
  assign a_tag = a_key[ADDR_W_P-1 -: TAG_W];
  assign b_tag = b_key[ADDR_W_P-1 -: TAG_W];
  assign u_tag = u_key[ADDR_W_P-1 -: TAG_W];

  logic [WAYS-1:0]     a_match, b_match, u_match, u_we;
  logic [ADDR_W_P-1:0] a_tgt_w [WAYS];
  logic [ADDR_W_P-1:0] b_tgt_w [WAYS];

  for (genvar w = 0; w < WAYS; w++) begin : g_way
    // {valid, tag} and target of this way
    logic [TAG_W:0]      tag_q [SETS];
    logic [ADDR_W_P-1:0] tgt_q [SETS];

    assign a_vld[w]   = ready && tag_q[a_set][TAG_W];
    assign b_vld[w]   = ready && tag_q[b_set][TAG_W];
    assign u_vld[w]   = tag_q[u_set][TAG_W];
    assign a_match[w] = a_vld[w] && (tag_q[a_set][TAG_W-1:0] == a_tag);
    assign b_match[w] = b_vld[w] && (tag_q[b_set][TAG_W-1:0] == b_tag);
    assign u_match[w] = u_vld[w] && (tag_q[u_set][TAG_W-1:0] == u_tag);
    assign a_tgt_w[w] = tgt_q[a_set];
    assign b_tgt_w[w] = tgt_q[b_set];

    always_ff @(posedge clk) begin
      if (init_q) begin
        tag_q[init_set_q] <= '0;
      end else if (u_valid && u_we[w]) begin
        tag_q[u_set] <= {1'b1, u_tag};
        tgt_q[u_set] <= u_target;
      end
    end
  end

  // Ages after making `way` the most recently used.
  function automatic ages_t touch(input ages_t ages, input int unsigned way);
    ages_t r;
    for (int unsigned i = 0; i < WAYS; i++) begin
      if (i == way)                r[i] = '0;
      else if (ages[i] < ages[way]) r[i] = ages[i] + 1'b1;
      else                         r[i] = ages[i];
    end
    return r;
  endfunction

  int unsigned a_way, b_way, u_way;
  ages_t       a_ages, u_base, u_ages;

  always_comb begin
    a_hit = 1'b0; a_way = 0;
    b_hit = 1'b0; b_way = 0;
    for (int unsigned w = 0; w < WAYS; w++) begin
      if (a_match[w] && !a_hit) begin a_hit = 1'b1; a_way = w; end
      if (b_match[w] && !b_hit) begin b_hit = 1'b1; b_way = w; end
    end
    a_target = a_tgt_w[a_way];
    b_target = b_tgt_w[b_way];
  end

  // Ages seen by an update: a port A hit in the same set counts first.
  always_comb begin
    a_ages = touch(age_q[a_set], a_way);
    u_base = (a_valid && a_hit && a_set == u_set) ? a_ages : age_q[u_set];
  end

  // Way written by an update: the matching way, else the first invalid way,
  // else the least recently used way.
  always_comb begin
    logic found;
    found = 1'b0;
    u_way = 0;
    for (int unsigned w = 0; w < WAYS; w++)
      if (u_match[w] && !found) begin found = 1'b1; u_way = w; end
    for (int unsigned w = 0; w < WAYS; w++)
      if (!u_vld[w] && !found) begin found = 1'b1; u_way = w; end
    for (int unsigned w = 0; w < WAYS; w++)
      if (u_base[w] == AGE_W'(WAYS - 1) && !found) begin found = 1'b1; u_way = w; end
    u_we = '0;
    u_we[u_way] = 1'b1;
  end

  assign u_ages = touch(u_base, u_way);

  always_ff @(posedge clk) begin
    if (init_q) begin
      for (int unsigned w = 0; w < WAYS; w++) age_q[init_set_q][w] <= AGE_W'(w);
    end else begin
      if (a_valid && a_hit) age_q[a_set] <= a_ages;
      if (u_valid)          age_q[u_set] <= u_ages;
    end
  end

endmodule
