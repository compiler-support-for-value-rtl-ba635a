// vbbi_predictor: Value-Based BTB Indexing (VBBI) indirect branch target
// predictor, with load-to-store address matching and target prediction
// overriding.
//
// An indirect jump (switch statement, function pointer, virtual call) can go
// to many targets, and a plain BTB remembers only the last one. VBBI lets the
// compiler name, inside the jump's own encoding, a "hint instruction" whose
// result decides the target (for a switch, the instruction that computes the
// switch variable). The hardware keeps that result in the Hint Instruction
// Buffer (HIB) and indexes the BTB with PC + 4*hint, so each hint value gets
// its own BTB entry and its own target.
//
// Data flow, one instruction per cycle at the fetch port:
//   fetch  vbbi_hint_decode finds the hint PC of a jump; vbbi_index_gen reads
//          the HIB, decides whether the entry belongs to the jump, and forms
//          the BTB key; vbbi_btb (port A) gives the predicted target. A jump
//          whose HIB entry is missing claims it. Other instructions learn
//          whether they are a hint instruction (f_is_hint_inst), which the
//          pipeline carries to write-back.
//   wb     a hint instruction writes its result into the HIB; if it is a
//          load, its address is recorded in the Hint Store Buffer (vbbi_hsb).
//   store  a store to a recorded address writes its value into the HIB.
//   change each change of a hint value is offered to vbbi_override, which
//          re-predicts pending jumps (BTB port B) and may redirect fetch.
//   commit the BTB is written at the committed key when the prediction was
//          wrong or missing.
// Fetch outputs are combinational from the fetch inputs; all state changes at
// the rising edge; re-predictions appear one cycle after the hint change.
// After reset the BTB clears itself, one set per cycle (1024 cycles at the
// default size); `ready` rises when it is done, and until then the BTB
// predicts nothing and ignores training.
// cfg_lsam_en and cfg_override_en switch the two optimisations off to give
// the baseline scheme. The pipeline around the predictor is not part of this
// design; its connections are the ports below.
module vbbi_predictor
  import vbbi_pkg::*;
#(
  parameter int unsigned HIB_N = HIB_ENTRIES,
  parameter int unsigned HSB_N = HSB_ENTRIES,
  parameter int unsigned BTB_N = BTB_ENTRIES,
  parameter int unsigned BTB_W = BTB_WAYS,
  parameter int unsigned OVR_N = 8,
  localparam int unsigned IDX_W = $clog2(HIB_N)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              cfg_lsam_en,      // load-to-store address matching
  input  logic              cfg_override_en,  // target prediction overriding
  // fetch
  input  logic              f_valid,
  input  logic [ADDR_W-1:0] f_pc,
  input  logic [INSN_W-1:0] f_insn,
  input  logic              f_is_ind_jmp,
  input  logic [JTAG_W-1:0] f_tag,
  output logic              f_pred_hit,
  output logic [ADDR_W-1:0] f_pred_target,
  output logic [ADDR_W-1:0] f_btb_key,
  output logic              f_vbbi_hit,       // prediction used a hint value
  output logic              f_is_hint_inst,
  // write-back of a hint instruction
  input  logic              wb_valid,
  input  logic [ADDR_W-1:0] wb_pc,
  input  logic [DATA_W-1:0] wb_value,
  input  logic              wb_is_load,
  input  logic [ADDR_W-1:0] wb_ld_addr,
  // stores
  input  logic              st_valid,
  input  logic [ADDR_W-1:0] st_addr,
  input  logic [DATA_W-1:0] st_value,
  // commit / resolution of a branch
  input  logic              c_valid,
  input  logic              c_is_vbbi,        // a jump allocated in the override table
  input  logic [JTAG_W-1:0] c_tag,
  input  logic [ADDR_W-1:0] c_key,
  input  logic              c_pred_hit,
  input  logic [ADDR_W-1:0] c_pred_target,
  input  logic [ADDR_W-1:0] c_target,
  input  logic              flush,
  // re-prediction (target prediction overriding)
  output logic              ov_valid,
  output logic [JTAG_W-1:0] ov_tag,
  output logic [ADDR_W-1:0] ov_key,
  output logic              ov_redirect,
  output logic [ADDR_W-1:0] ov_target,
  output logic              ov_full,          // override table full
  output logic              ready             // BTB initialisation finished
);

  // ---------------- fetch ----------------
  logic              use_vbbi;
  logic [ADDR_W-1:0] hint_pc;

  vbbi_hint_decode u_dec (
    .pc(f_pc), .insn(f_insn), .use_vbbi, .neg_offset(), .offset(), .hint_pc
  );

  logic [IDX_W-1:0]  hib_idx;
  logic              e_valid;
  logic [ADDR_W-1:0] e_jmp_pc, e_hint_pc;
  logic [DATA_W-1:0] e_hint_value;
  logic              vbbi_jump, jmp_hit;
  logic [ADDR_W-1:0] hint_used;

  vbbi_index_gen #(.HIB_ENTRIES_P(HIB_N)) u_idx (
    .pc_valid(f_valid), .pc(f_pc), .is_ind_jmp(f_is_ind_jmp), .use_vbbi,
    .hint_pc, .hib_idx, .e_valid, .e_jmp_pc, .e_hint_pc, .e_hint_value,
    .vbbi_jump, .jmp_hit, .is_hint_inst(f_is_hint_inst), .hint_used,
    .btb_key(f_btb_key)
  );
  assign f_vbbi_hit = jmp_hit;

  // ---------------- HIB ----------------
  logic              hsb_wr_valid;
  logic [IDX_W-1:0]  hsb_wr_idx;
  logic [DATA_W-1:0] hsb_wr_value;
  logic              ev_valid;
  logic [IDX_W-1:0]  ev_idx;
  logic [DATA_W-1:0] ev_old, ev_new;
  logic [ADDR_W-1:0] ev_jmp_pc;

  vbbi_hib #(.ENTRIES(HIB_N)) u_hib (
    .clk, .rst_n,
    .rd_idx(hib_idx), .rd_valid(e_valid), .rd_jmp_pc(e_jmp_pc),
    .rd_hint_pc(e_hint_pc), .rd_hint_value(e_hint_value),
    .alloc_valid(vbbi_jump && !jmp_hit), .alloc_idx(hib_idx),
    .alloc_jmp_pc(f_pc), .alloc_hint_pc(hint_pc),
    .wb_valid, .wb_idx(wb_pc[2 +: IDX_W]), .wb_value,
    .st_valid(cfg_lsam_en && hsb_wr_valid), .st_idx(hsb_wr_idx), .st_value(hsb_wr_value),
    .ev_valid, .ev_idx, .ev_old, .ev_new, .ev_jmp_pc
  );

  // ---------------- HSB ----------------
  vbbi_hsb #(.ENTRIES(HSB_N), .HIB_ENTRIES_P(HIB_N)) u_hsb (
    .clk, .rst_n,
    .rec_valid(cfg_lsam_en && wb_valid && wb_is_load), .rec_addr(wb_ld_addr),
    .rec_idx(wb_pc[2 +: IDX_W]),
    .st_valid, .st_addr, .st_value,
    .hib_wr_valid(hsb_wr_valid), .hib_wr_idx(hsb_wr_idx), .hib_wr_value(hsb_wr_value)
  );

  // ---------------- BTB ----------------
  logic [ADDR_W-1:0] b_key, b_target;
  logic              b_hit;
  logic              c_update;

  // Train only when the committed prediction was missing or wrong.
  assign c_update = c_valid && (!c_pred_hit || c_pred_target != c_target);

  vbbi_btb #(.ENTRIES(BTB_N), .WAYS(BTB_W)) u_btb (
    .clk, .rst_n,
    .a_valid(f_valid), .a_key(f_btb_key), .a_hit(f_pred_hit), .a_target(f_pred_target),
    .b_key, .b_hit, .b_target,
    .u_valid(c_update), .u_key(c_key), .u_target(c_target), .ready
  );

  // ---------------- overriding ----------------
  logic re_valid, re_redirect;

  vbbi_override #(.ENTRIES(OVR_N), .HIB_ENTRIES_P(HIB_N)) u_ovr (
    .clk, .rst_n, .flush,
    .al_valid(cfg_override_en && vbbi_jump), .al_tag(f_tag), .al_pc(f_pc),
    .al_idx(hib_idx), .al_hint(hint_used), .al_pred_hit(f_pred_hit),
    .al_pred_target(f_pred_target),
    .ev_valid(ev_valid && ev_old != ev_new), .ev_idx, .ev_new, .ev_jmp_pc,
    .b_key, .b_hit, .b_target,
    .rs_valid(c_valid && c_is_vbbi), .rs_tag(c_tag),
    .re_valid, .re_tag(ov_tag), .re_key(ov_key), .re_redirect, .re_target(ov_target),
    .full(ov_full)
  );

  assign ov_valid    = cfg_override_en && re_valid;
  assign ov_redirect = cfg_override_en && re_redirect;

endmodule
