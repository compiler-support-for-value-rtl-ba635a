// vbbi_override: target prediction overriding for VBBI jumps.
//
// A jump fetched before its hint instruction has written back is predicted
// with a stale hint value. This unit keeps every in-flight VBBI jump in a
// small table {tag, PC, HIB index, hint used, predicted target}. When the HIB
// reports that the hint value of an entry still owned by a pending jump (same
// index and same jump PC) changed to a value different from the one the jump
// used, that jump is marked for re-prediction. One
// marked jump per cycle (the lowest-numbered) looks the BTB up again with
// key = PC + 4*new hint (BTB port B). The unit then reports the new key
// (re_valid/re_key) so that the jump trains the BTB at that key when it
// commits; if the BTB hits with a target that differs from the current
// prediction it also requests a fetch redirect (re_redirect/re_target).
//
// Timing: a hint change presented on ev_* is registered at the clock edge;
// the re-prediction and redirect for it appear combinationally in the next
// cycle. A change that arrives in the same cycle as the jump's allocation is
// caught too. Entries are freed when the jump resolves (rs_*) or on a flush.
// A jump that finds the table full is not tracked. The pipeline must not
// reuse a tag while its jump is pending (checked by an assertion). The rule "re-predict with
// the new hint and redirect if the prediction changes" follows the design
// description; the table, its size and the one-per-cycle order are this
// design's own choices.
module vbbi_override
  import vbbi_pkg::*;
#(
  parameter int unsigned ENTRIES       = 8,
  parameter int unsigned HIB_ENTRIES_P = HIB_ENTRIES,
  parameter int unsigned ADDR_W_P      = ADDR_W,
  parameter int unsigned DATA_W_P      = DATA_W,
  parameter int unsigned TAG_W         = JTAG_W,
  localparam int unsigned IDX_W        = $clog2(HIB_ENTRIES_P)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                flush,
  // allocation of a fetched VBBI jump
  input  logic                al_valid,
  input  logic [TAG_W-1:0]    al_tag,
  input  logic [ADDR_W_P-1:0] al_pc,
  input  logic [IDX_W-1:0]    al_idx,
  input  logic [DATA_W_P-1:0] al_hint,
  input  logic                al_pred_hit,
  input  logic [ADDR_W_P-1:0] al_pred_target,
  // hint value change reported by the HIB
  input  logic                ev_valid,
  input  logic [IDX_W-1:0]    ev_idx,
  input  logic [DATA_W_P-1:0] ev_new,
  input  logic [ADDR_W_P-1:0] ev_jmp_pc,
  // BTB re-prediction port
  output logic [ADDR_W_P-1:0] b_key,
  input  logic                b_hit,
  input  logic [ADDR_W_P-1:0] b_target,
  // resolution of a jump
  input  logic                rs_valid,
  input  logic [TAG_W-1:0]    rs_tag,
  // re-prediction result
  output logic                re_valid,
  output logic [TAG_W-1:0]    re_tag,
  output logic [ADDR_W_P-1:0] re_key,
  output logic                re_redirect,
  output logic [ADDR_W_P-1:0] re_target,
  output logic                full
);

  typedef struct packed {
    logic [TAG_W-1:0]    tag;
    logic [ADDR_W_P-1:0] pc;
    logic [IDX_W-1:0]    idx;
    logic [DATA_W_P-1:0] hint;
    logic                pred_hit;
    logic [ADDR_W_P-1:0] pred_target;
  } pend_t;

  logic [ENTRIES-1:0] valid_q, recheck_q;
  pend_t              ent_q [ENTRIES];

  // Entry to re-predict this cycle, and free slot for an allocation.
  int unsigned sel, free;
  logic        free_ok;

  always_comb begin
    re_valid = 1'b0;
    sel      = 0;
    free_ok  = 1'b0;
    free     = 0;
    for (int unsigned i = 0; i < ENTRIES; i++) begin
      if (valid_q[i] && recheck_q[i] && !re_valid) begin re_valid = 1'b1; sel = i; end
      if (!valid_q[i] && !free_ok) begin free_ok = 1'b1; free = i; end
    end
    full        = !free_ok;
    b_key       = ent_q[sel].pc + {ent_q[sel].hint[ADDR_W_P-3:0], 2'b00};
    re_tag      = ent_q[sel].tag;
    re_key      = b_key;
    re_target   = b_target;
    re_redirect = re_valid && b_hit &&
                  (!ent_q[sel].pred_hit || b_target != ent_q[sel].pred_target);
  end

  // Pipeline rule: a tag is not reused while its jump is still pending.
  logic tag_pending;
  always_comb begin
    tag_pending = 1'b0;
    for (int unsigned i = 0; i < ENTRIES; i++)
      if (valid_q[i] && ent_q[i].tag == al_tag) tag_pending = 1'b1;
  end

  a_unique_tag: assert property (@(posedge clk) disable iff (flush)
                                 al_valid |-> !tag_pending)
    else $error("vbbi_override: tag %0d allocated while still pending", al_tag);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_q   <= '0;
      recheck_q <= '0;
    end else if (flush) begin
      valid_q   <= '0;
      recheck_q <= '0;
    end else begin
      if (re_valid) begin
        recheck_q[sel] <= 1'b0;
        if (re_redirect) begin
          ent_q[sel].pred_hit    <= 1'b1;
          ent_q[sel].pred_target <= b_target;
        end
      end
      for (int unsigned i = 0; i < ENTRIES; i++) begin
        if (ev_valid && valid_q[i] && ent_q[i].idx == ev_idx && ent_q[i].pc == ev_jmp_pc &&
            ent_q[i].hint != ev_new) begin
          ent_q[i].hint <= ev_new;
          recheck_q[i]  <= 1'b1;
        end
        if (rs_valid && valid_q[i] && ent_q[i].tag == rs_tag) begin
          valid_q[i]   <= 1'b0;
          recheck_q[i] <= 1'b0;
        end
      end
      if (al_valid && free_ok) begin
        valid_q[free]   <= 1'b1;
        ent_q[free].tag <= al_tag;
        ent_q[free].pc  <= al_pc;
        ent_q[free].idx <= al_idx;
        ent_q[free].pred_hit    <= al_pred_hit;
        ent_q[free].pred_target <= al_pred_target;
        if (ev_valid && ev_idx == al_idx && ev_new != al_hint) begin
          ent_q[free].hint  <= ev_new;
          recheck_q[free]   <= 1'b1;
        end else begin
          ent_q[free].hint  <= al_hint;
          recheck_q[free]   <= 1'b0;
        end
      end
    end
  end

endmodule
