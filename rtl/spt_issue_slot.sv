// spt_issue_slot: one issue-queue slot with SPT blocking and untaint logic.
//
// State machine (s_invalid, s_wait, s_valid; BOOM's s_valid_1/s_valid_2 are
// one state here, as their transitions are the same):
//   s_invalid -> s_valid  on a dispatched uop that is safe
//   s_invalid -> s_wait   on a dispatched uop that is unsafe
//   s_wait    -> s_valid  once it is safe;  s_wait stays while unsafe
//   s_valid / s_wait -> s_invalid on clear (issued, or killed)
// A uop is unsafe when it is a transmitter, a tainted operand overlaps its
// transmittable-operand mask, and it is still speculative (its ROB index lies
// beyond the PNR). Only s_valid can request issue, and only once its source
// operands are ready, so safe uops pay no extra latency.
//
// Taint bits, one per operand slot (bit 0 destination, 1..3 sources), are
// cleared by:
//   * UBB events naming the register (no re-broadcast);
//   * the uop itself being a non-speculative transmitter: its transmittable
//     operands are untainted;
//   * forward propagation: destination untainted when all read sources are;
//   * backward propagation: a source untainted when the destination and all
//     other sources are, for invertible uops (INV_FUL) or conditionally
//     invertible ones whose condition holds.
// Rules are evaluated on the registered taint bits and take effect at the
// next edge. Every internally derived untaint also sets the matching bit of
// the broadcast queue (bit 0 = pdst). The slot requests a UBB lane while any
// queue bit is set, presents its lowest set bit, and clears that bit at the
// edge that ends a granted cycle. Pending queue bits are dropped when the
// slot is cleared; that loses only a performance opportunity.
module spt_issue_slot
  import spt_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  // dispatch
  input  logic      in_valid,
  input  uop_t      in_uop,
  // clear
  input  logic      issue,       // issued this cycle
  input  logic      kill,        // flushed
  // speculation state from the ROB
  input  rob_ptr_t  rob_head,
  input  rob_ptr_t  rob_pnr,
  // bus and wakeup, one bit per physical register
  input  int_vec_t  ubb_int,
  input  fp_vec_t   ubb_fp,
  input  int_vec_t  wb_int,
  input  fp_vec_t   wb_fp,
  // status
  output logic      occupied,
  output logic      waiting,     // in s_wait
  output logic      can_issue,
  output uop_t      uop,
  // untaint broadcast
  output logic      bcast_req,
  output ubb_lane_t bcast_lane,
  input  logic      bcast_grant
);

  typedef enum logic [1:0] {S_INVALID = 2'd0, S_VALID = 2'd1, S_WAIT = 2'd2} slot_state_e;

  slot_state_e state_q;
  uop_t        uop_q;
  logic [3:0]  queue_q;

  function automatic logic unsafe(uop_t u, logic [3:0] t, logic ns);
    return u.is_tx && (|(u.tx_mask & t & u.uses)) && !ns;
  endfunction

  function automatic logic [3:0] reg_hits(uop_t u, int_vec_t iv, fp_vec_t fv);
    logic [3:0] h;
    for (int k = 0; k < 4; k++) h[k] = u.uses[k] && vec_hit(iv, fv, op_preg(u, k), u.is_fp[k]);
    return h;
  endfunction

  logic       nonspec;
  logic [3:0] t, ubb_hit, internal, tx_unt, fwd, bwd;
  logic       invertible;
  logic [1:0] bsel;

  assign nonspec = is_nonspec(uop_q.rob_idx, rob_head, rob_pnr);
  assign t       = uop_q.taint & uop_q.uses;
  assign ubb_hit = reg_hits(uop_q, ubb_int, ubb_fp);

  always_comb begin
    logic others_clean;
    unique case (uop_q.inv)
      INV_ZR1: invertible = uop_q.rs1_x0;
      INV_ZR2: invertible = uop_q.rs2_x0;
      INV_ZRX: invertible = uop_q.rs1_x0 || uop_q.rs2_x0;
      INV_ER1: invertible = uop_q.rs_eq;
      INV_ZIM: invertible = uop_q.imm_zero;
      INV_FUL: invertible = 1'b1;
      default: invertible = 1'b0;
    endcase

    tx_unt = (uop_q.is_tx && nonspec) ? (uop_q.tx_mask & t) : 4'b0;

    fwd = '0;
    if (uop_q.uses[OP_DST] && !uop_q.is_load && t[OP_DST] && (t[3:1] == 3'b0))
      fwd[OP_DST] = 1'b1;

    bwd = '0;
    others_clean = 1'b1;
    if (invertible && uop_q.uses[OP_DST] && !t[OP_DST])
      for (int k = OP_RS1; k <= OP_RS3; k++) begin
        others_clean = 1'b1;
        for (int j = OP_RS1; j <= OP_RS3; j++)
          if (j != k && t[j] && !(uop_q.rs_eq && ((j == OP_RS1 && k == OP_RS2) || (j == OP_RS2 && k == OP_RS1))))
            others_clean = 1'b0;
        if (t[k] && others_clean) bwd[k] = 1'b1;
      end

    internal = (state_q == S_INVALID) ? 4'b0 : ((tx_unt | fwd | bwd) & t);
  end

  logic [3:0] t_next, q_next;
  uop_t       in_new;
  always_comb begin
    in_new       = in_uop;
    in_new.taint = in_uop.taint & ~reg_hits(in_uop, ubb_int, ubb_fp);
    in_new.ready = in_uop.ready | reg_hits(in_uop, wb_int, wb_fp);
  end

  always_comb begin
    t_next = t & ~internal & ~ubb_hit;
    q_next = (queue_q | internal) & ~ubb_hit;
    if (bcast_grant) q_next[bsel] = 1'b0;
  end

  // lowest pending queue bit
  always_comb begin
    bsel = 2'd0;
    for (int k = 3; k >= 0; k--) if (queue_q[k]) bsel = 2'(k);
  end

  assign occupied   = (state_q != S_INVALID);
  assign waiting    = (state_q == S_WAIT);
  assign can_issue  = (state_q == S_VALID) && ((uop_q.ready[3:1] | ~uop_q.uses[3:1]) == 3'b111);
  assign uop        = uop_q;
  assign bcast_req  = occupied && (queue_q != 4'b0);
  assign bcast_lane = '{valid: bcast_req, reg_id: op_preg(uop_q, int'(bsel)), is_fp: uop_q.is_fp[bsel]};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= S_INVALID;
      uop_q   <= '0;
      queue_q <= '0;
    end else if (in_valid) begin
      // a free slot takes a new uop; events of this cycle already apply
      uop_q   <= in_new;
      queue_q <= '0;
      state_q <= unsafe(in_new, in_new.taint, is_nonspec(in_new.rob_idx, rob_head, rob_pnr)) ? S_WAIT : S_VALID;
    end else if (state_q != S_INVALID) begin
      uop_q.taint <= t_next;
      uop_q.ready <= uop_q.ready | reg_hits(uop_q, wb_int, wb_fp);
      queue_q     <= q_next;
      if (issue || kill) begin
        state_q <= S_INVALID;
        queue_q <= '0;
      end else if (state_q == S_WAIT && !unsafe(uop_q, t, nonspec)) begin
        state_q <= S_VALID;
      end
    end
  end

  // a slot in s_wait never issues
  a_issue_valid: assert property (@(posedge clk) disable iff (!rst_n) issue |-> state_q == S_VALID)
    else $error("issue from a slot not in s_valid");

endmodule
