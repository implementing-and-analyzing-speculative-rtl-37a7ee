// spt_lsu: load/store unit with SPT address blocking and secure forwarding.
//
// Load queue (LDQ) and store queue (STQ) entries keep the taint of the
// address register, and store entries also the taint of the data register;
// both are cleared by Untaint Broadcast Bus events. Loads and stores are
// transmitters of their address: an entry may not send its address to memory
// while the address is tainted and the instruction is speculative. When a
// memory uop with a tainted address becomes non-speculative (its ROB index
// reaches the PNR), it untaints the address register and broadcasts it.
//
// Execution, one store and one load per cycle. Stores go lowest queue index
// first. Loads go oldest first: a load waiting on a blocked forward can then
// only wait on older stores, which become non-speculative before it, so the
// queue cannot deadlock. In detail:
//   * a store executes (address translated, ROB entry completed) once its
//     address and data are available and its address is safe;
//   * a load with a safe address asks spt_fwd_age_logic for the youngest older
//     store with the same address. Without a match it goes to memory and
//     writes back after MEM_LAT cycles, its destination tainted (no shadow
//     cache). With a match it forwards only if every store from the match up
//     to the load has an untainted address and the store data is available;
//     otherwise it waits (forwarding is blocked, not its untaint alone). A
//     forwarded load writes back one cycle later; if the store data was
//     untainted, the load's destination is untainted too and broadcast.
// The LSU owns one UBB lane: pending untaint events (load address, load
// destination, store address) are sent one per cycle. Entries leave the
// queues in order when the ROB commits them. Store data is assumed written to
// memory at commit, outside this model. Effective addresses come with the uop
// (address generation is outside this unit). Queue sizes and MEM_LAT are
// this design's choices.
module spt_lsu
  import spt_pkg::*;
#(
  parameter int WIDTH       = CORE_WIDTH,
  parameter int LDQ_ENTRIES = 16,
  parameter int STQ_ENTRIES = 16,
  parameter int MEM_LAT     = 4
) (
  input  logic      clk,
  input  logic      rst_n,
  // dispatch
  input  logic      enq_valid[WIDTH],
  input  uop_t      enq_uop  [WIDTH],
  input  logic      enq_fire,
  output logic      can_enq,
  // speculation state
  input  rob_ptr_t  rob_head,
  input  rob_ptr_t  rob_pnr,
  // bus and wakeup
  input  int_vec_t  ubb_int,
  input  fp_vec_t   ubb_fp,
  input  int_vec_t  wb_int,
  input  fp_vec_t   wb_fp,
  output ubb_lane_t lane,
  // commit
  input  logic      cm_load [WIDTH],
  input  logic      cm_store[WIDTH],
  // results
  output logic      ld_wb_valid[2],     // [0] memory, [1] forwarded
  output preg_t     ld_wb_preg [2],
  output logic      ld_wb_fp   [2],
  output logic      cmpl_valid [3],     // [0] store, [1] [2] loads
  output rob_idx_t  cmpl_idx   [3],
  // events, one pulse each
  output logic      ev_addr_blocked,    // a memory uop waits on a tainted speculative address
  output logic      ev_fwd,             // a load forwarded from a store
  output logic      ev_fwd_blocked,     // a matching forward was blocked
  output logic      ev_mem_req          // a load was sent to memory
);

  localparam int LI = $clog2(LDQ_ENTRIES);
  localparam int SI = $clog2(STQ_ENTRIES);

  typedef struct packed {
    logic       valid;
    rob_idx_t   rob_idx;
    addr_t      addr;
    preg_t      addr_preg;
    logic       addr_taint;
    logic       addr_ready;
    preg_t      pdst;
    logic       dst_fp;
    logic [SI:0] st_tail;
    logic       fired;
    logic [1:0] pend;       // [0] address untaint, [1] destination untaint
  } ldq_e_t;

  typedef struct packed {
    logic       valid;
    rob_idx_t   rob_idx;
    addr_t      addr;
    preg_t      addr_preg;
    logic       addr_taint;
    logic       addr_ready;
    preg_t      data_preg;
    logic       data_fp;
    logic       data_taint;
    logic       data_ready;
    logic       fired;
    logic       pend;       // address untaint
  } stq_e_t;

  ldq_e_t ldq_q[LDQ_ENTRIES];
  stq_e_t stq_q[STQ_ENTRIES];
  logic [LI:0] ldq_head_q, ldq_tail_q;
  logic [SI:0] stq_head_q, stq_tail_q;

  // memory and forward return pipes
  logic [MEM_LAT-1:0] mem_v_q;
  logic [LI-1:0]      mem_i_q[MEM_LAT];
  logic               fwd_v_q;
  logic [LI-1:0]      fwd_i_q;

  // ---------------------------------------------------------------- enqueue
  logic [LI:0] ld_cnt, ld_free;
  logic [SI:0] st_cnt, st_free;
  assign ld_cnt  = ldq_tail_q - ldq_head_q;
  assign st_cnt  = stq_tail_q - stq_head_q;
  assign ld_free = (LI+1)'(LDQ_ENTRIES) - ld_cnt;
  assign st_free = (SI+1)'(STQ_ENTRIES) - st_cnt;
  assign can_enq = (int'(ld_free) >= WIDTH) && (int'(st_free) >= WIDTH);

  // ---------------------------------------------------------------- store select
  logic          st_sel_v;
  logic [SI-1:0] st_sel;
  logic          st_blk;
  always_comb begin
    st_sel_v = 1'b0;
    st_sel   = '0;
    st_blk   = 1'b0;
    for (int e = STQ_ENTRIES - 1; e >= 0; e--) begin
      stq_e_t s;
      s = stq_q[e];
      if (s.valid && !s.fired && s.addr_ready && s.data_ready) begin
        if (!s.addr_taint || is_nonspec(s.rob_idx, rob_head, rob_pnr)) begin
          st_sel_v = 1'b1;
          st_sel   = SI'(e);
        end else begin
          st_blk = 1'b1;
        end
      end
    end
  end

  // ---------------------------------------------------------------- load select
  logic          ld_sel_v;
  logic [LI-1:0] ld_sel;
  logic          ld_blk;
  always_comb begin
    ld_sel_v = 1'b0;
    ld_sel   = '0;
    ld_blk   = 1'b0;
    for (int o = 0; o < LDQ_ENTRIES; o++) begin
      ldq_e_t l;
      logic [LI-1:0] e;
      e = LI'(ldq_head_q) + LI'(o);
      l = ldq_q[e];
      if (l.valid && !l.fired && l.addr_ready) begin
        if (!l.addr_taint || is_nonspec(l.rob_idx, rob_head, rob_pnr)) begin
          if (!ld_sel_v) begin
            ld_sel_v = 1'b1;
            ld_sel   = e;
          end
        end else begin
          ld_blk = 1'b1;
        end
      end
    end
  end

  logic          st_addr_valid[STQ_ENTRIES];
  addr_t         st_addr      [STQ_ENTRIES];
  logic          st_addr_taint[STQ_ENTRIES];
  logic          f_match, f_ok;
  logic [SI-1:0] f_idx;
  logic [$clog2(STQ_ENTRIES+1)-1:0] f_cnt;

  always_comb
    for (int e = 0; e < STQ_ENTRIES; e++) begin
      st_addr_valid[e] = stq_q[e].valid && stq_q[e].addr_ready;
      st_addr[e]       = stq_q[e].addr;
      st_addr_taint[e] = stq_q[e].valid && stq_q[e].addr_taint;
    end

  spt_fwd_age_logic #(.STQ_ENTRIES(STQ_ENTRIES)) u_age (
    .st_addr_valid(st_addr_valid),
    .st_addr      (st_addr),
    .st_addr_taint(st_addr_taint),
    .stq_head     (stq_head_q),
    .ld_stq_tail  (ldq_q[ld_sel].st_tail),
    .ld_addr      (ldq_q[ld_sel].addr),
    .match        (f_match),
    .match_idx    (f_idx),
    .tainted_cnt  (f_cnt),
    .fwd_ok       (f_ok)
  );

  logic ld_go_mem, ld_go_fwd, ld_fwd_untaint;
  assign ld_go_mem      = ld_sel_v && !f_match;
  assign ld_go_fwd      = ld_sel_v && f_ok && stq_q[f_idx].data_ready;
  assign ld_fwd_untaint = ld_go_fwd && !stq_q[f_idx].data_taint;

  assign ev_addr_blocked = ld_blk || st_blk;
  assign ev_fwd          = ld_go_fwd;
  assign ev_fwd_blocked  = ld_sel_v && f_match && !ld_go_fwd;
  assign ev_mem_req      = ld_go_mem;

  // ---------------------------------------------------------------- results
  always_comb begin
    ld_wb_valid[0] = mem_v_q[MEM_LAT-1];
    ld_wb_preg[0]  = ldq_q[mem_i_q[MEM_LAT-1]].pdst;
    ld_wb_fp[0]    = ldq_q[mem_i_q[MEM_LAT-1]].dst_fp;
    ld_wb_valid[1] = fwd_v_q;
    ld_wb_preg[1]  = ldq_q[fwd_i_q].pdst;
    ld_wb_fp[1]    = ldq_q[fwd_i_q].dst_fp;
    cmpl_valid[0]  = st_sel_v;
    cmpl_idx[0]    = stq_q[st_sel].rob_idx;
    cmpl_valid[1]  = ld_wb_valid[0];
    cmpl_idx[1]    = ldq_q[mem_i_q[MEM_LAT-1]].rob_idx;
    cmpl_valid[2]  = ld_wb_valid[1];
    cmpl_idx[2]    = ldq_q[fwd_i_q].rob_idx;
  end

  // ---------------------------------------------------------------- UBB lane
  logic          ln_ld, ln_st, ln_ld_dst;
  logic [LI-1:0] ln_li;
  logic [SI-1:0] ln_si;
  always_comb begin
    ln_ld = 1'b0; ln_st = 1'b0; ln_ld_dst = 1'b0;
    ln_li = '0;   ln_si = '0;
    lane  = '0;
    for (int e = STQ_ENTRIES - 1; e >= 0; e--)
      if (stq_q[e].valid && stq_q[e].pend) begin
        ln_st = 1'b1;
        ln_si = SI'(e);
      end
    for (int e = LDQ_ENTRIES - 1; e >= 0; e--)
      if (ldq_q[e].valid && ldq_q[e].pend != 2'b00) begin
        ln_ld = 1'b1;
        ln_li = LI'(e);
      end
    if (ln_ld) begin
      ln_st     = 1'b0;
      ln_ld_dst = !ldq_q[ln_li].pend[0];
      lane      = ln_ld_dst ? '{valid: 1'b1, reg_id: ldq_q[ln_li].pdst, is_fp: ldq_q[ln_li].dst_fp}
                            : '{valid: 1'b1, reg_id: ldq_q[ln_li].addr_preg, is_fp: 1'b0};
    end else if (ln_st) begin
      lane = '{valid: 1'b1, reg_id: stq_q[ln_si].addr_preg, is_fp: 1'b0};
    end
  end

  // ---------------------------------------------------------------- state
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int e = 0; e < LDQ_ENTRIES; e++) ldq_q[e] <= '0;
      for (int e = 0; e < STQ_ENTRIES; e++) stq_q[e] <= '0;
      ldq_head_q <= '0;
      ldq_tail_q <= '0;
      stq_head_q <= '0;
      stq_tail_q <= '0;
      mem_v_q    <= '0;
      for (int i = 0; i < MEM_LAT; i++) mem_i_q[i] <= '0;
      fwd_v_q    <= 1'b0;
      fwd_i_q    <= '0;
    end else begin
      int nl, ns;
      // per-entry taint and readiness
      for (int e = 0; e < LDQ_ENTRIES; e++)
        if (ldq_q[e].valid) begin
          if (vec_hit(wb_int, wb_fp, ldq_q[e].addr_preg, 1'b0)) ldq_q[e].addr_ready <= 1'b1;
          if (ldq_q[e].addr_taint) begin
            if (vec_hit(ubb_int, ubb_fp, ldq_q[e].addr_preg, 1'b0)) begin
              ldq_q[e].addr_taint <= 1'b0;
            end else if (is_nonspec(ldq_q[e].rob_idx, rob_head, rob_pnr)) begin
              ldq_q[e].addr_taint <= 1'b0;
              ldq_q[e].pend[0]    <= 1'b1;
            end
          end
        end
      for (int e = 0; e < STQ_ENTRIES; e++)
        if (stq_q[e].valid) begin
          if (vec_hit(wb_int, wb_fp, stq_q[e].addr_preg, 1'b0)) stq_q[e].addr_ready <= 1'b1;
          if (vec_hit(wb_int, wb_fp, stq_q[e].data_preg, stq_q[e].data_fp)) stq_q[e].data_ready <= 1'b1;
          if (vec_hit(ubb_int, ubb_fp, stq_q[e].data_preg, stq_q[e].data_fp)) stq_q[e].data_taint <= 1'b0;
          if (stq_q[e].addr_taint) begin
            if (vec_hit(ubb_int, ubb_fp, stq_q[e].addr_preg, 1'b0)) begin
              stq_q[e].addr_taint <= 1'b0;
            end else if (is_nonspec(stq_q[e].rob_idx, rob_head, rob_pnr)) begin
              stq_q[e].addr_taint <= 1'b0;
              stq_q[e].pend       <= 1'b1;
            end
          end
        end

      // broadcast sent
      if (ln_ld) begin
        if (ln_ld_dst) ldq_q[ln_li].pend[1] <= 1'b0;
        else           ldq_q[ln_li].pend[0] <= 1'b0;
      end else if (ln_st) begin
        stq_q[ln_si].pend <= 1'b0;
      end

      // execution
      if (st_sel_v) stq_q[st_sel].fired <= 1'b1;
      if (ld_go_mem || ld_go_fwd) ldq_q[ld_sel].fired <= 1'b1;
      if (ld_fwd_untaint) ldq_q[ld_sel].pend[1] <= 1'b1;
      mem_v_q    <= {mem_v_q[MEM_LAT-2:0], ld_go_mem};
      mem_i_q[0] <= ld_sel;
      for (int i = 1; i < MEM_LAT; i++) mem_i_q[i] <= mem_i_q[i-1];
      fwd_v_q    <= ld_go_fwd;
      fwd_i_q    <= ld_sel;

      // commit: free queue heads in order
      nl = 0;
      ns = 0;
      for (int w = 0; w < WIDTH; w++) begin
        if (cm_load[w]) begin
          ldq_q[LI'(ldq_head_q) + LI'(nl)].valid <= 1'b0;
          nl++;
        end
        if (cm_store[w]) begin
          stq_q[SI'(stq_head_q) + SI'(ns)].valid <= 1'b0;
          ns++;
        end
      end
      ldq_head_q <= ldq_head_q + (LI+1)'(nl);
      stq_head_q <= stq_head_q + (SI+1)'(ns);

      // enqueue
      if (enq_fire) begin
        nl = 0;
        ns = 0;
        for (int w = 0; w < WIDTH; w++)
          if (enq_valid[w]) begin
            uop_t u;
            u = enq_uop[w];
            if (u.is_load) begin
              ldq_q[LI'(ldq_tail_q) + LI'(nl)] <= '{
                valid: 1'b1, rob_idx: u.rob_idx, addr: u.addr, addr_preg: u.prs1,
                addr_taint: u.taint[OP_RS1] && !vec_hit(ubb_int, ubb_fp, u.prs1, 1'b0),
                addr_ready: u.ready[OP_RS1] || vec_hit(wb_int, wb_fp, u.prs1, 1'b0),
                pdst: u.pdst, dst_fp: u.is_fp[OP_DST],
                st_tail: stq_tail_q + (SI+1)'(ns), fired: 1'b0, pend: 2'b00};
              nl++;
            end else if (u.is_store) begin
              stq_q[SI'(stq_tail_q) + SI'(ns)] <= '{
                valid: 1'b1, rob_idx: u.rob_idx, addr: u.addr, addr_preg: u.prs1,
                addr_taint: u.taint[OP_RS1] && !vec_hit(ubb_int, ubb_fp, u.prs1, 1'b0),
                addr_ready: u.ready[OP_RS1] || vec_hit(wb_int, wb_fp, u.prs1, 1'b0),
                data_preg: u.prs2, data_fp: u.is_fp[OP_RS2],
                data_taint: u.taint[OP_RS2] && !vec_hit(ubb_int, ubb_fp, u.prs2, u.is_fp[OP_RS2]),
                data_ready: u.ready[OP_RS2] || vec_hit(wb_int, wb_fp, u.prs2, u.is_fp[OP_RS2]),
                fired: 1'b0, pend: 1'b0};
              ns++;
            end
          end
        ldq_tail_q <= ldq_tail_q + (LI+1)'(nl);
        stq_tail_q <= stq_tail_q + (SI+1)'(ns);
      end
    end
  end

  a_enq_room: assert property (@(posedge clk) disable iff (!rst_n) enq_fire |-> can_enq)
    else $error("LSU enqueue while full");

endmodule
