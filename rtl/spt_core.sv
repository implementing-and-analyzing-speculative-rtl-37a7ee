// spt_core: out-of-order backend with Speculative Privacy Tracking.
//
// A 2-wide decode/rename/dispatch front, a reorder buffer with a point of no
// return (PNR), an integer issue unit (2-wide), an FP issue unit (1-wide) and
// a load/store unit, all holding taint, connected by the Untaint Broadcast
// Bus (UBB) with 2 + 1 + 1 lanes. Instructions arrive as raw RISC-V words
// with, for memory instructions, their effective address (address generation
// and the data path are not modelled: taint tracking needs only which
// registers an instruction uses). Execution units are fixed-latency pipes.
//
// Flow per cycle: decode -> rename (taint of the new mapping from the tainting
// rules) -> dispatch, all in one cycle, of the whole group or nothing (`in_ready`);
// each uop takes a ROB entry and goes to the integer or FP issue unit, to the
// LSU, or nowhere (no-ops complete at dispatch). Issue units hold unsafe
// transmitters in s_wait; the LSU holds loads/stores with tainted speculative
// addresses. Untaint events from the issue units and the LSU reach every
// taint store through the UBB. Commit frees stale physical registers and
// load/store queue entries.
//
// Not modelled: fetch and branch prediction, mispredict/exception squash
// (every branch resolves as predicted, so the issue-slot kill is unused), the
// register file and caches. Latencies INT_LAT, FP_LAT, MEM_LAT and the queue
// sizes are this design's choices.
module spt_core
  import spt_pkg::*;
#(
  parameter int INT_SLOTS   = 20,
  parameter int FP_SLOTS    = 16,
  parameter int LDQ_ENTRIES = 16,
  parameter int STQ_ENTRIES = 16,
  parameter int INT_LAT     = 1,
  parameter int FP_LAT      = 4,
  parameter int MEM_LAT     = 4
) (
  input  logic        clk,
  input  logic        rst_n,
  // instruction group
  input  logic        in_valid[CORE_WIDTH],
  input  logic [31:0] in_inst [CORE_WIDTH],
  input  addr_t       in_addr [CORE_WIDTH],
  output logic        in_ready,
  // commit
  output logic        commit_valid[CORE_WIDTH],
  // observation
  output rob_ptr_t    rob_head,
  output rob_ptr_t    rob_pnr,
  output rob_ptr_t    rob_tail,
  output logic [ROB_IDX_W:0] rob_count,
  output ubb_lane_t   ubb_bus[UBB_LANES],
  output logic [$clog2(INT_SLOTS+1)-1:0] int_n_wait,
  output logic [$clog2(FP_SLOTS+1)-1:0]  fp_n_wait,
  output logic [$clog2(INT_SLOTS+1)-1:0] int_n_busy,
  output logic [$clog2(FP_SLOTS+1)-1:0]  fp_n_busy,
  output logic        int_issue[2],
  output logic        fp_issue,
  output logic        ev_addr_blocked,
  output logic        ev_fwd,
  output logic        ev_fwd_blocked,
  output logic        ev_mem_req
);

  localparam int W = CORE_WIDTH;

  // ---------------------------------------------------------------- decode
  dec_uop_t dec[W];
  for (genvar w = 0; w < W; w++) begin : g_dec
    spt_decode u_dec (.inst(in_inst[w]), .dec(dec[w]));
  end

  // ---------------------------------------------------------------- bus
  ubb_lane_t int_lanes[INT_LANES];
  ubb_lane_t fp_lanes [FP_LANES];
  ubb_lane_t lsu_lanes[LSU_LANES];
  int_vec_t  ubb_int, wb_int;
  fp_vec_t   ubb_fp,  wb_fp;

  spt_ubb u_ubb (
    .clk        (clk),
    .rst_n      (rst_n),
    .int_lanes  (int_lanes),
    .fp_lanes   (fp_lanes),
    .lsu_lanes  (lsu_lanes),
    .bus        (ubb_bus),
    .untaint_int(ubb_int),
    .untaint_fp (ubb_fp)
  );

  // ---------------------------------------------------------------- rename
  uop_t  ren_uop[W];
  preg_t stale  [W];
  logic  can_alloc, fire;
  logic  cm_valid[W], cm_has_dst[W], cm_dst_fp[W], cm_is_load[W], cm_is_store[W];
  preg_t cm_stale[W];

  spt_rename #(.WIDTH(W)) u_rename (
    .clk       (clk),
    .rst_n     (rst_n),
    .req_valid (in_valid),
    .dec       (dec),
    .fire      (fire),
    .uop_out   (ren_uop),
    .stale_pdst(stale),
    .can_alloc (can_alloc),
    .ubb_int   (ubb_int),
    .ubb_fp    (ubb_fp),
    .wb_int    (wb_int),
    .wb_fp     (wb_fp),
    .free_valid(cm_has_dst),
    .free_preg (cm_stale),
    .free_is_fp(cm_dst_fp)
  );

  // ---------------------------------------------------------------- ROB
  localparam int N_CMPL = 6;  // 2 integer, 1 FP, 3 LSU
  logic     rob_enq_unsafe[W], rob_enq_busy[W], rob_enq_has_dst[W], rob_enq_dst_fp[W];
  logic     rob_enq_ld[W], rob_enq_st[W];
  rob_idx_t rob_idx[W];
  logic     rob_can_enq;
  logic     cmpl_valid[N_CMPL];
  rob_idx_t cmpl_idx  [N_CMPL];

  always_comb
    for (int w = 0; w < W; w++) begin
      rob_enq_unsafe[w]  = dec[w].is_br || dec[w].is_load || dec[w].is_store;
      rob_enq_busy[w]    = (dec[w].iq != IQ_NONE);
      rob_enq_has_dst[w] = dec[w].uses[OP_DST];
      rob_enq_dst_fp[w]  = dec[w].is_fp[OP_DST];
      rob_enq_ld[w]      = dec[w].is_load;
      rob_enq_st[w]      = dec[w].is_store;
    end

  spt_rob #(.WIDTH(W), .N_CMPL(N_CMPL)) u_rob (
    .clk         (clk),
    .rst_n       (rst_n),
    .enq_valid   (in_valid),
    .enq_unsafe  (rob_enq_unsafe),
    .enq_busy    (rob_enq_busy),
    .enq_has_dst (rob_enq_has_dst),
    .enq_dst_fp  (rob_enq_dst_fp),
    .enq_stale   (stale),
    .enq_is_load (rob_enq_ld),
    .enq_is_store(rob_enq_st),
    .enq_fire    (fire),
    .enq_idx     (rob_idx),
    .can_enq     (rob_can_enq),
    .cmpl_valid  (cmpl_valid),
    .cmpl_idx    (cmpl_idx),
    .head        (rob_head),
    .pnr         (rob_pnr),
    .tail        (rob_tail),
    .count       (rob_count),
    .cm_valid    (cm_valid),
    .cm_has_dst  (cm_has_dst),
    .cm_dst_fp   (cm_dst_fp),
    .cm_stale    (cm_stale),
    .cm_is_load  (cm_is_load),
    .cm_is_store (cm_is_store)
  );

  assign commit_valid = cm_valid;

  // ---------------------------------------------------------------- dispatch
  uop_t dis_uop[W];
  logic dis_int[W], dis_fp[W], dis_mem[W];
  logic int_ready, fp_ready, lsu_ready;

  always_comb
    for (int w = 0; w < W; w++) begin
      dis_uop[w]         = ren_uop[w];
      dis_uop[w].rob_idx = rob_idx[w];
      dis_uop[w].addr    = in_addr[w];
      dis_int[w] = fire && in_valid[w] && (dec[w].iq == IQ_INT);
      dis_fp[w]  = fire && in_valid[w] && (dec[w].iq == IQ_FP);
      dis_mem[w] = in_valid[w] && (dec[w].iq == IQ_MEM);
    end

  assign in_ready = can_alloc && rob_can_enq && int_ready && fp_ready && lsu_ready;
  always_comb begin
    fire = 1'b0;
    for (int w = 0; w < W; w++) fire |= in_valid[w];
    fire &= in_ready;
  end

  // ---------------------------------------------------------------- issue units
  logic      int_iss_v[2];
  uop_t      int_iss_u[2];
  logic      fp_iss_v[1];
  uop_t      fp_iss_u[1];

  spt_issue_unit #(.NUM_SLOTS(INT_SLOTS), .DISPATCH_WIDTH(W), .ISSUE_WIDTH(2), .LANES(INT_LANES)) u_int_iu (
    .clk      (clk),
    .rst_n    (rst_n),
    .dis_valid(dis_int),
    .dis_uop  (dis_uop),
    .dis_ready(int_ready),
    .kill     (1'b0),
    .rob_head (rob_head),
    .rob_pnr  (rob_pnr),
    .ubb_int  (ubb_int),
    .ubb_fp   (ubb_fp),
    .wb_int   (wb_int),
    .wb_fp    (wb_fp),
    .iss_valid(int_iss_v),
    .iss_uop  (int_iss_u),
    .lanes    (int_lanes),
    .n_wait   (int_n_wait),
    .n_busy   (int_n_busy)
  );

  spt_issue_unit #(.NUM_SLOTS(FP_SLOTS), .DISPATCH_WIDTH(W), .ISSUE_WIDTH(1), .LANES(FP_LANES)) u_fp_iu (
    .clk      (clk),
    .rst_n    (rst_n),
    .dis_valid(dis_fp),
    .dis_uop  (dis_uop),
    .dis_ready(fp_ready),
    .kill     (1'b0),
    .rob_head (rob_head),
    .rob_pnr  (rob_pnr),
    .ubb_int  (ubb_int),
    .ubb_fp   (ubb_fp),
    .wb_int   (wb_int),
    .wb_fp    (wb_fp),
    .iss_valid(fp_iss_v),
    .iss_uop  (fp_iss_u),
    .lanes    (fp_lanes),
    .n_wait   (fp_n_wait),
    .n_busy   (fp_n_busy)
  );

  assign int_issue = int_iss_v;
  assign fp_issue  = fp_iss_v[0];

  // ---------------------------------------------------------------- execution
  logic     fu_v [3];
  logic     fu_wb[3];
  preg_t    fu_pd[3];
  logic     fu_fp[3];
  rob_idx_t fu_ri[3];

  for (genvar i = 0; i < 2; i++) begin : g_int_fu
    spt_fu_pipe #(.LAT(INT_LAT)) u_fu (
      .clk(clk), .rst_n(rst_n), .in_valid(int_iss_v[i]), .in_uop(int_iss_u[i]),
      .out_valid(fu_v[i]), .out_wb(fu_wb[i]), .out_pdst(fu_pd[i]), .out_fp(fu_fp[i]),
      .out_rob_idx(fu_ri[i]));
  end
  spt_fu_pipe #(.LAT(FP_LAT)) u_fp_fu (
    .clk(clk), .rst_n(rst_n), .in_valid(fp_iss_v[0]), .in_uop(fp_iss_u[0]),
    .out_valid(fu_v[2]), .out_wb(fu_wb[2]), .out_pdst(fu_pd[2]), .out_fp(fu_fp[2]),
    .out_rob_idx(fu_ri[2]));

  // ---------------------------------------------------------------- LSU
  logic     ld_wb_v[2];
  preg_t    ld_wb_p[2];
  logic     ld_wb_f[2];
  logic     lsu_cmpl_v[3];
  rob_idx_t lsu_cmpl_i[3];

  spt_lsu #(.WIDTH(W), .LDQ_ENTRIES(LDQ_ENTRIES), .STQ_ENTRIES(STQ_ENTRIES), .MEM_LAT(MEM_LAT)) u_lsu (
    .clk            (clk),
    .rst_n          (rst_n),
    .enq_valid      (dis_mem),
    .enq_uop        (dis_uop),
    .enq_fire       (fire),
    .can_enq        (lsu_ready),
    .rob_head       (rob_head),
    .rob_pnr        (rob_pnr),
    .ubb_int        (ubb_int),
    .ubb_fp         (ubb_fp),
    .wb_int         (wb_int),
    .wb_fp          (wb_fp),
    .lane           (lsu_lanes[0]),
    .cm_load        (cm_is_load),
    .cm_store       (cm_is_store),
    .ld_wb_valid    (ld_wb_v),
    .ld_wb_preg     (ld_wb_p),
    .ld_wb_fp       (ld_wb_f),
    .cmpl_valid     (lsu_cmpl_v),
    .cmpl_idx       (lsu_cmpl_i),
    .ev_addr_blocked(ev_addr_blocked),
    .ev_fwd         (ev_fwd),
    .ev_fwd_blocked (ev_fwd_blocked),
    .ev_mem_req     (ev_mem_req)
  );

  // ---------------------------------------------------------------- writeback
  always_comb begin
    wb_int = '0;
    wb_fp  = '0;
    for (int i = 0; i < 3; i++)
      if (fu_wb[i]) begin
        if (fu_fp[i]) wb_fp[fu_pd[i][FP_IDX_W-1:0]] = 1'b1;
        else          wb_int[fu_pd[i]] = 1'b1;
      end
    for (int i = 0; i < 2; i++)
      if (ld_wb_v[i]) begin
        if (ld_wb_f[i]) wb_fp[ld_wb_p[i][FP_IDX_W-1:0]] = 1'b1;
        else            wb_int[ld_wb_p[i]] = 1'b1;
      end
    for (int i = 0; i < 3; i++) begin
      cmpl_valid[i]   = fu_v[i];
      cmpl_idx[i]     = fu_ri[i];
      cmpl_valid[3+i] = lsu_cmpl_v[i];
      cmpl_idx[3+i]   = lsu_cmpl_i[i];
    end
  end

  // ---------------------------------------------------------------- invariants
  // Consistency conditions on the SPT state, in the spirit of the invariants
  // used to constrain formal checks of SPT: physical register indices stay in
  // range, a load's destination is always tainted, a transmitter names at
  // least one transmitted operand, the PNR lies between head and tail, and no
  // transmitter issues while speculative with a tainted transmitted operand
  // (the SPT rule itself).
  function automatic logic preg_ok(uop_t u);
    logic ok;
    ok = 1'b1;
    for (int i = 0; i < 4; i++)
      if (u.uses[i]) ok &= (int'(op_preg(u, i)) < (u.is_fp[i] ? NUM_FP_PREGS : NUM_INT_PREGS));
    return ok;
  endfunction

  function automatic logic leaks(uop_t u, rob_ptr_t head, rob_ptr_t pnr);
    return u.is_tx && |(u.tx_mask & u.taint & u.uses) && !is_nonspec(u.rob_idx, head, pnr);
  endfunction

  for (genvar w = 0; w < W; w++) begin : g_inv_dis
    a_preg_inbounds: assert property (@(posedge clk) disable iff (!rst_n)
      fire && in_valid[w] |-> preg_ok(dis_uop[w]))
      else $error("dispatched uop names a physical register out of range");
    a_load_tainted: assert property (@(posedge clk) disable iff (!rst_n)
      fire && in_valid[w] && dis_uop[w].is_load && dis_uop[w].uses[OP_DST] |-> dis_uop[w].taint[OP_DST])
      else $error("load destination renamed as untainted");
    a_tx_mask: assert property (@(posedge clk) disable iff (!rst_n)
      fire && in_valid[w] |-> dis_uop[w].is_tx == (dis_uop[w].tx_mask != 4'b0000))
      else $error("transmitter flag and transmit mask disagree");
  end

  for (genvar i = 0; i < 2; i++) begin : g_inv_int
    a_int_no_leak: assert property (@(posedge clk) disable iff (!rst_n)
      int_iss_v[i] |-> !leaks(int_iss_u[i], rob_head, rob_pnr) && preg_ok(int_iss_u[i]))
      else $error("integer issue of a tainted speculative transmitter");
  end

  a_fp_no_leak: assert property (@(posedge clk) disable iff (!rst_n)
    fp_iss_v[0] |-> !leaks(fp_iss_u[0], rob_head, rob_pnr) && preg_ok(fp_iss_u[0]))
    else $error("FP issue of a tainted speculative transmitter");

  a_pnr_in_window: assert property (@(posedge clk) disable iff (!rst_n)
    rob_ptr_t'(rob_pnr - rob_head) <= rob_ptr_t'(rob_tail - rob_head))
    else $error("PNR outside the ROB window");

endmodule
