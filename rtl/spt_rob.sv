// spt_rob: reorder buffer with head, point of no return (PNR) and tail.
//
// A circular buffer of ROB_ENTRIES entries (64: two interleaved banks of 32 in
// the described 2-wide core, a flat array here). Up to WIDTH uops enter at the
// tail per cycle when `enq_fire` is asserted; up to WIDTH completed uops leave
// at the head per cycle. Each entry holds busy (not yet executed), unsafe (may
// still squash younger instructions) and what commit must return (stale
// destination register, load/store).
//
// The PNR points at the oldest entry that is still unsafe, or at the tail if
// none is. SPT reads it as its visibility point: an instruction whose index
// lies from the head up to the PNR can no longer be squashed by an older one
// and is non-speculative (see spt_pkg::is_nonspec). Which uops are unsafe is
// this design's choice following BOOM: branches, indirect jumps, loads and
// stores, until they complete. Pointers carry a wrap bit. The PNR is
// recomputed every cycle by a scan from the head (registered), an assumed
// implementation of BOOM's PNR; mispredict rollback is not modelled.
module spt_rob
  import spt_pkg::*;
#(
  parameter int WIDTH  = CORE_WIDTH,
  parameter int N_CMPL = 5
) (
  input  logic     clk,
  input  logic     rst_n,
  // enqueue
  input  logic     enq_valid [WIDTH],
  input  logic     enq_unsafe[WIDTH],
  input  logic     enq_busy  [WIDTH],
  input  logic     enq_has_dst[WIDTH],
  input  logic     enq_dst_fp[WIDTH],
  input  preg_t    enq_stale [WIDTH],
  input  logic     enq_is_load [WIDTH],
  input  logic     enq_is_store[WIDTH],
  input  logic     enq_fire,
  output rob_idx_t enq_idx   [WIDTH],
  output logic     can_enq,
  // completion (clears busy and unsafe)
  input  logic     cmpl_valid[N_CMPL],
  input  rob_idx_t cmpl_idx  [N_CMPL],
  // pointers
  output rob_ptr_t head,
  output rob_ptr_t pnr,
  output rob_ptr_t tail,
  output logic [ROB_IDX_W:0] count,
  // commit
  output logic     cm_valid   [WIDTH],
  output logic     cm_has_dst [WIDTH],
  output logic     cm_dst_fp  [WIDTH],
  output preg_t    cm_stale   [WIDTH],
  output logic     cm_is_load [WIDTH],
  output logic     cm_is_store[WIDTH]
);

  typedef struct packed {
    logic  has_dst;
    logic  dst_fp;
    preg_t stale;
    logic  is_load;
    logic  is_store;
  } rob_info_t;

  logic      busy_q  [ROB_ENTRIES];
  logic      unsafe_q[ROB_ENTRIES];
  rob_info_t info_q  [ROB_ENTRIES];
  rob_ptr_t  head_q, tail_q, pnr_q;

  assign head  = head_q;
  assign tail  = tail_q;
  assign pnr   = pnr_q;
  assign count = tail_q - head_q;
  assign can_enq = (int'(count) <= ROB_ENTRIES - WIDTH);

  // enqueue slots: k-th valid uop goes to tail + k
  localparam int NW = $clog2(WIDTH + 1);
  logic [NW-1:0] n_enq, n_cm;
  always_comb begin
    n_enq = '0;
    for (int w = 0; w < WIDTH; w++) begin
      enq_idx[w] = rob_idx_t'(tail_q) + rob_idx_t'(n_enq);
      if (enq_valid[w]) n_enq = n_enq + 1'b1;
    end
  end

  // commit: completed entries in order from the head
  always_comb begin
    logic go;
    rob_idx_t i;
    go = 1'b1;
    n_cm = '0;
    for (int w = 0; w < WIDTH; w++) begin
      i = rob_idx_t'(head_q) + rob_idx_t'(w);
      go = go && (w < int'(count)) && !busy_q[i];
      cm_valid[w]    = go;
      cm_has_dst[w]  = go && info_q[i].has_dst;
      cm_dst_fp[w]   = info_q[i].dst_fp;
      cm_stale[w]    = info_q[i].stale;
      cm_is_load[w]  = go && info_q[i].is_load;
      cm_is_store[w] = go && info_q[i].is_store;
      if (go) n_cm = n_cm + 1'b1;
    end
  end

  // next-cycle state of the unsafe bits, then the PNR scan over it
  logic     unsafe_d[ROB_ENTRIES];
  rob_ptr_t head_d, tail_d, pnr_d;

  always_comb begin
    logic found;
    rob_idx_t i;
    rob_ptr_t cnt_d;
    for (int e = 0; e < ROB_ENTRIES; e++) unsafe_d[e] = unsafe_q[e];
    for (int c = 0; c < N_CMPL; c++) if (cmpl_valid[c]) unsafe_d[cmpl_idx[c]] = 1'b0;
    if (enq_fire)
      for (int w = 0; w < WIDTH; w++) if (enq_valid[w]) unsafe_d[enq_idx[w]] = enq_unsafe[w];
    head_d = head_q + rob_ptr_t'(n_cm);
    tail_d = enq_fire ? tail_q + rob_ptr_t'(n_enq) : tail_q;
    cnt_d  = tail_d - head_d;
    pnr_d  = tail_d;
    found  = 1'b0;
    for (int e = 0; e < ROB_ENTRIES; e++) begin
      i = rob_idx_t'(head_d) + rob_idx_t'(e);
      if (!found && e < int'(cnt_d) && unsafe_d[i]) begin
        found = 1'b1;
        pnr_d = head_d + rob_ptr_t'(e);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      head_q <= '0;
      tail_q <= '0;
      pnr_q  <= '0;
      for (int e = 0; e < ROB_ENTRIES; e++) begin
        busy_q[e]   <= 1'b0;
        unsafe_q[e] <= 1'b0;
        info_q[e]   <= '0;
      end
    end else begin
      head_q <= head_d;
      tail_q <= tail_d;
      pnr_q  <= pnr_d;
      for (int e = 0; e < ROB_ENTRIES; e++) unsafe_q[e] <= unsafe_d[e];
      for (int c = 0; c < N_CMPL; c++) if (cmpl_valid[c]) busy_q[cmpl_idx[c]] <= 1'b0;
      if (enq_fire)
        for (int w = 0; w < WIDTH; w++)
          if (enq_valid[w]) begin
            busy_q[enq_idx[w]] <= enq_busy[w];
            info_q[enq_idx[w]] <= '{has_dst: enq_has_dst[w], dst_fp: enq_dst_fp[w],
                                   stale: enq_stale[w], is_load: enq_is_load[w],
                                   is_store: enq_is_store[w]};
          end
    end
  end

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n) enq_fire |-> can_enq)
    else $error("ROB enqueue while full");

endmodule
