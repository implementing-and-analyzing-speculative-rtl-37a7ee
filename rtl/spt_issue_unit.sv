// spt_issue_unit: an issue queue of NUM_SLOTS SPT issue slots.
//
// Dispatch writes up to DISPATCH_WIDTH uops per cycle into the lowest-indexed
// free slots; `dis_ready` says that DISPATCH_WIDTH slots are free. Each cycle
// the lowest-indexed slots that can issue (s_valid, sources ready) are
// selected, up to ISSUE_WIDTH, and leave the queue at the next edge; uops held
// in s_wait by the SPT policy are skipped. The unit owns LANES lanes of the
// Untaint Broadcast Bus, one per instruction it can issue per cycle; slots
// with pending untaint events are granted lanes lowest index first, the rest
// keep their events queued. A kill clears every slot.
//
// Lane count = issue width follows the described design. Slot count (20 for
// the integer queue) is BOOM's medium configuration; the non-collapsing queue
// with fixed-priority select and lane grant are this design's choices.
module spt_issue_unit
  import spt_pkg::*;
#(
  parameter int NUM_SLOTS      = 20,
  parameter int DISPATCH_WIDTH = CORE_WIDTH,
  parameter int ISSUE_WIDTH    = 2,
  parameter int LANES          = ISSUE_WIDTH
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      dis_valid[DISPATCH_WIDTH],
  input  uop_t      dis_uop  [DISPATCH_WIDTH],
  output logic      dis_ready,
  input  logic      kill,
  input  rob_ptr_t  rob_head,
  input  rob_ptr_t  rob_pnr,
  input  int_vec_t  ubb_int,
  input  fp_vec_t   ubb_fp,
  input  int_vec_t  wb_int,
  input  fp_vec_t   wb_fp,
  output logic      iss_valid[ISSUE_WIDTH],
  output uop_t      iss_uop  [ISSUE_WIDTH],
  output ubb_lane_t lanes    [LANES],
  output logic [$clog2(NUM_SLOTS+1)-1:0] n_wait,
  output logic [$clog2(NUM_SLOTS+1)-1:0] n_busy
);

  logic      occupied [NUM_SLOTS];
  logic      waiting  [NUM_SLOTS];
  logic      can_issue[NUM_SLOTS];
  uop_t      slot_uop [NUM_SLOTS];
  logic      breq     [NUM_SLOTS];
  ubb_lane_t blane    [NUM_SLOTS];
  logic      bgrant   [NUM_SLOTS];
  logic      wr_en    [NUM_SLOTS];
  uop_t      wr_uop   [NUM_SLOTS];
  logic      issue    [NUM_SLOTS];

  // dispatch: k-th valid uop goes to the k-th free slot
  always_comb begin
    int nfree;
    nfree = 0;
    for (int s = 0; s < NUM_SLOTS; s++) if (!occupied[s]) nfree++;
    dis_ready = (nfree >= DISPATCH_WIDTH);
  end

  always_comb begin
    int nv, r;
    int vsel[DISPATCH_WIDTH];
    nv = 0;
    for (int k = 0; k < DISPATCH_WIDTH; k++) vsel[k] = 0;
    for (int k = 0; k < DISPATCH_WIDTH; k++)
      if (dis_valid[k]) begin
        vsel[nv] = k;
        nv++;
      end
    r = 0;
    for (int s = 0; s < NUM_SLOTS; s++) begin
      wr_en[s]  = 1'b0;
      wr_uop[s] = '0;
      if (!occupied[s]) begin
        if (r < nv && dis_ready) begin
          wr_en[s]  = 1'b1;
          wr_uop[s] = dis_uop[vsel[r]];
        end
        r++;
      end
    end
  end

  // issue select and lane grant, lowest index first
  always_comb begin
    int ni, nl;
    ni = 0;
    nl = 0;
    for (int i = 0; i < ISSUE_WIDTH; i++) begin
      iss_valid[i] = 1'b0;
      iss_uop[i]   = '0;
    end
    for (int l = 0; l < LANES; l++) lanes[l] = '0;
    for (int s = 0; s < NUM_SLOTS; s++) begin
      issue[s]  = 1'b0;
      bgrant[s] = 1'b0;
      if (can_issue[s] && ni < ISSUE_WIDTH) begin
        issue[s]      = 1'b1;
        iss_valid[ni] = 1'b1;
        iss_uop[ni]   = slot_uop[s];
        ni++;
      end
      if (breq[s] && nl < LANES) begin
        bgrant[s] = 1'b1;
        lanes[nl] = blane[s];
        nl++;
      end
    end
  end

  always_comb begin
    n_wait = '0;
    n_busy = '0;
    for (int s = 0; s < NUM_SLOTS; s++) begin
      n_wait += waiting[s]  ? 1 : 0;
      n_busy += occupied[s] ? 1 : 0;
    end
  end

  for (genvar s = 0; s < NUM_SLOTS; s++) begin : g_slot
    spt_issue_slot u_slot (
      .clk        (clk),
      .rst_n      (rst_n),
      .in_valid   (wr_en[s]),
      .in_uop     (wr_uop[s]),
      .issue      (issue[s]),
      .kill       (kill),
      .rob_head   (rob_head),
      .rob_pnr    (rob_pnr),
      .ubb_int    (ubb_int),
      .ubb_fp     (ubb_fp),
      .wb_int     (wb_int),
      .wb_fp      (wb_fp),
      .occupied   (occupied[s]),
      .waiting    (waiting[s]),
      .can_issue  (can_issue[s]),
      .uop        (slot_uop[s]),
      .bcast_req  (breq[s]),
      .bcast_lane (blane[s]),
      .bcast_grant(bgrant[s])
    );
  end

endmodule
