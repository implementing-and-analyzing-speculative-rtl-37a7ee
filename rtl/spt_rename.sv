// spt_rename: register rename stage with taint storage.
//
// Holds the map table (logical -> physical register) of both register classes
// with one taint bit per mapping, the free lists and the busy table. Each
// cycle it renames up to WIDTH decoded uops combinationally and returns their
// physical registers, operand taints and operand ready bits; the new mappings
// are written at the clock edge when the core asserts `fire`.
//
// Tainting rules for the new destination mapping (as described for SPT):
//   1. a load's destination is always tainted;
//   2. another uop with a destination is tainted if any register it reads is
//      tainted, unless it is conditionally deterministic for the registers it
//      names (DET_Z: an operand is x0, DET_ZI: rs1 is x0, DET_E: rs1 == rs2);
//   3. a uop without a destination (incl. x0) creates no taint.
// At reset every mapping is tainted except x0. Rename never untaints on its
// own: it only listens to the Untaint Broadcast Bus, whose events clear the
// matching taint bits at the next edge and are bypassed to the lookups of the
// same cycle. Uops later in the same group see the mapping and taint of an
// earlier uop that writes their source.
//
// Interface: `ubb_int`/`ubb_fp` are the bus decoded to one bit per physical
// register (from spt_ubb); `wb_int`/`wb_fp` mark registers written back this
// cycle (clear busy); `free_*` return stale registers at commit. `can_alloc`
// says the free lists hold enough registers for a full group. The `rob_idx`
// and `addr` fields of `uop_out` are left zero here; the core fills them in
// at dispatch. Branch-snapshot recovery of the map table is not modelled.
module spt_rename
  import spt_pkg::*;
#(
  parameter int WIDTH = CORE_WIDTH
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     req_valid [WIDTH],
  input  dec_uop_t dec       [WIDTH],
  input  logic     fire,
  output uop_t     uop_out   [WIDTH],
  output preg_t    stale_pdst[WIDTH],
  output logic     can_alloc,
  input  int_vec_t ubb_int,
  input  fp_vec_t  ubb_fp,
  input  int_vec_t wb_int,
  input  fp_vec_t  wb_fp,
  input  logic     free_valid[WIDTH],
  input  preg_t    free_preg [WIDTH],
  input  logic     free_is_fp[WIDTH]
);

  preg_t    map_q   [2][NUM_LREGS];   // [0] integer, [1] FP
  logic     taint_q [2][NUM_LREGS];
  int_vec_t int_free_q, int_busy_q;
  fp_vec_t  fp_free_q,  fp_busy_q;

  // first WIDTH free registers of each class
  preg_t int_pick[WIDTH];
  preg_t fp_pick [WIDTH];
  int    int_cnt, fp_cnt;

  always_comb begin
    int n;
    n = 0;
    for (int w = 0; w < WIDTH; w++) int_pick[w] = '0;
    for (int p = 1; p < NUM_INT_PREGS; p++)
      if (int_free_q[p] && n < WIDTH) begin
        int_pick[n] = preg_t'(p);
        n++;
      end
    int_cnt = n;
    n = 0;
    for (int w = 0; w < WIDTH; w++) fp_pick[w] = '0;
    for (int p = 0; p < NUM_FP_PREGS; p++)
      if (fp_free_q[p] && n < WIDTH) begin
        fp_pick[n] = preg_t'(p);
        n++;
      end
    fp_cnt = n;
  end

  assign can_alloc = (int_cnt == WIDTH) && (fp_cnt == WIDTH);

  logic dst_taint[WIDTH];
  logic dst_wr   [WIDTH];

  always_comb
    for (int w = 0; w < WIDTH; w++) dst_wr[w] = dec[w].uses[OP_DST];

  always_comb begin
    logic dt[WIDTH];
    int   ni, nf;
    preg_t p;
    logic t, r, c, det;
    logic [4:0] l;
    ni = 0;
    nf = 0;
    for (int w = 0; w < WIDTH; w++) dt[w] = 1'b0;
    for (int w = 0; w < WIDTH; w++) begin
      uop_out[w]          = '0;
      uop_out[w].iq       = dec[w].iq;
      uop_out[w].is_load  = dec[w].is_load;
      uop_out[w].is_store = dec[w].is_store;
      uop_out[w].is_br    = dec[w].is_br;
      uop_out[w].uses     = dec[w].uses;
      uop_out[w].is_fp    = dec[w].is_fp;
      uop_out[w].is_tx    = dec[w].is_tx;
      uop_out[w].tx_mask  = dec[w].tx_mask;
      uop_out[w].inv      = dec[w].inv;
      uop_out[w].imm_zero = dec[w].imm_zero;
      uop_out[w].rs1_x0   = dec[w].rs1_x0;
      uop_out[w].rs2_x0   = dec[w].rs2_x0;
      uop_out[w].rs_eq    = dec[w].rs_eq;

      // source operands
      for (int k = OP_RS1; k <= OP_RS3; k++) begin
        c = dec[w].is_fp[k];
        l = (k == OP_RS1) ? dec[w].lrs1 : (k == OP_RS2) ? dec[w].lrs2 : dec[w].lrs3;
        p = map_q[c][l];
        t = taint_q[c][l] && !vec_hit(ubb_int, ubb_fp, p, c);
        r = !vec_hit(int_busy_q, fp_busy_q, p, c) || vec_hit(wb_int, wb_fp, p, c);
        for (int j = 0; j < w; j++)
          if (req_valid[j] && dst_wr[j] && dec[j].is_fp[OP_DST] == c && dec[j].ldst == l) begin
            p = uop_out[j].pdst;
            t = dt[j];
            r = 1'b0;
          end
        if (!dec[w].uses[k]) begin
          p = '0;
          t = 1'b0;
          r = 1'b1;
        end
        case (k)
          OP_RS1:  uop_out[w].prs1 = p;
          OP_RS2:  uop_out[w].prs2 = p;
          default: uop_out[w].prs3 = p;
        endcase
        uop_out[w].taint[k] = t;
        uop_out[w].ready[k] = r;
      end

      // stale mapping of the destination
      c = dec[w].is_fp[OP_DST];
      stale_pdst[w] = map_q[c][dec[w].ldst];
      for (int j = 0; j < w; j++)
        if (req_valid[j] && dst_wr[j] && dec[j].is_fp[OP_DST] == c && dec[j].ldst == dec[w].ldst)
          stale_pdst[w] = uop_out[j].pdst;

      // new destination and its taint
      if (dst_wr[w] && req_valid[w]) begin
        if (c) begin
          uop_out[w].pdst = fp_pick[nf];
          nf++;
        end else begin
          uop_out[w].pdst = int_pick[ni];
          ni++;
        end
      end
      unique case (dec[w].det)
        DET_Z:   det = dec[w].rs1_x0 || dec[w].rs2_x0;
        DET_ZI:  det = dec[w].rs1_x0;
        DET_E:   det = dec[w].rs_eq;
        default: det = 1'b0;
      endcase
      if (!dst_wr[w])          dt[w] = 1'b0;
      else if (dec[w].is_load) dt[w] = 1'b1;
      else if (det)            dt[w] = 1'b0;
      else                     dt[w] = |(uop_out[w].taint[3:1] & dec[w].uses[3:1]);
      uop_out[w].taint[OP_DST] = dt[w];
      dst_taint[w]             = dt[w];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int c = 0; c < 2; c++)
        for (int l = 0; l < NUM_LREGS; l++) begin
          map_q[c][l]   <= preg_t'(l);
          taint_q[c][l] <= !(c == 0 && l == 0);
        end
      int_free_q <= '0;
      fp_free_q  <= '0;
      for (int p = NUM_LREGS; p < NUM_INT_PREGS; p++) int_free_q[p] <= 1'b1;
      for (int p = NUM_LREGS; p < NUM_FP_PREGS;  p++) fp_free_q[p]  <= 1'b1;
      int_busy_q <= '0;
      fp_busy_q  <= '0;
    end else begin
      // external untaint events
      for (int c = 0; c < 2; c++)
        for (int l = 0; l < NUM_LREGS; l++)
          if (vec_hit(ubb_int, ubb_fp, map_q[c][l], c[0])) taint_q[c][l] <= 1'b0;
      int_busy_q <= int_busy_q & ~wb_int;
      fp_busy_q  <= fp_busy_q  & ~wb_fp;
      for (int w = 0; w < WIDTH; w++)
        if (free_valid[w]) begin
          if (free_is_fp[w]) fp_free_q[free_preg[w][FP_IDX_W-1:0]] <= 1'b1;
          else if (free_preg[w] != '0) int_free_q[free_preg[w]] <= 1'b1;
        end
      if (fire)
        for (int w = 0; w < WIDTH; w++)
          if (req_valid[w] && dst_wr[w]) begin
            map_q[dec[w].is_fp[OP_DST]][dec[w].ldst]   <= uop_out[w].pdst;
            taint_q[dec[w].is_fp[OP_DST]][dec[w].ldst] <= dst_taint[w];
            if (dec[w].is_fp[OP_DST]) begin
              fp_free_q[uop_out[w].pdst[FP_IDX_W-1:0]] <= 1'b0;
              fp_busy_q[uop_out[w].pdst[FP_IDX_W-1:0]] <= 1'b1;
            end else begin
              int_free_q[uop_out[w].pdst] <= 1'b0;
              int_busy_q[uop_out[w].pdst] <= 1'b1;
            end
          end
    end
  end

endmodule
