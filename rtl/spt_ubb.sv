// spt_ubb: the Untaint Broadcast Bus.
//
// The bus is a set of lanes, each a {valid, reg_id, is_fp} triple. Every
// writer owns as many lanes as it can issue instructions per cycle: the
// integer issue unit INT_LANES (2), the FP issue unit FP_LANES (1) and the
// LSU LSU_LANES (1), in that order on the bus. This module assembles the lanes
// into the bus and decodes it once into one bit per physical register of each
// class, the form in which every listener (rename map table, issue slots,
// load/store queues) looks up whether one of its registers was untainted in
// this cycle. The bus is combinational: listeners apply an event at the clock
// edge that ends the cycle in which it is on the bus.
//
// The assertion (active out of reset) checks the register-index bound that
// the taint lookups rely on. Lane counts follow the described design; the decoded-vector form is
// this design's choice.
module spt_ubb
  import spt_pkg::*;
#(
  parameter int N_INT = INT_LANES,
  parameter int N_FP  = FP_LANES,
  parameter int N_LSU = LSU_LANES
) (
  input  logic      clk,
  input  logic      rst_n,
  input  ubb_lane_t int_lanes[N_INT],
  input  ubb_lane_t fp_lanes [N_FP],
  input  ubb_lane_t lsu_lanes[N_LSU],
  output ubb_lane_t bus      [N_INT+N_FP+N_LSU],
  output int_vec_t  untaint_int,
  output fp_vec_t   untaint_fp
);

  localparam int N = N_INT + N_FP + N_LSU;

  always_comb begin
    for (int i = 0; i < N_INT; i++) bus[i]             = int_lanes[i];
    for (int i = 0; i < N_FP;  i++) bus[N_INT+i]       = fp_lanes[i];
    for (int i = 0; i < N_LSU; i++) bus[N_INT+N_FP+i]  = lsu_lanes[i];
  end

  always_comb begin
    untaint_int = '0;
    untaint_fp  = '0;
    for (int i = 0; i < N; i++)
      if (bus[i].valid) begin
        if (bus[i].is_fp) begin
          if (int'(bus[i].reg_id) < NUM_FP_PREGS) untaint_fp[bus[i].reg_id[FP_IDX_W-1:0]] = 1'b1;
        end else begin
          if (int'(bus[i].reg_id) < NUM_INT_PREGS) untaint_int[bus[i].reg_id] = 1'b1;
        end
      end
  end

  // preg_inbounds: a broadcast register index lies inside its register file
  always_ff @(posedge clk)
    for (int i = 0; i < N; i++)
      if (rst_n && bus[i].valid)
        assert (int'(bus[i].reg_id) < (bus[i].is_fp ? NUM_FP_PREGS : NUM_INT_PREGS))
          else $error("UBB lane %0d: register %0d out of range", i, bus[i].reg_id);

endmodule
