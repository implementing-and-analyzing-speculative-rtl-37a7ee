// spt_fu_pipe: fixed-latency stand-in for an execution unit.
//
// Taint tracking does not depend on the values computed, so a functional unit
// is modelled only by its latency: an issued uop comes out LAT cycles later
// (LAT >= 1) to write back its destination register (wakeup of dependants)
// and to complete its ROB entry. One uop per cycle enters; the pipe never
// stalls. The latency values used by the core are this design's choices.
module spt_fu_pipe
  import spt_pkg::*;
#(
  parameter int LAT = 1
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     in_valid,
  input  uop_t     in_uop,
  output logic     out_valid,
  output logic     out_wb,        // destination register written
  output preg_t    out_pdst,
  output logic     out_fp,
  output rob_idx_t out_rob_idx
);

  typedef struct packed {
    logic     valid;
    logic     wb;
    preg_t    pdst;
    logic     fp;
    rob_idx_t rob_idx;
  } stage_t;

  stage_t st_q[LAT];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < LAT; i++) st_q[i] <= '0;
    end else begin
      st_q[0] <= '{valid: in_valid, wb: in_valid && in_uop.uses[OP_DST],
                   pdst: in_uop.pdst, fp: in_uop.is_fp[OP_DST], rob_idx: in_uop.rob_idx};
      for (int i = 1; i < LAT; i++) st_q[i] <= st_q[i-1];
    end
  end

  assign out_valid   = st_q[LAT-1].valid;
  assign out_wb      = st_q[LAT-1].wb;
  assign out_pdst    = st_q[LAT-1].pdst;
  assign out_fp      = st_q[LAT-1].fp;
  assign out_rob_idx = st_q[LAT-1].rob_idx;

endmodule
