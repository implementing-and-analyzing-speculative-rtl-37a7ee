// tb_spt_ubb: self-checking test of the untaint broadcast bus.
//
// Drives random lanes from the integer, FP and LSU writers and compares the
// assembled bus order and the decoded per-register untaint vectors with a
// reference model written in the testbench. Lane counts are the defaults
// (2 integer, 1 FP, 1 LSU).
module tb_spt_ubb;
  import spt_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;

  ubb_lane_t int_l[INT_LANES], fp_l[FP_LANES], lsu_l[LSU_LANES];
  ubb_lane_t bus[UBB_LANES];
  int_vec_t  u_int, exp_int;
  fp_vec_t   u_fp, exp_fp;

  spt_ubb dut (.clk(clk), .rst_n(1'b1), .int_lanes(int_l), .fp_lanes(fp_l), .lsu_lanes(lsu_l), .bus(bus),
               .untaint_int(u_int), .untaint_fp(u_fp));

  int checks = 0, failures = 0;

  function automatic ubb_lane_t rnd_lane();
    ubb_lane_t l;
    l.valid  = $urandom_range(0, 1);
    l.is_fp  = $urandom_range(0, 1);
    l.reg_id = preg_t'(l.is_fp ? $urandom_range(0, NUM_FP_PREGS - 1)
                               : $urandom_range(0, NUM_INT_PREGS - 1));
    return l;
  endfunction

  initial begin
    for (int i = 0; i < INT_LANES; i++) int_l[i] = '0;
    for (int i = 0; i < FP_LANES; i++) fp_l[i] = '0;
    for (int i = 0; i < LSU_LANES; i++) lsu_l[i] = '0;
    #1;
    checks++;
    if (u_int != '0 || u_fp != '0) begin
      failures++;
      $display("FAIL idle bus decodes to nothing");
    end
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      for (int i = 0; i < INT_LANES; i++) int_l[i] = rnd_lane();
      for (int i = 0; i < FP_LANES; i++) fp_l[i] = rnd_lane();
      for (int i = 0; i < LSU_LANES; i++) lsu_l[i] = rnd_lane();
      #1;
      exp_int = '0;
      exp_fp  = '0;
      for (int i = 0; i < INT_LANES; i++)
        if (int_l[i].valid) begin
          if (int_l[i].is_fp) exp_fp[int_l[i].reg_id[FP_IDX_W-1:0]] = 1; else exp_int[int_l[i].reg_id] = 1;
        end
      for (int i = 0; i < FP_LANES; i++)
        if (fp_l[i].valid) begin
          if (fp_l[i].is_fp) exp_fp[fp_l[i].reg_id[FP_IDX_W-1:0]] = 1; else exp_int[fp_l[i].reg_id] = 1;
        end
      for (int i = 0; i < LSU_LANES; i++)
        if (lsu_l[i].valid) begin
          if (lsu_l[i].is_fp) exp_fp[lsu_l[i].reg_id[FP_IDX_W-1:0]] = 1; else exp_int[lsu_l[i].reg_id] = 1;
        end
      checks++;
      if (u_int != exp_int || u_fp != exp_fp) begin
        failures++;
        if (failures < 10) $display("FAIL decode at step %0d", t);
      end
      checks++;
      if (bus[0] != int_l[0] || bus[INT_LANES] != fp_l[0] || bus[INT_LANES+FP_LANES] != lsu_l[0]) begin
        failures++;
        if (failures < 10) $display("FAIL lane order at step %0d", t);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
