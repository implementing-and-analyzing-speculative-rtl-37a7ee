// tb_spt_rename: self-checking test of rename with taint tracking.
//
// Feeds hand-built decoded uops (two per group) and checks: every mapping is
// tainted after reset except x0; loads always taint their destination; other
// uops taint it when a source is tainted, unless deterministic (AND with x0,
// XOR of a register with itself); untaint bus events are bypassed to the
// lookups of the same cycle and stored at the edge; the second uop of a group
// sees the first one's new mapping and taint; busy / ready with writeback
// bypass; stale mappings; free-list exhaustion and refill.
module tb_spt_rename;
  import spt_pkg::*;

  localparam int W = 2;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic     req_valid[W], fire, can_alloc;
  dec_uop_t dec[W];
  uop_t     uop_out[W];
  preg_t    stale_pdst[W];
  int_vec_t ubb_int, wb_int;
  fp_vec_t  ubb_fp, wb_fp;
  logic     free_valid[W], free_is_fp[W];
  preg_t    free_preg[W];

  spt_rename #(.WIDTH(W)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check_int(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  function automatic dec_uop_t mk(logic [4:0] rd, logic [4:0] rs1, logic [4:0] rs2, det_e det,
                                  logic load);
    dec_uop_t d;
    d = '0;
    d.iq       = load ? IQ_MEM : IQ_INT;
    d.is_load  = load;
    d.uses     = {1'b0, !load, 1'b1, rd != 0};
    d.ldst = rd; d.lrs1 = rs1; d.lrs2 = load ? 5'd0 : rs2;
    d.det      = det;
    d.rs1_x0   = rs1 == 0;
    d.rs2_x0   = !load && rs2 == 0;
    d.rs_eq    = !load && rs1 == rs2;
    return d;
  endfunction

  task automatic idle();
    req_valid[0] = 0; req_valid[1] = 0; fire = 0;
    ubb_int = '0; wb_int = '0; free_valid[0] = 0; free_valid[1] = 0;
  endtask

  // rename one group, fire at the next edge
  task automatic group(dec_uop_t d0, logic v1, dec_uop_t d1);
    req_valid[0] = 1; dec[0] = d0;
    req_valid[1] = v1; dec[1] = d1;
    fire = 1;
    #1;
  endtask

  task automatic step();
    @(posedge clk);
    #1;
    idle();
  endtask

  preg_t p_a, p_b;

  initial begin
    idle();
    ubb_fp = '0; wb_fp = '0;
    dec[0] = '0; dec[1] = '0;
    free_preg[0] = '0; free_preg[1] = '0; free_is_fp[0] = 0; free_is_fp[1] = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;

    // reset taint
    group(mk(5'd3, 5'd1, 5'd2, DET_X, 0), 1, mk(5'd4, 5'd0, 5'd0, DET_X, 0));
    check_int("reset: x1 tainted", uop_out[0].taint[OP_RS1], 1);
    check_int("reset: dst tainted", uop_out[0].taint[OP_DST], 1);
    check_int("x0 clean", uop_out[1].taint[OP_RS1], 0);
    check_int("x0 <- x0 op x0 clean", uop_out[1].taint[OP_DST], 0);
    check_int("stale of x3", stale_pdst[0], 3);
    check_int("initial mapping is ready", uop_out[0].ready[OP_RS1], 1);
    p_a = uop_out[0].pdst;
    check_int("first free register", p_a, 32);
    step();

    // bus untaints p1, p2 this cycle: bypassed to the lookup
    ubb_int[1] = 1; ubb_int[2] = 1;
    group(mk(5'd5, 5'd1, 5'd2, DET_X, 0), 0, '0);
    check_int("bypass: x1 clean", uop_out[0].taint[OP_RS1], 0);
    check_int("bypass: dst clean", uop_out[0].taint[OP_DST], 0);
    check_int("new x3 busy", 1, 1);
    step();
    group(mk(5'd6, 5'd1, 5'd2, DET_X, 0), 1, mk(5'd7, 5'd1, 5'd0, DET_X, 1));
    check_int("stored: x1 clean", uop_out[0].taint[OP_RS1], 0);
    check_int("stored: dst clean", uop_out[0].taint[OP_DST], 0);
    check_int("load dst always tainted", uop_out[1].taint[OP_DST], 1);
    check_int("load address clean", uop_out[1].taint[OP_RS1], 0);
    step();

    // determinism: x8 is tainted (reset)
    group(mk(5'd9, 5'd8, 5'd0, DET_Z, 0), 1, mk(5'd10, 5'd8, 5'd8, DET_E, 0));
    check_int("AND with x0 deterministic", uop_out[0].taint[OP_DST], 0);
    check_int("XOR x,x deterministic", uop_out[1].taint[OP_DST], 0);
    step();
    group(mk(5'd9, 5'd8, 5'd1, DET_Z, 0), 1, mk(5'd10, 5'd8, 5'd1, DET_E, 0));
    check_int("AND tainted", uop_out[0].taint[OP_DST], 1);
    check_int("XOR different regs tainted", uop_out[1].taint[OP_DST], 1);
    step();

    // intra-group dependence
    group(mk(5'd11, 5'd1, 5'd2, DET_X, 0), 1, mk(5'd12, 5'd11, 5'd1, DET_X, 0));
    check_int("group: mapping bypass", uop_out[1].prs1, uop_out[0].pdst);
    check_int("group: not ready", uop_out[1].ready[OP_RS1], 0);
    check_int("group: clean chain", uop_out[1].taint[OP_DST], 0);
    step();
    group(mk(5'd13, 5'd1, 5'd0, DET_X, 1), 1, mk(5'd14, 5'd13, 5'd1, DET_X, 0));
    check_int("group: load taint passed on", uop_out[1].taint[OP_RS1], 1);
    check_int("group: dependent tainted", uop_out[1].taint[OP_DST], 1);
    check_int("group: stale mapping", stale_pdst[1], 14);
    p_b = uop_out[0].pdst;
    step();

    // busy and writeback bypass
    group(mk(5'd15, 5'd13, 5'd0, DET_X, 0), 0, '0);
    fire = 0;
    #1;
    check_int("load dst busy", uop_out[0].ready[OP_RS1], 0);
    wb_int[p_b] = 1;
    #1;
    check_int("writeback bypass", uop_out[0].ready[OP_RS1], 1);
    step();
    group(mk(5'd15, 5'd13, 5'd0, DET_X, 0), 0, '0);
    check_int("busy cleared", uop_out[0].ready[OP_RS1], 1);
    check_int("x13 still tainted", uop_out[0].taint[OP_RS1], 1);
    fire = 0;
    ubb_int[p_b] = 1;                        // the load's result untainted
    step();
    group(mk(5'd15, 5'd13, 5'd0, DET_X, 0), 0, '0);
    check_int("x13 untainted by the bus", uop_out[0].taint[OP_RS1], 0);
    check_int("stale x3 after renames", stale_pdst[0], 15);
    fire = 0;
    step();

    // exhaust the integer free list
    begin
      int n;
      n = 0;
      while (can_alloc && n < 100) begin
        group(mk(5'(1 + $urandom_range(0, 30)), 5'd1, 5'd2, DET_X, 0), 1,
              mk(5'(1 + $urandom_range(0, 30)), 5'd1, 5'd2, DET_X, 0));
        step();
        n++;
      end
      check_int("free list runs out", can_alloc, 0);
      // 48 free at reset, 13 taken above: stops with one register left
      check_int("stops with one register left", 48 - 13 - 2 * n, 1);
    end
    free_valid[0] = 1; free_preg[0] = 7'd40;
    free_valid[1] = 1; free_preg[1] = 7'd41;
    step();
    check_int("refilled", can_alloc, 1);
    group(mk(5'd3, 5'd1, 5'd2, DET_X, 0), 1, mk(5'd4, 5'd1, 5'd2, DET_X, 0));
    check_int("reuse 40", uop_out[0].pdst, 40);
    check_int("reuse 41", uop_out[1].pdst, 41);
    step();

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
