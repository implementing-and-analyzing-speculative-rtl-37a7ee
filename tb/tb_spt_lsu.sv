// tb_spt_lsu: self-checking test of the LSU with SPT address blocking and
// secure store-to-load forwarding.
//
// Directed sequences, each followed cycle by cycle:
//   A. a speculative store with a tainted address is blocked; a younger load
//      to the same address may not forward past it; when the PNR reaches the
//      store, its address register is untainted and broadcast, the store
//      executes and the load forwards, and because the store data is clean
//      the load's destination is broadcast untainted one cycle later;
//   B. a load with no older matching store goes to memory and writes back
//      MEM_LAT cycles later (destination stays tainted: no broadcast);
//   C. a load with a tainted address waits until the bus untaints it;
//   D. forwarding from a store whose data is tainted gives no untaint event;
//   E. commit frees the queue entries in order.
module tb_spt_lsu;
  import spt_pkg::*;

  localparam int W = 2, LAT = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic      enq_valid[W], enq_fire, can_enq;
  uop_t      enq_uop[W];
  rob_ptr_t  rob_head, rob_pnr;
  int_vec_t  ubb_int, wb_int;
  fp_vec_t   ubb_fp, wb_fp;
  ubb_lane_t lane;
  logic      cm_load[W], cm_store[W];
  logic      ld_wb_valid[2], ld_wb_fp[2], cmpl_valid[3];
  preg_t     ld_wb_preg[2];
  rob_idx_t  cmpl_idx[3];
  logic      ev_addr_blocked, ev_fwd, ev_fwd_blocked, ev_mem_req;

  spt_lsu #(.WIDTH(W), .MEM_LAT(LAT)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check_int(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  function automatic uop_t mem(logic st, preg_t a, logic at, preg_t d, logic dt, rob_idx_t ri,
                               addr_t ad);
    uop_t u;
    u = '0;
    u.iq = IQ_MEM;
    u.is_load = !st; u.is_store = st;
    u.prs1 = a; u.taint[OP_RS1] = at; u.ready[OP_RS1] = 1;
    if (st) begin
      u.prs2 = d; u.taint[OP_RS2] = dt; u.ready[OP_RS2] = 1;
      u.uses = 4'b0110;
    end else begin
      u.pdst = d; u.taint[OP_DST] = 1;
      u.uses = 4'b0011;
    end
    u.is_tx = 1; u.tx_mask = 4'b0010;
    u.rob_idx = ri;
    u.addr = ad;
    return u;
  endfunction

  task automatic idle();
    enq_valid[0] = 0; enq_valid[1] = 0; enq_fire = 0;
    ubb_int = '0; wb_int = '0;
    cm_load[0] = 0; cm_load[1] = 0; cm_store[0] = 0; cm_store[1] = 0;
  endtask
  task automatic step();
    @(posedge clk);
    #1;
    idle();
  endtask
  task automatic enq2(uop_t a, logic vb, uop_t b);
    enq_valid[0] = 1; enq_uop[0] = a;
    enq_valid[1] = vb; enq_uop[1] = b;
    enq_fire = 1;
    step();
  endtask

  int t;

  initial begin
    idle();
    ubb_fp = '0; wb_fp = '0;
    enq_uop[0] = '0; enq_uop[1] = '0;
    rob_head = 7'd0; rob_pnr = 7'd0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;

    // ---------------- A
    // rob 0 is an older unresolved uop elsewhere: PNR stays at 0
    enq2(mem(1, 7'd40, 1, 7'd41, 0, 6'd1, 40'h100), 1, mem(0, 7'd42, 0, 7'd50, 0, 6'd2, 40'h100));
    check_int("A store address blocked", ev_addr_blocked, 1);
    check_int("A forward blocked by tainted store address", ev_fwd_blocked, 1);
    check_int("A no forward", ev_fwd, 0);
    check_int("A no memory request", ev_mem_req, 0);
    check_int("A store not executed", cmpl_valid[0], 0);
    step();
    check_int("A still blocked", ev_fwd_blocked, 1);
    rob_pnr = 7'd1;                          // the store becomes non-speculative
    #1;
    check_int("A store executes", cmpl_valid[0], 1);
    check_int("A store rob index", cmpl_idx[0], 1);
    step();
    check_int("A store address broadcast", lane.valid, 1);
    check_int("A store address register", lane.reg_id, 40);
    check_int("A load forwards", ev_fwd, 1);
    step();
    check_int("A forwarded writeback", ld_wb_valid[1], 1);
    check_int("A forwarded register", ld_wb_preg[1], 50);
    check_int("A load completes", cmpl_valid[2], 1);
    check_int("A load rob index", cmpl_idx[2], 2);
    check_int("A destination untaint broadcast", lane.valid, 1);
    check_int("A broadcast register", lane.reg_id, 50);
    step();
    check_int("A lane idle", lane.valid, 0);
    // commit store and load
    cm_store[0] = 1; cm_load[1] = 1;
    rob_head = 7'd3; rob_pnr = 7'd3;
    step();
    check_int("A queues empty", can_enq, 1);

    // ---------------- B: no match -> memory
    enq2(mem(0, 7'd43, 0, 7'd51, 0, 6'd3, 40'h200), 0, '0);
    check_int("B memory request", ev_mem_req, 1);
    t = 0;
    while (!ld_wb_valid[0] && t < 20) begin step(); t++; end
    check_int("B memory latency", t, LAT);
    check_int("B writeback register", ld_wb_preg[0], 51);
    check_int("B no untaint for memory data", lane.valid, 0);
    step();
    check_int("B lane stays idle", lane.valid, 0);
    cm_load[0] = 1; rob_head = 7'd4; rob_pnr = 7'd4;
    step();

    // ---------------- C: tainted speculative address
    rob_pnr = 7'd4;                          // rob 4 is an older unresolved branch
    enq2(mem(0, 7'd44, 1, 7'd52, 0, 6'd5, 40'h300), 0, '0);
    check_int("C load blocked", ev_addr_blocked, 1);
    step();
    check_int("C still blocked", ev_addr_blocked, 1);
    ubb_int[44] = 1;                         // someone else untaints p44
    step();
    check_int("C released", ev_mem_req, 1);
    check_int("C no own broadcast", lane.valid, 0);
    repeat (LAT + 1) step();
    cm_load[0] = 1; rob_head = 7'd6; rob_pnr = 7'd6;
    step();

    // ---------------- D: forward from tainted data
    enq2(mem(1, 7'd45, 0, 7'd46, 1, 6'd6, 40'h400), 1, mem(0, 7'd47, 0, 7'd53, 0, 6'd7, 40'h400));
    check_int("D forward allowed", ev_fwd, 1);
    step();
    check_int("D forwarded writeback", ld_wb_valid[1], 1);
    check_int("D no untaint for tainted data", lane.valid, 0);
    step();
    check_int("D lane idle", lane.valid, 0);
    // ---------------- E: commit both
    cm_store[0] = 1; cm_load[1] = 1;
    step();
    check_int("E store queue head entry freed", dut.stq_q[2].valid, 0);
    check_int("E load queue entry freed", dut.ldq_q[3].valid, 0);
    check_int("E queue pointers equal", dut.ldq_head_q, dut.ldq_tail_q);

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
