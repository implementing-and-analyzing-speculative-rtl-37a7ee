// tb_spt_issue_unit: self-checking test of the SPT issue unit.
//
// Part 1 replays the external/internal propagation example with a single UBB
// lane: physical register 22 is broadcast, the slot holding "p43 <- p22, pX"
// untaints its rs1 one cycle later, its destination 43 one cycle after that
// and queues the broadcast (queue 0001); the lane is taken by an older slot
// for one cycle ("bus busy"), so 43 goes out one cycle later and the queue
// empties at the following edge. Part 2 checks dispatch readiness, that an
// unsafe transmitter is skipped by issue select while younger safe uops
// issue, and the issue-width limit.
module tb_spt_issue_unit;
  import spt_pkg::*;

  localparam int SLOTS = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic      dis_valid[2];
  uop_t      dis_uop[2];
  logic      dis_ready;
  rob_ptr_t  head, pnr;
  int_vec_t  ubb_int, wb_int;
  fp_vec_t   ubb_fp, wb_fp;
  logic      iss_valid[1];
  uop_t      iss_uop[1];
  ubb_lane_t lanes[1];
  logic [$clog2(SLOTS+1)-1:0] n_wait, n_busy;

  spt_issue_unit #(.NUM_SLOTS(SLOTS), .DISPATCH_WIDTH(2), .ISSUE_WIDTH(1), .LANES(1)) dut (
    .clk(clk), .rst_n(rst_n), .dis_valid(dis_valid), .dis_uop(dis_uop), .dis_ready(dis_ready),
    .kill(1'b0), .rob_head(head), .rob_pnr(pnr), .ubb_int(ubb_int), .ubb_fp(ubb_fp),
    .wb_int(wb_int), .wb_fp(wb_fp), .iss_valid(iss_valid), .iss_uop(iss_uop), .lanes(lanes),
    .n_wait(n_wait), .n_busy(n_busy));

  int checks = 0, failures = 0;
  task automatic check_int(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  function automatic uop_t mk(preg_t d, preg_t s1, preg_t s2, logic [3:0] taint, logic ready,
                              logic tx, rob_idx_t ri);
    uop_t u;
    u = '0;
    u.iq = IQ_INT;
    u.uses = 4'b0111;
    u.pdst = d; u.prs1 = s1; u.prs2 = s2;
    u.taint = taint;
    u.ready = ready ? 4'b1110 : 4'b0000;
    u.is_tx = tx; u.tx_mask = tx ? 4'b0010 : 4'b0000;
    u.rob_idx = ri;
    return u;
  endfunction

  task automatic step();
    @(posedge clk);
    #1;
    dis_valid[0] = 0; dis_valid[1] = 0;
    ubb_int = '0; wb_int = '0;
  endtask

  int issued_idx;

  initial begin
    dis_valid[0] = 0; dis_valid[1] = 0; dis_uop[0] = '0; dis_uop[1] = '0;
    ubb_int = '0; ubb_fp = '0; wb_int = '0; wb_fp = '0;
    head = 7'd0; pnr = 7'd1;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;

    // ---------------- part 1: propagation example
    // slot 0: speculative transmitter of rs1 = p30, rs1 and rs2 = p8 tainted
    // slot 1: p43 <- p22 (tainted), p5 (clean); not ready
    check_int("ready to dispatch", dis_ready, 1);
    dis_valid[0] = 1; dis_uop[0] = mk(7'd50, 7'd30, 7'd8, 4'b0111, 0, 1, 6'd5);
    dis_valid[1] = 1; dis_uop[1] = mk(7'd43, 7'd22, 7'd5, 4'b0011, 0, 0, 6'd6);
    step();
    check_int("two slots busy", n_busy, 2);
    check_int("slot 0 waits", n_wait, 1);
    // cycle u: p22 on the bus
    ubb_int[22] = 1;
    step();
    check_int("f: rs1_taint low", dut.g_slot[1].u_slot.uop_q.taint[OP_RS1], 0);
    check_int("f: dst still tainted", dut.g_slot[1].u_slot.uop_q.taint[OP_DST], 1);
    check_int("lane idle", lanes[0].valid, 0);
    pnr = 7'd5;                              // slot 0 reaches the PNR
    step();
    check_int("d: dst_taint low", dut.g_slot[1].u_slot.uop_q.taint[OP_DST], 0);
    check_int("b: queue 0001", dut.g_slot[1].u_slot.queue_q, 1);
    check_int("bus busy: slot 0 owns the lane", lanes[0].valid, 1);
    check_int("bus busy: slot 0 register", lanes[0].reg_id, 30);
    step();
    check_int("v: lane carries 43", lanes[0].reg_id, 43);
    check_int("v: lane valid", lanes[0].valid, 1);
    check_int("queue held until sent", dut.g_slot[1].u_slot.queue_q, 1);
    step();
    check_int("q: queue 0000", dut.g_slot[1].u_slot.queue_q, 0);
    check_int("lane idle again", lanes[0].valid, 0);
    check_int("slot 0 left s_wait", n_wait, 0);

    // ---------------- part 2: issue select skips s_wait
    // make both slots ready, slot 0 issues first, then slot 1
    wb_int[30] = 1; wb_int[8] = 1; wb_int[22] = 1; wb_int[5] = 1;
    step();
    check_int("one issue per cycle", iss_valid[0], 1);
    check_int("oldest slot first", iss_uop[0].pdst, 50);
    step();
    check_int("then slot 1", iss_uop[0].pdst, 43);
    step();
    check_int("queue empty", n_busy, 0);

    // an unsafe transmitter (rob 9, PNR 5) and a safe uop behind it
    dis_valid[0] = 1; dis_uop[0] = mk(7'd60, 7'd31, 7'd0, 4'b0011, 1, 1, 6'd9);
    dis_valid[1] = 1; dis_uop[1] = mk(7'd61, 7'd32, 7'd0, 4'b0000, 1, 0, 6'd10);
    step();
    check_int("transmitter waits", n_wait, 1);
    check_int("safe uop issues past it", iss_valid[0], 1);
    check_int("safe uop", iss_uop[0].pdst, 61);
    step();
    check_int("nothing else issues", iss_valid[0], 0);
    step();
    check_int("still nothing", iss_valid[0], 0);
    pnr = 7'd9;
    step();                                  // untaint at this edge, s_valid
    check_int("released", n_wait, 0);
    check_int("transmitter issues", iss_valid[0], 1);
    check_int("transmitter uop", iss_uop[0].pdst, 60);
    check_int("its untaint broadcast", lanes[0].reg_id, 31);
    step();
    // fill: 4 slots, dispatch readiness drops when fewer than 2 are free
    dis_valid[0] = 1; dis_uop[0] = mk(7'd1, 7'd2, 7'd0, 4'b0000, 0, 0, 6'd11);
    dis_valid[1] = 1; dis_uop[1] = mk(7'd3, 7'd4, 7'd0, 4'b0000, 0, 0, 6'd12);
    step();
    dis_valid[0] = 1; dis_uop[0] = mk(7'd6, 7'd7, 7'd0, 4'b0000, 0, 0, 6'd13);
    step();
    check_int("three slots busy", n_busy, 3);
    check_int("not ready for a pair", dis_ready, 0);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (500) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
