// tb_spt_issue_slot: self-checking test of one SPT issue slot.
//
// Drives hand-built uops into the slot and checks the state machine
// (s_invalid / s_wait / s_valid), the blocking condition, untaint by
// non-speculation, forward and backward propagation, the broadcast queue and
// the kill path, cycle by cycle, against expectations written out below.
module tb_spt_issue_slot;
  import spt_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic      in_valid, issue, kill, bgrant;
  uop_t      in_uop;
  rob_ptr_t  head, pnr;
  int_vec_t  ubb_int, wb_int;
  fp_vec_t   ubb_fp, wb_fp;
  logic      occupied, waiting, can_issue, breq;
  uop_t      uop;
  ubb_lane_t blane;

  spt_issue_slot dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_uop(in_uop), .issue(issue), .kill(kill),
    .rob_head(head), .rob_pnr(pnr), .ubb_int(ubb_int), .ubb_fp(ubb_fp), .wb_int(wb_int),
    .wb_fp(wb_fp), .occupied(occupied), .waiting(waiting), .can_issue(can_issue), .uop(uop),
    .bcast_req(breq), .bcast_lane(blane), .bcast_grant(bgrant));

  int checks = 0, failures = 0;
  task automatic check(string what, logic got, logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0b expected %0b", what, got, exp);
    end
  endtask
  task automatic check_int(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // uop with destination 43, rs1 22, rs2 7, all ready unless told
  function automatic uop_t mk(logic tx, logic [3:0] txm, inv_e inv, logic [3:0] taint, logic ready, rob_idx_t ri);
    uop_t u;
    u = '0;
    u.iq = IQ_INT;
    u.uses = 4'b0111;
    u.pdst = 7'd43; u.prs1 = 7'd22; u.prs2 = 7'd7;
    u.taint = taint;
    u.ready = ready ? 4'b1110 : 4'b0000;
    u.is_tx = tx; u.tx_mask = txm; u.inv = inv;
    u.rob_idx = ri;
    return u;
  endfunction

  task automatic step();
    @(posedge clk);
    #1;
    in_valid = 0; issue = 0; kill = 0; bgrant = 0;
    ubb_int = '0; wb_int = '0;
  endtask

  task automatic dispatch(uop_t u);
    in_valid = 1;
    in_uop = u;
    step();
  endtask

  task automatic clear_slot();
    kill = 1;
    step();
    check("cleared", occupied, 0);
  endtask

  initial begin
    in_valid = 0; issue = 0; kill = 0; bgrant = 0; in_uop = '0;
    ubb_int = '0; ubb_fp = '0; wb_int = '0; wb_fp = '0;
    // head 0, PNR at entry 2: entries 0..2 non-speculative, 3.. speculative
    head = 7'd0; pnr = 7'd2;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;

    // 1. safe non-transmitter: straight to s_valid, no added latency
    dispatch(mk(0, 4'b0000, INV_FUL, 4'b0011, 1, 6'd10));
    check("1 occupied", occupied, 1);
    check("1 not waiting", waiting, 0);
    check("1 can issue", can_issue, 1);
    issue = 1;
    step();
    check("1 issued -> invalid", occupied, 0);

    // 2. speculative transmitter with a tainted transmittable operand waits
    dispatch(mk(1, 4'b0110, INV_X, 4'b0010, 1, 6'd10));
    check("2 waiting", waiting, 1);
    check("2 cannot issue", can_issue, 0);
    step();
    check("2 still waiting", waiting, 1);
    ubb_int[22] = 1'b1;                     // someone untaints p22
    step();
    check("2 rs1 untainted", uop.taint[OP_RS1], 0);
    check("2 no own broadcast", breq, 0);
    check("2 waiting one more cycle", waiting, 1);
    step();
    check("2 now valid", waiting, 0);
    check("2 can issue", can_issue, 1);
    clear_slot();

    // 3. tainted but untainted operand not in the transmit mask: safe
    dispatch(mk(1, 4'b0100, INV_X, 4'b0010, 1, 6'd10));
    check("3 safe", waiting, 0);
    clear_slot();

    // 4. transmitter reaching the PNR: untaints its operand and broadcasts
    dispatch(mk(1, 4'b0010, INV_X, 4'b0010, 1, 6'd5));
    check("4 waiting", waiting, 1);
    pnr = 7'd5;
    step();
    check("4 valid", waiting, 0);
    check("4 rs1 untainted", uop.taint[OP_RS1], 0);
    check("4 broadcast request", breq, 1);
    check_int("4 lane reg", int'(blane.reg_id), 22);
    check("4 lane valid", blane.valid, 1);
    bgrant = 1;
    step();
    check("4 queue empty", breq, 0);
    pnr = 7'd2;
    clear_slot();

    // 5. forward propagation (not ready, so it stays): rs1 untainted by UBB,
    //    destination one cycle later, queued bit 0, broadcast pdst 43
    dispatch(mk(0, 4'b0000, INV_X, 4'b0011, 0, 6'd10));
    ubb_int[22] = 1'b1;
    step();
    check("5 rs1 clean", uop.taint[OP_RS1], 0);
    check("5 dst still tainted", uop.taint[OP_DST], 1);
    step();
    check("5 dst clean", uop.taint[OP_DST], 0);
    check("5 broadcast request", breq, 1);
    check_int("5 lane reg", int'(blane.reg_id), 43);
    step();                                  // not granted: stays queued
    check("5 still queued", breq, 1);
    bgrant = 1;
    step();
    check("5 sent", breq, 0);
    clear_slot();

    // 6. backward propagation on an invertible uop: destination untainted
    //    by the bus, rs2 clean -> rs1 untainted and broadcast
    dispatch(mk(0, 4'b0000, INV_FUL, 4'b0011, 0, 6'd10));
    ubb_int[43] = 1'b1;
    step();
    check("6 dst clean", uop.taint[OP_DST], 0);
    check("6 rs1 still tainted", uop.taint[OP_RS1], 1);
    step();
    check("6 rs1 clean", uop.taint[OP_RS1], 0);
    check_int("6 lane reg", int'(blane.reg_id), 22);
    clear_slot();

    // 7. same on a non-invertible uop: rs1 stays tainted
    dispatch(mk(0, 4'b0000, INV_X, 4'b0011, 0, 6'd10));
    ubb_int[43] = 1'b1;
    step();
    step();
    step();
    check("7 rs1 tainted", uop.taint[OP_RS1], 1);
    check("7 nothing to send", breq, 0);
    clear_slot();

    // 8. wakeup: not ready until the producer writes back
    dispatch(mk(0, 4'b0000, INV_X, 4'b0000, 0, 6'd10));
    check("8 not ready", can_issue, 0);
    wb_int[22] = 1'b1;
    wb_int[7]  = 1'b1;
    step();
    check("8 ready", can_issue, 1);
    clear_slot();

    // 9. kill from s_wait
    dispatch(mk(1, 4'b0010, INV_X, 4'b0010, 1, 6'd10));
    check("9 waiting", waiting, 1);
    clear_slot();

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
