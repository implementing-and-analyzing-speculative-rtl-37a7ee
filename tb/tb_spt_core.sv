// tb_spt_core: end-to-end test of the SPT core at its default sizes.
//
// Feeds a random RISC-V instruction stream, two per cycle, into the core:
// integer ALU ops (including deterministic and invertible ones), divides,
// branches, loads and stores on a small address set (so stores and loads
// meet in the store queue), and FP add / divide / load. Base registers are
// sometimes x0 (clean addresses) and sometimes registers written by loads
// (tainted addresses). Instructions 1000 to 1199 are FP adds only, which
// fill the 1-wide FP issue queue and stall dispatch. The stream ends when
// NUM_INSTS instructions have entered; the test then waits for the core to
// drain.
//
// Checks:
//   * every instruction commits, in order, and the core drains (no deadlock);
//   * the SPT rule at issue: an issued transmitter either has no tainted
//     transmitted operand or lies between the ROB head and the PNR;
//   * the LSU never sends a load to memory with a tainted speculative address;
//   * each mechanism happened at least once (counted below): issue-slot
//     s_wait in both issue units, UBB traffic on integer / FP / LSU lanes,
//     untaint by reaching the PNR, forward and backward propagation in a
//     slot, deterministic clean results at rename, LSU address blocking,
//     secure forwarding and blocked forwarding, memory requests, dispatch
//     stalls, PNR movement and commits.
module tb_spt_core;
  import spt_pkg::*;

  localparam int NUM_INSTS = 4000;
  localparam int W = CORE_WIDTH;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        in_valid[W];
  logic [31:0] in_inst[W];
  addr_t       in_addr[W];
  logic        in_ready;
  logic        commit_valid[W];
  rob_ptr_t    rob_head, rob_pnr, rob_tail;
  logic [ROB_IDX_W:0] rob_count;
  logic [4:0]  int_n_busy, fp_n_busy;
  ubb_lane_t   ubb_bus[UBB_LANES];
  logic [4:0]  int_n_wait;
  logic [4:0]  fp_n_wait;
  logic        int_issue[2], fp_issue;
  logic        ev_addr_blocked, ev_fwd, ev_fwd_blocked, ev_mem_req;

  spt_core dut (.*);

  int checks = 0, failures = 0;

  // ---------------------------------------------------------------- program
  function automatic logic [31:0] r(logic [6:0] f7, logic [4:0] rs2, logic [4:0] rs1,
                                    logic [2:0] f3, logic [4:0] rd, logic [6:0] op);
    return {f7, rs2, rs1, f3, rd, op};
  endfunction

  function automatic logic [4:0] rreg();
    return ($urandom_range(0, 7) == 0) ? 5'd0 : 5'($urandom_range(1, 12));
  endfunction

  int sent = 0, committed = 0, cycles = 0;

  // one random instruction and its effective address
  task automatic gen(output logic [31:0] inst, output addr_t addr);
    logic [4:0] rd, a, b;
    int k;
    rd = 5'($urandom_range(1, 12));
    a = rreg();
    b = rreg();
    addr = addr_t'(40'h1000 + 8 * $urandom_range(0, 3));
    k = $urandom_range(0, 99);
    // a burst of FP adds: two per cycle into the 1-wide FP unit fills its queue
    if (sent >= 1000 && sent < 1200) k = 80;
    if (k < 12)      inst = r(7'h00, b, a, 3'd0, rd, 7'b0110011);                    // add
    else if (k < 17) inst = r(7'h00, a, a, 3'd4, rd, 7'b0110011);                    // xor x,x
    else if (k < 22) inst = r(7'h00, 5'd0, a, 3'd7, rd, 7'b0110011);                 // and x,0
    else if (k < 27) inst = r(7'h00, b, a, 3'd6, rd, 7'b0110011);                    // or
    else if (k < 32) inst = {12'($urandom_range(0, 3)), a, 3'd1, rd, 7'b0010011};    // slli
    else if (k < 40) inst = {12'($urandom_range(0, 50)), a, 3'd0, rd, 7'b0010011};   // addi
    else if (k < 44) inst = r(7'h01, b, a, 3'd4, rd, 7'b0110011);                    // div
    else if (k < 52) inst = {7'd0, b, a, 3'd0, 5'd8, 7'b1100011};                    // beq
    else if (k < 68) inst = {12'd0, ($urandom_range(0, 1) != 0 ? 5'd0 : a), 3'd3, rd, 7'b0000011}; // ld
    else if (k < 80) inst = {7'd0, b, ($urandom_range(0, 1) != 0 ? 5'd0 : a), 3'd3, 5'd0, 7'b0100011}; // sd
    else if (k < 86) inst = r(7'b0000001, 5'($urandom_range(1, 7)), 5'($urandom_range(1, 7)), 3'd0,
                              5'($urandom_range(1, 7)), 7'b1010011);                 // fadd.d
    else if (k < 90) inst = r(7'b0001101, 5'($urandom_range(1, 7)), 5'($urandom_range(1, 7)), 3'd0,
                              5'($urandom_range(1, 7)), 7'b1010011);                 // fdiv.d
    else if (k < 95) inst = {12'd0, ($urandom_range(0, 1) != 0 ? 5'd0 : a), 3'd3,
                             5'($urandom_range(1, 7)), 7'b0000111};                  // fld
    else             inst = r(7'h00, b, a, 3'd0, rd, 7'b0110011);                    // add
  endtask

  // ---------------------------------------------------------------- counters
  int n_int_wait = 0, n_fp_wait = 0, n_ubb_int = 0, n_ubb_fp = 0, n_ubb_lsu = 0;
  int n_addr_blk = 0, n_fwd = 0, n_fwd_blk = 0, n_mem = 0, n_stall = 0, n_pnr_move = 0;
  int n_det = 0, n_int_iss = 0, n_fp_iss = 0;
  int n_txunt[20], n_fprop[20], n_bprop[20];
  rob_ptr_t last_pnr;

  for (genvar s = 0; s < 20; s++) begin : g_mon
    initial begin n_txunt[s] = 0; n_fprop[s] = 0; n_bprop[s] = 0; end
    always @(posedge clk) if (rst_n) begin
      if ((dut.u_int_iu.g_slot[s].u_slot.tx_unt & dut.u_int_iu.g_slot[s].u_slot.t) != 0) n_txunt[s]++;
      if ((dut.u_int_iu.g_slot[s].u_slot.fwd & dut.u_int_iu.g_slot[s].u_slot.t) != 0) n_fprop[s]++;
      if ((dut.u_int_iu.g_slot[s].u_slot.bwd & dut.u_int_iu.g_slot[s].u_slot.t) != 0) n_bprop[s]++;
    end
  end

  function automatic logic leaks(uop_t u);
    return u.is_tx && |(u.tx_mask & u.taint & u.uses) && !is_nonspec(u.rob_idx, rob_head, rob_pnr);
  endfunction

  always @(posedge clk) if (rst_n) begin
    cycles++;
    if (int_n_wait != 0) n_int_wait++;
    if (fp_n_wait != 0) n_fp_wait++;
    for (int l = 0; l < INT_LANES; l++) if (ubb_bus[l].valid) n_ubb_int++;
    if (ubb_bus[INT_LANES].valid) n_ubb_fp++;
    if (ubb_bus[INT_LANES + FP_LANES].valid) n_ubb_lsu++;
    if (ev_addr_blocked) n_addr_blk++;
    if (ev_fwd) n_fwd++;
    if (ev_fwd_blocked) n_fwd_blk++;
    if (ev_mem_req) n_mem++;
    if ((in_valid[0] || in_valid[1]) && !in_ready) n_stall++;
    if (rob_pnr != last_pnr) n_pnr_move++;
    last_pnr = rob_pnr;
    for (int w = 0; w < W; w++) begin
      if (commit_valid[w]) committed++;
      // deterministic result: clean destination from a tainted source
      if (dut.fire && in_valid[w] && dut.ren_uop[w].uses[OP_DST] && !dut.ren_uop[w].taint[OP_DST] &&
          |(dut.ren_uop[w].taint[3:1] & dut.ren_uop[w].uses[3:1]))
        n_det++;
    end
    // SPT rule at issue
    for (int i = 0; i < 2; i++)
      if (dut.int_iss_v[i]) begin
        n_int_iss++;
        checks++;
        if (leaks(dut.int_iss_u[i])) begin
          failures++;
          $display("FAIL integer issue of a tainted speculative transmitter, rob %0d",
                   dut.int_iss_u[i].rob_idx);
        end
      end
    if (dut.fp_iss_v[0]) begin
      n_fp_iss++;
      checks++;
      if (leaks(dut.fp_iss_u[0])) begin
        failures++;
        $display("FAIL FP issue of a tainted speculative transmitter");
      end
    end
    if (dut.u_lsu.ld_go_mem) begin
      checks++;
      if (dut.u_lsu.ldq_q[dut.u_lsu.ld_sel].addr_taint &&
          !is_nonspec(dut.u_lsu.ldq_q[dut.u_lsu.ld_sel].rob_idx, rob_head, rob_pnr)) begin
        failures++;
        $display("FAIL load sent to memory with a tainted speculative address");
      end
    end
  end

  task automatic need(string what, int n);
    checks++;
    $display("  %-40s %0d", what, n);
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism never happened: %s", what);
    end
  endtask

  // ---------------------------------------------------------------- driver
  initial begin
    int total;
    for (int w = 0; w < W; w++) begin in_valid[w] = 0; in_inst[w] = '0; in_addr[w] = '0; end
    last_pnr = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    while (sent < NUM_INSTS) begin
      for (int w = 0; w < W; w++) begin
        in_valid[w] = (sent + w < NUM_INSTS) && (sent >= 1000 && sent < 1200 || $urandom_range(0, 7) != 0);
        gen(in_inst[w], in_addr[w]);
      end
      do @(posedge clk); while (!in_ready);
      for (int w = 0; w < W; w++) if (in_valid[w]) sent++;
      #1;
      for (int w = 0; w < W; w++) in_valid[w] = 0;
    end
    // drain
    begin
      int t;
      t = 0;
      while (committed < sent && t < 5000) begin @(posedge clk); t++; end
      @(posedge clk);
    end
    checks++;
    if (committed != sent) begin
      failures++;
      $display("FAIL drained: %0d of %0d instructions committed", committed, sent);
    end
    checks++;
    if (rob_count != 0 || int_n_busy != 0 || fp_n_busy != 0 || rob_pnr != rob_head) begin
      failures++;
      $display("FAIL core not empty after drain");
    end
    $display("cycles %0d, instructions %0d, IPC x100 %0d", cycles, sent, 100 * sent / cycles);
    need("integer issue", n_int_iss);
    need("FP issue", n_fp_iss);
    need("commits", committed);
    need("integer slot in s_wait (cycles)", n_int_wait);
    need("FP slot in s_wait (cycles)", n_fp_wait);
    need("UBB integer-lane broadcasts", n_ubb_int);
    need("UBB FP-lane broadcasts", n_ubb_fp);
    need("UBB LSU-lane broadcasts", n_ubb_lsu);
    total = 0; for (int s = 0; s < 20; s++) total += n_txunt[s];
    need("untaint by reaching the PNR (slots)", total);
    total = 0; for (int s = 0; s < 20; s++) total += n_fprop[s];
    need("forward propagation", total);
    total = 0; for (int s = 0; s < 20; s++) total += n_bprop[s];
    need("backward propagation", total);
    need("deterministic clean result at rename", n_det);
    need("LSU address blocked (cycles)", n_addr_blk);
    need("store-to-load forward", n_fwd);
    need("forward blocked (cycles)", n_fwd_blk);
    need("load sent to memory", n_mem);
    need("dispatch stall (cycles)", n_stall);
    need("PNR moves", n_pnr_move);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog: sent %0d committed %0d head %0d pnr %0d tail %0d int wait %0d fp wait %0d",
             sent, committed, rob_head, rob_pnr, rob_tail, int_n_wait, fp_n_wait);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
