// tb_spt_gadget: a bounds-check-bypass gadget run through the SPT core.
//
// The core runs the same short trace twice from reset, at its default sizes:
//
//   0  addi x12, x0, C        clean base
//   1  ld   x9,  0(x12)       clean address; x9 tainted
//   2  ld   x5,  0(x9)        tainted address: held until non-speculative
//   3  addi x11, x0, K        clean index
//   4  bge  x11, x5           bounds check, resolves only after load 2
//   5  ld   x6,  0(x11)       the "secret" load; clean address, so it may go
//                             to memory while speculative
//   6  slli x7,  x6, 6
//   7  add  x7,  x7, x12      x7 depends on the secret
//   8  ld   x8,  0(x7)        the probe: its address would reveal x6
//
// In the first run the probe's address is tainted, and SPT must hold it
// until everything older has resolved (the probe is then non-speculative).
// In the second run instruction 5 is "addi x6, x0, 5", so the probe's
// address is public and SPT must not delay it: it reaches memory while the
// bounds check is still unresolved. The first two loads make the bounds
// check slow, so that gap is several cycles wide. Addresses and constants are
// random.
//
// Checks per run: the secret load goes to memory speculatively; the probe is
// held (run 1) or not (run 2); the probe is never sent while tainted and
// speculative; all 10 instructions commit and the core drains. Across runs:
// the probe is sent later in run 1.
module tb_spt_gadget;
  import spt_pkg::*;

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

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  localparam logic [6:0] OP = 7'b0110011, OPI = 7'b0010011, LD = 7'b0000011, BR = 7'b1100011;

  function automatic logic [31:0] itype(logic [11:0] imm, logic [4:0] rs1, logic [2:0] f3,
                                        logic [4:0] rd, logic [6:0] op);
    return {imm, rs1, f3, rd, op};
  endfunction

  // ---------------------------------------------------------------- monitor
  localparam int PROBE = 8, SECRET = 5;
  addr_t secret_a, probe_a;
  int    cyc, probe_cyc, secret_cyc, probe_blocked, committed;
  logic  probe_spec, secret_spec;

  always @(posedge clk) if (rst_n) begin
    cyc++;
    for (int w = 0; w < W; w++) if (commit_valid[w]) committed++;
    // probe held: its address is known, tainted and speculative, and it waits
    for (int e = 0; e < dut.LDQ_ENTRIES; e++)
      if (dut.u_lsu.ldq_q[e].valid && dut.u_lsu.ldq_q[e].addr == probe_a &&
          dut.u_lsu.ldq_q[e].addr_ready && dut.u_lsu.ldq_q[e].addr_taint &&
          !dut.u_lsu.ldq_q[e].fired && !is_nonspec(rob_idx_t'(PROBE), rob_head, rob_pnr)) begin
        probe_blocked++;
        check("probe held only while blocking is on", ev_addr_blocked);
      end
    if (dut.u_lsu.ld_go_mem) begin
      if (dut.u_lsu.ldq_q[dut.u_lsu.ld_sel].addr == probe_a) begin
        probe_cyc  = cyc;
        probe_spec = !is_nonspec(rob_idx_t'(PROBE), rob_head, rob_pnr);
        checks++;
        if (dut.u_lsu.ldq_q[dut.u_lsu.ld_sel].addr_taint && probe_spec) begin
          failures++;
          $display("FAIL probe sent to memory with a tainted speculative address");
        end
      end
      if (dut.u_lsu.ldq_q[dut.u_lsu.ld_sel].addr == secret_a) begin
        secret_cyc  = cyc;
        secret_spec = !is_nonspec(rob_idx_t'(SECRET), rob_head, rob_pnr);
      end
    end
  end

  // ---------------------------------------------------------------- driver
  task automatic run(input logic public_data, output int probe_at);
    logic [31:0] prog[10];
    addr_t       adr[10];
    logic [11:0] c, k;
    c = 12'(16 * $urandom_range(1, 100));
    k = 12'(8 * $urandom_range(1, 200));
    secret_a = addr_t'(32'h1000 + 8 * $urandom_range(0, 255));
    probe_a  = addr_t'(32'h4000 + 8 * $urandom_range(0, 255));
    prog[0] = itype(c, 5'd0, 3'd0, 5'd12, OPI);
    prog[1] = itype(12'd0, 5'd12, 3'd3, 5'd9, LD);
    prog[2] = itype(12'd0, 5'd9, 3'd3, 5'd5, LD);
    prog[3] = itype(k, 5'd0, 3'd0, 5'd11, OPI);
    prog[4] = {7'd0, 5'd5, 5'd11, 3'b101, 5'd8, BR};
    prog[5] = public_data ? itype(12'd5, 5'd0, 3'd0, 5'd6, OPI) : itype(12'd0, 5'd11, 3'd3, 5'd6, LD);
    prog[6] = itype(12'd6, 5'd6, 3'd1, 5'd7, OPI);
    prog[7] = {7'd0, 5'd12, 5'd7, 3'd0, 5'd7, OP};
    prog[8] = itype(12'd0, 5'd7, 3'd3, 5'd8, LD);
    prog[9] = itype(12'd0, 5'd0, 3'd0, 5'd0, OPI);
    for (int n = 0; n < 10; n++) adr[n] = '0;
    adr[1] = addr_t'(c);
    adr[2] = addr_t'(32'h2000);
    adr[5] = secret_a;
    adr[8] = probe_a;

    rst_n = 0;
    cyc = 0; probe_cyc = 0; secret_cyc = 0; probe_blocked = 0; committed = 0;
    probe_spec = 0; secret_spec = 0;
    for (int w = 0; w < W; w++) begin in_valid[w] = 0; in_inst[w] = '0; in_addr[w] = '0; end
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int p = 0; p < 10; p += W) begin
      for (int w = 0; w < W; w++) begin
        in_valid[w] = 1;
        in_inst[w]  = prog[p + w];
        in_addr[w]  = adr[p + w];
      end
      do @(posedge clk); while (!in_ready);
      #1;
    end
    for (int w = 0; w < W; w++) in_valid[w] = 0;
    while (committed < 10 || rob_count != 0) @(posedge clk);
    #1;

    check("probe reached memory", probe_cyc != 0);
    check("secret load went to memory while speculative", public_data || (secret_cyc != 0 && secret_spec));
    if (public_data) begin
      check("public probe not held", probe_blocked == 0);
      check("public probe sent while speculative", probe_spec);
    end else begin
      check("tainted probe held", probe_blocked > 0);
      check("tainted probe sent only when non-speculative", !probe_spec);
    end
    check("all instructions committed", committed == 10);
    check("core drained", rob_count == 0 && int_n_busy == 0 && rob_pnr == rob_head);
    $display("  %s data: probe sent at cycle %0d, held %0d cycles, %s",
             public_data ? "public" : "secret", probe_cyc, probe_blocked,
             probe_spec ? "speculative" : "non-speculative");
    probe_at = probe_cyc;
  endtask

  initial begin
    int t_secret, t_public;
    for (int w = 0; w < W; w++) begin in_valid[w] = 0; in_inst[w] = '0; in_addr[w] = '0; end
    run(1'b0, t_secret);
    run(1'b1, t_public);
    check("secret-dependent probe sent later than the public one", t_secret > t_public);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL watchdog: cycle %0d, committed %0d", cyc, committed);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
