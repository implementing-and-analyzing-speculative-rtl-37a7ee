// tb_spt_rob: self-checking test of the reorder buffer and its PNR.
//
// Random traffic: up to two uops enter per cycle (some unsafe, some already
// complete), random busy entries complete on up to five ports. A model in the
// testbench keeps the same entries and checks every cycle that commit takes
// completed entries in order from the head, that the stale register returned
// is the one enqueued, that the PNR sits on the oldest unsafe entry (or on
// the tail when none is unsafe), and the is_nonspec window test.
module tb_spt_rob;
  import spt_pkg::*;

  localparam int W = 2, NC = 5;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic     enq_valid[W], enq_unsafe[W], enq_busy[W], enq_has_dst[W], enq_dst_fp[W];
  logic     enq_is_load[W], enq_is_store[W], enq_fire, can_enq;
  preg_t    enq_stale[W];
  rob_idx_t enq_idx[W];
  logic     cmpl_valid[NC];
  rob_idx_t cmpl_idx[NC];
  rob_ptr_t head, pnr, tail;
  logic [ROB_IDX_W:0] count;
  logic     cm_valid[W], cm_has_dst[W], cm_dst_fp[W], cm_is_load[W], cm_is_store[W];
  preg_t    cm_stale[W];

  spt_rob #(.WIDTH(W), .N_CMPL(NC)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check_int(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // model
  int   m_head = 0, m_tail = 0;             // unwrapped counters
  logic m_busy[ROB_ENTRIES], m_unsafe[ROB_ENTRIES];
  int   m_stale[ROB_ENTRIES];
  int   n_commits = 0, n_pnr_moves = 0;

  function automatic int m_pnr();
    for (int k = m_head; k < m_tail; k++) if (m_unsafe[k % ROB_ENTRIES]) return k;
    return m_tail;
  endfunction

  initial begin
    int go, ncm, k, last_pnr;
    logic used[ROB_ENTRIES];
    for (int w = 0; w < W; w++) begin
      enq_valid[w] = 0; enq_unsafe[w] = 0; enq_busy[w] = 0; enq_has_dst[w] = 0;
      enq_dst_fp[w] = 0; enq_is_load[w] = 0; enq_is_store[w] = 0; enq_stale[w] = '0;
    end
    for (int c = 0; c < NC; c++) begin cmpl_valid[c] = 0; cmpl_idx[c] = '0; end
    enq_fire = 0;
    for (int e = 0; e < ROB_ENTRIES; e++) begin m_busy[e] = 0; m_unsafe[e] = 0; m_stale[e] = 0; end
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    last_pnr = 0;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      // pointers against the model
      check_int("head", int'(head), m_head % (2 * ROB_ENTRIES));
      check_int("tail", int'(tail), m_tail % (2 * ROB_ENTRIES));
      check_int("pnr",  int'(pnr),  m_pnr() % (2 * ROB_ENTRIES));
      if (m_pnr() != last_pnr) n_pnr_moves++;
      last_pnr = m_pnr();
      // non-speculative window: head .. PNR inclusive
      for (int o = 0; o < ROB_ENTRIES; o++) begin
        k = (m_head + o) % (2 * ROB_ENTRIES);
        checks++;
        if (is_nonspec(rob_idx_t'(k), head, pnr) != (m_head + o <= m_pnr())) begin
          failures++;
          if (failures < 20) $display("FAIL is_nonspec offset %0d", o);
        end
      end
      // stimulus: completions of distinct busy entries
      for (int e = 0; e < ROB_ENTRIES; e++) used[e] = 0;
      for (int c = 0; c < NC; c++) begin
        cmpl_valid[c] = 0;
        if (m_tail > m_head && $urandom_range(0, 1)) begin
          k = (m_head + $urandom_range(0, m_tail - m_head - 1)) % ROB_ENTRIES;
          if (m_busy[k] && !used[k]) begin
            cmpl_valid[c] = 1; cmpl_idx[c] = rob_idx_t'(k); used[k] = 1;
          end
        end
      end
      for (int w = 0; w < W; w++) begin
        enq_valid[w]   = $urandom_range(0, 3) != 0;
        enq_busy[w]    = $urandom_range(0, 4) != 0;
        enq_unsafe[w]  = enq_busy[w] && $urandom_range(0, 2) == 0;
        enq_has_dst[w] = $urandom_range(0, 1);
        enq_stale[w]   = preg_t'($urandom_range(0, NUM_INT_PREGS - 1));
      end
      enq_fire = (enq_valid[0] || enq_valid[1]) && can_enq && $urandom_range(0, 3) != 0;
      #1;
      // commit against the model
      go = 1; ncm = 0;
      for (int w = 0; w < W; w++) begin
        k = (m_head + w) % ROB_ENTRIES;
        go = go && (m_head + w < m_tail) && !m_busy[k];
        check_int("commit valid", cm_valid[w], go);
        if (go) begin
          check_int("commit stale", int'(cm_stale[w]), m_stale[k]);
          ncm++;
        end
      end
      check_int("can_enq", can_enq, (m_tail - m_head) <= ROB_ENTRIES - W);
      @(posedge clk);
      // model update
      for (int c = 0; c < NC; c++)
        if (cmpl_valid[c]) begin m_busy[cmpl_idx[c]] = 0; m_unsafe[cmpl_idx[c]] = 0; end
      m_head += ncm;
      n_commits += ncm;
      if (enq_fire)
        for (int w = 0; w < W; w++)
          if (enq_valid[w]) begin
            k = m_tail % ROB_ENTRIES;
            m_busy[k] = enq_busy[w]; m_unsafe[k] = enq_unsafe[w]; m_stale[k] = int'(enq_stale[w]);
            m_tail++;
          end
    end
    checks++;
    if (n_commits < 100 || n_pnr_moves < 100) begin
      failures++;
      $display("FAIL too little activity: %0d commits, %0d PNR moves", n_commits, n_pnr_moves);
    end
    $display("commits %0d, PNR moves %0d", n_commits, n_pnr_moves);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
