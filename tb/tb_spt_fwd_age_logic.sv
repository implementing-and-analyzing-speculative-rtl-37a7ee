// tb_spt_fwd_age_logic: self-checking test of the forwarding age logic.
//
// Fills a 16-entry store queue with random addresses (drawn from a small set
// so matches are frequent), random address-valid and address-taint bits and
// random head / load-tail pointers with wrap bit, then compares match, match
// index, tainted-store count and the forward decision with a reference model
// that walks from the youngest older store towards the head. A few directed
// cases cover the taint between the matching store and the load.
module tb_spt_fwd_age_logic;
  import spt_pkg::*;

  localparam int N = 16;
  logic       av[N], at[N];
  addr_t      a[N];
  logic [4:0] head, ltail;
  addr_t      la;
  logic       match, fwd_ok;
  logic [3:0] midx;
  logic [4:0] cnt;

  spt_fwd_age_logic #(.STQ_ENTRIES(N)) dut (
    .st_addr_valid(av), .st_addr(a), .st_addr_taint(at), .stq_head(head), .ld_stq_tail(ltail),
    .ld_addr(la), .match(match), .match_idx(midx), .tainted_cnt(cnt), .fwd_ok(fwd_ok));

  int checks = 0, failures = 0;
  logic e_match, e_ok;
  int   e_idx, e_cnt;

  task automatic model();
    int n, k, c;
    n = int'(5'(ltail - head));
    e_match = 0; e_idx = 0; c = 0;
    for (int o = 0; o < n; o++) begin
      k = (int'(ltail) - 1 - o) & (N - 1);
      if (at[k]) c++;
      if (av[k] && a[k] == la) begin
        e_match = 1; e_idx = k;
        break;
      end
    end
    e_cnt = e_match ? c : 0;
    e_ok  = e_match && c == 0;
  endtask

  task automatic compare(string what);
    #1;
    model();
    checks++;
    if (match !== e_match || fwd_ok !== e_ok || (e_match && (int'(midx) != e_idx || int'(cnt) != e_cnt))) begin
      failures++;
      if (failures < 10)
        $display("FAIL %s: match %0b/%0b idx %0d/%0d cnt %0d/%0d ok %0b/%0b", what, match, e_match,
                 midx, e_idx, cnt, e_cnt, fwd_ok, e_ok);
    end
  endtask

  initial begin
    for (int i = 0; i < N; i++) begin av[i] = 0; at[i] = 0; a[i] = '0; end
    head = 0; ltail = 0; la = '0;
    compare("empty queue");

    // directed: stores 0..3 older than the load, store 1 matches
    for (int i = 0; i < 4; i++) begin av[i] = 1; a[i] = addr_t'(100 + i); end
    a[1] = 40'h500; la = 40'h500; ltail = 5'd4;
    compare("clean match");
    if (!(fwd_ok && midx == 1)) begin failures++; $display("FAIL directed forward"); end
    checks++;
    at[3] = 1;                               // younger than the match: blocks
    compare("tainted younger store");
    if (fwd_ok || cnt != 1) begin failures++; $display("FAIL tainted store between"); end
    checks++;
    at[3] = 0; at[0] = 1;                    // older than the match: no effect
    compare("tainted older store");
    if (!fwd_ok) begin failures++; $display("FAIL older taint must not block"); end
    checks++;
    at[0] = 0; a[3] = 40'h500;               // a younger match wins
    compare("youngest match");
    if (midx != 3) begin failures++; $display("FAIL youngest match"); end
    checks++;

    for (int t = 0; t < 5000; t++) begin
      for (int i = 0; i < N; i++) begin
        av[i] = $urandom_range(0, 3) != 0;
        at[i] = $urandom_range(0, 3) == 0;
        a[i]  = addr_t'($urandom_range(0, 7) * 8);
      end
      head  = 5'($urandom);
      ltail = head + 5'($urandom_range(0, N));
      la    = addr_t'($urandom_range(0, 7) * 8);
      compare("random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
