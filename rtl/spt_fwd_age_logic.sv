// spt_fwd_age_logic: store-to-load forwarding age logic with SPT counting.
//
// For one load it searches the store queue entries older than the load, from
// the youngest down to the queue head, for the youngest store whose address
// matches the load's: that is the only store the load may forward from. In
// the same pass it counts the stores from that matching store (included) up
// to the load whose address register is still tainted. SPT allows the
// forward only when that count is zero (all stores between the forwarding
// store and the load have untainted addresses), which replaces an in-LSU
// broadcast of untainted store indices. Combinational.
//
// Interface: store queue pointers carry a wrap bit; `ld_stq_tail` is the store
// queue tail when the load was enqueued, so stores in [stq_head, ld_stq_tail)
// are older than the load. Only stores with `st_addr_valid` take part in the
// match. Searching for the youngest matching older store follows the
// described design; exact address compare on the full address is this
// design's choice (no byte masks).
module spt_fwd_age_logic
  import spt_pkg::*;
#(
  parameter int STQ_ENTRIES = 16,
  localparam int IDX_W = $clog2(STQ_ENTRIES),
  localparam int CNT_W = $clog2(STQ_ENTRIES + 1)
) (
  input  logic             st_addr_valid[STQ_ENTRIES],
  input  addr_t            st_addr      [STQ_ENTRIES],
  input  logic             st_addr_taint[STQ_ENTRIES],
  input  logic [IDX_W:0]   stq_head,
  input  logic [IDX_W:0]   ld_stq_tail,
  input  addr_t            ld_addr,
  output logic             match,
  output logic [IDX_W-1:0] match_idx,
  output logic [CNT_W-1:0] tainted_cnt,
  output logic             fwd_ok
);

  always_comb begin
    logic [IDX_W:0]   n_older;
    logic [IDX_W-1:0] i;
    logic [CNT_W-1:0] cnt;
    match     = 1'b0;
    match_idx = '0;
    cnt       = '0;
    n_older   = ld_stq_tail - stq_head;
    for (int o = 0; o < STQ_ENTRIES; o++) begin
      i = IDX_W'(ld_stq_tail) - IDX_W'(o) - IDX_W'(1);
      if (!match && o < int'(n_older)) begin
        if (st_addr_taint[i]) cnt = cnt + 1'b1;
        if (st_addr_valid[i] && st_addr[i] == ld_addr) begin
          match     = 1'b1;
          match_idx = i;
        end
      end
    end
    tainted_cnt = match ? cnt : '0;
    fwd_ok      = match && (cnt == '0);
  end

endmodule
