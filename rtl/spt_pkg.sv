// spt_pkg: types, sizes and helper functions shared by the Speculative Privacy
// Tracking (SPT) backend.
//
// SPT delays transmitters (instructions whose execution can leak an operand
// through a side channel) only while they are speculative AND hold a tainted
// operand that they would transmit. Taint lives in three places (rename map
// table, issue slots, load/store queues) that are kept coherent by the Untaint
// Broadcast Bus (UBB).
//
// Sizes: the reorder buffer (64 entries, two banks of 32), the 2-wide core and
// the UBB lane split (2 lanes integer issue unit, 1 lane FP issue unit, 1 lane
// LSU) follow the described design. Physical register counts (80 integer, 64
// FP) and queue sizes are those of BOOM's medium configuration and are choices
// of this implementation, as is the 40-bit address width.
package spt_pkg;

  // ---------------------------------------------------------------- sizes
  localparam int CORE_WIDTH    = 2;     // decode/rename/dispatch width
  localparam int NUM_LREGS     = 32;    // per register class
  localparam int NUM_INT_PREGS = 80;
  localparam int NUM_FP_PREGS  = 64;
  localparam int PREG_W        = 7;     // holds max(NUM_INT_PREGS, NUM_FP_PREGS)-1
  localparam int FP_IDX_W      = $clog2(NUM_FP_PREGS);
  localparam int ROB_ENTRIES   = 64;    // power of two
  localparam int ROB_IDX_W     = $clog2(ROB_ENTRIES);
  localparam int ROB_PTR_W     = ROB_IDX_W + 1;  // index plus wrap bit
  localparam int ADDR_W        = 40;

  // UBB lanes: one per instruction the writer can issue per cycle
  localparam int INT_LANES = 2;
  localparam int FP_LANES  = 1;
  localparam int LSU_LANES = 1;
  localparam int UBB_LANES = INT_LANES + FP_LANES + LSU_LANES;

  // operand slots of a uop; bit order of taint masks and of the broadcast
  // queue (bit 0 is the destination)
  localparam int OP_DST = 0;
  localparam int OP_RS1 = 1;
  localparam int OP_RS2 = 2;
  localparam int OP_RS3 = 3;

  typedef logic [PREG_W-1:0]    preg_t;
  typedef logic [ROB_IDX_W-1:0] rob_idx_t;
  typedef logic [ROB_PTR_W-1:0] rob_ptr_t;
  typedef logic [ADDR_W-1:0]    addr_t;
  typedef logic [NUM_INT_PREGS-1:0] int_vec_t;  // one bit per integer preg
  typedef logic [NUM_FP_PREGS-1:0]  fp_vec_t;   // one bit per FP preg

  // one lane of the Untaint Broadcast Bus
  typedef struct packed {
    logic  valid;   // an untaint event is broadcast on this lane
    preg_t reg_id;  // physical register that became untainted
    logic  is_fp;   // register class of reg_id
  } ubb_lane_t;

  // conditionally deterministic classes
  typedef enum logic [1:0] {
    DET_X  = 2'd0,  // never deterministic
    DET_Z  = 2'd1,  // deterministic if any register operand is x0
    DET_ZI = 2'd2,  // deterministic only if rs1 is x0
    DET_E  = 2'd3   // deterministic if rs1 and rs2 are the same register
  } det_e;

  // conditionally invertible classes (backward propagation)
  typedef enum logic [2:0] {
    INV_X   = 3'd0,  // never invertible
    INV_ZR1 = 3'd1,  // invertible if rs1 is x0
    INV_ZR2 = 3'd2,  // invertible if rs2 is x0
    INV_ZRX = 3'd3,  // invertible if rs1 or rs2 is x0
    INV_ER1 = 3'd4,  // invertible if rs1 and rs2 are the same register
    INV_ZIM = 3'd5,  // invertible if the immediate is zero
    INV_FUL = 3'd6   // always invertible
  } inv_e;

  // which queue a uop is dispatched to
  typedef enum logic [1:0] {
    IQ_NONE = 2'd0,  // nothing to execute (completes at dispatch)
    IQ_INT  = 2'd1,
    IQ_FP   = 2'd2,
    IQ_MEM  = 2'd3
  } iq_e;

  // output of the decode tables
  typedef struct packed {
    logic       illegal;   // not decoded: dispatched as a no-op
    iq_e        iq;
    logic       is_load;
    logic       is_store;
    logic       is_br;     // branch or indirect jump: unsafe until resolved
    logic [3:0] uses;      // [0] valid destination, [1..3] rs1..rs3 read
    logic [3:0] is_fp;     // register class per operand slot
    logic [4:0] ldst;
    logic [4:0] lrs1;
    logic [4:0] lrs2;
    logic [4:0] lrs3;
    logic       is_tx;     // transmitter
    logic [3:0] tx_mask;   // operands it may transmit (same bit order)
    det_e       det;
    inv_e       inv;
    logic       imm_zero;  // immediate field is zero
    logic       rs1_x0;    // rs1 is the integer zero register
    logic       rs2_x0;    // rs2 is the integer zero register
    logic       rs_eq;     // rs1 and rs2 name the same register
  } dec_uop_t;

  // renamed uop as held by the issue units and the LSU
  typedef struct packed {
    iq_e        iq;
    logic       is_load;
    logic       is_store;
    logic       is_br;
    logic [3:0] uses;
    logic [3:0] is_fp;
    preg_t      pdst;
    preg_t      prs1;
    preg_t      prs2;
    preg_t      prs3;
    logic [3:0] taint;     // per operand slot, 1 = tainted
    logic [3:0] ready;     // source operand value available (bit 0 unused)
    logic       is_tx;
    logic [3:0] tx_mask;
    inv_e       inv;
    logic       imm_zero;
    logic       rs1_x0;
    logic       rs2_x0;
    logic       rs_eq;
    rob_idx_t   rob_idx;
    addr_t      addr;      // effective address of a memory uop
  } uop_t;

  // physical register of operand slot i
  function automatic preg_t op_preg(uop_t u, int i);
    case (i)
      OP_DST:  return u.pdst;
      OP_RS1:  return u.prs1;
      OP_RS2:  return u.prs2;
      default: return u.prs3;
    endcase
  endfunction

  // register of the given class appears in a decoded bit vector
  function automatic logic vec_hit(int_vec_t iv, fp_vec_t fv, preg_t p, logic is_fp);
    if (is_fp) return (int'(p) < NUM_FP_PREGS)  ? fv[p[FP_IDX_W-1:0]] : 1'b0;
    else       return (int'(p) < NUM_INT_PREGS) ? iv[p] : 1'b0;
  endfunction

  // An instruction is non-speculative when its ROB index lies between the
  // head and the point of no return (PNR), the PNR entry included: all older
  // instructions can no longer squash it. Pointers carry a wrap bit so that
  // pnr == tail of a full ROB is told apart from pnr == head.
  function automatic logic is_nonspec(rob_idx_t idx, rob_ptr_t head, rob_ptr_t pnr);
    rob_idx_t d;
    rob_ptr_t dp;
    d  = idx - head[ROB_IDX_W-1:0];
    dp = pnr - head;
    return {1'b0, d} <= dp;
  endfunction

endpackage
