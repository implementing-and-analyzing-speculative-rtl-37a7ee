// spt_decode: the SPT fields of the decode tables for one RISC-V instruction.
//
// Purely combinational. For the RV64IM base, the F/D arithmetic, FP loads and
// stores and the fused multiply-adds it returns the register operands, the
// queue the uop goes to, and the three SPT classifications:
//   * transmitter flag and mask of transmittable operands (bit 0 destination,
//     bits 1..3 rs1..rs3): loads and stores transmit their address register,
//     branches both compared registers, indirect jumps their target register,
//     integer and FP divides/remainders and the FP square root their sources
//     (variable latency);
//   * determinism class DET_X/Z/ZI/E (result known from which registers are
//     used, not from their values);
//   * invertibility class INV_X..INV_FUL (a source can be recovered from the
//     destination and the other sources).
// The class names, and the classes of LOAD, ADD, AND, MUL, shifts, XOR, REM, OR,
// SUB and the immediate shifts, follow the described design. The
// classification of the remaining opcodes is this design's own, erring
// towards not-deterministic / not-invertible (W-form ops, multiplies and
// divides are never invertible). Anything else (system, fence, atomics) is
// flagged illegal and is executed as a no-op by the core.
module spt_decode
  import spt_pkg::*;
(
  input  logic [31:0] inst,
  output dec_uop_t    dec
);

  logic [6:0] opcode;
  logic [2:0] f3;
  logic [6:0] f7;
  logic [4:0] f5;
  logic [4:0] rd, rs1, rs2, rs3;

  assign opcode = inst[6:0];
  assign f3     = inst[14:12];
  assign f7     = inst[31:25];
  assign f5     = inst[31:27];
  assign rd     = inst[11:7];
  assign rs1    = inst[19:15];
  assign rs2    = inst[24:20];
  assign rs3    = inst[31:27];

  localparam logic [6:0] OPC_LOAD     = 7'b0000011;
  localparam logic [6:0] OPC_LOAD_FP  = 7'b0000111;
  localparam logic [6:0] OPC_STORE    = 7'b0100011;
  localparam logic [6:0] OPC_STORE_FP = 7'b0100111;
  localparam logic [6:0] OPC_OP_IMM   = 7'b0010011;
  localparam logic [6:0] OPC_OP_IMM32 = 7'b0011011;
  localparam logic [6:0] OPC_OP       = 7'b0110011;
  localparam logic [6:0] OPC_OP32     = 7'b0111011;
  localparam logic [6:0] OPC_LUI      = 7'b0110111;
  localparam logic [6:0] OPC_AUIPC    = 7'b0010111;
  localparam logic [6:0] OPC_BRANCH   = 7'b1100011;
  localparam logic [6:0] OPC_JAL      = 7'b1101111;
  localparam logic [6:0] OPC_JALR     = 7'b1100111;
  localparam logic [6:0] OPC_OP_FP    = 7'b1010011;
  localparam logic [6:0] OPC_FMADD    = 7'b1000011;
  localparam logic [6:0] OPC_FMSUB    = 7'b1000111;
  localparam logic [6:0] OPC_FNMSUB   = 7'b1001011;
  localparam logic [6:0] OPC_FNMADD   = 7'b1001111;

  logic [3:0] uses, is_fp;

  always_comb begin
    dec          = '0;
    dec.det      = DET_X;
    dec.inv      = INV_X;
    dec.iq       = IQ_INT;
    dec.ldst     = rd;
    dec.lrs1     = rs1;
    dec.lrs2     = rs2;
    dec.lrs3     = rs3;
    uses         = '0;
    is_fp        = '0;

    unique case (opcode)
      OPC_LOAD, OPC_LOAD_FP: begin
        dec.iq      = IQ_MEM;
        dec.is_load = 1'b1;
        uses        = 4'b0011;
        is_fp[OP_DST] = (opcode == OPC_LOAD_FP);
        dec.is_tx   = 1'b1;
        dec.tx_mask = 4'b0010;
      end
      OPC_STORE, OPC_STORE_FP: begin
        dec.iq       = IQ_MEM;
        dec.is_store = 1'b1;
        uses         = 4'b0110;
        is_fp[OP_RS2] = (opcode == OPC_STORE_FP);
        dec.is_tx    = 1'b1;
        dec.tx_mask  = 4'b0010;
      end
      OPC_OP_IMM, OPC_OP_IMM32: begin
        uses = 4'b0011;
        if (f3 == 3'b001 || f3 == 3'b101)
          dec.imm_zero = (opcode == OPC_OP_IMM) ? (inst[25:20] == 6'd0) : (inst[24:20] == 5'd0);
        else
          dec.imm_zero = (inst[31:20] == 12'd0);
        unique case (f3)
          3'b000: dec.inv = INV_FUL;                      // ADDI: rd - imm = rs1
          3'b001, 3'b101: begin                           // immediate shifts
            dec.det = DET_ZI;
            dec.inv = INV_ZIM;
          end
          3'b100: dec.inv = INV_FUL;                      // XORI
          3'b110: dec.inv = INV_ZIM;                      // ORI rd, rs1, 0 is a move
          default: ;                                      // SLTI, SLTIU, ANDI
        endcase
        // W forms truncate and sign-extend: never invertible
        if (opcode == OPC_OP_IMM32) dec.inv = INV_X;
        if (opcode == OPC_OP_IMM32 && f3 != 3'b000 && f3 != 3'b001 && f3 != 3'b101)
          dec.illegal = 1'b1;
      end
      OPC_OP, OPC_OP32: begin
        uses = 4'b0111;
        if (f7 == 7'b0000001) begin                       // M extension
          if (f3[2]) begin                                // DIV, DIVU, REM, REMU
            dec.is_tx   = 1'b1;
            dec.tx_mask = 4'b0110;
            dec.inv     = (f3[1]) ? INV_ZR2 : INV_X;     // REM by x0 returns rs1
          end else begin
            dec.det = DET_Z;                              // MUL by x0 is 0
          end
        end else if (f7 == 7'b0000000 || f7 == 7'b0100000) begin
          unique case (f3)
            3'b000: dec.inv = INV_FUL;                    // ADD, SUB
            3'b001, 3'b101: begin                         // SLL, SRL, SRA
              dec.det = DET_ZI;
              dec.inv = INV_ZR2;
            end
            3'b100: begin                                 // XOR
              dec.det = DET_E;
              dec.inv = INV_FUL;
            end
            3'b110: dec.inv = INV_ZRX;                    // OR
            3'b111: begin                                 // AND
              dec.det = DET_Z;
              dec.inv = INV_ER1;
            end
            default: ;                                    // SLT, SLTU
          endcase
        end else begin
          dec.illegal = 1'b1;
        end
        if (opcode == OPC_OP32) dec.inv = INV_X;
      end
      OPC_LUI, OPC_AUIPC, OPC_JAL: begin
        uses = 4'b0001;
      end
      OPC_JALR: begin
        uses        = 4'b0011;
        dec.is_br   = 1'b1;
        dec.is_tx   = 1'b1;
        dec.tx_mask = 4'b0010;
      end
      OPC_BRANCH: begin
        uses        = 4'b0110;
        dec.is_br   = 1'b1;
        dec.is_tx   = 1'b1;
        dec.tx_mask = 4'b0110;
      end
      OPC_FMADD, OPC_FMSUB, OPC_FNMSUB, OPC_FNMADD: begin
        dec.iq = IQ_FP;
        uses   = 4'b1111;
        is_fp  = 4'b1111;
      end
      OPC_OP_FP: begin
        dec.iq = IQ_FP;
        unique case (f5)
          5'b00000, 5'b00001, 5'b00010, 5'b00100, 5'b00101: begin // add sub mul sgnj minmax
            uses  = 4'b0111;
            is_fp = 4'b0111;
          end
          5'b00011: begin                                 // FDIV
            uses        = 4'b0111;
            is_fp       = 4'b0111;
            dec.is_tx   = 1'b1;
            dec.tx_mask = 4'b0110;
          end
          5'b01011: begin                                 // FSQRT
            uses        = 4'b0011;
            is_fp       = 4'b0011;
            dec.is_tx   = 1'b1;
            dec.tx_mask = 4'b0010;
          end
          5'b01000: begin                                 // FCVT between formats
            uses  = 4'b0011;
            is_fp = 4'b0011;
          end
          5'b10100: begin                                 // FEQ, FLT, FLE
            uses  = 4'b0111;
            is_fp = 4'b0110;
          end
          5'b11000: begin                                 // FCVT to integer
            uses  = 4'b0011;
            is_fp = 4'b0010;
          end
          5'b11100: begin                                 // FMV.X / FCLASS
            uses  = 4'b0011;
            is_fp = 4'b0010;
            if (f3 == 3'b000) dec.inv = INV_FUL;          // raw bit move
          end
          5'b11010: begin                                 // FCVT from integer
            dec.iq = IQ_INT;
            uses   = 4'b0011;
            is_fp  = 4'b0001;
          end
          5'b11110: begin                                 // FMV.W.X / FMV.D.X
            dec.iq  = IQ_INT;
            uses    = 4'b0011;
            is_fp   = 4'b0001;
            dec.inv = INV_FUL;
          end
          default: dec.illegal = 1'b1;
        endcase
      end
      default: dec.illegal = 1'b1;
    endcase

    // the integer zero register is never a destination
    if (!is_fp[OP_DST] && rd == 5'd0) uses[OP_DST] = 1'b0;

    if (dec.illegal) begin
      dec          = '0;
      dec.illegal  = 1'b1;
      dec.iq       = IQ_NONE;
      dec.det      = DET_X;
      dec.inv      = INV_X;
      uses         = '0;
      is_fp        = '0;
    end

    dec.uses   = uses;
    dec.is_fp  = is_fp;
    dec.rs1_x0 = uses[OP_RS1] && !is_fp[OP_RS1] && (rs1 == 5'd0);
    dec.rs2_x0 = uses[OP_RS2] && !is_fp[OP_RS2] && (rs2 == 5'd0);
    dec.rs_eq  = uses[OP_RS1] && uses[OP_RS2] && (is_fp[OP_RS1] == is_fp[OP_RS2]) && (rs1 == rs2);
  end

endmodule
