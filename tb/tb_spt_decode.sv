// tb_spt_decode: self-checking test of the SPT decode-table fields.
//
// Encodes RISC-V instructions field by field and compares queue, operand use,
// register classes, transmitter mask and the determinism / invertibility
// classes with the expected classification.
module tb_spt_decode;
  import spt_pkg::*;

  logic [31:0] inst;
  dec_uop_t    dec;

  spt_decode dut (.inst(inst), .dec(dec));

  int checks = 0, failures = 0;

  function automatic logic [31:0] r(logic [6:0] f7, logic [4:0] rs2, logic [4:0] rs1,
                                    logic [2:0] f3, logic [4:0] rd, logic [6:0] op);
    return {f7, rs2, rs1, f3, rd, op};
  endfunction
  function automatic logic [31:0] i(logic [11:0] imm, logic [4:0] rs1, logic [2:0] f3,
                                    logic [4:0] rd, logic [6:0] op);
    return {imm, rs1, f3, rd, op};
  endfunction

  task automatic expect_dec(string name, logic [31:0] in, iq_e iq, logic [3:0] uses,
                            logic [3:0] is_fp, logic [3:0] txm, det_e det, inv_e inv);
    inst = in;
    #1;
    checks++;
    if (dec.iq !== iq || dec.uses !== uses || dec.is_fp !== is_fp || dec.tx_mask !== txm ||
        dec.is_tx !== (txm != 0) || dec.det !== det || dec.inv !== inv) begin
      failures++;
      $display("FAIL %s: iq=%0d uses=%b fp=%b tx=%b det=%0d inv=%0d", name, dec.iq, dec.uses,
               dec.is_fp, dec.tx_mask, dec.det, dec.inv);
    end
  endtask

  task automatic check(string what, logic got, logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  localparam logic [6:0] OP = 7'b0110011, OPI = 7'b0010011, LD = 7'b0000011, ST = 7'b0100011;
  localparam logic [6:0] BR = 7'b1100011, OPFP = 7'b1010011, FMA = 7'b1000011;

  initial begin
    expect_dec("ADD",  r(7'h00, 5'd2, 5'd1, 3'd0, 5'd3, OP), IQ_INT, 4'b0111, 4'b0000, 4'b0000, DET_X,  INV_FUL);
    expect_dec("SUB",  r(7'h20, 5'd2, 5'd1, 3'd0, 5'd3, OP), IQ_INT, 4'b0111, 4'b0000, 4'b0000, DET_X,  INV_FUL);
    expect_dec("AND",  r(7'h00, 5'd0, 5'd1, 3'd7, 5'd3, OP), IQ_INT, 4'b0111, 4'b0000, 4'b0000, DET_Z,  INV_ER1);
    check("AND rs2 is x0", dec.rs2_x0, 1);
    expect_dec("XOR",  r(7'h00, 5'd1, 5'd1, 3'd4, 5'd3, OP), IQ_INT, 4'b0111, 4'b0000, 4'b0000, DET_E,  INV_FUL);
    check("XOR rs1 == rs2", dec.rs_eq, 1);
    expect_dec("OR",   r(7'h00, 5'd2, 5'd1, 3'd6, 5'd3, OP), IQ_INT, 4'b0111, 4'b0000, 4'b0000, DET_X,  INV_ZRX);
    expect_dec("SLL",  r(7'h00, 5'd2, 5'd0, 3'd1, 5'd3, OP), IQ_INT, 4'b0111, 4'b0000, 4'b0000, DET_ZI, INV_ZR2);
    check("SLL rs1 is x0", dec.rs1_x0, 1);
    expect_dec("SRA",  r(7'h20, 5'd2, 5'd1, 3'd5, 5'd3, OP), IQ_INT, 4'b0111, 4'b0000, 4'b0000, DET_ZI, INV_ZR2);
    expect_dec("MUL",  r(7'h01, 5'd2, 5'd1, 3'd0, 5'd3, OP), IQ_INT, 4'b0111, 4'b0000, 4'b0000, DET_Z,  INV_X);
    expect_dec("DIV",  r(7'h01, 5'd2, 5'd1, 3'd4, 5'd3, OP), IQ_INT, 4'b0111, 4'b0000, 4'b0110, DET_X,  INV_X);
    expect_dec("REM",  r(7'h01, 5'd2, 5'd1, 3'd6, 5'd3, OP), IQ_INT, 4'b0111, 4'b0000, 4'b0110, DET_X,  INV_ZR2);
    expect_dec("ADDW", r(7'h00, 5'd2, 5'd1, 3'd0, 5'd3, 7'b0111011), IQ_INT, 4'b0111, 4'b0000, 4'b0000, DET_X, INV_X);
    expect_dec("ADDI", i(12'd5, 5'd1, 3'd0, 5'd3, OPI), IQ_INT, 4'b0011, 4'b0000, 4'b0000, DET_X,  INV_FUL);
    expect_dec("SLLI 0", i(12'd0, 5'd1, 3'd1, 5'd3, OPI), IQ_INT, 4'b0011, 4'b0000, 4'b0000, DET_ZI, INV_ZIM);
    check("SLLI 0 imm zero", dec.imm_zero, 1);
    expect_dec("SLLI 3", i(12'd3, 5'd1, 3'd1, 5'd3, OPI), IQ_INT, 4'b0011, 4'b0000, 4'b0000, DET_ZI, INV_ZIM);
    check("SLLI 3 imm not zero", dec.imm_zero, 0);
    expect_dec("NOP",  i(12'd0, 5'd0, 3'd0, 5'd0, OPI), IQ_INT, 4'b0010, 4'b0000, 4'b0000, DET_X,  INV_FUL);
    expect_dec("LD",   i(12'd0, 5'd10, 3'd3, 5'd5, LD), IQ_MEM, 4'b0011, 4'b0000, 4'b0010, DET_X, INV_X);
    check("LD is load", dec.is_load, 1);
    expect_dec("SD",   {7'd0, 5'd5, 5'd10, 3'd3, 5'd8, ST}, IQ_MEM, 4'b0110, 4'b0000, 4'b0010, DET_X, INV_X);
    check("SD is store", dec.is_store, 1);
    expect_dec("FLD",  i(12'd0, 5'd10, 3'd3, 5'd1, 7'b0000111), IQ_MEM, 4'b0011, 4'b0001, 4'b0010, DET_X, INV_X);
    expect_dec("FSD",  {7'd0, 5'd1, 5'd10, 3'd3, 5'd8, 7'b0100111}, IQ_MEM, 4'b0110, 4'b0100, 4'b0010, DET_X, INV_X);
    expect_dec("BEQ",  {7'd0, 5'd2, 5'd1, 3'd0, 5'd8, BR}, IQ_INT, 4'b0110, 4'b0000, 4'b0110, DET_X, INV_X);
    check("BEQ is branch", dec.is_br, 1);
    expect_dec("JALR", i(12'd0, 5'd1, 3'd0, 5'd1, 7'b1100111), IQ_INT, 4'b0011, 4'b0000, 4'b0010, DET_X, INV_X);
    expect_dec("JAL",  {20'd8, 5'd1, 7'b1101111}, IQ_INT, 4'b0001, 4'b0000, 4'b0000, DET_X, INV_X);
    expect_dec("FADD.D", r(7'b0000001, 5'd3, 5'd2, 3'd0, 5'd1, OPFP), IQ_FP, 4'b0111, 4'b0111, 4'b0000, DET_X, INV_X);
    expect_dec("FDIV.D", r(7'b0001101, 5'd3, 5'd2, 3'd0, 5'd1, OPFP), IQ_FP, 4'b0111, 4'b0111, 4'b0110, DET_X, INV_X);
    expect_dec("FMV.X.D", r(7'b1110001, 5'd0, 5'd2, 3'd0, 5'd1, OPFP), IQ_FP, 4'b0011, 4'b0010, 4'b0000, DET_X, INV_FUL);
    expect_dec("FMV.D.X", r(7'b1111001, 5'd0, 5'd2, 3'd0, 5'd1, OPFP), IQ_INT, 4'b0011, 4'b0001, 4'b0000, DET_X, INV_FUL);
    expect_dec("FMADD.D", {5'd4, 2'b01, 5'd3, 5'd2, 3'd0, 5'd1, FMA}, IQ_FP, 4'b1111, 4'b1111, 4'b0000, DET_X, INV_X);
    check("FMADD rs3", dec.lrs3 == 5'd4, 1);
    expect_dec("CSRRW", i(12'h300, 5'd1, 3'd1, 5'd2, 7'b1110011), IQ_NONE, 4'b0000, 4'b0000, 4'b0000, DET_X, INV_X);
    check("CSRRW illegal", dec.illegal, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
