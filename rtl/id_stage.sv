// id_stage: instruction decode of the uP16 pipeline.
//
// Holds the register file, the decoder and the ID/EX pipeline register.
// In the decode cycle it reads R[rd] (ReadData1) and R[rs] (ReadData2),
// sign-extends immed8, decodes the control signals and resolves control
// transfers:
//   jlr/jr          target R[rs]                               always taken
//   beq/bne/blt/bgt target (branch address + 1) + sign_ext(immed)
//                   taken when R[rd] ==, !=, <, > R[rs] (signed compares)
// IF_PC_Select and IF_Alt_PC_out go combinationally to the fetch stage. All
// other results are registered at the rising edge into the EX_* outputs.
// The write-back port (WB_RDest_rd, WB_WriteData, WB_RFWrite_Enab) writes
// the register file at the same edge, and a value being written is already
// visible to the read in that cycle.
//
// There is no hazard detection and no forwarding: an instruction reading a
// register must come at least three instructions after the one writing it.
// Port names follow the published decode block; branch resolution in decode
// follows from its IF_* outputs. Signed compares are this design's choice.
module id_stage
  import up16_pkg::*;
(
  input  logic     Clk,
  input  logic     Rst,
  input  inst_t    ID_Inst_in,
  input  word_t    ID_PCplus1,
  input  regaddr_t WB_RDest_rd,
  input  word_t    WB_WriteData,
  input  logic     WB_RFWrite_Enab,
  output aluop_e   EX_ALUOp,
  output word_t    EX_PCplus1,
  output regaddr_t EX_RDest_rd,
  output word_t    EX_ReadData1,
  output word_t    EX_ReadData2,
  output word_t    EX_SignE_8immed,
  output logic     EX_MemEnab,
  output logic     EX_MemWrite,
  output logic     EX_Mem2Reg,
  output logic     EX_RFileWrite,
  output logic     EX_Sel_ALUSrc1,
  output logic     EX_Sel_ALUSrc2,
  output logic     EX_Sel_ALU_PC1,
  output word_t    IF_Alt_PC_out,
  output logic     IF_PC_Select
);

  ctrl_t ctrl;
  word_t rdata1, rdata2, imm;
  logic  take;

  control_unit u_ctrl (
    .inst(ID_Inst_in),
    .ctrl(ctrl)
  );

  reg_file #(.W(DATA_W), .N(NREGS)) u_rf (
    .clk(Clk),
    .rst(Rst),
    .ra1(f_rd(ID_Inst_in)),
    .rd1(rdata1),
    .ra2(f_rs(ID_Inst_in)),
    .rd2(rdata2),
    .we (WB_RFWrite_Enab),
    .wa (WB_RDest_rd),
    .wd (WB_WriteData)
  );

  assign imm = sign_ext8(f_imm8(ID_Inst_in));

  always_comb begin
    unique case (ctrl.br_kind)
      BR_JLR:  take = 1'b1;
      BR_EQ:   take = (rdata1 == rdata2);
      BR_NE:   take = (rdata1 != rdata2);
      BR_LT:   take = ($signed(rdata1) < $signed(rdata2));
      BR_GT:   take = ($signed(rdata1) > $signed(rdata2));
      default: take = 1'b0;
    endcase
  end

  assign IF_PC_Select  = take;

  // A redirect can only come from a jump or a branch.
  always_comb assert (!IF_PC_Select || ctrl.br_kind != BR_NONE);
  assign IF_Alt_PC_out = (ctrl.br_kind == BR_JLR) ? rdata2 : ID_PCplus1 + imm;

  always_ff @(posedge Clk) begin
    if (Rst) begin
      EX_ALUOp        <= ALU_NOP;
      EX_PCplus1      <= '0;
      EX_RDest_rd     <= '0;
      EX_ReadData1    <= '0;
      EX_ReadData2    <= '0;
      EX_SignE_8immed <= '0;
      EX_MemEnab      <= 1'b0;
      EX_MemWrite     <= 1'b0;
      EX_Mem2Reg      <= 1'b0;
      EX_RFileWrite   <= 1'b0;
      EX_Sel_ALUSrc1  <= 1'b0;
      EX_Sel_ALUSrc2  <= 1'b0;
      EX_Sel_ALU_PC1  <= 1'b0;
    end else begin
      EX_ALUOp        <= ctrl.alu_op;
      EX_PCplus1      <= ID_PCplus1;
      EX_RDest_rd     <= f_rd(ID_Inst_in);
      EX_ReadData1    <= rdata1;
      EX_ReadData2    <= rdata2;
      EX_SignE_8immed <= imm;
      EX_MemEnab      <= ctrl.mem_enab;
      EX_MemWrite     <= ctrl.mem_write;
      EX_Mem2Reg      <= ctrl.mem2reg;
      EX_RFileWrite   <= ctrl.rfile_write;
      EX_Sel_ALUSrc1  <= ctrl.sel_alu_src1;
      EX_Sel_ALUSrc2  <= ctrl.sel_alu_src2;
      EX_Sel_ALU_PC1  <= ctrl.sel_alu_pc1;
    end
  end

endmodule
