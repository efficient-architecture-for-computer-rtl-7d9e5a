// ex_stage: execute stage of the uP16 pipeline.
//
// Selects the ALU operands from the ID/EX register (a = ReadData1 or, with
// EX_Sel_ALUSrc1, ReadData2; b = ReadData2 or, with EX_Sel_ALUSrc2, the
// sign-extended immediate), runs the ALU, and at the rising edge registers
// the result and the control bits that later stages need (Mem_* outputs)
// and the 8-bit status word (ALU_Status). The status register is loaded
// every cycle, so it always describes the last instruction executed.
//
// The unregistered ALU result, store data and memory controls leave on the
// EX_*_out ports for the data memory, which latches them at the same edge;
// load data is thus ready in the next (memory) stage. EX_ReadData2_out,
// EX_MemEnab_out and EX_MemWrite_out are the ID/EX register bits passed on
// unchanged, kept as ports so the stage boundary matches the published one;
// status bits 7:5 are always 0.
//
// The port names, the status word width and the split between registered
// and unregistered outputs follow the published execute block; the operand
// select meanings are this design's choice.
module ex_stage
  import up16_pkg::*;
(
  input  logic     Clk,
  input  logic     Rst,
  input  aluop_e   EX_ALUOp,
  input  word_t    EX_PCplus1,
  input  regaddr_t EX_RDest_rd,
  input  word_t    EX_ReadData1,
  input  word_t    EX_ReadData2,
  input  word_t    EX_SignE_8immed,
  input  logic     EX_MemEnab,
  input  logic     EX_MemWrite,
  input  logic     EX_Mem2Reg,
  input  logic     EX_RFileWrite,
  input  logic     EX_Sel_ALUSrc1,
  input  logic     EX_Sel_ALUSrc2,
  input  logic     EX_Sel_ALU_PC1,
  output logic [STAT_W-1:0] ALU_Status,
  output word_t    EX_ALUResult_mem,
  output word_t    EX_ReadData2_out,
  output logic     EX_MemEnab_out,
  output logic     EX_MemWrite_out,
  output word_t    Mem_ALUResult,
  output word_t    Mem_PCplus1,
  output regaddr_t Mem_RDest_rd,
  output logic     Mem_Mem2Reg,
  output logic     Mem_RFileWrite,
  output logic     Mem_Sel_ALU_PC1
);

  word_t opa, opb, res;
  logic [STAT_W-1:0] stat;

  assign opa = EX_Sel_ALUSrc1 ? EX_ReadData2 : EX_ReadData1;
  assign opb = EX_Sel_ALUSrc2 ? EX_SignE_8immed : EX_ReadData2;

  alu #(.W(DATA_W)) u_alu (
    .op    (EX_ALUOp),
    .a     (opa),
    .b     (opb),
    .result(res),
    .status(stat)
  );

  assign EX_ALUResult_mem = res;
  assign EX_ReadData2_out = EX_ReadData2;
  assign EX_MemEnab_out   = EX_MemEnab;
  assign EX_MemWrite_out  = EX_MemWrite;

  always_ff @(posedge Clk) begin
    if (Rst) begin
      ALU_Status      <= '0;
      Mem_ALUResult   <= '0;
      Mem_PCplus1     <= '0;
      Mem_RDest_rd    <= '0;
      Mem_Mem2Reg     <= 1'b0;
      Mem_RFileWrite  <= 1'b0;
      Mem_Sel_ALU_PC1 <= 1'b0;
    end else begin
      ALU_Status      <= stat;
      Mem_ALUResult   <= res;
      Mem_PCplus1     <= EX_PCplus1;
      Mem_RDest_rd    <= EX_RDest_rd;
      Mem_Mem2Reg     <= EX_Mem2Reg;
      Mem_RFileWrite  <= EX_RFileWrite;
      Mem_Sel_ALU_PC1 <= EX_Sel_ALU_PC1;
    end
  end

endmodule
