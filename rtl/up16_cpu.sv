// up16_cpu: the uP16 processor, a 16-bit RISC core with a five-stage
// pipeline and separate program and data memories (Harvard organisation).
//
// Four stage blocks are chained as in the published block diagram:
//   if_stage      PC, next-PC select, program memory      -> IF/ID register
//   id_stage      decoder, register file, branch resolve  -> ID/EX register
//   ex_stage      operand selects, ALU, status word       -> EX/MEM register
//   mem_wb_stage  data memory, write-back select          -> MEM/WB register
// and the MEM/WB register writes the register file back in the decode stage.
// One instruction enters per clock; the first result is written back in the
// fifth cycle after it is fetched. Branches and jumps are resolved in decode
// and redirect the very next fetch, so they cost no cycles and have no delay
// slot. There are no stalls and no forwarding paths: software must put two
// instructions (nops if need be) between writing a register and reading it.
//
// Ports: Clk, Rst (synchronous, active high); a program-load port for the
// program memory (write while Rst is high); and the four observation outputs
// of the published design: IF_currPC and IF_ID_Inst_out (the fetched
// instruction and its address), Status (ALU status word, bit 0 zero, 1
// positive, 2 negative, 3 carry, 4 overflow) and alu_result (the ALU result
// of the instruction now in the memory stage).
module up16_cpu
  import up16_pkg::*;
#(
  parameter int unsigned IMEM_DEPTH = 1024,
  parameter int unsigned DMEM_DEPTH = 1024
) (
  input  logic              Clk,
  input  logic              Rst,
  input  logic              imem_load_we,
  input  word_t             imem_load_addr,
  input  inst_t             imem_load_data,
  output word_t             IF_currPC,
  output inst_t             IF_ID_Inst_out,
  output logic [STAT_W-1:0] Status,
  output word_t             alu_result
);

  // IF <-> ID
  word_t    if_pcplus1, alt_pc;
  logic     pc_select;
  // ID -> EX
  aluop_e   ex_aluop;
  word_t    ex_pcplus1, ex_rd1, ex_rd2, ex_imm;
  regaddr_t ex_rdest;
  logic     ex_memenab, ex_memwrite, ex_mem2reg, ex_rfwrite;
  logic     ex_src1, ex_src2, ex_pc1;
  // EX -> MEM
  word_t    ex_alures_mem, ex_rd2_out;
  logic     ex_memenab_out, ex_memwrite_out;
  word_t    mem_alures, mem_pcplus1;
  regaddr_t mem_rdest;
  logic     mem_mem2reg, mem_rfwrite, mem_pc1;
  // WB -> ID
  regaddr_t wb_rdest;
  word_t    wb_data;
  logic     wb_we;

  if_stage #(.IMEM_DEPTH(IMEM_DEPTH)) u_if (
    .Clk           (Clk),
    .Rst           (Rst),
    .ID_Alt_PC_in  (alt_pc),
    .ID_PC_Select  (pc_select),
    .IF_currPC     (IF_currPC),
    .IF_Inst_out   (IF_ID_Inst_out),
    .IF_PCplus1    (if_pcplus1),
    .imem_load_we  (imem_load_we),
    .imem_load_addr(imem_load_addr),
    .imem_load_data(imem_load_data)
  );

  id_stage u_id (
    .Clk            (Clk),
    .Rst            (Rst),
    .ID_Inst_in     (IF_ID_Inst_out),
    .ID_PCplus1     (if_pcplus1),
    .WB_RDest_rd    (wb_rdest),
    .WB_WriteData   (wb_data),
    .WB_RFWrite_Enab(wb_we),
    .EX_ALUOp       (ex_aluop),
    .EX_PCplus1     (ex_pcplus1),
    .EX_RDest_rd    (ex_rdest),
    .EX_ReadData1   (ex_rd1),
    .EX_ReadData2   (ex_rd2),
    .EX_SignE_8immed(ex_imm),
    .EX_MemEnab     (ex_memenab),
    .EX_MemWrite    (ex_memwrite),
    .EX_Mem2Reg     (ex_mem2reg),
    .EX_RFileWrite  (ex_rfwrite),
    .EX_Sel_ALUSrc1 (ex_src1),
    .EX_Sel_ALUSrc2 (ex_src2),
    .EX_Sel_ALU_PC1 (ex_pc1),
    .IF_Alt_PC_out  (alt_pc),
    .IF_PC_Select   (pc_select)
  );

  ex_stage u_ex (
    .Clk             (Clk),
    .Rst             (Rst),
    .EX_ALUOp        (ex_aluop),
    .EX_PCplus1      (ex_pcplus1),
    .EX_RDest_rd     (ex_rdest),
    .EX_ReadData1    (ex_rd1),
    .EX_ReadData2    (ex_rd2),
    .EX_SignE_8immed (ex_imm),
    .EX_MemEnab      (ex_memenab),
    .EX_MemWrite     (ex_memwrite),
    .EX_Mem2Reg      (ex_mem2reg),
    .EX_RFileWrite   (ex_rfwrite),
    .EX_Sel_ALUSrc1  (ex_src1),
    .EX_Sel_ALUSrc2  (ex_src2),
    .EX_Sel_ALU_PC1  (ex_pc1),
    .ALU_Status      (Status),
    .EX_ALUResult_mem(ex_alures_mem),
    .EX_ReadData2_out(ex_rd2_out),
    .EX_MemEnab_out  (ex_memenab_out),
    .EX_MemWrite_out (ex_memwrite_out),
    .Mem_ALUResult   (mem_alures),
    .Mem_PCplus1     (mem_pcplus1),
    .Mem_RDest_rd    (mem_rdest),
    .Mem_Mem2Reg     (mem_mem2reg),
    .Mem_RFileWrite  (mem_rfwrite),
    .Mem_Sel_ALU_PC1 (mem_pc1)
  );

  mem_wb_stage #(.DMEM_DEPTH(DMEM_DEPTH)) u_mem (
    .Clk              (Clk),
    .Rst              (Rst),
    .EX_ALUResult_mem (ex_alures_mem),
    .EX_ReadData2     (ex_rd2_out),
    .EX_MemEnab       (ex_memenab_out),
    .EX_MemWrite      (ex_memwrite_out),
    .Mem_ALUResult    (mem_alures),
    .Mem_PCplus1      (mem_pcplus1),
    .Mem_RFDest       (mem_rdest),
    .Mem_RFileWrite_in(mem_rfwrite),
    .Mem_Sel_ALU_PC1  (mem_pc1),
    .WB_Mem2Reg       (mem_mem2reg),
    .WB_RFDest_out    (wb_rdest),
    .WB_WriteData     (wb_data),
    .WB_RFileWrite_out(wb_we)
  );

  assign alu_result = mem_alures;

endmodule
