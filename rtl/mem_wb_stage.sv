// mem_wb_stage: memory access and write-back stages of the uP16 pipeline.
//
// Holds the data memory. The address (EX_ALUResult_mem), store data
// (EX_ReadData2) and controls (EX_MemEnab, EX_MemWrite) arrive unregistered
// from the execute stage and are taken by the memory at the rising edge
// that ends the execute cycle. In the following (memory) cycle the load data
// is on the memory output, and the write-back value is chosen:
//   WB_Mem2Reg      -> load data
//   Mem_Sel_ALU_PC1 -> Mem_PCplus1 (jlr's return address)
//   otherwise       -> Mem_ALUResult
// At the next edge the value, the destination register and the write enable
// are registered into the WB_* outputs (the MEM/WB register), which write
// the register file in the decode stage at the edge after that.
//
// Port names follow the published memory/write-back block; the synchronous
// read and DMEM_DEPTH = 1024 words are this design's reading.
module mem_wb_stage
  import up16_pkg::*;
#(
  parameter int unsigned DMEM_DEPTH = 1024
) (
  input  logic     Clk,
  input  logic     Rst,
  input  word_t    EX_ALUResult_mem,
  input  word_t    EX_ReadData2,
  input  logic     EX_MemEnab,
  input  logic     EX_MemWrite,
  input  word_t    Mem_ALUResult,
  input  word_t    Mem_PCplus1,
  input  regaddr_t Mem_RFDest,
  input  logic     Mem_RFileWrite_in,
  input  logic     Mem_Sel_ALU_PC1,
  input  logic     WB_Mem2Reg,
  output regaddr_t WB_RFDest_out,
  output word_t    WB_WriteData,
  output logic     WB_RFileWrite_out
);

  word_t load_data, wb_value;

  data_mem #(
    .DEPTH(DMEM_DEPTH),
    .W    (DATA_W),
    .AW_IN(DATA_W)
  ) u_dmem (
    .clk  (Clk),
    .en   (EX_MemEnab),
    .we   (EX_MemWrite),
    .addr (EX_ALUResult_mem),
    .wdata(EX_ReadData2),
    .rdata(load_data)
  );

  always_comb begin
    if (WB_Mem2Reg)           wb_value = load_data;
    else if (Mem_Sel_ALU_PC1) wb_value = Mem_PCplus1;
    else                      wb_value = Mem_ALUResult;
  end

  always_ff @(posedge Clk) begin
    if (Rst) begin
      WB_RFDest_out     <= '0;
      WB_WriteData      <= '0;
      WB_RFileWrite_out <= 1'b0;
    end else begin
      WB_RFDest_out     <= Mem_RFDest;
      WB_WriteData      <= wb_value;
      WB_RFileWrite_out <= Mem_RFileWrite_in;
    end
  end

endmodule
