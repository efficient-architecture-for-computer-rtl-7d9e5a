// if_stage: instruction fetch of the uP16 pipeline.
//
// Each cycle the next fetch address is either the jump/branch target from
// the decode stage (ID_Alt_PC_in, when ID_PC_Select is high) or
// IF_currPC + 1. At the rising edge that address becomes IF_currPC, the
// program memory's output register takes the word stored there
// (IF_Inst_out), and IF_PCplus1 takes the address + 1. These three registers
// form the IF/ID pipeline register: IF_Inst_out is always the instruction at
// IF_currPC. The target is used in the cycle the decode stage produces it,
// so a taken branch or jump fetches its target next, with no delay slot.
//
// Reset (synchronous, active high) sets IF_currPC to 16'hFFFF and the
// instruction to nop, so the first address fetched is 0. The port names and
// the 16'hFFFF shown during reset follow the published design; the program
// memory's load port is brought out for placing a program.
module if_stage
  import up16_pkg::*;
#(
  parameter int unsigned IMEM_DEPTH = 1024
) (
  input  logic  Clk,
  input  logic  Rst,
  input  word_t ID_Alt_PC_in,
  input  logic  ID_PC_Select,
  output word_t IF_currPC,
  output inst_t IF_Inst_out,
  output word_t IF_PCplus1,
  input  logic  imem_load_we,
  input  word_t imem_load_addr,
  input  inst_t imem_load_data
);

  word_t fetch_pc;

  assign fetch_pc = ID_PC_Select ? ID_Alt_PC_in : IF_currPC + word_t'(1);

  always_ff @(posedge Clk) begin
    if (Rst) begin
      IF_currPC  <= '1;
      IF_PCplus1 <= '0;
    end else begin
      IF_currPC  <= fetch_pc;
      IF_PCplus1 <= fetch_pc + word_t'(1);
    end
  end

  instr_mem #(
    .DEPTH (IMEM_DEPTH),
    .INST_W(INST_W),
    .AW_IN (DATA_W)
  ) u_imem (
    .clk      (Clk),
    .rst      (Rst),
    .addr     (fetch_pc),
    .inst     (IF_Inst_out),
    .load_we  (imem_load_we),
    .load_addr(imem_load_addr),
    .load_data(imem_load_data)
  );

endmodule
