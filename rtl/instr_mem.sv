// instr_mem: uP16 program memory, DEPTH words of INST_W (18) bits.
//
// One synchronous read port: at each rising edge the word at addr is loaded
// into the output register inst, which is the fetch stage's instruction
// register. Reset clears inst to 0, the nop word. A separate write port
// (load_we, load_addr, load_data) places a program into the memory before or
// while the processor is held in reset. Only the low log2(DEPTH) address
// bits are used, so addresses wrap.
//
// The 18-bit word is the published one; DEPTH = 1024 is this design's
// reading of "2048 bytes" of program memory (the same word count as the data
// memory), and the load port is this design's addition.
module instr_mem #(
  parameter int unsigned DEPTH  = 1024,
  parameter int unsigned INST_W = 18,
  parameter int unsigned AW_IN  = 16,
  localparam int unsigned AW    = $clog2(DEPTH)
) (
  input  logic              clk,
  input  logic              rst,
  input  logic [AW_IN-1:0]  addr,
  output logic [INST_W-1:0] inst,
  input  logic              load_we,
  input  logic [AW_IN-1:0]  load_addr,
  input  logic [INST_W-1:0] load_data
);

  logic [INST_W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (load_we) mem[load_addr[AW-1:0]] <= load_data;
  end

  always_ff @(posedge clk) begin
    if (rst) inst <= '0;
    else     inst <= mem[addr[AW-1:0]];
  end

endmodule
