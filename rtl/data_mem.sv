// data_mem: uP16 data memory, DEPTH words of W (16) bits, word access only.
//
// A synchronous RAM. When en is high at a rising edge, a store (we = 1)
// writes wdata to addr, and a load (we = 0) copies the word at addr into
// rdata, where it stays until the next load. The address arrives from the
// execute stage, so load data is ready one cycle later, in the memory stage.
// Only the low log2(DEPTH) address bits are used. No reset: contents are
// whatever was last stored.
//
// Word-only access and the 16-bit width follow the published design; 1024
// words is 2048 bytes of 16-bit words. The registered read is this design's
// choice.
module data_mem #(
  parameter int unsigned DEPTH = 1024,
  parameter int unsigned W     = 16,
  parameter int unsigned AW_IN = 16,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             en,
  input  logic             we,
  input  logic [AW_IN-1:0] addr,
  input  logic [W-1:0]     wdata,
  output logic [W-1:0]     rdata
);

  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (en) begin
      if (we) mem[addr[AW-1:0]] <= wdata;
      else    rdata <= mem[addr[AW-1:0]];
    end
  end

endmodule
