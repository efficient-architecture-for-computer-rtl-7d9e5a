// reg_file: the uP16 general-purpose register file, N x W bits (8 x 16).
//
// Two combinational read ports (ra1/rd1, ra2/rd2) and one write port written
// on the rising clock edge when we is high. Register 0 always reads 0 and
// ignores writes, so an instruction with rd = R0 has no write-back (as jr
// relies on). A read of the register being written in the same cycle returns
// the new data (write-through), so the decode stage sees a result in the
// cycle it is written back; this, and the synchronous active-high reset that
// clears every register, are this design's choices.
module reg_file #(
  parameter int unsigned W = 16,
  parameter int unsigned N = 8,
  localparam int unsigned AW = $clog2(N)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic [AW-1:0] ra1,
  output logic [W-1:0]  rd1,
  input  logic [AW-1:0] ra2,
  output logic [W-1:0]  rd2,
  input  logic          we,
  input  logic [AW-1:0] wa,
  input  logic [W-1:0]  wd
);

  logic [W-1:0] regs [N];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < N; i++) regs[i] <= '0;
    end else if (we && wa != '0) begin
      regs[wa] <= wd;
    end
  end

  function automatic logic [W-1:0] rd_port(logic [AW-1:0] ra);
    if (ra == '0)            return '0;
    else if (we && wa == ra) return wd;
    else                     return regs[ra];
  endfunction

  assign rd1 = rd_port(ra1);
  assign rd2 = rd_port(ra2);

endmodule
