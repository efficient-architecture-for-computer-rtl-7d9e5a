// xor_block: bitwise exclusive-or of the two halves of one bus.
//
// The block takes both operands on a single 2*W-bit bus, Data, and returns
// W result bits. Result bit i is Data[i] xor Data[i+W]: one two-input cell
// per bit, sixteen cells for the default width. The ALU uses it for the xor
// instruction, driving Data with {operand b, operand a}.
//
// Purely combinational. The bus names, the pairing of bit i with bit i+16 and
// the 16-bit width follow the published block; making the width a parameter
// is this design's choice.
module xor_block #(
  parameter int unsigned W = 16
) (
  input  logic [2*W-1:0] Data,
  output logic [W-1:0]   Result
);

  always_comb begin
    for (int i = 0; i < W; i++) begin
      Result[i] = Data[i] ^ Data[i+W];
    end
  end

endmodule
