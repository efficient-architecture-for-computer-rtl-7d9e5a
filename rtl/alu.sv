// alu: the 16-bit arithmetic and logic unit of the uP16 execute stage.
//
// Computes result = a OP b for the operations of up16_pkg::aluop_e: add, sub,
// addu, subu, mov (b), and, or, nand, nor, xor (through xor_block) and not
// (~b); nop gives 0. Alongside it forms the 8-bit status word:
//   bit 0 zero      result == 0
//   bit 1 positive  result != 0 and its sign bit is 0
//   bit 2 negative  sign bit of the result is 1
//   bit 3 carry     carry out of addu, or borrow of subu (a < b unsigned)
//   bit 4 overflow  two's-complement overflow of add or sub
//   bits 7:5        0
// Zero/positive/negative match the published status values; carry and
// overflow are this design's way of making add/sub differ from addu/subu,
// which the instruction list gives the same effect.
//
// Purely combinational; the execute stage registers result and status.
module alu
  import up16_pkg::*;
#(
  parameter int unsigned W = 16
) (
  input  aluop_e      op,
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] result,
  output logic [7:0]   status
);

  logic [W-1:0] xor_res;
  logic [W:0]   sum, diff;

  xor_block #(.W(W)) u_xor (
    .Data  ({b, a}),
    .Result(xor_res)
  );

  assign sum  = {1'b0, a} + {1'b0, b};
  assign diff = {1'b0, a} - {1'b0, b};

  always_comb begin
    logic carry, ovf;
    carry  = 1'b0;
    ovf    = 1'b0;
    result = '0;
    unique case (op)
      ALU_ADD: begin
        result = sum[W-1:0];
        ovf    = (a[W-1] == b[W-1]) && (result[W-1] != a[W-1]);
      end
      ALU_SUB: begin
        result = diff[W-1:0];
        ovf    = (a[W-1] != b[W-1]) && (result[W-1] != a[W-1]);
      end
      ALU_ADDU: begin
        result = sum[W-1:0];
        carry  = sum[W];
      end
      ALU_SUBU: begin
        result = diff[W-1:0];
        carry  = diff[W];
      end
      ALU_MOV:  result = b;
      ALU_AND:  result = a & b;
      ALU_OR:   result = a | b;
      ALU_NAND: result = ~(a & b);
      ALU_NOR:  result = ~(a | b);
      ALU_XOR:  result = xor_res;
      ALU_NOT:  result = ~b;
      default:  result = '0;
    endcase
    status            = '0;
    status[ST_ZERO]   = (result == '0);
    status[ST_POS]    = (result != '0) && !result[W-1];
    status[ST_NEG]    = result[W-1];
    status[ST_CARRY]  = carry;
    status[ST_OVF]    = ovf;
  end

endmodule
