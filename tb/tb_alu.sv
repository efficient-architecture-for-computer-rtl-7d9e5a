// tb_alu: self-checking test of the uP16 ALU.
// Every operation is driven with corner and random operands. The expected
// result and status word are computed here with integer arithmetic on
// 32-bit values, independently of the ALU's own formulation.
module tb_alu;
  import up16_pkg::*;
  aluop_e      op;
  logic [15:0] a, b, result;
  logic [7:0]  status;
  int checks = 0, failures = 0;

  alu dut (.op(op), .a(a), .b(b), .result(result), .status(status));

  function automatic void model(aluop_e o, logic [15:0] x, logic [15:0] y,
                                output logic [15:0] r, output logic [7:0] s);
    int sx, sy, sr;
    int ux, uy;
    logic c, v;
    sx = int'($signed(x)); sy = int'($signed(y));
    ux = int'(x); uy = int'(y);
    c = 0; v = 0;
    case (o)
      ALU_ADD:  begin sr = sx + sy; r = sr[15:0]; v = (sr > 32767) || (sr < -32768); end
      ALU_SUB:  begin sr = sx - sy; r = sr[15:0]; v = (sr > 32767) || (sr < -32768); end
      ALU_ADDU: begin sr = ux + uy; r = sr[15:0]; c = (sr > 65535); end
      ALU_SUBU: begin sr = ux - uy; r = sr[15:0]; c = (ux < uy); end
      ALU_MOV:  r = y;
      ALU_AND:  r = x & y;
      ALU_OR:   r = x | y;
      ALU_NAND: r = ~(x & y);
      ALU_NOR:  r = ~(x | y);
      ALU_XOR:  r = x ^ y;
      ALU_NOT:  r = ~y;
      default:  r = 16'h0;
    endcase
    s = 8'h00;
    if (r == 0) s[0] = 1;
    else if (int'($signed(r)) > 0) s[1] = 1;
    else s[2] = 1;
    s[3] = c;
    s[4] = v;
  endfunction

  task automatic check(aluop_e o, logic [15:0] x, logic [15:0] y);
    logic [15:0] er;
    logic [7:0]  es;
    op = o; a = x; b = y;
    #1;
    model(o, x, y, er, es);
    checks++;
    if (result !== er || status !== es) begin
      failures++;
      $display("FAIL op=%0d a=%h b=%h -> %h/%h expected %h/%h", o, x, y, result, status, er, es);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam logic [15:0] CORNER [8] = '{16'h0000, 16'h0001, 16'h7FFF, 16'h8000,
                                         16'hFFFF, 16'hFFA3, 16'h0002, 16'h8001};
  initial begin
    for (int o = 0; o < 12; o++)
      foreach (CORNER[i]) foreach (CORNER[j]) check(aluop_e'(o), CORNER[i], CORNER[j]);
    for (int o = 12; o < 16; o++) check(aluop_e'(o), 16'h1234, 16'h4321);
    repeat (3000) check(aluop_e'($urandom_range(0, 11)), 16'($urandom), 16'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
