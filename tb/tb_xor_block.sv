// tb_xor_block: self-checking test of xor_block.
// Drives directed and random 32-bit buses and compares each result bit with
// Data[i] ^ Data[i+16], computed here bit by bit.
module tb_xor_block;
  logic [31:0] Data;
  logic [15:0] Result;
  int checks = 0, failures = 0;

  xor_block dut (.Data(Data), .Result(Result));

  task automatic check(logic [31:0] d);
    logic [15:0] exp;
    Data = d;
    #1;
    for (int i = 0; i < 16; i++) exp[i] = (d[i] != d[i+16]);
    checks++;
    if (Result !== exp) begin
      failures++;
      $display("FAIL Data=%h Result=%h expected %h", d, Result, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(32'h0000_0000);
    check(32'hFFFF_FFFF);
    check(32'hFFFF_0000);
    check(32'h0000_FFFF);
    check(32'hA5A5_5A5A);
    for (int i = 0; i < 16; i++) begin
      check(32'h1 << i);
      check(32'h1 << (i + 16));
    end
    repeat (500) check($urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
