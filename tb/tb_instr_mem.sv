// tb_instr_mem: self-checking test of the program memory.
// Loads random 18-bit words through the load port, then reads them back and
// checks that each word appears on inst exactly one clock after its address,
// that reset forces the nop word, and that addresses wrap at DEPTH.
module tb_instr_mem;
  localparam int DEPTH = 1024;
  logic        clk = 0, rst;
  logic [15:0] addr, load_addr;
  logic [17:0] inst, load_data;
  logic        load_we;
  logic [17:0] model [DEPTH];
  int checks = 0, failures = 0;

  instr_mem dut (.clk(clk), .rst(rst), .addr(addr), .inst(inst),
                 .load_we(load_we), .load_addr(load_addr), .load_data(load_data));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; addr = 0; load_we = 0; load_addr = 0; load_data = 0;
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      load_we = 1; load_addr = 16'(i); load_data = 18'($urandom); model[i] = load_data;
    end
    @(negedge clk) load_we = 0;
    @(posedge clk); #1;
    checks++;
    if (inst !== 18'h0) begin failures++; $display("FAIL inst not nop in reset"); end
    @(negedge clk) rst = 0;
    repeat (3000) begin
      logic [15:0] a;
      a = 16'($urandom);
      @(negedge clk) addr = a;
      @(posedge clk); #1;
      checks++;
      if (inst !== model[a % DEPTH]) begin
        failures++; $display("FAIL addr %h inst %h exp %h", a, inst, model[a % DEPTH]);
      end
    end
    // the word must not appear before the clock edge
    @(negedge clk) addr = 16'd5;
    @(posedge clk); #1;
    @(negedge clk) addr = 16'd6;
    #1;
    checks++;
    if (inst !== model[5]) begin failures++; $display("FAIL read not registered"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
