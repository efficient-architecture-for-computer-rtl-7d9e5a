// tb_fig3_program: runs the published example program on the uP16 processor.
//
// The program is the instruction sequence shown with the processor's
// reference waveform:
//   0 18'h10801 lwi r1, 1        4 18'h00000 nop
//   1 18'h11002 lwi r2, 2        5 18'h02B05 mov r5, r3
//   2 18'h118FF lwi r3, -1       6 18'h02101 add r4, r1
//   3 18'h120A3 lwi r4, 16'hFFA3 7 18'h1A805 beq r5, r0, 5
// with every other word a halt (beq r0, r0, -1). The nop at address 4 keeps
// lwi r3 three instructions ahead of mov r5, r3, as the pipeline requires.
// The beq, however, follows mov r5 by only two instructions, so it still
// compares the old R5 (0) with R0, is taken, and lands on the halt at 13.
// The testbench checks, clock by clock, the fetched instruction and its address, and the ALU result and
// status word of each instruction two clocks after it is fetched:
//   alu_result 0001 0002 FFFF FFA3 0000 FFFF FFA4 0000
//   Status     02   02   04   04   01   04   04   01
// and the final register contents. It also checks IF_currPC = 16'hFFFF with
// a nop instruction while reset is held, and Status = 0 right after reset.
module tb_fig3_program;
  import up16_pkg::*;

  localparam inst_t HALT = {4'(OP_BEQ), 3'd0, 3'd0, 8'hFF};
  localparam int N = 8;
  localparam inst_t PROG [N] = '{18'h10801, 18'h11002, 18'h118FF, 18'h120A3,
                                 18'h00000, 18'h02B05, 18'h02101, 18'h1A805};
  localparam word_t EXP_RES  [N] = '{16'h0001, 16'h0002, 16'hFFFF, 16'hFFA3,
                                     16'h0000, 16'hFFFF, 16'hFFA4, 16'h0000};
  localparam logic [7:0] EXP_ST [N] = '{8'h02, 8'h02, 8'h04, 8'h04, 8'h01, 8'h04, 8'h04, 8'h01};

  logic  Clk = 0, Rst = 1;
  logic  load_we = 0;
  word_t load_addr = 0;
  inst_t load_data = 0;
  word_t currpc, alu_result;
  inst_t inst_out;
  logic [7:0] status;
  int checks = 0, failures = 0;

  up16_cpu dut (
    .Clk(Clk), .Rst(Rst),
    .imem_load_we(load_we), .imem_load_addr(load_addr), .imem_load_data(load_data),
    .IF_currPC(currpc), .IF_ID_Inst_out(inst_out), .Status(status), .alu_result(alu_result));

  always #20 Clk = ~Clk;

  task automatic expect_eq(string what, longint got, longint exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s = %h, expected %h", what, got, exp);
    end
  endtask

  initial begin
    repeat (5000) @(posedge Clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 1024; a++) begin
      @(negedge Clk);
      load_we = 1; load_addr = word_t'(a);
      load_data = (a < N) ? PROG[a] : HALT;
    end
    @(negedge Clk) load_we = 0;
    @(posedge Clk); #1;
    expect_eq("currPC in reset", currpc, 16'hFFFF);
    expect_eq("Inst_out in reset", inst_out, 18'h0);
    expect_eq("Status in reset", status, 8'h00);
    @(negedge Clk) Rst = 0;
    // clock k (k = 1, 2, ...) fetches address k-1; its ALU result and status
    // are visible after clock k+2
    for (int k = 1; k <= N + 2; k++) begin
      @(posedge Clk); #1;
      if (k <= N) begin
        expect_eq($sformatf("currPC at clock %0d", k), currpc, word_t'(k - 1));
        expect_eq($sformatf("Inst_out at clock %0d", k), inst_out, PROG[k - 1]);
      end
      if (k >= 3) begin
        expect_eq($sformatf("alu_result of instruction %0d", k - 3), alu_result, EXP_RES[k - 3]);
        expect_eq($sformatf("Status of instruction %0d", k - 3), status, EXP_ST[k - 3]);
      end
    end
    repeat (6) @(posedge Clk);
    #1;
    expect_eq("halt reached", currpc, 16'd13);
    expect_eq("R1", dut.u_id.u_rf.regs[1], 16'h0001);
    expect_eq("R2", dut.u_id.u_rf.regs[2], 16'h0002);
    expect_eq("R3", dut.u_id.u_rf.regs[3], 16'hFFFF);
    expect_eq("R4", dut.u_id.u_rf.regs[4], 16'hFFA4);
    expect_eq("R5", dut.u_id.u_rf.regs[5], 16'hFFFF);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
