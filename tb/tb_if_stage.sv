// tb_if_stage: self-checking test of the fetch stage.
// Loads a random program, then checks after reset that IF_currPC reads
// 16'hFFFF with a nop instruction, that fetching starts at address 0 and
// advances by one per clock with IF_Inst_out = program[IF_currPC] and
// IF_PCplus1 = IF_currPC + 1, and that a select from decode redirects the
// very next fetch to the given target.
module tb_if_stage;
  import up16_pkg::*;
  localparam int DEPTH = 1024;
  logic  Clk = 0, Rst;
  word_t alt_pc, currpc, pcplus1, load_addr;
  logic  sel, load_we;
  inst_t inst, load_data;
  inst_t prog [DEPTH];
  int checks = 0, failures = 0, redirects = 0;

  if_stage dut (.Clk(Clk), .Rst(Rst), .ID_Alt_PC_in(alt_pc), .ID_PC_Select(sel),
                .IF_currPC(currpc), .IF_Inst_out(inst), .IF_PCplus1(pcplus1),
                .imem_load_we(load_we), .imem_load_addr(load_addr), .imem_load_data(load_data));

  always #5 Clk = ~Clk;

  task automatic expect_state(word_t pc);
    checks++;
    if (currpc !== pc || inst !== prog[pc % DEPTH] || pcplus1 !== pc + 16'd1) begin
      failures++;
      $display("FAIL currPC=%h inst=%h pc1=%h expected pc %h inst %h", currpc, inst, pcplus1, pc, prog[pc % DEPTH]);
    end
  endtask

  initial begin
    repeat (20000) @(posedge Clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    word_t pc;
    Rst = 1; sel = 0; alt_pc = 0; load_we = 0; load_addr = 0; load_data = 0;
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge Clk);
      load_we = 1; load_addr = 16'(i); load_data = 18'($urandom); prog[i] = load_data;
    end
    @(negedge Clk) load_we = 0;
    @(posedge Clk); #1;
    checks++;
    if (currpc !== 16'hFFFF || inst !== 18'h0) begin failures++; $display("FAIL reset state %h %h", currpc, inst); end
    pc = 16'hFFFF;
    for (int n = 0; n < 3000; n++) begin
      @(negedge Clk);
      Rst = 0;
      sel = (n >= 20) && ($urandom_range(0, 4) == 0);   // straight-line fetch first
      alt_pc = 16'($urandom);
      @(posedge Clk); #1;
      if (sel) begin pc = alt_pc; redirects++; end
      else pc = pc + 16'd1;
      expect_state(pc);
    end
    checks++;
    if (redirects == 0) begin failures++; $display("FAIL no redirect exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
