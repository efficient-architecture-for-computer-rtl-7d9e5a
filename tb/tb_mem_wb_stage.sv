// tb_mem_wb_stage: self-checking test of the memory and write-back stages.
// Each cycle a random store, load or no memory access is issued as the
// execute stage would, together with the memory-stage fields of the
// instruction issued the cycle before. The testbench's memory model gives the
// expected load data; the WB_* outputs are checked one clock later with the
// priority load data, then PC+1, then ALU result.
module tb_mem_wb_stage;
  import up16_pkg::*;
  localparam int DEPTH = 1024;
  logic     Clk = 0, Rst;
  word_t    addr, wdata, m_res, m_pc1, wb_data;
  logic     men, mwr, m_rfw, m_spc, m_m2r, wb_we;
  regaddr_t m_rd, wb_rd;
  word_t    model [DEPTH];
  logic     valid [DEPTH];
  int checks = 0, failures = 0, loads = 0, stores = 0;

  mem_wb_stage dut (.Clk(Clk), .Rst(Rst), .EX_ALUResult_mem(addr), .EX_ReadData2(wdata),
    .EX_MemEnab(men), .EX_MemWrite(mwr), .Mem_ALUResult(m_res), .Mem_PCplus1(m_pc1),
    .Mem_RFDest(m_rd), .Mem_RFileWrite_in(m_rfw), .Mem_Sel_ALU_PC1(m_spc), .WB_Mem2Reg(m_m2r),
    .WB_RFDest_out(wb_rd), .WB_WriteData(wb_data), .WB_RFileWrite_out(wb_we));

  always #5 Clk = ~Clk;

  initial begin
    repeat (20000) @(posedge Clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic     prev_load;
    word_t    prev_data;
    Rst = 1; {addr, wdata, m_res, m_pc1} = '0; {men, mwr, m_rfw, m_spc, m_m2r} = '0; m_rd = 0;
    foreach (valid[i]) valid[i] = 0;
    repeat (2) @(posedge Clk);
    @(negedge Clk) Rst = 0;
    // fill a small window of memory first so loads hit written words
    for (int i = 0; i < 64; i++) begin
      @(negedge Clk);
      men = 1; mwr = 1; addr = 16'(i); wdata = 16'($urandom);
      @(posedge Clk); model[i] = wdata; valid[i] = 1;
    end
    @(negedge Clk) begin men = 0; mwr = 0; end
    @(posedge Clk);
    prev_load = 0; prev_data = 0;
    repeat (3000) begin
      int k;
      word_t e;
      logic  this_load;
      word_t this_data;
      @(negedge Clk);
      // memory-stage fields belong to the instruction issued last cycle
      m_m2r = prev_load;
      m_spc = !prev_load && $urandom_range(0, 1);
      m_res = 16'($urandom); m_pc1 = 16'($urandom); m_rd = 3'($urandom); m_rfw = $urandom_range(0, 1);
      e = prev_load ? prev_data : (m_spc ? m_pc1 : m_res);
      k = $urandom_range(0, 2);
      addr = 16'($urandom_range(0, 63)); wdata = 16'($urandom);
      men = (k != 0); mwr = (k == 1);
      this_load = (k == 2);
      this_data = model[addr % DEPTH];
      @(posedge Clk);
      if (k == 1) begin model[addr % DEPTH] = wdata; stores++; end
      if (k == 2) loads++;
      #1;
      checks++;
      if (wb_data !== e || wb_rd !== m_rd || wb_we !== m_rfw) begin
        failures++; $display("FAIL wb %h/%0d/%b exp %h/%0d/%b", wb_data, wb_rd, wb_we, e, m_rd, m_rfw);
      end
      prev_load = this_load; prev_data = this_data;
    end
    checks++;
    if (loads == 0 || stores == 0) begin failures++; $display("FAIL no loads or stores"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
