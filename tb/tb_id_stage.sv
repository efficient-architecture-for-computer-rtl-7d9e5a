// tb_id_stage: self-checking test of the decode stage.
// Random instructions are decoded while the write-back port writes random
// registers. A register model in the testbench gives the expected operands
// (including the value written in the same cycle), and an instruction-level
// reference gives the branch decision and target. The ID/EX outputs are
// checked one clock later; IF_PC_Select and IF_Alt_PC_out in the same cycle.
module tb_id_stage;
  import up16_pkg::*;
  logic     Clk = 0, Rst;
  inst_t    inst;
  word_t    pcplus1, wb_data;
  regaddr_t wb_rd;
  logic     wb_we;
  aluop_e   aluop;
  word_t    ex_pc1, ex_rd1, ex_rd2, ex_imm, alt_pc;
  regaddr_t ex_rdest;
  logic     ex_men, ex_mwr, ex_m2r, ex_rfw, ex_s1, ex_s2, ex_spc, pc_sel;
  word_t    regs [8];
  int checks = 0, failures = 0, taken = 0, not_taken = 0;

  id_stage dut (.Clk(Clk), .Rst(Rst), .ID_Inst_in(inst), .ID_PCplus1(pcplus1),
    .WB_RDest_rd(wb_rd), .WB_WriteData(wb_data), .WB_RFWrite_Enab(wb_we),
    .EX_ALUOp(aluop), .EX_PCplus1(ex_pc1), .EX_RDest_rd(ex_rdest), .EX_ReadData1(ex_rd1),
    .EX_ReadData2(ex_rd2), .EX_SignE_8immed(ex_imm), .EX_MemEnab(ex_men), .EX_MemWrite(ex_mwr),
    .EX_Mem2Reg(ex_m2r), .EX_RFileWrite(ex_rfw), .EX_Sel_ALUSrc1(ex_s1), .EX_Sel_ALUSrc2(ex_s2),
    .EX_Sel_ALU_PC1(ex_spc), .IF_Alt_PC_out(alt_pc), .IF_PC_Select(pc_sel));

  always #5 Clk = ~Clk;

  function automatic word_t rval(regaddr_t r);
    if (r == 0) return 16'h0;
    if (wb_we && wb_rd == r) return wb_data;
    return regs[r];
  endfunction

  initial begin
    repeat (20000) @(posedge Clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    Rst = 1; inst = 0; pcplus1 = 0; wb_we = 0; wb_rd = 0; wb_data = 0;
    foreach (regs[i]) regs[i] = 0;
    repeat (2) @(posedge Clk);
    @(negedge Clk) Rst = 0;
    repeat (4000) begin
      logic [3:0] op;
      word_t a, b, e_target, e_imm;
      logic  e_sel, e_wr;
      regaddr_t rd, rs;
      @(negedge Clk);
      op = 4'($urandom_range(0, 10));
      rd = 3'($urandom); rs = 3'($urandom);
      inst = {op, rd, rs, 8'($urandom)};
      if ($urandom_range(0, 1)) inst[10:8] = inst[13:11];      // equal operands now and then
      rd = inst[13:11]; rs = inst[10:8];
      pcplus1 = 16'($urandom);
      wb_we = $urandom_range(0, 1); wb_rd = 3'($urandom); wb_data = 16'($urandom);
      if ($urandom_range(0, 3) == 0) wb_rd = rs;
      #1;
      a = rval(rd); b = rval(rs);
      e_imm = {{8{inst[7]}}, inst[7:0]};
      case (op)
        4'd1: begin e_sel = 1; e_target = b; end
        4'd6: begin e_sel = (a == b); e_target = pcplus1 + e_imm; end
        4'd7: begin e_sel = (a != b); e_target = pcplus1 + e_imm; end
        4'd8: begin e_sel = ($signed(a) < $signed(b)); e_target = pcplus1 + e_imm; end
        4'd9: begin e_sel = ($signed(a) > $signed(b)); e_target = pcplus1 + e_imm; end
        default: begin e_sel = 0; e_target = alt_pc; end
      endcase
      e_wr = (rd != 0) && (op == 4'd1 || op == 4'd2 || op == 4'd4 || op == 4'd5 ||
                           (op == 4'd0 && inst[7:0] >= 8'd1 && inst[7:0] <= 8'd11));
      checks++;
      if (pc_sel !== e_sel || (e_sel && alt_pc !== e_target)) begin
        failures++; $display("FAIL branch inst=%h sel=%b alt=%h exp %b %h", inst, pc_sel, alt_pc, e_sel, e_target);
      end
      if (op >= 6 && op <= 9) begin if (e_sel) taken++; else not_taken++; end
      @(posedge Clk); #1;
      if (wb_we && wb_rd != 0) regs[wb_rd] = wb_data;
      checks++;
      if (ex_rd1 !== a || ex_rd2 !== b || ex_imm !== e_imm || ex_pc1 !== pcplus1 ||
          ex_rdest !== rd || ex_rfw !== e_wr || ex_men !== (op == 4'd2 || op == 4'd3) ||
          ex_mwr !== (op == 4'd3) || ex_m2r !== (op == 4'd2) || ex_spc !== (op == 4'd1)) begin
        failures++;
        $display("FAIL ID/EX inst=%h rd1=%h rd2=%h imm=%h exp %h %h %h", inst, ex_rd1, ex_rd2, ex_imm, a, b, e_imm);
      end
    end
    checks++;
    if (taken == 0 || not_taken == 0) begin failures++; $display("FAIL branch outcomes not both seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
