// tb_ex_stage: self-checking test of the execute stage.
// Random operands, immediates, operation codes and operand selects are
// applied. The testbench computes the expected ALU result and status with
// its own arithmetic and checks the unregistered memory-side outputs in the
// same cycle and the registered Mem_* outputs and ALU_Status one clock later.
module tb_ex_stage;
  import up16_pkg::*;
  logic     Clk = 0, Rst;
  aluop_e   op;
  word_t    pc1, rd1, rd2, imm;
  regaddr_t rdest;
  logic     men, mwr, m2r, rfw, s1, s2, spc;
  logic [7:0] status;
  word_t    res_mem, rd2_out, m_res, m_pc1;
  logic     men_o, mwr_o, m_m2r, m_rfw, m_spc;
  regaddr_t m_rd;
  int checks = 0, failures = 0;

  ex_stage dut (.Clk(Clk), .Rst(Rst), .EX_ALUOp(op), .EX_PCplus1(pc1), .EX_RDest_rd(rdest),
    .EX_ReadData1(rd1), .EX_ReadData2(rd2), .EX_SignE_8immed(imm), .EX_MemEnab(men),
    .EX_MemWrite(mwr), .EX_Mem2Reg(m2r), .EX_RFileWrite(rfw), .EX_Sel_ALUSrc1(s1),
    .EX_Sel_ALUSrc2(s2), .EX_Sel_ALU_PC1(spc), .ALU_Status(status), .EX_ALUResult_mem(res_mem),
    .EX_ReadData2_out(rd2_out), .EX_MemEnab_out(men_o), .EX_MemWrite_out(mwr_o),
    .Mem_ALUResult(m_res), .Mem_PCplus1(m_pc1), .Mem_RDest_rd(m_rd), .Mem_Mem2Reg(m_m2r),
    .Mem_RFileWrite(m_rfw), .Mem_Sel_ALU_PC1(m_spc));

  always #5 Clk = ~Clk;

  initial begin
    repeat (20000) @(posedge Clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    Rst = 1; op = ALU_NOP; {pc1, rd1, rd2, imm, rdest} = '0; {men, mwr, m2r, rfw, s1, s2, spc} = '0;
    repeat (2) @(posedge Clk); #1;
    checks++;
    if (status !== 8'h00 || m_res !== 16'h0) begin failures++; $display("FAIL reset"); end
    @(negedge Clk) Rst = 0;
    repeat (4000) begin
      word_t a, b, r;
      logic [7:0] s;
      int sr;
      @(negedge Clk);
      op = aluop_e'($urandom_range(0, 11));
      pc1 = 16'($urandom); rd1 = 16'($urandom); rd2 = 16'($urandom);
      imm = 16'($signed(8'($urandom))); rdest = 3'($urandom);
      {men, mwr, m2r, rfw, s1, s2, spc} = 7'($urandom);
      #1;
      a = s1 ? rd2 : rd1;
      b = s2 ? imm : rd2;
      s = 0;
      case (op)
        ALU_ADD:  begin r = a + b; sr = int'($signed(a)) + int'($signed(b)); s[4] = (sr != int'($signed(r))); end
        ALU_SUB:  begin r = a - b; sr = int'($signed(a)) - int'($signed(b)); s[4] = (sr != int'($signed(r))); end
        ALU_ADDU: begin r = a + b; s[3] = (int'(a) + int'(b)) > 65535; end
        ALU_SUBU: begin r = a - b; s[3] = a < b; end
        ALU_MOV:  r = b;
        ALU_AND:  r = a & b;
        ALU_OR:   r = a | b;
        ALU_NAND: r = ~(a & b);
        ALU_NOR:  r = ~(a | b);
        ALU_XOR:  r = a ^ b;
        ALU_NOT:  r = ~b;
        default:  r = 0;
      endcase
      s[0] = (r == 0); s[1] = (r != 0) && !r[15]; s[2] = r[15];
      checks++;
      if (res_mem !== r || rd2_out !== rd2 || men_o !== men || mwr_o !== mwr) begin
        failures++; $display("FAIL comb op=%0d a=%h b=%h res=%h exp %h", op, a, b, res_mem, r);
      end
      @(posedge Clk); #1;
      checks++;
      if (m_res !== r || status !== s || m_pc1 !== pc1 || m_rd !== rdest || m_m2r !== m2r ||
          m_rfw !== rfw || m_spc !== spc) begin
        failures++; $display("FAIL reg op=%0d res=%h st=%h exp %h %h", op, m_res, status, r, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
