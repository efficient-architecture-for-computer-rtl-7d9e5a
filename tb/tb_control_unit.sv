// tb_control_unit: self-checking test of the instruction decoder.
// Every opcode (and every R-type function) is decoded with random register
// fields and immediates, and the control bundle is compared with a table
// written out here per instruction.
module tb_control_unit;
  import up16_pkg::*;
  inst_t inst;
  ctrl_t ctrl;
  int checks = 0, failures = 0;

  control_unit dut (.inst(inst), .ctrl(ctrl));

  // expected fields: alu_op, mem_enab, mem_write, mem2reg, write, src1, src2, pc1, br
  function automatic ctrl_t expected(inst_t i);
    ctrl_t e;
    logic [3:0] op = i[17:14];
    logic [7:0] fn = i[7:0];
    logic wr = (i[13:11] != 3'd0);
    e = '{alu_op: ALU_NOP, br_kind: BR_NONE, default: 1'b0};
    if (op == 4'd0) begin
      if (fn >= 8'd1 && fn <= 8'd11) begin e.alu_op = aluop_e'(fn[3:0]); e.rfile_write = wr; end
    end
    else if (op == 4'd1) begin e.rfile_write = wr; e.sel_alu_pc1 = 1; e.br_kind = BR_JLR; end
    else if (op == 4'd2) begin e.alu_op = ALU_ADD; e.sel_alu_src1 = 1; e.sel_alu_src2 = 1;
                               e.mem_enab = 1; e.mem2reg = 1; e.rfile_write = wr; end
    else if (op == 4'd3) begin e.alu_op = ALU_ADD; e.sel_alu_src2 = 1; e.mem_enab = 1; e.mem_write = 1; end
    else if (op == 4'd4) begin e.alu_op = ALU_MOV; e.sel_alu_src2 = 1; e.rfile_write = wr; end
    else if (op == 4'd5) begin e.alu_op = ALU_ADD; e.sel_alu_src1 = 1; e.sel_alu_src2 = 1; e.rfile_write = wr; end
    else if (op == 4'd6) e.br_kind = BR_EQ;
    else if (op == 4'd7) e.br_kind = BR_NE;
    else if (op == 4'd8) e.br_kind = BR_LT;
    else if (op == 4'd9) e.br_kind = BR_GT;
    return e;
  endfunction

  task automatic check(inst_t i);
    inst = i;
    #1;
    checks++;
    if (ctrl !== expected(i)) begin
      failures++;
      $display("FAIL inst=%h ctrl=%h expected %h", i, ctrl, expected(i));
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(18'h00000);                         // nop
    check(18'h10801);                         // lwi r1, 1
    check(18'h02B05);                         // mov r5, r3
    check(18'h02101);                         // add r4, r1
    check(18'h1A805);                         // beq r5, r0, 5
    for (int op = 0; op < 16; op++)
      for (int k = 0; k < 40; k++)
        check({4'(op), 3'($urandom), 3'($urandom), 8'($urandom)});
    for (int fn = 0; fn < 256; fn++) begin
      check({4'd0, 3'd3, 3'd4, 8'(fn)});
      check({4'd0, 3'd0, 3'd4, 8'(fn)});
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
