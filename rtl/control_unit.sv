// control_unit: instruction decoder of the uP16 decode stage.
//
// Turns one 18-bit instruction into the control bundle up16_pkg::ctrl_t.
// Read port 1 of the register file reads R[rd], read port 2 reads R[rs]; the
// two operand selects then pick what the ALU sees:
//   instruction        ALU a    ALU b    ALU op  other
//   R-type  rd, rs     R[rd]    R[rs]    func    write R[rd]
//   jlr/jr  rd, rs     -        -        nop     write PC+1 to R[rd]; jump
//   lw   rd, rs, imm   R[rs]    imm      add     load, write R[rd]
//   sw   rd, rs, imm   R[rd]    imm      add     store R[rs]
//   lwi  rd, imm       -        imm      mov     write R[rd]
//   addi rd, rs, imm   R[rs]    imm      add     write R[rd]
//   beq/bne/blt/bgt    -        -        nop     compare R[rd], R[rs]
// A write to R0 is dropped, so jr is jlr with rd = R0. Undefined opcodes and
// R-type functions above 11 decode as nop.
//
// Combinational. The signal set (ALUOp, MemEnab, MemWrite, Mem2Reg,
// RFileWrite, Sel_ALUSrc1, Sel_ALUSrc2, Sel_ALU_PC1) is the published one;
// what each select chooses and the numeric encodings are this design's.
module control_unit
  import up16_pkg::*;
(
  input  inst_t inst,
  output ctrl_t ctrl
);

  logic [3:0] opc;
  logic [7:0] func;
  logic       rd_nz;

  assign opc   = f_opcode(inst);
  assign func  = f_imm8(inst);
  assign rd_nz = (f_rd(inst) != '0);

  always_comb begin
    ctrl = '{alu_op: ALU_NOP, br_kind: BR_NONE, default: 1'b0};
    case (opc)
      OP_RTYPE: begin
        if (func != 8'd0 && func <= 8'(FUNC_LAST)) begin
          ctrl.alu_op      = aluop_e'(func[3:0]);
          ctrl.rfile_write = rd_nz;
        end
      end
      OP_JLR: begin
        ctrl.sel_alu_pc1 = 1'b1;
        ctrl.rfile_write = rd_nz;
        ctrl.br_kind     = BR_JLR;
      end
      OP_LW: begin
        ctrl.alu_op       = ALU_ADD;
        ctrl.sel_alu_src1 = 1'b1;
        ctrl.sel_alu_src2 = 1'b1;
        ctrl.mem_enab     = 1'b1;
        ctrl.mem2reg      = 1'b1;
        ctrl.rfile_write  = rd_nz;
      end
      OP_SW: begin
        ctrl.alu_op       = ALU_ADD;
        ctrl.sel_alu_src2 = 1'b1;
        ctrl.mem_enab     = 1'b1;
        ctrl.mem_write    = 1'b1;
      end
      OP_LWI: begin
        ctrl.alu_op       = ALU_MOV;
        ctrl.sel_alu_src2 = 1'b1;
        ctrl.rfile_write  = rd_nz;
      end
      OP_ADDI: begin
        ctrl.alu_op       = ALU_ADD;
        ctrl.sel_alu_src1 = 1'b1;
        ctrl.sel_alu_src2 = 1'b1;
        ctrl.rfile_write  = rd_nz;
      end
      OP_BEQ: ctrl.br_kind = BR_EQ;
      OP_BNE: ctrl.br_kind = BR_NE;
      OP_BLT: ctrl.br_kind = BR_LT;
      OP_BGT: ctrl.br_kind = BR_GT;
      default: ;
    endcase
  end

endmodule
