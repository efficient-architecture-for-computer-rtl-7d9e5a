// up16_pkg: shared definitions of the uP16 processor.
//
// The uP16 is a 16-bit RISC processor with separate program and data
// memories and a five-stage pipeline. Instructions are 18 bits wide:
//   [17:14] opcode   [13:11] rd   [10:8] rs   [7:0] function / immed8
// Register-register operations use opcode 0 and pick the operation with the
// function field; all other instructions use the 8-bit field as a signed
// immediate or displacement.
//
// The field layout and the 16/18-bit widths follow the published format.
// The numeric opcodes for lwi (4), beq (6) and the R-type (0) with its
// functions nop (0), add (1) and mov (5) match published instruction words;
// the remaining numbers continue the order of the instruction list and are
// this design's choice. Unused opcodes and functions execute as nop.
package up16_pkg;

  localparam int unsigned DATA_W = 16;   // data path and PC width
  localparam int unsigned INST_W = 18;   // instruction width
  localparam int unsigned NREGS  = 8;    // general-purpose registers
  localparam int unsigned RA_W   = 3;    // register address width
  localparam int unsigned STAT_W = 8;    // ALU status word width

  typedef logic [DATA_W-1:0] word_t;
  typedef logic [INST_W-1:0] inst_t;
  typedef logic [RA_W-1:0]   regaddr_t;

  // Major opcodes, instruction bits [17:14].
  typedef enum logic [3:0] {
    OP_RTYPE = 4'd0,   // ALU operation selected by the function field
    OP_JLR   = 4'd1,   // jlr rd, rs ; jr rs is jlr with rd = R0
    OP_LW    = 4'd2,
    OP_SW    = 4'd3,
    OP_LWI   = 4'd4,
    OP_ADDI  = 4'd5,
    OP_BEQ   = 4'd6,
    OP_BNE   = 4'd7,
    OP_BLT   = 4'd8,
    OP_BGT   = 4'd9
  } opcode_e;

  // ALU operations. For R-type instructions the low four bits of the
  // function field are the ALU operation (function values 12..255 are nop).
  typedef enum logic [3:0] {
    ALU_NOP  = 4'd0,   // result 0
    ALU_ADD  = 4'd1,   // a + b, sets signed overflow
    ALU_SUB  = 4'd2,   // a - b, sets signed overflow
    ALU_ADDU = 4'd3,   // a + b, sets carry
    ALU_SUBU = 4'd4,   // a - b, sets borrow
    ALU_MOV  = 4'd5,   // b
    ALU_AND  = 4'd6,
    ALU_OR   = 4'd7,
    ALU_NAND = 4'd8,
    ALU_NOR  = 4'd9,
    ALU_XOR  = 4'd10,
    ALU_NOT  = 4'd11   // ~b
  } aluop_e;

  localparam int unsigned FUNC_LAST = 11;  // highest defined function code

  // Bit positions in the 8-bit status word.
  localparam int unsigned ST_ZERO = 0;
  localparam int unsigned ST_POS  = 1;
  localparam int unsigned ST_NEG  = 2;
  localparam int unsigned ST_CARRY = 3;
  localparam int unsigned ST_OVF  = 4;

  // Kind of control transfer resolved in decode.
  typedef enum logic [2:0] {
    BR_NONE = 3'd0,
    BR_JLR  = 3'd1,
    BR_EQ   = 3'd2,
    BR_NE   = 3'd3,
    BR_LT   = 3'd4,
    BR_GT   = 3'd5
  } brkind_e;

  // Control signals produced by the decoder; the names follow the
  // pipeline-register signals of the decode stage.
  typedef struct packed {
    aluop_e   alu_op;
    logic     mem_enab;     // data memory access (lw or sw)
    logic     mem_write;    // store
    logic     mem2reg;      // write back load data
    logic     rfile_write;  // write back to R[rd]
    logic     sel_alu_src1; // 0: R[rd], 1: R[rs] as ALU operand a
    logic     sel_alu_src2; // 0: R[rs], 1: sign-extended immed8 as operand b
    logic     sel_alu_pc1;  // write back PC+1 instead of the ALU result
    brkind_e  br_kind;
  } ctrl_t;

  function automatic logic [3:0] f_opcode(inst_t i); return i[17:14]; endfunction
  function automatic regaddr_t   f_rd(inst_t i);     return i[13:11]; endfunction
  function automatic regaddr_t   f_rs(inst_t i);     return i[10:8];  endfunction
  function automatic logic [7:0] f_imm8(inst_t i);   return i[7:0];   endfunction

  function automatic word_t sign_ext8(logic [7:0] v);
    return {{(DATA_W-8){v[7]}}, v};
  endfunction

  // Instruction word builders, used by testbenches to write programs.
  function automatic inst_t enc_r(aluop_e f, regaddr_t rd, regaddr_t rs);
    return {OP_RTYPE, rd, rs, 4'd0, f};
  endfunction
  function automatic inst_t enc_i(opcode_e op, regaddr_t rd, regaddr_t rs, logic [7:0] imm);
    return {op, rd, rs, imm};
  endfunction

endpackage
