// tb_up16_cpu: end-to-end test of the uP16 processor at its default sizes.
//
// An instruction-level reference model in this testbench executes each
// program one instruction at a time, with no notion of pipeline stages. The
// processor runs the same program from reset until it reaches the halt
// instruction (beq r0, r0, -1, a branch to itself). Then the testbench checks:
//   - all eight registers and every data word the program stored,
//   - the cycle count: the k-th executed instruction must be fetched at the
//     k-th clock after reset, i.e. one instruction per clock and no cycles
//     lost on taken branches or jumps,
//   - the pipeline fill: the first instruction's result reaches the register
//     file at the fifth clock edge, not earlier.
// Programs: one written out here that exercises a counted loop with a
// backward branch, a call through jlr and a return through jr, loads and
// stores (a load right after a store to the same word), every branch kind
// taken and not taken, skipped instructions and a write to R0; then random
// programs that use every instruction except jlr, generated against the
// reference model so that no register is read right after being written
// by either of the two instructions before it (the spacing the pipeline requires, as it has no interlocks).
// Each mechanism is counted from the processor's internal signals and a
// failure is counted for any that never occurs.
module tb_up16_cpu;
  import up16_pkg::*;

  localparam int IMEM = 1024;
  localparam int DMEM = 1024;
  localparam int N_RANDOM = 24;
  localparam inst_t HALT = {4'(OP_BEQ), 3'd0, 3'd0, 8'hFF};

  logic  Clk = 0, Rst = 1;
  logic  load_we = 0;
  word_t load_addr = 0;
  inst_t load_data = 0;
  word_t currpc, alu_result;
  inst_t inst_out;
  logic [7:0] status;

  up16_cpu dut (
    .Clk(Clk), .Rst(Rst),
    .imem_load_we(load_we), .imem_load_addr(load_addr), .imem_load_data(load_data),
    .IF_currPC(currpc), .IF_ID_Inst_out(inst_out), .Status(status), .alu_result(alu_result));

  always #5 Clk = ~Clk;

  int checks = 0, failures = 0;
  longint cycles = 0;
  always @(posedge Clk) cycles++;

  // ---------------- reference model ----------------
  inst_t prog [IMEM];
  word_t g_reg [8];
  word_t g_mem [DMEM];
  bit    g_valid [DMEM];
  int    g_pc, g_dyn;
  int    recent [2];          // destinations of the last two instructions (-1: none)
  bit    hazard_err;
  word_t g_first_val;

  function automatic bit readable(int r);
    return r == 0 || (recent[0] != r && recent[1] != r);
  endfunction

  function automatic void g_reset();
    foreach (g_reg[i]) g_reg[i] = 0;
    foreach (g_valid[i]) g_valid[i] = 0;
    g_pc = 0; g_dyn = 0; hazard_err = 0;
    recent = '{-1, -1};
  endfunction

  // Executes the instruction at g_pc. Returns 1 if it was the halt.
  function automatic bit g_step();
    inst_t i = prog[g_pc % IMEM];
    int op = i[17:14], rd = i[13:11], rs = i[10:8], fn = i[7:0];
    word_t a = g_reg[rd], b = g_reg[rs];
    word_t imm = {{8{i[7]}}, i[7:0]};
    int dest = -1;
    word_t val = 0;
    int next = g_pc + 1;
    bit reads_rd = 0, reads_rs = 0;
    g_dyn++;
    if (i == HALT) return 1;
    case (op)
      0: begin
        reads_rd = (fn >= 1 && fn <= 11 && fn != 5 && fn != 11);
        reads_rs = (fn >= 1 && fn <= 11);
        case (fn)
          1, 3: val = a + b;
          2, 4: val = a - b;
          5:  val = b;
          6:  val = a & b;
          7:  val = a | b;
          8:  val = ~(a & b);
          9:  val = ~(a | b);
          10: val = a ^ b;
          11: val = ~b;
          default: ;
        endcase
        if (fn >= 1 && fn <= 11) dest = rd;
      end
      1: begin reads_rs = 1; val = word_t'(g_pc + 1); dest = rd; next = b; end
      2: begin reads_rs = 1; val = g_mem[(b + imm) % DMEM]; dest = rd;
               if (!g_valid[(b + imm) % DMEM]) hazard_err = 1; end
      3: begin reads_rd = 1; reads_rs = 1; g_mem[(a + imm) % DMEM] = b; g_valid[(a + imm) % DMEM] = 1; end
      4: begin val = imm; dest = rd; end
      5: begin reads_rs = 1; val = b + imm; dest = rd; end
      6, 7, 8, 9: begin
        bit t;
        reads_rd = 1; reads_rs = 1;
        t = (op == 6) ? (a == b) : (op == 7) ? (a != b) :
            (op == 8) ? ($signed(a) < $signed(b)) : ($signed(a) > $signed(b));
        if (t) next = g_pc + 1 + int'($signed(imm));
      end
      default: ;
    endcase
    if ((reads_rd && !readable(rd)) || (reads_rs && !readable(rs))) hazard_err = 1;
    if (dest == 0) dest = -1;
    if (dest > 0) g_reg[dest] = val;
    recent[1] = recent[0]; recent[0] = dest;
    g_pc = next & 16'hFFFF;
    return 0;
  endfunction

  // ---------------- mechanism counters ----------------
  int n_taken, n_not_taken, n_jump, n_load, n_store, n_wthrough, n_r0_write, n_b2b, n_backward;
  logic prev_wb;
  inst_t di;
  always @(negedge Clk) if (!Rst) begin
    di = dut.u_id.ID_Inst_in;
    if (dut.u_id.ctrl.br_kind inside {BR_EQ, BR_NE, BR_LT, BR_GT} && di != HALT) begin
      if (dut.u_id.IF_PC_Select) n_taken++; else n_not_taken++;
      if (dut.u_id.IF_PC_Select && di[7]) n_backward++;
    end
    if (dut.u_id.ctrl.br_kind == BR_JLR) n_jump++;
    if (dut.u_mem.EX_MemEnab && !dut.u_mem.EX_MemWrite) n_load++;
    if (dut.u_mem.EX_MemEnab && dut.u_mem.EX_MemWrite) n_store++;
    if (dut.u_id.WB_RFWrite_Enab && dut.u_id.WB_RDest_rd != 0 &&
        (dut.u_id.WB_RDest_rd == di[13:11] || dut.u_id.WB_RDest_rd == di[10:8])) n_wthrough++;
    if (di[13:11] == 0 && di[17:14] inside {4'(OP_LWI), 4'(OP_ADDI), 4'(OP_LW)}) n_r0_write++;
    if (prev_wb && dut.u_id.WB_RFWrite_Enab) n_b2b++;
    prev_wb = dut.u_id.WB_RFWrite_Enab;
  end

  // ---------------- run one program ----------------
  task automatic load_program();
    Rst = 1;
    for (int a = 0; a < IMEM; a++) begin
      @(negedge Clk);
      load_we = 1; load_addr = word_t'(a); load_data = prog[a];
    end
    @(negedge Clk) load_we = 0;
    @(posedge Clk);
  endtask

  task automatic run_and_check(string name, bit check_fill);
    int halt_pc;
    longint c0, fetch_cycle;
    int same;
    // reference
    g_reset();
    while (!g_step()) if (g_dyn > 20000) break;
    halt_pc = g_pc;
    checks++;
    if (hazard_err) begin failures++; $display("FAIL %s: program breaks the spacing rule", name); end
    // processor
    load_program();
    @(negedge Clk) Rst = 0;
    c0 = cycles;
    if (check_fill) begin
      repeat (4) @(posedge Clk);
      #1 checks++;
      if (dut.u_id.u_rf.regs[2] !== 16'h0) begin failures++; $display("FAIL %s: result before 5th edge", name); end
      @(posedge Clk); #1 checks++;
      if (dut.u_id.u_rf.regs[2] !== g_first_val) begin failures++; $display("FAIL %s: no result at 5th edge", name); end
    end
    fetch_cycle = -1; same = 0;
    while (same < 8 && cycles - c0 < 40000) begin
      @(posedge Clk); #1;
      if (currpc == word_t'(halt_pc)) begin
        if (fetch_cycle < 0) fetch_cycle = cycles - c0;
        same++;
      end
    end
    checks++;
    if (fetch_cycle != g_dyn) begin
      failures++; $display("FAIL %s: halt fetched at clock %0d, expected %0d", name, fetch_cycle, g_dyn);
    end
    for (int r = 0; r < 8; r++) begin
      checks++;
      if (dut.u_id.u_rf.regs[r] !== g_reg[r]) begin
        failures++; $display("FAIL %s: R%0d=%h expected %h", name, r, dut.u_id.u_rf.regs[r], g_reg[r]);
      end
    end
    for (int a = 0; a < DMEM; a++) if (g_valid[a]) begin
      checks++;
      if (dut.u_mem.u_dmem.mem[a] !== g_mem[a]) begin
        failures++; $display("FAIL %s: mem[%0d]=%h expected %h", name, a, dut.u_mem.u_dmem.mem[a], g_mem[a]);
      end
    end
    $display("%s: %0d instructions executed in %0d clocks", name, g_dyn, fetch_cycle);
  endtask

  // ---------------- programs ----------------
  function automatic void fill_junk();
    for (int a = 0; a < IMEM; a++) prog[a] = {4'($urandom_range(0, 5)), 3'($urandom), 3'($urandom), 8'($urandom)};
  endfunction

  function automatic void directed_program();
    fill_junk();
    prog[0]  = enc_i(OP_LWI, 2, 0, 8'd4);          // limit
    prog[1]  = enc_i(OP_LWI, 1, 0, 8'd0);          // counter
    prog[2]  = enc_i(OP_LWI, 3, 0, 8'd10);         // store pointer
    prog[3]  = enc_i(OP_LWI, 6, 0, 8'd40);         // subroutine address
    prog[4]  = '0;
    prog[5]  = enc_i(OP_ADDI, 1, 1, 8'd1);         // loop: r1++
    prog[6]  = enc_i(OP_ADDI, 3, 3, 8'd1);         // r3++
    prog[7]  = '0;
    prog[8]  = '0;
    prog[9]  = enc_i(OP_SW, 3, 1, 8'd0);           // mem[r3] = r1
    prog[10] = enc_i(OP_BLT, 1, 2, 8'hFA);         // r1 < r2: back to 5
    prog[11] = enc_i(OP_JLR, 7, 6, 8'd0);          // call 40, r7 = 12
    prog[12] = enc_i(OP_LW, 4, 3, 8'hFF);          // r4 = mem[r3-1] = 3
    prog[13] = enc_i(OP_LW, 5, 0, 8'd11);          // r5 = mem[11] = 1
    prog[14] = enc_i(OP_LWI, 0, 0, 8'd55);         // write to R0: no effect
    prog[15] = '0;
    prog[16] = enc_r(ALU_SUB, 4, 5);               // r4 = 2
    prog[17] = enc_i(OP_BNE, 0, 0, 8'd5);          // not taken
    prog[18] = enc_i(OP_BNE, 0, 0, 8'd5);          // not taken
    prog[19] = enc_i(OP_BGT, 5, 4, 8'd5);          // 1 > 2: not taken
    prog[20] = enc_i(OP_BEQ, 4, 4, 8'd2);          // taken to 23
    prog[21] = enc_i(OP_LWI, 6, 0, 8'd99);         // skipped
    prog[22] = enc_i(OP_LWI, 6, 0, 8'd98);         // skipped
    prog[23] = enc_i(OP_BGT, 4, 5, 8'd1);          // taken to 25
    prog[24] = enc_i(OP_LWI, 6, 0, 8'd97);         // skipped
    prog[25] = enc_i(OP_SW, 0, 4, 8'd20);          // mem[20] = 2
    prog[26] = enc_i(OP_LW, 1, 0, 8'd20);          // r1 = 2, load right after store
    prog[27] = enc_i(OP_BNE, 4, 5, 8'd2);          // taken to 30
    prog[28] = enc_i(OP_LWI, 6, 0, 8'd96);         // skipped
    prog[29] = enc_i(OP_LWI, 6, 0, 8'd95);         // skipped
    prog[30] = enc_i(OP_BEQ, 4, 5, 8'd1);          // not taken
    prog[31] = enc_i(OP_BLT, 5, 4, 8'd1);          // 1 < 2 taken to 33
    prog[32] = enc_i(OP_LWI, 6, 0, 8'd94);         // skipped
    prog[33] = HALT;
    prog[40] = enc_i(OP_LWI, 5, 0, 8'hFF);         // subroutine: r5 = -1
    prog[41] = '0;
    prog[42] = '0;
    prog[43] = '0;
    prog[44] = enc_i(OP_JLR, 0, 7, 8'd0);          // jr r7
  endfunction

  // Random program generated along the path the reference model takes.
  function automatic void random_program(int n);
    int pc = 0;
    fill_junk();
    g_reset();
    while (g_dyn < n && pc < IMEM - 10) begin
      int kind = $urandom_range(0, 9);
      int rd, rs;
      int ok[$];
      for (int r = 0; r < 8; r++) if (readable(r)) ok.push_back(r);
      rd = ok[$urandom_range(0, ok.size() - 1)];
      rs = ok[$urandom_range(0, ok.size() - 1)];
      case (kind)
        0, 1, 2: prog[pc] = enc_r(aluop_e'($urandom_range(1, 11)), 3'(rd), 3'(rs));
        3: prog[pc] = enc_i(OP_LWI, 3'($urandom), 0, 8'($urandom));
        4: prog[pc] = enc_i(OP_ADDI, 3'($urandom), 3'(rs), 8'($urandom));
        5: prog[pc] = enc_i(OP_SW, ($urandom_range(0, 1) ? 3'(0) : 3'(rd)), 3'(rs), 8'($urandom));
        6: begin
          logic [7:0] im = 8'($urandom);
          if (g_valid[{{8{im[7]}}, im} % DMEM]) prog[pc] = enc_i(OP_LW, 3'($urandom), 0, im);
          else prog[pc] = enc_i(OP_SW, 0, 3'(rs), im);
        end
        7, 8: prog[pc] = enc_i(opcode_e'($urandom_range(6, 9)), 3'(rd), 3'(rs), 8'($urandom_range(0, 4)));
        default: prog[pc] = '0;
      endcase
      if (g_step()) break;
      pc = g_pc;
    end
    prog[pc] = HALT;
  endfunction

  initial begin
    repeat (2000000) @(posedge Clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    {n_taken, n_not_taken, n_jump, n_load, n_store, n_wthrough, n_r0_write, n_b2b, n_backward} = '0;
    prev_wb = 0;
    directed_program();
    g_first_val = 16'd4;
    run_and_check("directed", 1);
    for (int k = 0; k < N_RANDOM; k++) begin
      random_program(300 + 20 * k);
      run_and_check($sformatf("random%0d", k), 0);
    end
    $display("mechanisms: taken=%0d not_taken=%0d backward=%0d jump=%0d load=%0d store=%0d write_through=%0d r0_write=%0d back_to_back_wb=%0d",
             n_taken, n_not_taken, n_backward, n_jump, n_load, n_store, n_wthrough, n_r0_write, n_b2b);
    if (n_taken == 0)     begin failures++; $display("FAIL no taken branch"); end
    if (n_not_taken == 0) begin failures++; $display("FAIL no untaken branch"); end
    if (n_backward == 0)  begin failures++; $display("FAIL no backward branch"); end
    if (n_jump == 0)      begin failures++; $display("FAIL no jump"); end
    if (n_load == 0)      begin failures++; $display("FAIL no load"); end
    if (n_store == 0)     begin failures++; $display("FAIL no store"); end
    if (n_wthrough == 0)  begin failures++; $display("FAIL no same-cycle write-back read"); end
    if (n_r0_write == 0)  begin failures++; $display("FAIL no write to R0"); end
    if (n_b2b == 0)       begin failures++; $display("FAIL no back-to-back write-backs"); end
    checks += 9;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
