// tb_reg_file: self-checking test of the 8 x 16 register file.
// Random writes and reads on both ports are compared with an array model.
// Also checks that R0 reads 0 after a write to it, that a register written
// in the current cycle reads as the new value, and that reset clears all.
module tb_reg_file;
  logic        clk = 0, rst;
  logic [2:0]  ra1, ra2, wa;
  logic [15:0] rd1, rd2, wd;
  logic        we;
  logic [15:0] model [8];
  int checks = 0, failures = 0, bypass_seen = 0;

  reg_file dut (.clk(clk), .rst(rst), .ra1(ra1), .rd1(rd1), .ra2(ra2), .rd2(rd2),
                .we(we), .wa(wa), .wd(wd));

  always #5 clk = ~clk;

  function automatic logic [15:0] expect_rd(logic [2:0] ra);
    if (ra == 0) return 16'h0;
    if (we && wa == ra) return wd;
    return model[ra];
  endfunction

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; we = 0; wa = 0; wd = 0; ra1 = 0; ra2 = 0;
    @(posedge clk); @(posedge clk);
    #1 rst = 0;
    foreach (model[i]) model[i] = 16'h0;
    for (int i = 0; i < 8; i++) begin
      ra1 = 3'(i); #1;
      checks++;
      if (rd1 !== 16'h0) begin failures++; $display("FAIL reset R%0d=%h", i, rd1); end
    end
    repeat (2000) begin
      we  = ($urandom_range(0, 3) != 0);
      wa  = 3'($urandom);
      wd  = 16'($urandom);
      ra1 = ($urandom_range(0, 3) == 0) ? wa : 3'($urandom);
      ra2 = 3'($urandom);
      #1;
      checks += 2;
      if (we && wa == ra1 && ra1 != 0) bypass_seen++;
      if (rd1 !== expect_rd(ra1)) begin failures++; $display("FAIL rd1 R%0d=%h exp %h", ra1, rd1, expect_rd(ra1)); end
      if (rd2 !== expect_rd(ra2)) begin failures++; $display("FAIL rd2 R%0d=%h exp %h", ra2, rd2, expect_rd(ra2)); end
      @(posedge clk);
      if (we && wa != 0) model[wa] = wd;
      #1;
    end
    checks++;
    if (bypass_seen == 0) begin failures++; $display("FAIL same-cycle read never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
