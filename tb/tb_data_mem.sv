// tb_data_mem: self-checking test of the data memory.
// Random stores and loads against an array model; checks that load data
// appears one clock after the address, that it holds while en is low, and
// that a store does not change rdata.
module tb_data_mem;
  localparam int DEPTH = 1024;
  logic        clk = 0, en, we;
  logic [15:0] addr, wdata, rdata, last;
  logic [15:0] model [DEPTH];
  int checks = 0, failures = 0;

  data_mem dut (.clk(clk), .en(en), .we(we), .addr(addr), .wdata(wdata), .rdata(rdata));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    en = 0; we = 0; addr = 0; wdata = 0;
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      en = 1; we = 1; addr = 16'(i); wdata = 16'($urandom); model[i] = wdata;
    end
    @(negedge clk) begin en = 1; we = 0; addr = 0; end
    @(posedge clk); #1 last = rdata;
    repeat (4000) begin
      int k;
      k = $urandom_range(0, 2);
      @(negedge clk);
      addr = 16'($urandom); wdata = 16'($urandom);
      en = (k != 0); we = (k == 1);
      @(posedge clk); #1;
      if (k == 1) model[addr % DEPTH] = wdata;
      checks++;
      if (k == 2) begin
        if (rdata !== model[addr % DEPTH]) begin failures++; $display("FAIL load %h got %h exp %h", addr, rdata, model[addr % DEPTH]); end
        last = rdata;
      end else if (rdata !== last) begin
        failures++; $display("FAIL rdata changed without a load");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
