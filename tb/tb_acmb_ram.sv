// tb_acmb_ram: self-checking test of the memory array.
//
// Writes pseudo-random words to pseudo-random addresses of a small array,
// keeps a reference copy in the testbench, and reads every written location
// back, checking data and the one-clock read latency. A read-during-idle
// (en=0) must leave rdata unchanged.
module tb_acmb_ram;
  localparam int unsigned AB = 8;
  localparam int unsigned W  = 25;

  logic          clk = 1'b0;
  logic          en, we;
  logic [AB-1:0] addr;
  logic [W-1:0]  wdata, rdata;
  int            checks = 0, failures = 0;

  logic [W-1:0]  ref_mem [2**AB];
  bit            written [2**AB];

  acmb_ram #(.ADDR_BITS(AB), .WIDTH(W)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    en = 0; we = 0; addr = '0; wdata = '0;
    foreach (written[i]) written[i] = 0;
    repeat (2) @(posedge clk);
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      en = 1; we = 1;
      addr  = AB'($urandom);
      wdata = W'($urandom);
      ref_mem[addr] = wdata;
      written[addr] = 1;
    end
    @(negedge clk); en = 0; we = 0;
    for (int a = 0; a < 2**AB; a++) begin
      if (!written[a]) continue;
      @(negedge clk);
      en = 1; we = 0; addr = AB'(a);
      @(posedge clk); #1;
      check(rdata == ref_mem[a], $sformatf("read %0h got %0h want %0h", a, rdata, ref_mem[a]));
      @(negedge clk);
      en = 0; addr = AB'(a + 1);
      @(posedge clk); #1;
      check(rdata == ref_mem[a], "rdata held while en=0");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
