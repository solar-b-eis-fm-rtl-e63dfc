// tb_power_latch: self-checking test of the power-switching latch. Checks the
// all-off reset state, that a write changes all outputs at once and holds them,
// that a read returns the latched value one clock later, and that reads return
// zero when not strobed.
module tb_power_latch;
  logic clk = 0, rst = 1, wr = 0, rd = 0;
  logic [7:0] wdata = '0, rdata, sw;
  int checks = 0, failures = 0;

  power_latch dut (.*);

  always #5 clk = ~clk;

  task automatic check(input logic cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    logic [7:0] v;
    repeat (2) @(posedge clk);
    rst <= 0;
    @(posedge clk); #1;
    check(sw == 8'h00, "all switches off after reset");
    for (int i = 0; i < 50; i++) begin
      v = 8'($urandom);
      wr <= 1; wdata <= v; @(posedge clk); wr <= 0; wdata <= 8'($urandom); #1;
      check(sw == v, $sformatf("outputs %h expected %h", sw, v));
      repeat ($urandom_range(1, 4)) @(posedge clk); #1;
      check(sw == v, "outputs held");
      rd <= 1; @(posedge clk); rd <= 0; #1;
      check(rdata == v, "read back");
      @(posedge clk); #1;
      check(rdata == 8'h00, "read data idle");
    end
    rst <= 1; @(posedge clk); rst <= 0; #1;
    check(sw == 8'h00, "reset turns all off");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
