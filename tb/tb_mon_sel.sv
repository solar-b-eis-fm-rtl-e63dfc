// tb_mon_sel: self-checking test of the monitor multiplexer select register.
// Checks channel 0 after reset, every channel written and read back, the
// out-of-range flag, and the settle pulse SETTLE_CLKS clocks after a write.
module tb_mon_sel;
  localparam int N_CH = 16, SETTLE = 20;
  logic clk = 0, rst = 1, wr = 0, rd = 0;
  logic [7:0] wdata = '0, rdata;
  logic [3:0] sel;
  logic bad, settle;
  int checks = 0, failures = 0;
  longint cyc = 0, t_wr, t_settle;

  mon_sel #(.N_CH(N_CH), .SETTLE_CLKS(SETTLE)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;
  always @(posedge clk) if (!rst && settle) t_settle = cyc;

  task automatic check(input logic cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst <= 0;
    @(posedge clk); #1;
    check(sel == 0 && !bad, "channel 0 after reset");
    for (int c = 0; c < N_CH + 4; c++) begin
      wr <= 1; wdata <= 8'(c); @(posedge clk); wr <= 0; t_wr = cyc; #1;
      check(sel == 4'(c), $sformatf("select %0d expected %0d", sel, c));
      check(bad == (c >= N_CH), "out-of-range flag");
      repeat (SETTLE + 3) @(posedge clk);
      // the pulse rises at the SETTLE-th edge after the write and is seen at the next
      check(t_settle - t_wr >= SETTLE + 1 && t_settle - t_wr <= SETTLE + 2, $sformatf("settle after %0d clocks", t_settle - t_wr));
      rd <= 1; @(posedge clk); rd <= 0; #1;
      check(rdata == 8'({bad, sel}), "read back");
    end
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
