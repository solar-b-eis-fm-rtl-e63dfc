// tb_sc_time: self-checking test of the space-craft time counter. Checks the
// count rate (one count per TICK_DIV clocks), the tick pulse, loading a value
// (including a carry out of the low bits and the wrap at 2^32) and that a read
// captures the count of that clock.
module tb_sc_time;
  localparam int DIV = 20;
  logic clk = 0, rst = 1, load = 0, rd = 0, tick;
  logic [31:0] wdata = '0, rdata;
  int checks = 0, failures = 0, n_tick = 0;

  sc_time #(.TICK_DIV(DIV)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) if (!rst && tick) n_tick++;

  task automatic check(input logic cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask
  task automatic rtime(output logic [31:0] v);
    rd <= 1; @(posedge clk); rd <= 0; #1; v = rdata;
  endtask

  initial begin
    logic [31:0] v0, v1;
    repeat (3) @(posedge clk);
    rst <= 0;
    rtime(v0);
    repeat (DIV * 100 - 1) @(posedge clk);
    rtime(v1);
    check(v1 - v0 == 100, $sformatf("100 counts in %0d clocks: got %0d", DIV * 100, v1 - v0));
    check(n_tick >= 100 && n_tick <= 101, "tick pulses");
    load <= 1; wdata <= 32'h0000_FFFF; @(posedge clk); load <= 0;
    repeat (DIV) @(posedge clk);
    rtime(v0);
    check(v0 == 32'h0001_0000, $sformatf("carry after load: %h", v0));
    load <= 1; wdata <= 32'hFFFF_FFFF; @(posedge clk); load <= 0;
    repeat (DIV) @(posedge clk);
    rtime(v0);
    check(v0 == 32'h0, $sformatf("wrap at 2^32: %h", v0));
    for (int i = 0; i < 20; i++) begin
      logic [31:0] w;
      w = $urandom;
      load <= 1; wdata <= w; @(posedge clk); load <= 0;
      repeat ($urandom_range(0, DIV - 2)) @(posedge clk);
      rtime(v0);
      check(v0 == w, $sformatf("read back %h expected %h", v0, w));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
