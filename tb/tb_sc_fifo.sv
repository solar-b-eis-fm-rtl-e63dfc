// tb_sc_fifo: self-checking test of the 4k x 9 FIFO at its full depth.
// Fills it to full (checking the full flag and that an extra write is dropped),
// drains it comparing every word with a queue model, then runs random
// simultaneous reads and writes, and checks the reset.
module tb_sc_fifo;
  localparam int DEPTH = 4096;
  logic clk = 0, rst = 1, wr = 0, rd = 0;
  logic [8:0] d = '0, q;
  logic ff, ef;
  int checks = 0, failures = 0;
  logic [8:0] model[$];
  logic [8:0] exp_q;

  sc_fifo #(.DEPTH(DEPTH), .WIDTH(9)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input logic cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  // one clock: optional write and read; model updated, read data checked
  task automatic step(input logic w, input logic r, input logic [8:0] wd);
    logic did_r;
    did_r = r && model.size() != 0;
    if (did_r) exp_q = model[0];
    wr <= w; rd <= r; d <= wd;
    @(posedge clk);
    if (did_r) void'(model.pop_front());
    if (w && model.size() < DEPTH) model.push_back(wd);
    wr <= 0; rd <= 0;
    #1;
    if (did_r) check(q == exp_q, $sformatf("read %h expected %h", q, exp_q));
    check(ef == (model.size() == 0), "empty flag");
    check(ff == (model.size() == DEPTH), "full flag");
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    @(posedge clk); #1;
    check(ef && !ff, "empty after reset");
    for (int i = 0; i < DEPTH; i++) step(1, 0, 9'(i * 7 + 3));
    check(ff, "full after DEPTH writes");
    step(1, 0, 9'h1AA);                       // dropped
    for (int i = 0; i < DEPTH; i++) step(0, 1, '0);
    check(ef, "empty after draining");
    step(0, 1, '0);                           // read while empty: ignored
    for (int i = 0; i < 3000; i++) step($urandom_range(0, 1) == 1, $urandom_range(0, 2) == 0, 9'($urandom));
    for (int i = 0; i < 2000; i++) step($urandom_range(0, 2) == 0, $urandom_range(0, 1) == 1, 9'($urandom));
    rst <= 1; @(posedge clk); rst <= 0; model.delete(); #1;
    check(ef && !ff, "empty after FIFO reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
