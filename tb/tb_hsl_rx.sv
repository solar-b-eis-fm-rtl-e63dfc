// tb_hsl_rx: self-checking test of one high-speed CCD link receiver. A camera
// model sends bursts of 16-bit words msb first at 16 MHz (data changed on the
// falling clock edge, enable high for the burst, clock stopped outside it)
// against the 20 MHz system clock. Checks every received word, the word rate
// (one word per 1 us at 16 MHz), the end-of-exposure pulse after the enable has
// been low for EOE_CLKS clocks, and that short gaps do not signal it.
module tb_hsl_rx;
  localparam int EOE = 40;
  logic clk = 0, rst = 0;
  logic hsl_clk = 0, hsl_ena = 1, hsl_dat = 0;
  logic [15:0] word;
  logic valid, active, eoe;
  int checks = 0, failures = 0, n_eoe = 0, n_words = 0;
  logic [15:0] exp_q[$];
  realtime t_first, t_last;

  hsl_rx #(.EOE_CLKS(EOE)) dut (.*);

  always #25 clk = ~clk;            // 20 MHz

  task automatic check(input logic cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  always @(posedge clk) if (!rst && eoe) n_eoe++;
  always @(posedge clk) if (!rst && valid) begin
    logic [15:0] e;
    if (n_words == 0) t_first = $realtime;
    t_last = $realtime;
    n_words++;
    e = exp_q.size() ? exp_q.pop_front() : 16'hxxxx;
    check(word == e, $sformatf("word %h expected %h", word, e));
  end

  // 16 MHz: 31.25 ns half period; data changes on the falling edge
  task automatic burst(input int n);
    hsl_ena = 1;
    #20;
    for (int i = 0; i < n; i++) begin
      logic [15:0] w;
      w = 16'($urandom);
      exp_q.push_back(w);
      for (int b = 15; b >= 0; b--) begin
        hsl_dat = w[b];
        #31.25 hsl_clk = 1;
        #31.25 hsl_clk = 0;
      end
    end
    #20 hsl_ena = 0;
  endtask

  initial begin
    // reset pulse with edges, so the asynchronously cleared link logic starts cleared
    #1 rst = 1; hsl_ena = 0;
    repeat (4) @(posedge clk);
    rst <= 0;
    repeat (4) @(posedge clk);
    burst(50);
    #300;                                 // 6 clocks: no end of exposure yet
    check(n_eoe == 0, "short gap is not an end of exposure");
    burst(30);
    repeat (EOE + 10) @(posedge clk);
    check(n_eoe == 1, "end of exposure after a long gap");
    check(n_words == 80 && exp_q.size() == 0, $sformatf("%0d words received", n_words));
    n_words = 0;
    burst(100);
    repeat (EOE + 10) @(posedge clk);
    check(n_eoe == 2, "second end of exposure");
    check(t_last - t_first > 98.5 * 1000 && t_last - t_first < 99.5 * 1000,
          $sformatf("100 words span %0t ns", t_last - t_first));
    repeat (3 * EOE) @(posedge clk);
    check(n_eoe == 2, "no end of exposure without new data");
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
