// tb_cmd_if: self-checking test of the command-interface receiver.
// Sends command packets on an asynchronous three-wire link (link half period
// 37 ns against a 10 ns system clock), and checks every byte written to the
// FIFOs (with its first-byte flag), the write latency after the last rising
// link-clock edge, the packet-done, overflow and broken-byte flags, and clr.
module tb_cmd_if;
  logic clk = 0, rst = 1;
  logic cmd_clk = 0, cmd_ena = 0, cmd_dat = 0;
  logic fifo_wr;
  logic [8:0] fifo_d;
  logic [2:0] fifo_ff = '0;
  logic clr = 0, active, pkt_done, ovf, frag;
  int checks = 0, failures = 0;
  logic [8:0] exp_q[$];
  int n_wr = 0;
  realtime last_rise;

  cmd_if dut (.*);

  always #5 clk = ~clk;

  task automatic check(input logic cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  always @(posedge clk) if (fifo_wr) begin
    n_wr++;
    checks++;
    if (exp_q.size() == 0) begin failures++; $display("FAIL: unexpected write %h", fifo_d); end
    else begin
      logic [8:0] e;
      e = exp_q.pop_front();
      if (fifo_d !== e) begin failures++; $display("FAIL: wrote %h expected %h", fifo_d, e); end
    end
    // written within 2..4 system clocks of the last link-clock rising edge
    check(($realtime - last_rise) <= 45.0 && ($realtime - last_rise) >= 15.0,
          $sformatf("write latency %0t", $realtime - last_rise));
  end

  task automatic send_bits(input logic [7:0] b, input int nbits);
    for (int i = 7; i > 7 - nbits; i--) begin
      cmd_dat = b[i];
      #37 cmd_clk = 1; last_rise = $realtime;
      #37 cmd_clk = 0;
    end
  endtask

  task automatic send_packet(input int n);
    cmd_ena = 1;
    #37;
    for (int k = 0; k < n; k++) begin
      logic [7:0] b = 8'($urandom);
      exp_q.push_back({k == 0, b});
      send_bits(b, 8);
    end
    #37 cmd_ena = 0;
    #200;
  endtask

  initial begin
    repeat (4) @(posedge clk);
    rst <= 0;
    repeat (4) @(posedge clk);
    for (int p = 0; p < 6; p++) begin
      send_packet($urandom_range(1, 12));
      check(pkt_done, "pkt_done after packet");
      check(!ovf && !frag, "no error flags");
    end
    check(exp_q.size() == 0, "all bytes written");
    @(posedge clk) clr <= 1; @(posedge clk) clr <= 0; @(posedge clk); #1;
    check(!pkt_done, "clr clears pkt_done");
    // overflow: a FIFO reports full
    fifo_ff = 3'b010;
    send_packet(2);
    check(ovf, "overflow flagged when a FIFO is full");
    fifo_ff = '0;
    // broken byte: enable falls after 5 bits
    cmd_ena = 1; #37;
    send_bits(8'hA5, 5);
    #37 cmd_ena = 0; #200;
    check(frag, "broken byte flagged");
    send_packet(3);
    check(exp_q.size() == 0, "receiver recovers after a broken byte");
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
