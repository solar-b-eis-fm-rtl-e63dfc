// tb_st_if: self-checking test of the status-interface transmitter with a real
// FIFO in front of it. Writes packets into the FIFO, issues GO, decodes the
// link (sampling st_dat on each rising st_clk while st_ena is high) and compares
// the bytes; checks that st_ena frames exactly the packet, that GO with an
// empty FIFO does nothing, that done pulses once, and the per-byte timing of
// 16*HALF + 3 clocks.
module tb_st_if;
  localparam int HALF = 2;
  logic clk = 0, rst = 1, go = 0;
  logic fifo_rd, fifo_ef, ff, wr = 0;
  logic [8:0] q, d = '0;
  logic st_clk, st_ena, st_dat, busy, done;
  int checks = 0, failures = 0;
  logic [7:0] sent[$];
  logic [7:0] rx[$];
  logic [7:0] sh;
  int nb = 0, n_done = 0;
  longint cyc = 0, t_go, t_done;

  sc_fifo #(.DEPTH(64), .WIDTH(9)) u_fifo (.clk, .rst, .wr, .d, .rd(fifo_rd), .q, .ff, .ef(fifo_ef));
  st_if #(.HALF(HALF)) dut (.clk, .rst, .go, .fifo_rd, .fifo_q(q[7:0]), .fifo_ef,
                            .st_clk, .st_ena, .st_dat, .busy, .done);

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  task automatic check(input logic cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // link decoder
  always @(posedge st_clk) if (st_ena) begin
    sh = {sh[6:0], st_dat};
    nb++;
    if (nb == 8) begin rx.push_back(sh); nb = 0; end
  end
  always @(posedge clk) if (done && !rst) begin n_done++; t_done = cyc; end

  task automatic send(input int n);
    sent.delete(); rx.delete(); nb = 0;
    for (int i = 0; i < n; i++) begin
      logic [7:0] b = 8'($urandom);
      sent.push_back(b);
      wr <= 1; d <= {1'b0, b}; @(posedge clk);
    end
    wr <= 0;
    @(posedge clk);
    go <= 1; @(posedge clk); go <= 0; t_go = cyc;
    while (!done) @(posedge clk);
    @(posedge clk); #1;
    check(rx.size() == n, $sformatf("%0d bytes received, %0d sent", rx.size(), n));
    for (int i = 0; i < n && i < rx.size(); i++)
      check(rx[i] == sent[i], $sformatf("byte %0d: %h expected %h", i, rx[i], sent[i]));
    check(!st_ena && !busy, "link idle after packet");
    // each byte: 16*HALF shift clocks + 3 fetch/load/hand-over clocks, plus fixed overhead
    check((t_done - t_go) >= n * (16 * HALF + 3) && (t_done - t_go) <= n * (16 * HALF + 3) + 4,
          $sformatf("packet of %0d bytes took %0d clocks", n, t_done - t_go));
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    @(posedge clk);
    // GO with empty FIFO: nothing happens
    go <= 1; @(posedge clk); go <= 0;
    repeat (5) @(posedge clk);
    check(!st_ena && !busy && n_done == 0, "GO on empty FIFO ignored");
    send(1);
    send(7);
    send(40);
    check(n_done == 3, "one done pulse per packet");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
