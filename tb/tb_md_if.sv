// tb_md_if: self-checking test of the mission-data transmitter with a 16-bit
// FIFO in front of it. Sends sub-packets, decodes the link and compares the
// words; holds md_bsy high before GO and between words and checks that no word
// starts once it has been high for longer than the start-up of a word; checks the interrupt pulse with PULSE_EN high and its
// absence with PULSE_EN low, and the per-word time of 32*HALF + 4 clocks.
module tb_md_if;
  localparam int HALF = 2;
  logic clk = 0, rst = 1, go = 0, pulse_en = 1, md_bsy = 0;
  logic fifo_rd, fifo_ef, ff, wr = 0;
  logic [15:0] q, d = '0;
  logic md_clk, md_ena, md_dat, busy, done, irq;
  int checks = 0, failures = 0;
  logic [15:0] sent[$];
  logic [15:0] rx[$];
  logic [15:0] sh;
  int nb = 0, n_irq = 0, bsy_violations = 0;
  longint cyc = 0, t_go, t_done;

  sc_fifo #(.DEPTH(4096), .WIDTH(16)) u_fifo (.clk, .rst, .wr, .d, .rd(fifo_rd), .q, .ff, .ef(fifo_ef));
  md_if #(.HALF(HALF)) dut (.*, .fifo_q(q));

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  task automatic check(input logic cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  always @(posedge md_clk) if (md_ena) begin
    if (nb == 0 && bsy_run > HALF + 2) bsy_violations++;
    sh = {sh[14:0], md_dat};
    nb++;
    if (nb == 16) begin rx.push_back(sh); nb = 0; end
  end
  int bsy_run = 0;   // clocks md_bsy has been high
  always @(posedge clk) bsy_run <= md_bsy ? bsy_run + 1 : 0;
  always @(posedge clk) if (irq && !rst) n_irq++;
  always @(posedge clk) if (done && !rst) t_done = cyc;

  task automatic send(input int n, input bit with_bsy);
    int irq0;
    sent.delete(); rx.delete(); nb = 0; irq0 = n_irq;
    for (int i = 0; i < n; i++) begin
      logic [15:0] w;
      w = 16'($urandom);
      sent.push_back(w);
      wr <= 1; d <= w; @(posedge clk);
    end
    wr <= 0;
    if (with_bsy) md_bsy <= 1;
    @(posedge clk);
    go <= 1; @(posedge clk); go <= 0; t_go = cyc;
    if (with_bsy) begin
      repeat (50) @(posedge clk);
      check(!md_clk && md_ena && rx.size() == 0, "no data while MDP busy");
      md_bsy <= 0;
      fork
        begin // toggle busy now and then during the sub-packet
          repeat (n) begin
            repeat ($urandom_range(10, 60)) @(posedge clk);
            md_bsy <= 1; repeat ($urandom_range(1, 30)) @(posedge clk); md_bsy <= 0;
          end
        end
      join_none
    end
    while (!done) @(posedge clk);
    disable fork;
    md_bsy <= 0;
    @(posedge clk); #1;
    check(rx.size() == n, $sformatf("%0d words received, %0d sent", rx.size(), n));
    for (int i = 0; i < n && i < rx.size(); i++)
      check(rx[i] == sent[i], $sformatf("word %0d: %h expected %h", i, rx[i], sent[i]));
    check(n_irq == irq0 + (pulse_en ? 1 : 0), "interrupt follows PULSE_EN");
    check(!md_ena && !busy, "link idle after sub-packet");
    if (!with_bsy)
      check((t_done - t_go) >= n * (32 * HALF + 4) && (t_done - t_go) <= n * (32 * HALF + 4) + 4,
            $sformatf("sub-packet of %0d words took %0d clocks", n, t_done - t_go));
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    @(posedge clk);
    send(1, 0);
    send(33, 0);
    pulse_en = 0;
    send(5, 0);
    pulse_en = 1;
    send(20, 1);
    send(2048, 0);               // a full 4 kbyte sub-packet
    check(bsy_violations == 0, "no word started while md_bsy high");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
