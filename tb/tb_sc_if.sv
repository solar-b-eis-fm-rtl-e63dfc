// tb_sc_if: self-checking test of the space-craft interface FPGA with its six
// FIFOs (64 deep here). Through the processor register port it: receives a
// command packet from an MDP model and reads the three FIFO copies back
// (checking that all three agree and carry the bytes and the first-byte flag);
// checks the CMD status bits; writes a status packet, issues GO and decodes the
// ST link; writes a mission-data sub-packet, issues GO and decodes the MD link,
// with the interrupt; and resets a FIFO through its control register.
module tb_sc_if;
  import icu_pkg::*;
  localparam int D = 64;
  logic clk = 0, rst = 1;
  logic [7:0] pmd_in = '0, pmd_out;
  logic pmrd = 0, pmwr = 0, pulse_en = 1, cmd_ctl = 0, st_ctl = 0, md_ctl = 0, reg_sel = 0;
  logic cmd_rst, cmd_wr, cmd_rd, st_rst, st_wr, st_rd, md_rst, md_wr, md_rd;
  logic [2:0] cmd_ff, cmd_ef;
  logic [8:0] cmd_fifo;
  logic [8:0] cq [3];
  logic st_ff, st_ef;
  logic [8:0] sq;
  logic [1:0] md_ff, md_ef;
  logic [8:0] mq [2];
  logic [15:0] md_wdata = '0;
  logic cmd_clk = 0, cmd_ena = 0, cmd_dat = 0;
  logic st_clk, st_ena, st_dat, md_clk, md_ena, md_dat, md_bsy = 0, md_irq;
  int checks = 0, failures = 0, n_irq = 0;

  sc_if dut (.*, .st_fifo(sq[7:0]), .md_fifo({mq[1][7:0], mq[0][7:0]}));

  for (genvar i = 0; i < 3; i++) begin : g_c
    sc_fifo #(.DEPTH(D), .WIDTH(9)) f (.clk, .rst(cmd_rst), .wr(cmd_wr), .d(cmd_fifo),
      .rd(cmd_rd), .q(cq[i]), .ff(cmd_ff[i]), .ef(cmd_ef[i]));
  end
  sc_fifo #(.DEPTH(D), .WIDTH(9)) f_st (.clk, .rst(st_rst), .wr(st_wr), .d({1'b0, pmd_in}),
    .rd(st_rd), .q(sq), .ff(st_ff), .ef(st_ef));
  for (genvar i = 0; i < 2; i++) begin : g_m
    sc_fifo #(.DEPTH(D), .WIDTH(9)) f (.clk, .rst(md_rst), .wr(md_wr), .d({1'b0, md_wdata[8*i +: 8]}),
      .rd(md_rd), .q(mq[i]), .ff(md_ff[i]), .ef(md_ef[i]));
  end

  always #25 clk = ~clk;
  always @(posedge clk) if (!rst && md_irq) n_irq++;

  task automatic check(input logic cond, input string msg);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL: %s", msg); end
  endtask

  // processor access: which = 0 CMD, 1 ST, 2 MD
  task automatic acc(input int which, input logic r, input logic w, input logic rs,
                     input logic [7:0] din, output logic [7:0] dout);
    @(posedge clk);
    cmd_ctl <= (which == 0); st_ctl <= (which == 1); md_ctl <= (which == 2);
    pmrd <= r; pmwr <= w; reg_sel <= rs; pmd_in <= din;
    @(posedge clk);
    cmd_ctl <= 0; st_ctl <= 0; md_ctl <= 0; pmrd <= 0; pmwr <= 0; reg_sel <= 0;
    #1 dout = pmd_out;
  endtask

  // link decoder shared by ST and MD
  logic [7:0]  st_rx[$];
  logic [15:0] md_rx[$];
  logic [7:0]  st_sh; int st_nb = 0;
  logic [15:0] md_sh; int md_nb = 0;
  always @(posedge st_clk) if (st_ena) begin
    st_sh = {st_sh[6:0], st_dat}; st_nb++;
    if (st_nb == 8) begin st_rx.push_back(st_sh); st_nb = 0; end
  end
  always @(posedge md_clk) if (md_ena) begin
    md_sh = {md_sh[14:0], md_dat}; md_nb++;
    if (md_nb == 16) begin md_rx.push_back(md_sh); md_nb = 0; end
  end

  initial begin
    logic [7:0] v, pkt[$];
    #1 rst = 1;
    repeat (3) @(posedge clk);
    rst <= 0;
    repeat (3) @(posedge clk);
    // ---- command packet from the MDP
    cmd_ena = 1; #100;
    for (int k = 0; k < 10; k++) begin
      logic [7:0] b;
      b = 8'($urandom);
      pkt.push_back(b);
      for (int i = 7; i >= 0; i--) begin
        cmd_dat = b[i]; #100 cmd_clk = 1; #100 cmd_clk = 0;
      end
    end
    #100 cmd_ena = 0;
    repeat (10) @(posedge clk);
    acc(0, 1, 0, 1, 8'h00, v);
    check(v[3] && !v[0] && !v[4], $sformatf("CMD status %b: packet received, not empty", v));
    for (int k = 0; k < 10; k++) begin
      acc(0, 1, 0, 0, 8'h00, v);        // data-port read strobes all three FIFOs
      check(cq[0] == cq[1] && cq[1] == cq[2], "three FIFO copies agree");
      check(cq[0] == {k == 0, pkt[k]}, $sformatf("command byte %0d: %h expected %h", k, cq[0], {k == 0, pkt[k]}));
    end
    acc(0, 1, 0, 1, 8'h00, v);
    check(v[0], "CMD FIFOs empty after reading");
    acc(0, 0, 1, 1, 8'h04, v);          // clear flags
    acc(0, 1, 0, 1, 8'h00, v);
    check(!v[3], "CMD flags cleared");
    // ---- status packet
    pkt.delete();
    for (int k = 0; k < 12; k++) begin
      pkt.push_back(8'($urandom));
      acc(1, 0, 1, 0, pkt[k], v);
    end
    acc(1, 1, 0, 1, 8'h00, v);
    check(!v[0] && !v[2], "ST FIFO loaded, idle");
    acc(1, 0, 1, 1, 8'h01, v);          // GO
    acc(1, 1, 0, 1, 8'h00, v);
    check(v[2], "ST busy after GO");
    repeat (12 * 40) @(posedge clk);
    acc(1, 1, 0, 1, 8'h00, v);
    check(v[3] && !v[2] && v[0], $sformatf("ST status %b: sent, idle, empty", v));
    check(st_rx.size() == 12, $sformatf("%0d status bytes on the link", st_rx.size()));
    for (int k = 0; k < 12 && k < st_rx.size(); k++) check(st_rx[k] == pkt[k], "status byte");
    // ---- mission data sub-packet
    begin
      logic [15:0] words[$];
      for (int k = 0; k < 20; k++) begin
        words.push_back(16'($urandom));
        md_wdata <= words[k];
        acc(2, 0, 1, 0, 8'h00, v);
      end
      acc(2, 0, 1, 1, 8'h01, v);        // GO
      repeat (20 * 72) @(posedge clk);
      acc(2, 1, 0, 1, 8'h00, v);
      check(v[3] && !v[2], "MD sub-packet sent");
      check(n_irq == 1, "MD interrupt");
      check(md_rx.size() == 20, $sformatf("%0d mission-data words on the link", md_rx.size()));
      for (int k = 0; k < 20 && k < md_rx.size(); k++) check(md_rx[k] == words[k], "mission-data word");
    end
    // ---- FIFO reset through the control register
    acc(1, 0, 1, 0, 8'h55, v);
    acc(1, 1, 0, 1, 8'h00, v);
    check(!v[0], "ST FIFO not empty");
    acc(1, 0, 1, 1, 8'h02, v);
    acc(1, 1, 0, 1, 8'h00, v);
    check(v[0], "ST FIFO emptied by the reset bit");
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
