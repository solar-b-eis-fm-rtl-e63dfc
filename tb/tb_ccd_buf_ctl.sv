// tb_ccd_buf_ctl: self-checking test of the CCD buffer / high-speed-link
// controller with two small buffer pages (1024 words, four ranges of 256).
// Two camera models send exposures on both links at once, with words of all four
// IDs. After each exposure the test swaps the pages and reads, through the DSP
// port, the word counts and every word of every range, comparing them with what
// was sent per ID. It checks that while the links fill one page the DSP's page
// keeps the previous exposure, the end-of-exposure flags and interrupt, and the
// overflow flag when one range receives more words than it holds.
module tb_ccd_buf_ctl;
  localparam int PAGE = 1024, RANGE = PAGE / 4, EOE = 40;
  logic clk = 0, rst = 0;
  logic [1:0] hsl_clk = '0, hsl_ena = '1, hsl_dat = '0;
  logic dsp_cs = 0, dsp_we = 0;
  logic [9:0] dsp_addr = '0;
  logic [15:0] dsp_wdata = '0, dsp_rdata;
  logic reg_wr = 0, reg_rd = 0;
  logic [2:0] reg_addr = '0;
  logic [15:0] reg_wdata = '0;
  logic [31:0] reg_rdata;
  logic eoe_irq;
  logic [1:0] pg_cs, pg_we;
  logic [9:0] pg_addr [2];
  logic [15:0] pg_d [2];
  logic [15:0] pg_q [2];
  int checks = 0, failures = 0, n_irq = 0;
  logic [15:0] sent [4][$];

  ccd_buf_ctl #(.PAGE_DEPTH(PAGE), .EOE_CLKS(EOE)) dut (.*);
  for (genvar p = 0; p < 2; p++) begin : g_pg
    sram #(.DEPTH(PAGE), .WIDTH(16)) u_pg (.clk, .cs(pg_cs[p]), .we(pg_we[p]),
      .addr(pg_addr[p]), .d(pg_d[p]), .q(pg_q[p]));
  end

  always #25 clk = ~clk;               // 20 MHz
  always @(posedge clk) if (!rst && eoe_irq) n_irq++;

  task automatic check(input logic cond, input string msg);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL: %s", msg); end
  endtask

  // camera: n words on link l, IDs drawn from the mask
  task automatic camera(input int l, input int n, input logic [3:0] idmask);
    hsl_ena[l] = 1;
    #20;
    for (int i = 0; i < n; i++) begin
      logic [15:0] w;
      logic [1:0]  id;
      do id = 2'($urandom); while (!idmask[id]);
      w = {id, 14'($urandom)};
      sent[id].push_back(w);
      for (int b = 15; b >= 0; b--) begin
        hsl_dat[l] = w[b];
        #31.25 hsl_clk[l] = 1;
        #31.25 hsl_clk[l] = 0;
      end
    end
    #20 hsl_ena[l] = 0;
  endtask

  task automatic rreg(input logic [2:0] a, output logic [31:0] v);
    @(posedge clk); reg_rd <= 1; reg_addr <= a;
    @(posedge clk); reg_rd <= 0; #1; v = reg_rdata;
  endtask
  task automatic wreg(input logic [15:0] v);
    @(posedge clk); reg_wr <= 1; reg_addr <= 3'd0; reg_wdata <= v;
    @(posedge clk); reg_wr <= 0;
  endtask
  task automatic rdsp(input logic [9:0] a, output logic [15:0] v);
    @(posedge clk); dsp_cs <= 1; dsp_we <= 0; dsp_addr <= a;
    @(posedge clk); dsp_cs <= 0; #1; v = dsp_rdata;
  endtask

  // swap pages and check the DSP's new page against what was sent
  task automatic swap_and_check(input string tag);
    logic [31:0] v;
    logic [15:0] w;
    wreg(16'h0001);
    for (int id = 0; id < 4; id++) begin
      rreg(3'(4 + id), v);
      check(int'(v) == sent[id].size(), $sformatf("%s: range %0d count %0d expected %0d", tag, id, v, sent[id].size()));
      for (int i = 0; i < sent[id].size(); i++) begin
        rdsp(10'(id * RANGE + i), w);
        check(w == sent[id][i], $sformatf("%s: range %0d word %0d: %h expected %h", tag, id, i, w, sent[id][i]));
      end
    end
  endtask

  initial begin
    logic [31:0] v;
    logic [15:0] keep, w;
    #1 rst = 1; hsl_ena = '0;
    repeat (4) @(posedge clk);
    rst <= 0;
    repeat (4) @(posedge clk);
    rreg(3'd0, v);
    check(v[0] == 1'b0, "links start on page 0");
    // exposure 1: both links at once
    fork
      camera(0, 120, 4'b0011);
      camera(1, 110, 4'b1110);
    join
    repeat (EOE + 10) @(posedge clk);
    rreg(3'd0, v);
    check(v[2:1] == 2'b11, "end of exposure seen on both links");
    check(n_irq >= 1, "end-of-exposure interrupt");
    check(v[3] == 1'b0, "no overflow");
    swap_and_check("exposure 1");
    rreg(3'd0, v);
    check(v[0] == 1'b1, "links on page 1 after swap");
    // exposure 2 into page 1 while the DSP reads page 0
    rdsp(10'd0, keep);
    for (int id = 0; id < 4; id++) sent[id].delete();
    fork
      camera(0, 60, 4'b1111);
      camera(1, 60, 4'b1111);
    join
    repeat (EOE + 10) @(posedge clk);
    rdsp(10'd0, w);
    check(w == keep, "DSP page untouched by the links");
    swap_and_check("exposure 2");
    // overflow: 300 words into range 2, which holds 256
    for (int id = 0; id < 4; id++) sent[id].delete();
    wreg(16'h0002);
    camera(0, RANGE + 44, 4'b0100);
    repeat (EOE + 10) @(posedge clk);
    rreg(3'd0, v);
    check(v[3] == 1'b1, "overflow flagged when a range is full");
    wreg(16'h0001);
    rreg(3'd6, v);
    check(int'(v) == RANGE, $sformatf("full range count %0d", v));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
