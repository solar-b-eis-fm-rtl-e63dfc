// tb_ccd_exposure: one full exposure pair streamed into a full-size CCD buffer.
//
// A CCD buffer page holds two complete CCD images of 2048 x 512 pixels, that is
// 2M 16-bit words, a quarter (512k words) for each of the four CCD read-out
// ports. This test runs ccd_buf_ctl with its default page size and two full-size
// page memories. Both camera links run at 16 MHz at the same time: link 0 carries
// the words of read-out ports 0 and 1 alternately, link 1 those of ports 2 and 3,
// in lines of 2048 words with the enable dropped for 1 us between lines. Each
// link sends 1M words, so every range receives exactly the 512k words it holds.
// The pixel value of the n-th word of port id is
//   pix = (n * 37 + id * 1000 + n / 2048) mod 2^14,
// worked out here independently of the design.
// After the enable has stayed low for longer than the end-of-exposure time, the
// test checks the end-of-exposure flags and interrupt and that no word was lost
// (no overflow). It then swaps the pages and checks the four word counts and
// every one of the 2M words through the DSP port. The whole stream takes about
// 1.05 s of link time, 21M system clocks.
module tb_ccd_exposure;
  localparam int PAGE = 2097152, RANGE = PAGE / 4, LINE = 2048;
  localparam int PER_LINK = PAGE / 2;
  logic clk = 0, rst = 0;
  logic [1:0] hsl_clk = '0, hsl_ena = '1, hsl_dat = '0;
  logic dsp_cs = 0, dsp_we = 0;
  logic [20:0] dsp_addr = '0;
  logic [15:0] dsp_wdata = '0, dsp_rdata;
  logic reg_wr = 0, reg_rd = 0;
  logic [2:0] reg_addr = '0;
  logic [15:0] reg_wdata = '0;
  logic [31:0] reg_rdata;
  logic eoe_irq;
  logic [1:0] pg_cs, pg_we;
  logic [20:0] pg_addr [2];
  logic [15:0] pg_d [2];
  logic [15:0] pg_q [2];
  int checks = 0, failures = 0, n_irq = 0;

  ccd_buf_ctl dut (.*);
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

  function automatic logic [15:0] pixel(input int id, input int n);
    return {2'(id), 14'(n * 37 + id * 1000 + n / LINE)};
  endfunction

  // camera link l: ports 2l and 2l+1 alternately, lines of LINE words
  task automatic camera(input int l);
    int n;
    logic [15:0] w;
    for (int k = 0; k < PER_LINK; k++) begin
      if (k % LINE == 0) begin
        hsl_ena[l] = 1;
        #20;
      end
      n = k / 2;
      w = pixel(2 * l + (k % 2), n);
      for (int b = 15; b >= 0; b--) begin
        hsl_dat[l] = w[b];
        #31.25 hsl_clk[l] = 1;
        #31.25 hsl_clk[l] = 0;
      end
      if (k % LINE == LINE - 1) begin
        #20 hsl_ena[l] = 0;
        #1000;
      end
    end
  endtask

  task automatic rreg(input logic [2:0] a, output logic [31:0] v);
    @(posedge clk); reg_rd <= 1; reg_addr <= a;
    @(posedge clk); reg_rd <= 0; #1; v = reg_rdata;
  endtask

  initial begin
    logic [31:0] v;
    int bad;
    #1 rst = 1; hsl_ena = '0;
    repeat (4) @(posedge clk);
    rst <= 0;
    repeat (4) @(posedge clk);
    fork
      camera(0);
      camera(1);
    join
    repeat (400) @(posedge clk);
    rreg(3'd0, v);
    check(v[2:1] == 2'b11, "end of exposure seen on both links");
    check(v[3] == 1'b0, "no word lost: the exposure pair fits the page");
    check(n_irq >= 1, "end-of-exposure interrupt");
    @(posedge clk); reg_wr <= 1; reg_addr <= 3'd0; reg_wdata <= 16'h0001;
    @(posedge clk); reg_wr <= 0;
    for (int id = 0; id < 4; id++) begin
      rreg(3'(4 + id), v);
      check(int'(v) == RANGE, $sformatf("range %0d holds %0d words, expected %0d", id, v, RANGE));
    end
    // read the whole page back, one word per clock
    for (int id = 0; id < 4; id++) begin
      bad = 0;
      @(posedge clk);
      for (int i = 0; i < RANGE; i++) begin
        dsp_cs <= 1;
        dsp_addr <= 21'(id * RANGE + i);
        @(posedge clk);
        #1;
        if (dsp_rdata != pixel(id, i)) begin
          bad++;
          if (bad < 5) $display("FAIL: range %0d word %0d: %h expected %h",
                                id, i, dsp_rdata, pixel(id, i));
        end
      end
      dsp_cs <= 0;
      check(bad == 0, $sformatf("range %0d: %0d of %0d words wrong", id, bad, RANGE));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
