// tb_boot_loader: self-checking test of the boot loader at its default size
// (16k-byte PROM, 2730 words copied). A PROM model returns a byte computed from
// its address, PROM_WAIT clocks after the address; a program RAM model records
// every write. Checks each word's address and packing (first byte in bits
// 47:40), that the DSP reset is held throughout and released afterwards, the
// total copy time of N_WORDS*(6*(PROM_WAIT+1)+1) clocks, and a second boot after
// a new reset.
module tb_boot_loader;
  localparam int PROM_BYTES = 16384;
  localparam int N_WORDS    = PROM_BYTES / 6;
  localparam int WAIT       = 2;
  logic clk = 0, rst = 1;
  logic [13:0] prom_addr;
  logic prom_oe;
  logic [7:0] prom_data;
  logic pm_we;
  logic [16:0] pm_addr;
  logic [47:0] pm_wdata;
  logic dsp_rst, busy;
  int checks = 0, failures = 0, n_writes = 0;
  longint cyc = 0, t_start, t_end;
  bit rst_dropped_early = 0;

  boot_loader dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  function automatic logic [7:0] prom_byte(input int a);
    return 8'((a * 29) ^ (a >> 5));
  endfunction
  // PROM: combinational byte from address (valid well within PROM_WAIT clocks)
  assign prom_data = prom_byte(int'(prom_addr));

  always @(posedge clk) if (!rst && pm_we) begin
    logic [47:0] e;
    for (int k = 0; k < 6; k++) e[47 - 8*k -: 8] = prom_byte(int'(pm_addr) * 6 + k);
    checks++;
    if (pm_addr != 17'(n_writes) || pm_wdata != e) begin
      failures++;
      if (failures < 10) $display("FAIL: write %0d at %0d data %h expected %h", n_writes, pm_addr, pm_wdata, e);
    end
    if (!dsp_rst) rst_dropped_early = 1;
    n_writes++;
  end

  task automatic boot;
    n_writes = 0;
    rst <= 1; repeat (2) @(posedge clk); rst <= 0; t_start = cyc;
    @(posedge clk); #1;
    checks++; if (!dsp_rst) begin failures++; $display("FAIL: DSP not held in reset"); end
    while (dsp_rst) @(posedge clk);
    t_end = cyc;
    checks++;
    if (n_writes != N_WORDS) begin failures++; $display("FAIL: %0d words written", n_writes); end
    checks++;
    if (rst_dropped_early) begin failures++; $display("FAIL: DSP reset released during copy"); end
    checks++;
    if ((t_end - t_start) < N_WORDS * (6 * (WAIT + 1) + 1) ||
        (t_end - t_start) > N_WORDS * (6 * (WAIT + 1) + 1) + 3) begin
      failures++; $display("FAIL: copy took %0d clocks", t_end - t_start);
    end
    repeat (20) @(posedge clk); #1;
    checks++;
    if (dsp_rst || busy || n_writes != N_WORDS) begin failures++; $display("FAIL: not idle after copy"); end
  endtask

  initial begin
    boot();
    boot();
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
