// tb_icu_full: the end-to-end test of tb_icu_top with the ICU at its default
// sizes (128k x 48 program RAM, 16k-byte boot PROM, 4k FIFOs, 2M-word CCD pages,
// a full 4 kbyte mission-data sub-packet), leaving out only the 16 s watchdog trip.
// A bus-functional model of the DSP drives the program- and data-memory buses
// and the device selects; models of the PROM, the MDP and the two camera links
// sit on the other ports. The test runs:
//   boot copy from PROM to program RAM with the DSP held in reset, checked word
//   by word, the rest of the ICU held in reset meanwhile; data and working RAM
//   accesses; a command packet received into the three command FIFOs and read
//   back as 24-bit words; a command-FIFO overflow;
//   a status packet sent after GO; a mission-data sub-packet sent after GO with
//   the MDP busy line toggling, and its interrupt; two CCD exposures on both
//   links, auto-sorted by ID, with end-of-exposure interrupts and page swaps;
//   power-switch and monitor-select writes; the time counter; and a watchdog
//   trip that reboots the ICU (boot runs again) while the WARM-REBOOT flag
//   survives. Each of these mechanisms is counted and a mechanism that never
//   happened counts as a failure.
module tb_icu_full;
  // every size at the design's defaults
  localparam int PM_DEPTH = 131072, DM_DEPTH = 131072, WR_DEPTH = 524288, CCD_PAGE = 2097152;
  localparam int FIFO_D = 4096, PROM_BYTES = 16384, BOOT_WORDS = PROM_BYTES / 6;
  localparam int WD_PERIOD = 320_000_000, EOE = 200, TICK_DIV = 20;
  localparam bit WD_TRIP = 0;            // a 16 s trip is left to the reduced-size test
  localparam int MD_WORDS = 2048;        // one full 4 kbyte mission-data sub-packet
  localparam int RANGE = CCD_PAGE / 4;

  logic clk = 0, por = 0, ext_rst = 0;
  logic pm_rd = 0, pm_wr = 0;
  logic [23:0] pm_addr = '0;
  logic [47:0] pm_wdata = '0, pm_rdata;
  logic pm_ram_sel = 0, cmd_ctl = 0, st_ctl = 0, md_ctl = 0, scif_reg = 0, pulse_en = 1;
  logic wd_sel = 0, time_sel = 0, pwr_sel = 0, mon_sel_sel = 0;
  logic dm_rd = 0, dm_wr = 0;
  logic [31:0] dm_addr = '0, dm_wdata = '0, dm_rdata;
  logic dm_ram_sel = 0, wr_ram_sel = 0, ccd_sel = 0, ccd_reg_sel = 0;
  logic dsp_rst, md_irq, ccd_irq;
  logic [$clog2(PROM_BYTES)-1:0] prom_addr;
  logic prom_oe;
  logic [7:0] prom_data;
  logic cmd_clk = 0, cmd_ena = 0, cmd_dat = 0;
  logic st_clk, st_ena, st_dat, md_clk, md_ena, md_dat, md_bsy = 0;
  logic [1:0] hsl_clk = '0, hsl_ena = '1, hsl_dat = '0;
  logic [7:0] pwr_sw;
  logic [3:0] mon_mux;
  logic mon_settle, wd_flag, time_tick;

  icu_top dut (.*);

  int checks = 0, failures = 0;
  // mechanism counters
  int n_boot = 0, n_cmd_triple = 0, n_cmd_ovf = 0, n_st_pkt = 0, n_md_pkt = 0, n_md_irq = 0;
  int n_md_hold = 0, n_ccd_sort = 0, n_ccd_swap = 0, n_ccd_eoe = 0, n_wd_trip = 0, n_pwr = 0;
  int n_mon = 0, n_time = 0;

  always #25 clk = ~clk;    // 20 MHz

  task automatic check(input logic cond, input string msg);
    checks++;
    if (!cond) begin failures++; if (failures < 30) $display("FAIL: %s", msg); end
  endtask

  // ------------------------------------------------------------------- models
  function automatic logic [7:0] prom_byte(input int a);
    return 8'((a * 29) ^ (a >> 5) ^ 8'h3C);
  endfunction
  assign prom_data = prom_byte(int'(prom_addr));

  always @(posedge clk) if (!por && md_irq) n_md_irq++;
  // the rest of the ICU is held in reset during the boot copy: no time ticks
  int n_boot_clk = 0, n_boot_tick = 0;
  always @(posedge clk) if (!por && dsp_rst) begin
    n_boot_clk++;
    if (time_tick) n_boot_tick++;
  end
  always @(posedge clk) if (!por && ccd_irq) n_ccd_eoe++;
  always @(posedge clk) if (md_ena && md_bsy && !md_clk) n_md_hold++;
  // after the first boot, a new DSP reset can only come from the watchdog
  always @(posedge clk) if (!por && n_boot > 0 && dsp_rst && !$past(dsp_rst)) n_wd_trip++;

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

  logic [15:0] sent [4][$];   // CCD words sent per ID in the current exposure

  // ------------------------------------------------------------ DSP bus model
  typedef enum {S_RAM, S_CMD, S_ST, S_MD, S_WD, S_TIME, S_PWR, S_MON} pm_dev_e;

  task automatic pm_sel(input pm_dev_e d, input logic v);
    pm_ram_sel <= v && d == S_RAM; cmd_ctl <= v && d == S_CMD; st_ctl <= v && d == S_ST;
    md_ctl <= v && d == S_MD; wd_sel <= v && d == S_WD; time_sel <= v && d == S_TIME;
    pwr_sel <= v && d == S_PWR; mon_sel_sel <= v && d == S_MON;
  endtask
  task automatic pm_write(input pm_dev_e d, input logic reg_, input logic [23:0] a, input logic [47:0] v);
    @(posedge clk); pm_sel(d, 1); scif_reg <= reg_; pm_wr <= 1; pm_addr <= a; pm_wdata <= v;
    @(posedge clk); pm_sel(d, 0); scif_reg <= 0; pm_wr <= 0;
  endtask
  task automatic pm_read(input pm_dev_e d, input logic reg_, input logic [23:0] a, output logic [47:0] v);
    @(posedge clk); pm_sel(d, 1); scif_reg <= reg_; pm_rd <= 1; pm_addr <= a;
    @(posedge clk); pm_sel(d, 0); scif_reg <= 0; pm_rd <= 0;
    #1 v = pm_rdata;
  endtask
  typedef enum {D_RAM, D_WR, D_CCD, D_CREG} dm_dev_e;
  task automatic dm_sel(input dm_dev_e d, input logic v);
    dm_ram_sel <= v && d == D_RAM; wr_ram_sel <= v && d == D_WR;
    ccd_sel <= v && d == D_CCD; ccd_reg_sel <= v && d == D_CREG;
  endtask
  task automatic dm_write(input dm_dev_e d, input logic [31:0] a, input logic [31:0] v);
    @(posedge clk); dm_sel(d, 1); dm_wr <= 1; dm_addr <= a; dm_wdata <= v;
    @(posedge clk); dm_sel(d, 0); dm_wr <= 0;
  endtask
  task automatic dm_read(input dm_dev_e d, input logic [31:0] a, output logic [31:0] v);
    @(posedge clk); dm_sel(d, 1); dm_rd <= 1; dm_addr <= a;
    @(posedge clk); dm_sel(d, 0); dm_rd <= 0;
    #1 v = dm_rdata;
  endtask

  // ------------------------------------------------------------------ phases
  task automatic wait_boot_and_check(input int slack);
    longint t0;
    logic [47:0] v, e;
    t0 = 0;
    while (dsp_rst) begin @(posedge clk); t0++; end
    n_boot++;
    check(t0 >= BOOT_WORDS * 19 && t0 <= BOOT_WORDS * 19 + 5 + slack, $sformatf("boot took %0d clocks", t0));
    for (int w = 0; w < BOOT_WORDS; w++) begin
      pm_read(S_RAM, 0, 24'(w), v);
      for (int k = 0; k < 6; k++) e[47 - 8*k -: 8] = prom_byte(w * 6 + k);
      check(v == e, $sformatf("program RAM word %0d: %h expected %h", w, v, e));
    end
  endtask

  task automatic kick;
    pm_write(S_WD, 0, 0, {8'h01, 40'h0});
  endtask

  task automatic send_cmd(input int n, inout logic [7:0] pkt[$]);
    cmd_ena = 1; #100;
    for (int k = 0; k < n; k++) begin
      logic [7:0] b;
      b = 8'($urandom);
      pkt.push_back(b);
      for (int i = 7; i >= 0; i--) begin
        cmd_dat = b[i]; #100 cmd_clk = 1; #100 cmd_clk = 0;
      end
    end
    #100 cmd_ena = 0; #500;
  endtask

  // camera models, one process per link, started by exposure()
  int         cam_n    [2];
  logic [3:0] cam_mask [2];
  bit         cam_busy [2] = '{0, 0};

  for (genvar l = 0; l < 2; l++) begin : g_cam
    initial forever begin
      wait (cam_busy[l]);
      hsl_ena[l] = 1;
      #20;
      for (int i = 0; i < cam_n[l]; i++) begin
        logic [15:0] w;
        logic [1:0] id;
        do id = 2'($urandom); while (!cam_mask[l][id]);
        w = {id, 14'($urandom)};
        sent[id].push_back(w);
        for (int b = 15; b >= 0; b--) begin
          hsl_dat[l] = w[b];
          #31.25 hsl_clk[l] = 1;
          #31.25 hsl_clk[l] = 0;
        end
      end
      #20 hsl_ena[l] = 0;
      cam_busy[l] = 0;
    end
  end

  task automatic exposure(input int n0, input int n1, input string tag);
    logic [31:0] v;
    int eoe0;
    eoe0 = n_ccd_eoe;
    for (int id = 0; id < 4; id++) sent[id].delete();
    cam_n[0] = n0; cam_n[1] = n1; cam_mask[0] = 4'b1111; cam_mask[1] = 4'b1111;
    cam_busy[0] = 1; cam_busy[1] = 1;
    while (cam_busy[0] || cam_busy[1]) begin   // the DSP keeps the watchdog alive
      #10000; kick();
    end
    repeat (EOE + 10) @(posedge clk);
    check(n_ccd_eoe > eoe0, "end-of-exposure interrupt");
    dm_write(D_CREG, 0, 32'h1);          // swap pages
    n_ccd_swap++;
    for (int id = 0; id < 4; id++) begin
      dm_read(D_CREG, 32'(4 + id), v);
      check(int'(v) == sent[id].size(), $sformatf("%s: range %0d holds %0d, expected %0d", tag, id, v, sent[id].size()));
      for (int i = 0; i < sent[id].size(); i++) begin
        dm_read(D_CCD, 32'(id * RANGE + i), v);
        check(v[15:0] == sent[id][i], $sformatf("%s: range %0d word %0d", tag, id, i));
        if (v[15:0] == sent[id][i]) n_ccd_sort++;
      end
    end
  endtask

  initial begin
    logic [47:0] v;
    logic [31:0] dv;
    logic [7:0]  pkt[$];
    // power-on reset with edges
    #1 por = 1; hsl_ena = '0;
    repeat (4) @(posedge clk);
    por <= 0;
    @(posedge clk); #1;
    check(dsp_rst, "DSP held in reset during boot");
    wait_boot_and_check(0);

    // data RAM and working RAM
    for (int i = 0; i < 16; i++) begin
      dm_write(D_RAM, 32'(i * 7), 32'(i * 32'h01010101 + 5));
      dm_write(D_WR, 32'(i * 11), 32'(16'(i * 16'h0F0F)));
    end
    for (int i = 0; i < 16; i++) begin
      dm_read(D_RAM, 32'(i * 7), dv);
      check(dv == 32'(i * 32'h01010101 + 5), "data RAM");
      dm_read(D_WR, 32'(i * 11), dv);
      check(dv == 32'(16'(i * 16'h0F0F)), "working RAM");
    end

    // command packet: three FIFO copies read as a 24-bit word
    send_cmd(12, pkt);
    for (int k = 0; k < 12; k++) begin
      pm_read(S_CMD, 0, 0, v);
      check(v[47:40] == pkt[k] && v[39:32] == pkt[k] && v[31:24] == pkt[k],
            $sformatf("command byte %0d: %h expected %h", k, v[47:24], pkt[k]));
      check(v[23:21] == {3{k == 0}}, "first-byte flags");
      if (v[47:40] == v[39:32] && v[39:32] == v[31:24]) n_cmd_triple++;
    end
    kick();
    // command FIFO overflow
    pkt.delete();
    send_cmd(FIFO_D + 3, pkt);
    pm_read(S_CMD, 1, 0, v);
    check(v[44] && v[41], $sformatf("CMD overflow and full flags: %b", v[47:40]));
    if (v[44]) n_cmd_ovf++;
    pm_write(S_CMD, 1, 0, {8'h06, 40'h0});          // reset FIFOs, clear flags
    pm_read(S_CMD, 1, 0, v);
    check(v[40] && !v[44], "CMD FIFOs reset");
    kick();

    // status packet
    pkt.delete();
    for (int k = 0; k < 16; k++) begin
      pkt.push_back(8'($urandom));
      pm_write(S_ST, 0, 0, {pkt[k], 40'h0});
    end
    pm_write(S_ST, 1, 0, {8'h01, 40'h0});           // GO
    repeat (16 * 40) @(posedge clk);
    pm_read(S_ST, 1, 0, v);
    check(v[43] && !v[42], "status packet sent");
    check(st_rx.size() == 16, $sformatf("%0d status bytes", st_rx.size()));
    for (int k = 0; k < 16 && k < st_rx.size(); k++) check(st_rx[k] == pkt[k], "status byte");
    if (st_rx.size() == 16) n_st_pkt++;
    kick();

    // mission-data sub-packet with the MDP busy now and then
    begin
      logic [15:0] words[$];
      int irq0;
      irq0 = n_md_irq;
      for (int k = 0; k < MD_WORDS; k++) begin
        words.push_back(16'($urandom));
        pm_write(S_MD, 0, 0, {words[k], 32'h0});
      end
      md_bsy <= 1;
      pm_write(S_MD, 1, 0, {8'h01, 40'h0});         // GO
      repeat (30) @(posedge clk);
      md_bsy <= 0;
      for (int k = 0; k < 6; k++) begin
        repeat (200) @(posedge clk);
        md_bsy <= 1; repeat (25) @(posedge clk); md_bsy <= 0;
      end
      repeat (MD_WORDS * 70) @(posedge clk);
      check(n_md_irq == irq0 + 1, "mission-data interrupt");
      check(md_rx.size() == MD_WORDS, $sformatf("%0d mission-data words", md_rx.size()));
      for (int k = 0; k < MD_WORDS && k < md_rx.size(); k++) check(md_rx[k] == words[k], "mission-data word");
      if (md_rx.size() == MD_WORDS) n_md_pkt++;
    end
    kick();

    // CCD exposures on both links, then page swaps
    exposure(90, 80, "exposure 1");
    kick();
    exposure(40, 60, "exposure 2");
    kick();

    // power switching and monitor select
    pm_write(S_PWR, 0, 0, {8'hA5, 40'h0});
    #1;
    check(pwr_sw == 8'hA5, "power switches");
    if (pwr_sw == 8'hA5) n_pwr++;
    pm_write(S_MON, 0, 0, {8'h09, 40'h0});
    #1;
    check(mon_mux == 4'd9, "monitor channel");
    if (mon_mux == 4'd9) n_mon++;

    // time counter
    pm_write(S_TIME, 0, 0, {32'h1234_0000, 16'h0});
    repeat (TICK_DIV * 10) @(posedge clk);
    pm_read(S_TIME, 0, 0, v);
    check(v[47:16] >= 32'h1234_0009 && v[47:16] <= 32'h1234_000B, $sformatf("time %h", v[47:16]));
    if (v[47:16] >= 32'h1234_0009) n_time++;
    kick();

    // watchdog trip: stop kicking, the ICU reboots and the flag survives
    if (WD_TRIP) begin
      pm_read(S_WD, 0, 0, v);
      check(v[40] == 1'b0, "no WARM-REBOOT yet");
      repeat (WD_PERIOD + 10) @(posedge clk);
      check(n_wd_trip == 1, "watchdog tripped");
      check(dsp_rst, "ICU in reset after the trip");
      check(pwr_sw == 8'h00, "power switches reset by the warm reboot");
      wait_boot_and_check(20);   // includes the rest of the reboot pulse
      pm_read(S_WD, 0, 0, v);
      check(v[40] == 1'b1, "WARM-REBOOT flag survives the reboot");
      pm_write(S_WD, 0, 0, {8'h02, 40'h0});
      pm_read(S_WD, 0, 0, v);
      check(v[40] == 1'b0, "WARM-REBOOT flag cleared");
    end

    check(n_wd_trip == (WD_TRIP ? 1 : 0), "no unexpected watchdog trip");
    $display("mechanisms: boot=%0d cmd_triple=%0d cmd_ovf=%0d st_pkt=%0d md_pkt=%0d md_irq=%0d md_hold=%0d",
             n_boot, n_cmd_triple, n_cmd_ovf, n_st_pkt, n_md_pkt, n_md_irq, n_md_hold);
    $display("mechanisms: ccd_sorted=%0d ccd_swap=%0d ccd_eoe=%0d wd_trip=%0d pwr=%0d mon=%0d time=%0d",
             n_ccd_sort, n_ccd_swap, n_ccd_eoe, n_wd_trip, n_pwr, n_mon, n_time);
    check(n_boot > 0, "mechanism: boot copy");
    check(n_cmd_triple > 0, "mechanism: triple command FIFO write");
    check(n_cmd_ovf > 0, "mechanism: command FIFO overflow");
    check(n_st_pkt > 0, "mechanism: status packet after GO");
    check(n_md_pkt > 0, "mechanism: mission-data sub-packet after GO");
    check(n_md_irq > 0, "mechanism: mission-data interrupt");
    check(n_md_hold > 0, "mechanism: MDP busy hold-off");
    check(n_ccd_sort > 0, "mechanism: CCD auto-sort");
    check(n_ccd_swap > 0, "mechanism: CCD page swap");
    check(n_ccd_eoe > 0, "mechanism: end of exposure");
    check(!WD_TRIP || n_wd_trip > 0, "mechanism: watchdog warm reboot");
    check(n_pwr > 0 && n_mon > 0 && n_time > 0, "mechanism: power latch, monitor select, time");
    check(n_boot_clk > 0 && n_boot_tick == 0,
          $sformatf("mechanism: ICU held in reset during boot (%0d clocks, %0d time ticks)", n_boot_clk, n_boot_tick));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (4_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
