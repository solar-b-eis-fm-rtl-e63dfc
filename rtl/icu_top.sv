// icu_top: digital electronics of the EIS instrument control unit (ICU).
//
// The ICU is built around a 21020 DSP at 20 MHz, which is not part of this RTL:
// its program-memory (PM) and data-memory (DM) buses and the device selects of
// its address decoders are ports here, so a processor model or a testbench
// drives them. Around those buses sit:
//   * the boot loader, which after reset copies the boot code from the byte-wide
//     PROM into the 48-bit program RAM while holding the DSP (dsp_rst) in reset;
//   * program RAM 128k x 48, data RAM 128k x 32 and working RAM 512k x 16;
//   * the space-craft interface FPGA (sc_if) with its FIFOs: three 4k x 9
//     command FIFOs written in parallel, one 4k x 9 status FIFO and two 4k x 9
//     mission-data FIFOs side by side, and the three serial links to the MDP;
//   * the watchdog (16 s, reboots the ICU) and the space-craft time counter;
//   * the CCD buffer / high-speed-link controller with its two 2M x 16 pages;
//   * the power-switching latch and the health-monitor multiplexer select.
//
// Bus protocol (this design's own, standing in for the DSP's bus cycle): one
// access per clock; for a write the select, pm_wr/dm_wr, the address and the
// write data are valid in the same clock; for a read pm_rd/dm_rd and the select
// are given in one clock and the data appear on pm_rdata/dm_rdata in the next.
// PM bus data placement: register devices use PM[47:40] (the FPGA's PMD[47:40]);
// the command FIFO read returns the three copies in PM[47:24] (FIFO 2, 1, 0) and
// their first-byte flags in PM[23:21]; the mission-data FIFO takes PM[47:32];
// the time counter uses PM[47:16]. 16-bit DM devices use DM[15:0].
// Reset: sys_rst = por | ext_rst | watchdog reboot starts the boot copy; while
// the copy runs the DSP and every other block stay in reset as well (icu_rst),
// as the document asks. Only the watchdog register is outside both: por alone
// resets it, and the watchdog keeps running during the boot copy.
module icu_top #(
  parameter int unsigned PM_DEPTH   = 131072,   // program RAM words (48-bit)
  parameter int unsigned DM_DEPTH   = 131072,   // data RAM words (32-bit)
  parameter int unsigned WR_DEPTH   = 524288,   // working RAM words (16-bit)
  parameter int unsigned CCD_PAGE   = 2097152,  // CCD buffer page words (16-bit)
  parameter int unsigned FIFO_DEPTH = 4096,
  parameter int unsigned PROM_BYTES = 16384,
  parameter int unsigned BOOT_WORDS = PROM_BYTES / 6,
  parameter int unsigned WD_PERIOD  = 320_000_000,
  parameter int unsigned TICK_DIV   = 20,
  parameter int unsigned LINK_HALF  = 2,
  parameter int unsigned EOE_CLKS   = 200,
  parameter int unsigned N_PWR      = 8,
  parameter int unsigned N_MON      = 16
) (
  input  logic        clk,
  input  logic        por,
  input  logic        ext_rst,
  // DSP program-memory bus
  input  logic        pm_rd,
  input  logic        pm_wr,
  input  logic [23:0] pm_addr,
  input  logic [47:0] pm_wdata,
  output logic [47:0] pm_rdata,
  // PM device selects (from the PM I/O decoder)
  input  logic        pm_ram_sel,
  input  logic        cmd_ctl,
  input  logic        st_ctl,
  input  logic        md_ctl,
  input  logic        scif_reg,     // 1: S/C I/F register, 0: FIFO data port
  input  logic        pulse_en,
  input  logic        wd_sel,
  input  logic        time_sel,
  input  logic        pwr_sel,
  input  logic        mon_sel_sel,
  // DSP data-memory bus
  input  logic        dm_rd,
  input  logic        dm_wr,
  input  logic [31:0] dm_addr,
  input  logic [31:0] dm_wdata,
  output logic [31:0] dm_rdata,
  // DM device selects (from the DM I/O decoder)
  input  logic        dm_ram_sel,
  input  logic        wr_ram_sel,
  input  logic        ccd_sel,
  input  logic        ccd_reg_sel,
  // DSP control
  output logic        dsp_rst,
  output logic        md_irq,
  output logic        ccd_irq,
  // boot PROM
  output logic [$clog2(PROM_BYTES)-1:0] prom_addr,
  output logic        prom_oe,
  input  logic [7:0]  prom_data,
  // links to / from the MDP
  input  logic        cmd_clk,
  input  logic        cmd_ena,
  input  logic        cmd_dat,
  output logic        st_clk,
  output logic        st_ena,
  output logic        st_dat,
  output logic        md_clk,
  output logic        md_ena,
  output logic        md_dat,
  input  logic        md_bsy,
  // high-speed CCD links from the camera
  input  logic [1:0]  hsl_clk,
  input  logic [1:0]  hsl_ena,
  input  logic [1:0]  hsl_dat,
  // monitor board
  output logic [N_PWR-1:0]         pwr_sw,
  output logic [$clog2(N_MON)-1:0] mon_mux,
  output logic        mon_settle,
  // status
  output logic        wd_flag,
  output logic        time_tick
);
  localparam int unsigned PMW = $clog2(PM_DEPTH);
  localparam int unsigned DMW = $clog2(DM_DEPTH);
  localparam int unsigned WRW = $clog2(WR_DEPTH);
  localparam int unsigned CPW = $clog2(CCD_PAGE);

  // --------------------------------------------------------------------- resets
  logic wd_reboot, sys_rst, icu_rst, boot_busy;
  assign sys_rst = por | ext_rst | wd_reboot;
  assign icu_rst = sys_rst | boot_busy;    // rest of the ICU waits for the boot copy

  // ---------------------------------------------------------------- boot loader
  logic             boot_we;
  logic [PMW-1:0]   boot_addr;
  logic [47:0]      boot_wdata;

  boot_loader #(.PROM_BYTES(PROM_BYTES), .N_WORDS(BOOT_WORDS), .PM_AW(PMW)) u_boot (
    .clk, .rst(sys_rst),
    .prom_addr, .prom_oe, .prom_data,
    .pm_we(boot_we), .pm_addr(boot_addr), .pm_wdata(boot_wdata),
    .dsp_rst, .busy(boot_busy)
  );

  // ---------------------------------------------------------------- program RAM
  logic [47:0] pm_q;
  sram #(.DEPTH(PM_DEPTH), .WIDTH(48)) u_pm_ram (
    .clk,
    .cs  (boot_busy ? boot_we   : (pm_ram_sel & (pm_rd | pm_wr))),
    .we  (boot_busy ? 1'b1      : pm_wr),
    .addr(boot_busy ? boot_addr : pm_addr[PMW-1:0]),
    .d   (boot_busy ? boot_wdata : pm_wdata),
    .q   (pm_q)
  );

  // -------------------------------------------------------- S/C interface FPGA
  logic       cmd_rst, cmd_wr, cmd_rd, st_rst, st_wr, st_rd, md_rst, md_wr, md_rd;
  logic [2:0] cmd_ff, cmd_ef;
  logic [8:0] cmd_d;
  logic [8:0] cmd_q [3];
  logic       st_ff, st_ef;
  logic [8:0] st_q;
  logic [1:0] md_ff, md_ef;
  logic [8:0] md_q [2];
  logic [7:0] scif_rdata;

  sc_if #(.ST_HALF(LINK_HALF), .MD_HALF(LINK_HALF)) u_scif (
    .clk, .rst(icu_rst),
    .pmd_in(pm_wdata[47:40]), .pmd_out(scif_rdata),
    .pmrd(pm_rd), .pmwr(pm_wr), .pulse_en,
    .cmd_ctl, .st_ctl, .md_ctl, .reg_sel(scif_reg),
    .cmd_rst, .cmd_wr, .cmd_rd, .cmd_ff, .cmd_ef, .cmd_fifo(cmd_d),
    .st_rst, .st_wr, .st_rd, .st_ff, .st_ef, .st_fifo(st_q[7:0]),
    .md_rst, .md_wr, .md_rd, .md_ff, .md_ef, .md_fifo({md_q[1][7:0], md_q[0][7:0]}),
    .cmd_clk, .cmd_ena, .cmd_dat,
    .st_clk, .st_ena, .st_dat,
    .md_clk, .md_ena, .md_dat, .md_bsy, .md_irq
  );

  for (genvar i = 0; i < 3; i++) begin : g_cmd_fifo
    sc_fifo #(.DEPTH(FIFO_DEPTH), .WIDTH(9)) u_fifo (
      .clk, .rst(cmd_rst), .wr(cmd_wr), .d(cmd_d), .rd(cmd_rd),
      .q(cmd_q[i]), .ff(cmd_ff[i]), .ef(cmd_ef[i])
    );
  end

  sc_fifo #(.DEPTH(FIFO_DEPTH), .WIDTH(9)) u_st_fifo (
    .clk, .rst(st_rst), .wr(st_wr), .d({1'b0, pm_wdata[47:40]}), .rd(st_rd),
    .q(st_q), .ff(st_ff), .ef(st_ef)
  );

  for (genvar i = 0; i < 2; i++) begin : g_md_fifo
    sc_fifo #(.DEPTH(FIFO_DEPTH), .WIDTH(9)) u_fifo (
      .clk, .rst(md_rst), .wr(md_wr), .d({1'b0, pm_wdata[32+8*i +: 8]}), .rd(md_rd),
      .q(md_q[i]), .ff(md_ff[i]), .ef(md_ef[i])
    );
  end

  // --------------------------------------------------- watchdog and S/C time
  logic [7:0]  wd_rdata;
  logic [31:0] time_rdata;
  logic        wd_enabled;

  watchdog #(.PERIOD(WD_PERIOD)) u_wd (
    .clk, .por,
    .wr(pm_wr & wd_sel), .rd(pm_rd & wd_sel), .wdata(pm_wdata[47:40]),
    .rdata(wd_rdata), .reboot(wd_reboot), .flag(wd_flag), .enabled(wd_enabled)
  );

  sc_time #(.TICK_DIV(TICK_DIV)) u_time (
    .clk, .rst(icu_rst),
    .load(pm_wr & time_sel), .wdata(pm_wdata[47:16]),
    .rd(pm_rd & time_sel), .rdata(time_rdata), .tick(time_tick)
  );

  // ------------------------------------------------------------- monitor board
  logic [N_PWR-1:0] pwr_rdata;
  logic [7:0]       mon_rdata;
  logic             mon_bad;

  power_latch #(.N_OUT(N_PWR)) u_pwr (
    .clk, .rst(icu_rst),
    .wr(pm_wr & pwr_sel), .rd(pm_rd & pwr_sel), .wdata(pm_wdata[47 -: N_PWR]),
    .rdata(pwr_rdata), .sw(pwr_sw)
  );

  mon_sel #(.N_CH(N_MON)) u_mon (
    .clk, .rst(icu_rst),
    .wr(pm_wr & mon_sel_sel), .rd(pm_rd & mon_sel_sel), .wdata(pm_wdata[47:40]),
    .rdata(mon_rdata), .sel(mon_mux), .bad(mon_bad), .settle(mon_settle)
  );

  // ------------------------------------------------------------ PM read data
  typedef struct packed {
    logic ram, cmd_fifo, scif, wd, tim, pwr, mon;
  } pm_rsel_t;
  pm_rsel_t pm_rs;

  always_ff @(posedge clk) begin
    pm_rs.ram      <= pm_rd & pm_ram_sel & ~boot_busy;
    pm_rs.cmd_fifo <= pm_rd & cmd_ctl & ~scif_reg;
    pm_rs.scif     <= pm_rd & scif_reg & (cmd_ctl | st_ctl | md_ctl);
    pm_rs.wd       <= pm_rd & wd_sel;
    pm_rs.tim      <= pm_rd & time_sel;
    pm_rs.pwr      <= pm_rd & pwr_sel;
    pm_rs.mon      <= pm_rd & mon_sel_sel;
  end

  always_comb begin
    pm_rdata = '0;
    if (pm_rs.ram)      pm_rdata = pm_q;
    if (pm_rs.cmd_fifo) pm_rdata = {cmd_q[2][7:0], cmd_q[1][7:0], cmd_q[0][7:0],
                                    cmd_q[2][8], cmd_q[1][8], cmd_q[0][8], 21'b0};
    if (pm_rs.scif)     pm_rdata = {scif_rdata, 40'b0};
    if (pm_rs.wd)       pm_rdata = {wd_rdata, 40'b0};
    if (pm_rs.tim)      pm_rdata = {time_rdata, 16'b0};
    if (pm_rs.pwr)      pm_rdata = {pwr_rdata, (48 - N_PWR)'(0)};
    if (pm_rs.mon)      pm_rdata = {mon_rdata, 40'b0};
  end

  // ------------------------------------------------------------- DM devices
  logic [31:0] dm_q;
  logic [15:0] wr_q, ccd_q;
  logic [31:0] ccd_reg_q;

  sram #(.DEPTH(DM_DEPTH), .WIDTH(32)) u_dm_ram (
    .clk, .cs(dm_ram_sel & (dm_rd | dm_wr)), .we(dm_wr),
    .addr(dm_addr[DMW-1:0]), .d(dm_wdata), .q(dm_q)
  );

  sram #(.DEPTH(WR_DEPTH), .WIDTH(16)) u_wr_ram (
    .clk, .cs(wr_ram_sel & (dm_rd | dm_wr)), .we(dm_wr),
    .addr(dm_addr[WRW-1:0]), .d(dm_wdata[15:0]), .q(wr_q)
  );

  logic [1:0]     pg_cs, pg_we;
  logic [CPW-1:0] pg_addr [2];
  logic [15:0]    pg_d [2];
  logic [15:0]    pg_q [2];

  ccd_buf_ctl #(.PAGE_DEPTH(CCD_PAGE), .EOE_CLKS(EOE_CLKS)) u_ccd (
    .clk, .rst(icu_rst),
    .hsl_clk, .hsl_ena, .hsl_dat,
    .dsp_cs(ccd_sel & (dm_rd | dm_wr)), .dsp_we(dm_wr),
    .dsp_addr(dm_addr[CPW-1:0]), .dsp_wdata(dm_wdata[15:0]), .dsp_rdata(ccd_q),
    .reg_wr(dm_wr & ccd_reg_sel), .reg_rd(dm_rd & ccd_reg_sel),
    .reg_addr(dm_addr[2:0]), .reg_wdata(dm_wdata[15:0]), .reg_rdata(ccd_reg_q),
    .eoe_irq(ccd_irq),
    .pg_cs, .pg_we, .pg_addr, .pg_d, .pg_q
  );

  for (genvar p = 0; p < 2; p++) begin : g_ccd_page
    sram #(.DEPTH(CCD_PAGE), .WIDTH(16)) u_page (
      .clk, .cs(pg_cs[p]), .we(pg_we[p]), .addr(pg_addr[p]), .d(pg_d[p]), .q(pg_q[p])
    );
  end

  typedef struct packed {
    logic ram, wr, ccd, creg;
  } dm_rsel_t;
  dm_rsel_t dm_rs;

  always_ff @(posedge clk) begin
    dm_rs.ram  <= dm_rd & dm_ram_sel;
    dm_rs.wr   <= dm_rd & wr_ram_sel;
    dm_rs.ccd  <= dm_rd & ccd_sel;
    dm_rs.creg <= dm_rd & ccd_reg_sel;
  end

  always_comb begin
    dm_rdata = '0;
    if (dm_rs.ram)  dm_rdata = dm_q;
    if (dm_rs.wr)   dm_rdata = {16'b0, wr_q};
    if (dm_rs.ccd)  dm_rdata = {16'b0, ccd_q};
    if (dm_rs.creg) dm_rdata = ccd_reg_q;
  end

endmodule
