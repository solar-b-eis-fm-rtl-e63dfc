// watchdog: 16-second watchdog timer with its status/control register.
//
// A counter runs while the watchdog is enabled; software must reset it (the
// counter-reset bit) within PERIOD clocks, 16 s at 20 MHz. If it reaches its
// terminal count, reboot is raised for REBOOT_LEN clocks to drive the ICU's
// reset circuit into a WARM-REBOOT, and the WARM-REBOOT flag is set. The flag
// and the enable are kept in a register that only the power-on reset (por)
// clears, never the system reset that the watchdog itself causes, so software
// can see after restarting that a watchdog trip happened.
// Register, one clock per access (wr/rd strobes, 8-bit data):
//   write: bit 0 counter reset, bit 1 reset WARM-REBOOT flag,
//          bit 2 write enable for bit 3, bit 3 watchdog enable (1) / disable (0)
//   read (rdata, valid one clock after rd): bit 0 WARM-REBOOT flag, bit 1 enabled
// The period, terminal-count reboot, the register's five functions and keeping
// it off the global reset follow the document; the bit layout, the enable at
// power-on and the reboot pulse length are this design's choices. The counter
// also restarts while the reboot pulse is active.
module watchdog
  import icu_pkg::*;
#(
  parameter int unsigned PERIOD     = 320_000_000,  // 16 s at 20 MHz
  parameter int unsigned REBOOT_LEN = 16
) (
  input  logic       clk,
  input  logic       por,       // power-on reset only
  input  logic       wr,
  input  logic       rd,
  input  logic [7:0] wdata,
  output logic [7:0] rdata,
  output logic       reboot,
  output logic       flag,
  output logic       enabled
);
  localparam int unsigned CW = $clog2(PERIOD);
  localparam int unsigned RW = $clog2(REBOOT_LEN + 1);

  logic [CW-1:0] cnt;
  logic [RW-1:0] rcnt;

  wire kick = wr & wdata[WD_KICK_BIT];
  wire tc   = enabled && (cnt == CW'(PERIOD - 1));

  always_ff @(posedge clk) begin
    if (por) begin
      cnt     <= '0;
      rcnt    <= '0;
      flag    <= 1'b0;
      enabled <= 1'b1;
      rdata   <= '0;
    end else begin
      if (kick || !enabled || rcnt != '0) cnt <= '0;
      else if (tc)                        cnt <= '0;
      else                                cnt <= cnt + 1'b1;

      if (tc && !kick)     rcnt <= RW'(REBOOT_LEN);
      else if (rcnt != '0) rcnt <= rcnt - 1'b1;

      if (tc && !kick)                  flag <= 1'b1;
      else if (wr && wdata[WD_CLRF_BIT]) flag <= 1'b0;

      if (wr && wdata[WD_ENWR_BIT]) enabled <= wdata[WD_ENVAL_BIT];

      if (rd) begin
        rdata <= '0;
        rdata[WD_FLAG_BIT] <= flag;
        rdata[WD_EN_BIT]   <= enabled;
      end else begin
        rdata <= '0;
      end
    end
  end

  assign reboot = (rcnt != '0);

endmodule
