// mon_sel: select register of the health-monitor analogue multiplexer.
//
// Temperatures, voltages and currents are multiplexed onto one analogue line
// feeding the 8-bit ADC, under processor control. This register holds the
// channel number driven onto the multiplexer's select lines. A write loads the
// channel (values at or above N_CH wrap into range by taking the low bits and
// are flagged), a read returns it one clock after rd, and reset selects
// channel 0. settle pulses SETTLE_CLKS clocks after each change of channel so
// software knows when the analogue line may be converted. The register follows
// the document's multiplexer select; the channel count (open in the document)
// and the settle signal are this design's choices.
module mon_sel #(
  parameter int unsigned N_CH        = 16,
  parameter int unsigned SETTLE_CLKS = 20,
  localparam int unsigned SW = $clog2(N_CH)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          wr,
  input  logic          rd,
  input  logic [7:0]    wdata,
  output logic [7:0]    rdata,
  output logic [SW-1:0] sel,
  output logic          bad,
  output logic          settle
);
  localparam int unsigned TW = $clog2(SETTLE_CLKS + 1);
  logic [TW-1:0] t;

  always_ff @(posedge clk) begin
    if (rst) begin
      sel    <= '0;
      bad    <= 1'b0;
      rdata  <= '0;
      t      <= '0;
      settle <= 1'b0;
    end else begin
      settle <= 1'b0;
      if (wr) begin
        sel <= wdata[SW-1:0];
        bad <= (32'(wdata) >= N_CH);
        t   <= TW'(SETTLE_CLKS);
      end else if (t != '0) begin
        t <= t - 1'b1;
        if (t == TW'(1)) settle <= 1'b1;
      end
      rdata <= rd ? 8'({bad, sel}) : '0;
    end
  end
endmodule
