// hsl_rx: receiver for one high-speed CCD data link from the camera.
//
// The camera sends 16-bit CCD words msb first on three wires: hsl_ena is high
// while data is being sent, hsl_clk runs (nominally 16 MHz) only while hsl_ena
// is high, and hsl_dat changes on the falling edge of hsl_clk. The shift
// register therefore runs on the rising edge of the link clock itself, and is
// cleared asynchronously whenever hsl_ena is low. Each complete word is held in
// a register and announced by flipping a toggle bit; the toggle is brought into
// the system clock domain through two flip-flops and the word, stable for the
// following 16 link clocks, is then taken as word/valid. This needs the system
// clock to be faster than the link's word rate times about four, which 20 MHz
// against 1 M words/s easily is.
// End of exposure: when the synchronised enable has been low for more than
// EOE_CLKS system clocks after data, eoe pulses for one clock, telling the ICU
// that all data of the present exposure has arrived.
// hsl_ena is used both as the asynchronous clear of the link-side counter and,
// through the synchroniser, as data in the system clock domain; lint reports
// this mix, and it is intended: the two uses are in different clock domains.
// The link wiring and format follow the document; the end-of-exposure timeout
// (its value is open in the document, 10 us here) is this design's choice.
module hsl_rx #(
  parameter int unsigned EOE_CLKS = 200   // enable-low time for end of exposure
) (
  input  logic        clk,
  input  logic        rst,
  // link (asynchronous to clk)
  input  logic        hsl_clk,
  input  logic        hsl_ena,
  input  logic        hsl_dat,
  // system clock side
  output logic [15:0] word,
  output logic        valid,
  output logic        active,
  output logic        eoe
);
  // ---------------------------------------------------------- link clock domain
  logic [14:0] sh;
  logic [3:0]  nbits;
  logic [15:0] hold;
  logic        tog;

  // Cleared asynchronously while the link is idle (enable low).
  always_ff @(posedge hsl_clk or negedge hsl_ena) begin
    if (!hsl_ena) begin
      sh    <= '0;
      nbits <= '0;
    end else begin
      sh    <= {sh[13:0], hsl_dat};
      nbits <= nbits + 1'b1;
    end
  end

  always_ff @(posedge hsl_clk) begin
    if (hsl_ena && nbits == 4'd15) begin
      hold <= {sh, hsl_dat};
      tog  <= ~tog;
    end
  end

  // -------------------------------------------------------- system clock domain
  localparam int unsigned EW = $clog2(EOE_CLKS + 2);
  logic [2:0]    tog_s;   // [1:0] synchroniser, [2] previous
  logic [1:0]    ena_s;
  logic [EW-1:0] low_cnt;
  logic          seen;    // data arrived since the last end of exposure

  always_ff @(posedge clk) begin
    tog_s <= {tog_s[1:0], tog};
    ena_s <= {ena_s[0], hsl_ena};
    if (rst) begin
      valid   <= 1'b0;
      word    <= '0;
      eoe     <= 1'b0;
      low_cnt <= '0;
      seen    <= 1'b0;
      tog_s[2] <= tog_s[1];
    end else begin
      valid <= 1'b0;
      eoe   <= 1'b0;
      if (tog_s[2] != tog_s[1]) begin
        valid <= 1'b1;
        word  <= hold;
        seen  <= 1'b1;
      end
      if (ena_s[1]) begin
        low_cnt <= '0;
      end else if (seen) begin
        if (low_cnt == EW'(EOE_CLKS)) begin
          eoe     <= 1'b1;
          seen    <= 1'b0;
          low_cnt <= '0;
        end else begin
          low_cnt <= low_cnt + 1'b1;
        end
      end
    end
  end

  assign active = ena_s[1];

endmodule
