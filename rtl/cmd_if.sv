// cmd_if: command interface (CMD_IF) receiver of the S/C interface FPGA.
//
// The MDP sends command packets as 8-bit bytes on a three-wire link: cmd_ena is
// high for the whole packet, cmd_clk toggles while it is high and cmd_dat
// carries the bytes msb first, changing on the falling edge of cmd_clk. The
// three lines are synchronised to the 20 MHz system clock (two flip-flops each)
// and cmd_dat is taken at every rising edge of cmd_clk, so the link clock must
// be below a quarter of the system clock. Every complete byte is written in the
// same clock into all three command FIFOs (one wr strobe, one data word), which
// lets software read the three copies as a 24-bit word and majority-vote away a
// single-event upset in one FIFO. The FIFO word is 9 bits: bit 8 marks the first
// byte of a packet, bits 7:0 are the byte.
// Status: active follows the synchronised enable; pkt_done is set when the
// enable falls and ovf when a byte arrives while any FIFO is full (the byte is
// lost), frag when the enable falls in the middle of a byte; all three sticky
// flags are cleared by clr. Latency: a byte is written 3 clocks after the rising
// cmd_clk edge that carries its last bit.
// The triple write follows the document; the first-byte flag in bit 8, the
// status flags and the link framing are this design's choices.
module cmd_if (
  input  logic       clk,
  input  logic       rst,
  // link from the MDP (asynchronous to clk)
  input  logic       cmd_clk,
  input  logic       cmd_ena,
  input  logic       cmd_dat,
  // write side of the three command FIFOs
  output logic       fifo_wr,
  output logic [8:0] fifo_d,
  input  logic [2:0] fifo_ff,
  // status
  input  logic       clr,
  output logic       active,
  output logic       pkt_done,
  output logic       ovf,
  output logic       frag
);
  logic [2:0] clk_s, ena_s;          // [0],[1] synchroniser, [2] previous
  logic [1:0] dat_s;                 // synchroniser
  logic [6:0] sh;                    // first seven bits of the byte
  logic [2:0] nbits;
  logic       first;

  wire clk_rise = clk_s[1] & ~clk_s[2];
  wire ena_fall = ~ena_s[1] & ena_s[2];

  always_ff @(posedge clk) begin
    if (rst) begin
      clk_s    <= '0;
      ena_s    <= '0;
      dat_s    <= '0;
      sh       <= '0;
      nbits    <= '0;
      first    <= 1'b1;
      fifo_wr  <= 1'b0;
      fifo_d   <= '0;
      pkt_done <= 1'b0;
      ovf      <= 1'b0;
      frag     <= 1'b0;
    end else begin
      clk_s   <= {clk_s[1:0], cmd_clk};
      ena_s   <= {ena_s[1:0], cmd_ena};
      dat_s   <= {dat_s[0], cmd_dat};
      fifo_wr <= 1'b0;
      if (clr) begin
        pkt_done <= 1'b0;
        ovf      <= 1'b0;
        frag     <= 1'b0;
      end
      if (ena_s[1] && clk_rise) begin
        sh    <= {sh[5:0], dat_s[1]};
        nbits <= nbits + 1'b1;
        if (nbits == 3'd7) begin
          fifo_wr <= 1'b1;
          fifo_d  <= {first, sh[6:0], dat_s[1]};
          first   <= 1'b0;
          if (fifo_ff != '0) ovf <= 1'b1;
        end
      end
      if (ena_fall) begin
        pkt_done <= 1'b1;
        if (nbits != '0) frag <= 1'b1;
        nbits    <= '0;
        first    <= 1'b1;
      end
    end
  end

  assign active = ena_s[1];

endmodule
