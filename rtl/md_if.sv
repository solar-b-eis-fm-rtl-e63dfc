// md_if: mission-data interface (MD_IF) transmitter of the S/C interface FPGA.
//
// Software writes a sub-packet of up to 4k 16-bit words into the MD FIFO (two
// 4k x 9 FIFOs in width expansion) and issues GO. The interface then reads the
// FIFO until it is empty and sends each word msb first on the three-wire link to
// the MDP (md_ena high for the whole sub-packet, md_clk toggling, md_dat changing
// on the falling edge). The MDP's busy line md_bsy holds transmission off: no
// word is started while it is high, so data only flows when the MDP is ready to
// receive. When the sub-packet has gone, done pulses for one clock and, if
// pulse_en is high, irq pulses to interrupt the processor so that software can
// load the next sub-packet.
// Timing: each word takes 32*HALF clocks of shifting plus 4 clocks to fetch,
// load, check md_bsy and hand over, more while md_bsy is high.
// The GO, FIFO-emptying and end-of-packet interrupt follow the document; the use
// of MD_BSY as a per-word hold-off, of PULSE_EN as the interrupt enable and the
// link framing are this design's reading of the interface symbol.
module md_if
  import icu_pkg::*;
#(
  parameter int unsigned HALF = 2   // clocks per half bit period
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        go,
  input  logic        pulse_en,
  // MD FIFO read side
  output logic        fifo_rd,
  input  logic [15:0] fifo_q,
  input  logic        fifo_ef,
  // link to the MDP
  output logic        md_clk,
  output logic        md_ena,
  output logic        md_dat,
  input  logic        md_bsy,
  // status
  output logic        busy,
  output logic        done,
  output logic        irq
);
  tx_state_e   state;
  logic        load, sh_busy, sh_done;
  logic [15:0] word_q;

  ser_tx #(.WIDTH(16), .HALF(HALF)) u_sh (
    .clk, .rst, .load, .word(word_q), .busy(sh_busy), .done(sh_done),
    .sclk(md_clk), .sdat(md_dat)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      state  <= TX_IDLE;
      done   <= 1'b0;
      irq    <= 1'b0;
      word_q <= '0;
    end else begin
      done <= 1'b0;
      irq  <= 1'b0;
      unique case (state)
        TX_IDLE:  if (go && !fifo_ef) state <= TX_FETCH;
        TX_FETCH: state <= TX_LOAD;
        TX_LOAD: begin
          word_q <= fifo_q;
          state  <= TX_WAIT;
        end
        TX_WAIT:  if (!md_bsy) state <= TX_SHIFT;
        TX_SHIFT: if (sh_done) state <= fifo_ef ? TX_DONE : TX_FETCH;
        TX_DONE: begin
          state <= TX_IDLE;
          done  <= 1'b1;
          irq   <= pulse_en;
        end
        default:  state <= TX_IDLE;
      endcase
    end
  end

  assign fifo_rd = (state == TX_FETCH);
  assign load    = (state == TX_WAIT) && !md_bsy;
  assign md_ena  = (state != TX_IDLE) && (state != TX_DONE);
  assign busy    = (state != TX_IDLE);

  a_load_idle: assert property (@(posedge clk) disable iff (rst) load |-> !sh_busy);

endmodule
