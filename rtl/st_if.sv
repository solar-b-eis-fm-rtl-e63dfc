// st_if: status interface (ST_IF) transmitter of the S/C interface FPGA.
//
// Software writes one complete status packet, byte by byte, into the 4k x 9 ST
// FIFO (only the low 8 bits are used) and then issues GO. The interface then
// reads the FIFO until it is empty and sends every byte to the MDP on the
// three-wire link: st_ena is high for the whole packet, st_clk toggles while it
// is high and st_dat carries the bytes msb first, changing on the falling edge.
// Timing: a GO with a non-empty FIFO raises st_ena on the next clock; each byte
// takes 16*HALF clocks of shifting (2*HALF per bit) plus 3 clocks to fetch it,
// load it and hand over to the next byte; done pulses once when the packet has gone and busy drops. A GO while busy or
// with an empty FIFO is ignored. No interrupt is raised, as the document notes
// a status packet is only sent in reply to a command.
// The GO-driven FIFO-to-MDP behaviour follows the document; the link framing
// (enable over the whole packet, msb first, data on the falling clock edge) is
// borrowed from the ICU's CCD link description because the ICD it cites is not
// reproduced.
module st_if
  import icu_pkg::*;
#(
  parameter int unsigned HALF = 2   // clocks per half bit period
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       go,
  // ST FIFO read side
  output logic       fifo_rd,
  input  logic [7:0] fifo_q,
  input  logic       fifo_ef,
  // link to the MDP
  output logic       st_clk,
  output logic       st_ena,
  output logic       st_dat,
  // status
  output logic       busy,
  output logic       done
);
  tx_state_e state;
  logic      load, sh_busy, sh_done;

  ser_tx #(.WIDTH(8), .HALF(HALF)) u_sh (
    .clk, .rst, .load, .word(fifo_q), .busy(sh_busy), .done(sh_done),
    .sclk(st_clk), .sdat(st_dat)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= TX_IDLE;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        TX_IDLE:  if (go && !fifo_ef) state <= TX_FETCH;
        TX_FETCH: state <= TX_LOAD;
        TX_LOAD:  state <= TX_SHIFT;
        TX_SHIFT: if (sh_done) state <= fifo_ef ? TX_DONE : TX_FETCH;
        TX_DONE: begin
          state <= TX_IDLE;
          done  <= 1'b1;
        end
        default:  state <= TX_IDLE;
      endcase
    end
  end

  assign fifo_rd = (state == TX_FETCH);
  assign load    = (state == TX_LOAD);
  assign st_ena  = (state != TX_IDLE) && (state != TX_DONE);
  assign busy    = (state != TX_IDLE);

  // The shifter is only loaded when it is idle.
  a_load_idle: assert property (@(posedge clk) disable iff (rst) load |-> !sh_busy);

endmodule
