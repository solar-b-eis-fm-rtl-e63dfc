// power_latch: output latch for the bi-level power switching commands.
//
// The monitor board switches the heaters and the ROE/MHC power lines with
// bi-level (on/off) commands held in a latch that the processor writes. This
// block is that latch: a write strobe loads all N_OUT command bits at once,
// reads return the latched value one clock after rd, and reset turns every
// output off. Each output drives one switch. The latch and its bi-level outputs
// follow the document; the number of outputs and the all-off reset state are
// this design's choices.
module power_latch #(
  parameter int unsigned N_OUT = 8
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             wr,
  input  logic             rd,
  input  logic [N_OUT-1:0] wdata,
  output logic [N_OUT-1:0] rdata,
  output logic [N_OUT-1:0] sw
);
  always_ff @(posedge clk) begin
    if (rst) begin
      sw    <= '0;
      rdata <= '0;
    end else begin
      if (wr) sw <= wdata;
      rdata <= rd ? sw : '0;
    end
  end
endmodule
