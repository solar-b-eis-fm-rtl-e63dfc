// sram: single-port static RAM, one access per clock.
//
// One module serves every RAM of the ICU: the 128k x 48-bit program RAM (the
// default size), the 128k x 32-bit data RAM, the 512k x 16-bit working RAM and
// the two 2M x 16-bit CCD buffer pages. cs selects the part; with we high the
// word on d is written at addr, with we low the word at addr appears on q on the
// next clock. The real parts are asynchronous SRAMs with zero (program and data
// RAM) or three (working RAM) wait states at 20 MHz; this model is synchronous
// with one clock of read latency, which is this design's simplification.
module sram #(
  parameter int unsigned DEPTH = 131072,
  parameter int unsigned WIDTH = 48
) (
  input  logic                     clk,
  input  logic                     cs,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] addr,
  input  logic [WIDTH-1:0]         d,
  output logic [WIDTH-1:0]         q
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (cs) begin
      if (we) mem[addr] <= d;
      else    q         <= mem[addr];
    end
  end

endmodule
