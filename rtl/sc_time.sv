// sc_time: space-craft time counter.
//
// A 32-bit counter that advances by one every TICK_DIV system clocks, so the
// default counts microseconds at 20 MHz. Software can load it (load strobe with
// the new value on wdata, taking effect on the next clock) and read it (rd
// strobe; rdata holds the count sampled at that clock from the following clock
// on, so a 32-bit read is consistent). tick pulses for one clock each time the
// counter advances. The 32-bit width follows the document; the tick rate and the
// load/read interface are this design's choices, the rate being left open there.
module sc_time #(
  parameter int unsigned TICK_DIV = 20   // system clocks per count
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        load,
  input  logic [31:0] wdata,
  input  logic        rd,
  output logic [31:0] rdata,
  output logic        tick
);
  localparam int unsigned DW = (TICK_DIV > 1) ? $clog2(TICK_DIV) : 1;

  logic [DW-1:0] div;
  logic [31:0]   count;

  always_ff @(posedge clk) begin
    if (rst) begin
      div   <= '0;
      count <= '0;
      rdata <= '0;
      tick  <= 1'b0;
    end else begin
      tick <= 1'b0;
      if (load) begin
        count <= wdata;
        div   <= '0;
      end else if (div == DW'(TICK_DIV - 1)) begin
        div   <= '0;
        count <= count + 1'b1;
        tick  <= 1'b1;
      end else begin
        div <= div + 1'b1;
      end
      if (rd) rdata <= count;
    end
  end

endmodule
