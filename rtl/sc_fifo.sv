// sc_fifo: synchronous first-in first-out buffer, 4k x 9 bits by default.
//
// Models the 4k x 9-bit FIFO parts on the S/C interface: three hold incoming
// command bytes, one outgoing status bytes, and two side by side (width
// expansion) give the 16-bit mission-data FIFO. One write and one read port on
// the same clock; wr and rd are single-cycle strobes. A read strobe presents the
// next word on q one clock later (registered output, like the part's output
// register). ff is the full flag, ef the empty flag; a write while full and a
// read while empty are ignored. rst empties the FIFO (the part's reset pin).
// Depth and width follow the part; the synchronous single-clock behaviour is this
// design's choice.
module sc_fifo #(
  parameter int unsigned DEPTH = 4096,
  parameter int unsigned WIDTH = 9
) (
  input  logic             clk,
  input  logic             rst,     // synchronous, empties the FIFO
  input  logic             wr,
  input  logic [WIDTH-1:0] d,
  input  logic             rd,
  output logic [WIDTH-1:0] q,
  output logic             ff,      // full
  output logic             ef       // empty
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wp, rp;
  logic [AW:0]      cnt;

  wire do_wr = wr && (cnt != (AW+1)'(DEPTH));
  wire do_rd = rd && (cnt != '0);

  always_ff @(posedge clk) begin
    if (do_wr) mem[wp] <= d;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wp  <= '0;
      rp  <= '0;
      cnt <= '0;
      q   <= '0;
    end else begin
      if (do_wr) wp <= (wp == AW'(DEPTH-1)) ? '0 : wp + 1'b1;
      if (do_rd) begin
        q  <= mem[rp];
        rp <= (rp == AW'(DEPTH-1)) ? '0 : rp + 1'b1;
      end
      cnt <= cnt + (AW+1)'(do_wr) - (AW+1)'(do_rd);
    end
  end

  assign ff = (cnt == (AW+1)'(DEPTH));
  assign ef = (cnt == '0);

endmodule
