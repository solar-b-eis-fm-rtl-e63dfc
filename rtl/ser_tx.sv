// ser_tx: shifts one WIDTH-bit word out on a clock/data pair, msb first.
//
// Helper of the status and mission-data interfaces. A load strobe takes word and
// starts the shift; each bit is put on sdat while sclk is low and held through
// the following high phase, so the receiver samples on the rising edge and the
// data changes on the falling edge, as the ICU's three-wire links do. Each phase
// lasts HALF clocks, so one bit takes 2*HALF clocks. sclk rests low between
// words. busy is high from load until the last bit's high phase has ended;
// done pulses for one clock at that point. The enable line of the link is driven
// by the interface that uses this shifter.
module ser_tx #(
  parameter int unsigned WIDTH = 8,
  parameter int unsigned HALF  = 2
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             load,
  input  logic [WIDTH-1:0] word,
  output logic             busy,
  output logic             done,
  output logic             sclk,
  output logic             sdat
);
  localparam int unsigned BW = $clog2(WIDTH + 1);
  localparam int unsigned HW = $clog2(HALF + 1);

  logic [WIDTH-1:0] sh;
  logic [BW-1:0]    bits_left;
  logic [HW-1:0]    tcnt;

  always_ff @(posedge clk) begin
    if (rst) begin
      sh        <= '0;
      bits_left <= '0;
      tcnt      <= '0;
      busy      <= 1'b0;
      done      <= 1'b0;
      sclk      <= 1'b0;
    end else begin
      done <= 1'b0;
      if (load && !busy) begin
        sh        <= word;
        bits_left <= BW'(WIDTH);
        tcnt      <= HW'(HALF - 1);
        busy      <= 1'b1;
        sclk      <= 1'b0;
      end else if (busy) begin
        if (tcnt != '0) begin
          tcnt <= tcnt - 1'b1;
        end else begin
          tcnt <= HW'(HALF - 1);
          if (!sclk) begin
            sclk <= 1'b1;                      // rising edge: bit is sampled
          end else begin
            sclk      <= 1'b0;                 // falling edge: next bit
            sh        <= {sh[WIDTH-2:0], 1'b0};
            bits_left <= bits_left - 1'b1;
            if (bits_left == BW'(1)) begin
              busy <= 1'b0;
              done <= 1'b1;
            end
          end
        end
      end
    end
  end

  assign sdat = sh[WIDTH-1];

endmodule
