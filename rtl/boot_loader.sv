// boot_loader: boot FPGA that copies the boot code from byte-wide PROM into the
// 48-bit program RAM while holding the DSP in reset.
//
// The DSP fetches 48-bit instructions, but the boot PROM is 8 bits wide. After
// reset this block reads the PROM bytes in order, packs every six consecutive
// bytes into one 48-bit word (first byte into bits 47:40, sixth into bits 7:0)
// and writes the word to program RAM, starting at address 0. When N_WORDS words
// have been written it releases dsp_rst and stays idle until the next reset.
// While it runs, dsp_rst (and so the rest of the ICU) is held in reset and it
// owns the program RAM port.
// Timing: prom_addr is presented and the byte taken PROM_WAIT+1 clocks later
// (the PROM's access time in clocks); one word therefore takes 6*(PROM_WAIT+1)+1
// clocks and the whole copy N_WORDS times that. With the 16k-byte PROM the copy
// is 2730 words (16380 bytes).
// Holding the DSP in reset and the byte-to-six-byte copy follow the document;
// the byte order, the start address and the wait count are this design's own.
module boot_loader #(
  parameter int unsigned PROM_BYTES = 16384,            // 16k x 8 PROM
  parameter int unsigned N_WORDS    = PROM_BYTES / 6,   // words copied
  parameter int unsigned PM_AW      = 17,               // 128k program RAM
  parameter int unsigned PROM_WAIT  = 2                 // PROM access, clocks
) (
  input  logic                          clk,
  input  logic                          rst,
  // PROM (byte wide)
  output logic [$clog2(PROM_BYTES)-1:0] prom_addr,
  output logic                          prom_oe,
  input  logic [7:0]                    prom_data,
  // program RAM write port
  output logic                          pm_we,
  output logic [PM_AW-1:0]              pm_addr,
  output logic [47:0]                   pm_wdata,
  // DSP reset (held high until the copy is done)
  output logic                          dsp_rst,
  output logic                          busy
);
  localparam int unsigned WW = $clog2(PROM_WAIT + 2);

  typedef enum logic [1:0] {B_READ, B_WRITE, B_DONE} bstate_e;

  bstate_e       state;
  logic [2:0]    nbyte;       // bytes packed into the current word
  logic [WW-1:0] wcnt;
  logic [PM_AW-1:0] waddr;

  always_ff @(posedge clk) begin
    if (rst) begin
      state     <= (N_WORDS == 0) ? B_DONE : B_READ;
      prom_addr <= '0;
      nbyte     <= '0;
      wcnt      <= '0;
      waddr     <= '0;
      pm_wdata  <= '0;
      pm_we     <= 1'b0;
      pm_addr   <= '0;
    end else begin
      pm_we <= 1'b0;
      unique case (state)
        B_READ: begin
          if (wcnt != WW'(PROM_WAIT)) begin
            wcnt <= wcnt + 1'b1;
          end else begin
            wcnt      <= '0;
            pm_wdata  <= {pm_wdata[39:0], prom_data};
            prom_addr <= prom_addr + 1'b1;
            if (nbyte == 3'd5) begin
              nbyte <= '0;
              state <= B_WRITE;
            end else begin
              nbyte <= nbyte + 1'b1;
            end
          end
        end
        B_WRITE: begin
          pm_we   <= 1'b1;
          pm_addr <= waddr;
          waddr   <= waddr + 1'b1;
          state   <= (waddr == PM_AW'(N_WORDS - 1)) ? B_DONE : B_READ;
        end
        B_DONE: ;
        default: state <= B_DONE;
      endcase
    end
  end

  assign prom_oe = (state == B_READ);
  assign busy    = (state != B_DONE) || pm_we;
  assign dsp_rst = busy;

endmodule
