// ccd_buf_ctl: CCD data buffer and high-speed link control FPGA.
//
// Two high-speed links bring CCD words from the camera. Each 16-bit word carries
// in bits 15:14 the ID of the CCD read-out port it came from and in bits 13:0
// the pixel value. The controller "auto-sorts" the words: the ID picks one of
// four equal address ranges of the CCD buffer page and each range has its own
// write pointer, so data of each read-out port lands contiguously in its own
// block whichever link carried it. The stored word is the full 16-bit word.
//
// The buffer has two pages (two SRAM banks of PAGE_DEPTH x 16). At any time one
// page belongs to the links and the other to the DSP; a write of the switch bit
// by software swaps them, so the previous exposure can be processed while the
// next one is streamed in. On a swap the four write pointers are copied into
// the word-count registers (how many words of each range the DSP's new page
// holds) and cleared.
//
// The two links share the page's single write port: each received word is held
// in a one-word buffer per link and written in the next free clock, link 0
// first. A word whose range is full is dropped and flags an overflow.
//
// DSP side: dsp_cs/dsp_we/dsp_addr/dsp_wdata reach the DSP's page directly,
// read data (dsp_rdata) one clock later. Register port (reg_wr/reg_rd, 3-bit
// reg_addr, 16-bit write data, 32-bit read data one clock later):
//   write addr 0: bit 0 swap pages, bit 1 clear sticky flags
//   read  addr 0: 0 link page, 1/2 end of exposure seen on link 0/1,
//                 3 overflow, 4/5 link 0/1 active
//   read  addr 4..7: word count of range 0..3 in the DSP's page
// The two links, four ranges selected by the ID bits, two pages and ICU-driven
// page switching follow the document; the arbitration, pointers, word-count
// registers and register layout are this design's choices.
module ccd_buf_ctl #(
  parameter int unsigned PAGE_DEPTH = 2097152,  // 2M words per page
  parameter int unsigned EOE_CLKS   = 200,
  localparam int unsigned PAW = $clog2(PAGE_DEPTH),
  localparam int unsigned RAW = PAW - 2
) (
  input  logic            clk,
  input  logic            rst,
  // links 0 and 1 from the camera
  input  logic [1:0]      hsl_clk,
  input  logic [1:0]      hsl_ena,
  input  logic [1:0]      hsl_dat,
  // DSP data-memory side
  input  logic            dsp_cs,
  input  logic            dsp_we,
  input  logic [PAW-1:0]  dsp_addr,
  input  logic [15:0]     dsp_wdata,
  output logic [15:0]     dsp_rdata,
  input  logic            reg_wr,
  input  logic            reg_rd,
  input  logic [2:0]      reg_addr,
  input  logic [15:0]     reg_wdata,
  output logic [31:0]     reg_rdata,
  output logic            eoe_irq,     // pulses at each end of exposure
  // the two buffer pages
  output logic [1:0]      pg_cs,
  output logic [1:0]      pg_we,
  output logic [PAW-1:0]  pg_addr [2],
  output logic [15:0]     pg_d    [2],
  input  logic [15:0]     pg_q    [2]
);
  // ------------------------------------------------------------------ receivers
  logic [15:0] rx_word  [2];
  logic [1:0]  rx_valid, rx_active, rx_eoe;

  for (genvar l = 0; l < 2; l++) begin : g_rx
    hsl_rx #(.EOE_CLKS(EOE_CLKS)) u_rx (
      .clk, .rst,
      .hsl_clk(hsl_clk[l]), .hsl_ena(hsl_ena[l]), .hsl_dat(hsl_dat[l]),
      .word(rx_word[l]), .valid(rx_valid[l]), .active(rx_active[l]), .eoe(rx_eoe[l])
    );
  end

  // ------------------------------------------------------------- sort and write
  logic [1:0]   pend;
  logic [15:0]  pend_word [2];
  logic [RAW:0] ptr  [4];       // words written to each range (link page)
  logic [RAW:0] wcnt [4];       // words in each range of the DSP's page
  logic         link_page;      // page the links write; DSP has the other
  logic         ovf;
  logic [1:0]   eoe_seen;

  logic         wr_go;
  logic         wr_sel;         // link whose word is written
  logic [15:0]  wr_word;
  logic [1:0]   wr_id;
  logic         wr_full;

  always_comb begin
    wr_sel  = pend[0] ? 1'b0 : 1'b1;
    wr_word = pend_word[wr_sel];
    wr_id   = wr_word[15:14];
    wr_full = ptr[wr_id][RAW];
    wr_go   = (pend != '0) && !wr_full;
  end

  wire swap = reg_wr && (reg_addr == 3'd0) && reg_wdata[0];
  wire clrf = reg_wr && (reg_addr == 3'd0) && reg_wdata[1];

  always_ff @(posedge clk) begin
    if (rst) begin
      pend      <= '0;
      pend_word <= '{default: '0};
      ptr       <= '{default: '0};
      wcnt      <= '{default: '0};
      link_page <= 1'b0;
      ovf       <= 1'b0;
      eoe_seen  <= '0;
      eoe_irq   <= 1'b0;
    end else begin
      // retire the word written (or dropped) this clock
      if (pend != '0) begin
        pend[wr_sel] <= 1'b0;
        if (wr_go) ptr[wr_id] <= ptr[wr_id] + 1'b1;
        else       ovf        <= 1'b1;
      end
      // accept new words
      for (int l = 0; l < 2; l++) begin
        if (rx_valid[l]) begin
          if (pend[l] && !((pend != '0) && wr_sel == l[0])) ovf <= 1'b1;
          pend[l]      <= 1'b1;
          pend_word[l] <= rx_word[l];
        end
      end
      if (swap) begin
        link_page <= ~link_page;
        wcnt      <= ptr;
        ptr       <= '{default: '0};
      end
      if (clrf) begin
        ovf      <= 1'b0;
        eoe_seen <= '0;
      end
      for (int l = 0; l < 2; l++)
        if (rx_eoe[l]) eoe_seen[l] <= 1'b1;
      eoe_irq <= |rx_eoe;
    end
  end

  // ----------------------------------------------------------------- page ports
  logic dsp_page_q;
  always_ff @(posedge clk) dsp_page_q <= ~link_page;

  always_comb begin
    for (int p = 0; p < 2; p++) begin
      if (link_page == p[0]) begin
        pg_cs[p]   = wr_go;
        pg_we[p]   = 1'b1;
        pg_addr[p] = {wr_id, ptr[wr_id][RAW-1:0]};
        pg_d[p]    = wr_word;
      end else begin
        pg_cs[p]   = dsp_cs;
        pg_we[p]   = dsp_we;
        pg_addr[p] = dsp_addr;
        pg_d[p]    = dsp_wdata;
      end
    end
  end

  assign dsp_rdata = pg_q[dsp_page_q];

  // ------------------------------------------------------------------ registers
  always_ff @(posedge clk) begin
    if (rst) begin
      reg_rdata <= '0;
    end else begin
      reg_rdata <= '0;
      if (reg_rd) begin
        if (reg_addr[2])
          reg_rdata <= 32'(wcnt[reg_addr[1:0]]);
        else if (reg_addr == 3'd0)
          reg_rdata <= {26'b0, rx_active, ovf, eoe_seen, link_page};
      end
    end
  end

endmodule
