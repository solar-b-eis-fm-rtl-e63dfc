// sc_if: space-craft interface FPGA (SC_IF).
//
// One FPGA holds the three packet interfaces to the spacecraft's MDP: the
// command receiver (cmd_if), the status transmitter (st_if) and the
// mission-data transmitter (md_if), together with the control of their FIFOs.
// The FIFOs themselves are separate parts: three 4k x 9 for commands (written in
// parallel for software triple voting), one 4k x 9 for status bytes and two 4k x
// 9 in width expansion for 16-bit mission data.
//
// Processor side: the DSP reaches the FPGA over the top byte of its program
// memory data bus, PMD[47:40], with the strobes PMRD/PMWR and one select line per
// interface (CMD_CTL, ST_CTL, MD_CTL). The additional reg_sel input tells a
// control/status register access (1) from a FIFO data-port access (0); the FIFO
// data themselves travel on the wider bus outside this FPGA, and the FPGA only
// produces the FIFO strobes (cmd_rd, st_wr, md_wr) and resets.
//   register write, bits of PMD[47:40]: 0 GO (ST, MD), 1 reset the FIFO(s) and
//   the interface, 2 clear the sticky status flags.
//   status read (STAT_REG), returned on pmd_out one clock after PMRD:
//     CMD: 0 empty, 1 full, 2 receiving, 3 packet received, 4 overflow, 5 broken byte
//     ST : 0 empty, 1 full, 2 busy, 3 packet sent
//     MD : 0 empty, 1 full, 2 busy, 3 sub-packet sent, 4 MDP busy
// md_irq pulses at the end of each mission-data sub-packet when PULSE_EN is high.
// Every strobe is a single-clock pulse in the 20 MHz clock domain; the two clock
// inputs of the FPGA symbol (CMDST_CLK, MD_CLK) are both this one clock here.
// Which interfaces exist, their FIFO arrangement and the GO/interrupt behaviour
// follow the document; register layout and reg_sel are this design's own.
module sc_if
  import icu_pkg::*;
#(
  parameter int unsigned ST_HALF = 2,  // clocks per half bit, status link
  parameter int unsigned MD_HALF = 2   // clocks per half bit, mission-data link
) (
  input  logic        clk,
  input  logic        rst,
  // processor control
  input  logic [7:0]  pmd_in,     // PMD[47:40]
  output logic [7:0]  pmd_out,    // STAT_REG read data
  input  logic        pmrd,
  input  logic        pmwr,
  input  logic        pulse_en,
  input  logic        cmd_ctl,
  input  logic        st_ctl,
  input  logic        md_ctl,
  input  logic        reg_sel,
  // command FIFOs (x3)
  output logic        cmd_rst,
  output logic        cmd_wr,
  output logic        cmd_rd,
  input  logic [2:0]  cmd_ff,
  input  logic [2:0]  cmd_ef,
  output logic [8:0]  cmd_fifo,
  // status FIFO
  output logic        st_rst,
  output logic        st_wr,
  output logic        st_rd,
  input  logic        st_ff,
  input  logic        st_ef,
  input  logic [7:0]  st_fifo,
  // mission-data FIFOs (x2, width expansion)
  output logic        md_rst,
  output logic        md_wr,
  output logic        md_rd,
  input  logic [1:0]  md_ff,
  input  logic [1:0]  md_ef,
  input  logic [15:0] md_fifo,
  // links to / from the MDP
  input  logic        cmd_clk,
  input  logic        cmd_ena,
  input  logic        cmd_dat,
  output logic        st_clk,
  output logic        st_ena,
  output logic        st_dat,
  output logic        md_clk,
  output logic        md_ena,
  output logic        md_dat,
  input  logic        md_bsy,
  output logic        md_irq
);
  // register strobes
  wire wr_reg = pmwr & reg_sel;
  wire rd_reg = pmrd & reg_sel;

  logic st_go, md_go, cmd_clr, st_clr, md_clr;
  logic st_rst_q, md_rst_q, cmd_rst_q;

  assign st_go   = wr_reg & st_ctl  & pmd_in[SCIF_GO_BIT];
  assign md_go   = wr_reg & md_ctl  & pmd_in[SCIF_GO_BIT];
  assign cmd_clr = wr_reg & cmd_ctl & pmd_in[SCIF_CLR_BIT];
  assign st_clr  = wr_reg & st_ctl  & pmd_in[SCIF_CLR_BIT];
  assign md_clr  = wr_reg & md_ctl  & pmd_in[SCIF_CLR_BIT];

  // FIFO / interface resets: one clock long, from the system reset or a write.
  always_ff @(posedge clk) begin
    if (rst) begin
      cmd_rst_q <= 1'b1;
      st_rst_q  <= 1'b1;
      md_rst_q  <= 1'b1;
    end else begin
      cmd_rst_q <= wr_reg & cmd_ctl & pmd_in[SCIF_RST_BIT];
      st_rst_q  <= wr_reg & st_ctl  & pmd_in[SCIF_RST_BIT];
      md_rst_q  <= wr_reg & md_ctl  & pmd_in[SCIF_RST_BIT];
    end
  end
  assign cmd_rst = cmd_rst_q;
  assign st_rst  = st_rst_q;
  assign md_rst  = md_rst_q;

  // FIFO data-port strobes from the processor
  assign cmd_rd = pmrd & ~reg_sel & cmd_ctl;
  assign st_wr  = pmwr & ~reg_sel & st_ctl;
  assign md_wr  = pmwr & ~reg_sel & md_ctl;

  // ---------------------------------------------------------------- interfaces
  logic cmd_active, cmd_pkt, cmd_ovf, cmd_frag;
  logic st_busy, st_done, md_busy, md_done;

  cmd_if u_cmd (
    .clk, .rst(cmd_rst_q),
    .cmd_clk, .cmd_ena, .cmd_dat,
    .fifo_wr(cmd_wr), .fifo_d(cmd_fifo), .fifo_ff(cmd_ff),
    .clr(cmd_clr), .active(cmd_active), .pkt_done(cmd_pkt), .ovf(cmd_ovf),
    .frag(cmd_frag)
  );

  st_if #(.HALF(ST_HALF)) u_st (
    .clk, .rst(st_rst_q), .go(st_go),
    .fifo_rd(st_rd), .fifo_q(st_fifo), .fifo_ef(st_ef),
    .st_clk, .st_ena, .st_dat,
    .busy(st_busy), .done(st_done)
  );

  md_if #(.HALF(MD_HALF)) u_md (
    .clk, .rst(md_rst_q), .go(md_go), .pulse_en,
    .fifo_rd(md_rd), .fifo_q(md_fifo), .fifo_ef(|md_ef),
    .md_clk, .md_ena, .md_dat, .md_bsy,
    .busy(md_busy), .done(md_done), .irq(md_irq)
  );

  // ------------------------------------------------------------ status registers
  logic st_sent, md_sent;
  always_ff @(posedge clk) begin
    if (rst) begin
      st_sent <= 1'b0;
      md_sent <= 1'b0;
      pmd_out <= '0;
    end else begin
      if (st_clr)  st_sent <= 1'b0;
      if (st_done) st_sent <= 1'b1;
      if (md_clr)  md_sent <= 1'b0;
      if (md_done) md_sent <= 1'b1;
      pmd_out <= '0;
      if (rd_reg && cmd_ctl)
        pmd_out <= {2'b00, cmd_frag, cmd_ovf, cmd_pkt, cmd_active, |cmd_ff, &cmd_ef};
      else if (rd_reg && st_ctl)
        pmd_out <= {4'b0000, st_sent, st_busy, st_ff, st_ef};
      else if (rd_reg && md_ctl)
        pmd_out <= {3'b000, md_bsy, md_sent, md_busy, |md_ff, |md_ef};
    end
  end

  // Only one interface is selected at a time.
  a_one_sel: assert property (@(posedge clk) disable iff (rst)
                              (pmrd | pmwr) |-> $onehot0({cmd_ctl, st_ctl, md_ctl}));

endmodule
