// icu_pkg: constants and types shared by the ICU digital electronics.
//
// The ICU runs from one 20 MHz clock (the DSP clock rate the design is built
// around). The S/C interface FIFOs are 4k deep and 9 bits wide; the CCD buffer
// pages hold 2M 16-bit words, cut into four equal address ranges selected by the
// two ID bits at the top of every CCD word. Register bit assignments for the
// processor-visible control registers are this design's own and are listed here
// so that RTL and testbenches agree on them.
package icu_pkg;

  // CCD word: bits 15:14 are the image-area ID, bits 13:0 are pixel data.
  typedef struct packed {
    logic [1:0]  id;
    logic [13:0] pix;
  } ccd_word_t;

  // S/C interface control register (written through PMD[47:40]).
  localparam int unsigned SCIF_GO_BIT   = 0;  // start transmission (ST, MD)
  localparam int unsigned SCIF_RST_BIT  = 1;  // reset the interface's FIFO(s)
  localparam int unsigned SCIF_CLR_BIT  = 2;  // clear sticky status flags

  // Watchdog control register bits (write).
  localparam int unsigned WD_KICK_BIT   = 0;  // counter reset
  localparam int unsigned WD_CLRF_BIT   = 1;  // reset WARM-REBOOT flag
  localparam int unsigned WD_ENWR_BIT   = 2;  // write-enable strobe for enable
  localparam int unsigned WD_ENVAL_BIT  = 3;  // enable value written
  // Watchdog status register bits (read).
  localparam int unsigned WD_FLAG_BIT   = 0;  // WARM-REBOOT flag
  localparam int unsigned WD_EN_BIT     = 1;  // watchdog enabled

  // Transmit-interface state, shared by the ST and MD interfaces.
  typedef enum logic [2:0] {
    TX_IDLE,   // waiting for GO
    TX_FETCH,  // read one word from the FIFO
    TX_LOAD,   // FIFO data valid, load the shifter
    TX_WAIT,   // MD only: wait while the MDP is busy
    TX_SHIFT,  // shifting one word out
    TX_DONE    // FIFO empty, packet finished
  } tx_state_e;

endpackage
