// gtp_rx_pma: digital part of the receive PMA in bit-slide (PMA) mode.
//
// Wires the clock divider and shifter, the SIPO and the 1-bit barrel
// shifter: RXSLIDE moves the word boundary by one bit per request, by
// shifting the recovered clock phase for even counts and the data for odd
// counts. Clock and data recovery itself is analog and outside this module:
// it supplies HSCLK, the two samples per HSCLK period, and the divider phase
// at each lock (relock, lock_phase).
//
// Timing: a bit received on din is in the aligned word dout two RXRECCLK
// edges after the shift register holds it (register, then barrel register).
module gtp_rx_pma
  import serdes_pkg::*;
(
  input  logic       hsclk,
  input  logic       rst_n,
  input  logic [1:0] din,
  input  logic       relock,
  input  logic [2:0] lock_phase,
  input  logic       rxslide,
  output logic       rxrecclk,
  output sym_t       dout,
  output logic [3:0] slide_count
);

  logic bshift;
  sym_t par;

  rx_clk_div_shifter u_div (
    .hsclk, .rst_n, .relock, .lock_phase, .rxslide,
    .rxrecclk, .bshift, .slide_count
  );

  rx_sipo u_sipo (.hsclk, .rxrecclk, .rst_n, .din, .par);

  rx_barrel_shift u_bs (.rxrecclk, .rst_n, .bshift, .par, .dout);

endmodule
