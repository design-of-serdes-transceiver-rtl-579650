// fl_link_top: fixed-latency 8b/10b serial link, transmitter and receiver.
//
// Transmit side (TXUSRCLK and serial bit clock): the payload generator sends
// a programmable stream of data and control characters with a periodic
// K28.5 comma; the transmit PCS registers, 8b/10b encodes and, with its FIFO
// bypassed, hands 10-bit groups to the serializer. The phase-align
// controller drives TXPHASE after PLL lock so the serializer's parallel
// clock takes a fixed phase to TXUSRCLK. tx_p/tx_n is the serial pair.
//
// Receive side (HSCLK from clock recovery, and the recovered clock): the
// receive PMA deserializes the two samples per HSCLK and moves the word
// boundary on RXSLIDE; the receive PCS passes raw words through its bypassed
// comma stage, elastic buffer and interface. RXUSRCLK/RXUSRCLK2 are driven
// by the recovered clock. The fabric comma aligner accepts only locks that
// need an even number of slides (resetting the receiver otherwise), slides
// into alignment and raises aligned; the fabric decoder then delivers the
// payload and IS_K.
//
// The analog and clocking parts are outside: the shared PLL (serclk,
// xclk_phase, pll_lock), the fabric DLL (txusrclk, ten bit periods, fixed
// phase to the reference), clock and data recovery (hsclk, rx_din,
// rx_relock, rx_lock_phase) and the line itself. rx_gtp_reset tells the
// clock recovery to lock again.
module fl_link_top
  import serdes_pkg::*;
#(
  parameter int unsigned PATTERN_DEPTH = 16,
  parameter int unsigned PHASE_CYCLES  = 8192
) (
  // transmitter clocks and control
  input  logic       serclk,
  input  logic       txusrclk,
  input  logic       tx_rst_n,
  input  logic       pll_lock,
  input  logic [3:0] xclk_phase,
  input  logic                             prog_we,
  input  logic [$clog2(PATTERN_DEPTH)-1:0] prog_addr,
  input  char_t                            prog_char,
  input  logic                             prog_len_we,
  input  logic [$clog2(PATTERN_DEPTH):0]   prog_len,
  output logic       tx_p,
  output logic       tx_n,
  output logic       tx_phase_done,
  output logic       tx_kerr,
  output byte_t      tx_payload,       // character entering the transmitter
  output logic       tx_payload_is_k,
  // receiver clocks and control
  input  logic       hsclk,
  input  logic       rx_rst_n,
  input  logic [1:0] rx_din,
  input  logic       rx_relock,
  input  logic [2:0] rx_lock_phase,
  output logic       rx_gtp_reset,
  output logic       rxrecclk,
  output byte_t      rx_payload,
  output logic       rx_is_k,
  output logic       rx_valid,
  output logic       rx_code_err,
  output logic       rx_disp_err,
  output logic       rx_buf_err,
  output logic       aligned,
  output logic [3:0] rx_last_n,
  output logic       rx_n_odd,
  output logic       rx_n_even,
  output logic       rx_slide,
  output logic [3:0] rx_slide_count
);

  // ---------------- transmitter ----------------
  sym_t txpar;
  logic txphase, xclk_load_unused, ser;
  logic first_unused;

  payload_gen #(.DEPTH(PATTERN_DEPTH)) u_gen (
    .clk(txusrclk), .rst_n(tx_rst_n), .en(1'b1),
    .prog_we, .prog_addr, .prog_char, .prog_len_we, .prog_len,
    .txdata(tx_payload), .is_k(tx_payload_is_k), .first(first_unused)
  );

  tx_phase_align_ctrl #(.PHASE_CYCLES(PHASE_CYCLES)) u_pa (
    .clk(txusrclk), .rst_n(tx_rst_n), .pll_lock, .txphase, .done(tx_phase_done)
  );

  gtp_tx_pcs u_txpcs (
    .txusrclk, .rst_n(tx_rst_n), .txdata(tx_payload), .is_k(tx_payload_is_k),
    .txpar, .kerr(tx_kerr)
  );

  gtp_tx_pma u_txpma (
    .serclk, .rst_n(tx_rst_n), .xclk_phase, .txusrclk, .txphase, .txpar,
    .ser_out(ser), .xclk_load(xclk_load_unused)
  );

  assign tx_p = ser;
  assign tx_n = ~ser;

  // ---------------- receiver ----------------
  sym_t pma_dout, rxdata;
  logic rxdata_valid;
  logic rx_gtp_rst_n;

  assign rx_gtp_rst_n = rx_rst_n & ~rx_gtp_reset;

  gtp_rx_pma u_rxpma (
    .hsclk, .rst_n(rx_rst_n), .din(rx_din), .relock(rx_relock), .lock_phase(rx_lock_phase),
    .rxslide(rx_slide), .rxrecclk, .dout(pma_dout), .slide_count(rx_slide_count)
  );

  gtp_rx_pcs u_rxpcs (
    .rxrecclk, .rxusrclk(rxrecclk), .rst_n(rx_gtp_rst_n), .din(pma_dout),
    .rxdata, .rxdata_valid, .buf_err(rx_buf_err)
  );

  comma_aligner u_align (
    .clk(rxrecclk), .rst_n(rx_rst_n), .rxdata, .rxdata_valid,
    .rxslide(rx_slide), .gtp_reset(rx_gtp_reset), .aligned,
    .last_n(rx_last_n), .n_odd_seen(rx_n_odd), .n_even_seen(rx_n_even)
  );

  dec_10b8b u_dec (
    .clk(rxrecclk), .rst_n(rx_rst_n), .din_valid(rxdata_valid & aligned), .din(rxdata),
    .dout(rx_payload), .is_k(rx_is_k), .code_err(rx_code_err), .disp_err(rx_disp_err),
    .dout_valid(rx_valid)
  );

endmodule
