// enc_8b10b: registered 8b/10b encoder with running-disparity control.
//
// On each clock with WT (write strobe / clock enable) high, the byte
// dtin = HGFEDCBA and the control flag kin are encoded into dtout =
// abcdei_fghj: EDCBA through the 5b/6b table, HGF through the 3b/4b table,
// both sub-blocks chosen from the current running disparity (the "RD
// control" block). The running disparity starts at RD- after reset and is
// updated from the disparity of each symbol sent. kerr flags a kin request
// for a byte that is not one of the twelve valid control characters; nd
// pulses with each new output symbol. force_disp/disp_in load the running
// disparity used for this symbol, and disp_out shows the disparity after it.
//
// Timing: one clock of latency, matching the one cycle given for the encoder
// in the transmitter latency budget. Port names of the data path follow the
// encoder block diagram (dtin, Kin, WT, Rstn, dtout, K error); the optional
// disparity controls and the nd flag follow the listed encoder features.
module enc_8b10b
  import serdes_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  wt,          // write strobe: encode dtin this cycle
  input  byte_t dtin,        // HGFEDCBA
  input  logic  kin,         // dtin is a control character
  input  logic  force_disp,  // use disp_in instead of the running disparity
  input  logic  disp_in,     // forced disparity, 1 = RD+
  output sym_t  dtout,       // abcdei_fghj, bit 9 = a sent first
  output logic  kerr,
  output logic  disp_out,    // running disparity after dtout, 1 = RD+
  output logic  nd           // dtout holds a new symbol
);

  logic rd_q;
  enc_t enc;

  always_comb enc = encode_8b10b(dtin, kin, force_disp ? disp_in : rd_q);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_q  <= 1'b0;                 // start at RD-
      dtout <= K28_5_RDM;
      kerr  <= 1'b0;
      nd    <= 1'b0;
    end else begin
      nd <= wt;
      if (wt) begin
        rd_q  <= enc.rd_out;
        dtout <= enc.code;
        kerr  <= enc.k_err;
      end
    end
  end

  assign disp_out = rd_q;

endmodule
