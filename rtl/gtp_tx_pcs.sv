// gtp_tx_pcs: transmit physical coding sublayer in the fixed-latency setup.
//
// The byte and control flag from the fabric are registered by the FPGA
// interface, 8b/10b encoded by the internal encoder, and passed to the
// serializer through the register that bypasses the transmit FIFO. The FIFO
// itself is not needed: once the phase-align circuit has put the serializer's
// parallel clock on TXUSRCLK the two domains have the same frequency and a
// fixed phase.
//
// Runs on TXUSRCLK. Latency is three clocks (interface 1, encoder 1, FIFO
// bypass 1), the figures of the transmitter latency budget. The stage order
// follows the transceiver block diagram.
module gtp_tx_pcs
  import serdes_pkg::*;
(
  input  logic  txusrclk,
  input  logic  rst_n,
  input  byte_t txdata,
  input  logic  is_k,
  output sym_t  txpar,      // 10-bit code group to the serializer
  output logic  kerr        // control flag for a byte with no control code
);

  byte_t data_q;
  logic  k_q;
  sym_t  enc_q;
  logic  kerr_q, disp_unused, nd_unused;

  // FPGA interface register
  always_ff @(posedge txusrclk or negedge rst_n) begin
    if (!rst_n) begin
      data_q <= K28_5;
      k_q    <= 1'b1;
    end else begin
      data_q <= txdata;
      k_q    <= is_k;
    end
  end

  enc_8b10b u_enc (
    .clk(txusrclk), .rst_n, .wt(1'b1), .dtin(data_q), .kin(k_q),
    .force_disp(1'b0), .disp_in(1'b0),
    .dtout(enc_q), .kerr(kerr_q), .disp_out(disp_unused), .nd(nd_unused)
  );

  // FIFO bypass register
  always_ff @(posedge txusrclk or negedge rst_n) begin
    if (!rst_n) begin
      txpar <= K28_5_RDM;
      kerr  <= 1'b0;
    end else begin
      txpar <= enc_q;
      kerr  <= kerr_q;
    end
  end

endmodule
