// dec_10b8b: registered 10b/8b decoder for the fabric receive path.
//
// Each clock with din_valid high, the code group din = abcdei_fghj is mapped
// back to HGFEDCBA by inverse lookup of the 5b/6b and 3b/4b sub-blocks, and
// is_k is raised for a control character. The decoder tracks the running
// disparity (RD- after reset): disp_err flags a valid code group of the wrong
// disparity, code_err one that is not in the code at all. After a
// disparity error the running disparity follows the received symbol, so a
// single error is not repeated on the following symbols.
//
// Timing: one clock of latency, the one cycle given for the decoder in the
// receiver latency budget. The decoder sits in the fabric, outside the
// transceiver, and works on the raw aligned data; its internal structure is
// this design's own (the reference only says it is similar to a published
// decoder), built on the same code tables as the encoder.
module dec_10b8b
  import serdes_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  din_valid,
  input  sym_t  din,
  output byte_t dout,
  output logic  is_k,
  output logic  code_err,
  output logic  disp_err,
  output logic  dout_valid
);

  logic rd_q;
  dec_t dec;

  always_comb dec = decode_10b8b(din, rd_q);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_q       <= 1'b0;
      dout       <= '0;
      is_k       <= 1'b0;
      code_err   <= 1'b0;
      disp_err   <= 1'b0;
      dout_valid <= 1'b0;
    end else begin
      dout_valid <= din_valid;
      if (din_valid) begin
        dout     <= dec.data;
        is_k     <= dec.is_k;
        code_err <= dec.code_err;
        disp_err <= dec.disp_err;
        if (!dec.code_err) rd_q <= dec.rd_out;
      end
    end
  end

endmodule
