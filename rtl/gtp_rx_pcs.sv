// gtp_rx_pcs: receive physical coding sublayer in the fixed-latency setup.
//
// The internal comma detector/aligner and the internal 10b/8b decoder are
// bypassed, so raw 10-bit words leave the transceiver for the fabric. The
// words pass the comma-detector bypass pipeline (3 clocks), the elastic
// buffer from the recovered-clock domain into the RXUSRCLK domain, and the
// two-register FPGA interface. The elastic buffer's start threshold is set so
// its latency is 5 clocks when both sides run on the same clock, as they do
// when RXUSRCLK is driven by the recovered clock.
//
// Timing: with rxusrclk = rxrecclk, a word on din appears on rxdata 10
// clocks later (3 + 5 + 2), the figures of the receiver latency budget for
// these three stages. Both sides are reset by rst_n.
module gtp_rx_pcs
  import serdes_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH  = 8,
  parameter int unsigned START_LEVEL = 1
) (
  input  logic rxrecclk,
  input  logic rxusrclk,
  input  logic rst_n,
  input  sym_t din,
  output sym_t rxdata,
  output logic rxdata_valid,
  output logic buf_err          // elastic buffer over- or underflow
);

  sym_t bypass_q [3];
  sym_t fifo_dout;
  logic fifo_valid, ovf, unf;
  sym_t if_q1;
  logic if_v1;

  always_ff @(posedge rxrecclk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 3; i++) bypass_q[i] <= '0;
    end else begin
      bypass_q[0] <= din;
      bypass_q[1] <= bypass_q[0];
      bypass_q[2] <= bypass_q[1];
    end
  end

  elastic_buffer #(.WIDTH(SYM_W), .DEPTH(FIFO_DEPTH), .START_LEVEL(START_LEVEL)) u_buf (
    .wr_clk(rxrecclk), .wr_rst_n(rst_n), .wr_en(1'b1), .din(bypass_q[2]), .overflow(ovf),
    .rd_clk(rxusrclk), .rd_rst_n(rst_n), .dout(fifo_dout), .dout_valid(fifo_valid),
    .underflow(unf)
  );

  // FPGA interface: two registers
  always_ff @(posedge rxusrclk or negedge rst_n) begin
    if (!rst_n) begin
      if_q1        <= '0;
      if_v1        <= 1'b0;
      rxdata       <= '0;
      rxdata_valid <= 1'b0;
    end else begin
      if_q1        <= fifo_dout;
      if_v1        <= fifo_valid;
      rxdata       <= if_q1;
      rxdata_valid <= if_v1;
    end
  end

  assign buf_err = ovf | unf;

endmodule
