// rx_barrel_shift: 1-bit barrel shifter after the deserializer.
//
// The clock phase of the deserializer can only move in 2-UI steps, so odd
// bit slips are completed here. The previous parallel word is held in a
// register on RXRECCLK; with bshift low the output is that word (bits 9..0),
// with bshift high it is bits 8..0 of it followed by bit 9 of the current
// word, i.e. the word one bit later in the stream. Either way the output has
// one RXRECCLK of latency, and the odd alignment is 1 UI earlier than the
// even one.
//
// The two multiplexer inputs (9..0 and 8..0,9) and the select from the
// slide counter's Q(0) follow the shift architecture of the reference;
// taking bit 9 from the following word, so that the shift is a true bit
// slip, is this design's reading of it.
module rx_barrel_shift
  import serdes_pkg::*;
(
  input  logic rxrecclk,
  input  logic rst_n,
  input  logic bshift,
  input  sym_t par,
  output sym_t dout
);

  sym_t prev;

  always_ff @(posedge rxrecclk or negedge rst_n) begin
    if (!rst_n) prev <= '0;
    else        prev <= par;
  end

  assign dout = bshift ? {prev[8:0], par[9]} : prev;

endmodule
