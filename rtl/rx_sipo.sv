// rx_sipo: serial-in parallel-out deserializer of the receive PMA.
//
// Clock recovery delivers two bits per HSCLK period, one sampled on each
// edge (double data rate); din[1] is the earlier bit. The 10-bit shift
// register takes both each HSCLK cycle, so after five cycles it holds a
// full word with the oldest bit in bit 9. On each rising edge of the
// recovered parallel clock RXRECCLK the 10-bit register captures the shift
// register: the phase of RXRECCLK therefore decides which bit of the stream
// lands in bit 0 of the parallel word.
//
// The DDR shift register and the 10-bit register follow the shift
// architecture of the reference; taking the two edge samples as a 2-bit bus
// on one HSCLK edge is this design's way of writing the DDR register as
// single-edge logic.
module rx_sipo
  import serdes_pkg::*;
(
  input  logic       hsclk,
  input  logic       rxrecclk,
  input  logic       rst_n,
  input  logic [1:0] din,
  output sym_t       par
);

  sym_t sr;

  always_ff @(posedge hsclk or negedge rst_n) begin
    if (!rst_n) sr <= '0;
    else        sr <= {sr[7:0], din[1], din[0]};
  end

  always_ff @(posedge rxrecclk or negedge rst_n) begin
    if (!rst_n) par <= '0;
    else        par <= sr;
  end

endmodule
