// gtp_tx_pma: transmit serializer (PISO) with parallel-clock phase adjust.
//
// Runs on the serial bit clock. A modulo-10 counter stands for the parallel
// clock XCLK that the shared PLL derives from the serial clock: its count
// 0 is the XCLK edge, where the PISO shift register loads the 10-bit code
// group; on the other nine bit clocks it shifts left, sending bit 9 ('a')
// first. At power-up the counter starts at xclk_phase, an arbitrary phase
// given by the PLL, so the load instant, and with it the latency, would vary.
// While txphase is high the phase-adjust circuit watches TXUSRCLK (sampled
// through two flops) and, on each rising edge it sees, sets the counter so
// that the load falls LOAD_OFFSET bit clocks after that edge; XCLK then
// keeps that phase because both clocks come from the same reference.
//
// Timing: with the phase adjusted, a code group registered on a TXUSRCLK
// edge is loaded LOAD_OFFSET bit clocks later and its bit 'a' is on ser_out
// from the following bit clock. Modelling XCLK as a count in the serial clock
// domain, and the offset value, are this design's choices; the reference
// describes the PISO, the phase-adjust block and the TXPHASE control but not
// their circuits.
module gtp_tx_pma
  import serdes_pkg::*;
#(
  parameter int unsigned LOAD_OFFSET = 5   // bit clocks from TXUSRCLK edge to load
) (
  input  logic       serclk,
  input  logic       rst_n,
  input  logic [3:0] xclk_phase,   // power-up phase of XCLK, 0..9
  input  logic       txusrclk,     // sampled as data for the phase detector
  input  logic       txphase,
  input  sym_t       txpar,
  output logic       ser_out,
  output logic       xclk_load     // XCLK edge: PISO loads this bit clock
);

  // the TXUSRCLK edge is seen 3 bit clocks late (two sync flops + edge flop)
  localparam int unsigned SEEN_DELAY = 3;
  localparam logic [3:0]  ALIGN_CNT  = 4'((10 + SEEN_DELAY - LOAD_OFFSET) % 10);

  logic [3:0] cnt;
  logic       usr_q1, usr_q2, usr_q3, ph_q1, ph_q2;
  sym_t       sr;
  logic       usr_rise;

  assign usr_rise  = usr_q2 && !usr_q3;
  assign xclk_load = (cnt == 4'd0);

  always_ff @(posedge serclk or negedge rst_n) begin
    if (!rst_n) begin
      cnt    <= (xclk_phase > 4'd9) ? 4'd0 : xclk_phase;
      usr_q1 <= 1'b0;
      usr_q2 <= 1'b0;
      usr_q3 <= 1'b0;
      ph_q1  <= 1'b0;
      ph_q2  <= 1'b0;
      sr     <= '0;
    end else begin
      usr_q1 <= txusrclk;
      usr_q2 <= usr_q1;
      usr_q3 <= usr_q2;
      ph_q1  <= txphase;
      ph_q2  <= ph_q1;
      if (ph_q2 && usr_rise) cnt <= (ALIGN_CNT == 4'd9) ? 4'd0 : ALIGN_CNT + 4'd1;
      else                   cnt <= (cnt == 4'd9) ? 4'd0 : cnt + 4'd1;
      if (xclk_load) sr <= txpar;
      else           sr <= {sr[8:0], 1'b0};
    end
  end

  assign ser_out = sr[9];

endmodule
