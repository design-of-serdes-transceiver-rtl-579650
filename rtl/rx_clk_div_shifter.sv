// rx_clk_div_shifter: recovered-clock divider and phase shifter of the
// receive PMA, driven by RXSLIDE.
//
// The high-speed clock HSCLK from clock recovery runs at half the bit rate.
// It is divided by 5 to the parallel rate and the divided clock is fed
// through a 5-bit shift register, so the five taps are the same clock
// delayed by 0..4 HSCLK periods (2 UI apart). A modulo-10 counter counts
// RXSLIDE requests: bits Q[3:1] select the tap that becomes the recovered
// parallel clock RXRECCLK, and Q[0] tells the 1-bit barrel shifter to add
// one more bit of shift. Each RXSLIDE therefore moves the word boundary one
// bit later in the stream: every even count by a 2-UI step of the clock
// phase, every odd count by the barrel shifter.
//
// A pulse on relock models a new lock of the clock recovery after a
// transceiver reset: the divide-by-5 counter takes the arbitrary phase
// lock_phase and the slide counter returns to 0. The selected tap is
// re-registered on HSCLK so that RXRECCLK is glitch-free when the tap
// changes (a phase step only stretches one period).
//
// Interface: rxslide is sampled on RXRECCLK, one slide per clock it is high.
// The structure (÷5, 5-bit shift register, tap multiplexer, modulo-10 counter
// with Q(0) and Q(3:1)) is the shift architecture of the reference; the
// 2/3 duty cycle, the output register and the relock input are this design's.
module rx_clk_div_shifter (
  input  logic       hsclk,
  input  logic       rst_n,
  input  logic       relock,       // HSCLK domain: new lock of the recovery
  input  logic [2:0] lock_phase,   // divider phase at that lock, 0..4
  input  logic       rxslide,      // RXRECCLK domain
  output logic       rxrecclk,
  output logic       bshift,       // Q(0): barrel shifter active
  output logic [3:0] slide_count   // Q: 0..9
);

  logic [2:0] div_cnt;
  logic       div_clk;
  logic [4:0] taps;
  logic [3:0] q;
  logic       relock_q1, relock_q2;   // relock seen in the RXRECCLK domain

  assign div_clk = (div_cnt < 3'd2);

  always_ff @(posedge hsclk or negedge rst_n) begin
    if (!rst_n) begin
      div_cnt  <= '0;
      taps     <= '0;
      rxrecclk <= 1'b0;
    end else begin
      if (relock)                div_cnt <= (lock_phase > 3'd4) ? 3'd0 : lock_phase;
      else if (div_cnt == 3'd4)  div_cnt <= '0;
      else                       div_cnt <= div_cnt + 3'd1;
      taps     <= {taps[3:0], div_clk};
      rxrecclk <= taps[(q[3:1] > 3'd4) ? 3'd0 : q[3:1]];
    end
  end

  // Relock is a pulse on HSCLK; stretch it so the slower clock sees it.
  logic [2:0] relock_hold;
  always_ff @(posedge hsclk or negedge rst_n) begin
    if (!rst_n)      relock_hold <= '0;
    else if (relock) relock_hold <= 3'd7;
    else if (relock_hold != 0) relock_hold <= relock_hold - 3'd1;
  end

  always_ff @(posedge rxrecclk or negedge rst_n) begin
    if (!rst_n) begin
      relock_q1 <= 1'b0;
      relock_q2 <= 1'b0;
      q         <= '0;
    end else begin
      relock_q1 <= (relock_hold != 0);
      relock_q2 <= relock_q1;
      if (relock_q1 && !relock_q2) q <= '0;
      else if (rxslide)            q <= (q == 4'd9) ? 4'd0 : q + 4'd1;
    end
  end

  assign bshift      = q[0];
  assign slide_count = q;

endmodule
