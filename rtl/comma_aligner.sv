// comma_aligner: fabric comma detector and aligner for fixed-latency lock.
//
// Works on the raw (still encoded) 10-bit words from the receiver. After a
// lock it looks for a comma (the 7-bit sequence 0011111 or 1100000 that
// starts K28.1/5/7) in the 20-bit window of the previous and the current
// word. The comma's bit offset n (0..9) in that window is the number of
// one-bit slides that bring the word boundary onto the symbol boundary. The
// deserializer can move its clock only in 2-UI steps, so a lock with n odd
// would leave the barrel shifter in use and the clock in a different phase
// from a lock with n even. To keep one fixed phase:
//   - n odd : reset the transceiver (gtp_reset for RESET_CYCLES) and wait
//             LOCK_WAIT clocks for clock recovery to lock again;
//   - n even: pulse rxslide n times, SLIDE_GAP clocks apart, which moves the
//             recovered clock by n UI and leaves the barrel shifter idle;
//             after SETTLE clocks for the pipeline to refill, raise aligned.
// While aligned, a comma found at a non-zero offset means the alignment was
// lost and the sequence starts again with a reset.
//
// Runs on RXUSRCLK2 (the recovered clock). The algorithm is the reference's;
// the comma window, the wait and gap lengths and the loss-of-alignment check
// are this design's choices. last_n, n_odd_seen and n_even_seen report what
// happened for monitoring.
module comma_aligner
  import serdes_pkg::*;
#(
  parameter int unsigned RESET_CYCLES = 8,
  parameter int unsigned LOCK_WAIT    = 32,
  parameter int unsigned SLIDE_GAP    = 4,
  parameter int unsigned SETTLE       = 32
) (
  input  logic       clk,
  input  logic       rst_n,
  input  sym_t       rxdata,
  input  logic       rxdata_valid,
  output logic       rxslide,
  output logic       gtp_reset,
  output logic       aligned,
  output logic [3:0] last_n,
  output logic       n_odd_seen,    // pulses: odd offset found, reset issued
  output logic       n_even_seen    // pulses: even offset found, sliding
);

  typedef enum logic [2:0] {S_RESET, S_WAIT, S_SEARCH, S_SLIDE, S_GAP, S_SETTLE, S_ALIGNED} state_t;

  state_t      state;
  logic [7:0]  timer;
  logic [3:0]  n_left;
  sym_t        prev;
  logic        found;
  logic [3:0]  pos;

  // comma search over {prev, rxdata}; bit 19 is the oldest bit
  always_comb begin
    logic [19:0] w;
    w     = {prev, rxdata};
    found = 1'b0;
    pos   = '0;
    for (int s = 9; s >= 0; s--)
      if (w[19-s -: 7] == COMMA_P || w[19-s -: 7] == COMMA_N) begin
        found = 1'b1;
        pos   = 4'(s);
      end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_WAIT;
      timer       <= '0;
      n_left      <= '0;
      prev        <= '0;
      rxslide     <= 1'b0;
      gtp_reset   <= 1'b0;
      aligned     <= 1'b0;
      last_n      <= '0;
      n_odd_seen  <= 1'b0;
      n_even_seen <= 1'b0;
    end else begin
      if (rxdata_valid) prev <= rxdata;
      rxslide     <= 1'b0;
      n_odd_seen  <= 1'b0;
      n_even_seen <= 1'b0;
      timer       <= timer + 1'b1;
      unique case (state)
        S_RESET: begin
          gtp_reset <= 1'b1;
          if (timer == 8'(RESET_CYCLES - 1)) begin
            gtp_reset <= 1'b0;
            state     <= S_WAIT;
            timer     <= '0;
          end
        end
        S_WAIT:
          if (timer == 8'(LOCK_WAIT - 1)) state <= S_SEARCH;
        S_SEARCH:
          if (rxdata_valid && found) begin
            last_n <= pos;
            timer  <= '0;
            if (pos[0]) begin
              n_odd_seen <= 1'b1;
              state      <= S_RESET;
            end else begin
              n_even_seen <= 1'b1;
              n_left      <= pos;
              state       <= (pos == 0) ? S_SETTLE : S_SLIDE;
            end
          end
        S_SLIDE: begin
          rxslide <= 1'b1;
          n_left  <= n_left - 1'b1;
          timer   <= '0;
          state   <= S_GAP;
        end
        S_GAP:
          if (timer == 8'(SLIDE_GAP - 1)) begin
            timer <= '0;
            state <= (n_left == 0) ? S_SETTLE : S_SLIDE;
          end
        S_SETTLE:
          if (timer == 8'(SETTLE - 1)) begin
            aligned <= 1'b1;
            state   <= S_ALIGNED;
          end
        S_ALIGNED:
          if (rxdata_valid && found && pos != 0) begin
            aligned <= 1'b0;
            timer   <= '0;
            state   <= S_RESET;
          end
        default: state <= S_WAIT;
      endcase
    end
  end

endmodule
