// tx_phase_align_ctrl: fabric controller for the transmitter phase alignment.
//
// After power-up, or whenever the transceiver PLL loses lock, the parallel
// clock of the serializer (XCLK) can come up in any phase. This controller
// waits until the PLL reports lock, lets it settle for SETTLE_CYCLES, then
// raises txphase for PHASE_CYCLES clocks; while txphase is high the
// transmitter's phase-adjust circuit pulls XCLK onto TXUSRCLK. done then
// stays high until the next loss of lock, which restarts the sequence.
//
// Runs on TXUSRCLK. The reference names only the TXPHASE signal and says the
// procedure follows the transceiver user guide; the state sequence and both
// cycle counts are this design's choices.
module tx_phase_align_ctrl #(
  parameter int unsigned SETTLE_CYCLES = 64,
  parameter int unsigned PHASE_CYCLES  = 8192
) (
  input  logic clk,
  input  logic rst_n,
  input  logic pll_lock,
  output logic txphase,
  output logic done
);

  typedef enum logic [1:0] {WAIT_LOCK, SETTLE, ALIGN, ALIGNED} state_t;

  localparam int unsigned CW = $clog2(PHASE_CYCLES > SETTLE_CYCLES ? PHASE_CYCLES : SETTLE_CYCLES) + 1;

  state_t        state;
  logic [CW-1:0] cnt;
  logic          lock_q1, lock_q2;   // pll_lock may come from another clock

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lock_q1 <= 1'b0;
      lock_q2 <= 1'b0;
      state   <= WAIT_LOCK;
      cnt     <= '0;
    end else begin
      lock_q1 <= pll_lock;
      lock_q2 <= lock_q1;
      if (!lock_q2) begin
        state <= WAIT_LOCK;
        cnt   <= '0;
      end else begin
        unique case (state)
          WAIT_LOCK: begin
            state <= SETTLE;
            cnt   <= '0;
          end
          SETTLE: begin
            cnt <= cnt + 1'b1;
            if (cnt == CW'(SETTLE_CYCLES - 1)) begin
              state <= ALIGN;
              cnt   <= '0;
            end
          end
          ALIGN: begin
            cnt <= cnt + 1'b1;
            if (cnt == CW'(PHASE_CYCLES - 1)) state <= ALIGNED;
          end
          ALIGNED: ;
        endcase
      end
    end
  end

  assign txphase = (state == ALIGN);
  assign done    = (state == ALIGNED);

endmodule
