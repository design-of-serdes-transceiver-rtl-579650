// tb_fl_link_top: end-to-end test of the fixed-latency link at full size.
//
// The testbench plays the analog and clocking parts around the link:
//   - a 2.5 Gb/s serial bit clock (0.4 ns) and TXUSRCLK at a tenth of it
//     with a fixed phase, standing for the shared PLL and the fabric DLL;
//   - a PLL whose parallel clock XCLK comes up in a random phase at every
//     power-up (xclk_phase) and reports lock after a while;
//   - clock and data recovery: HSCLK at half the bit rate, two samples per
//     HSCLK, and at every lock a random pairing of the bits (which edge
//     samples which bit) and a random phase of the divide-by-5 counter.
// It then power-cycles transmitter and receiver POWER_CYCLES times. In each
// cycle it waits for the transmitter phase alignment and the receiver
// alignment, checks that the decoded stream follows the generator's pattern
// with no code, disparity or buffer error, and measures the link latency by
// inserting a unique marker byte and timing it from the generator output to
// the decoder output in bit periods. The latency, and the phase of the
// recovered clock against the transmit clock, must be the same after every
// power-up. It also counts the mechanisms of the design and fails if
// one never happened: odd-offset rejection by reset, even-offset sliding
// (including n = 0 and n > 0), barrel-shifter use during a slide, a
// recovered-clock phase step, and a transmitter phase adjustment.
module tb_fl_link_top;
  timeunit 1ns; timeprecision 1ps;
  import serdes_pkg::*;

  localparam int POWER_CYCLES = 6;
  localparam int CHECK_WORDS  = 200;

  int checks = 0, failures = 0;
  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ---------------- clocks ----------------
  logic serclk = 1'b0;
  always #0.2 serclk = ~serclk;
  longint unsigned bit_time = 0;        // bit periods since start
  always @(posedge serclk) bit_time <= bit_time + 1;

  logic [3:0] div10 = '0;
  logic txusrclk = 1'b0;
  always @(posedge serclk) begin
    div10    <= (div10 == 4'd9) ? 4'd0 : div10 + 4'd1;
    txusrclk <= (div10 < 4'd4) || (div10 == 4'd9);
  end

  logic hsclk = 1'b0;
  always @(posedge serclk) hsclk <= ~hsclk;

  // ---------------- DUT ----------------
  logic tx_rst_n = 1'b1, rx_rst_n = 1'b1, pll_lock = 1'b0;
  logic [3:0] xclk_phase = '0;
  logic prog_we = 1'b0, prog_len_we = 1'b0;
  logic [3:0] prog_addr = '0;
  char_t prog_char = '0;
  logic [4:0] prog_len = 5'd16;
  logic tx_p, tx_n, tx_phase_done, tx_kerr;
  byte_t tx_payload, rx_payload;
  logic tx_payload_is_k;
  logic [1:0] rx_din;
  logic rx_relock = 1'b0;
  logic [2:0] rx_lock_phase = '0;
  logic rx_gtp_reset, rxrecclk, rx_is_k, rx_valid, rx_code_err, rx_disp_err, rx_buf_err;
  logic aligned, rx_n_odd, rx_n_even, rx_slide;
  logic [3:0] rx_last_n, rx_slide_count;

  fl_link_top dut (.*);

  // ---------------- line and clock recovery ----------------
  logic [3:0] line = '0;
  logic       pair_skew = 1'b0;   // which edge samples the earlier bit
  always @(posedge serclk) line <= {line[2:0], tx_p};
  assign rx_din = pair_skew ? {line[2], line[1]} : {line[1], line[0]};

  logic rst_q = 1'b0;
  int   relocks = 0;
  task automatic relock_cdr();
    @(posedge hsclk);
    pair_skew     <= 1'($urandom_range(0, 1));
    rx_lock_phase <= 3'($urandom_range(0, 4));
    rx_relock     <= 1'b1;
    @(posedge hsclk);
    rx_relock     <= 1'b0;
    relocks++;
  endtask
  // a transceiver reset from the aligner makes clock recovery lock again
  always @(posedge hsclk) rst_q <= rx_gtp_reset;
  always @(negedge rx_gtp_reset) if (rx_rst_n) relock_cdr();

  // ---------------- mechanism counters ----------------
  int n_odd = 0, n_even0 = 0, n_even_pos = 0, n_barrel = 0, n_phase_step = 0, n_txadj = 0;
  logic [3:0] last_slide_count = '0;
  always @(posedge rxrecclk) begin
    if (rx_n_odd) n_odd++;
    if (rx_n_even && rx_last_n == 0) n_even0++;
    if (rx_n_even && rx_last_n != 0) n_even_pos++;
    if (rx_slide_count != last_slide_count) begin
      if (rx_slide_count[0]) n_barrel++;
      else n_phase_step++;
    end
    last_slide_count <= rx_slide_count;
  end

  // watchdog
  initial begin
    #2_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- main sequence ----------------
  longint unsigned lat_ref = 0;
  int n_marker = 0;
  int rec_phase = 0, rec_phase_ref = 0;

  initial begin
    #1;
    for (int pc = 0; pc < POWER_CYCLES; pc++) begin
      longint unsigned t_tx, t_rx, lat;
      int k;
      // power-up: XCLK in a random phase, receiver locks in a random phase
      tx_rst_n = 1'b0; rx_rst_n = 1'b0; pll_lock = 1'b0;
      xclk_phase = 4'($urandom_range(0, 9));
      if (xclk_phase != 4'd0) n_txadj++;
      repeat (20) @(posedge txusrclk);
      tx_rst_n = 1'b1;
      repeat (10) @(posedge txusrclk);
      pll_lock = 1'b1;
      rx_rst_n = 1'b1;
      relock_cdr();
      // transmitter phase alignment
      wait (tx_phase_done);
      // receiver alignment
      wait (aligned);
      repeat (40) @(posedge rxrecclk);
      check(aligned, $sformatf("cycle %0d: alignment held", pc));
      // the recovered clock must come up in the same phase against the
      // transmit clock after every power-up
      @(posedge rxrecclk);
      rec_phase = int'(bit_time % 10);
      if (pc == 0) rec_phase_ref = rec_phase;
      check(rec_phase == rec_phase_ref,
            $sformatf("recovered clock phase %0d UI equals the first power-up's %0d UI", rec_phase, rec_phase_ref));
      // the decoded stream must follow the pattern K28.5, 1, 2, ... 15
      k = -1;
      for (int w = 0; w < CHECK_WORDS; w++) begin
        @(posedge rxrecclk); #0.01;
        if (rx_valid) begin
          if (k < 0) begin
            if (rx_is_k) k = 0;
          end else begin
            k = (k + 1) % 16;
            checks++;
            if (!((k == 0 && rx_is_k && rx_payload == K28_5) ||
                  (k != 0 && !rx_is_k && rx_payload == byte_t'(k))) || rx_code_err || rx_disp_err) begin
              failures++;
              $display("FAIL: cycle %0d word %0d: got %h k=%0b exp index %0d", pc, w, rx_payload, rx_is_k, k);
            end
          end
        end
      end
      check(k >= 0, "comma seen in the decoded stream");
      check(!rx_buf_err && !tx_kerr, "no elastic buffer error, no kerr");
      // latency: replace byte 7 by a unique marker for one pass of the pattern
      @(negedge txusrclk);
      prog_we = 1'b1; prog_addr = 4'd7; prog_char = '{is_k: 1'b0, data: 8'hA5};
      @(negedge txusrclk); prog_we = 1'b0;
      @(posedge txusrclk iff tx_payload == 8'hA5);
      t_tx = bit_time;
      @(negedge txusrclk);
      prog_we = 1'b1; prog_char = '{is_k: 1'b0, data: 8'h07};
      @(negedge txusrclk); prog_we = 1'b0;
      @(posedge rxrecclk iff (rx_valid && rx_payload == 8'hA5));
      t_rx = bit_time;
      lat = t_rx - t_tx;
      n_marker++;
      $display("power cycle %0d: xclk_phase=%0d last_n=%0d relocks=%0d latency=%0d UI rxrecclk phase=%0d UI",
               pc, xclk_phase, rx_last_n, relocks, lat, rec_phase);
      if (pc == 0) lat_ref = lat;
      check(lat == lat_ref, $sformatf("latency %0d UI equals the first power-up's %0d UI", lat, lat_ref));
      // clocked stages: transmit PCS 3, receive PCS 3 + 5 + 2, decoder 1
      // parallel clocks (140 UI), plus 25 UI for the serializer load offset
      // and shifting, the one-bit line model and the deserializer registers
      check(lat == 165, $sformatf("latency %0d UI is 165 UI", lat));
    end
    $display("mechanisms: odd-n resets=%0d even n=0 locks=%0d even n>0 locks=%0d barrel steps=%0d clock phase steps=%0d tx phase adjusts=%0d",
             n_odd, n_even0, n_even_pos, n_barrel, n_phase_step, n_txadj);
    check(n_odd > 0, "an odd offset was rejected by reset");
    check(n_even_pos > 0, "an even offset was corrected by sliding");
    check(n_barrel > 0, "the barrel shifter was used during sliding");
    check(n_phase_step > 0, "the recovered clock phase was stepped");
    check(n_txadj > 0, "XCLK came up out of phase and was adjusted");
    check(n_marker == POWER_CYCLES, "latency measured at every power-up");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
