// tb_comma_aligner: the testbench stands in for the transceiver. It sends a
// disparity-neutral 8b/10b stream with a K28.5 (RD-) every 16 symbols and
// presents it as 10-bit words starting at bit offset o, the misalignment of
// the current lock. RXSLIDE moves o one bit later; a transceiver reset
// picks a new random o. For each lock the test checks the algorithm: an
// odd offset must be answered with a reset and no slide; an even one with
// exactly (10 - o) mod 10 slides at least SLIDE_GAP clocks apart, after
// which aligned rises with the words on the symbol boundary. Disturbing the
// alignment afterwards must drop aligned and start again with a reset.
module tb_comma_aligner;
  timeunit 1ns; timeprecision 1ps;
  import serdes_pkg::*;
  localparam int SLIDE_GAP = 4;
  logic clk = 1'b0, rst_n = 1'b1;
  sym_t rxdata = '0;
  logic rxdata_valid = 1'b0;
  logic rxslide, gtp_reset, aligned, n_odd_seen, n_even_seen;
  logic [3:0] last_n;
  int checks = 0, failures = 0;

  comma_aligner #(.SLIDE_GAP(SLIDE_GAP)) dut (.*);
  always #2 clk = ~clk;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // symbol stream: K28.5, then D21.5 / D10.2 alternating (both neutral)
  function automatic sym_t symbol(input int k);
    if (k % 16 == 0) return 10'b001111_1010;
    return (k % 2) ? 10'b101010_1010 : 10'b010101_0101;
  endfunction
  function automatic logic stream_bit(input longint i);
    sym_t s;
    s = symbol(int'(i / 10));
    return s[9 - int'(i % 10)];
  endfunction

  int o = 0;                 // current misalignment in bits
  longint word = 4;          // word index
  int slides = 0, resets = 0;
  int last_slide_t = -100, t = 0, min_gap = 1000;
  logic rst_q = 1'b0;
  always @(posedge clk) begin
    sym_t w;
    t <= t + 1;
    for (int b = 0; b < 10; b++) w[9 - b] = stream_bit(word * 10 + o + b);
    rxdata       <= w;
    rxdata_valid <= 1'b1;
    word         <= word + 1;
    if (rxslide) begin
      o <= o + 1;
      slides <= slides + 1;
      if (t - last_slide_t < min_gap) min_gap <= t - last_slide_t;
      last_slide_t <= t;
    end
    rst_q <= gtp_reset;
    if (gtp_reset && !rst_q) resets <= resets + 1;
    if (!gtp_reset && rst_q) o <= $urandom_range(0, 9);
  end

  initial begin
    #400000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int n_odd = 0, n_even = 0;
  initial begin
    #1 rst_n = 1'b0;
    #5;
    for (int trial = 0; trial < 20; trial++) begin
      int o0, s0, r0;
      logic odd_f, even_f;
      logic [3:0] n_f;
      @(negedge clk);
      o0 = trial % 10;
      o = o0; rst_n = 1'b0;
      @(negedge clk) rst_n = 1'b1;
      s0 = slides; r0 = resets; min_gap = 1000;
      // the first decision
      @(posedge clk iff (n_odd_seen || n_even_seen));
      odd_f = n_odd_seen; even_f = n_even_seen; n_f = last_n;
      #0.1;
      if (o0 % 2 == 1) begin
        n_odd++;
        check(odd_f && n_f == 4'((10 - o0) % 10), $sformatf("o=%0d: odd n=%0d", o0, n_f));
        @(posedge clk iff gtp_reset);
        #0.1 check(slides == s0, "no slide for an odd offset");
        // let the new lock be found, then check the final state
      end else begin
        n_even++;
        check(even_f && n_f == 4'((10 - o0) % 10), $sformatf("o=%0d: even n=%0d", o0, n_f));
      end
      @(posedge clk iff aligned);
      #0.1;
      check(o % 10 == 0, $sformatf("trial %0d: aligned with offset %0d", trial, o));
      if (o0 % 2 == 0)
        check(slides - s0 == (10 - o0) % 10 && resets == r0,
              $sformatf("o=%0d: %0d slides, %0d resets", o0, slides - s0, resets - r0));
      check(min_gap >= SLIDE_GAP || slides - s0 <= 1, "slides are spaced");
      repeat (50) @(posedge clk);
      #0.1 check(aligned, "alignment held");
    end
    // lose the alignment: aligned must drop and a reset follows
    @(negedge clk) o = o + 2;
    @(posedge clk iff aligned);
    begin
      int r0;
      r0 = resets;
      @(negedge clk) o = o + 2;
      @(posedge clk iff gtp_reset);
      #0.1 check(resets == r0 + 1, "loss of alignment resets the transceiver");
      @(posedge clk iff aligned);
      #0.1 check(o % 10 == 0, "aligned again after the loss");
    end
    check(n_odd > 0 && n_even > 0, "both odd and even offsets tested");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
