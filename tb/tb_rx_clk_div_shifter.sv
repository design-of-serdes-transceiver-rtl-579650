// tb_rx_clk_div_shifter: checks that the recovered clock has a period of
// five HSCLK cycles, that its phase follows the divider phase given at each
// lock, and that every RXSLIDE advances the slide count (mod 10) and moves
// the clock by one HSCLK (2 UI) on every second slide, with Q(0) driving the
// barrel-shift select on the odd counts. A relock returns the count to 0.
module tb_rx_clk_div_shifter;
  timeunit 1ns; timeprecision 1ps;
  logic hsclk = 1'b0, rst_n = 1'b1, relock = 1'b0, rxslide = 1'b0;
  logic [2:0] lock_phase = '0;
  logic rxrecclk, bshift;
  logic [3:0] slide_count;
  int checks = 0, failures = 0;

  rx_clk_div_shifter dut (.*);
  always #0.4 hsclk = ~hsclk;
  int tick = 0;
  always @(posedge hsclk) tick <= tick + 1;
  int last_rise = 0, period = 0;
  always @(posedge rxrecclk) begin
    period    = tick - last_rise;
    last_rise = tick;
  end

  initial begin
    #20000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int t_relock = 0;
  task automatic do_relock(input int p);
    @(posedge hsclk);
    t_relock = tick;
    lock_phase <= 3'(p);
    relock     <= 1'b1;
    @(posedge hsclk);
    relock     <= 1'b0;
    repeat (40) @(posedge hsclk);
  endtask

  // phase of the recovered clock in HSCLK ticks, 0..4
  function automatic int phase();
    return last_rise % 5;
  endfunction

  int base[5];
  initial begin
    #1 rst_n = 1'b0;
    #3 rst_n = 1'b1;
    for (int rep = 0; rep < 2; rep++)
      for (int p = 0; p < 5; p++) begin
        do_relock(p);
        @(posedge rxrecclk); #0.01;
        check(period == 5, $sformatf("period %0d", period));
        check(slide_count == 0 && !bshift, "relock clears the slide count");
        // the clock phase relative to the lock instant is set by lock_phase
        if (rep == 0) base[p] = (last_rise - t_relock + p) % 5;
        else check((last_rise - t_relock + p) % 5 == base[p], "same phase for the same lock phase");
        check((last_rise - t_relock + p) % 5 == base[0], $sformatf("phase follows lock_phase %0d", p));
      end
    // slides from lock phase 2
    do_relock(2);
    begin
      int ph0;
      @(posedge rxrecclk); #0.01;
      ph0 = phase();
      for (int k = 1; k <= 12; k++) begin
        @(negedge rxrecclk) rxslide = 1'b1;
        @(negedge rxrecclk) rxslide = 1'b0;
        repeat (3) @(posedge rxrecclk);
        #0.01;
        check(slide_count == 4'(k % 10), $sformatf("slide count %0d after %0d slides", slide_count, k));
        check(bshift == k[0], "Q(0) selects the barrel shifter");
        check(phase() == (ph0 + (k % 10) / 2) % 5, $sformatf("clock phase after %0d slides", k));
        check(period == 5, "period stays five HSCLK");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
