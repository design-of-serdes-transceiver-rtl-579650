// tb_tx_phase_align_ctrl: checks the phase-alignment sequence: nothing
// before PLL lock, txphase high for exactly PHASE_CYCLES clocks after the
// synchronizer and SETTLE_CYCLES, done afterwards, and a restart of the
// whole sequence when lock is lost. Run with short counts.
module tb_tx_phase_align_ctrl;
  timeunit 1ns; timeprecision 1ps;
  localparam int SETTLE = 10, PHASE = 50;
  logic clk = 1'b0, rst_n = 1'b1, pll_lock = 1'b0;
  logic txphase, done;
  int checks = 0, failures = 0;

  tx_phase_align_ctrl #(.SETTLE_CYCLES(SETTLE), .PHASE_CYCLES(PHASE)) dut (.*);
  always #2 clk = ~clk;

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic run_sequence(input string tag);
    int t_start, t_high;
    t_start = 0; t_high = 0;
    @(negedge clk) pll_lock = 1'b1;
    // lock seen after two sync flops, one clock in WAIT_LOCK, then SETTLE
    for (int i = 0; i < 2 + 1 + SETTLE + PHASE + 10; i++) begin
      @(posedge clk); #0.1;
      if (txphase) begin
        if (t_high == 0) t_start = i;
        t_high++;
      end
    end
    check(t_start == 2 + 1 + SETTLE - 1, $sformatf("%s: txphase starts at clock %0d", tag, t_start));
    check(t_high == PHASE, $sformatf("%s: txphase high %0d clocks", tag, t_high));
    check(done && !txphase, $sformatf("%s: done", tag));
  endtask

  initial begin
    #1 rst_n = 1'b0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    repeat (20) @(posedge clk);
    #0.1 check(!txphase && !done, "idle without lock");
    run_sequence("first lock");
    @(negedge clk) pll_lock = 1'b0;
    repeat (4) @(posedge clk);
    #0.1 check(!done && !txphase, "loss of lock clears done");
    run_sequence("relock");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
