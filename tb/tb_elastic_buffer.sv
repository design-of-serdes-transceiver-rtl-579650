// tb_elastic_buffer: writes a counting sequence every write clock and
// checks that it is read back in order with no gap. With both sides on the
// same clock the latency from write to dout must be 5 clocks after every
// reset (the elastic-buffer figure of the receiver latency budget); with the
// read clock at the same frequency but another phase it must again be the
// same after every reset. A slower read clock must raise overflow.
module tb_elastic_buffer;
  timeunit 1ns; timeprecision 1ps;
  logic wr_clk = 1'b0, rd_clk_own = 1'b0, wr_rst_n = 1'b1, rd_rst_n = 1'b1;
  logic wr_en = 1'b0;
  logic [9:0] din = '0, dout;
  logic overflow, dout_valid, underflow;
  logic same_clk = 1'b1;
  real  rd_half = 2.0;
  int checks = 0, failures = 0;

  wire rd_clk = same_clk ? wr_clk : rd_clk_own;
  elastic_buffer #(.WIDTH(10), .DEPTH(8), .START_LEVEL(1)) dut (.*);

  always #2 wr_clk = ~wr_clk;
  always #(rd_half) rd_clk_own = ~rd_clk_own;

  int wr_cycle = 0;
  int wr_time[1024];
  always @(posedge wr_clk) wr_cycle <= wr_cycle + 1;

  initial begin
    #40000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // one run: reset, stream n words, return the latency of the first word
  task automatic run(input int n, output int lat_first, output logic order_ok);
    int expect_v;
    realtime t_wr0;
    wr_en = 1'b0;
    wr_rst_n = 1'b0; rd_rst_n = 1'b0;
    #10;
    @(negedge wr_clk) wr_rst_n = 1'b1; rd_rst_n = 1'b1;
    din = '0; wr_en = 1'b1;
    @(posedge wr_clk) t_wr0 = $realtime;
    expect_v = 0; order_ok = 1'b1; lat_first = -1;
    fork
      begin
        for (int i = 1; i < n; i++) begin
          @(negedge wr_clk) din = 10'(i);
        end
        @(negedge wr_clk);
      end
      begin
        while (expect_v < n - 12) begin
          @(posedge rd_clk); #0.01;
          if (dout_valid) begin
            if (lat_first < 0) lat_first = int'(($realtime - 0.01 - t_wr0) / 4.0 + 0.5);
            if (dout != 10'(expect_v)) order_ok = 1'b0;
            expect_v++;
          end else if (lat_first >= 0) order_ok = 1'b0;
        end
      end
    join
    wr_en = 1'b0;
  endtask

  initial begin
    int lat, lat0;
    logic ok;
    // same clock on both sides
    for (int r = 0; r < 3; r++) begin
      run(100, lat, ok);
      check(ok, "same clock: data in order without gaps");
      check(lat == 5, $sformatf("same clock: latency %0d clocks", lat));
      check(!overflow && !underflow, "same clock: no overflow or underflow");
    end
    // same frequency, shifted phase
    same_clk = 1'b0; rd_half = 2.0;
    for (int r = 0; r < 3; r++) begin
      run(100, lat, ok);
      if (r == 0) lat0 = lat;
      check(ok, "other phase: data in order without gaps");
      check(lat == lat0, $sformatf("other phase: latency %0d repeats", lat));
      check(!overflow && !underflow, "other phase: no overflow or underflow");
    end
    // slower reader: the buffer fills up
    rd_half = 3.0;
    wr_rst_n = 1'b0; rd_rst_n = 1'b0;
    #10;
    @(negedge wr_clk) wr_rst_n = 1'b1; rd_rst_n = 1'b1;
    wr_en = 1'b1;
    repeat (60) @(posedge wr_clk);
    #0.1 check(overflow, "overflow with a slower reader");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
