// tb_gtp_rx_pma: feeds a random bit stream, two bits per HSCLK, and finds
// where in the stream each aligned output word lies. The word boundary
// (bit position modulo 10) must stay put while nothing happens, move one bit
// later with every RXSLIDE (ten slides return it), and take a new position
// after a relock with another divider phase.
module tb_gtp_rx_pma;
  timeunit 1ns; timeprecision 1ps;
  import serdes_pkg::*;
  logic hsclk = 1'b0, rst_n = 1'b1, relock = 1'b0, rxslide = 1'b0;
  logic [1:0] din = '0;
  logic [2:0] lock_phase = '0;
  logic rxrecclk;
  sym_t dout;
  logic [3:0] slide_count;
  int checks = 0, failures = 0;

  gtp_rx_pma dut (.*);
  always #0.4 hsclk = ~hsclk;

  logic bits[$];
  always @(posedge hsclk) begin
    logic [1:0] nd;
    nd = 2'($urandom);
    din <= nd;
    bits.push_back(din[1]);
    bits.push_back(din[0]);
  end

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

  // boundary after two consecutive words w1, w2 (w2 just sampled):
  // (index of the bit after w2) mod 10, or -1 if not found exactly once
  function automatic int boundary(input sym_t w1, input sym_t w2);
    int n, hits, pos;
    logic [19:0] w;
    w = {w1, w2};
    n = bits.size();
    hits = 0; pos = -1;
    for (int d = 0; d < 40; d++) begin
      logic match;
      match = 1'b1;
      for (int b = 0; b < 20; b++)
        if (bits[n - d - 20 + b] != w[19 - b]) match = 1'b0;
      if (match) begin
        hits++;
        pos = (n - d) % 10;
      end
    end
    return (hits == 1) ? pos : -1;
  endfunction

  task automatic settle_and_measure(output int pos);
    sym_t w1;
    repeat (4) @(posedge rxrecclk);
    @(negedge rxrecclk); w1 = dout;
    @(negedge rxrecclk); pos = boundary(w1, dout);
  endtask

  initial begin
    int p0, p, prev;
    #1 rst_n = 1'b0;
    #3 rst_n = 1'b1;
    repeat (50) @(posedge hsclk);
    for (int lock = 0; lock < 3; lock++) begin
      @(posedge hsclk);
      lock_phase <= 3'(lock * 2);
      relock <= 1'b1;
      @(posedge hsclk) relock <= 1'b0;
      repeat (20) @(posedge hsclk);
      settle_and_measure(p0);
      check(p0 >= 0, $sformatf("lock %0d: output words are stream words (pos %0d)", lock, p0));
      prev = p0;
      for (int k = 1; k <= 10; k++) begin
        @(negedge rxrecclk) rxslide = 1'b1;
        @(negedge rxrecclk) rxslide = 1'b0;
        settle_and_measure(p);
        check(p == (prev + 1) % 10, $sformatf("slide %0d: boundary %0d -> %0d", k, prev, p));
        prev = p;
      end
      check(p == p0, "ten slides return the boundary");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
