// tb_rx_barrel_shift: random parallel words; with bshift low the output is
// the previous word, with bshift high the previous word's bits 8..0 followed
// by bit 9 of the current word (one bit later in the stream).
module tb_rx_barrel_shift;
  timeunit 1ns; timeprecision 1ps;
  import serdes_pkg::*;
  logic rxrecclk = 1'b0, rst_n = 1'b1, bshift = 1'b0;
  sym_t par = '0, dout;
  int checks = 0, failures = 0;
  rx_barrel_shift dut (.*);
  always #2 rxrecclk = ~rxrecclk;

  initial begin
    #5000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    sym_t held;
    logic [19:0] stream;
    #1 rst_n = 1'b0;
    #3 rst_n = 1'b1;
    @(negedge rxrecclk) par = sym_t'($urandom);
    @(posedge rxrecclk) held = par;
    for (int i = 0; i < 300; i++) begin
      @(negedge rxrecclk);
      par = sym_t'($urandom);
      bshift = 1'($urandom);
      #0.1;
      stream = {held, par};
      checks++;
      if (dout !== (bshift ? stream[18:9] : stream[19:10])) begin
        failures++;
        $display("FAIL: bshift=%0b got %b", bshift, dout);
      end
      @(posedge rxrecclk) held = par;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
