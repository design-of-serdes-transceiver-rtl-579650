// tb_rx_sipo: feeds a random bit stream two bits per HSCLK and a parallel
// clock of five HSCLK periods, and checks that each captured word holds the
// ten most recent bits with the oldest in bit 9.
module tb_rx_sipo;
  timeunit 1ns; timeprecision 1ps;
  import serdes_pkg::*;
  logic hsclk = 1'b0, rxrecclk = 1'b0, rst_n = 1'b1;
  logic [1:0] din = '0;
  sym_t par;
  int checks = 0, failures = 0;
  rx_sipo dut (.*);

  always #0.4 hsclk = ~hsclk;
  logic [63:0] hist = '0;       // bits fed, newest in bit 0
  int cnt = 0;
  always @(posedge hsclk) begin
    din      <= 2'($urandom);
    hist     <= {hist[61:0], din};
    cnt      <= (cnt == 4) ? 0 : cnt + 1;
    rxrecclk <= (cnt == 2);
  end

  initial begin
    #5000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1 rst_n = 1'b0;
    #3 rst_n = 1'b1;
    repeat (5) @(posedge rxrecclk);
    for (int i = 0; i < 200; i++) begin
      @(posedge rxrecclk); #0.01;
      checks++;
      // rxrecclk rises after the HSCLK edge that shifted hist and the SIPO
      if (par !== hist[9:0]) begin
        failures++;
        $display("FAIL: word %0d got %b exp %b", i, par, hist[9:0]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
