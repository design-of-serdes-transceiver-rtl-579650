// tb_gtp_rx_pcs: with RXUSRCLK on the recovered clock, random words must
// come out unchanged and exactly 10 clocks later (comma bypass 3, elastic
// buffer 5, interface 2), again after a reset, with no buffer error.
module tb_gtp_rx_pcs;
  timeunit 1ns; timeprecision 1ps;
  import serdes_pkg::*;
  logic clk = 1'b0, rst_n = 1'b1;
  sym_t din = '0, rxdata;
  logic rxdata_valid, buf_err;
  int checks = 0, failures = 0;

  gtp_rx_pcs dut (.rxrecclk(clk), .rxusrclk(clk), .rst_n, .din, .rxdata, .rxdata_valid, .buf_err);
  always #2 clk = ~clk;

  initial begin
    #20000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  sym_t sent[$];
  initial begin
    for (int r = 0; r < 3; r++) begin
      int first_valid;
      #1 rst_n = 1'b0;
      #5;
      @(negedge clk) rst_n = 1'b1;
      sent.delete();
      first_valid = -1;
      for (int i = 0; i < 120; i++) begin
        din = sym_t'($urandom);
        sent.push_back(din);
        @(posedge clk); #0.1;
        if (rxdata_valid && first_valid < 0) first_valid = i;
        if (rxdata_valid && i >= 9) begin
          checks++;
          if (rxdata !== sent[i - 9]) begin
            failures++;
            $display("FAIL: run %0d cycle %0d got %b exp %b", r, i, rxdata, sent[i - 9]);
          end
        end
        @(negedge clk);
      end
      checks++;
      // the word driven before edge 0 is on rxdata after edge 9 (checked
      // above); the three reset words of the comma bypass stage lead it
      if (first_valid != 6 || buf_err) begin
        failures++;
        $display("FAIL: run %0d first valid word after %0d clocks, buf_err=%0b", r, first_valid + 1, buf_err);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
