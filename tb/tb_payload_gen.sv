// tb_payload_gen: checks the default pattern (K28.5 then bytes 1..15, one
// character per clock, repeating), the first flag, pausing with en, and
// reprogramming an entry and the pattern length.
module tb_payload_gen;
  timeunit 1ns; timeprecision 1ps;
  import serdes_pkg::*;
  logic clk = 1'b0, rst_n = 1'b1, en = 1'b0, prog_we = 1'b0, prog_len_we = 1'b0;
  logic [3:0] prog_addr = '0;
  char_t prog_char = '0;
  logic [4:0] prog_len = '0;
  byte_t txdata;
  logic is_k, first;
  int checks = 0, failures = 0;

  payload_gen dut (.*);
  always #2 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #1 rst_n = 1'b0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    @(negedge clk) en = 1'b1;
    for (int i = 0; i < 40; i++) begin
      @(posedge clk); #0.1;
      if (i % 16 == 0) check(is_k && txdata == 8'hBC && first, $sformatf("comma at %0d", i));
      else check(!is_k && txdata == byte_t'(i % 16) && !first, $sformatf("data at %0d: %h", i, txdata));
    end
    // en low holds the output
    @(negedge clk) en = 1'b0;
    begin
      byte_t held;
      held = txdata;
      repeat (3) @(posedge clk);
      #0.1 check(txdata == held, "output held while en is low");
    end
    // program K28.1 into entry 3 and a length of 4
    @(negedge clk);
    prog_we = 1'b1; prog_addr = 4'd3; prog_char = '{is_k: 1'b1, data: 8'h3C};
    prog_len_we = 1'b1; prog_len = 5'd4;
    @(negedge clk);
    prog_we = 1'b0; prog_len_we = 1'b0;
    @(negedge clk) rst_n = 1'b1;
    en = 1'b1;
    // wait for the start of the pattern
    do begin
      @(posedge clk); #0.1;
    end while (!first);
    for (int i = 0; i < 12; i++) begin
      case (i % 4)
        0: check(is_k && txdata == 8'hBC, "entry 0");
        1: check(!is_k && txdata == 8'h01, "entry 1");
        2: check(!is_k && txdata == 8'h02, "entry 2");
        3: check(is_k && txdata == 8'h3C, "programmed entry 3");
      endcase
      @(posedge clk); #0.1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
