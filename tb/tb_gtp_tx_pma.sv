// tb_gtp_tx_pma: checks the serializer and its phase adjust. For several
// power-ups with a random XCLK phase it raises txphase, then checks that
// the PISO load (XCLK edge) falls LOAD_OFFSET bit clocks after each TXUSRCLK
// rising edge whatever the power-up phase, and that the ten bits sent after
// each load are the loaded code group, bit 9 first. It also checks that
// without phase adjust the load offset follows the power-up phase.
module tb_gtp_tx_pma;
  timeunit 1ns; timeprecision 1ps;
  import serdes_pkg::*;
  localparam int LOAD_OFFSET = 5;
  logic serclk = 1'b0, rst_n = 1'b1, txphase = 1'b0;
  logic [3:0] xclk_phase = '0;
  logic txusrclk = 1'b0;
  sym_t txpar = '0;
  logic ser_out, xclk_load;
  int checks = 0, failures = 0;

  gtp_tx_pma #(.LOAD_OFFSET(LOAD_OFFSET)) dut (.*);

  always #0.2 serclk = ~serclk;
  int bit_time = 0, last_rise = 0;
  logic [3:0] div10 = '0;
  always @(posedge serclk) begin
    bit_time <= bit_time + 1;
    div10    <= (div10 == 4'd9) ? 4'd0 : div10 + 4'd1;
    txusrclk <= (div10 < 4'd4) || (div10 == 4'd9);
    if (div10 == 4'd9) last_rise <= bit_time;   // txusrclk rises at this edge
  end
  always @(posedge txusrclk) txpar <= sym_t'($urandom);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // serial checker: after each load, the next ten ser_out bits are the word
  logic checking = 1'b0;
  sym_t cur;
  int   bitpos = -1;
  int   load_off;
  always @(posedge serclk) begin
    #0.01;
    if (bitpos >= 0) begin
      if (checking) begin
        checks++;
        if (ser_out !== cur[bitpos]) begin
          failures++;
          $display("FAIL: serial bit %0d of %b", bitpos, cur);
        end
      end
      bitpos--;
    end
  end
  always @(posedge serclk) begin
    if (xclk_load) begin
      cur      <= txpar;
      bitpos   <= 9;
      load_off <= (bit_time - last_rise + 10) % 10;
    end
  end

  int off_unaligned[$];
  initial begin
    for (int pc = 0; pc < 6; pc++) begin
      xclk_phase = 4'(pc == 0 ? 3 : $urandom_range(0, 9));
      #1 rst_n = 1'b0;
      repeat (3) @(posedge txusrclk);
      rst_n = 1'b1;
      repeat (5) @(posedge txusrclk);
      @(posedge xclk_load); @(posedge serclk); #0.05;
      off_unaligned.push_back(load_off);
      txphase = 1'b1;
      repeat (20) @(posedge txusrclk);
      txphase = 1'b0;
      repeat (2) @(posedge txusrclk);
      checking = 1'b1;
      for (int w = 0; w < 30; w++) begin
        @(posedge xclk_load); @(posedge serclk); #0.05;
        check(load_off == LOAD_OFFSET, $sformatf("power-up %0d: load %0d bit clocks after TXUSRCLK", pc, load_off));
      end
      checking = 1'b0;
      repeat (2) @(posedge txusrclk);
    end
    begin
      int distinct = 0;
      foreach (off_unaligned[i]) if (off_unaligned[i] != off_unaligned[0]) distinct++;
      check(distinct > 0, "without phase adjust the load phase depends on the power-up phase");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
