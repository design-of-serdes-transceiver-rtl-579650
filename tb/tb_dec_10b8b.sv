// tb_dec_10b8b: self-checking test of the 10b/8b decoder.
//
// Part 1 feeds code groups from the published 8b/10b tables in a legal
// disparity sequence and checks the byte, the control flag and the one-clock
// latency. Part 2 round-trips a random stream of data and control characters
// through the encoder and checks every byte comes back with no error flag.
// Part 3 checks the error flags: groups that are not in the code raise
// code_err, a group of the wrong disparity raises disp_err.
module tb_dec_10b8b;
  timeunit 1ns; timeprecision 1ps;
  import serdes_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic din_valid = 1'b0;
  sym_t din = '0;
  byte_t dout;
  logic is_k, code_err, disp_err, dout_valid;
  int checks = 0, failures = 0;

  dec_10b8b dut (.*);

  // stimulus encoder for the round trip
  logic e_wt = 1'b0, e_kin = 1'b0;
  byte_t e_din = '0;
  sym_t e_out;
  logic e_kerr, e_disp, e_nd;
  enc_8b10b enc (.clk, .rst_n, .wt(e_wt), .dtin(e_din), .kin(e_kin), .force_disp(1'b0),
                 .disp_in(1'b0), .dtout(e_out), .kerr(e_kerr), .disp_out(e_disp), .nd(e_nd));

  always #2 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // legal sequence from RD-: {code, byte, k}
  typedef struct packed { sym_t c; byte_t d; logic k; } vec_t;
  vec_t seq[$] = '{
    '{10'b001111_1010, 8'hBC, 1'b1},   // K28.5 RD- -> RD+
    '{10'b011000_1011, 8'h00, 1'b0},   // D0.0  RD+ -> RD+
    '{10'b101010_1010, 8'hB5, 1'b0},   // D21.5 neutral
    '{10'b110000_0101, 8'hBC, 1'b1},   // K28.5 RD+ -> RD-
    '{10'b100011_0111, 8'hF1, 1'b0},   // D17.7 RD- (A7) -> RD+
    '{10'b110100_1000, 8'hEB, 1'b0},   // D11.7 RD+ (A7) -> RD-
    '{10'b111010_1000, 8'hF7, 1'b1},   // K23.7 RD- neutral
    '{10'b001111_1001, 8'h3C, 1'b1},   // K28.1 RD- -> RD+
    '{10'b000111_0100, 8'h07, 1'b0},   // D7.0  RD+ -> RD-
    '{10'b110001_1100, 8'h63, 1'b0},   // D3.3  RD- neutral
    '{10'b101011_0001, 8'hFF, 1'b0}    // D31.7 RD- neutral
  };

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // Part 1
    foreach (seq[i]) begin
      @(negedge clk); din_valid = 1'b1; din = seq[i].c;
      @(posedge clk); #0.1;
      check(dout_valid && dout == seq[i].d && is_k == seq[i].k && !code_err && !disp_err,
            $sformatf("seq %0d got %h k=%0b ce=%0b de=%0b", i, dout, is_k, code_err, disp_err));
    end
    // Part 3: errors (current RD is RD-)
    @(negedge clk); din = 10'b000000_0000;
    @(posedge clk); #0.1; check(code_err, "all-zero group is a code error");
    @(negedge clk); din = 10'b111111_0000;
    @(posedge clk); #0.1; check(code_err, "111111 is a code error");
    @(negedge clk); din = 10'b011000_1011;        // D0.0 RD+ form while RD-
    @(posedge clk); #0.1; check(disp_err && !code_err && dout == 8'h00, "disparity error");
    @(negedge clk); din_valid = 1'b0;
    @(posedge clk); #0.1; check(!dout_valid, "valid follows din_valid");
    // Part 2: round trip through the encoder
    @(negedge clk); rst_n = 1'b0;
    @(negedge clk); rst_n = 1'b1;
    begin
      byte_t sent_d[$];
      logic  sent_k[$];
      for (int n = 0; n < 3000; n++) begin
        @(negedge clk);
        e_wt = 1'b1;
        e_kin = ($urandom_range(0, 5) == 0);
        e_din = e_kin ? (($urandom_range(0, 1) == 0) ? {3'($urandom_range(0, 7)), 5'd28} : 8'hFB)
                      : 8'($urandom);
        sent_d.push_back(e_din); sent_k.push_back(e_kin);
        din_valid = e_nd; din = e_out;
        @(posedge clk); #0.1;
        if (n >= 1) begin
          byte_t d; logic k;
          d = sent_d.pop_front(); k = sent_k.pop_front();
          check(dout_valid && dout == d && is_k == k && !code_err && !disp_err,
                $sformatf("round trip %0d: got %h/%0b exp %h/%0b", n, dout, is_k, d, k));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
