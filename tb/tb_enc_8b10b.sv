// tb_enc_8b10b: self-checking test of the 8b/10b encoder.
//
// Part 1 forces the running disparity and compares dtout with code groups
// taken from the published 8b/10b code tables (both disparity columns),
// including the alternate A7 forms and the K28.x commas. Part 2 sends a long
// random stream of data and valid control characters and checks properties
// that hold for any correct encoder: every symbol has 4, 5 or 6 ones with the
// sign the running disparity allows, no run of more than five equal bits on
// the line, the 7-bit comma appears only at the start of a K28.1/5/7 symbol,
// and the latency is one clock. kerr is checked for invalid control bytes.
module tb_enc_8b10b;
  timeunit 1ns; timeprecision 1ps;
  import serdes_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic wt = 1'b0, kin = 1'b0, force_disp = 1'b0, disp_in = 1'b0;
  byte_t dtin = '0;
  sym_t dtout;
  logic kerr, disp_out, nd;
  int checks = 0, failures = 0;

  enc_8b10b dut (.*);

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

  // Reference vectors: {k, byte, rd, expected code}
  typedef struct packed { logic k; byte_t d; logic rd; sym_t c; } vec_t;
  vec_t vecs[$] = '{
    '{1'b0, 8'h00, 1'b0, 10'b100111_0100}, '{1'b0, 8'h00, 1'b1, 10'b011000_1011},
    '{1'b0, 8'hB5, 1'b0, 10'b101010_1010}, '{1'b0, 8'hB5, 1'b1, 10'b101010_1010},
    '{1'b1, 8'hBC, 1'b0, 10'b001111_1010}, '{1'b1, 8'hBC, 1'b1, 10'b110000_0101},
    '{1'b1, 8'h3C, 1'b0, 10'b001111_1001}, '{1'b1, 8'h3C, 1'b1, 10'b110000_0110},
    '{1'b1, 8'hFC, 1'b0, 10'b001111_1000}, '{1'b1, 8'hFC, 1'b1, 10'b110000_0111},
    '{1'b1, 8'hF7, 1'b0, 10'b111010_1000}, '{1'b1, 8'hF7, 1'b1, 10'b000101_0111},
    '{1'b0, 8'h07, 1'b0, 10'b111000_1011}, '{1'b0, 8'h07, 1'b1, 10'b000111_0100},
    '{1'b0, 8'hF1, 1'b0, 10'b100011_0111}, '{1'b0, 8'hF1, 1'b1, 10'b100011_0001},
    '{1'b0, 8'hEB, 1'b0, 10'b110100_1110}, '{1'b0, 8'hEB, 1'b1, 10'b110100_1000},
    '{1'b0, 8'h63, 1'b0, 10'b110001_1100}, '{1'b0, 8'h63, 1'b1, 10'b110001_0011},
    '{1'b0, 8'hFF, 1'b0, 10'b101011_0001}, '{1'b0, 8'hFF, 1'b1, 10'b010100_1110},
    '{1'b0, 8'hF7, 1'b0, 10'b111010_0001}, '{1'b0, 8'h4A, 1'b0, 10'b010101_0101},
    '{1'b0, 8'h1C, 1'b0, 10'b001110_1011}, '{1'b0, 8'h1C, 1'b1, 10'b001110_0100}
  };

  int rd;           // running disparity seen on the line: -1 or +1
  int run_len;
  logic last_bit;
  logic [19:0] window;
  logic prev_sent_comma;

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    // Part 1: table vectors
    foreach (vecs[i]) begin
      @(negedge clk);
      wt = 1'b1; force_disp = 1'b1; disp_in = vecs[i].rd;
      dtin = vecs[i].d; kin = vecs[i].k;
      @(posedge clk); #0.1;
      check(nd && dtout == vecs[i].c,
            $sformatf("vec %0d k=%0b d=%h rd=%0b got %b exp %b", i, vecs[i].k, vecs[i].d,
                      vecs[i].rd, dtout, vecs[i].c));
    end
    // kerr on an invalid control byte, none on a valid one
    @(negedge clk); force_disp = 1'b0; kin = 1'b1; dtin = 8'h21;
    @(posedge clk); #0.1; check(kerr, "kerr for K1.1");
    @(negedge clk); dtin = 8'hFE;
    @(posedge clk); #0.1; check(!kerr, "no kerr for K30.7");
    // Part 2: random stream starting from reset (RD-)
    @(negedge clk); wt = 1'b0; rst_n = 1'b0;
    @(negedge clk); rst_n = 1'b1;
    check(disp_out == 1'b0, "reset to RD-");
    rd = -1; run_len = 0; last_bit = 1'b0; window = '0; prev_sent_comma = 1'b0;
    for (int n = 0; n < 4000; n++) begin
      logic sent_k, sent_comma;
      int ones;
      @(negedge clk);
      wt = 1'b1;
      sent_k = ($urandom_range(0, 7) == 0);
      kin = sent_k;
      if (sent_k) begin
        case ($urandom_range(0, 4))
          0: dtin = 8'hF7;
          1: dtin = 8'hFB;
          2: dtin = 8'hFD;
          3: dtin = 8'hFE;
          default: dtin = {3'($urandom_range(0, 7)), 5'd28};
        endcase
      end else dtin = 8'($urandom);
      sent_comma = sent_k && dtin[4:0] == 5'd28 &&
                   (dtin[7:5] == 3'd1 || dtin[7:5] == 3'd5 || dtin[7:5] == 3'd7);
      @(posedge clk); #0.1;
      ones = $countones(dtout);
      check(nd && !kerr, "nd set, no kerr");
      check((rd < 0 && (ones == 5 || ones == 6)) || (rd > 0 && (ones == 5 || ones == 4)),
            $sformatf("disparity rule: rd=%0d ones=%0d code=%b", rd, ones, dtout));
      if (ones == 6) rd = 1;
      if (ones == 4) rd = -1;
      check(disp_out == (rd > 0), "disp_out follows line disparity");
      for (int b = 9; b >= 0; b--) begin
        if (dtout[b] == last_bit) run_len++; else run_len = 1;
        last_bit = dtout[b];
        check(run_len <= 5, "run length <= 5");
      end
      // comma search over the previous and current symbol
      window = {window[9:0], dtout};
      if (n > 0)
        for (int s = 1; s <= 13; s++) begin
          logic [6:0] w7;
          w7 = window[19-s -: 7];
          if (w7 == COMMA_P || w7 == COMMA_N) begin
            checks++;
            if (!(s == 10 && sent_comma)) begin
              failures++;
              $display("FAIL: comma at offset %0d", s);
            end
          end
        end
      prev_sent_comma = sent_comma;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
