// tb_gtp_tx_pcs: drives a sequence of characters and compares the code
// groups handed to the serializer with values from the published 8b/10b
// tables, three TXUSRCLK clocks later (interface, encoder, FIFO bypass).
module tb_gtp_tx_pcs;
  timeunit 1ns; timeprecision 1ps;
  import serdes_pkg::*;
  logic txusrclk = 1'b0, rst_n = 1'b1;
  byte_t txdata = 8'hBC;
  logic is_k = 1'b1;
  sym_t txpar;
  logic kerr;
  int checks = 0, failures = 0;

  gtp_tx_pcs dut (.*);
  always #2 txusrclk = ~txusrclk;

  initial begin
    repeat (2000) @(posedge txusrclk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct packed { sym_t c; byte_t d; logic k; } vec_t;
  // legal sequence: the interface leaves reset holding a K28.5, which the
  // encoder sends from RD-; the sequence therefore opens at RD+
  vec_t seq[$] = '{
    '{10'b110000_0101, 8'hBC, 1'b1},
    '{10'b001111_1010, 8'hBC, 1'b1}, '{10'b011000_1011, 8'h00, 1'b0},
    '{10'b101010_1010, 8'hB5, 1'b0}, '{10'b110000_0101, 8'hBC, 1'b1},
    '{10'b100011_0111, 8'hF1, 1'b0}, '{10'b110100_1000, 8'hEB, 1'b0},
    '{10'b111010_1000, 8'hF7, 1'b1}, '{10'b001111_1001, 8'h3C, 1'b1},
    '{10'b000111_0100, 8'h07, 1'b0}, '{10'b110001_1100, 8'h63, 1'b0},
    '{10'b101011_0001, 8'hFF, 1'b0}
  };

  initial begin
    #1 rst_n = 1'b0;
    repeat (2) @(posedge txusrclk);
    @(negedge txusrclk) rst_n = 1'b1;
    for (int i = 0; i < seq.size() + 3; i++) begin
      if (i < seq.size()) begin
        txdata = seq[i].d; is_k = seq[i].k;
      end
      @(posedge txusrclk); #0.1;
      if (i >= 2 && i - 2 < seq.size()) begin
        checks++;
        if (txpar !== seq[i-2].c || kerr) begin
          failures++;
          $display("FAIL: symbol %0d got %b exp %b", i - 2, txpar, seq[i-2].c);
        end
      end
      @(negedge txusrclk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
