// payload_gen: programmable generator of the transmitted character stream.
//
// A small pattern memory holds DEPTH characters {is_k, data}; the generator
// plays entries 0 .. len-1 in a loop, one character per clock while en is
// high. After reset the pattern is a K28.5 comma in entry 0 followed by the
// data bytes 1, 2, ... DEPTH-1, so a comma is sent every DEPTH words for the
// receiver to find the byte boundary. The pattern and its length can be
// rewritten at run time through the prog_* port (one entry per clock).
//
// Timing: txdata/is_k are registered; the first character after reset leaves
// one clock after en rises. The memory-and-loop structure, its depth and the
// default pattern are this design's own; the reference only says that the
// generator is programmable with data and control symbols and that a control
// character is sent periodically.
module payload_gen
  import serdes_pkg::*;
#(
  parameter int unsigned DEPTH = 16
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     en,
  input  logic                     prog_we,
  input  logic [$clog2(DEPTH)-1:0] prog_addr,
  input  char_t                    prog_char,
  input  logic                     prog_len_we,
  input  logic [$clog2(DEPTH):0]   prog_len,     // 1 .. DEPTH
  output byte_t                    txdata,
  output logic                     is_k,
  output logic                     first         // entry 0 is on txdata
);

  localparam int unsigned AW = $clog2(DEPTH);

  char_t                 pattern [DEPTH];
  logic [AW-1:0]         rd_addr;
  logic [$clog2(DEPTH):0] len_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < DEPTH; i++)
        pattern[i] <= (i == 0) ? char_t'{is_k: 1'b1, data: K28_5}
                               : char_t'{is_k: 1'b0, data: byte_t'(i)};
      len_q   <= ($clog2(DEPTH)+1)'(DEPTH);
      rd_addr <= '0;
      txdata  <= '0;
      is_k    <= 1'b0;
      first   <= 1'b0;
    end else begin
      if (prog_we) pattern[prog_addr] <= prog_char;
      if (prog_len_we && prog_len != 0) len_q <= prog_len;
      if (en) begin
        txdata  <= pattern[rd_addr].data;
        is_k    <= pattern[rd_addr].is_k;
        first   <= (rd_addr == '0);
        rd_addr <= ({1'b0, rd_addr} + 1'b1 >= len_q) ? '0 : rd_addr + 1'b1;
      end
    end
  end

endmodule
