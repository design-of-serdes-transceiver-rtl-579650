// elastic_buffer: clock-crossing FIFO whose latency is set at start-up.
//
// Words written on wr_clk are read on rd_clk. Pointers cross the domains in
// Gray code through two-flop synchronizers. The read side does not start
// when the FIFO merely becomes non-empty: it waits until the synchronized
// write pointer is START_LEVEL words ahead of the read pointer, then reads
// one word per clock. With equal read and write rates the number of words in
// flight, and so the latency through the buffer, is the same after every
// reset instead of depending on how the two sides came out of reset.
// overflow/underflow are sticky flags for a rate mismatch.
//
// Interface: wr_en/din on wr_clk; dout/dout_valid registered on rd_clk.
// Each side has its own active-low reset. The start threshold is the
// mechanism the reference asks of an elastic buffer for fixed latency; the
// Gray-code FIFO, depth and threshold are this design's.
module elastic_buffer #(
  parameter int unsigned WIDTH       = 10,
  parameter int unsigned DEPTH       = 8,     // power of two
  parameter int unsigned START_LEVEL = 1
) (
  input  logic             wr_clk,
  input  logic             wr_rst_n,
  input  logic             wr_en,
  input  logic [WIDTH-1:0] din,
  output logic             overflow,
  input  logic             rd_clk,
  input  logic             rd_rst_n,
  output logic [WIDTH-1:0] dout,
  output logic             dout_valid,
  output logic             underflow
);

  localparam int unsigned AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW:0] wbin, wgray, rbin, rgray;
  logic [AW:0] wgray_s1, wgray_s2, rgray_s1, rgray_s2;
  logic [AW:0] wbin_s, rbin_s;
  logic        running;

  function automatic logic [AW:0] gray2bin(input logic [AW:0] g);
    logic [AW:0] b;
    b[AW] = g[AW];
    for (int i = AW - 1; i >= 0; i--) b[i] = b[i+1] ^ g[i];
    return b;
  endfunction

  // write side
  logic full;
  assign rbin_s = gray2bin(rgray_s2);
  assign full   = (wbin - rbin_s) >= (AW+1)'(DEPTH);

  always_ff @(posedge wr_clk or negedge wr_rst_n) begin
    if (!wr_rst_n) begin
      wbin     <= '0;
      wgray    <= '0;
      rgray_s1 <= '0;
      rgray_s2 <= '0;
      overflow <= 1'b0;
    end else begin
      rgray_s1 <= rgray;
      rgray_s2 <= rgray_s1;
      if (wr_en) begin
        if (full) overflow <= 1'b1;
        else begin
          wbin  <= wbin + 1'b1;
          wgray <= (wbin + 1'b1) ^ ((wbin + 1'b1) >> 1);
        end
      end
    end
  end

  always_ff @(posedge wr_clk)
    if (wr_en && !full) mem[wbin[AW-1:0]] <= din;

  // read side
  logic [AW:0] level;
  assign wbin_s = gray2bin(wgray_s2);
  assign level  = wbin_s - rbin;

  always_ff @(posedge rd_clk or negedge rd_rst_n) begin
    if (!rd_rst_n) begin
      rbin       <= '0;
      rgray      <= '0;
      wgray_s1   <= '0;
      wgray_s2   <= '0;
      running    <= 1'b0;
      dout       <= '0;
      dout_valid <= 1'b0;
      underflow  <= 1'b0;
    end else begin
      wgray_s1 <= wgray;
      wgray_s2 <= wgray_s1;
      if (!running && level >= (AW+1)'(START_LEVEL)) running <= 1'b1;
      dout_valid <= 1'b0;
      if (running) begin
        if (level == '0) underflow <= 1'b1;
        else begin
          dout       <= mem[rbin[AW-1:0]];
          dout_valid <= 1'b1;
          rbin       <= rbin + 1'b1;
          rgray      <= (rbin + 1'b1) ^ ((rbin + 1'b1) >> 1);
        end
      end
    end
  end

endmodule
