// serdes_pkg: shared constants, types and 8b/10b code functions for the
// fixed-latency serial link.
//
// A 10-bit code group is held as {a,b,c,d,e,i,f,g,h,j}: bit 9 is 'a', the
// first bit on the line, and bit 0 is 'j', the last. The 5b/6b sub-block
// (abcdei) encodes EDCBA and the 3b/4b sub-block (fghj) encodes HGF, as in
// the standard 8b/10b transmission code. The tables below hold the code for
// negative running disparity (RD-); the RD+ form is the bitwise complement
// where the RD- code is unbalanced, and for the two alternating balanced codes
// D.x.7 (111000) and D.x.y.3 (1100). The encoder and decoder both use
// encode_8b10b(), so the decoder's error checks are exactly the inverse of
// what the encoder produces.
//
// Lint notes: a module that imports the package but uses only some of the
// constants (for example the decoder, which never names K28_5) gets an
// "unused parameter" warning for the others; these are shared definitions,
// not dead logic. decode_10b8b() re-encodes its result only to compare the
// code group, so the k_err bit of the two enc_t results is unused by design.
package serdes_pkg;

  localparam int unsigned SYM_W  = 10;  // code group width
  localparam int unsigned BYTE_W = 8;   // payload byte width

  typedef logic [SYM_W-1:0]  sym_t;
  typedef logic [BYTE_W-1:0] byte_t;

  // One payload character: data byte plus control flag (IS_K).
  typedef struct packed {
    logic  is_k;
    byte_t data;
  } char_t;

  // Result of an 8b/10b encode step.
  typedef struct packed {
    sym_t code;
    logic rd_out;   // running disparity after the symbol: 1 = RD+
    logic k_err;    // K requested for a byte that is no valid control code
  } enc_t;

  localparam byte_t K28_5 = 8'hBC;  // comma character K28.5
  localparam sym_t  K28_5_RDM = 10'b001111_1010;
  localparam sym_t  K28_5_RDP = 10'b110000_0101;
  // 7-bit comma sequences (abcdeif of K28.1/5/7), found only at a symbol start.
  localparam logic [6:0] COMMA_P = 7'b0011111;
  localparam logic [6:0] COMMA_N = 7'b1100000;

  // 5b/6b code (abcdei) for RD-, indexed by EDCBA.
  function automatic logic [5:0] rdm6(input logic [4:0] x);
    unique case (x)
      5'd0:  rdm6 = 6'b100111;  5'd1:  rdm6 = 6'b011101;
      5'd2:  rdm6 = 6'b101101;  5'd3:  rdm6 = 6'b110001;
      5'd4:  rdm6 = 6'b110101;  5'd5:  rdm6 = 6'b101001;
      5'd6:  rdm6 = 6'b011001;  5'd7:  rdm6 = 6'b111000;
      5'd8:  rdm6 = 6'b111001;  5'd9:  rdm6 = 6'b100101;
      5'd10: rdm6 = 6'b010101;  5'd11: rdm6 = 6'b110100;
      5'd12: rdm6 = 6'b001101;  5'd13: rdm6 = 6'b101100;
      5'd14: rdm6 = 6'b011100;  5'd15: rdm6 = 6'b010111;
      5'd16: rdm6 = 6'b011011;  5'd17: rdm6 = 6'b100011;
      5'd18: rdm6 = 6'b010011;  5'd19: rdm6 = 6'b110010;
      5'd20: rdm6 = 6'b001011;  5'd21: rdm6 = 6'b101010;
      5'd22: rdm6 = 6'b011010;  5'd23: rdm6 = 6'b111010;
      5'd24: rdm6 = 6'b110011;  5'd25: rdm6 = 6'b100110;
      5'd26: rdm6 = 6'b010110;  5'd27: rdm6 = 6'b110110;
      5'd28: rdm6 = 6'b001110;  5'd29: rdm6 = 6'b101110;
      5'd30: rdm6 = 6'b011110;  default: rdm6 = 6'b101011;
    endcase
  endfunction

  // 3b/4b code (fghj) for RD-, indexed by HGF; y = 8 selects the alternate A7.
  function automatic logic [3:0] rdm4(input logic [3:0] y, input logic k);
    if (k) begin
      unique case (y[2:0])
        3'd0: rdm4 = 4'b1011;  3'd1: rdm4 = 4'b0110;
        3'd2: rdm4 = 4'b1010;  3'd3: rdm4 = 4'b1100;
        3'd4: rdm4 = 4'b1101;  3'd5: rdm4 = 4'b0101;
        3'd6: rdm4 = 4'b1001;  default: rdm4 = 4'b0111;
      endcase
    end else begin
      unique case (y)
        4'd0: rdm4 = 4'b1011;  4'd1: rdm4 = 4'b1001;
        4'd2: rdm4 = 4'b0101;  4'd3: rdm4 = 4'b1100;
        4'd4: rdm4 = 4'b1101;  4'd5: rdm4 = 4'b1010;
        4'd6: rdm4 = 4'b0110;  4'd7: rdm4 = 4'b1110;
        default: rdm4 = 4'b0111;
      endcase
    end
  endfunction

  function automatic logic unbalanced6(input logic [5:0] c);
    return $countones(c) != 3;
  endfunction

  function automatic logic unbalanced4(input logic [3:0] c);
    return $countones(c) != 2;
  endfunction

  // True when K.x.y is one of the twelve valid control characters.
  function automatic logic valid_k(input byte_t d);
    return (d[4:0] == 5'd28) ||
           (d[7:5] == 3'd7 && (d[4:0] == 5'd23 || d[4:0] == 5'd27 ||
                               d[4:0] == 5'd29 || d[4:0] == 5'd30));
  endfunction

  // Encode one character from running disparity rd_in (1 = RD+).
  function automatic enc_t encode_8b10b(input byte_t d, input logic k, input logic rd_in);
    logic [4:0] x;
    logic [2:0] y;
    logic [5:0] c6;
    logic [3:0] c4;
    logic       rd6, use_a7;
    enc_t       r;
    x = d[4:0];
    y = d[7:5];
    // 5b/6b sub-block
    c6 = (k && x == 5'd28) ? 6'b001111 : rdm6(x);
    if (rd_in && (unbalanced6(c6) || (!k && x == 5'd7))) c6 = ~c6;
    rd6 = unbalanced6(c6) ? ~rd_in : rd_in;
    // 3b/4b sub-block, alternate A7 where P7 would make a run of five
    use_a7 = (y == 3'd7) &&
             (k || (!rd6 && (x == 5'd17 || x == 5'd18 || x == 5'd20)) ||
                   ( rd6 && (x == 5'd11 || x == 5'd13 || x == 5'd14)));
    c4 = rdm4((use_a7 && !k) ? 4'd8 : {1'b0, y}, k);
    if (rd6 && (k || unbalanced4(c4) || y == 3'd3)) c4 = ~c4;
    r.code   = {c6, c4};
    r.rd_out = unbalanced4(c4) ? ~rd6 : rd6;
    r.k_err  = k && !valid_k(d);
    return r;
  endfunction

  // Result of a 10b/8b decode step.
  typedef struct packed {
    byte_t data;
    logic  is_k;
    logic  code_err;  // not a code group of the 8b/10b code
    logic  disp_err;  // a code group, but of the wrong running disparity
    logic  rd_out;
  } dec_t;

  // Decode one code group from running disparity rd_in. The sub-blocks are
  // looked up against both disparity forms; the result is then re-encoded and
  // compared with the received group to classify errors.
  function automatic dec_t decode_10b8b(input sym_t c, input logic rd_in);
    logic [5:0] c6;
    logic [3:0] c4, c4n;
    logic [4:0] x;
    logic [2:0] y;
    logic       k28, k;
    logic       a7;
    enc_t       e_same, e_flip;
    dec_t       r;
    c6  = c[9:4];
    c4  = c[3:0];
    x   = '0;
    y   = '0;
    k28 = (c6 == 6'b001111) || (c6 == 6'b110000);
    for (int i = 0; i < 32; i++) begin
      logic [5:0] m;
      m = rdm6(5'(i));
      if (c6 == m || ((unbalanced6(m) || i == 7) && c6 == ~m)) x = 5'(i);
    end
    if (k28) x = 5'd28;
    a7 = (c4 == 4'b0111) || (c4 == 4'b1000);
    if (k28) begin
      // K28.y: fghj follows an unbalanced 6b block; bring it to the RD- form.
      c4n = (c6 == 6'b001111) ? ~c4 : c4;
      for (int j = 0; j < 8; j++)
        if (c4n == rdm4(4'(j), 1'b1)) y = 3'(j);
    end else begin
      for (int j = 0; j < 8; j++) begin
        logic [3:0] m;
        m = rdm4(4'(j), 1'b0);
        if (c4 == m || ((unbalanced4(m) || j == 3) && c4 == ~m)) y = 3'(j);
      end
      if (a7) y = 3'd7;
    end
    k = k28 || (a7 && (x == 5'd23 || x == 5'd27 || x == 5'd29 || x == 5'd30));
    e_same = encode_8b10b({y, x}, k, rd_in);
    e_flip = encode_8b10b({y, x}, k, ~rd_in);
    r.data     = {y, x};
    r.is_k     = k;
    r.code_err = (e_same.code != c) && (e_flip.code != c);
    r.disp_err = (e_same.code != c) && (e_flip.code == c);
    r.rd_out   = (e_same.code == c) ? e_same.rd_out : e_flip.rd_out;
    return r;
  endfunction

endpackage
