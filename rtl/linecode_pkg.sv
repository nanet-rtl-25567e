// linecode_pkg: the 8b/10b code tables as functions, shared by the encoder
// and the decoder of the KM3link physical link coding.
//
// The code is the standard 8b/10b code (5b/6b and 3b/4b sub-blocks with
// running disparity). A code group is held as {abcdei, fghj}: bit 9 is
// 'a', the first bit on the line, bit 0 is 'j'. rd = 0 means negative
// running disparity (RD-), rd = 1 positive (RD+). The tables are written in
// their RD- form; the RD+ form is the complement for unbalanced sub-blocks
// and for the two balanced-but-alternating ones (D.07 and D.x.3).
package linecode_pkg;

  function automatic int unsigned ones6(input logic [5:0] c);
    int unsigned n = 0;
    for (int i = 0; i < 6; i++) n += int'(c[i]);
    return n;
  endfunction

  function automatic int unsigned ones4(input logic [3:0] c);
    int unsigned n = 0;
    for (int i = 0; i < 4; i++) n += int'(c[i]);
    return n;
  endfunction

  // 5b/6b sub-block in its RD- form (abcdei, a in bit 5).
  function automatic logic [5:0] code6_rdn(input logic [4:0] x, input logic k);
    logic [5:0] c;
    case (x)
      5'd0:  c = 6'b100111;  5'd1:  c = 6'b011101;
      5'd2:  c = 6'b101101;  5'd3:  c = 6'b110001;
      5'd4:  c = 6'b110101;  5'd5:  c = 6'b101001;
      5'd6:  c = 6'b011001;  5'd7:  c = 6'b111000;
      5'd8:  c = 6'b111001;  5'd9:  c = 6'b100101;
      5'd10: c = 6'b010101;  5'd11: c = 6'b110100;
      5'd12: c = 6'b001101;  5'd13: c = 6'b101100;
      5'd14: c = 6'b011100;  5'd15: c = 6'b010111;
      5'd16: c = 6'b011011;  5'd17: c = 6'b100011;
      5'd18: c = 6'b010011;  5'd19: c = 6'b110010;
      5'd20: c = 6'b001011;  5'd21: c = 6'b101010;
      5'd22: c = 6'b011010;  5'd23: c = 6'b111010;
      5'd24: c = 6'b110011;  5'd25: c = 6'b100110;
      5'd26: c = 6'b010110;  5'd27: c = 6'b110110;
      5'd28: c = k ? 6'b001111 : 6'b001110;
      5'd29: c = 6'b101110;  5'd30: c = 6'b011110;
      default: c = 6'b101011;
    endcase
    return c;
  endfunction

  // 5b/6b sub-block for running disparity rd.
  function automatic logic [5:0] enc6(input logic [4:0] x, input logic k, input logic rd);
    logic [5:0] c = code6_rdn(x, k);
    if (rd && (ones6(c) != 3 || (x == 5'd7 && !k))) c = ~c;
    return c;
  endfunction

  // 3b/4b sub-block (fghj, f in bit 3); rd is the disparity after the 6b part.
  function automatic logic [3:0] enc4(input logic [2:0] y, input logic k,
                                      input logic [4:0] x, input logic rd);
    logic [3:0] c;
    logic alt7;
    if (k) begin
      case (y)
        3'd0: c = 4'b1011;  3'd1: c = 4'b0110;
        3'd2: c = 4'b1010;  3'd3: c = 4'b1100;
        3'd4: c = 4'b1101;  3'd5: c = 4'b0101;
        3'd6: c = 4'b1001;  default: c = 4'b0111;
      endcase
      if (rd) c = ~c;
    end else begin
      alt7 = (!rd && (x == 5'd17 || x == 5'd18 || x == 5'd20)) ||
             ( rd && (x == 5'd11 || x == 5'd13 || x == 5'd14));
      case (y)
        3'd0: c = 4'b1011;  3'd1: c = 4'b1001;
        3'd2: c = 4'b0101;  3'd3: c = 4'b1100;
        3'd4: c = 4'b1101;  3'd5: c = 4'b1010;
        3'd6: c = 4'b0110;  default: c = alt7 ? 4'b0111 : 4'b1110;
      endcase
      if (rd && (ones4(c) != 2 || y == 3'd3)) c = ~c;
    end
    return c;
  endfunction

  // Running disparity after a sub-block: unchanged when balanced.
  function automatic logic rd_after6(input logic [5:0] c, input logic rd);
    return (ones6(c) == 3) ? rd : (ones6(c) > 3);
  endfunction

  function automatic logic rd_after4(input logic [3:0] c, input logic rd);
    return (ones4(c) == 2) ? rd : (ones4(c) > 2);
  endfunction

  // The twelve valid control characters: K28.0..K28.7, K23.7, K27.7, K29.7, K30.7.
  function automatic logic k_valid(input logic [7:0] b);
    return (b[4:0] == 5'd28) ||
           (b[7:5] == 3'd7 && (b[4:0] == 5'd23 || b[4:0] == 5'd27 ||
                               b[4:0] == 5'd29 || b[4:0] == 5'd30));
  endfunction

endpackage
