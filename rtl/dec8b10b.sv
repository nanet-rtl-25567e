// dec8b10b: 8b/10b line decoder of the KM3link physical link coding stage.
//
// An aligned 10-bit code group is matched against the 5b/6b and 3b/4b
// tables of linecode_pkg for the current running disparity, which gives
// the byte, its K flag and the next running disparity. A group that matches
// no entry for the current disparity (a bad code or a disparity error)
// raises code_err; the running disparity then follows the group's own
// balance so that the decoder resynchronises. Output is registered: one
// cycle of fixed latency. Running disparity resets to RD-. The code is the
// standard one; the error handling is this implementation's choice.
module dec8b10b
  import linecode_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  logic [9:0] in_code,    // bit 9 = a, first bit on the line
  output logic       out_valid,
  output logic [7:0] out_data,
  output logic       out_k,
  output logic       code_err
);

  logic       rd;
  logic [5:0] c6;
  logic [3:0] c4;
  logic [4:0] x;
  logic [2:0] y;
  logic       hit6, hit4, k, rd6, rd_next;

  always_comb begin
    c6   = in_code[9:4];
    c4   = in_code[3:0];
    x    = '0;
    y    = '0;
    hit6 = 1'b0;
    hit4 = 1'b0;
    k    = 1'b0;
    for (int i = 0; i < 32; i++) begin
      if (enc6(5'(i), 1'b0, rd) == c6) begin
        x    = 5'(i);
        hit6 = 1'b1;
      end
    end
    if (enc6(5'd28, 1'b1, rd) == c6) begin
      x    = 5'd28;
      hit6 = 1'b1;
      k    = 1'b1;
    end
    rd6 = rd_after6(c6, rd);
    if (k) begin
      for (int j = 0; j < 8; j++)
        if (enc4(3'(j), 1'b1, x, rd6) == c4) begin
          y    = 3'(j);
          hit4 = 1'b1;
        end
    end else begin
      for (int j = 0; j < 8; j++)
        if (enc4(3'(j), 1'b0, x, rd6) == c4) begin
          y    = 3'(j);
          hit4 = 1'b1;
        end
      // K23.7, K27.7, K29.7, K30.7 use the alternate 7 with a data 6b part.
      if (!hit4 && (x == 5'd23 || x == 5'd27 || x == 5'd29 || x == 5'd30) &&
          enc4(3'd7, 1'b1, x, rd6) == c4) begin
        y    = 3'd7;
        hit4 = 1'b1;
        k    = 1'b1;
      end
    end
    rd_next = rd_after4(c4, rd6);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd        <= 1'b0;
      out_valid <= 1'b0;
      out_data  <= '0;
      out_k     <= 1'b0;
      code_err  <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_data <= {y, x};
        out_k    <= k;
        code_err <= !(hit6 && hit4);
        rd       <= rd_next;
      end
    end
  end

endmodule
