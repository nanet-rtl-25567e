// apenet_decoder: removes the internal packet header on the way out of the
// NIC, before a channel re-encapsulates the payload in its own transport
// protocol (UDP for GbE, TDM slots for KM3link).
//
// The first word of each packet is taken as an apl_hdr_t header and is
// consumed; its channel, source port and length are held on out_chan,
// out_src and out_len for the whole payload, which passes through with
// its out_last. When the header's length disagrees with the position of
// in_last, len_err counts it. A header-only packet (len 0) produces no
// output. Zero latency: valid, ready and data pass combinationally. The
// header layout is this design's own choice (see nanet_pkg).
module apenet_decoder
  import nanet_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  output logic        in_ready,
  input  word_t       in_data,
  input  logic        in_last,
  output logic        out_valid,
  input  logic        out_ready,
  output word_t       out_data,
  output logic        out_last,
  output logic [7:0]  out_chan,
  output logic [3:0]  out_src,
  output logic [15:0] out_len,
  output logic [15:0] len_err
);

  logic        in_pay;     // header consumed, payload flowing
  logic [15:0] cnt;
  apl_hdr_t    h;

  assign h         = apl_hdr_t'(in_data);
  assign in_ready  = in_pay ? out_ready : 1'b1;
  assign out_valid = in_pay && in_valid;
  assign out_data  = in_data;
  assign out_last  = in_last;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_pay   <= 1'b0;
      cnt      <= '0;
      out_chan <= '0;
      out_src  <= '0;
      out_len  <= '0;
      len_err  <= '0;
    end else if (in_valid && in_ready) begin
      if (!in_pay) begin
        out_chan <= h.chan;
        out_src  <= h.src;
        out_len  <= h.len;
        cnt      <= 16'd1;
        in_pay   <= !in_last;
        if (in_last != (h.len == 16'd0)) len_err <= len_err + 1'b1;
      end else begin
        cnt <= cnt + 1'b1;
        if (in_last) begin
          in_pay <= 1'b0;
          if (cnt != out_len) len_err <= len_err + 1'b1;
        end
      end
    end
  end

endmodule
