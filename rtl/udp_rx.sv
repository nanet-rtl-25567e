// udp_rx: receive side of the GbE Protocol Manager, a UDP/IPv4 offload.
//
// Frames come from the Ethernet MAC as a 32-bit stream (in_sop/in_eop mark
// the frame) with the MAC's 2-byte alignment pad in front of the Ethernet
// header, so the 14+20+8 header bytes end on a word boundary and the UDP
// payload starts in word 11. The block checks EtherType 0x0800, an IPv4
// header without options (first byte 0x45), protocol 17 (UDP) and a
// destination port inside [cfg_port_base, cfg_port_base+NCHAN). Accepted
// datagrams leave as a packet holding only the payload: out_chan is the
// port offset, out_bytes the payload length taken from the UDP length
// field, and out_last marks the last payload word; the Ethernet minimum-
// size padding behind a short payload is discarded. Other frames are
// dropped and counted. Header words are always accepted; payload words
// pass straight through, so in_ready follows out_ready during the payload.
// The offload itself is the design's UDP stage; the pad, the filter rules
// and the no-options and no-checksum-check policy are this design's own
// choices.
module udp_rx
  import nanet_pkg::*;
#(
  parameter int unsigned NCHAN = 4
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [15:0] cfg_port_base,
  // from the MAC
  input  logic        in_valid,
  output logic        in_ready,
  input  word_t       in_data,
  input  logic        in_sop,
  input  logic        in_eop,
  // payload out
  output logic        out_valid,
  input  logic        out_ready,
  output word_t       out_data,
  output logic        out_last,
  output logic [7:0]  out_chan,
  output logic [15:0] out_bytes,
  output logic [15:0] rx_ok,
  output logic [15:0] rx_drop
);

  typedef enum logic [1:0] {S_HDR, S_PAY, S_DROP} state_t;

  localparam int unsigned HDR_WORDS = 11;

  state_t      state;
  logic [3:0]  wi;           // header word index
  logic        hdr_bad;
  logic [15:0] dport;
  logic [15:0] pay_left;     // payload words still to pass
  logic        hdr_last_ok;
  logic [15:0] udp_len;
  logic [15:0] pay_words;
  logic        take;

  assign udp_len     = in_data[31:16];
  assign pay_words   = (udp_len - 16'd8 + 16'd3) >> 2;
  assign hdr_last_ok = !hdr_bad && udp_len > 16'd8 &&
                       dport >= cfg_port_base &&
                       dport < cfg_port_base + 16'(NCHAN);

  assign in_ready  = (state == S_PAY) ? out_ready : 1'b1;
  assign out_valid = (state == S_PAY) && in_valid;
  assign out_data  = in_data;
  assign out_last  = (pay_left == 16'd1) || in_eop;
  assign take      = in_valid && in_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_HDR;
      wi        <= '0;
      hdr_bad   <= 1'b0;
      dport     <= '0;
      pay_left  <= '0;
      out_chan  <= '0;
      out_bytes <= '0;
      rx_ok     <= '0;
      rx_drop   <= '0;
    end else if (take) begin
      unique case (state)
        S_HDR: begin
          if (in_sop) begin
            wi      <= 4'd1;
            hdr_bad <= 1'b0;
          end else begin
            wi <= wi + 1'b1;
          end
          case (in_sop ? 4'd0 : wi)
            4'd3: if (in_data[15:0] != 16'h0800) hdr_bad <= 1'b1;
            4'd4: if (in_data[31:24] != 8'h45)   hdr_bad <= 1'b1;
            4'd6: if (in_data[23:16] != 8'd17)   hdr_bad <= 1'b1;
            4'd9: dport <= in_data[15:0];
            default: ;
          endcase
          if (!in_sop && wi == 4'(HDR_WORDS - 1)) begin
            if (hdr_last_ok && !in_eop) begin
              state     <= S_PAY;
              pay_left  <= pay_words;
              out_bytes <= udp_len - 16'd8;
              out_chan  <= 8'(dport - cfg_port_base);
            end else begin
              rx_drop <= rx_drop + 1'b1;
              state   <= in_eop ? S_HDR : S_DROP;
            end
            wi <= '0;
          end else if (in_eop) begin
            rx_drop <= rx_drop + 1'b1;
            wi      <= '0;
          end
        end
        S_PAY: begin
          pay_left <= pay_left - 1'b1;
          if (out_last) begin
            rx_ok <= rx_ok + 1'b1;
            state <= in_eop ? S_HDR : S_DROP;
          end
        end
        default: if (in_eop) state <= S_HDR;   // S_DROP: skip padding
      endcase
    end
  end

endmodule
