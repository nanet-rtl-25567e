// udp_tx: transmit side of the GbE Protocol Manager.
//
// Payload leaving the NIC on the GbE channel (the header already removed by
// apenet_decoder, which supplies the payload length in words and the
// channel) is re-encapsulated into a UDP/IPv4/Ethernet frame for the MAC.
// Before the first payload word the block sends 11 header words: the
// MAC's 2-byte alignment pad, the Ethernet header (EtherType 0x0800), an
// IPv4 header without options (TTL 64, don't-fragment, protocol 17, header
// checksum computed here) and the UDP header (source port
// cfg_port_base + channel, destination port cfg_dst_port, checksum 0,
// which IPv4 allows). The payload then passes straight through with
// out_eop on its last word. Header words need one cycle each; the
// payload flows at one word per cycle. The frame layout is standard
// UDP/IPv4; the field values, the alignment pad and the zero UDP checksum
// are this design's choices.
module udp_tx
  import nanet_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic [47:0] cfg_src_mac,
  input  logic [47:0] cfg_dst_mac,
  input  logic [31:0] cfg_src_ip,
  input  logic [31:0] cfg_dst_ip,
  input  logic [15:0] cfg_port_base,
  input  logic [15:0] cfg_dst_port,
  // payload in
  input  logic        in_valid,
  output logic        in_ready,
  input  word_t       in_data,
  input  logic        in_last,
  input  logic [15:0] in_len,     // payload words
  input  logic [7:0]  in_chan,
  // frame to the MAC
  output logic        out_valid,
  input  logic        out_ready,
  output word_t       out_data,
  output logic        out_sop,
  output logic        out_eop,
  output logic [15:0] frames_sent
);

  localparam int unsigned HDR_WORDS = 11;

  logic        in_hdr;     // sending header words
  logic        in_pay;
  logic [3:0]  wi;
  logic [15:0] udp_len, ip_len, cks;
  logic [15:0] sport;
  word_t       hw;

  assign udp_len = 16'd8 + {in_len[13:0], 2'b00};
  assign ip_len  = 16'd20 + udp_len;
  assign sport   = cfg_port_base + 16'(in_chan);

  // IPv4 header checksum: ones' complement of the ones' complement sum.
  always_comb begin
    logic [19:0] s;
    s = 20'h04500 + 20'(ip_len) + 20'h04000 + 20'h04011 +
        20'(cfg_src_ip[31:16]) + 20'(cfg_src_ip[15:0]) +
        20'(cfg_dst_ip[31:16]) + 20'(cfg_dst_ip[15:0]);
    s   = 20'(s[15:0]) + 20'(s[19:16]);
    s   = 20'(s[15:0]) + 20'(s[19:16]);
    cks = ~s[15:0];
  end

  always_comb begin
    case (wi)
      4'd0:    hw = {16'h0000, cfg_dst_mac[47:32]};
      4'd1:    hw = cfg_dst_mac[31:0];
      4'd2:    hw = cfg_src_mac[47:16];
      4'd3:    hw = {cfg_src_mac[15:0], 16'h0800};
      4'd4:    hw = {16'h4500, ip_len};
      4'd5:    hw = {16'h0000, 16'h4000};
      4'd6:    hw = {8'd64, 8'd17, cks};
      4'd7:    hw = cfg_src_ip;
      4'd8:    hw = cfg_dst_ip;
      4'd9:    hw = {sport, cfg_dst_port};
      default: hw = {udp_len, 16'h0000};
    endcase
  end

  always_comb begin
    if (in_pay) begin
      out_valid = in_valid;
      out_data  = in_data;
      out_sop   = 1'b0;
      out_eop   = in_last;
      in_ready  = out_ready;
    end else begin
      out_valid = in_hdr || in_valid;
      out_data  = hw;
      out_sop   = wi == 4'd0;
      out_eop   = 1'b0;
      in_ready  = 1'b0;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_hdr      <= 1'b0;
      in_pay      <= 1'b0;
      wi          <= '0;
      frames_sent <= '0;
    end else if (out_valid && out_ready) begin
      if (!in_pay) begin
        in_hdr <= 1'b1;
        if (wi == 4'(HDR_WORDS - 1)) begin
          wi     <= '0;
          in_hdr <= 1'b0;
          in_pay <= 1'b1;
        end else begin
          wi <= wi + 1'b1;
        end
      end else if (in_last) begin
        in_pay      <= 1'b0;
        frames_sent <= frames_sent + 1'b1;
      end
    end
  end

endmodule
