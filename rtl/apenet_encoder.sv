// apenet_encoder: APElink protocol encoder of an I/O channel.
//
// Inbound payload (from a protocol manager such as udp_rx or tdmp_rx) is
// wrapped into the NIC's internal packet format: a header word (apl_hdr_t:
// destination port, source port SRC_PORT, channel, length in words)
// followed by the payload. Because the header carries the length, the
// payload is buffered: words enter a DEPTH-word FIFO and, when a packet is
// complete, its header enters a small header queue. The output side sends a
// header and then exactly 'len' words from the FIFO, with out_last on the
// last one. A packet that reaches MAX_LEN words is closed there and the
// rest of the input continues as a new packet with the same destination
// and channel. in_dest and in_chan are
// sampled with the first word of a packet. Throughput is one word per
// cycle plus one header cycle per packet; the first header leaves one
// cycle after the last payload word is accepted. Encapsulation into an
// internal packet follows the design; the header layout, the store-and-
// forward buffer and the length cut are this design's own choices.
module apenet_encoder
  import nanet_pkg::*;
#(
  parameter int unsigned DEPTH    = 512,
  parameter int unsigned MAX_LEN  = 512,
  parameter int unsigned HQ_DEPTH = 4,
  parameter logic [3:0]  SRC_PORT = 4'd1
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  output logic       in_ready,
  input  word_t      in_data,
  input  logic       in_last,
  input  logic [7:0] in_chan,
  input  logic [3:0] in_dest,
  output logic       out_valid,
  input  logic       out_ready,
  output word_t      out_data,
  output logic       out_last
);

  localparam int unsigned AW = $clog2(DEPTH);
  localparam int unsigned HW = $clog2(HQ_DEPTH);

  word_t       mem [DEPTH];
  logic [AW:0] wp, rp;
  apl_hdr_t    hq [HQ_DEPTH];
  logic [HW:0] hwp, hrp;

  logic [15:0] cur_len;
  logic [7:0]  cur_chan;
  logic [3:0]  cur_dest;
  logic        in_pkt;
  logic [15:0] left;
  logic        sending;

  logic fifo_full, hq_full, hq_empty, take, close;
  logic [7:0] chan_now;
  logic [3:0] dest_now;

  assign fifo_full = (wp[AW] != rp[AW]) && (wp[AW-1:0] == rp[AW-1:0]);
  assign hq_full   = (hwp[HW] != hrp[HW]) && (hwp[HW-1:0] == hrp[HW-1:0]);
  assign hq_empty  = hwp == hrp;
  assign in_ready  = !fifo_full && !hq_full;
  assign take      = in_valid && in_ready;
  assign close     = take && (in_last || cur_len == 16'(MAX_LEN - 1));
  assign chan_now  = in_pkt ? cur_chan : in_chan;
  assign dest_now  = in_pkt ? cur_dest : in_dest;

  always_comb begin
    if (!sending) begin
      out_valid = !hq_empty;
      out_data  = hq[hrp[HW-1:0]];
      out_last  = 1'b0;
    end else begin
      out_valid = 1'b1;
      out_data  = mem[rp[AW-1:0]];
      out_last  = left == 16'd1;
    end
  end

  always_ff @(posedge clk) begin
    if (take) mem[wp[AW-1:0]] <= in_data;
    if (close) hq[hwp[HW-1:0]] <= '{dest: dest_now, src: SRC_PORT, chan: chan_now,
                                     len: cur_len + 16'd1};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp       <= '0;
      rp       <= '0;
      hwp      <= '0;
      hrp      <= '0;
      cur_len  <= '0;
      cur_chan <= '0;
      cur_dest <= '0;
      in_pkt   <= 1'b0;
      left     <= '0;
      sending  <= 1'b0;
    end else begin
      if (take) begin
        wp <= wp + 1'b1;
        if (!in_pkt) begin
          cur_chan <= in_chan;
          cur_dest <= in_dest;
        end
        if (close) begin
          hwp     <= hwp + 1'b1;
          cur_len <= '0;
          in_pkt  <= !in_last;   // a cut packet keeps its dest and chan
        end else begin
          cur_len <= cur_len + 1'b1;
          in_pkt  <= 1'b1;
        end
      end
      if (out_valid && out_ready) begin
        if (!sending) begin
          sending <= 1'b1;
          left    <= hq[hrp[HW-1:0]].len;
          hrp     <= hrp + 1'b1;
        end else begin
          rp   <= rp + 1'b1;
          left <= left - 1'b1;
          if (left == 16'd1) sending <= 1'b0;
        end
      end
    end
  end

  // The header can only be sent after all its words are in the FIFO.
  a_len_fits: assert property (@(posedge clk) disable iff (!rst_n)
                               sending |-> (wp != rp));

endmodule
