// tdmp_rx: receive side of the KM3link Time Division Multiplexing protocol.
//
// The floor module sends constant-rate frames: a K28.5 control character
// followed by SLOTS time slots of SLOT_WORDS*4 data bytes each; slot s
// always carries stream s (for example PMT hits, hydrophone data, slow
// control). The receiver hunts for K28.5, then packs the bytes of each
// slot big-endian into 32-bit words and emits every slot as one packet on
// the output stream, tagged with its slot number in out_chan and with
// out_last on its final word. A control character or a code error inside a
// frame aborts the frame (frame_err counts it); a new K28.5 always restarts
// framing; between frames the link idles on K28.5 commas, and a K28.5
// straight after a K28.5 is no error. The link cannot be stalled: a word offered while out_ready is
// low is lost and counted in overflow. Output words are registered, so
// the latency from a slot's last byte to its last word is one cycle.
// The frame layout, slot sizes and error policy are this design's own; the
// NIC's use of a TDM protocol on the KM3link is what the design follows.
module tdmp_rx
  import nanet_pkg::*;
#(
  parameter int unsigned SLOTS      = 4,
  parameter int unsigned SLOT_WORDS = 4
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  logic [7:0]  in_data,
  input  logic        in_k,
  input  logic        in_err,
  output logic        out_valid,
  input  logic        out_ready,
  output word_t       out_data,
  output logic        out_last,
  output logic [7:0]  out_chan,
  output logic [15:0] frames_ok,
  output logic [15:0] frame_err,
  output logic [15:0] overflow
);

  localparam int unsigned FRAME_BYTES = SLOTS * SLOT_WORDS * 4;
  localparam int unsigned CW = $clog2(FRAME_BYTES + 1);

  logic          in_frame;
  logic [CW-1:0] cnt;       // data bytes received in this frame
  logic [23:0]   acc;       // first three bytes of the current word

  logic byte_ok, frame_start, abort;
  logic [CW-1:0] word_idx;

  assign frame_start = in_valid && in_k && in_data == K28_5 && !in_err;
  assign abort       = in_valid && in_frame && !frame_start && (in_k || in_err);
  assign byte_ok     = in_valid && in_frame && !in_k && !in_err;
  assign word_idx    = cnt >> 2;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_frame  <= 1'b0;
      cnt       <= '0;
      acc       <= '0;
      out_valid <= 1'b0;
      out_data  <= '0;
      out_last  <= 1'b0;
      out_chan  <= '0;
      frames_ok <= '0;
      frame_err <= '0;
      overflow  <= '0;
    end else begin
      if (out_valid && !out_ready) overflow <= overflow + 1'b1;
      out_valid <= 1'b0;
      if (frame_start) begin
        if (in_frame && cnt != '0) frame_err <= frame_err + 1'b1;
        in_frame <= 1'b1;
        cnt      <= '0;
      end else if (abort) begin
        frame_err <= frame_err + 1'b1;
        in_frame  <= 1'b0;
      end else if (byte_ok) begin
        acc <= {acc[15:0], in_data};
        cnt <= cnt + 1'b1;
        if (cnt[1:0] == 2'd3) begin
          out_valid <= 1'b1;
          out_data  <= {acc, in_data};
          out_chan  <= 8'(int'(word_idx) / SLOT_WORDS);
          out_last  <= (int'(word_idx) % SLOT_WORDS) == SLOT_WORDS - 1;
        end
        if (cnt == CW'(FRAME_BYTES - 1)) begin
          in_frame  <= 1'b0;
          frames_ok <= frames_ok + 1'b1;
        end
      end
    end
  end

endmodule
