// tdmp_tx: transmit side of the KM3link Time Division Multiplexing protocol.
//
// The shore-to-sea direction carries little more than slow control, but the
// link must run at a constant rate with a fixed latency. This block sends
// frames back to back, one byte per cycle: a K28.5 control character, then
// SLOTS slots of SLOT_WORDS*4 data bytes (same layout as tdmp_rx). Slow
// control packets from the host arrive on the input stream with the target
// slot in in_chan. One packet at a time is collected in a staging buffer;
// at the next frame start it moves into the frame buffer and is sent in its
// slot, big-endian, while all other slots carry zero bytes. Words beyond
// SLOT_WORDS in a packet are dropped and counted in truncated. Bytes leave
// registered; a packet staged before a frame start goes out in that frame.
// The frame layout and the one-packet-per-frame policy are this design's
// choices.
module tdmp_tx
  import nanet_pkg::*;
#(
  parameter int unsigned SLOTS      = 4,
  parameter int unsigned SLOT_WORDS = 4
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  output logic        in_ready,
  input  word_t       in_data,
  input  logic        in_last,
  input  logic [7:0]  in_chan,
  output logic        out_valid,
  output logic [7:0]  out_data,
  output logic        out_k,
  output logic [15:0] frames_sent,
  output logic [15:0] truncated
);

  localparam int unsigned FRAME_BYTES = SLOTS * SLOT_WORDS * 4;
  localparam int unsigned CW = $clog2(FRAME_BYTES + 1);
  localparam int unsigned WW = $clog2(SLOT_WORDS + 1);

  word_t         stage_buf [SLOT_WORDS];
  logic [WW-1:0] stage_cnt;
  logic [7:0]    stage_chan;
  logic          stage_full;

  word_t         frame_buf [SLOT_WORDS];
  logic [7:0]    frame_chan;
  logic          frame_has;

  logic [CW-1:0] pos;       // 0 = K28.5, 1..FRAME_BYTES = data byte pos-1
  logic [CW-1:0] bidx;
  logic [CW-1:0] widx;
  logic [7:0]    slot_of_byte;
  word_t         w;

  assign in_ready = !stage_full;

  always_comb begin
    bidx         = pos - 1'b1;
    widx         = bidx >> 2;
    slot_of_byte = 8'(int'(widx) / SLOT_WORDS);
    w            = frame_buf[int'(widx) % SLOT_WORDS];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      stage_cnt   <= '0;
      stage_chan  <= '0;
      stage_full  <= 1'b0;
      frame_chan  <= '0;
      frame_has   <= 1'b0;
      pos         <= '0;
      out_valid   <= 1'b0;
      out_data    <= '0;
      out_k       <= 1'b0;
      frames_sent <= '0;
      truncated   <= '0;
      for (int i = 0; i < SLOT_WORDS; i++) begin
        stage_buf[i] <= '0;
        frame_buf[i] <= '0;
      end
    end else begin
      // Collect one host packet.
      if (in_valid && in_ready) begin
        if (stage_cnt == '0) stage_chan <= in_chan;
        if (stage_cnt < WW'(SLOT_WORDS)) begin
          stage_buf[int'(stage_cnt)] <= in_data;
          stage_cnt <= stage_cnt + 1'b1;
        end else begin
          truncated <= truncated + 1'b1;
        end
        if (in_last) stage_full <= 1'b1;
      end
      // Frame sequencer, one byte per cycle.
      out_valid <= 1'b1;
      if (pos == '0) begin
        out_data <= K28_5;
        out_k    <= 1'b1;
        if (stage_full) begin
          for (int i = 0; i < SLOT_WORDS; i++)
            frame_buf[i] <= (WW'(i) < stage_cnt) ? stage_buf[i] : '0;
          frame_chan <= stage_chan;
          frame_has  <= 1'b1;
          stage_full <= 1'b0;
          stage_cnt  <= '0;
        end else begin
          frame_has <= 1'b0;
        end
        pos <= pos + 1'b1;
      end else begin
        out_k    <= 1'b0;
        out_data <= (frame_has && slot_of_byte == frame_chan) ?
                    w[8*(3-int'(bidx[1:0])) +: 8] : 8'h00;
        if (pos == CW'(FRAME_BYTES)) begin
          pos         <= '0;
          frames_sent <= frames_sent + 1'b1;
        end else begin
          pos <= pos + 1'b1;
        end
      end
    end
  end

endmodule
