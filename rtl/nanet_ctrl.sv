// nanet_ctrl: the NaNet Controller on the receive side of the network
// interface, with its Virtual Address Generator (VAG) and the receive
// buffer timeout.
//
// The host registers a ring of NBUF receive buffers in CPU or GPU memory
// by their virtual base addresses (buf_wr_*); all are cfg_buf_bytes long.
// Packets arrive from router port 0 as a header word plus payload. For each
// payload word the VAG forms the virtual address base[cur] + offset, the
// TLB turns it into a physical address, and the word leaves on the DMA
// write port towards the PCIe core. A TLB miss stalls the stream until the
// mapping is installed. A buffer is closed, and a completion event posted
// for it (buffer index and bytes written), in three cases: it is exactly
// full; the next packet would not fit (packets are never split across
// buffers); or cfg_timeout cycles (0 = off) have passed since its first
// word and no packet is in progress, so that a partly filled buffer still
// reaches the application within a fixed deadline. A packet longer than a
// whole buffer is dropped and counted. Words pass combinationally from
// the input to the DMA port (one per cycle); events are registered one
// cycle after the closing word. The VAG, TLB use and timeout follow the
// design; the ring of equal buffers, the packing rule and the event format
// are this design's choices.
module nanet_ctrl
  import nanet_pkg::*;
#(
  parameter int unsigned NBUF   = 16,
  parameter int unsigned ADDR_W = 64
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // configuration
  input  logic [31:0]             cfg_buf_bytes,
  input  logic [31:0]             cfg_timeout,
  input  logic                    buf_wr_en,
  input  logic [$clog2(NBUF)-1:0] buf_wr_idx,
  input  logic [ADDR_W-1:0]       buf_wr_vaddr,
  // packets from the router
  input  logic                    in_valid,
  output logic                    in_ready,
  input  word_t                   in_data,
  input  logic                    in_last,
  // TLB lookup
  output logic                    tlb_en,
  output logic [ADDR_W-1:0]       tlb_vaddr,
  input  logic                    tlb_hit,
  input  logic [ADDR_W-1:0]       tlb_paddr,
  // DMA write port to the PCIe core
  output logic                    dma_valid,
  input  logic                    dma_ready,
  output logic [ADDR_W-1:0]       dma_addr,
  output word_t                   dma_data,
  output logic                    dma_last,
  // completion events
  output logic                    evt_valid,
  output logic [$clog2(NBUF)-1:0] evt_buf,
  output logic [31:0]             evt_bytes,
  output logic                    evt_timeout,
  output logic [15:0]             oversize_drops
);

  localparam int unsigned BW = $clog2(NBUF);

  typedef enum logic [1:0] {S_HDR, S_PAY, S_DROP} state_t;

  state_t          state;
  logic [ADDR_W-1:0] base [NBUF];
  logic [BW-1:0]   cur;
  logic [31:0]     off;
  logic [31:0]     timer;
  apl_hdr_t        h;
  logic [31:0]     pkt_bytes;
  logic            word_go;
  logic            close_full, close_room, close_to;

  assign h         = apl_hdr_t'(in_data);
  assign pkt_bytes = {14'd0, h.len, 2'b00};

  // VAG and the DMA path.
  assign tlb_vaddr = base[cur] + ADDR_W'(off);
  assign tlb_en    = (state == S_PAY) && in_valid;
  assign dma_valid = tlb_en && tlb_hit;
  assign dma_addr  = tlb_paddr;
  assign dma_data  = in_data;
  assign dma_last  = in_last;
  assign word_go   = dma_valid && dma_ready;

  always_comb begin
    unique case (state)
      S_PAY:   in_ready = dma_ready && tlb_hit;
      default: in_ready = 1'b1;
    endcase
  end

  // Reasons to close the current buffer.
  assign close_full = word_go && (off + 32'd4 >= cfg_buf_bytes);
  assign close_room = (state == S_HDR) && in_valid && off != 0 &&
                      h.len != 0 && pkt_bytes <= cfg_buf_bytes &&
                      off + pkt_bytes > cfg_buf_bytes;
  assign close_to   = (state == S_HDR) && off != 0 && cfg_timeout != 0 &&
                      timer >= cfg_timeout && !close_room;

  always_ff @(posedge clk) begin
    if (buf_wr_en) base[buf_wr_idx] <= buf_wr_vaddr;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state          <= S_HDR;
      cur            <= '0;
      off            <= '0;
      timer          <= '0;
      evt_valid      <= 1'b0;
      evt_buf        <= '0;
      evt_bytes      <= '0;
      evt_timeout    <= 1'b0;
      oversize_drops <= '0;
    end else begin
      evt_valid <= 1'b0;
      if (off != 0) timer <= timer + 1'b1;

      unique case (state)
        S_HDR: if (in_valid) begin
          if (pkt_bytes > cfg_buf_bytes) begin
            oversize_drops <= oversize_drops + 1'b1;
            if (!in_last) state <= S_DROP;
          end else if (!in_last && h.len != 0) begin
            state <= S_PAY;
          end
        end
        S_PAY: if (word_go && in_last) state <= S_HDR;
        default: if (in_valid && in_last) state <= S_HDR;
      endcase

      if (close_full || close_room || close_to) begin
        evt_valid   <= 1'b1;
        evt_buf     <= cur;
        evt_bytes   <= close_full ? off + 32'd4 : off;
        evt_timeout <= close_to;
        cur         <= (cur == BW'(NBUF - 1)) ? '0 : cur + 1'b1;
        off         <= '0;
        timer       <= '0;
      end else if (word_go) begin
        off <= off + 32'd4;
      end
    end
  end

  a_no_overrun: assert property (@(posedge clk) disable iff (!rst_n)
                                 cfg_buf_bytes == 0 || off < cfg_buf_bytes);

endmodule
