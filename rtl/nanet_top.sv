// nanet_top: the NaNet network interface card datapath.
//
// NaNet is a PCIe NIC that moves data from experiment links straight into
// CPU or GPU memory with a low, stable latency. Its inner logic speaks one
// packet format; every link channel translates between that format and its
// own line protocol. This top wires:
//   * the GbE channel: MAC frames -> udp_rx (UDP offload) -> apenet_encoder
//     -> router port 1; router port 1 -> apenet_decoder -> udp_tx -> MAC;
//   * N_KM3 KM3link channels (deterministic-latency optical links, one per
//     floor module): SerDes words -> comma_aligner -> dec8b10b -> tdmp_rx
//     -> apenet_encoder -> router port 2+k; router port 2+k ->
//     apenet_decoder -> tdmp_tx -> enc8b10b -> SerDes;
//   * the router, a full crossbar of 2+N_KM3 ports;
//   * the network interface on port 0: on transmit, host data from the
//     PCIe core are packed by an apenet_encoder with the destination port
//     the host names; on receive, nanet_ctrl (virtual address generator,
//     receive-buffer ring, timeout) and the tlb turn packets into physical
//     DMA writes and buffer completion events.
// The Ethernet MAC and PHY, the transceivers, the PCIe core, the
// microcontroller and the GPU I/O accelerator are outside this RTL: their
// signals are the ports below. Channel inbound packets are always sent to
// port 0 (the host). One clock drives everything; the transceiver clock
// domains and their crossings are not modelled. The partitioning follows
// the design; port numbering, widths and the single clock are this
// design's choices.
module nanet_top
  import nanet_pkg::*;
#(
  parameter int unsigned N_KM3       = 4,
  parameter int unsigned NBUF        = 16,
  parameter int unsigned TLB_ENTRIES = 32,
  parameter int unsigned PAGE_BITS   = 16,
  parameter int unsigned UDP_NCHAN   = 4,
  parameter int unsigned SLOTS       = 4,
  parameter int unsigned SLOT_WORDS  = 4,
  parameter int unsigned ENC_DEPTH   = 512,
  parameter int unsigned KM3_DEPTH   = 128
) (
  input  logic        clk,
  input  logic        rst_n,
  // configuration (from the microcontroller / host driver)
  input  logic [31:0] cfg_buf_bytes,
  input  logic [31:0] cfg_timeout,
  input  logic        buf_wr_en,
  input  logic [$clog2(NBUF)-1:0] buf_wr_idx,
  input  logic [63:0] buf_wr_vaddr,
  input  logic        tlb_wr_en,
  input  logic [$clog2(TLB_ENTRIES)-1:0] tlb_wr_idx,
  input  logic        tlb_wr_valid,
  input  logic [63:0] tlb_wr_vaddr,
  input  logic [63:0] tlb_wr_paddr,
  input  logic [15:0] cfg_udp_port_base,
  input  logic [15:0] cfg_udp_dst_port,
  input  logic [47:0] cfg_src_mac,
  input  logic [47:0] cfg_dst_mac,
  input  logic [31:0] cfg_src_ip,
  input  logic [31:0] cfg_dst_ip,
  // GbE MAC receive and transmit streams
  input  logic        mac_rx_valid,
  output logic        mac_rx_ready,
  input  word_t       mac_rx_data,
  input  logic        mac_rx_sop,
  input  logic        mac_rx_eop,
  output logic        mac_tx_valid,
  input  logic        mac_tx_ready,
  output word_t       mac_tx_data,
  output logic        mac_tx_sop,
  output logic        mac_tx_eop,
  // KM3link transceivers (parallel side)
  input  logic [N_KM3-1:0] km3_rx_valid,
  input  logic [9:0]       km3_rx_word [N_KM3],
  input  logic [N_KM3-1:0] km3_realign,
  output logic [N_KM3-1:0] km3_locked,
  output logic [3:0]       km3_shift [N_KM3],
  output logic [N_KM3-1:0] km3_tx_valid,
  output logic [9:0]       km3_tx_code [N_KM3],
  // host transmit stream from the PCIe core
  input  logic        host_tx_valid,
  output logic        host_tx_ready,
  input  word_t       host_tx_data,
  input  logic        host_tx_last,
  input  logic [3:0]  host_tx_dest,
  input  logic [7:0]  host_tx_chan,
  // DMA writes to the PCIe core
  output logic        dma_valid,
  input  logic        dma_ready,
  output logic [63:0] dma_addr,
  output word_t       dma_data,
  output logic        dma_last,
  // receive buffer completion events
  output logic        evt_valid,
  output logic [$clog2(NBUF)-1:0] evt_buf,
  output logic [31:0] evt_bytes,
  output logic        evt_timeout,
  // status
  output logic [15:0] udp_rx_ok,
  output logic [15:0] udp_rx_drop,
  output logic [15:0] km3_frames_ok [N_KM3],
  output logic [15:0] km3_frame_err [N_KM3],
  output logic [15:0] km3_overflow [N_KM3],
  output logic [15:0] router_drops,
  output logic [15:0] router_contention,
  output logic [31:0] tlb_misses
);

  localparam int unsigned NP = 2 + N_KM3;

  // Router ports.
  logic [NP-1:0] r_in_valid, r_in_ready, r_in_last;
  logic [NP-1:0] r_out_valid, r_out_ready, r_out_last;
  word_t         r_in_data  [NP];
  word_t         r_out_data [NP];

  router #(.NPORTS(NP)) u_router (
    .clk, .rst_n,
    .in_valid(r_in_valid), .in_ready(r_in_ready), .in_data(r_in_data), .in_last(r_in_last),
    .out_valid(r_out_valid), .out_ready(r_out_ready), .out_data(r_out_data),
    .out_last(r_out_last), .drops(router_drops), .contention(router_contention)
  );

  // ---------------- Network interface, port 0 ----------------
  apenet_encoder #(.DEPTH(ENC_DEPTH), .MAX_LEN(ENC_DEPTH), .SRC_PORT(4'd0)) u_host_enc (
    .clk, .rst_n,
    .in_valid(host_tx_valid), .in_ready(host_tx_ready), .in_data(host_tx_data),
    .in_last(host_tx_last), .in_chan(host_tx_chan), .in_dest(host_tx_dest),
    .out_valid(r_in_valid[0]), .out_ready(r_in_ready[0]), .out_data(r_in_data[0]),
    .out_last(r_in_last[0])
  );

  logic        tlb_en, tlb_hit;
  logic [63:0] tlb_vaddr, tlb_paddr;

  nanet_ctrl #(.NBUF(NBUF), .ADDR_W(64)) u_ctrl (
    .clk, .rst_n,
    .cfg_buf_bytes, .cfg_timeout, .buf_wr_en, .buf_wr_idx, .buf_wr_vaddr,
    .in_valid(r_out_valid[0]), .in_ready(r_out_ready[0]), .in_data(r_out_data[0]),
    .in_last(r_out_last[0]),
    .tlb_en, .tlb_vaddr, .tlb_hit, .tlb_paddr,
    .dma_valid, .dma_ready, .dma_addr, .dma_data, .dma_last,
    .evt_valid, .evt_buf, .evt_bytes, .evt_timeout, .oversize_drops()
  );

  tlb #(.ENTRIES(TLB_ENTRIES), .PAGE_BITS(PAGE_BITS), .ADDR_W(64)) u_tlb (
    .clk, .rst_n,
    .wr_en(tlb_wr_en), .wr_idx(tlb_wr_idx), .wr_valid(tlb_wr_valid),
    .wr_vaddr(tlb_wr_vaddr), .wr_paddr(tlb_wr_paddr),
    .lk_en(tlb_en), .lk_vaddr(tlb_vaddr), .lk_hit(tlb_hit), .lk_paddr(tlb_paddr),
    .misses(tlb_misses)
  );

  // ---------------- GbE channel, port 1 ----------------
  logic        ux_valid, ux_ready, ux_last;
  word_t       ux_data;
  logic [7:0]  ux_chan;

  udp_rx #(.NCHAN(UDP_NCHAN)) u_udp_rx (
    .clk, .rst_n, .cfg_port_base(cfg_udp_port_base),
    .in_valid(mac_rx_valid), .in_ready(mac_rx_ready), .in_data(mac_rx_data),
    .in_sop(mac_rx_sop), .in_eop(mac_rx_eop),
    .out_valid(ux_valid), .out_ready(ux_ready), .out_data(ux_data), .out_last(ux_last),
    .out_chan(ux_chan), .out_bytes(), .rx_ok(udp_rx_ok), .rx_drop(udp_rx_drop)
  );

  apenet_encoder #(.DEPTH(ENC_DEPTH), .MAX_LEN(ENC_DEPTH), .SRC_PORT(4'd1)) u_gbe_enc (
    .clk, .rst_n,
    .in_valid(ux_valid), .in_ready(ux_ready), .in_data(ux_data), .in_last(ux_last),
    .in_chan(ux_chan), .in_dest(4'd0),
    .out_valid(r_in_valid[1]), .out_ready(r_in_ready[1]), .out_data(r_in_data[1]),
    .out_last(r_in_last[1])
  );

  logic        gd_valid, gd_ready, gd_last;
  word_t       gd_data;
  logic [7:0]  gd_chan;
  logic [15:0] gd_len;

  apenet_decoder u_gbe_dec (
    .clk, .rst_n,
    .in_valid(r_out_valid[1]), .in_ready(r_out_ready[1]), .in_data(r_out_data[1]),
    .in_last(r_out_last[1]),
    .out_valid(gd_valid), .out_ready(gd_ready), .out_data(gd_data), .out_last(gd_last),
    .out_chan(gd_chan), .out_src(), .out_len(gd_len), .len_err()
  );

  udp_tx u_udp_tx (
    .clk, .rst_n,
    .cfg_src_mac, .cfg_dst_mac, .cfg_src_ip, .cfg_dst_ip,
    .cfg_port_base(cfg_udp_port_base), .cfg_dst_port(cfg_udp_dst_port),
    .in_valid(gd_valid), .in_ready(gd_ready), .in_data(gd_data), .in_last(gd_last),
    .in_len(gd_len), .in_chan(gd_chan),
    .out_valid(mac_tx_valid), .out_ready(mac_tx_ready), .out_data(mac_tx_data),
    .out_sop(mac_tx_sop), .out_eop(mac_tx_eop), .frames_sent()
  );

  // ---------------- KM3link channels, ports 2.. ----------------
  for (genvar k = 0; k < N_KM3; k++) begin : g_km3
    localparam int unsigned P = 2 + k;

    logic       al_valid;
    logic [9:0] al_code;
    logic       dc_valid, dc_k, dc_err;
    logic [7:0] dc_data;
    logic       tr_valid, tr_ready, tr_last;
    word_t      tr_data;
    logic [7:0] tr_chan;

    comma_aligner u_align (
      .clk, .rst_n, .realign(km3_realign[k]),
      .in_valid(km3_rx_valid[k]), .in_word(km3_rx_word[k]),
      .out_valid(al_valid), .out_code(al_code), .locked(km3_locked[k]), .shift(km3_shift[k])
    );

    dec8b10b u_dec (
      .clk, .rst_n, .in_valid(al_valid), .in_code(al_code),
      .out_valid(dc_valid), .out_data(dc_data), .out_k(dc_k), .code_err(dc_err)
    );

    tdmp_rx #(.SLOTS(SLOTS), .SLOT_WORDS(SLOT_WORDS)) u_tdm_rx (
      .clk, .rst_n,
      .in_valid(dc_valid), .in_data(dc_data), .in_k(dc_k), .in_err(dc_err),
      .out_valid(tr_valid), .out_ready(tr_ready), .out_data(tr_data), .out_last(tr_last),
      .out_chan(tr_chan), .frames_ok(km3_frames_ok[k]), .frame_err(km3_frame_err[k]),
      .overflow(km3_overflow[k])
    );

    apenet_encoder #(.DEPTH(KM3_DEPTH), .MAX_LEN(KM3_DEPTH), .HQ_DEPTH(KM3_DEPTH / SLOT_WORDS),
                     .SRC_PORT(4'(P))) u_enc (
      .clk, .rst_n,
      .in_valid(tr_valid), .in_ready(tr_ready), .in_data(tr_data), .in_last(tr_last),
      .in_chan(tr_chan), .in_dest(4'd0),
      .out_valid(r_in_valid[P]), .out_ready(r_in_ready[P]), .out_data(r_in_data[P]),
      .out_last(r_in_last[P])
    );

    logic       kd_valid, kd_ready, kd_last;
    word_t      kd_data;
    logic [7:0] kd_chan;
    logic       tt_valid, tt_k;
    logic [7:0] tt_data;

    apenet_decoder u_kdec (
      .clk, .rst_n,
      .in_valid(r_out_valid[P]), .in_ready(r_out_ready[P]), .in_data(r_out_data[P]),
      .in_last(r_out_last[P]),
      .out_valid(kd_valid), .out_ready(kd_ready), .out_data(kd_data), .out_last(kd_last),
      .out_chan(kd_chan), .out_src(), .out_len(), .len_err()
    );

    tdmp_tx #(.SLOTS(SLOTS), .SLOT_WORDS(SLOT_WORDS)) u_tdm_tx (
      .clk, .rst_n,
      .in_valid(kd_valid), .in_ready(kd_ready), .in_data(kd_data), .in_last(kd_last),
      .in_chan(kd_chan),
      .out_valid(tt_valid), .out_data(tt_data), .out_k(tt_k),
      .frames_sent(), .truncated()
    );

    enc8b10b u_enc8 (
      .clk, .rst_n, .in_valid(tt_valid), .in_data(tt_data), .in_k(tt_k),
      .out_valid(km3_tx_valid[k]), .out_code(km3_tx_code[k]), .k_err(), .rd()
    );
  end

endmodule
