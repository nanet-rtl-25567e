// tb_nanet_latency: latency of a UDP datagram through the NIC, from the
// first word handed over by the Ethernet MAC to the last payload word
// accepted by the PCIe DMA port (the NIC's own share of the receive path).
//
// nanet_top runs at its default size. The KM3links are silent, the DMA
// port never stalls, and the TLB already maps the receive buffers, so the
// measurement is the datapath itself. Datagrams with 16, 64, 128, 256, 512,
// 1024 and 1472 payload bytes are each sent four times with gaps between
// them. The checks are:
//   * every datagram delivers exactly its payload words;
//   * the four latencies of one size are equal (no jitter);
//   * latency = 11 header words + 2 x payload words + a fixed delay, the
//     same fixed delay for every size: the payload is counted twice because
//     the GbE encoder stores a whole datagram before forwarding it;
//   * a 128-byte datagram takes less than 1 us at a 125 MHz clock
//     (125 cycles). The 125 MHz figure is an assumed MAC-side clock.
// Latencies are printed in cycles for every size.
module tb_nanet_latency;
  import nanet_pkg::*;

  localparam int NK = 4;
  logic clk = 0, rst_n = 0;
  always #4 clk = ~clk;
  int checks = 0, failures = 0;

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  logic [31:0] cfg_buf_bytes = 2048, cfg_timeout = 0;
  logic        buf_wr_en = 0;
  logic [3:0]  buf_wr_idx = 0;
  logic [63:0] buf_wr_vaddr = 0;
  logic        tlb_wr_en = 0, tlb_wr_valid = 1;
  logic [4:0]  tlb_wr_idx = 0;
  logic [63:0] tlb_wr_vaddr = 0, tlb_wr_paddr = 0;
  logic [15:0] cfg_udp_port_base = 16'd5000, cfg_udp_dst_port = 16'd9000;
  logic [47:0] cfg_src_mac = 48'h0011_2233_4455, cfg_dst_mac = 48'h6677_8899_AABB;
  logic [31:0] cfg_src_ip = 32'h0A00_0001, cfg_dst_ip = 32'h0A00_0002;
  logic        mac_rx_valid = 0, mac_rx_sop = 0, mac_rx_eop = 0;
  logic        mac_rx_ready;
  word_t       mac_rx_data = 0;
  logic        mac_tx_valid, mac_tx_sop, mac_tx_eop;
  logic        mac_tx_ready = 1;
  word_t       mac_tx_data;
  logic [NK-1:0] km3_rx_valid = '0, km3_realign = '0, km3_locked, km3_tx_valid;
  logic [9:0]  km3_rx_word [NK];
  logic [3:0]  km3_shift [NK];
  logic [9:0]  km3_tx_code [NK];
  logic        host_tx_valid = 0, host_tx_last = 0, host_tx_ready;
  word_t       host_tx_data = 0;
  logic [3:0]  host_tx_dest = 0;
  logic [7:0]  host_tx_chan = 0;
  logic        dma_valid, dma_last;
  logic        dma_ready = 1;
  logic [63:0] dma_addr;
  word_t       dma_data;
  logic        evt_valid, evt_timeout;
  logic [3:0]  evt_buf;
  logic [31:0] evt_bytes, tlb_misses;
  logic [15:0] udp_rx_ok, udp_rx_drop, router_drops, router_contention;
  logic [15:0] km3_frames_ok [NK], km3_frame_err [NK], km3_overflow [NK];

  initial for (int k = 0; k < NK; k++) km3_rx_word[k] = '0;

  nanet_top dut (.*);

  // cycle counter and DMA-side timestamps
  longint cyc = 0, t_sop = 0, t_last = 0;
  int     dma_words = 0, n_last = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && dma_valid && dma_ready) begin
      dma_words++;
      if (dma_last) begin t_last = cyc; n_last++; end
    end
  end

  // one UDP/IPv4 frame as 32-bit words with the MAC's 2-byte pad in front
  task automatic send(input int nbytes);
    logic [7:0] f [$];
    int n;
    f = '{8'h00, 8'h00};
    for (int i = 0; i < 6; i++) f.push_back(8'h02);
    for (int i = 0; i < 6; i++) f.push_back(8'h04);
    f.push_back(8'h08); f.push_back(8'h00);
    f.push_back(8'h45); f.push_back(8'h00);
    f.push_back(8'((28 + nbytes) >> 8)); f.push_back(8'(28 + nbytes));
    for (int i = 0; i < 4; i++) f.push_back(8'h00);
    f.push_back(8'd64); f.push_back(8'd17); f.push_back(8'h00); f.push_back(8'h00);
    for (int i = 0; i < 8; i++) f.push_back(8'h0A);
    f.push_back(8'h27); f.push_back(8'h10);
    f.push_back(8'h13); f.push_back(8'h88);            // port 5000
    f.push_back(8'((8 + nbytes) >> 8)); f.push_back(8'(8 + nbytes));
    f.push_back(8'h00); f.push_back(8'h00);
    for (int i = 0; i < nbytes; i++) f.push_back(8'(i));
    while (f.size() < 62) f.push_back(8'h00);
    n = (f.size() + 3) / 4;
    while (f.size() < 4 * n) f.push_back(8'h00);
    for (int w = 0; w < n; w++) begin
      mac_rx_valid = 1;
      mac_rx_data  = {f[4*w], f[4*w+1], f[4*w+2], f[4*w+3]};
      mac_rx_sop   = (w == 0);
      mac_rx_eop   = (w == n - 1);
      #2;
      while (!mac_rx_ready) begin @(posedge clk); #2; end
      if (w == 0) t_sop = cyc;
      @(posedge clk); #1;
    end
    mac_rx_valid = 0;
    mac_rx_sop = 0; mac_rx_eop = 0;
  endtask

  localparam int NS = 7;
  localparam int SIZES [NS] = '{16, 64, 128, 256, 512, 1024, 1472};
  localparam int REPEAT = 4;

  initial begin
    int lat, lat0, w0, base0, l128;
    #100 rst_n = 1;
    @(posedge clk); #1;
    // sixteen 2 KB buffers in one 64 KB page, mapped before traffic starts
    for (int b = 0; b < 16; b++) begin
      buf_wr_en = 1; buf_wr_idx = 4'(b); buf_wr_vaddr = 64'h7f00_0000_0000 + 64'(b * 2048);
      @(posedge clk); #1;
    end
    buf_wr_en = 0;
    tlb_wr_en = 1; tlb_wr_idx = 0;
    tlb_wr_vaddr = 64'h7f00_0000_0000; tlb_wr_paddr = 64'h0000_0008_0000_0000;
    @(posedge clk); #1;
    tlb_wr_en = 0;
    repeat (10) @(posedge clk); #1;

    base0 = -1; l128 = 0;
    for (int s = 0; s < NS; s++) begin
      lat0 = -1;
      for (int r = 0; r < REPEAT; r++) begin
        int nl0, t;
        nl0 = n_last;
        w0  = dma_words;
        send(SIZES[s]);
        t = 0;
        while (n_last == nl0 && t < 5000) begin @(posedge clk); #1; t++; end
        chk(n_last == nl0 + 1, $sformatf("%0d-byte datagram reached the DMA port", SIZES[s]));
        chk(dma_words - w0 == SIZES[s] / 4,
            $sformatf("%0d-byte datagram gave %0d DMA words", SIZES[s], dma_words - w0));
        lat = int'(t_last - t_sop);
        if (lat0 < 0) lat0 = lat;
        chk(lat == lat0, $sformatf("%0d bytes: latency %0d, first one %0d", SIZES[s], lat, lat0));
        repeat (30) @(posedge clk); #1;
      end
      $display("payload %4d bytes: %4d cycles from MAC first word to last DMA word", SIZES[s], lat0);
      // 11 header words in, payload words in (store-and-forward), then
      // the same payload words out again towards the DMA port
      if (base0 < 0) base0 = lat0 - (11 + 2 * (SIZES[s] / 4));
      chk(lat0 - (11 + 2 * (SIZES[s] / 4)) == base0,
          $sformatf("%0d bytes: fixed part %0d, expected %0d", SIZES[s],
                    lat0 - (11 + 2 * (SIZES[s] / 4)), base0));
      if (SIZES[s] == 128) l128 = lat0;
    end
    chk(l128 > 0 && l128 < 125, $sformatf("128-byte datagram in %0d cycles, limit 125", l128));
    chk(udp_rx_drop == 0 && tlb_misses == 0 && router_drops == 0, "no drops, no TLB misses");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2_000_000;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
