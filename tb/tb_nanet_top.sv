// tb_nanet_top: end-to-end test of the NIC at its default size (one GbE
// channel, four KM3link channels, 16 receive buffers, 32-entry TLB).
//
// Around the NIC the bench models the parts outside the RTL:
//   * a GbE sender that builds UDP/IPv4 frames with payloads of 16, 64,
//     128, 256, 1024 and 1472 bytes (plus one frame for a closed port);
//   * four floor control modules (FCM): each encodes its own TDM frames
//     (K28.5 + 4 slots of 16 bytes, idle commas between frames) with an
//     8b/10b encoder, serialises them with its own bit delay and hands the
//     NIC unaligned 10-bit words; it also decodes the NIC's transmit
//     stream and collects the slow-control words found in its frames;
//     one FCM sends a frame cut short by a control character;
//   * the host: it registers 16 receive buffers (odd ones in a second
//     64 KB page that the TLB does not know at first), sends slow-control
//     packets to every KM3link port, one packet to the GbE port, one to
//     itself and one to a port that does not exist, and takes DMA writes
//     with random back-pressure, installing the missing page on a TLB miss.
// Checks: every payload word sent towards the host arrives exactly once at
// an address inside the buffer the completion events describe; event byte
// counts add up; the GbE frame out of the NIC carries the host payload;
// each FCM receives its slow-control words; each aligner locks with the
// FCM's bit delay and keeps it after a reset-and-align. Each mechanism
// (TLB-miss stall, close on timeout, close on fill or lack of room, router
// contention, router drop, UDP drop, TDM frame error, DMA back-pressure,
// realign) is counted and must happen at least once.
module tb_nanet_top;
  import nanet_pkg::*;
  localparam int NK = 4;
  localparam int NB = 16;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // ---------------- DUT ----------------
  logic [31:0] cfg_buf_bytes = 2048, cfg_timeout = 3000;
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
  logic        mac_tx_valid, mac_tx_ready, mac_tx_sop, mac_tx_eop;
  word_t       mac_tx_data;
  logic [NK-1:0] km3_rx_valid, km3_realign, km3_locked, km3_tx_valid;
  logic [9:0]  km3_rx_word [NK];
  logic [3:0]  km3_shift [NK];
  logic [9:0]  km3_tx_code [NK];
  logic        host_tx_valid = 0, host_tx_last = 0, host_tx_ready;
  word_t       host_tx_data = 0;
  logic [3:0]  host_tx_dest = 0;
  logic [7:0]  host_tx_chan = 0;
  logic        dma_valid, dma_ready, dma_last;
  logic [63:0] dma_addr;
  word_t       dma_data;
  logic        evt_valid, evt_timeout;
  logic [3:0]  evt_buf;
  logic [31:0] evt_bytes;
  logic [15:0] udp_rx_ok, udp_rx_drop, router_drops, router_contention;
  logic [15:0] km3_frames_ok [NK], km3_frame_err [NK], km3_overflow [NK];
  logic [31:0] tlb_misses;

  nanet_top dut (.*);

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- address map ----------------
  function automatic logic [63:0] vbase(input int b);
    return 64'h7f00_0000_0000 + 64'((b % 2) * 32'h10000 + (b / 2) * 2048);
  endfunction
  function automatic logic [63:0] v2p(input logic [63:0] v);
    return v - 64'h7f00_0000_0000 + 64'h0000_0040_0000_0000;
  endfunction

  // ---------------- expected payload words ----------------
  int unsigned expect_cnt [word_t];
  int          n_expected = 0, n_unexpected = 0, n_dma = 0;

  function automatic void expect_word(input word_t w);
    if (expect_cnt.exists(w)) expect_cnt[w]++; else expect_cnt[w] = 1;
    n_expected++;
  endfunction

  // ---------------- mechanism counters ----------------
  int m_tlb_miss = 0, m_close_timeout = 0, m_close_fill = 0, m_backpressure = 0;
  int m_realign = 0;

  // ---------------- DMA sink and event checker ----------------
  int cur_b = 0, cur_off = 0, bytes_evt = 0, bad_addr = 0, bad_evt = 0;
  always @(posedge clk) begin
    dma_ready <= ($urandom % 5 != 0);
    if (rst_n) begin
      if (dma_valid && !dma_ready) m_backpressure++;
      if (evt_valid) begin
        if (int'(evt_buf) != cur_b || int'(evt_bytes) != cur_off) begin
          bad_evt++;
          $display("event buf %0d bytes %0d, expected buf %0d bytes %0d", evt_buf, evt_bytes, cur_b, cur_off);
        end
        bytes_evt += int'(evt_bytes);
        if (evt_timeout) m_close_timeout++; else m_close_fill++;
        cur_b = (cur_b + 1) % NB;
        cur_off = 0;
      end
      if (dma_valid && dma_ready) begin
        if (dma_addr != v2p(vbase(cur_b) + 64'(cur_off))) begin
          bad_addr++;
          $display("dma addr %h, expected %h", dma_addr, v2p(vbase(cur_b) + 64'(cur_off)));
        end
        cur_off += 4;
        n_dma++;
        if (expect_cnt.exists(dma_data) && expect_cnt[dma_data] > 0) expect_cnt[dma_data]--;
        else begin
          n_unexpected++;
          $display("unexpected DMA word %h", dma_data);
        end
      end
    end
  end

  // TLB refill on a miss: the second page is installed when first needed.
  initial begin
    wait (rst_n);
    wait (tlb_misses != 0);
    m_tlb_miss++;
    @(posedge clk); #1;
    tlb_wr_en = 1; tlb_wr_idx = 5'd7;
    tlb_wr_vaddr = 64'h7f00_0001_0000; tlb_wr_paddr = v2p(64'h7f00_0001_0000);
    @(posedge clk); #1;
    tlb_wr_en = 0;
  end

  // ---------------- GbE sender ----------------
  bit gbe_done = 0;
  task automatic udp_frame(input int nbytes, input logic [15:0] dport, input int dg, input bit good);
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
    f.push_back(dport[15:8]); f.push_back(dport[7:0]);
    f.push_back(8'((8 + nbytes) >> 8)); f.push_back(8'(8 + nbytes));
    f.push_back(8'h00); f.push_back(8'h00);
    for (int w = 0; w < nbytes / 4; w++) begin
      word_t x;
      x = {4'hE, 4'(dport - 16'd5000), 8'(dg), 16'(w)};
      if (good) expect_word(x);
      for (int b = 3; b >= 0; b--) f.push_back(x[8*b +: 8]);
    end
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
      @(posedge clk); #1;
    end
    mac_rx_valid = 0;
  endtask

  localparam int SIZES [6] = '{16, 64, 128, 256, 1024, 1472};
  initial begin
    wait (rst_n);
    repeat (300) @(posedge clk); #1;
    for (int i = 0; i < 6; i++) begin
      udp_frame(SIZES[i], 16'(5000 + i % 4), i, 1);
      repeat (20) @(posedge clk); #1;
      if (i == 2) begin udp_frame(64, 16'd7777, 99, 0); repeat (20) @(posedge clk); #1; end
    end
    gbe_done = 1;
  end

  // ---------------- floor control modules ----------------
  localparam int DELAY [NK] = '{3, 7, 0, 5};
  int  fcm_done = 0;
  int  sc_words [NK];            // slow-control words seen by each FCM
  word_t sc_expect [NK][$];

  for (genvar k = 0; k < NK; k++) begin : g_fcm
    // FCM transmitter: bytes -> 8b/10b -> serial with DELAY[k] bits -> words
    logic       e_k;
    logic [7:0] e_d;
    logic       ev, ekerr, erd;
    logic [9:0] ecode;
    enc8b10b u_fenc (.clk, .rst_n, .in_valid(1'b1), .in_data(e_d), .in_k(e_k),
                     .out_valid(ev), .out_code(ecode), .k_err(ekerr), .rd(erd));
    logic bq [$];
    initial begin
      for (int i = 0; i < DELAY[k]; i++) bq.push_back(1'b1);
      km3_rx_valid[k] = 0;
      km3_rx_word[k]  = '0;
    end
    always @(posedge clk) if (rst_n && ev) begin
      logic [9:0] w;
      for (int i = 9; i >= 0; i--) bq.push_back(ecode[i]);
      for (int i = 9; i >= 0; i--) w[i] = bq.pop_front();
      km3_rx_word[k]  <= w;
      km3_rx_valid[k] <= 1'b1;
    end

    task automatic put(input logic [7:0] d, input logic kk);
      e_d = d; e_k = kk;
      @(posedge clk); #1;
    endtask

    initial begin
      e_d = 8'hBC; e_k = 1;
      wait (rst_n);
      repeat (50 + 20 * k) @(posedge clk); #1;
      for (int fr = 0; fr < 6; fr++) begin
        put(8'hBC, 1);
        if (k == 1 && fr == 2) begin
          // a frame cut short: two whole words, two stray bytes, then K28.1
          for (int wd = 0; wd < 2; wd++) begin
            word_t x;
            x = {4'hC, 4'(k), 8'(200 + fr), 8'd0, 8'(wd)};
            expect_word(x);
            for (int b = 3; b >= 0; b--) put(x[8*b +: 8], 0);
          end
          put(8'h55, 0); put(8'h66, 0); put(8'h3C, 1);
          put(8'hBC, 1);
        end
        for (int wd = 0; wd < 16; wd++) begin
          word_t x;
          x = {4'hC, 4'(k), 8'(fr), 8'(wd / 4), 8'(wd % 4)};
          expect_word(x);
          for (int b = 3; b >= 0; b--) put(x[8*b +: 8], 0);
        end
        repeat (150) put(8'hBC, 1);            // idle commas
      end
      fcm_done++;
      forever put(8'hBC, 1);
    end

    // FCM receiver: decode the NIC's stream and collect slot bytes.
    logic       dv, dk, derr;
    logic [7:0] dd;
    dec8b10b u_fdec (.clk, .rst_n, .in_valid(km3_tx_valid[k]), .in_code(km3_tx_code[k]),
                     .out_valid(dv), .out_data(dd), .out_k(dk), .code_err(derr));
    int         pos = -1;
    logic [7:0] fb [64];
    always @(posedge clk) if (rst_n && dv) begin
      if (dk && dd == 8'hBC) begin
        if (pos == 64) begin
          for (int wd = 0; wd < 16; wd++) begin
            word_t x;
            x = {fb[4*wd], fb[4*wd+1], fb[4*wd+2], fb[4*wd+3]};
            if (x != 0) begin
              if (wd / 4 == 1 && sc_expect[k].size() > 0 && x == sc_expect[k][0]) begin
                void'(sc_expect[k].pop_front());
                sc_words[k]++;
              end else begin
                $display("FCM %0d: unexpected word %h in slot %0d", k, x, wd / 4);
                sc_words[k] += 1000;
              end
            end
          end
        end
        pos = 0;
      end else if (pos >= 0 && pos < 64) begin
        fb[pos] = dd;
        pos++;
      end
    end
  end

  // ---------------- MAC transmit sink ----------------
  word_t mac_tx [$];
  int    mac_frames = 0;
  assign mac_tx_ready = 1'b1;
  always @(posedge clk) if (rst_n && mac_tx_valid && mac_tx_ready) begin
    if (mac_tx_sop) mac_tx.delete();
    mac_tx.push_back(mac_tx_data);
    if (mac_tx_eop) mac_frames++;
  end

  // ---------------- host ----------------
  task automatic host_send(input int n, input logic [3:0] dest, input logic [7:0] ch,
                           input logic [3:0] tag, output word_t words [$]);
    words = {};
    for (int i = 0; i < n; i++) begin
      word_t w;
      w = {4'h5, tag, dest, ch[3:0], 16'(i)};
      words.push_back(w);
      host_tx_valid = 1; host_tx_data = w; host_tx_last = (i == n - 1);
      host_tx_dest = dest; host_tx_chan = ch;
      #2;
      while (!host_tx_ready) begin @(posedge clk); #2; end
      @(posedge clk); #1;
    end
    host_tx_valid = 0;
  endtask

  word_t gbe_words [$];
  int    shift0 [NK];

  initial begin
    word_t ws [$];
    for (int k = 0; k < NK; k++) begin sc_words[k] = 0; km3_realign[k] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    for (int b = 0; b < NB; b++) begin
      buf_wr_en = 1; buf_wr_idx = 4'(b); buf_wr_vaddr = vbase(b);
      @(posedge clk); #1;
    end
    buf_wr_en = 0;
    tlb_wr_en = 1; tlb_wr_idx = 5'd0;
    tlb_wr_vaddr = 64'h7f00_0000_0000; tlb_wr_paddr = v2p(64'h7f00_0000_0000);
    @(posedge clk); #1;
    tlb_wr_en = 0;
    repeat (400) @(posedge clk); #1;
    // slow control to every floor, slot 1
    for (int k = 0; k < NK; k++) begin
      host_send(3, 4'(2 + k), 8'd1, 4'(k), ws);
      foreach (ws[i]) sc_expect[k].push_back(ws[i]);
    end
    // a packet to the GbE link, one to the host itself, one to no port
    host_send(10, 4'd1, 8'd2, 4'hA, gbe_words);
    host_send(5, 4'd0, 8'd0, 4'hB, ws);
    foreach (ws[i]) expect_word(ws[i]);
    host_send(4, 4'd9, 8'd0, 4'hD, ws);
    // record the aligners' shifts, then reset-and-align channel 2
    for (int k = 0; k < NK; k++) shift0[k] = int'(km3_shift[k]);
    km3_realign[2] = 1;
    @(posedge clk); #1;
    km3_realign[2] = 0;
    m_realign++;
    wait (gbe_done && fcm_done == NK);
    // all words in, then the last partial buffer must close on timeout
    begin
      int t, to0;
      t = 0;
      while (n_dma < n_expected && t < 20000) begin @(posedge clk); t++; end
      to0 = m_close_timeout;
      t = 0;
      while (m_close_timeout == to0 && t < 5000) begin @(posedge clk); t++; end
      chk(m_close_timeout > to0, "last partial buffer closed on timeout");
    end
    repeat (10) @(posedge clk);

    // ---------------- results ----------------
    begin
      int left;
      left = 0;
      foreach (expect_cnt[w]) begin
        left += expect_cnt[w];
        if (expect_cnt[w] != 0) $display("missing %h", w);
      end
      chk(left == 0, $sformatf("all %0d payload words reached host memory (%0d missing)", n_expected, left));
    end
    chk(n_unexpected == 0, $sformatf("no unexpected DMA words (%0d)", n_unexpected));
    chk(bad_addr == 0, $sformatf("DMA addresses follow the buffers (%0d bad)", bad_addr));
    chk(bad_evt == 0, "completion events match the data written");
    chk(bytes_evt == 4 * n_dma, $sformatf("event bytes %0d = DMA bytes %0d", bytes_evt, 4 * n_dma));
    chk(udp_rx_ok == 6, $sformatf("six datagrams accepted (%0d)", udp_rx_ok));
    chk(mac_frames == 1 && mac_tx.size() == 21, $sformatf("one 21-word GbE frame sent (%0d, %0d)", mac_frames, mac_tx.size()));
    if (mac_tx.size() == 21) begin
      bit ok;
      ok = mac_tx[9] == {16'd5002, 16'd9000} && mac_tx[10][31:16] == 16'd48;
      for (int i = 0; i < 10; i++) if (mac_tx[11 + i] != gbe_words[i]) ok = 0;
      chk(ok, "GbE frame carries the host payload and ports");
    end
    for (int k = 0; k < NK; k++) begin
      chk(sc_words[k] == 3, $sformatf("FCM %0d received its slow-control words (%0d)", k, sc_words[k]));
      chk(km3_locked[k] && int'(km3_shift[k]) == DELAY[k],
          $sformatf("aligner %0d locked with shift %0d (delay %0d)", k, km3_shift[k], DELAY[k]));
      chk(int'(km3_shift[k]) == shift0[k], $sformatf("aligner %0d shift unchanged by reset-and-align", k));
      chk(km3_overflow[k] == 0, $sformatf("FCM %0d: no word lost to overflow", k));
      chk(int'(km3_frames_ok[k]) == 6, $sformatf("FCM %0d: six good frames (%0d)", k, km3_frames_ok[k]));
    end
    // mechanisms
    chk(m_tlb_miss > 0, "mechanism: TLB miss stall");
    chk(m_close_timeout > 0, "mechanism: buffer closed on timeout");
    chk(m_close_fill > 0, "mechanism: buffer closed on fill or lack of room");
    chk(router_contention > 0, "mechanism: router output contention");
    chk(router_drops == 1, "mechanism: router drop of an unknown port");
    chk(udp_rx_drop == 1, "mechanism: UDP frame for a closed port dropped");
    chk(km3_frame_err[1] == 1, "mechanism: TDM frame error");
    chk(m_backpressure > 0, "mechanism: DMA back-pressure");
    chk(m_realign > 0, "mechanism: reset-and-align");
    $display("mechanisms: tlb_miss=%0d timeout_close=%0d fill_close=%0d contention=%0d drops=%0d udp_drop=%0d frame_err=%0d backpressure=%0d realign=%0d",
             m_tlb_miss, m_close_timeout, m_close_fill, router_contention, router_drops,
             udp_rx_drop, km3_frame_err[1], m_backpressure, m_realign);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
