// tb_udp_tx: self-check of the UDP/IPv4 transmit encapsulation.
// Payloads of 1, 5 and 368 words (the last one a 1472-byte datagram) are
// offered with a channel number; each frame leaving for the MAC is compared
// word by word with a frame built here from the configuration: alignment
// pad, Ethernet header, IPv4 header with a checksum computed here over its
// ten 16-bit words, UDP header, payload. sop must be on the first word,
// eop on the last, and the MAC is stalled at random.
module tb_udp_tx;
  import nanet_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [47:0] cfg_src_mac = 48'h0002_0304_0506, cfg_dst_mac = 48'hA0B0_C0D0_E0F0;
  logic [31:0] cfg_src_ip = 32'hC0A8_0102, cfg_dst_ip = 32'hC0A8_0103;
  logic [15:0] cfg_port_base = 16'd6000, cfg_dst_port = 16'd7000;
  logic        in_valid = 0, in_last = 0, out_ready = 1;
  logic        in_ready;
  word_t       in_data = 0;
  logic [15:0] in_len = 0;
  logic [7:0]  in_chan = 0;
  logic        out_valid, out_sop, out_eop;
  word_t       out_data;
  logic [15:0] frames_sent;

  udp_tx dut (.*);

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  word_t exp_w [$];
  logic  exp_s [$], exp_e [$];
  int    nbad = 0, nwords = 0;

  always @(posedge clk) begin
    out_ready <= ($urandom % 4 != 0);
    if (rst_n && out_valid && out_ready) begin
      word_t w; logic s, e;
      if (exp_w.size() == 0) begin nbad++; $display("unexpected word"); end
      else begin
        w = exp_w.pop_front(); s = exp_s.pop_front(); e = exp_e.pop_front();
        if (out_data != w || out_sop != s || out_eop != e) begin
          nbad++;
          $display("word %0d: exp %h s%0d e%0d got %h s%0d e%0d", nwords, w, s, e, out_data, out_sop, out_eop);
        end
      end
      nwords++;
    end
  end

  function automatic logic [15:0] ip_cks(input logic [15:0] h [10]);
    logic [31:0] s = 0;
    for (int i = 0; i < 10; i++) s += h[i];
    while (s[31:16] != 0) s = s[15:0] + s[31:16];
    return ~s[15:0];
  endfunction

  task automatic send(input int nw, input logic [7:0] ch);
    logic [15:0] h [10];
    logic [15:0] ulen, ilen;
    word_t pay [$];
    ulen = 16'(8 + 4 * nw);
    ilen = 16'(20) + ulen;
    h = '{16'h4500, ilen, 16'h0000, 16'h4000, 16'h4011, 16'h0000,
          cfg_src_ip[31:16], cfg_src_ip[15:0], cfg_dst_ip[31:16], cfg_dst_ip[15:0]};
    exp_w.push_back({16'h0000, cfg_dst_mac[47:32]});
    exp_w.push_back(cfg_dst_mac[31:0]);
    exp_w.push_back(cfg_src_mac[47:16]);
    exp_w.push_back({cfg_src_mac[15:0], 16'h0800});
    exp_w.push_back({h[0], h[1]});
    exp_w.push_back({h[2], h[3]});
    exp_w.push_back({h[4][15:8], 8'd17, ip_cks(h)});
    exp_w.push_back(cfg_src_ip);
    exp_w.push_back(cfg_dst_ip);
    exp_w.push_back({cfg_port_base + 16'(ch), cfg_dst_port});
    exp_w.push_back({ulen, 16'h0000});
    for (int i = 0; i < 11; i++) begin exp_s.push_back(i == 0); exp_e.push_back(0); end
    for (int i = 0; i < nw; i++) begin
      pay.push_back($urandom);
      exp_w.push_back(pay[i]); exp_s.push_back(0); exp_e.push_back(i == nw - 1);
    end
    for (int i = 0; i < nw; i++) begin
      in_valid <= 1; in_data <= pay[i]; in_last <= (i == nw - 1);
      in_len <= 16'(nw); in_chan <= ch;
      #2;
      while (!in_ready) begin @(posedge clk); #2; end
      @(posedge clk); #1;
    end
  endtask

  initial begin
    // TTL 64 sits in the high byte of the word holding the protocol
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk); #1;
    send(1, 8'd0);
    send(5, 8'd3);
    send(368, 8'd1);
    in_valid <= 0;
    repeat (40) @(posedge clk);
    chk(nbad == 0, $sformatf("all frame words match (%0d bad)", nbad));
    chk(exp_w.size() == 0, "all words sent");
    chk(nwords == 3 * 11 + 374, $sformatf("word count %0d", nwords));
    chk(frames_sent == 3, "three frames counted");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
