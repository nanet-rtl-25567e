// tb_nanet_ctrl: self-check of the receive controller (VAG, TLB use,
// buffer completion on fill, on lack of room and on timeout).
// Four 64-byte buffers are registered; a tlb instance maps their pages.
// Sequence: three 5-word packets fill 60 bytes of buffer 0; a 4-word packet
// does not fit, so buffer 0 closes with 60 bytes and the packet starts
// buffer 1; after the timeout buffer 1 closes with 16 bytes (timeout
// flag); a 16-word packet fills buffer 2 exactly; a 20-word packet is
// dropped; buffer 3 lies in an unmapped page, so its packet stalls on a
// TLB miss until the mapping is written. Every DMA word is checked against
// the physical address computed here and the payload sent.
module tb_nanet_ctrl;
  import nanet_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [31:0] cfg_buf_bytes = 64, cfg_timeout = 50;
  logic        buf_wr_en = 0;
  logic [1:0]  buf_wr_idx = 0;
  logic [63:0] buf_wr_vaddr = 0;
  logic        in_valid = 0, in_last = 0, dma_ready = 1;
  logic        in_ready;
  word_t       in_data = 0;
  logic        tlb_en, tlb_hit;
  logic [63:0] tlb_vaddr, tlb_paddr;
  logic        dma_valid, dma_last;
  logic [63:0] dma_addr;
  word_t       dma_data;
  logic        evt_valid, evt_timeout;
  logic [1:0]  evt_buf;
  logic [31:0] evt_bytes;
  logic [15:0] oversize_drops;

  nanet_ctrl #(.NBUF(4), .ADDR_W(64)) dut (.*);

  logic        t_wr_en = 0;
  logic [2:0]  t_wr_idx = 0;
  logic [63:0] t_wr_vaddr = 0, t_wr_paddr = 0;
  logic [31:0] misses;
  tlb #(.ENTRIES(8), .PAGE_BITS(16), .ADDR_W(64)) u_tlb (
    .clk, .rst_n, .wr_en(t_wr_en), .wr_idx(t_wr_idx), .wr_valid(1'b1),
    .wr_vaddr(t_wr_vaddr), .wr_paddr(t_wr_paddr),
    .lk_en(tlb_en), .lk_vaddr(tlb_vaddr), .lk_hit(tlb_hit), .lk_paddr(tlb_paddr),
    .misses(misses));

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

  // Virtual buffer bases; pages 0x7f0000xx map to physical 0x0000_00yy.
  localparam logic [63:0] VB [4] = '{64'h7f00_0001_0000, 64'h7f00_0001_0040,
                                     64'h7f00_0002_0100, 64'h7f00_0003_0000};
  function automatic logic [63:0] v2p(input logic [63:0] v);
    return {32'h0000_00A0, v[31:16] ^ 16'h5A5A, v[15:0]};
  endfunction

  logic [63:0] exp_a [$];
  word_t       exp_d [$];
  int          nbad = 0, ndma = 0;
  int          ev_buf [$], ev_bytes [$], ev_to [$];

  always @(posedge clk) begin
    dma_ready <= ($urandom % 4 != 0);
    if (rst_n && dma_valid && dma_ready) begin
      if (exp_a.size() == 0) nbad++;
      else begin
        logic [63:0] a; word_t d;
        a = exp_a.pop_front(); d = exp_d.pop_front();
        if (dma_addr != a || dma_data != d) begin
          nbad++;
          $display("dma %0d: exp %h/%h got %h/%h", ndma, a, d, dma_addr, dma_data);
        end
      end
      ndma++;
    end
    if (rst_n && evt_valid) begin
      ev_buf.push_back(int'(evt_buf)); ev_bytes.push_back(int'(evt_bytes));
      ev_to.push_back(int'(evt_timeout));
    end
  end

  task automatic pkt(input int n, input int b, input int off, input bit expect_dma);
    apl_hdr_t h;
    h = '{dest: 4'd0, src: 4'd2, chan: 8'd0, len: 16'(n)};
    for (int i = 0; i <= n; i++) begin
      word_t w;
      w = (i == 0) ? word_t'(h) : $urandom;
      if (i > 0 && expect_dma) begin
        exp_a.push_back(v2p(VB[b] + 64'(off + 4 * (i - 1))));
        exp_d.push_back(w);
      end
      in_valid = 1; in_data = w; in_last = (i == n);
      #2;
      while (!in_ready) begin @(posedge clk); #2; end
      @(posedge clk); #1;
    end
    in_valid = 0;
  endtask

  task automatic map(input int slot, input logic [63:0] v);
    t_wr_en = 1; t_wr_idx = 3'(slot); t_wr_vaddr = v; t_wr_paddr = v2p(v);
    @(posedge clk); #1;
    t_wr_en = 0;
  endtask

  int t0;

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk); #1;
    for (int b = 0; b < 4; b++) begin
      buf_wr_en = 1; buf_wr_idx = 2'(b); buf_wr_vaddr = VB[b];
      @(posedge clk); #1;
    end
    buf_wr_en = 0;
    map(0, VB[0]); map(1, VB[2]);                 // VB[1] shares VB[0]'s page
    pkt(5, 0, 0, 1);
    pkt(5, 0, 20, 1);
    pkt(5, 0, 40, 1);
    chk(ev_buf.size() == 0, "no event while buffer 0 has room");
    pkt(4, 1, 0, 1);                              // does not fit: closes buffer 0
    repeat (3) @(posedge clk);
    chk(ev_buf.size() == 1 && ev_buf[0] == 0 && ev_bytes[0] == 60 && ev_to[0] == 0,
        "buffer 0 closed for lack of room with 60 bytes");
    t0 = $time;
    wait (ev_buf.size() == 2);
    chk(ev_buf[1] == 1 && ev_bytes[1] == 16 && ev_to[1] == 1, "buffer 1 closed by timeout with 16 bytes");
    chk(($time - t0) / 10 >= 40 && ($time - t0) / 10 <= 60, $sformatf("timeout after about 50 cycles (%0d)", ($time - t0) / 10));
    pkt(16, 2, 0, 1);                             // fills buffer 2 exactly
    repeat (20) @(posedge clk);
    chk(ev_buf.size() == 3 && ev_buf[2] == 2 && ev_bytes[2] == 64 && ev_to[2] == 0,
        "buffer 2 closed when full");
    pkt(20, 3, 0, 0);                             // larger than a buffer
    chk(oversize_drops == 1, "oversized packet dropped");
    fork
      pkt(3, 3, 0, 1);                            // buffer 3 page not mapped yet
      begin
        repeat (30) @(posedge clk); #1;
        chk(misses > 0 && ndma == 35, $sformatf("stalled on a TLB miss (%0d misses)", misses));
        map(2, VB[3]);
      end
    join
    repeat (20) @(posedge clk);
    chk(nbad == 0 && exp_a.size() == 0, $sformatf("every DMA word at the right address (%0d bad, %0d left)", nbad, exp_a.size()));
    chk(ndma == 38, $sformatf("38 DMA words (%0d)", ndma));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
