// tb_apenet_encoder: self-check of the packet encapsulation.
// With DEPTH=16, MAX_LEN=8 and SRC_PORT=3, payloads of 3, 1, 8 and 12 words
// (the last cut into 8 + 4) are sent with random input gaps and random
// output stalls. Every packet must come out as a header {dest, src=3,
// chan, len} followed by exactly len payload words, out_last on the last.
// The header of a packet must not leave before its last word was accepted.
module tb_apenet_encoder;
  import nanet_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic       in_valid = 0, in_last = 0, out_ready = 1;
  logic       in_ready, out_valid, out_last;
  word_t      in_data = 0, out_data;
  logic [7:0] in_chan = 0;
  logic [3:0] in_dest = 0;

  apenet_encoder #(.DEPTH(16), .MAX_LEN(8), .HQ_DEPTH(4), .SRC_PORT(4'd3)) dut (.*);

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
  logic  exp_l [$];
  int    nbad = 0, nout = 0, accepted = 0;

  always @(posedge clk) begin
    out_ready <= ($urandom % 3 != 0);
    if (rst_n && in_valid && in_ready) accepted++;
    if (rst_n && out_valid && out_ready) begin
      if (exp_w.size() == 0) nbad++;
      else begin
        word_t w; logic l;
        w = exp_w.pop_front(); l = exp_l.pop_front();
        if (out_data != w || out_last != l) begin
          nbad++;
          $display("out %0d: exp %h/%0d got %h/%0d", nout, w, l, out_data, out_last);
        end
      end
      nout++;
    end
  end

  task automatic pkt(input int n, input logic [7:0] ch, input logic [3:0] d);
    word_t p [$];
    for (int i = 0; i < n; i++) p.push_back($urandom);
    for (int s = 0; s < n; s += 8) begin
      int m;
      apl_hdr_t h;
      m = (n - s > 8) ? 8 : n - s;
      h = '{dest: d, src: 4'd3, chan: ch, len: 16'(m)};
      exp_w.push_back(h); exp_l.push_back(0);
      for (int i = 0; i < m; i++) begin exp_w.push_back(p[s+i]); exp_l.push_back(i == m - 1); end
    end
    for (int i = 0; i < n; i++) begin
      if ($urandom % 4 == 0) begin in_valid <= 0; @(posedge clk); #1; end
      in_valid <= 1; in_data <= p[i]; in_last <= (i == n - 1);
      in_chan <= (i == 0) ? ch : 8'($urandom);   // only the first word's side info counts
      in_dest <= (i == 0) ? d : 4'($urandom);
      #2;
      while (!in_ready) begin @(posedge clk); #2; end
      @(posedge clk); #1;
    end
    in_valid <= 0;
  endtask

  // the header of a packet may only leave once its words are all in
  a_hdr_after_data: assert property (@(posedge clk) disable iff (!rst_n)
    out_valid && !dut.sending |-> dut.wp != dut.rp);

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk); #1;
    pkt(3, 8'd7, 4'd0);
    pkt(1, 8'd1, 4'd2);
    pkt(8, 8'd2, 4'd5);
    pkt(12, 8'd9, 4'd1);
    repeat (60) @(posedge clk);
    chk(nbad == 0, $sformatf("all output words match (%0d bad)", nbad));
    chk(exp_w.size() == 0, $sformatf("all words delivered (%0d left)", exp_w.size()));
    chk(nout == 24 + 5, $sformatf("24 payload words + 5 headers (%0d)", nout));
    chk(accepted == 24, "24 words accepted");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
