// tb_apenet_decoder: self-check of header removal.
// Packets (header + payload) of 1, 4 and 9 words pass with random output
// stalls; only payload words may come out, with out_last where the packet
// ends and out_chan/out_src/out_len taken from the header. A packet whose
// header length disagrees with its real length raises len_err once.
module tb_apenet_decoder;
  import nanet_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        in_valid = 0, in_last = 0, out_ready = 1;
  logic        in_ready, out_valid, out_last;
  word_t       in_data = 0, out_data;
  logic [7:0]  out_chan;
  logic [3:0]  out_src;
  logic [15:0] out_len, len_err;

  apenet_decoder dut (.*);

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

  word_t      exp_w [$];
  logic       exp_l [$];
  logic [7:0] exp_c [$];
  int         nbad = 0, nout = 0;

  always @(posedge clk) begin
    out_ready <= ($urandom % 3 != 0);
    if (rst_n && out_valid && out_ready) begin
      word_t w; logic l; logic [7:0] c;
      if (exp_w.size() == 0) nbad++;
      else begin
        w = exp_w.pop_front(); l = exp_l.pop_front(); c = exp_c.pop_front();
        if (out_data != w || out_last != l || out_chan != c || out_src != 4'd6) nbad++;
      end
      nout++;
    end
  end

  task automatic pkt(input int n, input int hdr_len, input logic [7:0] ch);
    apl_hdr_t h;
    h = '{dest: 4'd1, src: 4'd6, chan: ch, len: 16'(hdr_len)};
    for (int i = 0; i <= n; i++) begin
      word_t w;
      w = (i == 0) ? word_t'(h) : $urandom;
      if (i > 0) begin exp_w.push_back(w); exp_l.push_back(i == n); exp_c.push_back(ch); end
      in_valid <= 1; in_data <= w; in_last <= (i == n);
      #2;
      while (!in_ready) begin @(posedge clk); #2; end
      @(posedge clk); #1;
    end
    in_valid <= 0;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk); #1;
    pkt(1, 1, 8'd3);
    pkt(4, 4, 8'd0);
    pkt(9, 9, 8'd2);
    repeat (10) @(posedge clk);
    chk(out_len == 16'd9, "out_len from the header");
    chk(len_err == 0, "no length error on good packets");
    pkt(3, 5, 8'd1);
    repeat (10) @(posedge clk);
    chk(len_err == 1, "length mismatch counted");
    chk(nbad == 0, $sformatf("payload words and side info match (%0d bad)", nbad));
    chk(nout == 17 && exp_w.size() == 0, $sformatf("17 payload words out (%0d)", nout));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
