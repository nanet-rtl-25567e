// tb_udp_rx: self-check of the UDP/IPv4 receive offload.
// Ethernet frames are built here byte by byte (2-byte MAC alignment pad,
// Ethernet, IPv4 and UDP headers, payload, padding to the 60-byte minimum)
// and sent as 32-bit words. Good datagrams to ports 5000..5003 must come
// out as payload-only packets with the right channel, byte count and
// out_last; a short payload must lose the frame padding; a wrong
// EtherType, a wrong protocol and a port outside the range are dropped.
// The last datagram, 1472 bytes, runs under random back-pressure.
module tb_udp_rx;
  import nanet_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [15:0] cfg_port_base = 16'd5000;
  logic        in_valid = 0, in_sop = 0, in_eop = 0, out_ready = 1;
  logic        in_ready;
  word_t       in_data = 0;
  logic        out_valid, out_last;
  word_t       out_data;
  logic [7:0]  out_chan;
  logic [15:0] out_bytes, rx_ok, rx_drop;

  udp_rx #(.NCHAN(4)) dut (.*);

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  word_t      exp_w [$];
  logic       exp_l [$];
  logic [7:0] exp_c [$];
  int         exp_b [$];
  bit         random_ready = 0;

  always @(posedge clk) begin
    out_ready <= random_ready ? ($urandom % 3 != 0) : 1'b1;
    if (rst_n && out_valid && out_ready) begin
      if (exp_w.size() == 0) chk(0, "unexpected payload word");
      else begin
        word_t w; logic l; logic [7:0] c; int b;
        w = exp_w.pop_front(); l = exp_l.pop_front(); c = exp_c.pop_front(); b = exp_b.pop_front();
        chk(out_data == w && out_last == l && out_chan == c && int'(out_bytes) == b,
            $sformatf("payload word %h/%0d/%0d/%0d got %h/%0d/%0d/%0d", w, l, c, b,
                      out_data, out_last, out_chan, out_bytes));
      end
    end
  end

  // Build and send one frame; expect its payload when 'good'.
  task automatic frame(input int nbytes, input logic [15:0] etype, input logic [7:0] proto,
                       input logic [15:0] dport, input bit good);
    logic [7:0] f [$];
    logic [7:0] pay [$];
    int n;
    for (int i = 0; i < nbytes; i++) pay.push_back(8'($urandom));
    f = '{8'h00, 8'h00};
    for (int i = 0; i < 6; i++) f.push_back(8'hF0 + 8'(i));     // dst MAC
    for (int i = 0; i < 6; i++) f.push_back(8'h10 + 8'(i));     // src MAC
    f.push_back(etype[15:8]); f.push_back(etype[7:0]);
    f.push_back(8'h45); f.push_back(8'h00);
    f.push_back(8'((28 + nbytes) >> 8)); f.push_back(8'(28 + nbytes));
    f.push_back(8'h12); f.push_back(8'h34); f.push_back(8'h40); f.push_back(8'h00);
    f.push_back(8'd64); f.push_back(proto); f.push_back(8'h00); f.push_back(8'h00);
    f.push_back(8'd192); f.push_back(8'd168); f.push_back(8'd1); f.push_back(8'd2);
    f.push_back(8'd192); f.push_back(8'd168); f.push_back(8'd1); f.push_back(8'd3);
    f.push_back(8'h30); f.push_back(8'h39);
    f.push_back(dport[15:8]); f.push_back(dport[7:0]);
    f.push_back(8'((8 + nbytes) >> 8)); f.push_back(8'(8 + nbytes));
    f.push_back(8'h00); f.push_back(8'h00);
    foreach (pay[i]) f.push_back(pay[i]);
    while (f.size() < 62) f.push_back(8'h00);                    // Ethernet minimum frame
    if (good) begin
      int nw;
      nw = (nbytes + 3) / 4;
      for (int w = 0; w < nw; w++) begin
        word_t x;
        for (int b = 0; b < 4; b++) x[31 - 8*b -: 8] = (4*w + b < nbytes) ? pay[4*w + b] : f[44 + 4*w + b];
        exp_w.push_back(x); exp_l.push_back(w == nw - 1);
        exp_c.push_back(8'(dport - 16'd5000)); exp_b.push_back(nbytes);
      end
    end
    n = (f.size() + 3) / 4;
    while (f.size() < 4 * n) f.push_back(8'h00);
    for (int w = 0; w < n; w++) begin
      in_valid <= 1;
      in_data  <= {f[4*w], f[4*w+1], f[4*w+2], f[4*w+3]};
      in_sop   <= (w == 0);
      in_eop   <= (w == n - 1);
      #2;
      while (!in_ready) begin @(posedge clk); #2; end
      @(posedge clk); #1;
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk); #1;
    frame(100, 16'h0800, 8'd17, 16'd5002, 1);
    frame(5,   16'h0800, 8'd17, 16'd5000, 1);
    frame(64,  16'h0806, 8'd17, 16'd5001, 0);
    frame(64,  16'h0800, 8'd17, 16'd6000, 0);
    frame(64,  16'h0800, 8'd6,  16'd5001, 0);
    random_ready = 1;
    frame(1472, 16'h0800, 8'd17, 16'd5003, 1);
    in_valid <= 0;
    random_ready = 0;
    repeat (20) @(posedge clk);
    chk(exp_w.size() == 0, $sformatf("all payload words delivered (%0d left)", exp_w.size()));
    chk(rx_ok == 3, $sformatf("three datagrams accepted (%0d)", rx_ok));
    chk(rx_drop == 3, $sformatf("three frames dropped (%0d)", rx_drop));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
