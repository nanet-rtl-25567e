// tb_router: self-check of the crossbar router (NPORTS=4).
// Every input sends 30 packets of 1..6 payload words to random outputs,
// with random gaps; outputs stall at random. Payload words encode
// (source, sequence, index), so each output can check that every packet
// arrives whole, never interleaved with another, and in order per source.
// Some packets name port 9, which does not exist: they must be dropped
// and counted. Output contention must occur at least once and every
// packet must be delivered.
module tb_router;
  import nanet_pkg::*;
  localparam int NP = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [NP-1:0] in_valid = '0, in_last = '0, out_ready = '1;
  logic [NP-1:0] in_ready, out_valid, out_last;
  word_t         in_data [NP];
  word_t         out_data [NP];
  logic [15:0]   drops, contention;

  router #(.NPORTS(NP)) dut (.*);

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

  int sent_to [NP];           // packets sent to each output
  int got_at  [NP];
  int bad_drops = 0, nbad = 0;
  int done_src = 0;

  // per output: state of the packet being received
  int  o_src [NP], o_seq [NP], o_idx [NP], o_len [NP];
  bit  o_in [NP];
  int  last_seq [NP][NP];

  always @(posedge clk) begin
    for (int o = 0; o < NP; o++) begin
      out_ready[o] <= ($urandom % 4 != 0);
      if (rst_n && out_valid[o] && out_ready[o]) begin
        word_t w;
        w = out_data[o];
        if (!o_in[o]) begin
          apl_hdr_t h;
          h = apl_hdr_t'(w);
          if (int'(h.dest) != o) nbad++;
          o_src[o] = int'(h.src); o_len[o] = int'(h.len); o_idx[o] = 0; o_in[o] = 1;
          o_seq[o] = int'(h.chan);
          if (o_seq[o] <= last_seq[o][o_src[o]]) nbad++;
          last_seq[o][o_src[o]] = o_seq[o];
        end else begin
          if (w != {8'(o_src[o]), 8'(o_seq[o]), 16'(o_idx[o])}) begin
            nbad++;
            $display("out %0d: bad word %h (src %0d seq %0d idx %0d)", o, w, o_src[o], o_seq[o], o_idx[o]);
          end
          o_idx[o]++;
        end
        if (out_last[o]) begin
          if (o_idx[o] != o_len[o]) nbad++;
          o_in[o] = 0;
          got_at[o]++;
        end
      end
    end
  end

  for (genvar i = 0; i < NP; i++) begin : g_src
    initial begin
      in_data[i] = '0;
      @(posedge rst_n);
      @(posedge clk); #1;
      for (int p = 1; p <= 30; p++) begin
        int n, d;
        apl_hdr_t h;
        n = 1 + $urandom % 6;
        d = ($urandom % 10 == 0) ? 9 : $urandom % NP;
        if (d < NP) sent_to[d]++; else bad_drops++;
        h = '{dest: 4'(d), src: 4'(i), chan: 8'(p), len: 16'(n)};
        for (int k = 0; k <= n; k++) begin
          if ($urandom % 5 == 0) begin in_valid[i] = 0; @(posedge clk); #1; end
          in_valid[i] = 1;
          in_data[i]  = (k == 0) ? word_t'(h) : {8'(i), 8'(p), 16'(k - 1)};
          in_last[i]  = (k == n);
          #2;
          while (!in_ready[i]) begin @(posedge clk); #2; end
          @(posedge clk); #1;
        end
        in_valid[i] = 0;
      end
      done_src++;
    end
  end

  initial begin
    for (int o = 0; o < NP; o++) begin
      got_at[o] = 0; o_in[o] = 0;
      for (int s = 0; s < NP; s++) last_seq[o][s] = 0;
    end
    repeat (3) @(posedge clk);
    rst_n <= 1;
    wait (done_src == NP);
    repeat (100) @(posedge clk);
    for (int o = 0; o < NP; o++)
      chk(got_at[o] == sent_to[o], $sformatf("output %0d got %0d of %0d packets", o, got_at[o], sent_to[o]));
    chk(nbad == 0, $sformatf("packets whole, in order, at the right port (%0d bad)", nbad));
    chk(int'(drops) == bad_drops, $sformatf("drops %0d of %0d", drops, bad_drops));
    chk(contention > 0, "output contention happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
