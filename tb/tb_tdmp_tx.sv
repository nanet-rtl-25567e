// tb_tdmp_tx: self-check of the TDM frame transmitter (SLOTS=4,
// SLOT_WORDS=4). The output must be back-to-back frames of one K28.5 and
// 64 data bytes. A three-word packet for slot 2 must appear, big-endian, in
// slot 2 of one frame with every other byte of that frame zero; a six-word
// packet must be cut to four words with truncated == 2.
module tb_tdmp_tx;
  import nanet_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        in_valid = 0, in_last = 0;
  logic        in_ready;
  word_t       in_data = 0;
  logic [7:0]  in_chan = 0;
  logic        out_valid, out_k;
  logic [7:0]  out_data;
  logic [15:0] frames_sent, truncated;

  tdmp_tx #(.SLOTS(4), .SLOT_WORDS(4)) dut (.*);

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

  // frame capture
  logic [7:0] fr [64];
  int         pos = -1, nframes = 0, bad_len = 0, k_in_data = 0;
  logic [7:0] last_frame [64];
  int         frames_with_data = 0;
  word_t      want [4];
  int         want_n = 0;
  logic [7:0] want_slot;

  always @(posedge clk) if (rst_n && out_valid) begin
    if (out_k) begin
      if (out_data != 8'hBC) k_in_data++;
      if (pos >= 0 && pos != 64) bad_len++;
      if (pos == 64) begin
        bit any, ok;
        nframes++;
        any = 0; ok = 1;
        for (int i = 0; i < 64; i++) if (fr[i] != 0) any = 1;
        if (any) begin
          frames_with_data++;
          for (int i = 0; i < 64; i++) begin
            logic [7:0] e;
            int s, wd;
            s = i / 16; wd = (i % 16) / 4;
            e = (s == int'(want_slot) && wd < want_n) ? want[wd][8*(3 - i % 4) +: 8] : 8'h00;
            if (fr[i] != e) ok = 0;
          end
          chk(ok, $sformatf("frame contents for slot %0d", want_slot));
        end
      end
      pos = 0;
    end else if (pos >= 0) begin
      if (pos < 64) fr[pos] = out_data;
      pos++;
    end
  end

  task automatic send_pkt(input int n, input logic [7:0] ch);
    for (int i = 0; i < n; i++) begin
      word_t w;
      w = $urandom | 32'h01000000;
      if (i < 4) want[i] = w;
      in_valid <= 1; in_data <= w; in_last <= (i == n - 1); in_chan <= ch;
      #2;
      while (!in_ready) begin @(posedge clk); #2; end
      @(posedge clk); #1;
    end
    in_valid <= 0;
    want_n = n < 4 ? n : 4;
    want_slot = ch;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    repeat (150) @(posedge clk);
    send_pkt(3, 8'd2);
    repeat (200) @(posedge clk);
    chk(frames_with_data == 1, "one frame carried the packet");
    send_pkt(6, 8'd1);
    repeat (200) @(posedge clk);
    chk(frames_with_data == 2, "second packet sent");
    chk(truncated == 2, "two words truncated");
    chk(bad_len == 0, "every frame is K28.5 + 64 bytes");
    chk(k_in_data == 0, "only K28.5 control characters");
    chk(nframes >= 8 && frames_sent >= 8, $sformatf("frames flow continuously (%0d)", nframes));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
