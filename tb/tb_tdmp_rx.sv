// tb_tdmp_rx: self-check of the TDM frame receiver (SLOTS=4, SLOT_WORDS=4).
// Idle data before any comma is ignored; three good frames of random bytes
// must each give four packets of four big-endian words, tagged slot 0..3,
// with out_last on every fourth word; a frame cut by a control character
// counts in frame_err; a word offered while out_ready is low counts in
// overflow.
module tb_tdmp_rx;
  import nanet_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        in_valid = 0, in_k = 0, in_err = 0, out_ready = 1;
  logic [7:0]  in_data = 0;
  logic        out_valid, out_last;
  word_t       out_data;
  logic [7:0]  out_chan;
  logic [15:0] frames_ok, frame_err, overflow;

  tdmp_rx #(.SLOTS(4), .SLOT_WORDS(4)) dut (.*);

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic put(input logic [7:0] d, input logic k);
    in_valid <= 1; in_data <= d; in_k <= k;
    @(posedge clk); #1;
  endtask

  task automatic idle(input int n);
    in_valid <= 0;
    repeat (n) @(posedge clk);
    #1;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  word_t      exp_w [$];
  logic [7:0] exp_c [$];
  logic       exp_l [$];
  int         nwords = 0;

  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    if (exp_w.size() == 0) chk(0, "unexpected word");
    else begin
      word_t w; logic [7:0] c; logic l;
      w = exp_w.pop_front(); c = exp_c.pop_front(); l = exp_l.pop_front();
      chk(out_data == w && out_chan == c && out_last == l,
          $sformatf("word %0d: %h/%0d/%0d got %h/%0d/%0d", nwords, w, c, l, out_data, out_chan, out_last));
      nwords++;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    repeat (5) put(8'($urandom), 0);          // idle data, not framed
    for (int f = 0; f < 3; f++) begin
      put(8'hBC, 1);
      for (int wd = 0; wd < 16; wd++) begin
        word_t w;
        w = $urandom;
        exp_w.push_back(w); exp_c.push_back(8'(wd / 4)); exp_l.push_back(wd % 4 == 3);
        for (int b = 3; b >= 0; b--) put(w[8*b +: 8], 0);
      end
      repeat (2) put(8'h00, 0);               // bytes between frames ignored
    end
    idle(4);
    chk(nwords == 48 && exp_w.size() == 0, $sformatf("48 words received (%0d)", nwords));
    chk(frames_ok == 3, "three good frames");
    chk(frame_err == 0, "no frame error yet");
    // idle commas are no error; then a frame cut by a control character
    put(8'hBC, 1); put(8'hBC, 1);
    put(8'hBC, 1);
    begin
      word_t w;
      w = 32'hA1B2C3D4;
      exp_w.push_back(w); exp_c.push_back(8'd0); exp_l.push_back(1'b0);
      for (int b = 3; b >= 0; b--) put(w[8*b +: 8], 0);
    end
    put(8'h11, 0); put(8'h22, 0);
    put(8'h3C, 1);
    idle(3);
    chk(frame_err == 1, "aborted frame counted");
    chk(frames_ok == 3, "aborted frame not counted as good");
    // overflow: receiver stalled during one word
    out_ready <= 0;
    put(8'hBC, 1);
    for (int b = 0; b < 4; b++) put(8'(b), 0);
    idle(2);
    chk(overflow == 1, "lost word counted in overflow");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
