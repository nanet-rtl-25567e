// tb_rr_arbiter: self-check of the round-robin arbiter (N=4).
// With all four requesting, grants must cycle 0,1,2,3,0,...; with requests
// {1,3} they alternate; without 'advance' the grant holds; the grant is
// always one-hot and always a requester; over 400 random cycles every
// persistent requester is served within N grants.
module tb_rr_arbiter;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [3:0] req = 0, grant;
  logic       advance = 0;
  logic [1:0] grant_idx;

  rr_arbiter #(.N(4)) dut (.*);

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int wait_cnt [4];

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk); #1;
    req = 4'b1111; advance = 1; #1;
    for (int i = 0; i < 8; i++) begin
      chk(grant == 4'(1 << (i % 4)) && grant_idx == 2'(i % 4), $sformatf("rotation step %0d grant %b", i, grant));
      @(posedge clk); #1;
    end
    req = 4'b1010; #1;
    begin
      logic [3:0] g0;
      g0 = grant;
      @(posedge clk); #1;
      chk(grant != g0 && (grant == 4'b1000 || grant == 4'b0010), "alternation between 1 and 3");
    end
    advance = 0; #1;
    begin
      logic [3:0] g0;
      g0 = grant;
      repeat (3) @(posedge clk); #1;
      chk(grant == g0, "grant holds without advance");
    end
    advance = 1;
    for (int i = 0; i < 4; i++) wait_cnt[i] = 0;
    for (int n = 0; n < 400; n++) begin
      req = 4'($urandom) | 4'b0001;   // requester 0 always asks
      #1;
      chk($onehot(grant) && (grant & req) == grant, "one-hot grant to a requester");
      if (grant[0]) wait_cnt[0] = 0; else wait_cnt[0]++;
      chk(wait_cnt[0] < 4, "persistent requester served within N grants");
      @(posedge clk); #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
