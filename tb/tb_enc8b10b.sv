// tb_enc8b10b: self-check of the 8b/10b encoder.
// Known code groups from the standard tables (K28.5 in both disparities,
// D21.5, D0.0, D7.0, D17.7), then 2000 random bytes checked for the code's
// properties: every group has 4, 5 or 6 ones, a 6-ones group only after
// RD-, a 4-ones group only after RD+, and never more than 5 equal bits in a
// row on the line. Output latency is checked to be one cycle.
module tb_enc8b10b;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic       in_valid = 0, in_k = 0;
  logic [7:0] in_data = 0;
  logic       out_valid, k_err, rd;
  logic [9:0] out_code;

  enc8b10b dut (.*);

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic send(input logic [7:0] d, input logic k);
    in_valid <= 1; in_data <= d; in_k <= k;
    @(posedge clk);
    in_valid <= 0;
    #1;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int  run, rdv;
  logic last_bit;
  logic [9:0] c;

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    send(8'hBC, 1); chk(out_valid && out_code == 10'b0011111010, "K28.5 RD-");
    chk(!k_err, "K28.5 is a valid control");
    send(8'hBC, 1); chk(out_code == 10'b1100000101, "K28.5 RD+");
    send(8'hB5, 0); chk(out_code == 10'b1010101010, "D21.5");
    // rd is negative again after two K28.5
    send(8'h00, 0); chk(out_code == 10'b1001110100, "D0.0 RD-");
    send(8'hF1, 0); chk(out_code == 10'b1000110111, "D17.7 RD- uses A7");
    send(8'h07, 0); chk(out_code == 10'b0001110100, "D7.0 RD+");
    send(8'h01, 1); chk(k_err, "K flag on a non-control byte flagged");
    // latency: nothing valid one cycle after the byte
    @(posedge clk); #1; chk(!out_valid, "one-cycle valid pulse");

    // Random stream: disparity and run-length rules.
    rdv = rd ? 1 : -1;
    run = 0; last_bit = 1'bx;
    for (int n = 0; n < 2000; n++) begin
      logic [7:0] b;
      logic kk;
      b  = 8'($urandom);
      kk = ($urandom % 8) == 0;
      if (kk) b = 8'hBC;
      send(b, kk);
      c = out_code;
      begin
        int ones;
        ones = $countones(c);
        chk(ones >= 4 && ones <= 6, "group balance");
        if (ones == 6) begin chk(rdv < 0, "6 ones only after RD-"); rdv = 1; end
        if (ones == 4) begin chk(rdv > 0, "4 ones only after RD+"); rdv = -1; end
        chk((rdv > 0) == rd, "reported running disparity");
      end
      for (int i = 9; i >= 0; i--) begin
        if (n > 0 && c[i] == last_bit) run++; else run = 1;
        last_bit = c[i];
        if (run > 5) begin chk(0, "run length above 5"); run = 0; end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
