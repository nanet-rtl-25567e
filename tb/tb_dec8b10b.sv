// tb_dec8b10b: self-check of the 8b/10b decoder.
// Known code groups (K28.5 both disparities, D21.5, D0.0, D17.7) decode to
// the right byte and K flag; an all-zero group is flagged as a code error;
// then 3000 random bytes (data and all twelve control characters) go
// through enc8b10b and must come back unchanged, with one cycle of decoder
// latency.
module tb_dec8b10b;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic       in_valid = 0;
  logic [9:0] in_code = 0;
  logic       out_valid, out_k, code_err;
  logic [7:0] out_data;

  dec8b10b dut (.*);

  // encoder feeding a second decoder for the round trip
  logic       e_valid = 0, e_k = 0;
  logic [7:0] e_data = 0;
  logic       ev, ek_err, erd, dv, dk, derr;
  logic [9:0] ecode;
  logic [7:0] dd;
  enc8b10b u_enc (.clk, .rst_n, .in_valid(e_valid), .in_data(e_data), .in_k(e_k),
                  .out_valid(ev), .out_code(ecode), .k_err(ek_err), .rd(erd));
  dec8b10b u_dec2 (.clk, .rst_n, .in_valid(ev), .in_code(ecode),
                   .out_valid(dv), .out_data(dd), .out_k(dk), .code_err(derr));

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic feed(input logic [9:0] c);
    in_valid <= 1; in_code <= c;
    @(posedge clk); in_valid <= 0; #1;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam logic [7:0] KS [12] = '{8'h1C, 8'h3C, 8'h5C, 8'h7C, 8'h9C, 8'hBC, 8'hDC,
                                     8'hFC, 8'hF7, 8'hFB, 8'hFD, 8'hFE};
  logic [7:0] exp_d [$];
  logic       exp_k [$];

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    feed(10'b0011111010); chk(out_valid && out_k && out_data == 8'hBC && !code_err, "K28.5 RD-");
    feed(10'b1100000101); chk(out_k && out_data == 8'hBC && !code_err, "K28.5 RD+");
    feed(10'b1010101010); chk(!out_k && out_data == 8'hB5 && !code_err, "D21.5");
    feed(10'b1001110100); chk(!out_k && out_data == 8'h00 && !code_err, "D0.0");
    feed(10'b1000110111); chk(!out_k && out_data == 8'hF1 && !code_err, "D17.7");
    feed(10'b0000000000); chk(code_err, "invalid group flagged");
    // round trip
    fork
      for (int n = 0; n < 3000; n++) begin
        logic [7:0] b; logic kk;
        kk = ($urandom % 6) == 0;
        b  = kk ? KS[$urandom % 12] : 8'($urandom);
        exp_d.push_back(b); exp_k.push_back(kk);
        e_valid <= 1; e_data <= b; e_k <= kk;
        @(posedge clk);
      end
      begin
        int got = 0;
        while (got < 3000) begin
          @(posedge clk); #1;
          if (dv) begin
            logic [7:0] d; logic k;
            d = exp_d.pop_front(); k = exp_k.pop_front();
            chk(dd == d && dk == k && !derr, $sformatf("round trip %0d: %h/%0d got %h/%0d", got, d, k, dd, dk));
            got++;
          end
        end
      end
    join
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
