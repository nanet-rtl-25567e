// tb_comma_aligner: self-check of the KM3link word aligner.
// A repeating stream of four valid code groups (K28.5-, D21.5, K28.5+,
// D10.2) is serialised and cut into 10-bit words at every bit delay d from
// 0 to 9. For each d the aligner must lock, report shift == d, and deliver
// the code groups in order. Each d is aligned twice through 'realign'
// (the reset-and-align procedure) and must give the same shift both times.
module tb_comma_aligner;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic       realign = 0, in_valid = 0;
  logic [9:0] in_word = 0;
  logic       out_valid, locked;
  logic [9:0] out_code;
  logic [3:0] shift;

  comma_aligner dut (.*);

  localparam logic [9:0] PAT [4] = '{10'b0011111010, 10'b1010101010,
                                     10'b1100000101, 10'b0101010101};

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

  logic bits [1000];
  int   first_shift;

  function automatic int pat_idx(input logic [9:0] c);
    for (int i = 0; i < 4; i++) if (PAT[i] == c) return i;
    return -1;
  endfunction

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int d = 0; d < 10; d++) begin
      // serial stream delayed by d junk bits
      for (int b = 0; b < 1000; b++)
        bits[b] = (b < d) ? 1'b1 : PAT[((b - d) / 10) % 4][9 - ((b - d) % 10)];
      for (int pass = 0; pass < 2; pass++) begin
        int prev_i, nout, nbad;
        realign <= 1;
        @(posedge clk);
        realign <= 0;
        prev_i = -1; nout = 0; nbad = 0;
        for (int w = 0; w < 60; w++) begin
          logic [9:0] x;
          for (int j = 0; j < 10; j++) x[9 - j] = bits[10 * w + j];
          in_valid <= 1;
          in_word  <= x;
          @(posedge clk); #1;
          if (out_valid) begin
            int i;
            i = pat_idx(out_code);
            if (i < 0 || (prev_i >= 0 && i != (prev_i + 1) % 4)) nbad++;
            prev_i = i;
            nout++;
          end
        end
        in_valid <= 0;
        chk(locked, $sformatf("locked at d=%0d", d));
        chk(shift == 4'(d), $sformatf("shift %0d for d=%0d", shift, d));
        chk(nout > 50 && nbad == 0, $sformatf("aligned groups in order d=%0d (%0d out, %0d bad)", d, nout, nbad));
        if (pass == 0) first_shift = int'(shift);
        else chk(int'(shift) == first_shift, "same shift after reset-and-align");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
