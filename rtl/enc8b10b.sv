// enc8b10b: 8b/10b line encoder of the KM3link physical link coding stage.
//
// Each accepted byte (with its K flag) is turned into a 10-bit code group
// using the standard 8b/10b tables in linecode_pkg, and the running
// disparity is advanced. The output is registered: the code group of a byte
// presented in cycle n appears in cycle n+1, so the encoder adds exactly one
// cycle of latency, a fixed amount as a deterministic-latency link needs.
// Running disparity resets to RD-. A K flag on a byte that is not one of the
// twelve control characters raises k_err for that code group (the byte is
// still encoded with the control table). The line code is named by the
// design it belongs to; tables, reset and the error flag follow the common
// 8b/10b practice and are this implementation's choice.
module enc8b10b
  import linecode_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  logic [7:0] in_data,
  input  logic       in_k,
  output logic       out_valid,
  output logic [9:0] out_code,   // bit 9 = a, sent first
  output logic       k_err,
  output logic       rd          // running disparity after out_code
);

  logic [5:0] c6;
  logic [3:0] c4;
  logic       rd6, rd_next;

  always_comb begin
    c6      = enc6(in_data[4:0], in_k, rd);
    rd6     = rd_after6(c6, rd);
    c4      = enc4(in_data[7:5], in_k, in_data[4:0], rd6);
    rd_next = rd_after4(c4, rd6);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd        <= 1'b0;
      out_valid <= 1'b0;
      out_code  <= '0;
      k_err     <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_code <= {c6, c4};
        rd       <= rd_next;
        k_err    <= in_k && !k_valid(in_data);
      end
    end
  end

endmodule
