// comma_aligner: word aligner of the KM3link receiver.
//
// The deserialiser delivers 10-bit words whose boundary is arbitrary. The
// aligner keeps the previous word, looks at the 20-bit window
// {previous, current} (earliest bit in bit 19) and, while not locked,
// searches the ten possible bit offsets for a K28.5 code group of either
// disparity. On the first hit it locks to that offset and from then on
// outputs the window slice at the locked offset. 'shift' reports the
// offset in serial bit times: after every reset-and-align the same link
// gives the same shift, which is how a fixed-latency link is checked.
// 'realign' drops the lock and starts a new search. Latency is fixed: the
// output word is registered one word time after the word that completes it.
// Searching for K28.5 and the window form are this design's choices; the
// need for a fixed alignment shift comes from the deterministic-latency
// link the NIC serves.
module comma_aligner
  import nanet_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       realign,
  input  logic       in_valid,
  input  logic [9:0] in_word,
  output logic       out_valid,
  output logic [9:0] out_code,
  output logic       locked,
  output logic [3:0] shift
);

  logic [9:0]  prev;
  logic [19:0] win;
  logic        found;
  logic [3:0]  found_at;
  logic [3:0]  use_shift;

  assign win = {prev, in_word};

  always_comb begin
    found    = 1'b0;
    found_at = '0;
    for (int s = 9; s >= 0; s--) begin
      if (win[19-s -: 10] == K28_5_RDN || win[19-s -: 10] == K28_5_RDP) begin
        found    = 1'b1;
        found_at = 4'(s);
      end
    end
    use_shift = (locked && !realign) ? shift : found_at;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prev      <= '0;
      locked    <= 1'b0;
      shift     <= '0;
      out_valid <= 1'b0;
      out_code  <= '0;
    end else begin
      if (realign) begin
        locked <= 1'b0;
      end
      if (in_valid) begin
        prev <= in_word;
        if ((!locked || realign) && found) begin
          locked <= 1'b1;
          shift  <= found_at;
        end
      end
      out_valid <= in_valid && ((locked && !realign) || found);
      out_code  <= win[19-use_shift -: 10];
    end
  end

endmodule
