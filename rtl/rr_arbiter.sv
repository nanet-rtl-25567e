// rr_arbiter: round-robin arbiter, one per router output.
//
// Among the asserted bits of req, grant (one-hot) picks the first one at or
// after the priority pointer, wrapping around. When 'advance' is high the
// pointer moves to the position just after the current grant, so the
// requester that was just served has the lowest priority next time and
// every requester is served within N grants. The grant is combinational;
// the pointer is a register reset to 0. Round-robin is this design's
// choice: the arbitration policy of the router is left open.
module rr_arbiter #(
  parameter int unsigned N = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] req,
  input  logic         advance,
  output logic [N-1:0] grant,
  output logic [$clog2(N > 1 ? N : 2)-1:0] grant_idx
);

  localparam int unsigned IW = $clog2(N > 1 ? N : 2);

  logic [IW-1:0] ptr;

  always_comb begin
    int unsigned k;
    grant     = '0;
    grant_idx = '0;
    for (int unsigned i = 0; i < N; i++) begin
      k = (int'(ptr) + i) % N;
      if (req[k] && grant == '0) begin
        grant[k]  = 1'b1;
        grant_idx = IW'(k);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ptr <= '0;
    else if (advance && grant != '0)
      ptr <= (grant_idx == IW'(N - 1)) ? '0 : grant_idx + 1'b1;
  end

  a_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(grant));

endmodule
