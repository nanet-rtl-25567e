// router: the NIC's switch, a full crossbar between NPORTS packet ports.
//
// Port 0 faces the network interface (host and GPU memory); the other
// ports face the I/O channels. Each input's packet starts with an
// apl_hdr_t header whose 'dest' field names the output port (routing by
// destination port; other routing functions can replace route_of). Every
// output has its own rr_arbiter: among the inputs whose packet head asks
// for it, one is granted and the output is locked to that input until the
// word with in_last has passed, so packets are never interleaved. Distinct
// outputs run in parallel, so up to NPORTS packets move at once, one word
// per port per cycle. A grant takes one cycle (a registered lock), after
// which words pass combinationally (valid/ready/data through a mux). A
// packet whose dest is not a port is consumed and dropped, counted in
// drops. The crossbar with routing and arbitration follows the design;
// destination-field routing, round-robin and the drop rule are this
// design's choices.
module router
  import nanet_pkg::*;
#(
  parameter int unsigned NPORTS = 6
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [NPORTS-1:0] in_valid,
  output logic [NPORTS-1:0] in_ready,
  input  word_t             in_data [NPORTS],
  input  logic [NPORTS-1:0] in_last,
  output logic [NPORTS-1:0] out_valid,
  input  logic [NPORTS-1:0] out_ready,
  output word_t             out_data [NPORTS],
  output logic [NPORTS-1:0] out_last,
  output logic [15:0]       drops,
  output logic [15:0]       contention   // cycles in which a head waited for a busy output
);

  localparam int unsigned IW = $clog2(NPORTS > 1 ? NPORTS : 2);

  logic [NPORTS-1:0] busy;            // input currently owns an output
  logic [NPORTS-1:0] dropping;        // input is discarding a bad packet
  logic [NPORTS-1:0] locked;          // output is locked to an input
  logic [IW-1:0]     owner [NPORTS];
  logic [NPORTS-1:0] req   [NPORTS];  // req[o][i]
  logic [NPORTS-1:0] grant [NPORTS];
  logic [IW-1:0]     gidx  [NPORTS];
  logic [NPORTS-1:0] adv;
  logic [NPORTS-1:0] head;            // input has an unrouted header
  logic [NPORTS-1:0] bad;
  logic [3:0]        dst   [NPORTS];

  function automatic logic [3:0] route_of(input word_t hdr);
    apl_hdr_t h;
    h = apl_hdr_t'(hdr);
    return h.dest;
  endfunction

  always_comb begin
    for (int i = 0; i < NPORTS; i++) begin
      dst[i]  = route_of(in_data[i]);
      head[i] = in_valid[i] && !busy[i] && !dropping[i];
      bad[i]  = head[i] && (int'(dst[i]) >= NPORTS);
    end
    for (int o = 0; o < NPORTS; o++) begin
      for (int i = 0; i < NPORTS; i++)
        req[o][i] = head[i] && !bad[i] && int'(dst[i]) == o && !locked[o];
      adv[o] = 1'b1;
    end
  end

  for (genvar o = 0; o < NPORTS; o++) begin : g_arb
    rr_arbiter #(.N(NPORTS)) u_arb (
      .clk, .rst_n,
      .req(req[o]), .advance(adv[o]),
      .grant(grant[o]), .grant_idx(gidx[o])
    );
  end

  // Crossbar data path.
  always_comb begin
    in_ready = '0;
    for (int o = 0; o < NPORTS; o++) begin
      out_valid[o] = locked[o] && in_valid[owner[o]];
      out_data[o]  = in_data[owner[o]];
      out_last[o]  = in_last[owner[o]];
      if (locked[o] && out_ready[o]) in_ready[owner[o]] = 1'b1;
    end
    for (int i = 0; i < NPORTS; i++)
      if (dropping[i] || bad[i]) in_ready[i] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy       <= '0;
      dropping   <= '0;
      locked     <= '0;
      drops      <= '0;
      contention <= '0;
      for (int o = 0; o < NPORTS; o++) owner[o] <= '0;
    end else begin
      for (int o = 0; o < NPORTS; o++) begin
        if (!locked[o] && grant[o] != '0) begin
          locked[o]       <= 1'b1;
          owner[o]        <= gidx[o];
          busy[gidx[o]]   <= 1'b1;
        end else if (locked[o] && out_valid[o] && out_ready[o] && out_last[o]) begin
          locked[o]       <= 1'b0;
          busy[owner[o]]  <= 1'b0;
        end
      end
      for (int i = 0; i < NPORTS; i++) begin
        if (bad[i]) begin
          drops <= drops + 1'b1;
          if (!in_last[i]) dropping[i] <= 1'b1;
        end else if (dropping[i] && in_valid[i] && in_last[i]) begin
          dropping[i] <= 1'b0;
        end
      end
      for (int i = 0; i < NPORTS; i++)
        if (head[i] && !bad[i] && locked[int'(dst[i]) % NPORTS] &&
            owner[int'(dst[i]) % NPORTS] != IW'(i))
          contention <= contention + 1'b1;
    end
  end

  // An input is never owned by two outputs at once.
  logic [NPORTS-1:0] owned_twice;
  always_comb begin
    owned_twice = '0;
    for (int a = 0; a < NPORTS; a++)
      for (int b = a + 1; b < NPORTS; b++)
        if (locked[a] && locked[b] && owner[a] == owner[b]) owned_twice[a] = 1'b1;
  end
  a_single_owner: assert property (@(posedge clk) disable iff (!rst_n) owned_twice == '0);

endmodule
