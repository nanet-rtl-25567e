// tlb: translation lookaside buffer of the network interface.
//
// A fully associative cache of ENTRIES virtual-page to physical-page
// mappings. A lookup compares the virtual page number of lk_vaddr with all
// valid entries at once and returns the physical address (physical page
// joined with the in-page offset) and 'hit' in the same cycle. Entries are
// filled or invalidated through the write port by the configuration side
// (the microcontroller or the host driver), which also chooses the slot;
// on a miss the requester waits until a matching entry is written. Pages
// are 2**PAGE_BITS bytes. The associative organisation follows the design;
// entry count, page size, single-cycle lookup and software-chosen
// replacement are this design's choices.
module tlb #(
  parameter int unsigned ENTRIES   = 32,
  parameter int unsigned PAGE_BITS = 16,
  parameter int unsigned ADDR_W    = 64
) (
  input  logic                       clk,
  input  logic                       rst_n,
  // configuration write port
  input  logic                       wr_en,
  input  logic [$clog2(ENTRIES)-1:0] wr_idx,
  input  logic                       wr_valid,
  input  logic [ADDR_W-1:0]          wr_vaddr,
  input  logic [ADDR_W-1:0]          wr_paddr,
  // lookup port
  input  logic                       lk_en,
  input  logic [ADDR_W-1:0]          lk_vaddr,
  output logic                       lk_hit,
  output logic [ADDR_W-1:0]          lk_paddr,
  output logic [31:0]                misses
);

  localparam int unsigned PN_W = ADDR_W - PAGE_BITS;

  logic [ENTRIES-1:0] valid;
  logic [PN_W-1:0]    vpn [ENTRIES];
  logic [PN_W-1:0]    ppn [ENTRIES];
  logic [ENTRIES-1:0] match;

  always_comb begin
    lk_hit   = 1'b0;
    lk_paddr = '0;
    for (int e = 0; e < ENTRIES; e++) begin
      match[e] = valid[e] && vpn[e] == lk_vaddr[ADDR_W-1:PAGE_BITS];
      if (match[e] && !lk_hit) begin
        lk_hit   = 1'b1;
        lk_paddr = {ppn[e], lk_vaddr[PAGE_BITS-1:0]};
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid  <= '0;
      misses <= '0;
      for (int e = 0; e < ENTRIES; e++) begin
        vpn[e] <= '0;
        ppn[e] <= '0;
      end
    end else begin
      if (wr_en) begin
        valid[wr_idx] <= wr_valid;
        vpn[wr_idx]   <= wr_vaddr[ADDR_W-1:PAGE_BITS];
        ppn[wr_idx]   <= wr_paddr[ADDR_W-1:PAGE_BITS];
      end
      if (lk_en && !lk_hit) misses <= misses + 1'b1;
    end
  end

endmodule
