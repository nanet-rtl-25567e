// tb_tlb: self-check of the associative TLB (ENTRIES=8, PAGE_BITS=16).
// Six mappings are written to scattered slots; lookups of addresses in
// those pages must hit with the physical page joined to the page offset;
// lookups elsewhere must miss and count; an invalidated entry must miss and
// an overwritten slot must return its new mapping.
module tb_tlb;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        wr_en = 0, wr_valid = 0, lk_en = 0;
  logic [2:0]  wr_idx = 0;
  logic [63:0] wr_vaddr = 0, wr_paddr = 0, lk_vaddr = 0;
  logic        lk_hit;
  logic [63:0] lk_paddr;
  logic [31:0] misses;

  tlb #(.ENTRIES(8), .PAGE_BITS(16), .ADDR_W(64)) dut (.*);

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

  logic [47:0] vp [6], pp [6];

  task automatic write(input int idx, input bit v, input logic [63:0] va, input logic [63:0] pa);
    wr_en = 1; wr_idx = 3'(idx); wr_valid = v; wr_vaddr = va; wr_paddr = pa;
    @(posedge clk); #1;
    wr_en = 0;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk); #1;
    for (int i = 0; i < 6; i++) begin
      vp[i] = {16'h7f00, 32'($urandom)};
      pp[i] = {16'h0000, 32'($urandom)};
      write((i * 5) % 8, 1, {vp[i], 16'h0000}, {pp[i], 16'hFFFF});
    end
    for (int n = 0; n < 100; n++) begin
      int i;
      logic [15:0] off;
      i = $urandom % 6; off = 16'($urandom);
      lk_en = 1; lk_vaddr = {vp[i], off}; #1;
      chk(lk_hit && lk_paddr == {pp[i], off}, $sformatf("hit entry %0d", i));
    end
    lk_vaddr = 64'h1234_0000_0000_0010; #1;
    chk(!lk_hit, "unmapped page misses");
    @(posedge clk); #1;
    @(posedge clk); #1;
    chk(misses == 2, $sformatf("miss cycles counted (%0d)", misses));
    lk_en = 0;
    write(5, 0, {vp[1], 16'h0}, 64'h0);   // slot 5 held entry 1
    lk_vaddr = {vp[1], 16'h0040}; #1;
    chk(!lk_hit, "invalidated entry misses");
    write(0, 1, {vp[0], 16'h0}, 64'h0000_00AB_CDEF_0000);
    lk_vaddr = {vp[0], 16'h0123}; #1;
    chk(lk_hit && lk_paddr == 64'h0000_00AB_CDEF_0123, "overwritten slot gives new mapping");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
