// ccs_tlb: the CCS's own translation lookaside buffer.
//
// The host gives the CCS virtual addresses; the CCS reads and writes the cache
// with physical ones. The document gives the CCS a dedicated TLB kept in step
// with the processor's TLB. Here that is a small fully associative table that
// the host side fills and flushes: fill_* writes entry fill_idx with a
// virtual/physical page pair, flush clears every entry (to follow a flush of the
// processor's TLB). NPORTS lookups run in parallel and combinationally: lk_hit
// says whether the page is present and lk_pa is the physical address.
//
// The document states only the function; the organisation (ENTRIES fully
// associative entries, page size 2^PAGE_BITS, host-chosen replacement index,
// combinational lookup, miss reported rather than walked) is this design's.
module ccs_tlb #(
  parameter int unsigned ENTRIES   = 16,
  parameter int unsigned NPORTS    = 2,
  parameter int unsigned VA_W      = 48,
  parameter int unsigned PA_W      = 40,
  parameter int unsigned PAGE_BITS = 12,
  localparam int unsigned IDX_W    = $clog2(ENTRIES)
) (
  input  logic                               clk,
  input  logic                               rst_n,
  input  logic                               flush,
  input  logic                               fill_valid,
  input  logic [IDX_W-1:0]                   fill_idx,
  input  logic [VA_W-PAGE_BITS-1:0]          fill_vpn,
  input  logic [PA_W-PAGE_BITS-1:0]          fill_ppn,
  input  logic [NPORTS-1:0][VA_W-1:0]        lk_va,
  output logic [NPORTS-1:0][PA_W-1:0]        lk_pa,
  output logic [NPORTS-1:0]                  lk_hit
);
  logic [ENTRIES-1:0]                        vld;
  logic [ENTRIES-1:0][VA_W-PAGE_BITS-1:0]    vpn;
  logic [ENTRIES-1:0][PA_W-PAGE_BITS-1:0]    ppn;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vld <= '0;
      vpn <= '0;
      ppn <= '0;
    end else if (flush) begin
      vld <= '0;
    end else if (fill_valid) begin
      vld[fill_idx] <= 1'b1;
      vpn[fill_idx] <= fill_vpn;
      ppn[fill_idx] <= fill_ppn;
    end
  end

  always_comb begin
    for (int p = 0; p < NPORTS; p++) begin
      lk_hit[p] = 1'b0;
      lk_pa[p]  = '0;
      for (int e = 0; e < ENTRIES; e++) begin
        if (vld[e] && vpn[e] == lk_va[p][VA_W-1:PAGE_BITS]) begin
          lk_hit[p] = 1'b1;
          lk_pa[p]  = {ppn[e], lk_va[p][PAGE_BITS-1:0]};
        end
      end
    end
  end
endmodule
