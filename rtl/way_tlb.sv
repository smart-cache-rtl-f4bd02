// way_tlb - fully associative data TLB that carries the way bit vector.
//
// Every data access passes through the TLB, so the TLB is where the
// way-partition mapping lives: each entry holds, next to the page translation,
// one bit per L1 way.  A set bit lets accesses to that page read and replace
// in that way; the L1 reads no other way.  Software writes entries through the
// write port (wr_en, wr_idx, wr_entry); the whole table is invalid after reset.
//
// Lookup is combinational: lk_vaddr is compared against every valid entry in
// the same cycle, so the L1 knows which ways to enable when it starts its
// array read at the next clock edge.  On a miss the address passes untranslated
// and all ways are enabled, which is the behaviour of a conventional cache;
// lk_hit reports the miss.  If several entries match, the lowest index wins.
//
// Keeping the bit vector in the TLB and using it to enable only the mapped
// ways follows the original proposal.  Entry count, miss behaviour and the
// combinational lookup are this design's choices.
module way_tlb
  import smart_cache_pkg::*;
#(
  parameter int unsigned ENTRIES = 32,
  parameter int unsigned WAYS    = L1_WAYS
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       wr_en,
  input  logic [$clog2(ENTRIES)-1:0] wr_idx,
  input  tlb_entry_t                 wr_entry,
  input  addr_t                      lk_vaddr,
  output addr_t                      lk_paddr,
  output logic [WAYS-1:0]            lk_ways,
  output logic                       lk_hit
);

  tlb_entry_t tab [ENTRIES];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < ENTRIES; i++) tab[i] <= '0;
    end else if (wr_en) begin
      tab[wr_idx] <= wr_entry;
    end
  end

  always_comb begin
    lk_hit   = 1'b0;
    lk_paddr = lk_vaddr;
    lk_ways  = '1;
    for (int i = ENTRIES - 1; i >= 0; i--) begin
      if (tab[i].valid && tab[i].vpn == lk_vaddr[ADDR_W-1:PAGE_BITS]) begin
        lk_hit   = 1'b1;
        lk_paddr = {tab[i].ppn, lk_vaddr[PAGE_BITS-1:0]};
        lk_ways  = tab[i].ways[WAYS-1:0];
      end
    end
  end

endmodule
