// smart_cache_top - software-managed, energy-aware data-memory hierarchy.
//
// The program decides where each kind of data lives, so the hardware never has
// to guess.  Three mechanisms sit between the processor and the L2:
//   * bypass: accesses of class CLS_BYPASS (write-only output data) skip the
//     L1 and go straight to the L2 (bypass_path);
//   * mini-cache: accesses of class CLS_MINI (a small, hot buffer) go to a
//     512-byte direct-mapped cache instead of the L1 (mini_cache);
//   * way-partition: every access is translated by the TLB (way_tlb), whose
//     entry for the page also holds a bit vector of L1 ways; the 8 KB 4-way L1
//     (l1_dcache) reads and replaces only in those ways.
// Below them, a fixed-priority arbiter (mem_arbiter, L1 > mini > bypass) shares
// the 512 KB 4-way L2 (l2_cache), whose line port to main memory is brought out.
//
// CPU interface: cpu_req_valid/cpu_req_ready handshake with write, class,
// virtual address, byte enables and write data; cpu_resp_valid pulses once per
// access, in order, with the load word on cpu_resp_rdata.  One access is in
// flight across the three paths: a request is taken only when all three are
// ready, except that an L1 or mini-cache load hit lets the next request in
// while it responds, so load hits run one per cycle.  TLB lookup happens in the
// accepting cycle; a hit returns one cycle later.  Class 3 is treated as normal.
// After reset the L2 spends one cycle per set clearing its state, and misses
// wait for it.
//
// Activity outputs show what the energy argument rests on: l1_way_en (the L1
// ways whose arrays are read this cycle), l1_miss, mini_access, mini_miss,
// byp_access, tlb_miss (access taken with no TLB entry: untranslated, all
// ways).
//
// The three mechanisms, the sizes and the bit vector in the TLB follow the
// original proposal; putting all three together, the class field on the request, the
// serialisation of accesses and everything about timing are this design's.
module smart_cache_top
  import smart_cache_pkg::*;
#(
  parameter int unsigned L1_SIZE     = 8192,
  parameter int unsigned L1_NWAYS    = 4,
  parameter int unsigned MINI_SIZE   = 512,
  parameter int unsigned L2_SIZE     = 524288,
  parameter int unsigned L2_WAYS     = 4,
  parameter int unsigned TLB_ENTRIES = 32
) (
  input  logic                           clk,
  input  logic                           rst_n,
  // CPU
  input  logic                           cpu_req_valid,
  output logic                           cpu_req_ready,
  input  logic                           cpu_req_write,
  input  acc_class_e                     cpu_req_class,
  input  addr_t                          cpu_req_vaddr,
  input  logic [3:0]                     cpu_req_be,
  input  word_t                          cpu_req_wdata,
  output logic                           cpu_resp_valid,
  output word_t                          cpu_resp_rdata,
  // TLB maintenance
  input  logic                           tlb_wr_en,
  input  logic [$clog2(TLB_ENTRIES)-1:0] tlb_wr_idx,
  input  tlb_entry_t                     tlb_wr_entry,
  // main memory
  output mem_req_t                       mem_req,
  input  logic                           mem_req_ready,
  input  mem_resp_t                      mem_resp,
  // activity
  output logic [L1_NWAYS-1:0]            l1_way_en,
  output logic                           l1_miss,
  output logic                           mini_access,
  output logic                           mini_miss,
  output logic                           byp_access,
  output logic                           tlb_miss
);

  // ------------------------------------------------------------ TLB
  addr_t               paddr;
  logic [L1_NWAYS-1:0] ways;
  logic                tlb_hit;

  way_tlb #(.ENTRIES(TLB_ENTRIES), .WAYS(L1_NWAYS)) u_tlb (
    .clk, .rst_n,
    .wr_en(tlb_wr_en), .wr_idx(tlb_wr_idx), .wr_entry(tlb_wr_entry),
    .lk_vaddr(cpu_req_vaddr), .lk_paddr(paddr), .lk_ways(ways), .lk_hit(tlb_hit)
  );

  // ------------------------------------------------------------ routing
  logic  l1_ready, mini_ready, byp_ready, all_ready;
  logic  l1_valid, mini_valid, byp_valid;
  logic  l1_rv, mini_rv, byp_rv;
  word_t l1_rd, mini_rd, byp_rd;

  assign all_ready     = l1_ready && mini_ready && byp_ready;
  assign cpu_req_ready = all_ready;
  assign byp_valid     = cpu_req_valid && all_ready && cpu_req_class == CLS_BYPASS;
  assign mini_valid    = cpu_req_valid && all_ready && cpu_req_class == CLS_MINI;
  assign l1_valid      = cpu_req_valid && all_ready && !byp_valid && !mini_valid;
  assign tlb_miss      = cpu_req_valid && all_ready && !tlb_hit;

  assign cpu_resp_valid = l1_rv || mini_rv || byp_rv;
  always_comb begin
    cpu_resp_rdata = l1_rd;
    if (mini_rv) cpu_resp_rdata = mini_rd;
    if (byp_rv)  cpu_resp_rdata = byp_rd;
  end

  // ------------------------------------------------------------ paths
  mem_req_t  up_req   [3];
  logic      up_ready [3];
  mem_resp_t up_resp  [3];

  l1_dcache #(.SIZE_BYTES(L1_SIZE), .WAYS(L1_NWAYS)) u_l1 (
    .clk, .rst_n,
    .req_valid(l1_valid), .req_ready(l1_ready), .req_write(cpu_req_write),
    .req_addr(paddr), .req_be(cpu_req_be), .req_wdata(cpu_req_wdata), .req_ways(ways),
    .resp_valid(l1_rv), .resp_rdata(l1_rd),
    .way_en(l1_way_en), .miss(l1_miss),
    .mem_req(up_req[0]), .mem_req_ready(up_ready[0]), .mem_resp(up_resp[0])
  );

  mini_cache #(.SIZE_BYTES(MINI_SIZE)) u_mini (
    .clk, .rst_n,
    .req_valid(mini_valid), .req_ready(mini_ready), .req_write(cpu_req_write),
    .req_addr(paddr), .req_be(cpu_req_be), .req_wdata(cpu_req_wdata),
    .resp_valid(mini_rv), .resp_rdata(mini_rd),
    .access(mini_access), .miss(mini_miss),
    .mem_req(up_req[1]), .mem_req_ready(up_ready[1]), .mem_resp(up_resp[1])
  );

  bypass_path u_byp (
    .clk, .rst_n,
    .req_valid(byp_valid), .req_ready(byp_ready), .req_write(cpu_req_write),
    .req_addr(paddr), .req_be(cpu_req_be), .req_wdata(cpu_req_wdata),
    .resp_valid(byp_rv), .resp_rdata(byp_rd), .access(byp_access),
    .mem_req(up_req[2]), .mem_req_ready(up_ready[2]), .mem_resp(up_resp[2])
  );

  // ------------------------------------------------------------ L2
  mem_req_t  l2_req;
  logic      l2_ready;
  mem_resp_t l2_resp;

  mem_arbiter #(.N(3)) u_arb (
    .clk, .rst_n,
    .up_req, .up_ready, .up_resp,
    .dn_req(l2_req), .dn_ready(l2_ready), .dn_resp(l2_resp)
  );

  l2_cache #(.SIZE_BYTES(L2_SIZE), .WAYS(L2_WAYS)) u_l2 (
    .clk, .rst_n,
    .up_req(l2_req), .up_ready(l2_ready), .up_resp(l2_resp),
    .mem_req, .mem_req_ready, .mem_resp
  );

  // At most one path answers in any cycle.
  a_one_resp: assert property (@(posedge clk) disable iff (!rst_n)
    $onehot0({l1_rv, mini_rv, byp_rv}));

endmodule
