// tb_smart_cache_top - end-to-end test of the whole hierarchy at its default
// sizes (8 KB 4-way L1, 512-byte mini-cache, 512 KB 4-way L2, 32-entry TLB).
//
// The testbench plays the processor and the operating system.  It writes TLB
// entries that map a decoder-like address space: pages of a macroblock buffer
// (served by the mini-cache), lookup tables and decoder state in L1 way 0 or 1,
// reference frames in L1 ways 2-3, and an output frame buffer that is
// bypassed.  It keeps its own copy of the page table and a word memory indexed
// by physical address, and checks every load against it.
//
// Each mechanism is counted and must occur at least once: TLB translation and
// TLB miss (all ways enabled), L1 hit and miss, L1 dirty write-back, a one-way
// partition evicting where four ways would not, back-to-back load hits at one
// per cycle, mini-cache hit, miss and write-back, bypassed store and load, L2
// miss and L2 write-back to main memory.  The L1 way enables are checked on
// every access against the page's bit vector.
module tb_smart_cache_top;
  import smart_cache_pkg::*;
  import tb_util_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic cpu_req_valid = 0, cpu_req_ready, cpu_req_write = 0;
  acc_class_e cpu_req_class = CLS_NORMAL;
  addr_t cpu_req_vaddr = '0;
  logic [3:0] cpu_req_be = '0;
  word_t cpu_req_wdata = '0, cpu_resp_rdata;
  logic cpu_resp_valid;
  logic tlb_wr_en = 0;
  logic [4:0] tlb_wr_idx = '0;
  tlb_entry_t tlb_wr_entry = '0;
  mem_req_t mem_req; logic mem_req_ready; mem_resp_t mem_resp;
  logic [3:0] l1_way_en;
  logic l1_miss, mini_access, mini_miss, byp_access, tlb_miss;

  smart_cache_top dut (.*);
  mem_model #(.LATENCY(8), .RANDOM_READY(1)) mem (.clk, .rst_n, .req(mem_req), .ready(mem_req_ready), .resp(mem_resp));

  int checks = 0, failures = 0;
  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  // ---------------------------------------------------------------- reference
  tlb_entry_t pt [32];
  word_t ref_mem [addr_t];

  function automatic addr_t xlate(addr_t va, output logic [3:0] ways, output bit hit);
    hit = 0; ways = 4'hF;
    for (int i = 31; i >= 0; i--)
      if (pt[i].valid && pt[i].vpn == va[31:12]) begin hit = 1; ways = pt[i].ways; xlate = {pt[i].ppn, va[11:0]}; end
    if (!hit) xlate = va;
  endfunction
  function automatic word_t ref_rd(addr_t pa);
    addr_t wa = {pa[31:2], 2'b00};
    return ref_mem.exists(wa) ? ref_mem[wa] : init_word(wa);
  endfunction

  // ---------------------------------------------------------------- counters
  int n_l1_hit = 0, n_l1_miss = 0, n_l1_wb = 0, n_mini_hit = 0, n_mini_miss = 0, n_mini_wb = 0;
  int n_byp_st = 0, n_byp_ld = 0, n_tlb_hit = 0, n_tlb_miss = 0, n_l2_miss = 0, n_l2_wb = 0;
  int n_part_evict = 0, n_pipe = 0, n_probes = 0, n_l1_acc = 0;

  always @(posedge clk) if (rst_n) begin
    if (dut.up_req[0].valid && dut.up_ready[0] && dut.up_req[0].write) n_l1_wb++;
    if (dut.up_req[1].valid && dut.up_ready[1] && dut.up_req[1].write) n_mini_wb++;
    if (mem_req.valid && mem_req_ready) begin
      if (mem_req.write) n_l2_wb++; else n_l2_miss++;
    end
    for (int w = 0; w < 4; w++) n_probes += int'(l1_way_en[w]);
  end

  task automatic tlb_write(int idx, addr_t va, addr_t pa, logic [3:0] ways);
    @(negedge clk);
    tlb_wr_en = 1; tlb_wr_idx = 5'(idx);
    tlb_wr_entry = '{valid: 1'b1, vpn: va[31:12], ppn: pa[31:12], ways: ways};
    pt[idx] = tlb_wr_entry;
    @(negedge clk);
    tlb_wr_en = 0;
  endtask

  // One access, checked; returns cycles from acceptance to response.
  task automatic access(bit wr, acc_class_e cls, addr_t va, logic [3:0] be, word_t d, output int lat);
    logic [3:0] ways; bit hit; addr_t pa;
    pa = xlate(va, ways, hit);
    @(negedge clk);
    cpu_req_valid = 1; cpu_req_write = wr; cpu_req_class = cls; cpu_req_vaddr = va;
    cpu_req_be = be; cpu_req_wdata = d;
    #1; while (!cpu_req_ready) begin @(negedge clk); #1; end
    check(tlb_miss == !hit, "TLB hit flag");
    if (hit) n_tlb_hit++; else n_tlb_miss++;
    if (cls == CLS_BYPASS) begin
      check(byp_access && l1_way_en == 0 && !mini_access, "bypass touches no cache array");
      if (wr) n_byp_st++; else n_byp_ld++;
    end else if (cls == CLS_MINI) begin
      check(mini_access && l1_way_en == 0, "mini access reads no L1 way");
    end else begin
      n_l1_acc++;
      check(l1_way_en == ((ways == 0) ? 4'hF : ways), $sformatf("L1 way enables %b for vector %b", l1_way_en, ways));
    end
    @(negedge clk);
    cpu_req_valid = 0;
    lat = 1;
    while (!cpu_resp_valid) begin @(negedge clk); lat++; end
    if (wr) begin
      word_t o = ref_rd(pa);
      for (int b = 0; b < 4; b++) if (be[b]) o[b*8 +: 8] = d[b*8 +: 8];
      ref_mem[{pa[31:2], 2'b00}] = o;
    end else begin
      check(cpu_resp_rdata == ref_rd(pa), $sformatf("load va %h pa %h got %h exp %h", va, pa, cpu_resp_rdata, ref_rd(pa)));
    end
    if (cls == CLS_NORMAL) begin if (lat == 1) n_l1_hit++; else n_l1_miss++; end
    if (cls == CLS_MINI)   begin if (lat == 1) n_mini_hit++; else n_mini_miss++; end
  endtask

  // Address map (virtual): 0x0000_0000 block buffer (mini-cache), 0x0000_1000 state,
  // 0x0000_2000 tables, 0x0000_3000..0x0000_6FFF reference frames,
  // 0x0001_0000..0x0001_3FFF output frame (bypass), 0x0100_0000.. unmapped.
  localparam addr_t V_BLOCK = 32'h0000_0000, V_STATE = 32'h0000_1000, V_TAB = 32'h0000_2000,
                    V_REF = 32'h0000_3000, V_OUT = 32'h0001_0000, V_UNMAP = 32'h0100_0000;

  int lat, m0;
  initial begin
    for (int i = 0; i < 32; i++) pt[i] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // three-group partition (B): block+state one way, tables+stack one way, others two ways
    tlb_write(0, V_BLOCK, 32'h0040_0000, 4'b0001);
    tlb_write(1, V_STATE, 32'h0040_5000, 4'b0001);
    tlb_write(2, V_TAB,   32'h0040_A000, 4'b0010);
    for (int p = 0; p < 4; p++) tlb_write(3 + p, V_REF + p * 32'h1000, 32'h0080_0000 + p * 32'h3000, 4'b1100);
    for (int p = 0; p < 4; p++) tlb_write(7 + p, V_OUT + p * 32'h1000, 32'h00C0_0000 + p * 32'h1000, 4'b1111);

    // L1 miss then hit
    access(0, CLS_NORMAL, V_TAB + 32'h40, 4'hF, 0, lat);
    access(0, CLS_NORMAL, V_TAB + 32'h44, 4'hF, 0, lat);
    check(lat == 1, $sformatf("L1 hit latency %0d", lat));
    // one-way partition: two table lines of one set evict each other
    access(1, CLS_NORMAL, V_TAB + 32'h48, 4'hF, 32'hCAFE_F00D, lat);
    m0 = n_l1_miss;
    tlb_write(11, 32'h0000_7000, 32'h0040_B000, 4'b0010);   // a second table page, same L1 set
    access(0, CLS_NORMAL, 32'h0000_7040, 4'hF, 0, lat);
    access(0, CLS_NORMAL, V_TAB + 32'h48, 4'hF, 0, lat);
    if (n_l1_miss == m0 + 2) n_part_evict++;
    check(n_l1_miss == m0 + 2, "one-way partition evicts");
    // back-to-back load hits through the top
    begin
      int got = 0, cyc = 0;
      @(negedge clk);
      #1; while (!cpu_req_ready) begin @(negedge clk); #1; end
      for (int i = 0; i < 6; i++) begin
        cpu_req_valid = 1; cpu_req_write = 0; cpu_req_class = CLS_NORMAL; cpu_req_vaddr = V_TAB + 32'h40 + i * 4;
        @(negedge clk); cyc++;
        if (cpu_resp_valid) begin got++; check(cpu_resp_rdata == ref_rd(32'h0040_A040 + (got - 1) * 4), "pipelined load data"); end
      end
      cpu_req_valid = 0;
      check(got == 6 && cyc == 6, $sformatf("6 back-to-back hits: %0d answers in %0d cycles", got, cyc));
      if (got == 6 && cyc == 6) n_pipe++;
    end
    // mini-cache: fill the 1.5 KB block buffer region (mini-cache is 512 B) and reuse
    for (int i = 0; i < 128; i++) access(1, CLS_MINI, V_BLOCK + i * 4, 4'hF, $urandom, lat);
    for (int i = 0; i < 128; i++) access(0, CLS_MINI, V_BLOCK + i * 4, 4'hF, 0, lat);
    for (int i = 0; i < 16; i++) access(0, CLS_MINI, V_BLOCK + 32'h200 + i * 32, 4'hF, 0, lat);
    // bypassed output
    for (int i = 0; i < 32; i++) access(1, CLS_BYPASS, V_OUT + i * 4, 4'($urandom) | 4'b0001, $urandom, lat);
    for (int i = 0; i < 32; i++) access(0, CLS_BYPASS, V_OUT + i * 4, 4'hF, 0, lat);
    // unmapped pages: ten dirty lines on one L1 set and one L2 set
    for (int i = 0; i < 10; i++) access(1, CLS_NORMAL, V_UNMAP + i * 32'h2_0000, 4'hF, $urandom, lat);
    for (int i = 0; i < 10; i++) access(0, CLS_NORMAL, V_UNMAP + i * 32'h2_0000, 4'hF, 0, lat);

    // decoder-like mix, shares roughly as in the data-type table
    for (int k = 0; k < 20000; k++) begin
      automatic int r = $urandom % 100;
      automatic bit wr = ($urandom % 3) == 0;
      if (r < 40)      access(wr, CLS_MINI,   V_BLOCK + ($urandom % 1536 & ~32'h3), 4'hF, $urandom, lat);
      else if (r < 50) access(wr, CLS_NORMAL, V_STATE + ($urandom % 1536 & ~32'h3), 4'hF, $urandom, lat);
      else if (r < 60) access(0,  CLS_NORMAL, V_TAB   + ($urandom % 4096 & ~32'h3), 4'hF, 0, lat);
      else if (r < 90) access(wr, CLS_NORMAL, V_REF   + ($urandom % 16384 & ~32'h3), 4'hF, $urandom, lat);
      else if (r < 93) access(1,  CLS_BYPASS, V_OUT   + ($urandom % 16384 & ~32'h3), 4'($urandom), $urandom, lat);
      else             access(wr, CLS_NORMAL, V_UNMAP + ($urandom % 65536 & ~32'h3), 4'($urandom), $urandom, lat);
    end

    $display("L1 accesses %0d hits %0d misses %0d write-backs %0d, way probes %0d (%0d per access)",
             n_l1_acc, n_l1_hit, n_l1_miss, n_l1_wb, n_probes, n_probes / (n_l1_acc > 0 ? n_l1_acc : 1));
    $display("mini hits %0d misses %0d write-backs %0d; bypass stores %0d loads %0d",
             n_mini_hit, n_mini_miss, n_mini_wb, n_byp_st, n_byp_ld);
    $display("TLB hits %0d misses %0d; L2 misses %0d write-backs %0d; partition evictions %0d; pipelined runs %0d",
             n_tlb_hit, n_tlb_miss, n_l2_miss, n_l2_wb, n_part_evict, n_pipe);
    check(n_l1_hit > 0, "L1 hit occurred");
    check(n_l1_miss > 0, "L1 miss occurred");
    check(n_l1_wb > 0, "L1 write-back occurred");
    check(n_part_evict > 0, "partition eviction occurred");
    check(n_pipe > 0, "back-to-back hits occurred");
    check(n_mini_hit > 0, "mini-cache hit occurred");
    check(n_mini_miss > 0, "mini-cache miss occurred");
    check(n_mini_wb > 0, "mini-cache write-back occurred");
    check(n_byp_st > 0, "bypassed store occurred");
    check(n_byp_ld > 0, "bypassed load occurred");
    check(n_tlb_hit > 0, "TLB translation occurred");
    check(n_tlb_miss > 0, "TLB miss occurred");
    check(n_l2_miss > 0, "L2 miss occurred");
    check(n_l2_wb > 0, "L2 write-back occurred");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
