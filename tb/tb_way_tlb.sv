// tb_way_tlb - self-checking test of the TLB with way bit vectors.
//
// Fills entries with random pages, frames and bit vectors, then looks up hit
// and miss addresses and compares translation, vector and hit flag with a
// reference table.  Also checks that a rewritten entry replaces the old one
// and that reset empties the table.
module tb_way_tlb;
  import smart_cache_pkg::*;

  localparam int E = 32;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic wr_en = 0;
  logic [4:0] wr_idx = '0;
  tlb_entry_t wr_entry = '0;
  addr_t lk_vaddr = '0, lk_paddr;
  logic [3:0] lk_ways;
  logic lk_hit;

  way_tlb dut (.clk, .rst_n, .wr_en, .wr_idx, .wr_entry, .lk_vaddr, .lk_paddr, .lk_ways, .lk_hit);

  int checks = 0, failures = 0;
  tlb_entry_t model [E];
  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic lookup(addr_t va);
    bit h = 0; addr_t pa = va; logic [3:0] w = 4'hF;
    for (int i = E - 1; i >= 0; i--)
      if (model[i].valid && model[i].vpn == va[31:12]) begin h = 1; pa = {model[i].ppn, va[11:0]}; w = model[i].ways; end
    lk_vaddr = va;
    #1;
    check(lk_hit == h && lk_paddr == pa && lk_ways == w,
          $sformatf("va %h: hit %b pa %h ways %b, exp %b %h %b", va, lk_hit, lk_paddr, lk_ways, h, pa, w));
  endtask

  initial begin
    for (int i = 0; i < E; i++) model[i] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    lookup(32'h1234_5678);
    for (int r = 0; r < 200; r++) begin
      @(negedge clk);
      wr_en = 1; wr_idx = 5'($urandom);
      wr_entry.valid = ($urandom % 8) != 0;
      wr_entry.vpn   = 20'($urandom % 64);
      wr_entry.ppn   = 20'($urandom);
      wr_entry.ways  = 4'($urandom);
      model[wr_idx]  = wr_entry;
      @(negedge clk);
      wr_en = 0;
      for (int k = 0; k < 8; k++) lookup({20'($urandom % 72), 12'($urandom)});
    end
    rst_n = 0;
    @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < E; i++) model[i] = '0;
    for (int k = 0; k < 16; k++) lookup({20'($urandom % 64), 12'($urandom)});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
