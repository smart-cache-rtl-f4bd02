// tb_mini_cache - self-checking test of the direct-mapped mini-cache.
//
// A reference word memory predicts every load.  Checks: one-cycle hit
// latency; lines 512 bytes apart share an entry and evict each other; a dirty
// line is written back; the whole 512-byte buffer, once loaded, is served with
// no further miss; random loads and stores over 2 KB.
module tb_mini_cache;
  import smart_cache_pkg::*;
  import tb_util_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic req_valid = 0, req_ready, req_write = 0;
  addr_t req_addr = '0;
  logic [3:0] req_be = '0;
  word_t req_wdata = '0, resp_rdata;
  logic resp_valid, access, miss;
  mem_req_t mem_req; logic mem_ready; mem_resp_t mem_resp;

  mini_cache dut (.clk, .rst_n, .req_valid, .req_ready, .req_write, .req_addr, .req_be,
                  .req_wdata, .resp_valid, .resp_rdata, .access, .miss,
                  .mem_req, .mem_req_ready(mem_ready), .mem_resp);
  mem_model #(.LATENCY(2), .RANDOM_READY(1)) mem (.clk, .rst_n, .req(mem_req), .ready(mem_ready), .resp(mem_resp));

  int checks = 0, failures = 0, misses = 0;
  word_t ref_mem [addr_t];

  function automatic word_t ref_rd(addr_t a);
    addr_t wa = {a[31:2], 2'b00};
    return ref_mem.exists(wa) ? ref_mem[wa] : init_word(wa);
  endfunction
  function automatic void ref_wr(addr_t a, logic [3:0] be, word_t d);
    addr_t wa = {a[31:2], 2'b00};
    word_t o = ref_rd(wa);
    for (int b = 0; b < 4; b++) if (be[b]) o[b*8 +: 8] = d[b*8 +: 8];
    ref_mem[wa] = o;
  endfunction
  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  always @(posedge clk) if (miss) misses++;

  task automatic acc(bit wr, addr_t a, logic [3:0] be, word_t d, output int lat);
    @(negedge clk);
    req_valid = 1; req_write = wr; req_addr = a; req_be = be; req_wdata = d;
    while (!req_ready) @(negedge clk);
    @(negedge clk);
    req_valid = 0;
    lat = 1;
    while (!resp_valid) begin @(negedge clk); lat++; end
    if (!wr) check(resp_rdata == ref_rd(a), $sformatf("load %h got %h exp %h", a, resp_rdata, ref_rd(a)));
    else ref_wr(a, be, d);
  endtask

  int lat, m0, w0;
  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    acc(0, 32'h0000_8004, 4'hF, 0, lat);
    check(lat > 1, "cold miss");
    acc(0, 32'h0000_8008, 4'hF, 0, lat);
    check(lat == 1, $sformatf("hit latency %0d", lat));
    acc(1, 32'h0000_8008, 4'b1100, 32'h1234_5678, lat);
    w0 = mem.n_writes; m0 = misses;
    acc(0, 32'h0000_8204, 4'hF, 0, lat);         // same entry, 512 B away
    check(mem.n_writes == w0 + 1, "dirty line written back");
    acc(0, 32'h0000_8008, 4'hF, 0, lat);
    check(misses == m0 + 2, "direct mapped: lines 512 B apart evict each other");
    // whole buffer fits
    for (int i = 0; i < 128; i++) acc(i % 3 == 0, 32'h0001_0000 + i * 4, 4'hF, $urandom, lat);
    m0 = misses;
    for (int i = 0; i < 128; i++) acc(0, 32'h0001_0000 + i * 4, 4'hF, 0, lat);
    check(misses == m0, "a 512-byte buffer stays resident");
    for (int i = 0; i < 3000; i++) begin
      automatic addr_t a = {21'h0, 11'($urandom)} & ~32'h3;
      if ($urandom % 2) acc(1, a, 4'($urandom), $urandom, lat);
      else acc(0, a, 4'hF, 0, lat);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
