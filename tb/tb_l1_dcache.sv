// tb_l1_dcache - self-checking test of the way-partitioned L1.
//
// A reference memory of words, started from tb_util_pkg::init_word, predicts
// every load.  Directed parts check: hit latency of one cycle; back-to-back
// load hits at one per cycle; that only the ways of the bit vector are read;
// that a one-way partition evicts between two lines of the same set while a
// four-way one keeps both; dirty write-back; an all-zero vector acting as all
// ways.  A random part mixes loads and stores over 16 KB with a fixed bit
// vector per page and checks every load.
module tb_l1_dcache;
  import smart_cache_pkg::*;
  import tb_util_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic req_valid = 0, req_ready, req_write = 0;
  addr_t req_addr = '0;
  logic [3:0] req_be = '0, req_ways = '0, way_en;
  word_t req_wdata = '0, resp_rdata;
  logic resp_valid, miss;
  mem_req_t mem_req; logic mem_ready; mem_resp_t mem_resp;

  l1_dcache dut (.clk, .rst_n, .req_valid, .req_ready, .req_write, .req_addr, .req_be,
                 .req_wdata, .req_ways, .resp_valid, .resp_rdata, .way_en, .miss,
                 .mem_req, .mem_req_ready(mem_ready), .mem_resp);
  mem_model #(.LATENCY(3), .RANDOM_READY(1)) mem (.clk, .rst_n, .req(mem_req), .ready(mem_ready), .resp(mem_resp));

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

  // One access; returns the cycles from acceptance to response.
  task automatic access(bit wr, addr_t a, logic [3:0] be, word_t d, logic [3:0] ways, output int lat);
    word_t exp;
    @(negedge clk);
    req_valid = 1; req_write = wr; req_addr = a; req_be = be; req_wdata = d; req_ways = ways;
    while (!req_ready) @(negedge clk);
    @(posedge clk);
    check(way_en == ((ways == 0) ? 4'hF : ways), $sformatf("way_en %b for vector %b", way_en, ways));
    @(negedge clk);
    req_valid = 0;
    lat = 1;
    while (!resp_valid) begin @(negedge clk); lat++; end
    exp = ref_rd(a);
    if (!wr) check(resp_rdata == exp, $sformatf("load %h got %h exp %h", a, resp_rdata, exp));
    else ref_wr(a, be, d);
  endtask

  int lat, m0, w0, cyc;
  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    // miss then hit: hit latency 1
    access(0, 32'h0000_1040, 4'hF, 0, 4'b0010, lat);
    check(lat > 1, "first access misses");
    access(0, 32'h0000_1044, 4'hF, 0, 4'b0010, lat);
    check(lat == 1, $sformatf("load hit latency %0d", lat));
    // store hit then load
    access(1, 32'h0000_1048, 4'b0101, 32'hDEAD_BEEF, 4'b0010, lat);
    check(lat == 1, "store hit responds after one cycle");
    access(0, 32'h0000_1048, 4'hF, 0, 4'b0010, lat);
    // one-way partition: same set 2 KB apart evict each other
    m0 = misses; w0 = mem.n_writes;
    access(0, 32'h0000_1840, 4'hF, 0, 4'b0010, lat);   // evicts dirty 0x1040 line
    check(mem.n_writes == w0 + 1, "dirty victim written back");
    access(0, 32'h0000_1040, 4'hF, 0, 4'b0010, lat);
    check(misses == m0 + 2, "one-way partition: both accesses miss");
    // four-way: both lines stay
    access(0, 32'h0000_3040, 4'hF, 0, 4'b1111, lat);
    access(0, 32'h0000_3840, 4'hF, 0, 4'b1111, lat);
    m0 = misses;
    access(0, 32'h0000_3040, 4'hF, 0, 4'b1111, lat);
    access(0, 32'h0000_3840, 4'hF, 0, 4'b1111, lat);
    check(misses == m0, "four ways keep both lines");
    // all-zero vector acts as all ways
    access(0, 32'h0000_3040, 4'hF, 0, 4'b0000, lat);
    check(lat == 1, "zero vector hits in any way");
    // back-to-back load hits: 8 loads answered in 8 cycles
    begin
      int got = 0;
      @(negedge clk);
      while (!req_ready) @(negedge clk);
      cyc = 0;
      for (int i = 0; i < 8; i++) begin
        req_valid = 1; req_write = 0; req_addr = 32'h0000_3040 + i * 4; req_ways = 4'b1111;
        @(negedge clk); cyc++;
        if (resp_valid) begin got++; check(resp_rdata == ref_rd(32'h0000_3040 + (got - 1) * 4), "pipelined load data"); end
        check(req_ready, "ready held during load hits");
      end
      req_valid = 0;
      while (got < 8) begin @(negedge clk); cyc++; if (resp_valid) begin got++; check(resp_rdata == ref_rd(32'h0000_3040 + (got - 1) * 4), "pipelined load data"); end end
      check(cyc == 8, $sformatf("8 back-to-back hits took %0d cycles", cyc));
    end
    // random traffic, fixed vector per page
    for (int i = 0; i < 3000; i++) begin
      addr_t a;
      logic [3:0] v [4] = '{4'b0001, 4'b0110, 4'b1000, 4'b1111};
      a = {18'h0, 14'($urandom)} & ~32'h3;
      if ($urandom % 2) access(1, a, 4'($urandom), $urandom, v[a[13:12]], lat);
      else access(0, a, 4'hF, 0, v[a[13:12]], lat);
    end
    $display("misses=%0d mem reads=%0d writes=%0d", misses, mem.n_reads, mem.n_writes);
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
