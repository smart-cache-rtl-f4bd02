// tb_l2_cache - self-checking test of the L2 at its full 512 KB size.
//
// A reference line memory predicts every read.  Checks: a read hit responds
// two cycles after acceptance; byte-strobed writes change only their bytes;
// five lines that share a set (128 KB apart) overflow the four ways and the
// dirty victim is written back to main memory; random reads and writes, half
// spread over 1 MB and half over eight lines in each of 64 sets (so sets
// overflow and dirty lines are evicted), keep the data right.
module tb_l2_cache;
  import smart_cache_pkg::*;
  import tb_util_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  mem_req_t up_req = '0; logic up_ready; mem_resp_t up_resp;
  mem_req_t mem_req; logic mem_ready; mem_resp_t mem_resp;

  l2_cache dut (.clk, .rst_n, .up_req, .up_ready, .up_resp, .mem_req, .mem_req_ready(mem_ready), .mem_resp);
  mem_model #(.LATENCY(5), .RANDOM_READY(1)) mem (.clk, .rst_n, .req(mem_req), .ready(mem_ready), .resp(mem_resp));

  int checks = 0, failures = 0;
  line_t ref_l [addr_t];
  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic xfer(bit wr, addr_t a, line_be_t be, line_t d, output int lat);
    line_t exp = ref_l.exists(a) ? ref_l[a] : init_line(a);
    @(negedge clk);
    up_req.valid = 1; up_req.write = wr; up_req.addr = a; up_req.be = be; up_req.wdata = d;
    #1; while (!up_ready) begin @(negedge clk); #1; end
    @(negedge clk);
    up_req.valid = 0;
    lat = 1;
    while (!up_resp.valid) begin @(negedge clk); lat++; end
    if (wr) ref_l[a] = merge_line(exp, d, be);
    else check(up_resp.rdata == exp, $sformatf("read %h", a));
  endtask

  function automatic line_t rnd_line();
    line_t l;
    for (int i = 0; i < 8; i++) l[i*32 +: 32] = $urandom;
    return l;
  endfunction

  int lat, w0, r0;
  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    xfer(0, 32'h0010_0040, '0, '0, lat);
    check(lat > 2, "cold read misses");
    xfer(0, 32'h0010_0040, '0, '0, lat);
    check(lat == 2, $sformatf("read hit latency %0d", lat));
    xfer(1, 32'h0010_0040, 32'h0000_00F0, rnd_line(), lat);
    xfer(0, 32'h0010_0040, '0, '0, lat);
    // five lines in one set
    r0 = mem.n_reads; w0 = mem.n_writes;
    for (int i = 1; i <= 4; i++) xfer(1, 32'h0010_0040 + i * 32'h2_0000, '1, rnd_line(), lat);
    check(mem.n_reads == r0 + 4, "four more lines fetched");
    check(mem.n_writes == w0 + 1, "fifth line in the set evicts a dirty line");
    for (int i = 0; i <= 4; i++) xfer(0, 32'h0010_0040 + i * 32'h2_0000, '0, '0, lat);
    for (int k = 0; k < 4000; k++) begin
      automatic addr_t a = (k % 2) ? {12'h001, 15'($urandom), 5'h0}
                                   : 32'h0010_0000 + (($urandom % 8) << 17) + (($urandom % 64) << 5);
      if ($urandom % 2) xfer(1, a, {$urandom, $urandom}, rnd_line(), lat);
      else xfer(0, a, '0, '0, lat);
    end
    $display("mem reads=%0d writes=%0d", mem.n_reads, mem.n_writes);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
