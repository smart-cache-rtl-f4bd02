// tb_bypass_path - self-checking test of the bypass path.
//
// Bypassed stores must reach memory with only their own bytes changed, and
// bypassed loads must return the addressed word; every access must be one
// line-bus transaction.
module tb_bypass_path;
  import smart_cache_pkg::*;
  import tb_util_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic req_valid = 0, req_ready, req_write = 0;
  addr_t req_addr = '0;
  logic [3:0] req_be = '0;
  word_t req_wdata = '0, resp_rdata;
  logic resp_valid, access;
  mem_req_t mem_req; logic mem_ready; mem_resp_t mem_resp;

  bypass_path dut (.clk, .rst_n, .req_valid, .req_ready, .req_write, .req_addr, .req_be,
                   .req_wdata, .resp_valid, .resp_rdata, .access,
                   .mem_req, .mem_req_ready(mem_ready), .mem_resp);
  mem_model #(.LATENCY(3), .RANDOM_READY(1)) mem (.clk, .rst_n, .req(mem_req), .ready(mem_ready), .resp(mem_resp));

  int checks = 0, failures = 0;
  word_t ref_mem [addr_t];
  function automatic word_t ref_rd(addr_t a);
    addr_t wa = {a[31:2], 2'b00};
    return ref_mem.exists(wa) ? ref_mem[wa] : init_word(wa);
  endfunction
  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    int n;
    repeat (3) @(negedge clk);
    rst_n = 1;
    n = 0;
    for (int i = 0; i < 2000; i++) begin
      automatic addr_t a = {24'h40, 8'($urandom)} & ~32'h3;
      automatic bit wr = $urandom % 2;
      automatic logic [3:0] be = 4'($urandom);
      automatic word_t d = $urandom;
      @(negedge clk);
      req_valid = 1; req_write = wr; req_addr = a; req_be = be; req_wdata = d;
      while (!req_ready) @(negedge clk);
      @(negedge clk);
      req_valid = 0;
      while (!resp_valid) @(negedge clk);
      n++;
      if (wr) begin
        automatic word_t o = ref_rd(a);
        for (int b = 0; b < 4; b++) if (be[b]) o[b*8 +: 8] = d[b*8 +: 8];
        ref_mem[{a[31:2], 2'b00}] = o;
      end else check(resp_rdata == ref_rd(a), $sformatf("load %h got %h exp %h", a, resp_rdata, ref_rd(a)));
    end
    check(mem.n_reads + mem.n_writes == n, "one memory transaction per access");
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
