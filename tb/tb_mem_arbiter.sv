// tb_mem_arbiter - self-checking test of the line-bus arbiter.
//
// Three requesters issue random reads and writes, each in its own address
// region, over one arbiter into a memory model.  Checks: every read returns
// the data the requester's own reference predicts (so responses reach the
// right port) and no port sees a response it did not ask for; when several
// requesters wait at a free arbiter, the lowest
// index is granted; each requester gets exactly one response per request.
module tb_mem_arbiter;
  import smart_cache_pkg::*;
  import tb_util_pkg::*;

  localparam int N = 3;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  mem_req_t  up_req [N];
  logic      up_ready [N];
  mem_resp_t up_resp [N];
  mem_req_t  dn_req; logic dn_ready; mem_resp_t dn_resp;

  mem_arbiter dut (.clk, .rst_n, .up_req, .up_ready, .up_resp, .dn_req, .dn_ready, .dn_resp);
  mem_model #(.LATENCY(2), .RANDOM_READY(1)) mem (.clk, .rst_n, .req(dn_req), .ready(dn_ready), .resp(dn_resp));

  int checks = 0, failures = 0, contended = 0;
  int done [N];
  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  // priority monitor
  always @(negedge clk) if (rst_n) begin
    int first, nval;
    #2;
    first = -1; nval = 0;
    for (int i = N - 1; i >= 0; i--) if (up_req[i].valid) begin first = i; nval++; end
    for (int i = 0; i < N; i++)
      if (up_ready[i]) begin
        if (nval > 1) contended++;
        check(i == first, $sformatf("grant to %0d while %0d waits", i, first));
      end
  end

  // each port may only see a response to a request it has had accepted
  bit outstanding [N];
  always @(posedge clk) if (rst_n)
    for (int i = 0; i < N; i++) begin
      if (up_resp[i].valid) begin
        check(outstanding[i], $sformatf("response on port %0d with nothing outstanding", i));
        outstanding[i] <= 1'b0;
      end
      if (up_req[i].valid && up_ready[i]) outstanding[i] <= 1'b1;
    end

  for (genvar g = 0; g < N; g++) begin : g_req
    line_t ref_l [addr_t];
    initial begin
      up_req[g] = '0;
      done[g] = 0;
      wait (rst_n);
      for (int k = 0; k < 300; k++) begin
        automatic addr_t a = {8'(g + 1), 19'($urandom % 16), 5'h0};
        automatic line_t exp = ref_l.exists(a) ? ref_l[a] : init_line(a);
        @(negedge clk);
        up_req[g].valid = 1;
        up_req[g].write = $urandom % 2;
        up_req[g].addr  = a;
        up_req[g].be    = {$urandom, $urandom} ;
        for (int i = 0; i < 8; i++) up_req[g].wdata[i*32 +: 32] = $urandom;
        #1; while (!up_ready[g]) begin @(negedge clk); #1; end
        @(negedge clk);
        up_req[g].valid = 0;
        if (up_req[g].write) ref_l[a] = merge_line(exp, up_req[g].wdata, up_req[g].be);
        while (!up_resp[g].valid) @(negedge clk);
        if (!up_req[g].write) check(up_resp[g].rdata == exp, $sformatf("port %0d read %h", g, a));
        done[g]++;
        repeat ($urandom % 3) @(negedge clk);
      end
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    wait (done[0] == 300 && done[1] == 300 && done[2] == 300);
    check(mem.n_reads + mem.n_writes == 900, "one transaction per request");
    check(contended > 0, "arbitration between waiting requesters happened");
    $display("contended grants=%0d", contended);
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
