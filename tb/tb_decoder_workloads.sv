// tb_decoder_workloads - one decoder-like access trace run through seven
// cache configurations side by side.
//
// The trace imitates the data traffic of a software video decoder, one 16x16
// macroblock at a time, on a scaled-down 128x64 picture (luma only):
//   block buffer  1.5 KB  every word written, then read back (dequantise/IDCT)
//   reference     2 frames of 8 KB, 16 rows x 16 bytes read from each
//   output        16 rows x 16 bytes written to the output frame
//   tables        5 KB of lookup tables, random reads
//   state         1.5 KB, random reads and writes
//   stack         512 B, random reads and writes
// Every configuration sees the same sequence (a private xorshift generator per
// instance, same seed) and checks every load against its own reference memory.
//
// Configurations (access class and L1 way bit vector per data type):
//   0 base       everything normal, all ways
//   1 bypass     output bypassed, all ways
//   2-4 mini     output bypassed, block buffer in a 512 B / 1 KB / 2 KB mini-cache
//   5 part. A    output bypassed, block buffer way 0, everything else ways 1-3
//   6 part. B    output bypassed, block+state way 0, tables+stack way 1, rest ways 2-3
// Checks besides the data: the base reads all four L1 ways per access; the
// bypass removes exactly the output accesses from the L1; the 2 KB mini-cache
// misses no more than the 512 B one; partition B reads fewer ways per access
// than A, and A fewer than the base.  The counts are printed as a table.
module tb_decoder_workloads;
  import smart_cache_pkg::*;
  import tb_util_pkg::*;

  localparam int NCFG = 7;
  localparam int MBS  = 32;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int probes [NCFG], l1acc [NCFG], l1miss [NCFG], miniacc [NCFG], minimiss [NCFG];
  int bypass [NCFG], outputs [NCFG], done [NCFG];

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  localparam addr_t A_BLOCK = 32'h0001_0000, A_STATE = 32'h0002_0000, A_TAB = 32'h0003_0000,
                    A_STACK = 32'h0004_0000, A_REF0 = 32'h0010_0000, A_REF1 = 32'h0010_2000,
                    A_OUT = 32'h0020_0000;

  for (genvar g = 0; g < NCFG; g++) begin : g_cfg
    localparam int unsigned MSIZE = (g == 3) ? 1024 : (g == 4) ? 2048 : 512;

    logic cpu_req_valid = 0, cpu_req_ready, cpu_req_write = 0;
    acc_class_e cpu_req_class = CLS_NORMAL;
    addr_t cpu_req_vaddr = '0;
    logic [3:0] cpu_req_be = 4'hF;
    word_t cpu_req_wdata = '0, cpu_resp_rdata;
    logic cpu_resp_valid;
    logic tlb_wr_en = 0;
    logic [4:0] tlb_wr_idx = '0;
    tlb_entry_t tlb_wr_entry = '0;
    mem_req_t mem_req; logic mem_req_ready; mem_resp_t mem_resp;
    logic [3:0] l1_way_en;
    logic l1_miss, mini_access, mini_miss, byp_access, tlb_miss;

    smart_cache_top #(.MINI_SIZE(MSIZE)) dut (.*);
    mem_model #(.LATENCY(6)) mem (.clk, .rst_n, .req(mem_req), .ready(mem_req_ready), .resp(mem_resp));

    word_t ref_mem [addr_t];
    logic [31:0] rng = 32'h1234_5678;
    int n_probe = 0, n_l1 = 0, n_l1m = 0, n_mini = 0, n_minim = 0, n_byp = 0, n_out = 0;

    always @(posedge clk) if (rst_n) begin
      for (int w = 0; w < 4; w++) n_probe += int'(l1_way_en[w]);
      if (l1_miss) n_l1m++;
      if (mini_access) n_mini++;
      if (mini_miss) n_minim++;
      if (byp_access) n_byp++;
    end

    function automatic logic [31:0] rnd();
      rng ^= rng << 13; rng ^= rng >> 17; rng ^= rng << 5;
      return rng;
    endfunction

    // class and bit vector of each data type in this configuration
    typedef enum int {T_BLOCK, T_STATE, T_TAB, T_STACK, T_REF, T_OUT} dtype_e;
    function automatic acc_class_e cls_of(dtype_e t);
      if (t == T_OUT && g != 0) return CLS_BYPASS;
      if (t == T_BLOCK && g >= 2 && g <= 4) return CLS_MINI;
      return CLS_NORMAL;
    endfunction
    function automatic logic [3:0] vec_of(dtype_e t);
      if (g == 5) return (t == T_BLOCK) ? 4'b0001 : 4'b1110;
      if (g == 6) return (t == T_BLOCK || t == T_STATE) ? 4'b0001 :
                         (t == T_TAB || t == T_STACK)   ? 4'b0010 : 4'b1100;
      return 4'b1111;
    endfunction

    task automatic map(int idx, addr_t va, dtype_e t);
      @(negedge clk);
      tlb_wr_en = 1; tlb_wr_idx = 5'(idx);
      tlb_wr_entry = '{valid: 1'b1, vpn: va[31:12], ppn: va[31:12], ways: vec_of(t)};
      @(negedge clk);
      tlb_wr_en = 0;
    endtask

    task automatic acc(dtype_e t, bit wr, addr_t a);
      word_t d = rnd();
      @(negedge clk);
      cpu_req_valid = 1; cpu_req_write = wr; cpu_req_class = cls_of(t); cpu_req_vaddr = a;
      cpu_req_wdata = d;
      #1; while (!cpu_req_ready) begin @(negedge clk); #1; end
      if (cls_of(t) == CLS_NORMAL) n_l1++;
      if (t == T_OUT) n_out++;
      @(negedge clk);
      cpu_req_valid = 0;
      while (!cpu_resp_valid) @(negedge clk);
      if (wr) ref_mem[a] = d;
      else check(cpu_resp_rdata == (ref_mem.exists(a) ? ref_mem[a] : init_word(a)),
                 $sformatf("cfg %0d load %h", g, a));
    endtask

    initial begin
      done[g] = 0;
      wait (rst_n);
      map(0, A_BLOCK, T_BLOCK);
      map(1, A_STATE, T_STATE);
      map(2, A_TAB, T_TAB);
      map(3, A_TAB + 32'h1000, T_TAB);
      map(4, A_STACK, T_STACK);
      for (int p = 0; p < 2; p++) map(5 + p, A_REF0 + p * 32'h1000, T_REF);
      for (int p = 0; p < 2; p++) map(7 + p, A_REF1 + p * 32'h1000, T_REF);
      for (int p = 0; p < 2; p++) map(9 + p, A_OUT + p * 32'h1000, T_OUT);
      for (int mb = 0; mb < MBS; mb++) begin
        int mx = mb % 8, my = (mb / 8) % 4;
        for (int k = 0; k < 96; k++) acc(T_TAB, 0, A_TAB + (rnd() % 5120 & ~32'h3));
        for (int k = 0; k < 96; k++) acc(T_STATE, rnd() % 2, A_STATE + (rnd() % 1536 & ~32'h3));
        for (int k = 0; k < 128; k++) acc(T_STACK, rnd() % 2, A_STACK + (rnd() % 512 & ~32'h3));
        for (int i = 0; i < 384; i++) acc(T_BLOCK, 1, A_BLOCK + i * 4);
        for (int i = 0; i < 384; i++) acc(T_BLOCK, 0, A_BLOCK + i * 4);
        for (int r = 0; r < 2; r++) begin
          int dx = int'(rnd() % 3) - 1, dy = int'(rnd() % 9) - 4;
          for (int row = 0; row < 16; row++)
            for (int w = 0; w < 4; w++) begin
              int x = mx * 16 + dx * 4 + w * 4, y = my * 16 + dy + row;
              if (x < 0) x = 0; if (x > 124) x = 124;
              if (y < 0) y = 0; if (y > 63) y = 63;
              acc(T_REF, 0, (r == 0 ? A_REF0 : A_REF1) + addr_t'(y * 128 + x));
            end
        end
        for (int row = 0; row < 16; row++)
          for (int w = 0; w < 4; w++) acc(T_OUT, 1, A_OUT + addr_t'((my * 16 + row) * 128 + mx * 16 + w * 4));
      end
      probes[g] = n_probe; l1acc[g] = n_l1; l1miss[g] = n_l1m; miniacc[g] = n_mini;
      minimiss[g] = n_minim; bypass[g] = n_byp; outputs[g] = n_out;
      done[g] = 1;
    end
  end

  initial begin
    string names [NCFG] = '{"base", "bypass", "mini 512B", "mini 1KB", "mini 2KB", "partition A", "partition B"};
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int g = 0; g < NCFG; g++) wait (done[g] == 1);
    $display("config        L1 acc  L1 miss  way reads  reads/acc  mini acc  mini miss  bypassed");
    for (int g = 0; g < NCFG; g++)
      $display("%-12s %7d %8d %10d %10.2f %9d %10d %9d", names[g], l1acc[g], l1miss[g], probes[g],
               real'(probes[g]) / real'(l1acc[g]), miniacc[g], minimiss[g], bypass[g]);
    check(probes[0] == 4 * l1acc[0], "base reads all four ways on every access");
    check(bypass[0] == 0 && bypass[1] == outputs[1], "bypass takes exactly the output accesses");
    check(l1acc[1] == l1acc[0] - outputs[0], "bypassed accesses leave the L1");
    check(minimiss[4] <= minimiss[2], "2 KB mini-cache misses no more than 512 B");
    check(minimiss[4] < minimiss[2], "1.5 KB block buffer thrashes 512 B but fits 2 KB");
    check(longint'(probes[5]) * l1acc[0] < longint'(probes[0]) * l1acc[5], "partition A reads fewer ways per access than base");
    check(longint'(probes[6]) * l1acc[5] < longint'(probes[5]) * l1acc[6], "partition B reads fewer ways per access than A");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
