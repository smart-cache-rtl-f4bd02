// tb_util_pkg - helpers shared by the testbenches: the initial contents of
// main memory (a fixed hash of the word address, so every testbench can work
// out what an untouched location holds) and a byte-addressed reference memory.
package tb_util_pkg;
  import smart_cache_pkg::*;

  function automatic word_t init_word(addr_t a);
    logic [31:0] w;
    w = {a[31:2], 2'b00};
    return (w * 32'h9E37_79B1) ^ 32'h5A3C_96E1;
  endfunction

  function automatic line_t init_line(addr_t a);
    line_t l;
    for (int i = 0; i < LINE_BYTES / 4; i++)
      l[i*32 +: 32] = init_word({a[ADDR_W-1:OFF_W], OFF_W'(0)} + addr_t'(i * 4));
    return l;
  endfunction
endpackage
