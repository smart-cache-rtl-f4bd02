// l2_cache - unified second-level cache below the L1, mini-cache and bypass.
//
// A 4-way set-associative write-back, write-allocate cache, 512 KB with
// 32-byte lines by default (4096 sets).  It serves the line bus from above:
// a read returns the whole line, a write stores the bytes whose strobes are set
// (a full line from an L1 write-back, a single word from the bypass path).
// All ways are read on every access.  A miss writes back a dirty victim to
// main memory and reads the line from it before the access completes.  The
// victim is the first invalid way of the set, else the way under the set's
// round-robin pointer.  Valid and dirty bits and the round-robin pointers are
// kept in RAM arrays beside the tags, read together with them; after reset the
// cache sweeps them clear, one set per cycle (SETS cycles with up_ready low).
//
// Interface and timing: up_req/up_ready/up_resp and mem_req/mem_req_ready/
// mem_resp in the line-bus protocol of smart_cache_pkg.  up_ready is high only
// when idle.  A hit responds two cycles after acceptance (array read, then tag
// compare); a miss responds in the cycle after main memory returns the line.
//
// From the original proposal: size and associativity of the L2 that backs the L1.
// This design's choices: line size, write policy, replacement and timing.
module l2_cache
  import smart_cache_pkg::*;
#(
  parameter int unsigned SIZE_BYTES = 524288,
  parameter int unsigned WAYS       = 4
) (
  input  logic      clk,
  input  logic      rst_n,
  input  mem_req_t  up_req,
  output logic      up_ready,
  output mem_resp_t up_resp,
  output mem_req_t  mem_req,
  input  logic      mem_req_ready,
  input  mem_resp_t mem_resp
);

  localparam int unsigned SETS   = SIZE_BYTES / (WAYS * LINE_BYTES);
  localparam int unsigned IDX_W  = $clog2(SETS);
  localparam int unsigned TAG_W  = ADDR_W - OFF_W - IDX_W;
  localparam int unsigned WPTR_W = $clog2(WAYS);

  typedef logic [TAG_W-1:0] tag_t;
  typedef logic [IDX_W-1:0] idx_t;

  typedef enum logic [2:0] {S_INIT, S_IDLE, S_LOOKUP, S_WB_REQ, S_WB_WAIT, S_FILL_REQ, S_FILL_WAIT, S_RESP} state_e;
  state_e state_q;

  mem_req_t          req_q;
  logic [WPTR_W-1:0] way_q;
  line_t             line_q;

  idx_t              init_q;

  tag_t              tag_rd   [WAYS];
  line_t             line_rd  [WAYS];
  logic [WAYS-1:0]   valid_rd, dirty_rd;
  logic [WPTR_W-1:0] rr_rd;

  idx_t  idx;
  tag_t  tag;
  assign idx = req_q.addr[OFF_W +: IDX_W];
  assign tag = req_q.addr[ADDR_W-1 -: TAG_W];

  logic              accept;
  logic              we;
  logic              meta_we, meta_dirty;
  logic [WPTR_W-1:0] meta_way;
  logic              rr_we;
  idx_t              meta_idx;
  logic [WPTR_W-1:0] we_way;
  line_t             we_line;

  assign up_ready = (state_q == S_IDLE);
  assign accept   = up_req.valid && up_ready;

  for (genvar w = 0; w < WAYS; w++) begin : g_way
    tag_t       tag_mem  [SETS];
    line_t      data_mem [SETS];
    logic [1:0] meta_mem [SETS];   // {valid, dirty}
    always_ff @(posedge clk) begin
      if (accept) begin
        tag_rd[w]                  <= tag_mem[up_req.addr[OFF_W +: IDX_W]];
        line_rd[w]                 <= data_mem[up_req.addr[OFF_W +: IDX_W]];
        {valid_rd[w], dirty_rd[w]} <= meta_mem[up_req.addr[OFF_W +: IDX_W]];
      end
      if (we && we_way == WPTR_W'(w)) begin
        tag_mem[idx]  <= tag;
        data_mem[idx] <= we_line;
      end
      if (meta_we && (state_q == S_INIT || meta_way == WPTR_W'(w)))
        meta_mem[meta_idx] <= (state_q == S_INIT) ? 2'b00 : {1'b1, meta_dirty};
    end
  end

  logic [WPTR_W-1:0] rr_mem [SETS];
  always_ff @(posedge clk) begin
    if (accept) rr_rd <= rr_mem[up_req.addr[OFF_W +: IDX_W]];
    if (rr_we) rr_mem[meta_idx] <= (state_q == S_INIT) ? '0 : WPTR_W'((int'(way_q) + 1) % WAYS);
  end

  logic              hit;
  logic [WPTR_W-1:0] hit_way, victim;
  always_comb begin
    logic found;
    hit     = 1'b0;
    hit_way = '0;
    for (int w = 0; w < WAYS; w++)
      if (valid_rd[w] && tag_rd[w] == tag) begin
        hit     = 1'b1;
        hit_way = WPTR_W'(w);
      end
    found  = 1'b0;
    victim = rr_rd;
    for (int w = 0; w < WAYS; w++)
      if (!found && !valid_rd[w]) begin
        victim = WPTR_W'(w);
        found  = 1'b1;
      end
  end

  // array write: a write hit in LOOKUP, or the refilled line in FILL_WAIT
  always_comb begin
    we      = 1'b0;
    we_way  = hit_way;
    we_line = merge_line(line_rd[hit_way], req_q.wdata, req_q.be);
    if (state_q == S_LOOKUP && hit && req_q.write) we = 1'b1;
    if (state_q == S_FILL_WAIT && mem_resp.valid) begin
      we      = 1'b1;
      we_way  = way_q;
      we_line = req_q.write ? merge_line(mem_resp.rdata, req_q.wdata, req_q.be) : mem_resp.rdata;
    end
  end

  // valid/dirty and round-robin writes: the reset sweep, a write hit, a refill
  always_comb begin
    meta_idx   = (state_q == S_INIT) ? init_q : idx;
    meta_we    = (state_q == S_INIT);
    meta_way   = hit_way;
    meta_dirty = 1'b1;
    rr_we      = (state_q == S_INIT);
    if (state_q == S_LOOKUP && hit && req_q.write) meta_we = 1'b1;
    if (state_q == S_FILL_WAIT && mem_resp.valid) begin
      meta_we    = 1'b1;
      meta_way   = way_q;
      meta_dirty = req_q.write;
      rr_we      = 1'b1;
    end
  end

  always_comb begin
    mem_req = '0;
    if (state_q == S_WB_REQ) begin
      mem_req.valid = 1'b1;
      mem_req.write = 1'b1;
      mem_req.addr  = {tag_rd[way_q], idx, OFF_W'(0)};
      mem_req.be    = '1;
      mem_req.wdata = line_rd[way_q];
    end else if (state_q == S_FILL_REQ) begin
      mem_req.valid = 1'b1;
      mem_req.addr  = {req_q.addr[ADDR_W-1:OFF_W], OFF_W'(0)};
    end
  end

  assign up_resp.valid = (state_q == S_RESP);
  assign up_resp.rdata = line_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= S_INIT;
      req_q   <= '0;
      way_q   <= '0;
      line_q  <= '0;
      init_q  <= '0;
    end else begin
      unique case (state_q)
        S_INIT: begin
          init_q <= init_q + 1'b1;
          if (init_q == idx_t'(SETS - 1)) state_q <= S_IDLE;
        end
        S_IDLE: if (up_req.valid) begin
          req_q   <= up_req;
          state_q <= S_LOOKUP;
        end
        S_LOOKUP: begin
          if (hit) begin
            line_q  <= line_rd[hit_way];
            state_q <= S_RESP;
          end else begin
            way_q   <= victim;
            state_q <= (valid_rd[victim] && dirty_rd[victim]) ? S_WB_REQ : S_FILL_REQ;
          end
        end
        S_WB_REQ:  if (mem_req_ready) state_q <= S_WB_WAIT;
        S_WB_WAIT: if (mem_resp.valid) state_q <= S_FILL_REQ;
        S_FILL_REQ: if (mem_req_ready) state_q <= S_FILL_WAIT;
        S_FILL_WAIT: if (mem_resp.valid) begin
          line_q  <= mem_resp.rdata;
          state_q <= S_RESP;
        end
        S_RESP: state_q <= S_IDLE;
        default: state_q <= S_IDLE;
      endcase
    end
  end

endmodule
