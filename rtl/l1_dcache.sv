// l1_dcache - way-partitioned set-associative L1 data cache.
//
// An N-way write-back, write-allocate cache (8 KB, 4 ways, 32-byte lines by
// default, so 64 sets).  Each access comes with a way bit vector taken from the
// TLB entry of its page.  Only the ways whose bit is set have their tag and
// data arrays read (way_en shows them), the hit check looks only at those
// ways, and on a miss the victim is chosen only among them.  Software maps each
// data structure to fixed ways, so the matching way is known before the access
// and no prediction or second probe is needed: a hit costs the same time with
// one way enabled as with all four, while reading fewer arrays.
//
// Interface and timing:
//   * req_*: valid/ready.  req_ready is high in IDLE, and in LOOKUP when the
//     current access is a load hit, so back-to-back load hits run one per
//     cycle.  The arrays are read at the clock edge that accepts a request.
//   * resp_valid pulses once per access: in the LOOKUP cycle for a hit (one
//     cycle after acceptance), or in the cycle the refill line arrives for a
//     miss.  resp_rdata holds the loaded word; for a store it is don't care.
//   * A store hit writes its bytes in the LOOKUP cycle and holds req_ready low
//     for that cycle: the arrays are single-ported.
//   * A miss writes back a dirty victim (one full-line write on mem_req) and
//     then fetches the line (one line read), merging the store data into it.
//   * An all-zero bit vector is taken as all ways enabled.
//
// From the original proposal: size, associativity, the bit vector that enables ways and
// guides replacement, single-ported arrays.  This design's choices: line size,
// write policy, the round-robin victim choice inside the enabled ways (an
// invalid enabled way is used first) and the handshake.
module l1_dcache
  import smart_cache_pkg::*;
#(
  parameter int unsigned SIZE_BYTES = 8192,
  parameter int unsigned WAYS       = 4
) (
  input  logic            clk,
  input  logic            rst_n,
  // CPU side (physical address)
  input  logic            req_valid,
  output logic            req_ready,
  input  logic            req_write,
  input  addr_t           req_addr,
  input  logic [3:0]      req_be,
  input  word_t           req_wdata,
  input  logic [WAYS-1:0] req_ways,
  output logic            resp_valid,
  output word_t           resp_rdata,
  // activity
  output logic [WAYS-1:0] way_en,
  output logic            miss,
  // next level
  output mem_req_t        mem_req,
  input  logic            mem_req_ready,
  input  mem_resp_t       mem_resp
);

  localparam int unsigned SETS  = SIZE_BYTES / (WAYS * LINE_BYTES);
  localparam int unsigned IDX_W = $clog2(SETS);
  localparam int unsigned TAG_W = ADDR_W - OFF_W - IDX_W;
  localparam int unsigned WPTR_W = $clog2(WAYS);

  typedef logic [TAG_W-1:0] tag_t;
  typedef logic [IDX_W-1:0] idx_t;

  typedef enum logic [2:0] {S_IDLE, S_LOOKUP, S_WB_REQ, S_WB_WAIT, S_FILL_REQ, S_FILL_WAIT} state_e;
  state_e state_q, state_d;

  // accepted access
  logic            write_q;
  addr_t           addr_q;
  logic [3:0]      be_q;
  word_t           wdata_q;
  logic [WAYS-1:0] ways_q;
  logic [WPTR_W-1:0] victim_q;

  // state arrays
  logic [WAYS-1:0]   valid_q [SETS];
  logic [WAYS-1:0]   dirty_q [SETS];
  logic [WPTR_W-1:0] rr_q    [SETS];

  // array read outputs
  tag_t  tag_rd  [WAYS];
  line_t line_rd [WAYS];

  // array controls
  logic [WAYS-1:0] rd_en;
  idx_t            rd_idx;
  logic [WAYS-1:0] tag_we, data_we;
  line_t           wr_line;
  line_be_t        wr_be;

  function automatic idx_t idx_of(addr_t a);
    return a[OFF_W +: IDX_W];
  endfunction
  function automatic tag_t tag_of(addr_t a);
    return a[ADDR_W-1 -: TAG_W];
  endfunction

  // ---------------------------------------------------------------- arrays
  for (genvar w = 0; w < WAYS; w++) begin : g_way
    tag_t  tag_mem  [SETS];
    line_t data_mem [SETS];
    always_ff @(posedge clk) begin
      if (rd_en[w]) begin
        tag_rd[w]  <= tag_mem[rd_idx];
        line_rd[w] <= data_mem[rd_idx];
      end
      if (tag_we[w]) tag_mem[idx_of(addr_q)] <= tag_of(addr_q);
      for (int b = 0; b < LINE_BYTES; b++)
        if (data_we[w] && wr_be[b]) data_mem[idx_of(addr_q)][b*8 +: 8] <= wr_line[b*8 +: 8];
    end
  end

  // ---------------------------------------------------------------- lookup
  idx_t            idx;
  logic [WAYS-1:0] hit_vec;
  logic            hit;
  logic [WPTR_W-1:0] hit_way;
  logic [WPTR_W-1:0] victim;
  logic [WAYS-1:0]   new_ways;

  assign idx = idx_of(addr_q);

  always_comb begin
    hit_vec = '0;
    hit_way = '0;
    for (int w = 0; w < WAYS; w++)
      if (ways_q[w] && valid_q[idx][w] && tag_rd[w] == tag_of(addr_q)) begin
        hit_vec[w] = 1'b1;
        hit_way    = WPTR_W'(w);
      end
    hit = |hit_vec;
  end

  // Victim: first invalid enabled way, else the first enabled way at or after
  // the set's round-robin pointer.
  always_comb begin
    logic found;
    victim = '0;
    found  = 1'b0;
    for (int w = 0; w < WAYS; w++)
      if (!found && ways_q[w] && !valid_q[idx][w]) begin
        victim = WPTR_W'(w);
        found  = 1'b1;
      end
    for (int k = 0; k < WAYS; k++) begin
      int unsigned w;
      w = (int'(rr_q[idx]) + k) % WAYS;
      if (!found && ways_q[w]) begin
        victim = WPTR_W'(w);
        found  = 1'b1;
      end
    end
  end

  assign new_ways = (req_ways == '0) ? '1 : req_ways;

  // ---------------------------------------------------------------- control
  logic accept;
  assign accept = req_valid && req_ready;

  always_comb begin
    state_d    = state_q;
    req_ready  = 1'b0;
    resp_valid = 1'b0;
    resp_rdata = line_word(line_rd[hit_way], addr_q[2 +: WSEL_W]);
    miss       = 1'b0;
    tag_we     = '0;
    data_we    = '0;
    wr_line    = word_to_line(wdata_q);
    wr_be      = be_to_line(be_q, addr_q[2 +: WSEL_W]);
    mem_req    = '0;

    unique case (state_q)
      S_IDLE: begin
        req_ready = 1'b1;
        if (req_valid) state_d = S_LOOKUP;
      end
      S_LOOKUP: begin
        if (hit) begin
          resp_valid = 1'b1;
          if (write_q) begin
            data_we[hit_way] = 1'b1;
            state_d          = S_IDLE;
          end else begin
            req_ready = 1'b1;
            state_d   = req_valid ? S_LOOKUP : S_IDLE;
          end
        end else begin
          miss    = 1'b1;
          state_d = (valid_q[idx][victim] && dirty_q[idx][victim]) ? S_WB_REQ : S_FILL_REQ;
        end
      end
      S_WB_REQ: begin
        mem_req.valid = 1'b1;
        mem_req.write = 1'b1;
        mem_req.addr  = {tag_rd[victim_q], idx, OFF_W'(0)};
        mem_req.be    = '1;
        mem_req.wdata = line_rd[victim_q];
        if (mem_req_ready) state_d = S_WB_WAIT;
      end
      S_WB_WAIT: begin
        if (mem_resp.valid) state_d = S_FILL_REQ;
      end
      S_FILL_REQ: begin
        mem_req.valid = 1'b1;
        mem_req.addr  = {addr_q[ADDR_W-1:OFF_W], OFF_W'(0)};
        if (mem_req_ready) state_d = S_FILL_WAIT;
      end
      S_FILL_WAIT: begin
        resp_rdata = line_word(mem_resp.rdata, addr_q[2 +: WSEL_W]);
        if (mem_resp.valid) begin
          resp_valid        = 1'b1;
          tag_we[victim_q]  = 1'b1;
          data_we[victim_q] = 1'b1;
          wr_line = write_q ? merge_line(mem_resp.rdata, word_to_line(wdata_q),
                                         be_to_line(be_q, addr_q[2 +: WSEL_W]))
                            : mem_resp.rdata;
          wr_be   = '1;
          state_d = S_IDLE;
        end
      end
      default: state_d = S_IDLE;
    endcase
  end

  assign rd_en  = accept ? new_ways : '0;
  assign rd_idx = idx_of(req_addr);
  assign way_en = rd_en;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q  <= S_IDLE;
      write_q  <= 1'b0;
      addr_q   <= '0;
      be_q     <= '0;
      wdata_q  <= '0;
      ways_q   <= '0;
      victim_q <= '0;
      for (int s = 0; s < SETS; s++) begin
        valid_q[s] <= '0;
        dirty_q[s] <= '0;
        rr_q[s]    <= '0;
      end
    end else begin
      state_q <= state_d;
      if (accept) begin
        write_q <= req_write;
        addr_q  <= req_addr;
        be_q    <= req_be;
        wdata_q <= req_wdata;
        ways_q  <= new_ways;
      end
      if (state_q == S_LOOKUP && !hit) victim_q <= victim;
      if (state_q == S_LOOKUP && hit && write_q) dirty_q[idx][hit_way] <= 1'b1;
      if (state_q == S_FILL_WAIT && mem_resp.valid) begin
        valid_q[idx][victim_q] <= 1'b1;
        dirty_q[idx][victim_q] <= write_q;
        rr_q[idx]              <= WPTR_W'((int'(victim_q) + 1) % WAYS);
      end
    end
  end

  // A request must stay stable until it is taken.
  property p_hold_req;
    @(posedge clk) disable iff (!rst_n) mem_req.valid && !mem_req_ready |=> mem_req.valid && $stable(mem_req.addr);
  endproperty
  a_hold_req: assert property (p_hold_req);

endmodule
