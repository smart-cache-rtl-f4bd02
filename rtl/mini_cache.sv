// mini_cache - small direct-mapped data cache beside the L1.
//
// Accesses that the program marks for it (the decoder's macroblock buffer,
// which is small and very often used) go here instead of to the L1.  Being
// small and direct-mapped, each access reads one short tag entry and one line,
// which costs much less than a probe of the set-associative L1.  Default size
// 512 bytes: 16 lines of 32 bytes.  Write-back, write-allocate.
//
// Interface and timing are the same as the L1's:
//   * req_*: valid/ready; ready in IDLE and in LOOKUP after a load hit, so
//     load hits run one per cycle; a store hit takes one extra cycle.
//   * resp_valid one cycle after acceptance on a hit, or when the refill line
//     arrives on a miss; resp_rdata is the loaded word.
//   * access pulses when the arrays are read; miss pulses on a miss.
//   * A miss writes back a dirty line (one full-line write on mem_req) and then
//     reads the new line.
//
// From the original proposal: the mini-cache beside the L1, its 512-byte size and the
// direct mapping.  This design's choices: line size, write policy, handshake.
module mini_cache
  import smart_cache_pkg::*;
#(
  parameter int unsigned SIZE_BYTES = 512
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       req_valid,
  output logic       req_ready,
  input  logic       req_write,
  input  addr_t      req_addr,
  input  logic [3:0] req_be,
  input  word_t      req_wdata,
  output logic       resp_valid,
  output word_t      resp_rdata,
  output logic       access,
  output logic       miss,
  output mem_req_t   mem_req,
  input  logic       mem_req_ready,
  input  mem_resp_t  mem_resp
);

  localparam int unsigned LINES = SIZE_BYTES / LINE_BYTES;
  localparam int unsigned IDX_W = $clog2(LINES);
  localparam int unsigned TAG_W = ADDR_W - OFF_W - IDX_W;

  typedef logic [TAG_W-1:0] tag_t;
  typedef logic [IDX_W-1:0] idx_t;

  typedef enum logic [2:0] {S_IDLE, S_LOOKUP, S_WB_REQ, S_WB_WAIT, S_FILL_REQ, S_FILL_WAIT} state_e;
  state_e state_q, state_d;

  logic       write_q;
  addr_t      addr_q;
  logic [3:0] be_q;
  word_t      wdata_q;

  logic [LINES-1:0] valid_q, dirty_q;
  tag_t  tag_mem  [LINES];
  line_t data_mem [LINES];
  tag_t  tag_rd;
  line_t line_rd;

  logic     accept, tag_we, data_we;
  line_t    wr_line;
  line_be_t wr_be;
  idx_t     idx;
  tag_t     tag;
  logic     hit;

  assign accept = req_valid && req_ready;
  assign idx    = addr_q[OFF_W +: IDX_W];
  assign tag    = addr_q[ADDR_W-1 -: TAG_W];
  assign hit    = valid_q[idx] && tag_rd == tag;
  assign access = accept;

  always_ff @(posedge clk) begin
    if (accept) begin
      tag_rd  <= tag_mem[req_addr[OFF_W +: IDX_W]];
      line_rd <= data_mem[req_addr[OFF_W +: IDX_W]];
    end
    if (tag_we) tag_mem[idx] <= tag;
    for (int b = 0; b < LINE_BYTES; b++)
      if (data_we && wr_be[b]) data_mem[idx][b*8 +: 8] <= wr_line[b*8 +: 8];
  end

  always_comb begin
    state_d    = state_q;
    req_ready  = 1'b0;
    resp_valid = 1'b0;
    resp_rdata = line_word(line_rd, addr_q[2 +: WSEL_W]);
    miss       = 1'b0;
    tag_we     = 1'b0;
    data_we    = 1'b0;
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
            data_we = 1'b1;
            state_d = S_IDLE;
          end else begin
            req_ready = 1'b1;
            state_d   = req_valid ? S_LOOKUP : S_IDLE;
          end
        end else begin
          miss    = 1'b1;
          state_d = (valid_q[idx] && dirty_q[idx]) ? S_WB_REQ : S_FILL_REQ;
        end
      end
      S_WB_REQ: begin
        mem_req.valid = 1'b1;
        mem_req.write = 1'b1;
        mem_req.addr  = {tag_rd, idx, OFF_W'(0)};
        mem_req.be    = '1;
        mem_req.wdata = line_rd;
        if (mem_req_ready) state_d = S_WB_WAIT;
      end
      S_WB_WAIT: if (mem_resp.valid) state_d = S_FILL_REQ;
      S_FILL_REQ: begin
        mem_req.valid = 1'b1;
        mem_req.addr  = {addr_q[ADDR_W-1:OFF_W], OFF_W'(0)};
        if (mem_req_ready) state_d = S_FILL_WAIT;
      end
      S_FILL_WAIT: begin
        resp_rdata = line_word(mem_resp.rdata, addr_q[2 +: WSEL_W]);
        if (mem_resp.valid) begin
          resp_valid = 1'b1;
          tag_we     = 1'b1;
          data_we    = 1'b1;
          wr_line    = write_q ? merge_line(mem_resp.rdata, word_to_line(wdata_q),
                                            be_to_line(be_q, addr_q[2 +: WSEL_W]))
                               : mem_resp.rdata;
          wr_be      = '1;
          state_d    = S_IDLE;
        end
      end
      default: state_d = S_IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= S_IDLE;
      write_q <= 1'b0;
      addr_q  <= '0;
      be_q    <= '0;
      wdata_q <= '0;
      valid_q <= '0;
      dirty_q <= '0;
    end else begin
      state_q <= state_d;
      if (accept) begin
        write_q <= req_write;
        addr_q  <= req_addr;
        be_q    <= req_be;
        wdata_q <= req_wdata;
      end
      if (state_q == S_LOOKUP && hit && write_q) dirty_q[idx] <= 1'b1;
      if (state_q == S_FILL_WAIT && mem_resp.valid) begin
        valid_q[idx] <= 1'b1;
        dirty_q[idx] <= write_q;
      end
    end
  end

  // A request must stay stable until it is taken.
  a_hold_req: assert property (@(posedge clk) disable iff (!rst_n)
    mem_req.valid && !mem_req_ready |=> mem_req.valid && $stable(mem_req.addr));

endmodule
