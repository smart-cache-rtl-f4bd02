// bypass_path - sends accesses marked "bypass" straight to the next level.
//
// Data that is written once and never read back by the processor (the
// decoder's output pictures) gains nothing from the L1 and only evicts useful
// lines from it.  Accesses the program marks as bypass therefore never touch
// the L1 arrays: each becomes one transaction on the line bus to the next
// level.  A store sends the word placed at its position in the line with only
// its own byte strobes set; a load reads the line and returns the addressed
// word.
//
// Interface and timing: req_* valid/ready, ready only when idle (one access in
// flight).  The request goes out on mem_req in the cycle after acceptance and
// resp_valid pulses in the cycle mem_resp.valid arrives.  access pulses on
// acceptance.
//
// From the original proposal: bypassing the L1 for data with no reuse, selected per
// instruction.  This design's choices: the line-bus form of a word access and
// that nothing is buffered or merged between bypassed stores.
module bypass_path
  import smart_cache_pkg::*;
(
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
  output mem_req_t   mem_req,
  input  logic       mem_req_ready,
  input  mem_resp_t  mem_resp
);

  typedef enum logic [1:0] {S_IDLE, S_REQ, S_WAIT} state_e;
  state_e state_q;

  logic       write_q;
  addr_t      addr_q;
  logic [3:0] be_q;
  word_t      wdata_q;

  assign req_ready  = (state_q == S_IDLE);
  assign access     = req_valid && req_ready;
  assign resp_valid = (state_q == S_WAIT) && mem_resp.valid;
  assign resp_rdata = line_word(mem_resp.rdata, addr_q[2 +: WSEL_W]);

  always_comb begin
    mem_req       = '0;
    mem_req.valid = (state_q == S_REQ);
    mem_req.write = write_q;
    mem_req.addr  = {addr_q[ADDR_W-1:OFF_W], OFF_W'(0)};
    mem_req.be    = write_q ? be_to_line(be_q, addr_q[2 +: WSEL_W]) : '0;
    mem_req.wdata = word_to_line(wdata_q);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= S_IDLE;
      write_q <= 1'b0;
      addr_q  <= '0;
      be_q    <= '0;
      wdata_q <= '0;
    end else begin
      unique case (state_q)
        S_IDLE: if (req_valid) begin
          write_q <= req_write;
          addr_q  <= req_addr;
          be_q    <= req_be;
          wdata_q <= req_wdata;
          state_q <= S_REQ;
        end
        S_REQ:  if (mem_req_ready) state_q <= S_WAIT;
        S_WAIT: if (mem_resp.valid) state_q <= S_IDLE;
        default: state_q <= S_IDLE;
      endcase
    end
  end

endmodule
