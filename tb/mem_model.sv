// mem_model - behavioural main memory on the line bus (not synthesizable).
//
// Holds written lines in an associative array; a line never written reads as
// tb_util_pkg::init_line.  A request is taken when req.valid meets ready
// (ready may be withheld at random to exercise the requester's hold rule);
// the response follows LATENCY cycles later for one cycle.  Counts reads and
// writes for the testbenches.
module mem_model
  import smart_cache_pkg::*;
  import tb_util_pkg::*;
#(
  parameter int unsigned LATENCY      = 4,
  parameter bit          RANDOM_READY = 1'b0
) (
  input  logic      clk,
  input  logic      rst_n,
  input  mem_req_t  req,
  output logic      ready,
  output mem_resp_t resp
);
  line_t store [addr_t];
  int unsigned n_reads = 0, n_writes = 0;
  bit busy = 0;
  int unsigned cnt;
  line_t pending;

  function automatic line_t get_line(addr_t a);
    addr_t la;
    la = {a[ADDR_W-1:OFF_W], OFF_W'(0)};
    return store.exists(la) ? store[la] : init_line(la);
  endfunction

  bit stall = 0;
  assign ready = !busy && !stall;
  always @(posedge clk) stall <= RANDOM_READY && ($urandom % 3 == 0);

  initial resp = '0;

  always @(posedge clk) begin
    resp.valid <= 1'b0;
    if (!rst_n) begin
      busy <= 0;
    end else if (!busy) begin
      if (req.valid && ready) begin
        addr_t la;
        la = {req.addr[ADDR_W-1:OFF_W], OFF_W'(0)};
        if (req.write) begin
          store[la] = merge_line(get_line(la), req.wdata, req.be);
          n_writes++;
        end else begin
          n_reads++;
        end
        pending = get_line(la);
        cnt     = LATENCY;
        busy    <= 1;
      end
    end else begin
      if (cnt <= 1) begin
        resp.valid <= 1'b1;
        resp.rdata <= pending;
        busy       <= 0;
      end
      cnt = cnt - 1;
    end
  end
endmodule
