// mem_arbiter - joins several line-bus requesters onto one next-level port.
//
// The L1, the mini-cache and the bypass path all reach the shared L2 over the
// line bus.  The arbiter grants one of them at a time by fixed priority
// (port 0 highest), forwards the granted request combinationally, and once the
// next level takes it, keeps the grant until that request's response returns,
// which is routed back to the granted port only.  One transaction is in flight
// at a time, matching a single-ported L2.
//
// Interface: up_req/up_ready/up_resp per requester, dn_req/dn_ready/dn_resp to
// the next level, all in the line-bus protocol of smart_cache_pkg.  The
// arbiter adds no cycle to a request or a response.
//
// The original proposal places the L1 and the mini-cache above a common L2; how they
// share it is this design's choice.
module mem_arbiter
  import smart_cache_pkg::*;
#(
  parameter int unsigned N = 3
) (
  input  logic      clk,
  input  logic      rst_n,
  input  mem_req_t  up_req   [N],
  output logic      up_ready [N],
  output mem_resp_t up_resp  [N],
  output mem_req_t  dn_req,
  input  logic      dn_ready,
  input  mem_resp_t dn_resp
);

  localparam int unsigned PTR_W = (N > 1) ? $clog2(N) : 1;

  logic             busy_q;
  logic [PTR_W-1:0] owner_q;
  logic [PTR_W-1:0] grant;
  logic             any;

  always_comb begin
    grant = '0;
    any   = 1'b0;
    for (int i = N - 1; i >= 0; i--)
      if (up_req[i].valid) begin
        grant = PTR_W'(i);
        any   = 1'b1;
      end
  end

  always_comb begin
    dn_req = '0;
    if (!busy_q && any) dn_req = up_req[grant];
    for (int i = 0; i < N; i++) begin
      up_ready[i]       = !busy_q && any && grant == PTR_W'(i) && dn_ready;
      up_resp[i].valid  = busy_q && owner_q == PTR_W'(i) && dn_resp.valid;
      up_resp[i].rdata  = dn_resp.rdata;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy_q  <= 1'b0;
      owner_q <= '0;
    end else if (!busy_q) begin
      if (any && dn_ready) begin
        busy_q  <= 1'b1;
        owner_q <= grant;
      end
    end else if (dn_resp.valid) begin
      busy_q <= 1'b0;
    end
  end

  // No response may arrive while nothing is outstanding.
  a_no_stray_resp: assert property (@(posedge clk) disable iff (!rst_n)
    dn_resp.valid |-> busy_q);

endmodule
