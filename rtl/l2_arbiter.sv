// l2_arbiter: shares the single L2 port among N requesters.
//
// Fixed priority (requester 0 highest). A requester keeps the grant from the
// accepted request until its response, because the L2 serves one request at a
// time; the response is returned only to the granted requester. The priority
// order is this design's choice.
module l2_arbiter
  import tcor_pkg::*;
#(
  parameter int N = 3
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [N-1:0]  c_req_valid,
  output logic [N-1:0]  c_req_ready,
  input  l2_req_t       c_req [N],
  output logic [N-1:0]  c_resp_valid,
  output line_t         c_resp_data,
  output logic          l2_req_valid,
  input  logic          l2_req_ready,
  output l2_req_t       l2_req,
  input  logic          l2_resp_valid,
  input  line_t         l2_resp_data
);
  localparam int IW = (N > 1) ? $clog2(N) : 1;
  logic          busy_q;
  logic [IW-1:0] own_q, pick;
  logic          any;

  always_comb begin
    any  = 1'b0;
    pick = '0;
    for (int i = N-1; i >= 0; i--)
      if (c_req_valid[i]) begin
        any  = 1'b1;
        pick = IW'(i);
      end
    l2_req_valid = !busy_q && any;
    l2_req       = c_req[pick];
    c_req_ready  = '0;
    if (!busy_q && any) c_req_ready[pick] = l2_req_ready;
    c_resp_valid = '0;
    if (busy_q) c_resp_valid[own_q] = l2_resp_valid;
  end
  assign c_resp_data = l2_resp_data;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy_q <= 1'b0;
      own_q  <= '0;
    end else if (!busy_q) begin
      if (l2_req_valid && l2_req_ready) begin
        busy_q <= 1'b1;
        own_q  <= pick;
      end
    end else if (l2_resp_valid) begin
      busy_q <= 1'b0;
    end
  end
endmodule
