// tb_l2_stub: behavioural stand-in for the L2 in L1 testbenches.
//
// Accepts one whole-block request at a time and answers after LAT cycles.
// Keeps written blocks; unwritten blocks read as a pattern of their address.
// Counts reads and writes per Parameter Buffer section.
module tb_l2_stub
  import tcor_pkg::*;
#(
  parameter int LAT = 3
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    req_valid,
  output logic    req_ready,
  input  l2_req_t req,
  output logic    resp_valid,
  output line_t   resp_data,
  output int      n_reads,
  output int      n_writes
);
  line_t   mem [addr_t];
  logic    busy;
  int      cnt;
  l2_req_t r_q;

  function automatic line_t pattern(input addr_t a);
    line_t l;
    for (int i = 0; i < LINE_W / 32; i++) l[i*32 +: 32] = 32'(a) * 32'(i + 3) + 32'h5a5a0000;
    return l;
  endfunction

  function automatic line_t peek(input addr_t a);
    return mem.exists(a) ? mem[a] : pattern(a);
  endfunction

  assign req_ready = !busy;

  always @(posedge clk)
    if (rst_n && busy && cnt <= 1 && r_q.we) mem[r_q.addr] = r_q.wdata;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; cnt <= 0; resp_valid <= 1'b0; resp_data <= '0;
      n_reads <= 0; n_writes <= 0; r_q <= '0;
    end else begin
      resp_valid <= 1'b0;
      if (!busy && req_valid) begin
        busy <= 1'b1;
        r_q  <= req;
        cnt  <= LAT;
        if (req.we) n_writes <= n_writes + 1;
        else        n_reads  <= n_reads + 1;
      end else if (busy) begin
        if (cnt <= 1) begin
          busy       <= 1'b0;
          resp_valid <= 1'b1;
          resp_data  <= peek(r_q.addr);
        end else cnt <= cnt - 1;
      end
    end
  end
endmodule
