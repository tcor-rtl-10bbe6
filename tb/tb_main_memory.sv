// tb_main_memory: behavioural model of the DRAM behind the L2 (simulation only).
//
// Whole-block reads and writes. Writes complete when accepted. Reads answer
// after LAT_MIN..LAT_MAX cycles (random) with stored data, or, for a block
// never written, with a pattern computed from its address. Counts reads and
// writes.
module tb_main_memory
  import tcor_pkg::*;
#(
  parameter int LAT_MIN = 50,
  parameter int LAT_MAX = 100
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  req_valid,
  output logic  req_ready,
  input  logic  we,
  input  addr_t addr,
  input  line_t wdata,
  output logic  resp_valid,
  output line_t rdata,
  output int    n_reads,
  output int    n_writes
);
  line_t mem [addr_t];
  logic  busy;
  int    cnt;
  addr_t a_q;

  function automatic line_t pattern(input addr_t a);
    line_t l;
    for (int i = 0; i < LINE_W / 32; i++) l[i*32 +: 32] = {a[7:0], 24'(i * 7919)} ^ 32'(a);
    return l;
  endfunction

  function automatic line_t peek(input addr_t a);
    return mem.exists(a) ? mem[a] : pattern(a);
  endfunction

  assign req_ready = !busy;

  always @(posedge clk)
    if (rst_n && !busy && req_valid && we) mem[addr] = wdata;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; cnt <= 0; resp_valid <= 1'b0; rdata <= '0;
      n_reads <= 0; n_writes <= 0; a_q <= '0;
    end else begin
      resp_valid <= 1'b0;
      if (!busy && req_valid) begin
        if (we) begin
          n_writes  <= n_writes + 1;
        end else begin
          busy    <= 1'b1;
          a_q     <= addr;
          cnt     <= LAT_MIN + int'($urandom_range(LAT_MAX - LAT_MIN));
          n_reads <= n_reads + 1;
        end
      end else if (busy) begin
        if (cnt <= 1) begin
          busy       <= 1'b0;
          resp_valid <= 1'b1;
          rdata      <= peek(a_q);
        end else cnt <= cnt - 1;
      end
    end
  end
endmodule
