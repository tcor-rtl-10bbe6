// tb_tile_fetcher: six tiles with random list lengths (0..20). The testbench
// plays the list counters, the Primitive List Cache (checking the interleaved
// PMD addresses) and the Attribute Cache (checking each request against the
// PMD it was given), and drains the output queue slowly so that the queue
// fills. It checks the order of the queued pointers, one tile_done per tile,
// the done pulse and that the queue-full stall happened.
module tb_tile_fetcher;
  import tcor_pkg::*;
  localparam int NT = 6, PW = 10;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start, busy, done, tile_done;
  tile_t cnt_tile;
  logic [10:0] cnt_q;
  logic plc_req_valid, plc_req_ready, plc_resp_valid;
  addr_t plc_req_addr;
  logic [3:0] plc_req_slot;
  logic [31:0] plc_resp_rdata;
  logic ac_rd_valid, ac_rd_ready, ac_rd_done;
  pmd_t ac_rd_pmd;
  logic [PW-1:0] ac_rd_abp, out_abp;
  logic out_valid, out_ready, ev_queue_stall;

  tile_fetcher #(.NUM_TILES(NT), .QDEPTH(4), .PW(PW)) dut (.clk, .rst_n, .pb_lists_ptr(24'h400), .*);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input logic ok);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s @%0t", what, $time); end
  endtask

  int cnt [NT];
  assign cnt_q = 11'(cnt[cnt_tile]);

  function automatic pmd_t pmd_of(int t, int i);
    pmd_t p;
    p.prim_id = 16'(t * 64 + i); p.num_attr = 4'(1 + i % 3); p.opt = 12'(t + 1);
    return p;
  endfunction
  function automatic logic [PW-1:0] abp_of(pmd_t p);
    return PW'(p.prim_id * 7 + 3);
  endfunction

  // Primitive List Cache: decode the interleaved address back to (tile, index)
  logic plc_pend;
  logic [31:0] plc_data;
  assign plc_req_ready = !plc_pend;
  always @(posedge clk) begin
    plc_resp_valid <= 1'b0;
    if (plc_pend) begin plc_resp_valid <= 1'b1; plc_resp_rdata <= plc_data; plc_pend <= 1'b0; end
    if (rst_n && plc_req_valid && plc_req_ready) begin
      int off, t, i;
      off = int'(plc_req_addr) - 'h400;
      t = off % NT; i = (off / NT) * 16 + int'(plc_req_slot);
      check("PMD address in list", t < NT && i < cnt[t]);
      plc_data <= pmd_of(t, i);
      plc_pend <= 1'b1;
    end
  end

  // Attribute Cache: answer after a random delay
  int ac_wait;
  pmd_t ac_p;
  assign ac_rd_ready = (ac_wait < 0);
  always @(posedge clk) begin
    ac_rd_done <= 1'b0;
    if (!rst_n) ac_wait <= -1;
    else if (ac_rd_valid && ac_rd_ready) begin
      ac_p <= ac_rd_pmd;
      ac_wait <= $urandom_range(0, 6);
    end else if (ac_wait == 0) begin
      ac_rd_done <= 1'b1; ac_rd_abp <= abp_of(ac_p); ac_wait <= -1;
    end else if (ac_wait > 0) ac_wait <= ac_wait - 1;
  end

  // Rasterizer: slow consumer, checks order
  logic [PW-1:0] exp_q [$];
  int tdone, stalls, ndone;
  always @(negedge clk) out_ready <= ($urandom_range(0, 9) == 0);
  always @(posedge clk) begin
    if (rst_n && out_valid && out_ready) check("queue order", out_abp == exp_q.pop_front());
    if (rst_n) begin
      tdone += int'(tile_done); stalls += int'(ev_queue_stall); ndone += int'(done);
    end
  end

  initial begin
    start = 0; plc_pend = 0; out_ready = 0; tdone = 0; stalls = 0; ndone = 0;
    plc_resp_rdata = 0; ac_rd_abp = 0;
    for (int t = 0; t < NT; t++) cnt[t] = (t == 2) ? 0 : $urandom_range(1, 20);
    for (int t = 0; t < NT; t++) for (int i = 0; i < cnt[t]; i++) exp_q.push_back(abp_of(pmd_of(t, i)));
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    while (!(ndone == 1 && exp_q.size() == 0)) @(posedge clk);
    repeat (5) @(posedge clk);
    check("all primitives delivered", exp_q.size() == 0);
    check("one tile_done per tile", tdone == NT);
    if (tdone != NT) $display("tile_done pulses %0d, tiles %0d", tdone, NT);
    check("done once", ndone == 1 && !busy);
    check("queue-full stall seen", stalls > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
