// tb_tcor_full: one complete frame through tcor_top at its default sizes
// (1488 tiles, 16 KiB Primitive List Cache, 1024-attribute Attribute Cache,
// 1 MiB L2). 40 primitives with 1..4 attributes each are binned over random
// tiles of the whole screen, then all 1488 tiles are fetched. A Rasterizer
// model checks that every tile's primitives arrive in binning order with the
// attributes the binner sent, and the finished-tile count must reach 1488. The
// frame fits in the Attribute Cache, so every read must hit.
module tb_tcor_full;
  import tcor_pkg::*;
  localparam int NT = 1488, PW = 10;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic frame_start, fetch_start, prim_valid, prim_ready, tile_valid, tile_ready, tile_last;
  logic attr_valid, attr_ready, prim_done, fetch_busy, fetch_done;
  logic [NATTR_W-1:0] prim_num_attr;
  tile_t tile_id;
  attr_t attr_data, rs_data;
  logic rq_valid, rq_ready, rs_release;
  logic [PW-1:0] rq_abp, rs_ptr, rs_next, rs_release_ptr;
  logic ext_req_valid, ext_req_ready, ext_resp_valid;
  l2_req_t ext_req;
  line_t ext_resp_data;
  logic mem_req_valid, mem_req_ready, mem_we, mem_resp_valid;
  addr_t mem_addr;
  line_t mem_wdata, mem_rdata;
  logic [TILE_W:0] tiles_done;
  tcor_events_t ev;
  int n_reads, n_writes, hits, misses;

  tcor_top dut (.clk, .rst_n, .pb_lists_ptr(24'h10_0000), .pb_attr_ptr(24'h20_0000), .*);

  tb_main_memory #(.LAT_MIN(50), .LAT_MAX(100)) mem (
    .clk, .rst_n, .req_valid(mem_req_valid), .req_ready(mem_req_ready), .we(mem_we),
    .addr(mem_addr), .wdata(mem_wdata), .resp_valid(mem_resp_valid), .rdata(mem_rdata),
    .n_reads, .n_writes);

  always @(posedge clk) if (rst_n) begin
    hits += int'(ev.ac_hit); misses += int'(ev.ac_miss);
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input logic ok);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s @%0t", what, $time); end
  endtask

  int    exp_tile [int][$];
  attr_t attrs    [int][$];

  function automatic attr_t mk_attr(int p, int k);
    return attr_t'({16'(p), 8'(k), 8'h77}) * 384'h1_0000_0001_0000_0001 + attr_t'(p * 13 + k);
  endfunction

  task automatic bin(int p, int n, int tl [$]);
    for (int k = 0; k < n; k++) attrs[p].push_back(mk_attr(p, k));
    foreach (tl[j]) exp_tile[tl[j]].push_back(p);
    @(negedge clk);
    prim_valid = 1; prim_num_attr = 4'(n);
    @(posedge clk); while (!prim_ready) @(posedge clk);
    @(negedge clk); prim_valid = 0;
    foreach (tl[j]) begin
      tile_valid = 1; tile_id = 12'(tl[j]); tile_last = (j == tl.size() - 1);
      @(posedge clk); while (!tile_ready) @(posedge clk);
      @(negedge clk);
    end
    tile_valid = 0;
    for (int k = 0; k < n; k++) begin
      attr_valid = 1; attr_data = attrs[p][k];
      @(posedge clk); while (!attr_ready) @(posedge clk);
      @(negedge clk);
    end
    attr_valid = 0;
    while (!prim_done) @(posedge clk);
  endtask

  // Rasterizer model
  int order [$];     // expected primitive sequence over all tiles
  int delivered;
  initial begin
    rq_ready = 0; rs_ptr = 0; rs_release = 0; rs_release_ptr = 0; delivered = 0;
    forever begin
      @(negedge clk);
      rq_ready = 0;
      if (rq_valid) begin
        logic [PW-1:0] p, head;
        int prim;
        rq_ready = 1;
        head = rq_abp;
        @(negedge clk);
        rq_ready = 0;
        prim = order[delivered];
        delivered++;
        p = head;
        for (int k = 0; k < attrs[prim].size(); k++) begin
          rs_ptr = p; #1;
          check($sformatf("primitive %0d attribute %0d", prim, k), rs_data == attrs[prim][k]);
          p = rs_next;
        end
        rs_release = 1; rs_release_ptr = head;
        @(negedge clk);
        rs_release = 0;
      end
    end
  end

  initial begin
    frame_start = 0; fetch_start = 0; prim_valid = 0; tile_valid = 0; attr_valid = 0;
    prim_num_attr = 0; tile_id = 0; tile_last = 0; attr_data = 0;
    ext_req_valid = 0; ext_req = '0; hits = 0; misses = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    @(negedge clk); frame_start = 1; @(negedge clk); frame_start = 0;
    for (int p = 0; p < 40; p++) begin
      int tl [$];
      int t;
      tl.delete();
      // a primitive covers a short run of tiles starting anywhere on screen
      t = $urandom_range(0, NT - 8);
      for (int j = 0; j < 6; j++) if (j == 0 || $urandom_range(0, 1)) tl.push_back(t + j);
      bin(p, $urandom_range(1, 4), tl);
    end
    for (int t = 0; t < NT; t++) if (exp_tile.exists(t)) foreach (exp_tile[t][i]) order.push_back(exp_tile[t][i]);
    @(negedge clk); fetch_start = 1; @(negedge clk); fetch_start = 0;
    while (!fetch_done) @(posedge clk);
    while (delivered < order.size()) @(posedge clk);
    repeat (10) @(posedge clk);
    check("all primitives delivered", delivered == order.size());
    check("all tiles finished", tiles_done == 13'(NT));
    // the frame's attributes fit in the Attribute Cache, so every read hits
    check("every read hits", hits == delivered && misses == 0);
    $display("primitives fetched %0d, hits %0d, misses %0d", delivered, hits, misses);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
