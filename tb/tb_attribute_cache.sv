// tb_attribute_cache: OPT replacement, bypass and write-back of the Attribute
// Cache.
//
// Phase 1 replays the three-primitive, nine-tile example frame (scanline tile
// order, room for two primitives in one set): three builder writes with OPT
// Numbers 2, 0 and 3, then nine fetcher reads. Expected, worked out by hand
// from OPT: the third write bypasses, every read hits except the tile-3 read of
// the third primitive, which evicts the dirty first primitive. With two
// attributes per primitive that is 4 L2 writes and 2 L2 reads.
// Phase 2 writes and reads random primitives (1..4 attributes) in a small
// cache, checking every attribute the Rasterizer port returns; it exercises
// evictions for Attribute Buffer space as well.
module tb_attribute_cache;
  import tcor_pkg::*;
  localparam int PW = 3;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic wr_valid, wr_ready, wd_valid, wd_ready, wr_done;
  logic [PRIM_W-1:0] wr_prim_id;
  logic [NATTR_W-1:0] wr_num_attr;
  tile_t wr_opt, wr_last_tile;
  attr_t wd_data;
  logic rd_valid, rd_ready, rd_done;
  pmd_t rd_pmd;
  logic [PW-1:0] rd_abp, rs_ptr, rs_next, rs_release_ptr;
  attr_t rs_data;
  logic rs_release;
  logic l2_req_valid, l2_req_ready, l2_resp_valid;
  l2_req_t l2_req;
  line_t l2_resp_data;
  logic ev_hit, ev_miss, ev_bypass, ev_evict, ev_writeback, ev_space_evict, ev_lock_stall;
  int n_reads, n_writes;
  int hits, misses, bypasses, space_ev, wbs;

  attribute_cache #(.SETS(2), .WAYS(2), .ENTRIES(8)) dut (
    .clk, .rst_n, .pb_attr_ptr(24'h10000), .*);

  tb_l2_stub #(.LAT(3)) l2 (
    .clk, .rst_n, .req_valid(l2_req_valid), .req_ready(l2_req_ready), .req(l2_req),
    .resp_valid(l2_resp_valid), .resp_data(l2_resp_data), .n_reads, .n_writes);

  always @(posedge clk) if (rst_n) begin
    hits += int'(ev_hit); misses += int'(ev_miss); bypasses += int'(ev_bypass);
    space_ev += int'(ev_space_evict); wbs += int'(ev_writeback);
  end

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

  function automatic attr_t val(int id, int k);
    return attr_t'({id[15:0], 8'(k), 8'hA5}) * 384'h1_0001_0001_0001 + attr_t'(k);
  endfunction

  task automatic pwrite(int id, int n, int opt, int last);
    @(negedge clk);
    wr_valid = 1; wr_prim_id = 16'(id); wr_num_attr = 4'(n); wr_opt = 12'(opt); wr_last_tile = 12'(last);
    @(posedge clk); while (!wr_ready) @(posedge clk);
    @(negedge clk); wr_valid = 0;
    for (int k = 0; k < n; k++) begin
      wd_valid = 1; wd_data = val(id, k);
      @(posedge clk); while (!wd_ready) @(posedge clk);
      @(negedge clk);
    end
    wd_valid = 0;
    while (!wr_done) @(posedge clk);
  endtask

  // read, then act as the Rasterizer: walk the list, check, release
  task automatic pread(int id, int n, int opt, output int cycles);
    logic [PW-1:0] p;
    int t0;
    @(negedge clk);
    rd_valid = 1; rd_pmd.prim_id = 16'(id); rd_pmd.num_attr = 4'(n); rd_pmd.opt = 12'(opt);
    t0 = $time;
    @(posedge clk); while (!rd_ready) @(posedge clk);
    @(negedge clk); rd_valid = 0;
    while (!rd_done) @(posedge clk);
    cycles = (int'($time) - t0) / 10;
    p = rd_abp;
    @(negedge clk);
    for (int k = 0; k < n; k++) begin
      rs_ptr = p; #1;
      check($sformatf("attr id %0d k %0d", id, k), rs_data == val(id, k));
      check("list end", (rs_next == p) == (k == n - 1));
      p = rs_next;
    end
    rs_release = 1; rs_release_ptr = rd_abp;
    @(negedge clk); rs_release = 0;
  endtask

  initial begin
    int cyc;
    int ids [3] = '{0, 3, 5};          // all three map to set 0
    int rd_seq [9] = '{1, 1, 0, 2, 1, 1, 2, 2, 2};
    int rd_opt [9] = '{1, 4, 4095, 6, 5, 4095, 7, 8, 4095};
    int pr [$];
    int pn [$];
    wr_valid = 0; wd_valid = 0; rd_valid = 0; rs_release = 0; rs_ptr = 0; rs_release_ptr = 0;
    wr_prim_id = 0; wr_num_attr = 0; wr_opt = 0; wr_last_tile = 0; wd_data = 0; rd_pmd = '0;
    hits = 0; misses = 0; bypasses = 0; space_ev = 0; wbs = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    // ---- phase 1: the example frame ----
    pwrite(ids[0], 2, 2, 2);
    pwrite(ids[1], 2, 0, 5);
    check("no L2 traffic yet", n_writes == 0);
    pwrite(ids[2], 2, 3, 8);
    check("third write bypassed", bypasses == 1 && n_writes == 2);
    for (int t = 0; t < 9; t++) begin
      pread(ids[rd_seq[t]], 2, rd_opt[t], cyc);
      if (t == 0) begin check("hit answers in 2 cycles", cyc == 2); end
    end
    check("example: 8 hits", hits == 8);
    check("example: 1 miss", misses == 1);
    check("example: L2 reads", n_reads == 2);
    check("example: L2 writes", n_writes == 4);
    check("example: one dirty write-back", wbs == 1);
    // the written-back first primitive carries its last tile (2) in bits 395:384
    check("write-back data", l2.peek(24'h10000 + 24'd1) == line_t'({12'd2, val(0, 1)}));
    // ---- phase 2: random traffic ----
    for (int i = 0; i < 40; i++) begin
      int n, id;
      n = $urandom_range(1, 4);
      id = 100 + i * 4;
      pwrite(id, n, $urandom_range(0, 30), 31);
      pr.push_back(id); pn.push_back(n);
    end
    for (int j = 0; j < 300; j++) begin
      int s;
      s = $urandom_range(0, pr.size() - 1);
      pread(pr[s], pn[s], $urandom_range(0, 4095), cyc);
    end
    check("space evictions happened", space_ev > 0);
    $display("hits %0d misses %0d bypasses %0d space %0d wb %0d l2r %0d l2w %0d",
             hits, misses, bypasses, space_ev, wbs, n_reads, n_writes);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
