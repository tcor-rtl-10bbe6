// tb_tcor_top: end-to-end test of the tiling-engine memory subsystem.
//
// Frame 1 is the three-primitive example on a 3x3 tile grid, scanline order:
// primitive 0 covers tile 2, primitive 1 tiles 0, 1, 4, 5, primitive 2 tiles
// 3, 6, 7, 8, three attributes each, in an Attribute Cache with room for two
// primitives (all three IDs fall in one set). Expected from OPT, by hand:
// the third write bypasses, eight reads hit, the tile-3 read misses and evicts
// the dirty first primitive.
// Frame 2 bins 70 random primitives (1..3 attributes) into small caches and a
// small L2, with tile lists capped at 24 so that they overflow, while other L1
// traffic (non-Parameter-Buffer reads and writes) runs on the external port.
// A slow Rasterizer model drains the output queue, checks that every tile's
// primitives arrive in binning order with the attributes the binner sent, and
// releases them. Every mechanism of the design is counted and must occur.
module tb_tcor_top;
  import tcor_pkg::*;
  localparam int NT = 9, MAXP = 24, PW = 3;
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
  int n_reads, n_writes;

  tcor_top #(
    .NUM_TILES(NT), .PLC_SETS(2), .PLC_WAYS(2), .AC_SETS(2), .AC_WAYS(2), .AC_ENTRIES(8),
    .L2_SETS(4), .L2_WAYS(2), .L2_HIT_LAT(12), .QDEPTH(2), .MAX_PRIMS_PER_TILE(MAXP)
  ) dut (.clk, .rst_n, .pb_lists_ptr(24'h1000), .pb_attr_ptr(24'h4000), .*);

  tb_main_memory #(.LAT_MIN(50), .LAT_MAX(100)) mem (
    .clk, .rst_n, .req_valid(mem_req_valid), .req_ready(mem_req_ready), .we(mem_we),
    .addr(mem_addr), .wdata(mem_wdata), .resp_valid(mem_resp_valid), .rdata(mem_rdata),
    .n_reads, .n_writes);

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input logic ok);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s @%0t", what, $time); end
  endtask

  // ---- event counters ----
  localparam int NEV = $bits(tcor_events_t);
  int evc [NEV];
  always @(posedge clk) if (rst_n) for (int i = 0; i < NEV; i++) evc[i] += int'(ev[i]);
  function automatic int cnt_of(string name);
    tcor_events_t e;
    e = '0;
    case (name)
      "ac_hit": e.ac_hit = 1;  "ac_miss": e.ac_miss = 1;  "ac_bypass": e.ac_bypass = 1;
      "ac_evict": e.ac_evict = 1;  "ac_writeback": e.ac_writeback = 1;
      "ac_space_evict": e.ac_space_evict = 1;  "ac_lock_stall": e.ac_lock_stall = 1;
      "plc_hit": e.plc_hit = 1;  "plc_miss": e.plc_miss = 1;  "plc_writeback": e.plc_writeback = 1;
      "l2_hit": e.l2_hit = 1;  "l2_miss": e.l2_miss = 1;  "l2_dead_victim": e.l2_dead_victim = 1;
      "l2_writeback": e.l2_writeback = 1;  "l2_wb_skipped": e.l2_wb_skipped = 1;
      "list_overflow": e.list_overflow = 1;  "queue_stall": e.queue_stall = 1;
      "tile_done": e.tile_done = 1;
      default: ;
    endcase
    for (int i = 0; i < NEV; i++) if (e[i]) return evc[i];
    return -1;
  endfunction

  string names [18] = '{"ac_hit", "ac_miss", "ac_bypass", "ac_evict", "ac_writeback",
    "ac_space_evict", "ac_lock_stall", "plc_hit", "plc_miss", "plc_writeback", "l2_hit",
    "l2_miss", "l2_dead_victim", "l2_writeback", "l2_wb_skipped", "list_overflow",
    "queue_stall", "tile_done"};

  // ---- reference of the frame ----
  int    exp_tile [NT][$];     // primitive numbers per tile, in order
  attr_t attrs    [int][$];    // attributes of each primitive number
  int    lists    [NT];

  function automatic attr_t mk_attr(int p, int k);
    return attr_t'({16'(p), 8'(k), 8'h3C}) * 384'h1_0000_0001_0000_0001 + attr_t'(p * 31 + k);
  endfunction

  task automatic bin(int p, int n, int tl [$]);
    for (int k = 0; k < n; k++) attrs[p].push_back(mk_attr(p, k));
    foreach (tl[j]) if (lists[tl[j]] < MAXP) begin
      exp_tile[tl[j]].push_back(p); lists[tl[j]]++;
    end
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

  // ---- Rasterizer model: slow, checks order and attributes, releases ----
  int got_tile, got_idx, slow;
  logic paused = 1'b0;
  int delivered;
  initial begin
    rq_ready = 0; rs_ptr = 0; rs_release = 0; rs_release_ptr = 0;
    forever begin
      @(negedge clk);
      rq_ready = 0;
      if (rq_valid && !paused && $urandom_range(0, 99) < 100 - slow) begin
        logic [PW-1:0] p, head;
        int prim;
        rq_ready = 1;
        head = rq_abp;
        @(negedge clk);
        rq_ready = 0;
        while (got_tile < NT && got_idx >= exp_tile[got_tile].size()) begin
          got_tile++; got_idx = 0;
        end
        prim = (got_tile < NT) ? exp_tile[got_tile][got_idx] : -1;
        got_idx++;
        delivered++;
        p = head;
        for (int k = 0; k < attrs[prim].size(); k++) begin
          rs_ptr = p; #1;
          check($sformatf("tile %0d primitive %0d attribute %0d", got_tile, prim, k),
                rs_data == attrs[prim][k]);
          p = rs_next;
          @(negedge clk);
        end
        rs_release = 1; rs_release_ptr = head;
        @(negedge clk);
        rs_release = 0;
      end
    end
  end

  // ---- other L1 caches on the external port ----
  line_t ext_ref [addr_t];
  logic  ext_on;
  int    ext_checked;
  initial begin
    ext_req_valid = 0; ext_req = '0; ext_checked = 0;
    forever begin
      @(negedge clk);
      if (ext_on && $urandom_range(0, 199) == 0) begin
        addr_t a; logic we; line_t d;
        a = 24'h9000 + addr_t'($urandom_range(0, 11));
        we = 1'($urandom);
        for (int i = 0; i < 16; i++) d[i*32 +: 32] = $urandom;
        ext_req_valid = 1; ext_req.we = we; ext_req.addr = a; ext_req.wdata = d; ext_req.pb = PB_NONE;
        @(posedge clk); while (!ext_req_ready) @(posedge clk);
        @(negedge clk); ext_req_valid = 0;
        while (!ext_resp_valid) @(posedge clk);
        if (we) ext_ref[a] = d;
        else begin
          check("external read data", ext_resp_data == (ext_ref.exists(a) ? ext_ref[a] : mem.peek(a)));
          ext_checked++;
        end
      end
    end
  end

  task automatic new_frame();
    @(negedge clk); frame_start = 1; @(negedge clk); frame_start = 0;
    for (int t = 0; t < NT; t++) begin exp_tile[t].delete(); lists[t] = 0; end
    attrs.delete();
    got_tile = 0; got_idx = 0; delivered = 0;
  endtask

  task automatic fetch(output int total);
    @(negedge clk); fetch_start = 1; @(negedge clk); fetch_start = 0;
    while (!fetch_done) @(posedge clk);
    total = 0;
    for (int t = 0; t < NT; t++) total += exp_tile[t].size();
    while (delivered < total) @(posedge clk);
    repeat (20) @(posedge clk);
  endtask

  initial begin
    int total, h0, m0, b0, w0, t0;
    frame_start = 0; fetch_start = 0; prim_valid = 0; tile_valid = 0; attr_valid = 0;
    prim_num_attr = 0; tile_id = 0; tile_last = 0; attr_data = 0; ext_on = 0; slow = 0;
    for (int i = 0; i < NEV; i++) evc[i] = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    // ---- frame 1: the example ----
    new_frame();
    bin(0, 3, '{2});
    bin(1, 3, '{0, 1, 4, 5});
    bin(2, 3, '{3, 6, 7, 8});
    check("example: third write bypassed", cnt_of("ac_bypass") == 1);
    h0 = cnt_of("ac_hit"); m0 = cnt_of("ac_miss"); w0 = cnt_of("ac_writeback");
    t0 = cnt_of("tile_done");
    fetch(total);
    check("example: 9 primitives delivered", delivered == 9);
    check("example: 8 hits", cnt_of("ac_hit") - h0 == 8);
    check("example: 1 miss", cnt_of("ac_miss") - m0 == 1);
    check("example: dirty first primitive written back", cnt_of("ac_writeback") - w0 == 1);
    check("example: 9 tiles done", cnt_of("tile_done") - t0 == 9 && tiles_done == 9);
    // ---- frame 2: random primitives, external traffic, slow Rasterizer ----
    new_frame();
    ext_on = 1;
    for (int p = 0; p < 70; p++) begin
      int tl [$];
      tl.delete();
      for (int t = 0; t < NT; t++) if ($urandom_range(0, 99) < ((t == 4) ? 60 : 20)) tl.push_back(t);
      if (tl.size() == 0) tl.push_back($urandom_range(0, NT - 1));
      bin(p, $urandom_range(1, 3), tl);
    end
    slow = 90;
    // the Rasterizer stops for a while: the queue fills and cached lines stay locked
    paused = 1'b1;
    fork begin repeat (3000) @(posedge clk); paused = 1'b0; end join_none
    fetch(total);
    check("frame 2: all primitives delivered", delivered == total && got_tile >= NT - 1);
    ext_on = 0;
    repeat (200) @(posedge clk);
    check("external reads checked", ext_checked > 0);
    foreach (names[i]) begin
      checks++;
      if (cnt_of(names[i]) <= 0) begin
        failures++;
        $display("FAIL mechanism never happened: %s", names[i]);
      end
    end
    foreach (names[i]) $write("%s=%0d ", names[i], cnt_of(names[i]));
    $display("");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
