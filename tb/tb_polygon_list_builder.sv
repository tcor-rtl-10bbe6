// tb_polygon_list_builder: random primitives over 8 tiles, with tile lists
// capped at 20 entries so that lists overflow. The testbench plays the
// Primitive List Cache and the Attribute Cache and compares every PMD write
// (interleaved address, slot, Primitive ID, attribute count, OPT Number = next
// overlapped tile or all ones), every attribute write header (OPT Number =
// first tile, last tile) and every attribute with a reference model, and the
// final list lengths on the count port.
module tb_polygon_list_builder;
  import tcor_pkg::*;
  localparam int NT = 8, MAXP = 20;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic frame_start, prim_valid, prim_ready, tile_valid, tile_ready, tile_last;
  logic attr_valid, attr_ready;
  logic [NATTR_W-1:0] prim_num_attr;
  tile_t tile_id;
  attr_t attr_data;
  logic plc_req_valid, plc_req_ready, plc_resp_valid;
  addr_t plc_req_addr;
  logic [3:0] plc_req_slot;
  logic [31:0] plc_req_wdata;
  logic ac_wr_valid, ac_wr_ready, ac_wd_valid, ac_wd_ready, ac_wr_done;
  logic [PRIM_W-1:0] ac_wr_prim_id;
  logic [NATTR_W-1:0] ac_wr_num_attr;
  tile_t ac_wr_opt, ac_wr_last_tile, cnt_tile;
  attr_t ac_wd_data;
  logic [4:0] cnt_q;
  logic ev_list_overflow, ev_prim_done;

  polygon_list_builder #(.NUM_TILES(NT), .MAX_PRIMS_PER_TILE(MAXP)) dut (
    .clk, .rst_n, .pb_lists_ptr(24'h100), .*);

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

  typedef struct { addr_t a; int slot; logic [31:0] d; } pmdw_t;
  typedef struct { int id; int n; int opt; int last; } hdr_t;
  pmdw_t exp_pmd [$];
  hdr_t  exp_hdr [$];
  attr_t exp_attr [$];
  int    overflows, exp_overflows;

  // Primitive List Cache model: answer one cycle after the request
  logic plc_pend;
  assign plc_req_ready = !plc_pend;
  always @(posedge clk) begin
    plc_resp_valid <= plc_pend;
    plc_pend <= 1'b0;
    if (rst_n && plc_req_valid && plc_req_ready) begin
      pmdw_t e;
      plc_pend <= 1'b1;
      e = exp_pmd.pop_front();
      check("PMD address", plc_req_addr == e.a && int'(plc_req_slot) == e.slot);
      check("PMD contents", plc_req_wdata == e.d);
    end
  end

  // Attribute Cache model
  int ac_left;
  assign ac_wr_ready = (ac_left == 0);
  logic rnd_ready;
  always @(negedge clk) rnd_ready <= 1'($urandom);
  assign ac_wd_ready = (ac_left > 0) && rnd_ready;
  always @(posedge clk) begin
    ac_wr_done <= 1'b0;
    if (rst_n && ac_wr_valid && ac_wr_ready) begin
      hdr_t h;
      h = exp_hdr.pop_front();
      check("attribute header", int'(ac_wr_prim_id) == h.id && int'(ac_wr_num_attr) == h.n &&
            int'(ac_wr_opt) == h.opt && int'(ac_wr_last_tile) == h.last);
      ac_left <= h.n;
    end
    if (rst_n && ac_wd_valid && ac_wd_ready) begin
      check("attribute data", ac_wd_data == exp_attr.pop_front());
      ac_left <= ac_left - 1;
      if (ac_left == 1) ac_wr_done <= 1'b1;
    end
    if (rst_n) overflows += int'(ev_list_overflow);
  end

  int cnt [NT];
  int next_id;

  task automatic send_prim(int n, int tl [$]);
    attr_t mine [$];
    for (int j = 0; j < tl.size(); j++) begin
      int opt;
      opt = (j + 1 < tl.size()) ? tl[j+1] : 4095;
      if (cnt[tl[j]] < MAXP) begin
        exp_pmd.push_back('{24'h100 + addr_t'((cnt[tl[j]] / 16) * NT + tl[j]), cnt[tl[j]] % 16,
                           {16'(next_id), 4'(n), 12'(opt)}});
        cnt[tl[j]]++;
      end else exp_overflows++;
    end
    exp_hdr.push_back('{next_id, n, tl[0], tl[tl.size()-1]});
    for (int k = 0; k < n; k++) mine.push_back(attr_t'({$urandom, $urandom, $urandom}));
    exp_attr = {exp_attr, mine};
    @(negedge clk);
    prim_valid = 1; prim_num_attr = 4'(n);
    @(posedge clk); while (!prim_ready) @(posedge clk);
    @(negedge clk); prim_valid = 0;
    for (int j = 0; j < tl.size(); j++) begin
      tile_valid = 1; tile_id = 12'(tl[j]); tile_last = (j == tl.size() - 1);
      @(posedge clk); while (!tile_ready) @(posedge clk);
      @(negedge clk);
    end
    tile_valid = 0;
    for (int k = 0; k < n; k++) begin
      attr_valid = 1; attr_data = mine[k];
      @(posedge clk); while (!attr_ready) @(posedge clk);
      @(negedge clk);
    end
    attr_valid = 0;
    while (!ev_prim_done) @(posedge clk);
    next_id += n;
  endtask

  initial begin
    frame_start = 0; prim_valid = 0; tile_valid = 0; attr_valid = 0; tile_id = 0; tile_last = 0;
    attr_data = 0; prim_num_attr = 0; cnt_tile = 0; plc_pend = 0; ac_left = 0;
    overflows = 0; exp_overflows = 0; next_id = 0;
    for (int t = 0; t < NT; t++) cnt[t] = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    @(negedge clk); frame_start = 1; @(negedge clk); frame_start = 0;
    for (int p = 0; p < 40; p++) begin
      int tl [$];
      tl.delete();
      for (int t = 0; t < NT; t++) if ($urandom_range(0, 99) < ((t == 0) ? 80 : 30)) tl.push_back(t);
      if (tl.size() == 0) tl.push_back($urandom_range(0, NT - 1));
      send_prim($urandom_range(1, 3), tl);
    end
    repeat (3) @(posedge clk);
    check("all PMDs written", exp_pmd.size() == 0 && exp_hdr.size() == 0 && exp_attr.size() == 0);
    check("overflow flagged", overflows == exp_overflows && overflows > 0);
    for (int t = 0; t < NT; t++) begin
      cnt_tile = 12'(t); #1;
      check("list length", int'(cnt_q) == cnt[t]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
