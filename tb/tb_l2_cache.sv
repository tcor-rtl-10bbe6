// tb_l2_cache: data, latency and TCOR replacement of the L2.
//
// A small L2 (4 sets, 2 ways, 12-cycle hits, 8 tiles) over the memory model.
// 1. random whole-block reads and writes against a reference;
// 2. a hit answers 12 cycles after acceptance (the document's L2 latency);
// 3. a dead PB-Attributes line (last tile 2, three tiles finished) is chosen
//    before an older non-PB line and dropped without write-back;
// 4. a non-PB line is chosen before an older live PB-Lists line;
// 5. once its tile (taken from the address) is finished the PB-Lists line is
//    dead and dropped without write-back.
module tb_l2_cache;
  import tcor_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic frame_start, tile_done, req_valid, req_ready, resp_valid;
  l2_req_t req;
  line_t resp_data;
  logic mem_req_valid, mem_req_ready, mem_we, mem_resp_valid;
  addr_t mem_addr;
  line_t mem_wdata, mem_rdata;
  logic [TILE_W:0] tiles_done;
  logic ev_hit, ev_miss, ev_dead_victim, ev_writeback, ev_wb_skipped;
  int n_reads, n_writes, skipped, deadv;

  l2_cache #(.SETS(4), .WAYS(2), .HIT_LAT(12), .NUM_TILES(8)) dut (
    .clk, .rst_n, .pb_lists_ptr(24'h100), .*);
  tb_main_memory #(.LAT_MIN(5), .LAT_MAX(10)) mem (
    .clk, .rst_n, .req_valid(mem_req_valid), .req_ready(mem_req_ready), .we(mem_we),
    .addr(mem_addr), .wdata(mem_wdata), .resp_valid(mem_resp_valid), .rdata(mem_rdata),
    .n_reads, .n_writes);

  always @(posedge clk) if (rst_n) begin
    skipped += int'(ev_wb_skipped); deadv += int'(ev_dead_victim);
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input logic ok);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s @%0t", what, $time); end
  endtask

  line_t ref_mem [addr_t];
  function automatic line_t ref_rd(addr_t a);
    return ref_mem.exists(a) ? ref_mem[a] : mem.pattern(a);
  endfunction

  task automatic access(logic we, addr_t a, line_t d, pb_type_e pb, output line_t q, output int cyc);
    int t0;
    @(negedge clk);
    req_valid = 1; req.we = we; req.addr = a; req.wdata = d; req.pb = pb;
    @(posedge clk); while (!req_ready) @(posedge clk);
    t0 = $time;
    @(negedge clk); req_valid = 0;
    while (!resp_valid) @(posedge clk);
    cyc = (int'($time) - t0) / 10;
    q = resp_data;
    if (we) ref_mem[a] = d;
  endtask

  task automatic tiles(int n);
    repeat (n) begin
      @(negedge clk); tile_done = 1;
      @(negedge clk); tile_done = 0;
    end
  endtask

  function automatic line_t rnd_line();
    line_t l;
    for (int i = 0; i < 16; i++) l[i*32 +: 32] = $urandom;
    return l;
  endfunction

  initial begin
    line_t q, d; int cyc, w0, h0;
    frame_start = 0; tile_done = 0; req_valid = 0; req = '0; skipped = 0; deadv = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    // 1. random traffic on non-PB blocks
    for (int n = 0; n < 1500; n++) begin
      addr_t a; logic we;
      a = addr_t'($urandom_range(0, 15)) + 24'h800; we = 1'($urandom);
      if (we) access(1, a, rnd_line(), PB_NONE, q, cyc);
      else begin
        access(0, a, '0, PB_NONE, q, cyc);
        check("read data", q == ref_rd(a));
      end
    end
    // 2. hit latency
    access(0, 24'h800, '0, PB_NONE, q, cyc);
    access(0, 24'h800, '0, PB_NONE, q, cyc);
    check("read hit latency 12", cyc == 12);
    access(1, 24'h800, rnd_line(), PB_NONE, q, cyc);
    check("write hit latency 12", cyc == 12);
    // 3. dead line first (set 0)
    @(negedge clk); frame_start = 1; @(negedge clk); frame_start = 0;
    access(1, 24'h1000, rnd_line(), PB_NONE, q, cyc);          // B, older, non-PB
    d = rnd_line(); d[LAST_TILE_LSB +: TILE_W] = 12'd2;
    access(1, 24'h1004, d, PB_ATTRS, q, cyc);                   // A, last tile 2
    tiles(3);
    check("three tiles counted", tiles_done == 3);
    w0 = n_writes;
    access(1, 24'h1008, rnd_line(), PB_NONE, q, cyc);          // needs a victim
    check("dead victim", deadv == 1);
    check("dead line not written back", n_writes == w0 && skipped == 1);
    h0 = n_reads;
    access(0, 24'h1000, '0, PB_NONE, q, cyc);
    check("older non-PB line kept", n_reads == h0 && q == ref_rd(24'h1000));
    // 4. non-PB before live PB (set 1); PB-Lists block 0x105 belongs to tile 5
    access(1, 24'h105, rnd_line(), PB_LISTS, q, cyc);           // L, older, live
    access(1, 24'h2001, rnd_line(), PB_NONE, q, cyc);           // N
    w0 = n_writes;
    access(1, 24'h3001, rnd_line(), PB_NONE, q, cyc);
    check("non-PB victim written back", n_writes == w0 + 1 && mem.peek(24'h2001) == ref_mem[24'h2001]);
    h0 = n_reads;
    access(0, 24'h105, '0, PB_NONE, q, cyc);
    check("live PB line kept", n_reads == h0 && q == ref_mem[24'h105]);
    // 5. tile 5 finished: the PB-Lists line is dead
    tiles(3);
    access(0, 24'h3001, '0, PB_NONE, q, cyc);                   // make L the LRU way
    w0 = n_writes;
    access(1, 24'h4001, rnd_line(), PB_NONE, q, cyc);
    check("PB-Lists line dead by address", n_writes == w0 && skipped == 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
