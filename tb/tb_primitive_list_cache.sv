// tb_primitive_list_cache: random PMD writes and reads over a block range
// larger than the cache, checked against a reference copy of memory; counts
// misses and dirty write-backs and checks that a hit answers two clock edges after
// it is accepted.
module tb_primitive_list_cache;
  import tcor_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic req_valid, req_ready, req_we, resp_valid;
  addr_t req_addr;
  logic [3:0] req_slot;
  logic [31:0] req_wdata, resp_rdata;
  logic l2_req_valid, l2_req_ready, l2_resp_valid;
  l2_req_t l2_req;
  line_t l2_resp_data;
  logic ev_hit, ev_miss, ev_writeback;
  int n_reads, n_writes, misses, wbs;

  primitive_list_cache #(.SETS(4), .WAYS(2)) dut (.*);
  tb_l2_stub #(.LAT(4)) l2 (
    .clk, .rst_n, .req_valid(l2_req_valid), .req_ready(l2_req_ready), .req(l2_req),
    .resp_valid(l2_resp_valid), .resp_data(l2_resp_data), .n_reads, .n_writes);

  always @(posedge clk) if (rst_n) begin
    misses += int'(ev_miss); wbs += int'(ev_writeback);
    if (l2_req_valid && l2_req_ready && l2_req.pb != PB_LISTS) failures++;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0] ref_mem [addr_t][16];

  function automatic logic [31:0] ref_rd(addr_t a, int s);
    line_t l;
    if (ref_mem.exists(a)) return ref_mem[a][s];
    l = l2.pattern(a);
    return l[s*32 +: 32];
  endfunction

  task automatic access(logic we, addr_t a, int s, logic [31:0] d, output logic [31:0] q, output int cyc);
    int t0;
    @(negedge clk);
    req_valid = 1; req_we = we; req_addr = a; req_slot = 4'(s); req_wdata = d;
    @(posedge clk); while (!req_ready) @(posedge clk);
    t0 = $time;
    @(negedge clk); req_valid = 0;
    while (!resp_valid) @(posedge clk);
    cyc = (int'($time) - t0) / 10;
    q = resp_rdata;
  endtask

  initial begin
    logic [31:0] q; int cyc;
    req_valid = 0; req_we = 0; req_addr = 0; req_slot = 0; req_wdata = 0;
    misses = 0; wbs = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      addr_t a; int s; logic we; logic [31:0] d;
      a = addr_t'($urandom_range(0, 23)) + 24'h200; s = $urandom_range(0, 15);
      we = 1'($urandom); d = $urandom;
      if (we) begin
        logic [31:0] blk [16];
        access(1, a, s, d, q, cyc);
        if (!ref_mem.exists(a)) for (int i = 0; i < 16; i++) blk[i] = ref_rd(a, i);
        else blk = ref_mem[a];
        blk[s] = d;
        ref_mem[a] = blk;
      end else begin
        access(0, a, s, 0, q, cyc);
        checks++;
        if (q !== ref_rd(a, s)) begin
          failures++;
          if (failures < 5) $display("FAIL rd %h.%0d got %h exp %h", a, s, q, ref_rd(a, s));
        end
      end
    end
    // a repeated access is a hit: resp_valid is seen at the second clock edge after acceptance
    access(0, 24'h300, 0, 0, q, cyc);
    access(0, 24'h300, 1, 0, q, cyc);
    checks++; if (cyc != 2) failures++;
    checks++; if (misses == 0 || wbs == 0) failures++;
    $display("misses %0d writebacks %0d", misses, wbs);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
