// tb_attribute_buffer: builds linked lists of random length, writes and reads
// them back through both read ports, checks the free count, the list ends and
// the lock counts, frees lists in random order and reuses the slots.
module tb_attribute_buffer;
  import tcor_pkg::*;
  localparam int E = 32, PW = 5;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic alloc, alloc_link, free, wr_en, lock_inc, lock_dec, rs_valid;
  logic [PW-1:0] alloc_prev, alloc_ptr, free_ptr, free_next, wr_ptr, rd_ptr, rd_next, rs_ptr, rs_next;
  logic [PW-1:0] lock_inc_ptr, lock_dec_ptr;
  logic [PW-1:0] lq_ptr [2];
  logic [1:0] lq_locked;
  logic [PW:0] free_count;
  attr_t wr_data, rd_data, rs_data;

  attribute_buffer #(.ENTRIES(E), .NQ(2)) dut (.*);

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

  function automatic attr_t val(int list, int k);
    return attr_t'({list[15:0], k[15:0]}) * 384'h1_0000_0001 + attr_t'(list * 977 + k);
  endfunction

  int heads [8];
  int lens  [8];
  logic live [8];
  int in_use;

  // allocate a list of n entries and fill it
  task automatic make(int l, int n);
    logic [PW-1:0] prev;
    for (int k = 0; k < n; k++) begin
      alloc = 1; alloc_link = (k != 0); alloc_prev = prev;
      #1;
      if (k == 0) heads[l] = int'(alloc_ptr);
      prev = alloc_ptr;
      wr_en = 1; wr_ptr = alloc_ptr; wr_data = val(l, k);
      @(posedge clk); #1;
      alloc = 0; wr_en = 0;
    end
    lens[l] = n; live[l] = 1; in_use += n;
  endtask

  // walk a list on both ports, check data and the end marker
  task automatic walk(int l);
    logic [PW-1:0] p;
    p = PW'(heads[l]);
    for (int k = 0; k < lens[l]; k++) begin
      rd_ptr = p; rs_ptr = p; #1;
      check("data", rd_data == val(l, k) && rs_data == val(l, k) && rs_valid);
      check("end", (rd_next == p) == (k == lens[l] - 1));
      p = rd_next;
    end
  endtask

  task automatic kill(int l);
    logic [PW-1:0] p;
    logic done;
    p = PW'(heads[l]); done = 0;
    while (!done) begin
      free = 1; free_ptr = p; #1;
      done = (free_next == p);
      p = free_next;
      @(posedge clk); #1;
      free = 0;
    end
    live[l] = 0; in_use -= lens[l];
  endtask

  initial begin
    alloc = 0; alloc_link = 0; alloc_prev = 0; free = 0; free_ptr = 0; wr_en = 0;
    wr_ptr = 0; wr_data = 0; rd_ptr = 0; rs_ptr = 0; lock_inc = 0; lock_dec = 0;
    lock_inc_ptr = 0; lock_dec_ptr = 0; lq_ptr = '{0, 0}; in_use = 0;
    for (int l = 0; l < 8; l++) live[l] = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    @(posedge clk); #1;
    check("reset count", free_count == (PW+1)'(E));
    for (int round = 0; round < 60; round++) begin
      int l;
      l = $urandom_range(0, 7);
      if (live[l]) begin
        walk(l);
        kill(l);
      end else begin
        int n;
        n = $urandom_range(1, 6);
        if (in_use + n <= E) make(l, n);
      end
      check("count", int'(free_count) == E - in_use);
    end
    // locks: count up twice, down twice
    for (int l = 0; l < 8; l++) if (!live[l]) make(l, 1);
    lq_ptr[0] = PW'(heads[0]); lq_ptr[1] = PW'(heads[1]);
    lock_inc = 1; lock_inc_ptr = PW'(heads[0]); @(posedge clk); @(posedge clk); #1;
    lock_inc = 0;
    check("locked", lq_locked == 2'b01);
    lock_dec = 1; lock_dec_ptr = PW'(heads[0]); @(posedge clk); #1;
    check("still locked", lq_locked[0]);
    @(posedge clk); #1; lock_dec = 0;
    check("unlocked", lq_locked == 2'b00);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
