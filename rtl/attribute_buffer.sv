// attribute_buffer: the data half of the Attribute Cache.
//
// ENTRIES slots, each holding one 48-byte attribute, a valid bit, a lock
// count and a pointer to the next attribute of the same primitive. The
// attributes of a primitive form a linked list whose head is the primitive's
// Attribute Buffer Pointer (ABP). Unused slots are chained in a free list.
// A list ends at an entry whose next pointer points to itself, so the pointer
// needs no spare "null" code and stays log2(ENTRIES) bits wide.
//
// Operations (at most one of alloc / free per cycle, checked by an assertion):
//   alloc     pops the free-list head (alloc_ptr, valid when free_count > 0),
//             marks it valid, makes it a list end, and links it behind
//             alloc_prev when alloc_link is set.
//   free      pushes free_ptr back on the free list; free_next tells the caller
//             where that entry's list continued (free_ptr itself at the end).
//   write     stores an attribute.
//   rd_* / rs_*  two combinational read ports: one for the cache controller
//             (write-back), one for the Rasterizer.
//   lock_inc / lock_dec  count uses by the Rasterizer of the list starting at
//             that entry; the cache only locks the first entry of a list.
//   lq_ptr / lq_locked  NQ combinational lock queries for victim selection.
// Linked lists, the free list, valid and lock follow the document; using a
// count instead of a single lock bit lets the same primitive sit in the output
// queue for two consecutive tiles, and is this design's choice. Reset rebuilds
// the free list 0 -> 1 -> ... -> ENTRIES-1 in one cycle.
module attribute_buffer
  import tcor_pkg::*;
#(
  parameter int ENTRIES = 1024,
  parameter int LOCK_W  = 3,
  parameter int NQ      = 4,
  localparam int PW     = $clog2(ENTRIES)
) (
  input  logic          clk,
  input  logic          rst_n,
  // allocation
  input  logic          alloc,
  input  logic          alloc_link,
  input  logic [PW-1:0] alloc_prev,
  output logic [PW-1:0] alloc_ptr,
  output logic [PW:0]   free_count,
  // release
  input  logic          free,
  input  logic [PW-1:0] free_ptr,
  output logic [PW-1:0] free_next,
  // data write
  input  logic          wr_en,
  input  logic [PW-1:0] wr_ptr,
  input  attr_t         wr_data,
  // controller read port
  input  logic [PW-1:0] rd_ptr,
  output attr_t         rd_data,
  output logic [PW-1:0] rd_next,
  // rasterizer read port
  input  logic [PW-1:0] rs_ptr,
  output attr_t         rs_data,
  output logic [PW-1:0] rs_next,
  output logic          rs_valid,
  // locks
  input  logic          lock_inc,
  input  logic [PW-1:0] lock_inc_ptr,
  input  logic          lock_dec,
  input  logic [PW-1:0] lock_dec_ptr,
  input  logic [PW-1:0] lq_ptr    [NQ],
  output logic [NQ-1:0] lq_locked
);
  attr_t              data_q  [ENTRIES];
  logic [PW-1:0]      next_q  [ENTRIES];
  logic [ENTRIES-1:0] valid_q;
  logic [LOCK_W-1:0]  lock_q  [ENTRIES];
  logic [PW-1:0]      head_q;
  logic [PW:0]        count_q;

  assign alloc_ptr  = head_q;
  assign free_count = count_q;
  assign free_next  = next_q[free_ptr];
  assign rd_data    = data_q[rd_ptr];
  assign rd_next    = next_q[rd_ptr];
  assign rs_data    = data_q[rs_ptr];
  assign rs_next    = next_q[rs_ptr];
  assign rs_valid   = valid_q[rs_ptr];

  always_comb
    for (int q = 0; q < NQ; q++) lq_locked[q] = (lock_q[lq_ptr[q]] != '0);

  always_ff @(posedge clk) begin
    if (wr_en) data_q[wr_ptr] <= wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < ENTRIES; i++) begin
        next_q[i] <= (i == ENTRIES-1) ? PW'(i) : PW'(i + 1);
        lock_q[i] <= '0;
      end
      valid_q <= '0;
      head_q  <= '0;
      count_q <= (PW+1)'(ENTRIES);
    end else begin
      if (alloc && count_q != '0) begin
        head_q          <= next_q[head_q];
        next_q[head_q]  <= head_q;            // new list end
        valid_q[head_q] <= 1'b1;
        if (alloc_link) next_q[alloc_prev] <= head_q;
        count_q         <= count_q - 1'b1;
      end else if (free) begin
        // an empty free list is marked by count 0; its head is then don't-care
        next_q[free_ptr]  <= (count_q == '0) ? free_ptr : head_q;
        head_q            <= free_ptr;
        valid_q[free_ptr] <= 1'b0;
        lock_q[free_ptr]  <= '0;
        count_q           <= count_q + 1'b1;
      end
      if (lock_inc && !(lock_dec && lock_dec_ptr == lock_inc_ptr))
        lock_q[lock_inc_ptr] <= lock_q[lock_inc_ptr] + 1'b1;
      if (lock_dec && lock_q[lock_dec_ptr] != '0 &&
          !(lock_inc && lock_dec_ptr == lock_inc_ptr))
        lock_q[lock_dec_ptr] <= lock_q[lock_dec_ptr] - 1'b1;
    end
  end

  a_one_op: assert property (@(posedge clk) disable iff (!rst_n) !(alloc && free));
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) alloc |-> count_q != '0);
endmodule
