// primitive_list_cache: the PB-Lists half of the split Tile Cache.
//
// A conventional write-back, write-allocate, set-associative cache with LRU
// replacement and 64-byte lines, each line holding 16 PMDs of 32 bits. The
// Polygon List Builder writes single PMDs into it; the Tile Fetcher reads them
// back. Requests name a block address and a PMD slot (0..15).
//
// One request at a time: for a hit, resp_valid is high in the second cycle
// after the one in which the request is accepted (one lookup cycle). A miss first writes the LRU victim back to the L2 if it is dirty,
// then reads the block from the L2 and retries. L2 requests carry the
// PB-Lists section tag. Replacement state is an age per way (0 = most recently
// used); the victim is an invalid way, else the oldest. LRU and the line size
// follow the document; the 4-way 16 KiB geometry is taken from the evaluated
// configuration, the rest is this design's choice.
module primitive_list_cache
  import tcor_pkg::*;
#(
  parameter int SETS = 64,
  parameter int WAYS = 4,
  localparam int SW  = $clog2(SETS),
  localparam int WW  = $clog2(WAYS)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          req_valid,
  output logic          req_ready,
  input  logic          req_we,
  input  addr_t         req_addr,
  input  logic [3:0]    req_slot,
  input  logic [31:0]   req_wdata,
  output logic          resp_valid,
  output logic [31:0]   resp_rdata,
  output logic          l2_req_valid,
  input  logic          l2_req_ready,
  output l2_req_t       l2_req,
  input  logic          l2_resp_valid,
  input  line_t         l2_resp_data,
  output logic          ev_hit,
  output logic          ev_miss,
  output logic          ev_writeback
);
  localparam int LINES = SETS * WAYS;
  localparam int TW    = ADDR_W - SW;

  typedef enum logic [2:0] {S_IDLE, S_LOOK, S_WB, S_WB_WAIT, S_FILL, S_FILL_WAIT} state_e;
  state_e state_q;

  logic [LINES-1:0] v_q, d_q;
  logic [TW-1:0]    tag_q  [LINES];
  logic [WW-1:0]    age_q  [LINES];
  line_t            data_q [LINES];

  logic          we_q;
  addr_t         addr_q;
  logic [3:0]    slot_q;
  logic [31:0]   wdata_q;
  logic [WW-1:0] vic_q;

  logic [SW-1:0] set;
  logic [TW-1:0] tag;
  assign set = addr_q[SW-1:0];
  assign tag = addr_q[ADDR_W-1:SW];

  function automatic int li(input logic [SW-1:0] s, input logic [WW-1:0] w);
    return int'(s) * WAYS + int'(w);
  endfunction

  logic          hit;
  logic [WW-1:0] hit_way, vic_way;
  always_comb begin
    hit = 1'b0; hit_way = '0; vic_way = '0;
    for (int w = 0; w < WAYS; w++)
      if (v_q[li(set, WW'(w))] && tag_q[li(set, WW'(w))] == tag && !hit) begin
        hit = 1'b1; hit_way = WW'(w);
      end
    for (int w = WAYS-1; w >= 0; w--)
      if (age_q[li(set, WW'(w))] == WW'(WAYS-1)) vic_way = WW'(w);
    for (int w = WAYS-1; w >= 0; w--)
      if (!v_q[li(set, WW'(w))]) vic_way = WW'(w);
  end

  assign req_ready = (state_q == S_IDLE);

  always_comb begin
    l2_req_valid = 1'b0;
    l2_req       = '0;
    l2_req.pb    = PB_LISTS;
    case (state_q)
      S_WB: begin
        l2_req_valid = 1'b1;
        l2_req.we    = 1'b1;
        l2_req.addr  = {tag_q[li(set, vic_q)], set};
        l2_req.wdata = data_q[li(set, vic_q)];
      end
      S_FILL: begin
        l2_req_valid = 1'b1;
        l2_req.addr  = addr_q;
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= S_IDLE;
      v_q <= '0; d_q <= '0;
      for (int i = 0; i < LINES; i++) begin
        tag_q[i] <= '0;
        age_q[i] <= WW'(i % WAYS);
      end
      we_q <= 1'b0; addr_q <= '0; slot_q <= '0; wdata_q <= '0; vic_q <= '0;
      resp_valid <= 1'b0; resp_rdata <= '0;
      ev_hit <= 1'b0; ev_miss <= 1'b0; ev_writeback <= 1'b0;
    end else begin
      resp_valid <= 1'b0;
      ev_hit <= 1'b0; ev_miss <= 1'b0; ev_writeback <= 1'b0;
      case (state_q)
        S_IDLE: if (req_valid) begin
          we_q <= req_we; addr_q <= req_addr; slot_q <= req_slot; wdata_q <= req_wdata;
          state_q <= S_LOOK;
        end
        S_LOOK: begin
          if (hit) begin
            for (int w = 0; w < WAYS; w++)
              if (age_q[li(set, WW'(w))] < age_q[li(set, hit_way)])
                age_q[li(set, WW'(w))] <= age_q[li(set, WW'(w))] + 1'b1;
            age_q[li(set, hit_way)] <= '0;
            if (we_q) begin
              data_q[li(set, hit_way)][slot_q*32 +: 32] <= wdata_q;
              d_q[li(set, hit_way)] <= 1'b1;
            end
            resp_rdata <= data_q[li(set, hit_way)][slot_q*32 +: 32];
            resp_valid <= 1'b1;
            ev_hit     <= 1'b1;
            state_q    <= S_IDLE;
          end else begin
            ev_miss <= 1'b1;
            vic_q   <= vic_way;
            if (v_q[li(set, vic_way)] && d_q[li(set, vic_way)]) begin
              ev_writeback <= 1'b1;
              state_q <= S_WB;
            end else begin
              state_q <= S_FILL;
            end
          end
        end
        S_WB: if (l2_req_ready) state_q <= S_WB_WAIT;
        S_WB_WAIT: if (l2_resp_valid) state_q <= S_FILL;
        S_FILL: if (l2_req_ready) state_q <= S_FILL_WAIT;
        S_FILL_WAIT: if (l2_resp_valid) begin
          data_q[li(set, vic_q)] <= l2_resp_data;
          tag_q[li(set, vic_q)]  <= tag;
          v_q[li(set, vic_q)]    <= 1'b1;
          d_q[li(set, vic_q)]    <= 1'b0;
          state_q <= S_LOOK;
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end
endmodule
