// l2_cache: the shared L2, extended with TCOR dead-line replacement.
//
// A write-back set-associative cache of 64-byte blocks (default 1 MiB,
// 8 ways, 12-cycle hit latency). Besides tag, valid and dirty, every line
// keeps a 2-bit field saying whether it holds PB-Lists, PB-Attributes or other
// data, and a 12-bit field with the ID of the last tile that will read it:
//   PB-Lists       - the tile that owns the block, derived from the address as
//                    (addr - pb_lists_ptr) mod NUM_TILES (tile lists are stored
//                    interleaved, one block per tile per section);
//   PB-Attributes  - taken from bits [395:384] of the block, where the
//                    Polygon List Builder placed it.
// A counter of finished tiles is cleared by frame_start and incremented by
// every tile_done pulse from the Tile Fetcher. A Parameter Buffer line whose
// last tile is below this count is dead. The victim is chosen by
// l2_victim_select (invalid, dead, non-PB, live PB; LRU inside a class). A dead
// victim is dropped without write-back even when dirty.
//
// Requests are whole-block reads or writes, one at a time. A hit answers
// HIT_LAT cycles after the request is accepted: counting the clock edge that
// accepts it as edge 0, resp_valid is first seen high at edge HIT_LAT
// (HIT_LAT must be at least 3). A read miss writes the
// victim back if needed and fetches the block from main memory; a write miss
// allocates without fetching because every write covers the whole block.
// Memory writes complete when accepted; memory reads answer with mem_resp_valid.
// Fields, dead-line rule and priorities follow the document; the section tag
// travelling with each request and the blocking controller are this design's
// choices.
module l2_cache
  import tcor_pkg::*;
#(
  parameter int SETS      = 2048,
  parameter int WAYS      = 8,
  parameter int HIT_LAT   = 12,
  parameter int NUM_TILES = 1488,
  localparam int SW = $clog2(SETS),
  localparam int WW = $clog2(WAYS)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  addr_t         pb_lists_ptr,
  input  logic          frame_start,
  input  logic          tile_done,
  // client port
  input  logic          req_valid,
  output logic          req_ready,
  input  l2_req_t       req,
  output logic          resp_valid,
  output line_t         resp_data,
  // main memory
  output logic          mem_req_valid,
  input  logic          mem_req_ready,
  output logic          mem_we,
  output addr_t         mem_addr,
  output line_t         mem_wdata,
  input  logic          mem_resp_valid,
  input  line_t         mem_rdata,
  // status and events
  output logic [TILE_W:0] tiles_done,
  output logic          ev_hit,
  output logic          ev_miss,
  output logic          ev_dead_victim,
  output logic          ev_writeback,
  output logic          ev_wb_skipped
);
  localparam int LINES = SETS * WAYS;
  localparam int TW    = ADDR_W - SW;

  typedef enum logic [2:0] {S_IDLE, S_LOOK, S_HOLD, S_WB, S_FILL, S_FILL_WAIT} state_e;
  state_e state_q;
  logic   retry_q;   // back in S_LOOK after a victim write-back

  logic [LINES-1:0] v_q, d_q;
  logic [TW-1:0]    tag_q  [LINES];
  logic [WW-1:0]    age_q  [LINES];
  pb_type_e         pb_q   [LINES];
  tile_t            last_q [LINES];
  line_t            data_q [LINES];

  l2_req_t        r_q;
  logic [WW-1:0]  way_q;
  logic [7:0]     lat_q;
  logic [TILE_W:0] done_q;

  logic [SW-1:0]  set;
  logic [TW-1:0]  tag;
  assign set = r_q.addr[SW-1:0];
  assign tag = r_q.addr[ADDR_W-1:SW];
  assign tiles_done = done_q;

  function automatic int li(input logic [SW-1:0] s, input logic [WW-1:0] w);
    return int'(s) * WAYS + int'(w);
  endfunction

  // last reading tile of a block
  function automatic tile_t last_tile_of(input pb_type_e t, input addr_t a, input line_t d,
                                         input addr_t lists_ptr);
    if (t == PB_LISTS) return tile_t'((a - lists_ptr) % addr_t'(NUM_TILES));
    if (t == PB_ATTRS) return d[LAST_TILE_LSB +: TILE_W];
    return '0;
  endfunction

  // set view
  logic          hit;
  logic [WW-1:0] hit_way, vic_way;
  logic          vic_dead;
  logic [WAYS-1:0] sv_v, sv_dead;
  pb_type_e      sv_pb   [WAYS];
  tile_t         sv_last [WAYS];
  logic [WW-1:0] sv_age  [WAYS];

  always_comb begin
    hit = 1'b0; hit_way = '0;
    for (int w = 0; w < WAYS; w++) begin
      sv_v[w]    = v_q[li(set, WW'(w))];
      sv_pb[w]   = pb_q[li(set, WW'(w))];
      sv_last[w] = last_q[li(set, WW'(w))];
      sv_age[w]  = age_q[li(set, WW'(w))];
      if (sv_v[w] && tag_q[li(set, WW'(w))] == tag && !hit) begin
        hit = 1'b1; hit_way = WW'(w);
      end
    end
  end

  l2_victim_select #(.WAYS(WAYS)) u_vic (
    .valid(sv_v), .pb(sv_pb), .last_tile(sv_last), .age(sv_age), .tiles_done(done_q),
    .victim(vic_way), .victim_dead(vic_dead), .dead(sv_dead));

  assign req_ready = (state_q == S_IDLE);

  always_comb begin
    mem_req_valid = 1'b0;
    mem_we        = 1'b0;
    mem_addr      = r_q.addr;
    mem_wdata     = data_q[li(set, way_q)];
    case (state_q)
      S_WB: begin
        mem_req_valid = 1'b1;
        mem_we        = 1'b1;
        mem_addr      = {tag_q[li(set, way_q)], set};
      end
      S_FILL: mem_req_valid = 1'b1;
      default: ;
    endcase
  end

  // touch way w of the current set: make it most recent
  task automatic touch(input logic [WW-1:0] w);
    for (int i = 0; i < WAYS; i++)
      if (age_q[li(set, WW'(i))] < age_q[li(set, w)])
        age_q[li(set, WW'(i))] <= age_q[li(set, WW'(i))] + 1'b1;
    age_q[li(set, w)] <= '0;
  endtask

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= S_IDLE;
      retry_q <= 1'b0;
      v_q <= '0; d_q <= '0;
      for (int i = 0; i < LINES; i++) begin
        tag_q[i]  <= '0;
        age_q[i]  <= WW'(i % WAYS);
        pb_q[i]   <= PB_NONE;
        last_q[i] <= '0;
      end
      r_q <= '0; way_q <= '0; lat_q <= '0; done_q <= '0;
      resp_valid <= 1'b0; resp_data <= '0;
      ev_hit <= 1'b0; ev_miss <= 1'b0; ev_dead_victim <= 1'b0;
      ev_writeback <= 1'b0; ev_wb_skipped <= 1'b0;
    end else begin
      resp_valid <= 1'b0;
      ev_hit <= 1'b0; ev_miss <= 1'b0; ev_dead_victim <= 1'b0;
      ev_writeback <= 1'b0; ev_wb_skipped <= 1'b0;
      if (frame_start)    done_q <= '0;
      else if (tile_done) done_q <= done_q + 1'b1;
      case (state_q)
        S_IDLE: if (req_valid) begin
          r_q     <= req;
          retry_q <= 1'b0;
          state_q <= S_LOOK;
        end
        S_LOOK: begin
          if (hit) begin
            ev_hit <= 1'b1;
            way_q  <= hit_way;
            touch(hit_way);
            if (r_q.we) begin
              data_q[li(set, hit_way)] <= r_q.wdata;
              d_q[li(set, hit_way)]    <= 1'b1;
              pb_q[li(set, hit_way)]   <= r_q.pb;
              last_q[li(set, hit_way)] <= last_tile_of(r_q.pb, r_q.addr, r_q.wdata, pb_lists_ptr);
            end
            lat_q   <= 8'(HIT_LAT - 3);
            state_q <= S_HOLD;
          end else begin
            ev_miss        <= !retry_q;   // count a miss once, not again after its write-back
            way_q          <= vic_way;
            ev_dead_victim <= vic_dead;
            if (v_q[li(set, vic_way)] && d_q[li(set, vic_way)]) begin
              if (vic_dead) begin
                ev_wb_skipped <= 1'b1;
              end else begin
                ev_writeback <= 1'b1;
              end
            end
            if (v_q[li(set, vic_way)] && d_q[li(set, vic_way)] && !vic_dead)
              state_q <= S_WB;
            else if (r_q.we) begin
              // whole-block write: allocate without fetching
              touch(vic_way);
              data_q[li(set, vic_way)] <= r_q.wdata;
              tag_q[li(set, vic_way)]  <= tag;
              v_q[li(set, vic_way)]    <= 1'b1;
              d_q[li(set, vic_way)]    <= 1'b1;
              pb_q[li(set, vic_way)]   <= r_q.pb;
              last_q[li(set, vic_way)] <= last_tile_of(r_q.pb, r_q.addr, r_q.wdata, pb_lists_ptr);
              lat_q   <= 8'(HIT_LAT - 3);
              state_q <= S_HOLD;
            end else begin
              v_q[li(set, vic_way)] <= 1'b0;
              state_q <= S_FILL;
            end
          end
        end
        S_WB: if (mem_req_ready) begin
          v_q[li(set, way_q)] <= 1'b0;
          d_q[li(set, way_q)] <= 1'b0;
          retry_q <= 1'b1;
          state_q <= S_LOOK;     // retry: the freed way is now the victim
        end
        S_FILL: if (mem_req_ready) state_q <= S_FILL_WAIT;
        S_FILL_WAIT: if (mem_resp_valid) begin
          touch(way_q);
          data_q[li(set, way_q)] <= mem_rdata;
          tag_q[li(set, way_q)]  <= tag;
          v_q[li(set, way_q)]    <= 1'b1;
          d_q[li(set, way_q)]    <= 1'b0;
          pb_q[li(set, way_q)]   <= r_q.pb;
          last_q[li(set, way_q)] <= last_tile_of(r_q.pb, r_q.addr, mem_rdata, pb_lists_ptr);
          resp_data  <= mem_rdata;
          resp_valid <= 1'b1;
          state_q    <= S_IDLE;
        end
        S_HOLD: begin
          if (lat_q == '0) begin
            resp_valid <= 1'b1;
            resp_data  <= data_q[li(set, way_q)];
            state_q    <= S_IDLE;
          end else begin
            lat_q <= lat_q - 1'b1;
          end
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end
endmodule
