// attribute_cache: the PB-Attributes half of the split Tile Cache, with OPT
// replacement.
//
// The cache works at primitive granularity. The Primitive Buffer (SETS x WAYS
// lines, XOR-indexed by Primitive ID) keeps per line: valid, lock, dirty, tag,
// OPT Number, the Attribute Buffer Pointer (ABP) of the primitive's first
// attribute, and the ID of the last tile that reads the primitive. The
// attributes live in the attribute_buffer as a linked list.
//
// Reads (Tile Fetcher, one PMD): on a hit the OPT Number is replaced by the
// request's, the first attribute is locked for the Rasterizer and the ABP is
// returned. On a miss a line is chosen (empty way, else the unlocked way with
// the greatest OPT Number), its primitive evicted, enough free attribute slots
// are made by evicting further primitives with the greatest OPT Number over the
// whole cache, the line is reserved and locked, every attribute is read from
// the L2, and then the ABP is returned. If every way of the set is locked the
// read waits.
// Writes (Polygon List Builder, header then one beat per attribute): the
// request's OPT Number is the first tile that will read it. With an empty way
// the primitive is stored dirty; otherwise the way with the greatest OPT Number
// is evicted only if that number is greater than the request's, else every
// attribute bypasses to the L2 (ties bypass too). A write whose Primitive ID
// is still cached from the previous frame first evicts that stale line and
// reuses its way.
// Eviction writes each attribute of a dirty primitive back to the L2 (block
// pb_attr_ptr + Primitive ID + k, the last-tile ID in bits [395:384]) and
// returns its slots to the free list. The Rasterizer reads attributes through
// rs_* and calls rs_release with the ABP when it is done with a primitive.
//
// The controller handles one request at a time and one L2 access at a time; a
// hit answers two cycles after rd_valid. Reservation of a miss line, the
// evict-or-bypass rule, unlocked-only eviction and dirty write-back follow the
// document. Blocking operation, the whole-cache scan used when the Attribute
// Buffer is short of space (one set per cycle), the stored last-tile ID, and
// the assumption that every primitive has at least one attribute are this
// design's choices.
module attribute_cache
  import tcor_pkg::*;
#(
  parameter int SETS    = 128,
  parameter int WAYS    = 4,
  parameter int ENTRIES = 1024,
  localparam int SW     = $clog2(SETS),
  localparam int WW     = (WAYS > 1) ? $clog2(WAYS) : 1,
  localparam int PW     = $clog2(ENTRIES),
  localparam int TW     = PRIM_W - SW
) (
  input  logic               clk,
  input  logic               rst_n,
  input  addr_t              pb_attr_ptr,
  // Polygon List Builder write: header ...
  input  logic               wr_valid,
  output logic               wr_ready,
  input  logic [PRIM_W-1:0]  wr_prim_id,
  input  logic [NATTR_W-1:0] wr_num_attr,
  input  tile_t              wr_opt,
  input  tile_t              wr_last_tile,
  // ... then one attribute per beat
  input  logic               wd_valid,
  output logic               wd_ready,
  input  attr_t              wd_data,
  output logic               wr_done,
  // Tile Fetcher read
  input  logic               rd_valid,
  output logic               rd_ready,
  input  pmd_t               rd_pmd,
  output logic               rd_done,
  output logic [PW-1:0]      rd_abp,
  // Rasterizer
  input  logic [PW-1:0]      rs_ptr,
  output attr_t              rs_data,
  output logic [PW-1:0]      rs_next,
  input  logic               rs_release,
  input  logic [PW-1:0]      rs_release_ptr,
  // L2
  output logic               l2_req_valid,
  input  logic               l2_req_ready,
  output l2_req_t            l2_req,
  input  logic               l2_resp_valid,
  input  line_t              l2_resp_data,
  // events (one-cycle pulses)
  output logic               ev_hit,
  output logic               ev_miss,
  output logic               ev_bypass,
  output logic               ev_evict,
  output logic               ev_writeback,
  output logic               ev_space_evict,
  output logic               ev_lock_stall
);
  localparam int LINES = SETS * WAYS;

  typedef enum logic [3:0] {
    S_IDLE, S_LOOK, S_EVICT, S_EVICT_WAIT, S_SPACE, S_SCAN, S_ALLOC,
    S_WDATA, S_FETCH, S_FETCH_WAIT, S_BYPASS, S_BYPASS_WAIT
  } state_e;
  state_e state_q;

  // Primitive Buffer
  logic [LINES-1:0]  v_q, lk_q, d_q;
  logic [TW-1:0]     tag_q  [LINES];
  tile_t             opt_q  [LINES];
  logic [PW-1:0]     abp_q  [LINES];
  tile_t             last_q [LINES];

  // latched request
  logic               is_wr_q;
  logic [PRIM_W-1:0]  id_q;
  logic [NATTR_W-1:0] n_q;
  tile_t              ropt_q, rlast_q;

  logic [SW-1:0]  req_set;
  logic [TW-1:0]  req_tag;
  logic [SW-1:0]  tgt_set_q;
  logic [WW-1:0]  tgt_way_q;
  // eviction engine
  logic [SW-1:0]  ev_set_q;
  logic [WW-1:0]  ev_way_q;
  logic [PW-1:0]  ev_ptr_q;
  logic [NATTR_W-1:0] k_q;
  // scan
  logic [SW-1:0]  scan_q;
  logic           best_ok_q;
  tile_t          best_opt_q;
  logic [SW-1:0]  best_set_q;
  logic [WW-1:0]  best_way_q;
  // allocation / data walk
  logic [PW-1:0]  head_q, cur_q;

  // ---- set view for lookup, victim choice and scan ----
  logic [SW-1:0]   view_set;
  logic [WAYS-1:0] view_v, view_lk, ab_lk, hit_w;
  tile_t           view_opt [WAYS];
  logic [PW-1:0]   lq_ptr   [WAYS];
  logic            has_free, has_cand, bypass, hit;
  logic [WW-1:0]   free_way, cand_way, hit_way;
  tile_t           cand_opt;

  function automatic int ev_line(input logic [SW-1:0] s, input logic [WW-1:0] w);
    return int'(s) * WAYS + int'(w);
  endfunction

  logic [PRIM_W-1:0] ev_prim_id;

  xor_index #(.ID_W(PRIM_W), .SET_W(SW)) u_idx (
    .id(id_q), .set_idx(req_set), .tag(req_tag),
    .inv_tag(tag_q[ev_line(ev_set_q, ev_way_q)]), .inv_set(ev_set_q), .id_out(ev_prim_id));

  assign view_set = (state_q == S_SCAN) ? scan_q : req_set;

  always_comb begin
    hit     = 1'b0;
    hit_way = '0;
    for (int w = 0; w < WAYS; w++) begin
      view_v[w]   = v_q[ev_line(view_set, WW'(w))];
      view_lk[w]  = lk_q[ev_line(view_set, WW'(w))] | ab_lk[w];
      view_opt[w] = opt_q[ev_line(view_set, WW'(w))];
      lq_ptr[w]   = abp_q[ev_line(view_set, WW'(w))];
      hit_w[w]    = view_v[w] && !lk_q[ev_line(view_set, WW'(w))] &&
                    tag_q[ev_line(view_set, WW'(w))] == req_tag;
      if (hit_w[w] && !hit) begin
        hit     = 1'b1;
        hit_way = WW'(w);
      end
    end
  end

  opt_victim_select #(.WAYS(WAYS)) u_opt (
    .valid(view_v), .locked(view_lk), .opt(view_opt), .req_opt(ropt_q),
    .is_write(is_wr_q), .has_free(has_free), .free_way(free_way),
    .has_cand(has_cand), .cand_way(cand_way), .cand_opt(cand_opt), .bypass(bypass));

  // ---- Attribute Buffer ----
  logic          ab_alloc, ab_link, ab_free, ab_wr, ab_inc;
  logic [PW-1:0] ab_alloc_ptr, ab_free_ptr, ab_free_next, ab_wr_ptr, ab_rd_ptr, ab_rd_next;
  logic [PW-1:0] ab_inc_ptr;
  logic [PW:0]   ab_count;
  attr_t         ab_wr_data, ab_rd_data;
  logic          rs_valid_unused;

  attribute_buffer #(.ENTRIES(ENTRIES), .NQ(WAYS)) u_ab (
    .clk, .rst_n,
    .alloc(ab_alloc), .alloc_link(ab_link), .alloc_prev(cur_q), .alloc_ptr(ab_alloc_ptr),
    .free_count(ab_count),
    .free(ab_free), .free_ptr(ab_free_ptr), .free_next(ab_free_next),
    .wr_en(ab_wr), .wr_ptr(ab_wr_ptr), .wr_data(ab_wr_data),
    .rd_ptr(ab_rd_ptr), .rd_data(ab_rd_data), .rd_next(ab_rd_next),
    .rs_ptr, .rs_data, .rs_next, .rs_valid(rs_valid_unused),
    .lock_inc(ab_inc), .lock_inc_ptr(ab_inc_ptr),
    .lock_dec(rs_release), .lock_dec_ptr(rs_release_ptr),
    .lq_ptr(lq_ptr), .lq_locked(ab_lk));

  // ---- control ----
  logic last_k;
  assign last_k = (k_q == n_q - 1'b1);

  always_comb begin
    wr_ready     = (state_q == S_IDLE);
    rd_ready     = (state_q == S_IDLE) && !wr_valid;
    wd_ready     = 1'b0;
    l2_req_valid = 1'b0;
    l2_req       = '0;
    ab_alloc     = 1'b0;
    ab_link      = (k_q != '0);
    ab_free      = 1'b0;
    ab_free_ptr  = ev_ptr_q;
    ab_wr        = 1'b0;
    ab_wr_ptr    = cur_q;
    ab_wr_data   = wd_data;
    ab_rd_ptr    = (state_q == S_EVICT || state_q == S_EVICT_WAIT) ? ev_ptr_q : cur_q;
    ab_inc       = 1'b0;
    ab_inc_ptr   = head_q;
    case (state_q)
      S_LOOK: if (!is_wr_q && hit) begin
        ab_inc     = 1'b1;
        ab_inc_ptr = abp_q[ev_line(req_set, hit_way)];
      end
      S_EVICT: begin
        if (d_q[ev_line(ev_set_q, ev_way_q)]) begin
          l2_req_valid = 1'b1;
          l2_req.we    = 1'b1;
          l2_req.addr  = pb_attr_ptr + addr_t'(ev_prim_id) + addr_t'(k_q);
          l2_req.wdata = line_t'({last_q[ev_line(ev_set_q, ev_way_q)], ab_rd_data});
          l2_req.pb    = PB_ATTRS;
        end else begin
          ab_free = 1'b1;
        end
      end
      S_EVICT_WAIT: ab_free = l2_resp_valid;
      S_ALLOC:      ab_alloc = 1'b1;
      S_WDATA: begin
        wd_ready = 1'b1;
        ab_wr    = wd_valid;
      end
      S_FETCH: begin
        l2_req_valid = 1'b1;
        l2_req.addr  = pb_attr_ptr + addr_t'(id_q) + addr_t'(k_q);
        l2_req.pb    = PB_ATTRS;
      end
      S_FETCH_WAIT: begin
        ab_wr      = l2_resp_valid;
        ab_wr_data = l2_resp_data[ATTR_W-1:0];
        if (l2_resp_valid && last_k) ab_inc = 1'b1;
      end
      S_BYPASS: begin
        l2_req_valid = wd_valid;
        wd_ready     = l2_req_ready;
        l2_req.we    = 1'b1;
        l2_req.addr  = pb_attr_ptr + addr_t'(id_q) + addr_t'(k_q);
        l2_req.wdata = line_t'({rlast_q, wd_data});
        l2_req.pb    = PB_ATTRS;
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= S_IDLE;
      v_q <= '0; lk_q <= '0; d_q <= '0;
      for (int i = 0; i < LINES; i++) begin
        tag_q[i] <= '0; opt_q[i] <= '0; abp_q[i] <= '0; last_q[i] <= '0;
      end
      is_wr_q <= 1'b0; id_q <= '0; n_q <= '0; ropt_q <= '0; rlast_q <= '0;
      tgt_set_q <= '0; tgt_way_q <= '0; ev_set_q <= '0; ev_way_q <= '0;
      ev_ptr_q <= '0; k_q <= '0; scan_q <= '0;
      best_ok_q <= 1'b0; best_opt_q <= '0; best_set_q <= '0; best_way_q <= '0;
      head_q <= '0; cur_q <= '0;
      rd_done <= 1'b0; rd_abp <= '0; wr_done <= 1'b0;
      ev_hit <= 1'b0; ev_miss <= 1'b0; ev_bypass <= 1'b0; ev_evict <= 1'b0;
      ev_writeback <= 1'b0; ev_space_evict <= 1'b0; ev_lock_stall <= 1'b0;
    end else begin
      rd_done <= 1'b0; wr_done <= 1'b0;
      ev_hit <= 1'b0; ev_miss <= 1'b0; ev_bypass <= 1'b0; ev_evict <= 1'b0;
      ev_writeback <= 1'b0; ev_space_evict <= 1'b0; ev_lock_stall <= 1'b0;
      case (state_q)
        S_IDLE: begin
          k_q <= '0;
          if (wr_valid) begin
            is_wr_q <= 1'b1; id_q <= wr_prim_id; n_q <= wr_num_attr;
            ropt_q <= wr_opt; rlast_q <= wr_last_tile;
            state_q <= S_LOOK;
          end else if (rd_valid) begin
            is_wr_q <= 1'b0; id_q <= rd_pmd.prim_id; n_q <= rd_pmd.num_attr;
            ropt_q <= rd_pmd.opt; rlast_q <= '0;
            state_q <= S_LOOK;
          end
        end
        S_LOOK: begin
          tgt_set_q  <= req_set;
          ev_set_q   <= req_set;
          if (!is_wr_q && hit) begin
            opt_q[ev_line(req_set, hit_way)] <= ropt_q;
            rd_done <= 1'b1;
            rd_abp  <= abp_q[ev_line(req_set, hit_way)];
            ev_hit  <= 1'b1;
            state_q <= S_IDLE;
          end else if (is_wr_q && hit) begin
            // a line left over from the previous frame holds this Primitive
            // ID: evict it and reuse its way
            tgt_way_q <= hit_way;
            ev_way_q  <= hit_way;
            ev_ptr_q  <= abp_q[ev_line(req_set, hit_way)];
            ev_evict  <= 1'b1;
            ev_writeback <= d_q[ev_line(req_set, hit_way)];
            state_q   <= S_EVICT;
          end else if (has_free) begin
            ev_miss   <= !is_wr_q;
            tgt_way_q <= free_way;
            state_q   <= S_SPACE;
          end else if (is_wr_q && bypass) begin
            ev_bypass <= 1'b1;
            state_q   <= S_BYPASS;
          end else if (has_cand) begin
            ev_miss   <= !is_wr_q;
            tgt_way_q <= cand_way;
            ev_way_q  <= cand_way;
            ev_ptr_q  <= abp_q[ev_line(req_set, cand_way)];
            ev_evict  <= 1'b1;
            ev_writeback <= d_q[ev_line(req_set, cand_way)];
            state_q   <= S_EVICT;
          end else begin
            ev_lock_stall <= 1'b1;   // every way locked: wait for the Rasterizer
          end
        end
        S_EVICT: begin
          if (d_q[ev_line(ev_set_q, ev_way_q)]) begin
            if (l2_req_ready) state_q <= S_EVICT_WAIT;
          end else if (ab_free_next == ev_ptr_q) begin
            v_q[ev_line(ev_set_q, ev_way_q)] <= 1'b0;
            k_q     <= '0;
            state_q <= S_SPACE;
          end else begin
            ev_ptr_q <= ab_free_next;
          end
        end
        S_EVICT_WAIT: if (l2_resp_valid) begin
          if (ab_free_next == ev_ptr_q) begin
            v_q[ev_line(ev_set_q, ev_way_q)] <= 1'b0;
            d_q[ev_line(ev_set_q, ev_way_q)] <= 1'b0;
            k_q     <= '0;
            state_q <= S_SPACE;
          end else begin
            ev_ptr_q <= ab_free_next;
            k_q      <= k_q + 1'b1;
            state_q  <= S_EVICT;
          end
        end
        S_SPACE: begin
          k_q <= '0;
          if (ab_count >= (PW+1)'(n_q)) begin
            state_q <= S_ALLOC;
            v_q [ev_line(tgt_set_q, tgt_way_q)]   <= 1'b1;
            lk_q[ev_line(tgt_set_q, tgt_way_q)]   <= 1'b1;
            d_q [ev_line(tgt_set_q, tgt_way_q)]   <= 1'b0;
            tag_q[ev_line(tgt_set_q, tgt_way_q)]  <= req_tag;
            opt_q[ev_line(tgt_set_q, tgt_way_q)]  <= ropt_q;
            last_q[ev_line(tgt_set_q, tgt_way_q)] <= rlast_q;
          end else begin
            scan_q    <= '0;
            best_ok_q <= 1'b0;
            state_q   <= S_SCAN;
          end
        end
        S_SCAN: begin
          logic          ok;
          tile_t         bo;
          logic [SW-1:0] bs;
          logic [WW-1:0] bw;
          ok = best_ok_q; bo = best_opt_q; bs = best_set_q; bw = best_way_q;
          if (has_cand && (!ok || cand_opt > bo)) begin
            ok = 1'b1; bo = cand_opt; bs = scan_q; bw = cand_way;
          end
          best_ok_q <= ok; best_opt_q <= bo; best_set_q <= bs; best_way_q <= bw;
          scan_q <= scan_q + 1'b1;
          if (scan_q == SW'(SETS-1)) begin
            if (ok && (!is_wr_q || bo > ropt_q)) begin
              ev_set_q   <= bs;
              ev_way_q   <= bw;
              ev_ptr_q   <= abp_q[ev_line(bs, bw)];
              ev_evict   <= 1'b1;
              ev_space_evict <= 1'b1;
              ev_writeback <= d_q[ev_line(bs, bw)];
              state_q    <= S_EVICT;
            end else if (is_wr_q) begin
              ev_bypass <= 1'b1;
              state_q   <= S_BYPASS;
            end else begin
              ev_lock_stall <= 1'b1;
              state_q <= S_SPACE;   // retry once the Rasterizer has released lines
            end
          end
        end
        S_ALLOC: begin
          if (k_q == '0) head_q <= ab_alloc_ptr;
          cur_q <= ab_alloc_ptr;
          if (last_k) begin
            abp_q[ev_line(tgt_set_q, tgt_way_q)] <= (k_q == '0) ? ab_alloc_ptr : head_q;
            cur_q   <= (k_q == '0) ? ab_alloc_ptr : head_q;
            k_q     <= '0;
            state_q <= is_wr_q ? S_WDATA : S_FETCH;
          end else begin
            k_q <= k_q + 1'b1;
          end
        end
        S_WDATA: if (wd_valid) begin
          cur_q <= ab_rd_next;
          k_q   <= k_q + 1'b1;
          if (last_k) begin
            d_q [ev_line(tgt_set_q, tgt_way_q)] <= 1'b1;
            lk_q[ev_line(tgt_set_q, tgt_way_q)] <= 1'b0;
            wr_done <= 1'b1;
            state_q <= S_IDLE;
          end
        end
        S_FETCH: if (l2_req_ready) state_q <= S_FETCH_WAIT;
        S_FETCH_WAIT: if (l2_resp_valid) begin
          cur_q <= ab_rd_next;
          k_q   <= k_q + 1'b1;
          last_q[ev_line(tgt_set_q, tgt_way_q)] <= l2_resp_data[LAST_TILE_LSB +: TILE_W];
          if (last_k) begin
            lk_q[ev_line(tgt_set_q, tgt_way_q)] <= 1'b0;
            rd_done <= 1'b1;
            rd_abp  <= head_q;
            state_q <= S_IDLE;
          end else begin
            state_q <= S_FETCH;
          end
        end
        S_BYPASS: if (wd_valid && l2_req_ready) state_q <= S_BYPASS_WAIT;
        S_BYPASS_WAIT: if (l2_resp_valid) begin
          k_q <= k_q + 1'b1;
          if (last_k) begin
            wr_done <= 1'b1;
            state_q <= S_IDLE;
          end else begin
            state_q <= S_BYPASS;
          end
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  a_attr_count: assert property (@(posedge clk) disable iff (!rst_n)
    (state_q == S_LOOK) |-> n_q != '0);
endmodule
