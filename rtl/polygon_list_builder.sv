// polygon_list_builder: writes the Parameter Buffer and computes OPT Numbers.
//
// For every primitive the binner delivers a header (attribute count), the IDs
// of the tiles it overlaps in traversal order (each at most once, the last one
// flagged), and then its attributes. The builder
//   1. gives the primitive the next free PB-Attributes block offset as its
//      Primitive ID (attributes of one primitive occupy consecutive blocks);
//   2. appends a PMD {Primitive ID, attribute count, OPT Number} to the list of
//      every overlapped tile, where the OPT Number is the next overlapped tile
//      and OPT_NULL for the last one. Lists are interleaved: PMD number i of
//      tile t goes to block pb_lists_ptr + (i / 16) * NUM_TILES + t, slot
//      i mod 16, through the Primitive List Cache;
//   3. writes the attributes through the Attribute Cache with OPT Number =
//      first overlapped tile and the last overlapped tile as dead-line hint.
// A per-tile counter of list length (cleared by frame_start) addresses the
// lists and is read by the Tile Fetcher through cnt_tile / cnt_q. A list holds
// at most MAX_PRIMS_PER_TILE PMDs; further ones are dropped and flagged with
// ev_list_overflow.
// One PMD write is outstanding at a time; a primitive overlapping T tiles with
// A attributes takes about T cache accesses plus A attribute writes. The
// layout, OPT Number rule and write order follow the document; the binner
// interface, the per-tile counters and their read port are this design's
// choices (the document does not say how list lengths are kept).
module polygon_list_builder
  import tcor_pkg::*;
#(
  parameter int NUM_TILES          = 1488,
  parameter int MAX_PRIMS_PER_TILE = 1024,
  localparam int CW                = $clog2(MAX_PRIMS_PER_TILE + 1)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               frame_start,
  input  addr_t              pb_lists_ptr,
  // binner
  input  logic               prim_valid,
  output logic               prim_ready,
  input  logic [NATTR_W-1:0] prim_num_attr,
  input  logic               tile_valid,
  output logic               tile_ready,
  input  tile_t              tile_id,
  input  logic               tile_last,
  input  logic               attr_valid,
  output logic               attr_ready,
  input  attr_t              attr_data,
  // Primitive List Cache (writes)
  output logic               plc_req_valid,
  input  logic               plc_req_ready,
  output addr_t              plc_req_addr,
  output logic [3:0]         plc_req_slot,
  output logic [31:0]        plc_req_wdata,
  input  logic               plc_resp_valid,
  // Attribute Cache (writes)
  output logic               ac_wr_valid,
  input  logic               ac_wr_ready,
  output logic [PRIM_W-1:0]  ac_wr_prim_id,
  output logic [NATTR_W-1:0] ac_wr_num_attr,
  output tile_t              ac_wr_opt,
  output tile_t              ac_wr_last_tile,
  output logic               ac_wd_valid,
  input  logic               ac_wd_ready,
  output attr_t              ac_wd_data,
  input  logic               ac_wr_done,
  // list length read port
  input  tile_t              cnt_tile,
  output logic [CW-1:0]      cnt_q,
  output logic               ev_list_overflow,
  output logic               ev_prim_done
);
  typedef enum logic [2:0] {S_IDLE, S_TILE, S_PMD, S_PMD_WAIT, S_AC_HDR, S_AC_DATA} state_e;
  state_e state_q;

  logic [CW-1:0]      count_q [NUM_TILES];
  logic [PRIM_W-1:0]  next_id_q, id_q;
  logic [NATTR_W-1:0] n_q;
  tile_t              first_q, prev_q, pend_tile_q, pend_opt_q;
  logic               have_prev_q, last_seen_q, pend_final_q;

  logic [CW-1:0] pend_cnt;
  logic          full;
  assign pend_cnt = count_q[pend_tile_q];
  assign full     = (pend_cnt == CW'(MAX_PRIMS_PER_TILE));
  assign cnt_q    = count_q[cnt_tile];

  pmd_t pmd;
  always_comb begin
    pmd.prim_id  = id_q;
    pmd.num_attr = n_q;
    pmd.opt      = pend_opt_q;
  end

  assign prim_ready      = (state_q == S_IDLE) && !frame_start;
  assign tile_ready      = (state_q == S_TILE);
  assign plc_req_valid   = (state_q == S_PMD) && !full;
  assign plc_req_addr    = pb_lists_ptr + addr_t'(pend_cnt[CW-1:4]) * addr_t'(NUM_TILES)
                           + addr_t'(pend_tile_q);
  assign plc_req_slot    = pend_cnt[3:0];
  assign plc_req_wdata   = pmd;
  assign ac_wr_valid     = (state_q == S_AC_HDR);
  assign ac_wr_prim_id   = id_q;
  assign ac_wr_num_attr  = n_q;
  assign ac_wr_opt       = first_q;
  assign ac_wr_last_tile = prev_q;
  assign ac_wd_valid     = (state_q == S_AC_DATA) && attr_valid;
  assign ac_wd_data      = attr_data;
  assign attr_ready      = (state_q == S_AC_DATA) && ac_wd_ready;

  // after one PMD is written: next tile, final PMD, or attributes
  state_e ap_state;
  logic   ap_final;
  always_comb begin
    ap_final = pend_final_q;
    if (pend_final_q)     ap_state = S_AC_HDR;
    else if (last_seen_q) begin
      ap_state = S_PMD;
      ap_final = 1'b1;
    end else              ap_state = S_TILE;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= S_IDLE;
      for (int t = 0; t < NUM_TILES; t++) count_q[t] <= '0;
      next_id_q <= '0; id_q <= '0; n_q <= '0;
      first_q <= '0; prev_q <= '0; pend_tile_q <= '0; pend_opt_q <= '0;
      have_prev_q <= 1'b0; last_seen_q <= 1'b0; pend_final_q <= 1'b0;
      ev_list_overflow <= 1'b0; ev_prim_done <= 1'b0;
    end else begin
      ev_list_overflow <= 1'b0;
      ev_prim_done     <= 1'b0;
      case (state_q)
        S_IDLE: begin
          if (frame_start) begin
            for (int t = 0; t < NUM_TILES; t++) count_q[t] <= '0;
            next_id_q <= '0;
          end else if (prim_valid) begin
            id_q         <= next_id_q;
            n_q          <= prim_num_attr;
            next_id_q    <= next_id_q + PRIM_W'(prim_num_attr);
            have_prev_q  <= 1'b0;
            last_seen_q  <= 1'b0;
            pend_final_q <= 1'b0;
            state_q      <= S_TILE;
          end
        end
        S_TILE: if (tile_valid) begin
          prev_q <= tile_id;
          if (!have_prev_q) begin
            have_prev_q <= 1'b1;
            first_q     <= tile_id;
            if (tile_last) begin
              pend_tile_q  <= tile_id;
              pend_opt_q   <= OPT_NULL;
              pend_final_q <= 1'b1;
              state_q      <= S_PMD;
            end
          end else begin
            pend_tile_q <= prev_q;
            pend_opt_q  <= tile_id;
            last_seen_q <= tile_last;
            state_q     <= S_PMD;
          end
        end
        S_PMD: begin
          if (full) begin
            ev_list_overflow <= 1'b1;
            state_q      <= ap_state;
            pend_final_q <= ap_final;
            if (!pend_final_q) begin
              pend_tile_q <= prev_q;
              pend_opt_q  <= OPT_NULL;
            end
          end else if (plc_req_ready) begin
            count_q[pend_tile_q] <= pend_cnt + 1'b1;
            state_q <= S_PMD_WAIT;
          end
        end
        S_PMD_WAIT: if (plc_resp_valid) begin
          state_q      <= ap_state;
          pend_final_q <= ap_final;
          if (!pend_final_q) begin
            pend_tile_q <= prev_q;
            pend_opt_q  <= OPT_NULL;
          end
        end
        S_AC_HDR: if (ac_wr_ready) state_q <= S_AC_DATA;
        S_AC_DATA: if (ac_wr_done) begin
          ev_prim_done <= 1'b1;
          state_q      <= S_IDLE;
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end
endmodule
