// tile_fetcher: reads the binned primitives back, tile by tile.
//
// After start, tiles are visited in traversal order 0 .. NUM_TILES-1. For each
// tile the list length is read from the Polygon List Builder's counters, and
// each PMD i is read through the Primitive List Cache from block
// pb_lists_ptr + (i / 16) * NUM_TILES + tile, slot i mod 16 (interleaved
// layout). Each PMD becomes a read request {Primitive ID, attribute count,
// OPT Number} to the Attribute Cache, whose answer, the Attribute Buffer
// Pointer (ABP) of the primitive's first attribute, is pushed into the output
// queue for the Rasterizer. When the last primitive of a tile is in the queue
// tile_done pulses (the L2 counts it to find dead lines). done pulses after the
// last tile. A full output queue stalls the fetcher (ev_queue_stall).
//
// One primitive is in flight at a time, so primitives leave in list order
// without a reordering queue. Visiting order, PMD-driven reads, the ABP in the
// output queue and the tile-done signal follow the document; the one-at-a-time
// operation and queue depth are this design's choices.
module tile_fetcher
  import tcor_pkg::*;
#(
  parameter int NUM_TILES          = 1488,
  parameter int MAX_PRIMS_PER_TILE = 1024,
  parameter int QDEPTH             = 16,
  parameter int PW                 = 10,
  localparam int CW                = $clog2(MAX_PRIMS_PER_TILE + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  addr_t         pb_lists_ptr,
  output logic          busy,
  output logic          done,
  output logic          tile_done,
  // list lengths
  output tile_t         cnt_tile,
  input  logic [CW-1:0] cnt_q,
  // Primitive List Cache (reads)
  output logic          plc_req_valid,
  input  logic          plc_req_ready,
  output addr_t         plc_req_addr,
  output logic [3:0]    plc_req_slot,
  input  logic          plc_resp_valid,
  input  logic [31:0]   plc_resp_rdata,
  // Attribute Cache (reads)
  output logic          ac_rd_valid,
  input  logic          ac_rd_ready,
  output pmd_t          ac_rd_pmd,
  input  logic          ac_rd_done,
  input  logic [PW-1:0] ac_rd_abp,
  // output queue to the Rasterizer
  output logic          out_valid,
  input  logic          out_ready,
  output logic [PW-1:0] out_abp,
  output logic          ev_queue_stall
);
  typedef enum logic [2:0] {S_IDLE, S_TILE, S_PMD, S_PMD_WAIT, S_AC, S_AC_WAIT, S_PUSH} state_e;
  state_e state_q;

  tile_t         tile_q;
  logic [CW-1:0] i_q, n_q;
  pmd_t          pmd_q;
  logic [PW-1:0] abp_q;
  logic          q_in_ready;
  logic [$clog2(QDEPTH):0] q_level;

  assign busy          = (state_q != S_IDLE);
  assign cnt_tile      = tile_q;
  assign plc_req_valid = (state_q == S_PMD);
  assign plc_req_addr  = pb_lists_ptr + addr_t'(i_q[CW-1:4]) * addr_t'(NUM_TILES) + addr_t'(tile_q);
  assign plc_req_slot  = i_q[3:0];
  assign ac_rd_valid   = (state_q == S_AC);
  assign ac_rd_pmd     = pmd_q;

  sync_fifo #(.W(PW), .DEPTH(QDEPTH)) u_q (
    .clk, .rst_n,
    .in_valid(state_q == S_PUSH), .in_ready(q_in_ready), .in_data(abp_q),
    .out_valid, .out_ready, .out_data(out_abp), .level(q_level));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= S_IDLE;
      tile_q <= '0; i_q <= '0; n_q <= '0; pmd_q <= '0; abp_q <= '0;
      done <= 1'b0; tile_done <= 1'b0; ev_queue_stall <= 1'b0;
    end else begin
      done <= 1'b0; tile_done <= 1'b0; ev_queue_stall <= 1'b0;
      case (state_q)
        S_IDLE: if (start) begin
          tile_q  <= '0;
          state_q <= S_TILE;
        end
        S_TILE: begin
          n_q <= cnt_q;
          i_q <= '0;
          if (cnt_q == '0) begin
            tile_done <= 1'b1;
            tile_q    <= tile_q + 1'b1;
            if (tile_q == tile_t'(NUM_TILES-1)) begin
              done    <= 1'b1;
              state_q <= S_IDLE;
            end
          end else begin
            state_q <= S_PMD;
          end
        end
        S_PMD: if (plc_req_ready) state_q <= S_PMD_WAIT;
        S_PMD_WAIT: if (plc_resp_valid) begin
          pmd_q   <= pmd_t'(plc_resp_rdata);
          state_q <= S_AC;
        end
        S_AC: if (ac_rd_ready) state_q <= S_AC_WAIT;
        S_AC_WAIT: if (ac_rd_done) begin
          abp_q   <= ac_rd_abp;
          state_q <= S_PUSH;
        end
        S_PUSH: begin
          if (!q_in_ready) begin
            ev_queue_stall <= 1'b1;
          end else begin
            i_q <= i_q + 1'b1;
            if (i_q + 1'b1 == n_q) begin
              tile_done <= 1'b1;
              tile_q    <= tile_q + 1'b1;
              if (tile_q == tile_t'(NUM_TILES-1)) begin
                done    <= 1'b1;
                state_q <= S_IDLE;
              end else begin
                state_q <= S_TILE;
              end
            end else begin
              state_q <= S_PMD;
            end
          end
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end
endmodule
