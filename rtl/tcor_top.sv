// tcor_top: the tiling-engine memory subsystem of a tile-based GPU with a
// Tile Cache using optimal (OPT) replacement.
//
// Binning phase: the Polygon List Builder takes primitives from the binner
// (attribute count, overlapped tiles in traversal order, attributes), writes a
// PMD per overlapped tile into the interleaved PB-Lists through the Primitive
// List Cache, and writes the attributes through the Attribute Cache. Each PMD
// carries the OPT Number, the next tile that will read the primitive.
// Fetch phase (fetch_start): the Tile Fetcher walks the tiles, reads the PMDs
// back, asks the Attribute Cache for every primitive and queues its Attribute
// Buffer Pointer for the Rasterizer, which reads the attributes over rs_* and
// releases the primitive with rs_release. The Attribute Cache replaces the
// primitive whose next use is farthest (OPT). Both caches, and the other L1
// caches of the GPU through the ext_* port, share the L2, which drops dead
// Parameter Buffer lines first and never writes them back.
//
// L2 port priority: Attribute Cache, Primitive List Cache, external port. The
// Primitive List Cache port is shared by builder and fetcher, builder first.
// pb_lists_ptr and pb_attr_ptr are block addresses of the two Parameter Buffer
// sections and must stay constant during a frame. frame_start clears the list
// counters, the Primitive ID allocator and the L2's finished-tile count.
module tcor_top
  import tcor_pkg::*;
#(
  parameter int NUM_TILES  = 1488,
  parameter int PLC_SETS   = 64,
  parameter int PLC_WAYS   = 4,
  parameter int AC_SETS    = 128,
  parameter int AC_WAYS    = 4,
  parameter int AC_ENTRIES = 1024,
  parameter int L2_SETS    = 2048,
  parameter int L2_WAYS    = 8,
  parameter int L2_HIT_LAT = 12,
  parameter int QDEPTH     = 16,
  parameter int MAX_PRIMS_PER_TILE = 1024,
  localparam int PW        = $clog2(AC_ENTRIES)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               frame_start,
  input  logic               fetch_start,
  input  addr_t              pb_lists_ptr,
  input  addr_t              pb_attr_ptr,
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
  output logic               prim_done,
  // fetch status
  output logic               fetch_busy,
  output logic               fetch_done,
  // Rasterizer
  output logic               rq_valid,
  input  logic               rq_ready,
  output logic [PW-1:0]      rq_abp,
  input  logic [PW-1:0]      rs_ptr,
  output attr_t              rs_data,
  output logic [PW-1:0]      rs_next,
  input  logic               rs_release,
  input  logic [PW-1:0]      rs_release_ptr,
  // other L1 caches sharing the L2
  input  logic               ext_req_valid,
  output logic               ext_req_ready,
  input  l2_req_t            ext_req,
  output logic               ext_resp_valid,
  output line_t              ext_resp_data,
  // main memory
  output logic               mem_req_valid,
  input  logic               mem_req_ready,
  output logic               mem_we,
  output addr_t              mem_addr,
  output line_t              mem_wdata,
  input  logic               mem_resp_valid,
  input  line_t              mem_rdata,
  // status
  output logic [TILE_W:0]    tiles_done,
  output tcor_events_t       ev
);
  localparam int CW = $clog2(MAX_PRIMS_PER_TILE + 1);

  // ---------------- Polygon List Builder ----------------
  logic               plb_plc_valid, plb_plc_ready, plb_plc_resp;
  addr_t              plb_plc_addr;
  logic [3:0]         plb_plc_slot;
  logic [31:0]        plb_plc_wdata;
  logic               acw_valid, acw_ready, acd_valid, acd_ready, acw_done;
  logic [PRIM_W-1:0]  acw_id;
  logic [NATTR_W-1:0] acw_n;
  tile_t              acw_opt, acw_last;
  attr_t              acd_data;
  tile_t              cnt_tile;
  logic [CW-1:0]      cnt_q;

  polygon_list_builder #(.NUM_TILES(NUM_TILES), .MAX_PRIMS_PER_TILE(MAX_PRIMS_PER_TILE)) u_plb (
    .clk, .rst_n, .frame_start, .pb_lists_ptr,
    .prim_valid, .prim_ready, .prim_num_attr,
    .tile_valid, .tile_ready, .tile_id, .tile_last,
    .attr_valid, .attr_ready, .attr_data,
    .plc_req_valid(plb_plc_valid), .plc_req_ready(plb_plc_ready),
    .plc_req_addr(plb_plc_addr), .plc_req_slot(plb_plc_slot), .plc_req_wdata(plb_plc_wdata),
    .plc_resp_valid(plb_plc_resp),
    .ac_wr_valid(acw_valid), .ac_wr_ready(acw_ready), .ac_wr_prim_id(acw_id),
    .ac_wr_num_attr(acw_n), .ac_wr_opt(acw_opt), .ac_wr_last_tile(acw_last),
    .ac_wd_valid(acd_valid), .ac_wd_ready(acd_ready), .ac_wd_data(acd_data),
    .ac_wr_done(acw_done),
    .cnt_tile, .cnt_q, .ev_list_overflow(ev.list_overflow), .ev_prim_done(prim_done));

  // ---------------- Tile Fetcher ----------------
  logic [31:0]   plc_rdata;
  logic          tf_plc_valid, tf_plc_ready, tf_plc_resp;
  addr_t         tf_plc_addr;
  logic [3:0]    tf_plc_slot;
  logic          acr_valid, acr_ready, acr_done;
  pmd_t          acr_pmd;
  logic [PW-1:0] acr_abp;
  logic          tf_tile_done;

  tile_fetcher #(.NUM_TILES(NUM_TILES), .MAX_PRIMS_PER_TILE(MAX_PRIMS_PER_TILE),
                .QDEPTH(QDEPTH), .PW(PW)) u_tf (
    .clk, .rst_n, .start(fetch_start), .pb_lists_ptr,
    .busy(fetch_busy), .done(fetch_done), .tile_done(tf_tile_done),
    .cnt_tile, .cnt_q,
    .plc_req_valid(tf_plc_valid), .plc_req_ready(tf_plc_ready),
    .plc_req_addr(tf_plc_addr), .plc_req_slot(tf_plc_slot),
    .plc_resp_valid(tf_plc_resp), .plc_resp_rdata(plc_rdata),
    .ac_rd_valid(acr_valid), .ac_rd_ready(acr_ready), .ac_rd_pmd(acr_pmd),
    .ac_rd_done(acr_done), .ac_rd_abp(acr_abp),
    .out_valid(rq_valid), .out_ready(rq_ready), .out_abp(rq_abp),
    .ev_queue_stall(ev.queue_stall));
  assign ev.tile_done = tf_tile_done;

  // ---------------- Primitive List Cache, shared by builder and fetcher -----
  logic        plc_req_valid, plc_req_ready, plc_resp_valid, plc_we;
  addr_t       plc_addr;
  logic [3:0]  plc_slot;
  logic        plc_own_q, plc_busy_q;   // owner: 0 builder, 1 fetcher
  logic        plc_pick;

  always_comb begin
    plc_pick      = !plb_plc_valid;
    plc_req_valid = !plc_busy_q && (plb_plc_valid || tf_plc_valid);
    plc_we        = !plc_pick;
    plc_addr      = plc_pick ? tf_plc_addr : plb_plc_addr;
    plc_slot      = plc_pick ? tf_plc_slot : plb_plc_slot;
    plb_plc_ready = !plc_busy_q && !plc_pick && plc_req_ready;
    tf_plc_ready  = !plc_busy_q && plc_pick && plc_req_ready;
    plb_plc_resp  = plc_resp_valid && !plc_own_q;
    tf_plc_resp   = plc_resp_valid && plc_own_q;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      plc_busy_q <= 1'b0;
      plc_own_q  <= 1'b0;
    end else if (!plc_busy_q) begin
      if (plc_req_valid && plc_req_ready) begin
        plc_busy_q <= 1'b1;
        plc_own_q  <= plc_pick;
      end
    end else if (plc_resp_valid) begin
      plc_busy_q <= 1'b0;
    end
  end

  logic    plc_l2_valid, plc_l2_ready, plc_l2_resp;
  l2_req_t plc_l2_req;
  line_t   arb_resp_data;

  primitive_list_cache #(.SETS(PLC_SETS), .WAYS(PLC_WAYS)) u_plc (
    .clk, .rst_n,
    .req_valid(plc_req_valid), .req_ready(plc_req_ready), .req_we(plc_we),
    .req_addr(plc_addr), .req_slot(plc_slot), .req_wdata(plb_plc_wdata),
    .resp_valid(plc_resp_valid), .resp_rdata(plc_rdata),
    .l2_req_valid(plc_l2_valid), .l2_req_ready(plc_l2_ready), .l2_req(plc_l2_req),
    .l2_resp_valid(plc_l2_resp), .l2_resp_data(arb_resp_data),
    .ev_hit(ev.plc_hit), .ev_miss(ev.plc_miss), .ev_writeback(ev.plc_writeback));

  // ---------------- Attribute Cache ----------------
  logic    ac_l2_valid, ac_l2_ready, ac_l2_resp;
  l2_req_t ac_l2_req;

  attribute_cache #(.SETS(AC_SETS), .WAYS(AC_WAYS), .ENTRIES(AC_ENTRIES)) u_ac (
    .clk, .rst_n, .pb_attr_ptr,
    .wr_valid(acw_valid), .wr_ready(acw_ready), .wr_prim_id(acw_id),
    .wr_num_attr(acw_n), .wr_opt(acw_opt), .wr_last_tile(acw_last),
    .wd_valid(acd_valid), .wd_ready(acd_ready), .wd_data(acd_data), .wr_done(acw_done),
    .rd_valid(acr_valid), .rd_ready(acr_ready), .rd_pmd(acr_pmd),
    .rd_done(acr_done), .rd_abp(acr_abp),
    .rs_ptr, .rs_data, .rs_next, .rs_release, .rs_release_ptr,
    .l2_req_valid(ac_l2_valid), .l2_req_ready(ac_l2_ready), .l2_req(ac_l2_req),
    .l2_resp_valid(ac_l2_resp), .l2_resp_data(arb_resp_data),
    .ev_hit(ev.ac_hit), .ev_miss(ev.ac_miss), .ev_bypass(ev.ac_bypass),
    .ev_evict(ev.ac_evict), .ev_writeback(ev.ac_writeback),
    .ev_space_evict(ev.ac_space_evict), .ev_lock_stall(ev.ac_lock_stall));

  // ---------------- L2 ----------------
  logic [2:0] c_valid, c_ready, c_resp;
  l2_req_t    c_req [3];
  logic       l2_valid, l2_ready, l2_resp_valid;
  l2_req_t    l2_req;
  line_t      l2_resp_data;

  assign c_valid       = {ext_req_valid, plc_l2_valid, ac_l2_valid};
  assign c_req[0]      = ac_l2_req;
  assign c_req[1]      = plc_l2_req;
  assign c_req[2]      = ext_req;
  assign ac_l2_ready   = c_ready[0];
  assign plc_l2_ready  = c_ready[1];
  assign ext_req_ready = c_ready[2];
  assign ac_l2_resp    = c_resp[0];
  assign plc_l2_resp   = c_resp[1];
  assign ext_resp_valid = c_resp[2];
  assign ext_resp_data  = arb_resp_data;

  l2_arbiter #(.N(3)) u_arb (
    .clk, .rst_n,
    .c_req_valid(c_valid), .c_req_ready(c_ready), .c_req(c_req),
    .c_resp_valid(c_resp), .c_resp_data(arb_resp_data),
    .l2_req_valid(l2_valid), .l2_req_ready(l2_ready), .l2_req(l2_req),
    .l2_resp_valid(l2_resp_valid), .l2_resp_data(l2_resp_data));

  l2_cache #(.SETS(L2_SETS), .WAYS(L2_WAYS), .HIT_LAT(L2_HIT_LAT), .NUM_TILES(NUM_TILES)) u_l2 (
    .clk, .rst_n, .pb_lists_ptr, .frame_start, .tile_done(tf_tile_done),
    .req_valid(l2_valid), .req_ready(l2_ready), .req(l2_req),
    .resp_valid(l2_resp_valid), .resp_data(l2_resp_data),
    .mem_req_valid, .mem_req_ready, .mem_we, .mem_addr, .mem_wdata,
    .mem_resp_valid, .mem_rdata, .tiles_done,
    .ev_hit(ev.l2_hit), .ev_miss(ev.l2_miss), .ev_dead_victim(ev.l2_dead_victim),
    .ev_writeback(ev.l2_writeback), .ev_wb_skipped(ev.l2_wb_skipped));
endmodule
