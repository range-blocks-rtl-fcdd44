// rblox_system: a range-lock facility for a tiled dataflow accelerator, with
// the range-tagged index cache next to it.
//
// Range locks (RBlox): N_TILES compute tiles send lock requests (rb_req_t)
// on their own ports. A round-robin arbiter picks one per clock; it crosses
// a LINK-cycle link to the range-lock controller, which executes it on the
// LTable (locked ranges) and the UTable (recently unlocked ranges); the
// response (rb_resp_t) crosses a second LINK-cycle link back and is raised
// on tile_resp_valid[tile]. Tiles must always accept their response.
// A lone request that only touches the LTable is answered
// 1 (arbiter) + LINK + LT_LAT + 1 + LINK clocks after the tile raised it.
//
// Index cache (METAL-IX): lookups for a key on ix_lk_*, results on ix_res_*,
// the walker's memory port on ix_mem_*. The index cache and the range-lock
// unit share nothing in this design; both are brought out side by side.
//
// The compute tiles and the memory are outside this design.
module rblox_system
  import rblox_pkg::*;
#(
  parameter int N_TILES    = 128,
  parameter int LINK       = 2,
  parameter int LT_LAT     = 5,
  parameter int UT_LAT     = 5,
  parameter int UT_BANKS   = 4,
  parameter int UT_SETS    = 128,
  parameter int UT_WAYS    = 8,
  parameter int SEG_BITS   = 8,
  parameter int IX_SETS    = 64,
  parameter int IX_WAYS    = 16,
  parameter int IX_BLOCK_BITS = 8,
  parameter int IX_LAT     = 5,
  parameter int IX_NCTX    = 4
) (
  input  logic               clk,
  input  logic               rst_n,
  // range locks
  input  logic [N_TILES-1:0] tile_req_valid,
  output logic [N_TILES-1:0] tile_req_ready,
  input  rb_req_t            tile_req [N_TILES],
  output logic [N_TILES-1:0] tile_resp_valid,
  output rb_resp_t           tile_resp,
  output logic [$clog2(N_TILES+1)-1:0] lt_occupancy,
  // index cache
  input  ptr_t               ix_root_ptr,
  input  logic               ix_lk_valid,
  output logic               ix_lk_ready,
  input  key_t               ix_lk_key,
  input  logic [7:0]         ix_lk_id,
  output logic               ix_res_valid,
  input  logic               ix_res_ready,
  output logic [7:0]         ix_res_id,
  output key_t               ix_res_key,
  output ptr_t               ix_res_ptr,
  output logic               ix_res_short,
  output logic [7:0]         ix_res_nodes,
  output logic               ix_mem_req_valid,
  input  logic               ix_mem_req_ready,
  output ptr_t               ix_mem_req_addr,
  output logic [$clog2(IX_NCTX)-1:0] ix_mem_req_tag,
  input  logic               ix_mem_resp_valid,
  input  logic [$clog2(IX_NCTX)-1:0] ix_mem_resp_tag,
  input  ix_node_t           ix_mem_resp_node,
  output logic [31:0]        ix_n_hit,
  output logic [31:0]        ix_n_miss,
  output logic [31:0]        ix_n_fill
);
  // ------------------------------------------------------------ range locks
  localparam int TIW = (N_TILES > 1) ? $clog2(N_TILES) : 1;

  logic     arb_valid, arb_ready;
  rb_req_t  arb_req;
  logic     c_req_valid, c_req_ready;
  rb_req_t  c_req;
  logic     c_resp_valid, c_resp_ready;
  rb_resp_t c_resp;
  logic     r_valid;
  rb_resp_t r_resp;

  tile_arbiter #(.N(N_TILES)) u_arb (
    .clk(clk), .rst_n(rst_n), .req_valid(tile_req_valid), .req_ready(tile_req_ready),
    .req(tile_req), .out_valid(arb_valid), .out_ready(arb_ready), .out_req(arb_req)
  );

  link_pipe #(.DEPTH(LINK), .T(rb_req_t)) u_link_req (
    .clk(clk), .rst_n(rst_n), .in_valid(arb_valid), .in_ready(arb_ready), .in_data(arb_req),
    .out_valid(c_req_valid), .out_ready(c_req_ready), .out_data(c_req)
  );

  rblox_ctrl #(
    .N_TILES(N_TILES), .LT_LAT(LT_LAT), .UT_LAT(UT_LAT), .UT_BANKS(UT_BANKS),
    .UT_SETS(UT_SETS), .UT_WAYS(UT_WAYS), .SEG_BITS(SEG_BITS)
  ) u_ctrl (
    .clk(clk), .rst_n(rst_n), .req_valid(c_req_valid), .req_ready(c_req_ready), .req(c_req),
    .resp_valid(c_resp_valid), .resp_ready(c_resp_ready), .resp(c_resp),
    .lt_occupancy(lt_occupancy)
  );

  link_pipe #(.DEPTH(LINK), .T(rb_resp_t)) u_link_resp (
    .clk(clk), .rst_n(rst_n), .in_valid(c_resp_valid), .in_ready(c_resp_ready), .in_data(c_resp),
    .out_valid(r_valid), .out_ready(1'b1), .out_data(r_resp)
  );

  always_comb begin
    tile_resp_valid = '0;
    tile_resp_valid[TIW'(r_resp.tile)] = r_valid;
  end
  assign tile_resp = r_resp;

  // ------------------------------------------------------------ index cache
  metal_ix #(
    .NSETS(IX_SETS), .NWAYS(IX_WAYS), .BLOCK_BITS(IX_BLOCK_BITS), .LAT(IX_LAT),
    .NCTX(IX_NCTX), .ID_W(8)
  ) u_ix (
    .clk(clk), .rst_n(rst_n), .root_ptr(ix_root_ptr),
    .lk_valid(ix_lk_valid), .lk_ready(ix_lk_ready), .lk_key(ix_lk_key), .lk_id(ix_lk_id),
    .res_valid(ix_res_valid), .res_ready(ix_res_ready), .res_id(ix_res_id), .res_key(ix_res_key),
    .res_ptr(ix_res_ptr), .res_short(ix_res_short), .res_nodes(ix_res_nodes),
    .mem_req_valid(ix_mem_req_valid), .mem_req_ready(ix_mem_req_ready),
    .mem_req_addr(ix_mem_req_addr), .mem_req_tag(ix_mem_req_tag),
    .mem_resp_valid(ix_mem_resp_valid), .mem_resp_tag(ix_mem_resp_tag),
    .mem_resp_node(ix_mem_resp_node),
    .n_hit(ix_n_hit), .n_miss(ix_n_miss), .n_fill(ix_n_fill)
  );
endmodule
