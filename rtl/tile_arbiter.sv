// tile_arbiter: shares the range-lock unit among the compute tiles.
//
// N requesters each offer one request (valid/ready). A round-robin pointer
// gives the grant to the first requester at or after the one following the
// last winner, so every tile is served within N grants. The chosen request
// appears combinationally on out_*; a requester's ready is high only in the
// clock its request is taken (out_valid && out_ready). The request's tile
// field is replaced by the requester's port number (tile_t is 8 bits, so
// with 128 ports its top bit is always 0). The document only
// says the tiles share the tables; the round-robin policy is this design's.
module tile_arbiter
  import rblox_pkg::*;
#(
  parameter int N = 128
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [N-1:0]     req_valid,
  output logic [N-1:0]     req_ready,
  input  rb_req_t          req      [N],
  output logic             out_valid,
  input  logic             out_ready,
  output rb_req_t          out_req
);
  localparam int IW = (N > 1) ? $clog2(N) : 1;

  logic [IW-1:0] ptr, sel;
  logic          found;
  logic [IW:0]   idx;

  // scan N ports starting at ptr; ptr + k < 2N, so one wrap suffices
  always_comb begin
    found = 1'b0;
    sel   = '0;
    idx   = '0;
    for (int k = 0; k < N; k++) begin
      idx = {1'b0, ptr} + (IW+1)'(k);
      if (idx >= (IW+1)'(N)) idx = idx - (IW+1)'(N);
      if (!found && req_valid[idx[IW-1:0]]) begin
        found = 1'b1;
        sel   = idx[IW-1:0];
      end
    end
  end

  assign out_valid = found;
  // the tile field is stamped with the port number, so a tile cannot act
  // for another
  always_comb begin
    out_req      = req[sel];
    out_req.tile = tile_t'(sel);
  end

  always_comb begin
    req_ready = '0;
    req_ready[sel] = found && out_ready;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ptr <= '0;
    else if (found && out_ready) ptr <= (sel == IW'(N - 1)) ? '0 : sel + 1'b1;
  end
endmodule
