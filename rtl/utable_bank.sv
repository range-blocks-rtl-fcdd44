// utable_bank: one bank of the unlocked-range table (UTable).
//
// NSETS sets of NWAYS ways. A way holds an unlocked range [Lo, Hi], the
// pointer to the data-structure node that covers it and whether the range is
// safe (a mutation inside it stays inside it). The payload of each way is a
// synchronous-read memory; the valid bits are flip-flops so that several ways
// can be dropped in one clock.
//
// Timing: rd_en with rd_set reads the whole set; one clock later the set's
// ways are compared with the probe range [p_lo, p_hi] (held steady by the
// caller) and the outputs below are valid until the next read:
//   hit / hit_*   - narrowest safe way holding the probe (a key probe has
//                   p_lo = p_hi = key); ties go to the lowest way
//   ov_mask       - ways whose range overlaps the probe
//   victim_way    - where an insert of the probe range goes: the way already
//                   holding exactly that range, else the lowest invalid way,
//                   else a round-robin pointer of the bank
// wr_en writes one way (and sets it valid); inv_en clears the valid bits of
// inv_mask in inv_set. Both act at the rising edge. Reset clears valid bits.
// "Pick the smallest safe range" is the document's rule; the replacement
// policy is this design's choice (the table is best effort and may drop any
// entry).
module utable_bank
  import rblox_pkg::*;
#(
  parameter int NSETS = 128,
  parameter int NWAYS = 8,
  localparam int SET_W = (NSETS > 1) ? $clog2(NSETS) : 1,
  localparam int WAY_W = (NWAYS > 1) ? $clog2(NWAYS) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              rd_en,
  input  logic [SET_W-1:0]  rd_set,
  input  key_t              p_lo,
  input  key_t              p_hi,
  output logic              hit,
  output logic [WAY_W-1:0]  hit_way,
  output key_t              hit_lo,
  output key_t              hit_hi,
  output ptr_t              hit_ptr,
  output logic [NWAYS-1:0]  ov_mask,
  output logic [WAY_W-1:0]  victim_way,
  input  logic              wr_en,
  input  logic [SET_W-1:0]  wr_set,
  input  logic [WAY_W-1:0]  wr_way,
  input  key_t              wr_lo,
  input  key_t              wr_hi,
  input  ptr_t              wr_ptr,
  input  logic              wr_safe,
  input  logic              inv_en,
  input  logic [SET_W-1:0]  inv_set,
  input  logic [NWAYS-1:0]  inv_mask
);
  typedef struct packed {
    logic safe;
    key_t lo;
    key_t hi;
    ptr_t ptr;
  } ut_data_t;

  logic [NWAYS-1:0] valid [NSETS];
  ut_data_t         rdata [NWAYS];
  logic [SET_W-1:0] set_q;
  logic [WAY_W-1:0] rr;

  for (genvar w = 0; w < NWAYS; w++) begin : g_way
    ut_data_t mem [NSETS];
    always_ff @(posedge clk) begin
      if (wr_en && wr_way == WAY_W'(w)) mem[wr_set] <= '{safe: wr_safe, lo: wr_lo, hi: wr_hi, ptr: wr_ptr};
      if (rd_en) rdata[w] <= mem[rd_set];
    end
  end

  logic [NWAYS-1:0] contain, equal, ov_raw;
  for (genvar w = 0; w < NWAYS; w++) begin : g_cmp
    logic unused_pce;
    range_cmp u_cmp (
      .e_lo(rdata[w].lo), .e_hi(rdata[w].hi), .p_lo(p_lo), .p_hi(p_hi),
      .overlap(ov_raw[w]), .e_covers_p(contain[w]), .p_covers_e(unused_pce), .equal(equal[w])
    );
  end

  always_comb begin
    logic [NWAYS-1:0] vq;
    key_t             best_w;
    vq         = valid[set_q];
    hit        = 1'b0;
    hit_way    = '0;
    best_w     = '1;
    victim_way = rr;
    for (int w = 0; w < NWAYS; w++) begin
      if (vq[w] && rdata[w].safe && contain[w] && (!hit || (rdata[w].hi - rdata[w].lo) < best_w)) begin
        hit     = 1'b1;
        hit_way = WAY_W'(w);
        best_w  = rdata[w].hi - rdata[w].lo;
      end
    end
    for (int w = NWAYS - 1; w >= 0; w--) if (!vq[w]) victim_way = WAY_W'(w);
    for (int w = NWAYS - 1; w >= 0; w--) if (vq[w] && equal[w]) victim_way = WAY_W'(w);
    ov_mask = ov_raw & vq;
    hit_lo  = rdata[hit_way].lo;
    hit_hi  = rdata[hit_way].hi;
    hit_ptr = rdata[hit_way].ptr;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < NSETS; s++) valid[s] <= '0;
      set_q <= '0;
      rr    <= '0;
    end else begin
      if (rd_en) set_q <= rd_set;
      if (inv_en) valid[inv_set] <= valid[inv_set] & ~inv_mask;
      if (wr_en) begin
        valid[wr_set][wr_way] <= 1'b1;
        rr <= rr + 1'b1;
      end
    end
  end
endmodule
