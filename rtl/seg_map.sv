// seg_map: splits a key range at aligned segment boundaries and maps each
// piece to a bank and a set of a banked table.
//
// The key space is cut into aligned segments of 2**SEG_BITS keys. Segment s
// lives in bank (s mod NBANKS), set ((s / NBANKS) mod NSETS). Consecutive
// segments therefore fall in different banks, so a range spanning up to
// NBANKS segments touches each bank at most once and all pieces can be
// handled in parallel, one per bank. For every bank the output says whether
// the range has a piece there, which set it maps to and the piece's clipped
// bounds (e.g. with 8-key segments [1,12] becomes [1,7] in bank 0 and
// [8,12] in bank 1). `fits` is low when the range spans more than NBANKS
// segments; such a range is not placed in the table. The segment-and-split
// scheme follows the document; the mapping function (any is allowed there)
// and the segment width default (256 keys, the key-block width the document
// found best for its index cache) are this design's choices.
// Purely combinational.
module seg_map
  import rblox_pkg::*;
#(
  parameter int SEG_BITS = 8,
  parameter int NBANKS   = 4,
  parameter int NSETS    = 128,
  localparam int SET_W   = (NSETS > 1) ? $clog2(NSETS) : 1
) (
  input  key_t                  lo,
  input  key_t                  hi,
  output logic                  fits,
  output logic [NBANKS-1:0]     bank_en,
  output logic [SET_W-1:0]      bank_set [NBANKS],
  output key_t                  piece_lo [NBANKS],
  output key_t                  piece_hi [NBANKS]
);
  localparam int SEGN_W = KEY_W - SEG_BITS;

  localparam logic [SEGN_W-1:0] NB = SEGN_W'(NBANKS);

  logic [SEGN_W-1:0] s0, s1, span;

  always_comb begin
    s0   = lo[KEY_W-1:SEG_BITS];
    s1   = hi[KEY_W-1:SEG_BITS];
    span = s1 - s0;  // number of segments minus one
    fits = (hi >= lo) && (span < NB);
    for (int b = 0; b < NBANKS; b++) begin
      logic [SEGN_W-1:0] off, s;
      // offset from s0 to the first segment at or after s0 that maps to bank b
      off = ((SEGN_W'(b) + NB) - (s0 % NB)) % NB;
      s   = s0 + off;
      bank_en[b]  = fits && (off <= span);
      bank_set[b] = SET_W'((s / NB) % SEGN_W'(NSETS));
      piece_lo[b] = (off == '0) ? lo : {s, {SEG_BITS{1'b0}}};
      piece_hi[b] = (off == span) ? hi : {s, {SEG_BITS{1'b1}}};
    end
  end
endmodule
