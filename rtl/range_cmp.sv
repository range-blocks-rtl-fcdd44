// range_cmp: the range tag comparator shared by every table entry.
//
// An entry holds a range [e_lo, e_hi]; a probe is a range [p_lo, p_hi] (a key
// probe sets p_lo = p_hi = key). Because both ranges are ordered
// (lo <= hi), non-overlap needs only two comparisons, p_hi < e_lo or
// p_lo > e_hi, as the tables' tag logic describes. The comparator also
// reports containment in both directions and equality, which the lock rules
// (no expansion, contraction only, exact shared match) need. Purely
// combinational, no clock.
module range_cmp
  import rblox_pkg::*;
(
  input  key_t e_lo,
  input  key_t e_hi,
  input  key_t p_lo,
  input  key_t p_hi,
  output logic overlap,     // [p_lo,p_hi] and [e_lo,e_hi] share a key
  output logic e_covers_p,  // probe lies inside the entry
  output logic p_covers_e,  // entry lies inside the probe
  output logic equal
);
  always_comb begin
    overlap    = !((p_hi < e_lo) || (p_lo > e_hi));
    e_covers_p = (e_lo <= p_lo) && (p_hi <= e_hi);
    p_covers_e = (p_lo <= e_lo) && (e_hi <= p_hi);
    equal      = (p_lo == e_lo) && (p_hi == e_hi);
  end
endmodule
