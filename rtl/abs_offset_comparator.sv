// abs_offset_comparator - distance of a duty-cycle count to its target, and
// comparison with the running minimum.
//
// The offset is count - target.  When count is below the target the
// difference is inverted bit by bit (one's complement) instead of negated,
// which is cheaper in gates and gives target - count - 1, one less than the
// true distance; the error is negligible next to the counts involved.  The
// offset is passed on only while compare is high and is otherwise 0.  A
// magnitude comparator then reports whether the offset is less than, equal
// to or greater than the stored minimum.  Purely combinational.
module abs_offset_comparator #(
  parameter int unsigned W = 7
) (
  input  logic [W-1:0] count,    // one's counter value
  input  logic [W-1:0] target,   // ideal count for this level
  input  logic [W-1:0] min_q,    // current minimum (Q)
  input  logic         compare,  // CMPR
  output logic [W-1:0] offset,   // absolute offset (D)
  output logic         less,     // D <  Q
  output logic         equal,    // D == Q
  output logic         greater   // D >  Q
);

  logic         inv;
  logic [W-1:0] diff;

  always_comb begin
    inv     = (count < target);
    diff    = count - target;
    offset  = compare ? (inv ? ~diff : diff) : '0;
    less    = (offset < min_q);
    equal   = (offset == min_q);
    greater = (offset > min_q);
  end

endmodule
