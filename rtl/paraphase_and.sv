// paraphase_and -- conjunction of two signals carried in paraphase code.
//
// With a = (a1, a2) and b = (b1, b2), the result is
//   p1 = a1 b1 | a2 b2,   p2 = a1 b2 | a2 b1.
// For valid inputs (a1 != a2, b1 != b2) the output is valid and, read as the
// pair (p1, p2), equals 10 exactly when both inputs are 10 or both are 01.
// Validity of the output is thus the AND of the validity of the inputs, which
// is how the checker combines its per-class results. Any input that is 00 gives 00 and a pair of 11
// inputs gives 11, so an error on either input reaches the output. The cell
// uses no inverters, which keeps it testable inside a self-checking checker.
// These equations are the method's own; the struct packaging is this
// design's. Purely combinational, no clock.
module paraphase_and
  import rmn_pkg::*;
(
  input  pp_t a,
  input  pp_t b,
  output pp_t p
);

  always_comb begin
    p.r1 = (a.r1 & b.r1) | (a.r2 & b.r2);
    p.r2 = (a.r1 & b.r2) | (a.r2 & b.r1);
  end

endmodule
