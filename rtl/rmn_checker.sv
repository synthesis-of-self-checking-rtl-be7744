// rmn_checker -- control circuit (checker) for the reduced (m, n)-code.
//
// A word z is a code word when every class Zi of the encoding partition holds
// exactly one 1:  R = F=1(Z1) & F=1(Z2) & ... & F=1(Zm).  Any unidirectional
// error (some 0s turned to 1, or some 1s turned to 0, never both) changes the
// count of ones in at least one class away from 1, so R drops to 0.
//
// R is produced in paraphase code as r = (r1, r2): one paraphase_one_hot per
// class, then a chain of paraphase_and cells combining class 1 with class 2,
// the result with class 3, and so on. r1 != r2 means no error; 00 or 11 means
// an error in the word or a fault inside the checker itself. For the default
// (worked example) partition this gives exactly
//   r1 = p1 p3 z4 | p2 p4 z4 | p1 p4 z9 | p2 p3 z9,
//   r2 = p1 p3 z9 | p2 p4 z9 | p1 p4 z4 | p2 p3 z4,
// with p1 = z1|z2|z5z7, p2 = z1z2|z5|z7, p3 = z3|z6, p4 = z3z6|z8.
// The structure is the method's; the chaining order (class 1 first) is this
// design's reading of the example.
//
// Parameters: N code bits, M classes, CLASS_MASK[i] = bits of class Z(i+1),
// U2_MASK = bits placed in U2 of their class. Combinational, no clock.
module rmn_checker
  import rmn_pkg::*;
#(
  parameter int unsigned              N          = N_EX,
  parameter int unsigned              M          = M_EX,
  parameter logic [M-1:0][N-1:0]      CLASS_MASK = EX_CLASS_MASK,
  parameter logic [N-1:0]             U2_MASK    = EX_U2_MASK
) (
  input  logic [N-1:0] z,
  output pp_t          r
);

  pp_t cls_r [M];   // paraphase 1-out-of-n result of each class
  pp_t acc   [M];   // running conjunction over classes 0..g

  for (genvar g = 0; g < int'(M); g++) begin : g_class
    paraphase_one_hot #(
      .T     (N),
      .MEMBER(CLASS_MASK[g]),
      .IN_U2 (U2_MASK)
    ) u_one_hot (
      .u(z),
      .r(cls_r[g])
    );

    if (g == 0) begin : g_first
      assign acc[0] = cls_r[0];
    end else begin : g_and
      paraphase_and u_and (
        .a(acc[g-1]),
        .b(cls_r[g]),
        .p(acc[g])
      );
    end
  end

  assign r = acc[M-1];

endmodule
