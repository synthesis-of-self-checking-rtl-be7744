// paraphase_one_hot -- "1-out-of-t" function F=1(U) in paraphase code.
//
// The set U of input variables is split into two disjoint halves U1 and U2,
// and the pair
//   r1 = F>=1(U1) | F>=2(U2),   r2 = F>=1(U2) | F>=2(U1)
// is formed, where F>=1 is the OR of a set and F>=2 the OR of all pairwise
// ANDs of a set. With no input at 1 the output is 00; with exactly one at 1
// it is 10 (the one lies in U1) or 01 (it lies in U2); with two or more at 1
// it is 11. So r1 != r2 exactly when one input is 1, and the circuit needs no
// inverters. This construction is the method's; the split is a parameter.
//
// Parameters: T is the width of the input vector u. MEMBER selects which bits
// of u belong to U (the others are ignored), so one full code word can be
// fed to the checkers of all classes. IN_U2 marks the members of U2; the
// remaining members form U1. The defaults are the method's five-input example
// U1 = {u1, u2}, U2 = {u3, u4, u5}. Purely combinational, no clock.
module paraphase_one_hot
  import rmn_pkg::*;
#(
  parameter int unsigned      T      = 5,
  parameter logic [T-1:0]     MEMBER = '1,
  parameter logic [T-1:0]     IN_U2  = 5'b11100
) (
  input  logic [T-1:0] u,
  output pp_t          r
);

  localparam logic [T-1:0] SET1 = MEMBER & ~IN_U2;
  localparam logic [T-1:0] SET2 = MEMBER & IN_U2;

  logic ge1_u1, ge1_u2, ge2_u1, ge2_u2;

  always_comb begin
    ge1_u1 = |(u & SET1);
    ge1_u2 = |(u & SET2);
    ge2_u1 = 1'b0;
    ge2_u2 = 1'b0;
    for (int i = 0; i < int'(T); i++) begin
      for (int j = i + 1; j < int'(T); j++) begin
        if (SET1[i] && SET1[j]) ge2_u1 = ge2_u1 | (u[i] & u[j]);
        if (SET2[i] && SET2[j]) ge2_u2 = ge2_u2 | (u[i] & u[j]);
      end
    end
    r.r1 = ge1_u1 | ge2_u2;
    r.r2 = ge1_u2 | ge2_u1;
  end

endmodule
