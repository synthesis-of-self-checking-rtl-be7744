// rmn_encoder -- control-bit generator of the reduced (m, n)-code.
//
// For each class Vi of mutually incompatible microoperations the control bit
// is ci = NOR of the microoperations of Vi: it is 1 exactly when the
// microinstruction uses none of them. The data bits are not changed (the code
// is separable), and each encoded word {c, y} has exactly one 1 per class, so
// m ones in all. The rule is the method's; the data bits must be an
// admissible microinstruction (at most one microoperation per class) for the
// result to be a code word.
//
// Parameters: K data bits, M classes, V_MASK[i] = microoperations of class
// V(i+1) (bit j-1 = y_j). Defaults are the worked example. Combinational.
module rmn_encoder
  import rmn_pkg::*;
#(
  parameter int unsigned         K      = K_EX,
  parameter int unsigned         M      = M_EX,
  parameter logic [M-1:0][K-1:0] V_MASK = EX_V_MASK
) (
  input  logic [K-1:0] y,
  output logic [M-1:0] c
);

  always_comb begin
    for (int i = 0; i < int'(M); i++) c[i] = ~|(y & V_MASK[i]);
  end

endmodule
