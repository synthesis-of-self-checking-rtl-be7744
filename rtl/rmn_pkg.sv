// rmn_pkg -- shared types and the worked example of the reduced (m, n)-code.
//
// The reduced (m, n)-code protects the output word of a microprogrammed
// controller. The k microoperations y1..yk are split into m classes V1..Vm of
// mutually incompatible microoperations (no two of a class ever appear in the
// same microinstruction). Each class Vi gets one control bit ci, which is 1
// exactly when the microinstruction uses no microoperation of Vi. Every
// encoded word z = {c, y} then holds exactly one 1 in each class
// Zi = Vi + {ci}, so exactly m ones in n = k + m bits, and any unidirectional
// error breaks the 1-out-of-|Zi| property of at least one class.
//
// Bit numbering used throughout: z_i is bit i-1 of a packed vector, so for the
// example z[5:0] = y6..y1 and z[8:6] = c3..c1.
//
// The example constants are the six-microoperation, three-class controller of
// the method's worked example: V1 = {y1,y2,y5}, V2 = {y3,y6}, V3 = {y4}, with
// ten microinstructions Y0..Y9. The U1/U2 split of each class used by the
// checker is the one that gives the example's checker equations:
// Z1: U1={z1,z2} U2={z5,z7}; Z2: U1={z3,z6} U2={z8}; Z3: U1={z4} U2={z9}.
package rmn_pkg;

  // A signal in paraphase (two-rail) code: r1 != r2 is a valid value
  // (10 = 1, 01 = 0 of the represented function), 00 and 11 signal an error.
  typedef struct packed {
    logic r1;
    logic r2;
  } pp_t;

  // ---- worked example -----------------------------------------------------
  localparam int unsigned K_EX      = 6;          // microoperations
  localparam int unsigned M_EX      = 3;          // classes = control bits
  localparam int unsigned N_EX      = K_EX + M_EX; // code word length
  localparam int unsigned NUM_MI_EX = 10;         // microinstructions Y0..Y9

  typedef logic [K_EX-1:0] ex_data_t;
  typedef logic [M_EX-1:0] ex_ctrl_t;
  typedef logic [N_EX-1:0] ex_word_t;

  // Classes of microoperations, as masks over y (bit i-1 = y_i).
  localparam logic [M_EX-1:0][K_EX-1:0] EX_V_MASK = {
    6'b001000,   // V3 = {y4}
    6'b100100,   // V2 = {y3, y6}
    6'b010011    // V1 = {y1, y2, y5}
  };

  // Classes of the encoded word, as masks over z (bit i-1 = z_i).
  localparam logic [M_EX-1:0][N_EX-1:0] EX_CLASS_MASK = {
    9'b100_001_000,  // Z3 = {z4, z9}
    9'b010_100_100,  // Z2 = {z3, z6, z8}
    9'b001_010_011   // Z1 = {z1, z2, z5, z7}
  };

  // Bits of z that the checker places in U2 of their class.
  localparam logic [N_EX-1:0] EX_U2_MASK = 9'b111_010_000; // z5, z7, z8, z9

  // Data bits (y6..y1) of microinstructions Y0..Y9; entry j is Y_j.
  localparam logic [NUM_MI_EX-1:0][K_EX-1:0] EX_MI_TABLE = {
    6'b100010,   // Y9: y2 y6
    6'b000100,   // Y8: y3
    6'b010000,   // Y7: y5
    6'b001100,   // Y6: y3 y4
    6'b101000,   // Y5: y4 y6
    6'b100001,   // Y4: y1 y6
    6'b111000,   // Y3: y4 y5 y6
    6'b001010,   // Y2: y2 y4
    6'b001101,   // Y1: y1 y3 y4
    6'b000000    // Y0: no microoperation
  };

  // True when the represented paraphase value is valid (no error).
  function automatic logic pp_ok(pp_t p);
    return p.r1 ^ p.r2;
  endfunction

endpackage
