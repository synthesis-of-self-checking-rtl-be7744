// sc_controller_top -- self-checking microprogrammed controller.
//
// The controller (rmn_controller) issues microinstructions whose output word
// z = {c, y} is a code word of the reduced (m, n)-code: k microoperation bits
// plus one control bit per class of incompatible microoperations. The checker
// (rmn_checker) watches that word and reports on the paraphase pair r: 01 or
// 10 while the word is a code word, 00 or 11 when it has suffered any
// unidirectional error or when the checker itself is faulty. error is 1
// whenever r1 == r2.
//
// inj_sa0 / inj_sa1 force individual output lines (bit i-1 = z_i) to 0 or 1
// after the controller, as a stuck-at fault would; they are this design's
// test hooks and are tied to 0 in normal use. The checker sees the same lines
// the controlled datapath sees (y, c). The example of the method is built:
// six microoperations, three classes, ten microinstructions. The controller
// output is registered (one cycle from mi_addr to y/c); the checker is
// combinational on those registered lines, so r and error follow in the same
// cycle as the word.
module sc_controller_top
  import rmn_pkg::*;
(
  input  logic           clk,
  input  logic           rst_n,
  input  logic           mi_valid,
  input  logic [3:0]     mi_addr,
  input  ex_word_t       inj_sa0,
  input  ex_word_t       inj_sa1,
  output ex_data_t       y,
  output ex_ctrl_t       c,
  output logic           out_valid,
  output pp_t            r,
  output logic           error
);

  ex_data_t y_ctl;
  ex_ctrl_t c_ctl;
  ex_word_t z;

  rmn_controller #(
    .K       (K_EX),
    .M       (M_EX),
    .NUM_MI  (NUM_MI_EX),
    .AW      (4),
    .MI_TABLE(EX_MI_TABLE),
    .V_MASK  (EX_V_MASK)
  ) u_controller (
    .clk      (clk),
    .rst_n    (rst_n),
    .mi_valid (mi_valid),
    .mi_addr  (mi_addr),
    .y        (y_ctl),
    .c        (c_ctl),
    .out_valid(out_valid)
  );

  assign z = ({c_ctl, y_ctl} & ~inj_sa0) | inj_sa1;
  assign y = z[K_EX-1:0];
  assign c = z[N_EX-1:K_EX];

  rmn_checker #(
    .N         (N_EX),
    .M         (M_EX),
    .CLASS_MASK(EX_CLASS_MASK),
    .U2_MASK   (EX_U2_MASK)
  ) u_checker (
    .z(z),
    .r(r)
  );

  assign error = ~pp_ok(r);

endmodule
