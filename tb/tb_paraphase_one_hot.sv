// tb_paraphase_one_hot -- exhaustive test of the paraphase 1-out-of-t cell.
// Instance A uses the defaults (five inputs, U1 = {u1,u2}, U2 = {u3,u4,u5})
// and is checked against the counting rule (no 1 -> 00, a single 1 in U1 ->
// 10, a single 1 in U2 -> 01, two or more 1s -> 11) and against the explicit
// sum-of-products  r1 = u1|u2|u3u4|u3u5|u4u5,  r2 = u1u2|u3|u4|u5.
// Instance B takes a 9-bit word with a member mask {z3,z6,z8} and U2 = {z8};
// bits outside the mask must not affect it.
module tb_paraphase_one_hot;
  import rmn_pkg::*;

  logic [4:0] u;
  pp_t        r;
  logic [8:0] w;
  pp_t        rb;
  int         checks = 0, failures = 0;

  paraphase_one_hot dut_a (.u(u), .r(r));

  paraphase_one_hot #(
    .T(9), .MEMBER(9'b010_100_100), .IN_U2(9'b010_000_000)
  ) dut_b (.u(w), .r(rb));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s: u=%b r=%b w=%b rb=%b", what, u, r, w, rb);
    end
  endtask

  initial begin
    pp_t exp_r;
    int  n;
    logic e1, e2;
    for (int v = 0; v < 32; v++) begin
      u = v[4:0];
      #1;
      n = $countones(u);
      if (n == 0)      exp_r = 2'b00;
      else if (n >= 2) exp_r = 2'b11;
      else if (u[0] || u[1]) exp_r = 2'b10;
      else             exp_r = 2'b01;
      check(r == exp_r, "counting rule");
      e1 = u[0] | u[1] | (u[2] & u[3]) | (u[2] & u[4]) | (u[3] & u[4]);
      e2 = (u[0] & u[1]) | u[2] | u[3] | u[4];
      check(r.r1 == e1 && r.r2 == e2, "equation (u1..u5)");
      check((r.r1 != r.r2) == (n == 1), "validity = exactly one");
    end
    for (int v = 0; v < 512; v++) begin
      logic [2:0] sel;
      w = v[8:0];
      #1;
      sel = {w[7], w[5], w[2]};  // z8, z6, z3
      n = $countones(sel);
      if (n == 0)      exp_r = 2'b00;
      else if (n >= 2) exp_r = 2'b11;
      else if (w[7])   exp_r = 2'b01;
      else             exp_r = 2'b10;
      check(rb == exp_r, "masked class");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
