// tb_paraphase_and -- exhaustive test of the paraphase conjunction cell.
// All 16 input pairs are applied. Expected behaviour, worked out from the
// meaning of two-rail signals: the output is valid (p1 != p2) exactly when
// both inputs are valid; for valid inputs p = 10 when the inputs carry the
// same rail value and 01 otherwise; a 00 input gives 00; 11 with 11 gives 11;
// 11 with a valid input gives 11.
module tb_paraphase_and;
  import rmn_pkg::*;

  pp_t a, b, p;
  int  checks = 0, failures = 0;

  paraphase_and dut (.a(a), .b(b), .p(p));

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
      $display("FAIL %s: a=%b b=%b p=%b", what, a, b, p);
    end
  endtask

  initial begin
    pp_t exp_p;
    bit va, vb;
    for (int ia = 0; ia < 4; ia++) begin
      for (int ib = 0; ib < 4; ib++) begin
        a = pp_t'(ia[1:0]);
        b = pp_t'(ib[1:0]);
        #1;
        va = (a.r1 != a.r2);
        vb = (b.r1 != b.r2);
        check((p.r1 != p.r2) == (va && vb), "validity");
        if (va && vb)              exp_p = (a == b) ? 2'b10 : 2'b01;
        else if (a == 2'b00 || b == 2'b00) exp_p = 2'b00;
        else                       exp_p = 2'b11;
        check(p == exp_p, "value");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
