// tb_checker_self_test -- self-testing and fault-secure behaviour of the
// reduced (m, n)-code checker, at the level of its cells.
// The worked-example checker is rebuilt here from its cells (three
// paraphase_one_hot, two paraphase_and) with a stuck-at fault injectable on
// every rail between them: the six class-checker rails, the two rails of the
// first conjunction and the two output rails, 10 lines x 2 polarities. The
// nine inputs are also faulted. For each fault the ten code words Y0..Y9 are
// applied and two properties are checked:
//   self-testing: at least one code word gives r1 == r2 (the fault shows);
//   fault-secure: no code word gives a valid pair that differs from the
//                 fault-free pair (the fault never produces a wrong answer).
// A fault on an input line is an error in the word and must show as well.
// The fault-free rebuilt checker must also agree with rmn_checker.
module tb_checker_self_test;
  import rmn_pkg::*;

  localparam logic [8:0] CODE [10] = '{
    9'b111_000000, 9'b000_001101, 9'b010_001010, 9'b000_111000,
    9'b100_100001, 9'b001_101000, 9'b001_001100, 9'b110_010000,
    9'b101_000100, 9'b100_100010
  };

  logic [8:0]  z, zf;
  logic [8:0]  in_sa0, in_sa1;
  logic [9:0]  sa0, sa1;            // rails: 0-5 classes, 6-7 first AND, 8-9 output
  pp_t         c0, c1, c2, c0f, c1f, c2f, a01, a01f, rr, rf, rref;
  int          checks = 0, failures = 0;
  int          n_faults = 0, n_detected = 0;

  assign zf = (z & ~in_sa0) | in_sa1;

  paraphase_one_hot #(.T(9), .MEMBER(EX_CLASS_MASK[0]), .IN_U2(EX_U2_MASK)) u_c0 (.u(zf), .r(c0));
  paraphase_one_hot #(.T(9), .MEMBER(EX_CLASS_MASK[1]), .IN_U2(EX_U2_MASK)) u_c1 (.u(zf), .r(c1));
  paraphase_one_hot #(.T(9), .MEMBER(EX_CLASS_MASK[2]), .IN_U2(EX_U2_MASK)) u_c2 (.u(zf), .r(c2));

  assign c0f  = (c0  & ~sa0[1:0]) | sa1[1:0];
  assign c1f  = (c1  & ~sa0[3:2]) | sa1[3:2];
  assign c2f  = (c2  & ~sa0[5:4]) | sa1[5:4];

  paraphase_and u_a01 (.a(c0f), .b(c1f), .p(a01));
  assign a01f = (a01 & ~sa0[7:6]) | sa1[7:6];
  paraphase_and u_a012 (.a(a01f), .b(c2f), .p(rr));
  assign rf   = (rr & ~sa0[9:8]) | sa1[9:8];

  rmn_checker u_ref (.z(z), .r(rref));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s: sa0=%b sa1=%b in_sa0=%b in_sa1=%b", what, sa0, sa1, in_sa0, in_sa1);
    end
  endtask

  // Apply all code words under the current fault; return whether it showed.
  task automatic run_fault(input string name);
    bit   shown = 0;
    pp_t  good [10];
    logic [9:0] s0, s1;
    logic [8:0] i0, i1;
    s0 = sa0; s1 = sa1; i0 = in_sa0; i1 = in_sa1;
    sa0 = '0; sa1 = '0; in_sa0 = '0; in_sa1 = '0;
    foreach (CODE[j]) begin
      z = CODE[j];
      #1;
      good[j] = rf;
    end
    sa0 = s0; sa1 = s1; in_sa0 = i0; in_sa1 = i1;
    foreach (CODE[j]) begin
      z = CODE[j];
      #1;
      if (rf.r1 == rf.r2) shown = 1;
      else check(rf == good[j], {name, ": fault-secure"});
    end
    n_faults++;
    if (shown) n_detected++;
    check(shown, {name, ": detected by a code word"});
  endtask

  initial begin
    sa0 = '0; sa1 = '0; in_sa0 = '0; in_sa1 = '0;
    foreach (CODE[j]) begin
      z = CODE[j];
      #1;
      check(rf == rref && rf.r1 != rf.r2, "fault-free rebuild matches rmn_checker");
    end
    for (int l = 0; l < 10; l++) begin
      sa0 = 10'(1) << l; sa1 = '0;
      run_fault($sformatf("rail %0d s-a-0", l));
      sa0 = '0; sa1 = 10'(1) << l;
      run_fault($sformatf("rail %0d s-a-1", l));
    end
    sa0 = '0; sa1 = '0;
    for (int l = 0; l < 9; l++) begin
      in_sa0 = 9'(1) << l; in_sa1 = '0;
      run_fault($sformatf("input z%0d s-a-0", l + 1));
      in_sa0 = '0; in_sa1 = 9'(1) << l;
      run_fault($sformatf("input z%0d s-a-1", l + 1));
    end
    $display("faults injected=%0d detected=%0d", n_faults, n_detected);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
