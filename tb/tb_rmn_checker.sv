// tb_rmn_checker -- exhaustive test of the reduced (m, n)-code checker at the
// worked-example partition Z1 = {z1,z2,z5,z7}, Z2 = {z3,z6,z8}, Z3 = {z4,z9}.
// For all 512 words: r1 != r2 must hold exactly when each class has one 1
// (counted here from index lists, not from the design's masks), and r must
// equal the closed-form two-rail equations of the example. Then, for each of
// the ten code words Y0..Y9 (data and control bits as tabulated for the
// example), every unidirectional distortion (any non-empty set of 0s raised,
// or any non-empty set of 1s dropped) must be flagged. Two further instances
// cover the limiting partitions: one class holding all bits (all
// microoperations incompatible, m = 1, n = k + 1, no conjunction cell) and
// one class per microoperation (m = k, each class {y_i, c_i}).
module tb_rmn_checker;
  import rmn_pkg::*;

  logic [8:0] z;
  pp_t        r;
  int         checks = 0, failures = 0;
  int         n_up = 0, n_down = 0;

  // z9..z1 of Y0..Y9: c3 c2 c1 y6 y5 y4 y3 y2 y1
  localparam logic [8:0] CODE [10] = '{
    9'b111_000000, 9'b000_001101, 9'b010_001010, 9'b000_111000,
    9'b100_100001, 9'b001_101000, 9'b001_001100, 9'b110_010000,
    9'b101_000100, 9'b100_100010
  };
  localparam int C1 [4] = '{1, 2, 5, 7};
  localparam int C2 [3] = '{3, 6, 8};
  localparam int C3 [2] = '{4, 9};

  rmn_checker dut (.z(z), .r(r));

  // m = 1: k = 6 microoperations, one control bit, 1-out-of-7.
  logic [6:0] z1c;
  pp_t        r1c;
  rmn_checker #(
    .N(7), .M(1), .CLASS_MASK(7'b1111111), .U2_MASK(7'b1110000)
  ) dut_m1 (.z(z1c), .r(r1c));

  // m = k = 4: classes {z1,z5}, {z2,z6}, {z3,z7}, {z4,z8}.
  logic [7:0] zk;
  pp_t        rk;
  rmn_checker #(
    .N(8), .M(4),
    .CLASS_MASK({8'b1000_1000, 8'b0100_0100, 8'b0010_0010, 8'b0001_0001}),
    .U2_MASK(8'b1111_0000)
  ) dut_mk (.z(zk), .r(rk));

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
      $display("FAIL %s: z=%b r=%b", what, z, r);
    end
  endtask

  function automatic logic zb(logic [8:0] w, int i);  // z_i, 1-based
    return w[i-1];
  endfunction

  initial begin
    int n1, n2, n3;
    logic p1, p2, p3, p4, e1, e2;
    logic [8:0] flip;
    for (int v = 0; v < 512; v++) begin
      z = v[8:0];
      #1;
      n1 = 0; n2 = 0; n3 = 0;
      foreach (C1[i]) n1 += int'(zb(z, C1[i]));
      foreach (C2[i]) n2 += int'(zb(z, C2[i]));
      foreach (C3[i]) n3 += int'(zb(z, C3[i]));
      check((r.r1 != r.r2) == (n1 == 1 && n2 == 1 && n3 == 1), "R = F=1(Z1)&F=1(Z2)&F=1(Z3)");
      p1 = zb(z,1) | zb(z,2) | (zb(z,5) & zb(z,7));
      p2 = (zb(z,1) & zb(z,2)) | zb(z,5) | zb(z,7);
      p3 = zb(z,3) | zb(z,6);
      p4 = (zb(z,3) & zb(z,6)) | zb(z,8);
      e1 = (p1&p3&zb(z,4)) | (p2&p4&zb(z,4)) | (p1&p4&zb(z,9)) | (p2&p3&zb(z,9));
      e2 = (p1&p3&zb(z,9)) | (p2&p4&zb(z,9)) | (p1&p4&zb(z,4)) | (p2&p3&zb(z,4));
      check(r.r1 == e1 && r.r2 == e2, "closed-form r1/r2");
    end
    foreach (CODE[j]) begin
      z = CODE[j];
      #1;
      check(r.r1 != r.r2, "code word accepted");
      for (int f = 1; f < 512; f++) begin
        flip = f[8:0];
        if ((flip & ~CODE[j]) == flip) begin       // raise only 0 bits
          z = CODE[j] | flip;
          #1;
          n_up++;
          check(r.r1 == r.r2, "0->1 unidirectional error detected");
        end
        if ((flip & CODE[j]) == flip) begin        // drop only 1 bits
          z = CODE[j] & ~flip;
          #1;
          n_down++;
          check(r.r1 == r.r2, "1->0 unidirectional error detected");
        end
      end
    end
    for (int v = 0; v < 128; v++) begin
      z1c = v[6:0];
      #1;
      check((r1c.r1 != r1c.r2) == ($countones(z1c) == 1), "m = 1 checker");
    end
    for (int v = 0; v < 256; v++) begin
      bit ok;
      zk = v[7:0];
      #1;
      ok = 1;
      for (int i = 0; i < 4; i++) if (zk[i] == zk[i+4]) ok = 0;
      check((rk.r1 != rk.r2) == ok, "m = k checker");
    end
    $display("unidirectional errors tried: %0d raising, %0d dropping", n_up, n_down);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
