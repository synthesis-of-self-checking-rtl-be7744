// tb_rmn_encoder -- test of the control-bit generator at the worked-example
// classes V1 = {y1,y2,y5}, V2 = {y3,y6}, V3 = {y4}. The control bits of the
// ten example microinstructions must match the tabulated ones, and for all 64
// data words ci must be 1 exactly when no microoperation of Vi is present.
module tb_rmn_encoder;
  import rmn_pkg::*;

  logic [5:0] y;
  logic [2:0] c;
  int         checks = 0, failures = 0;

  // c3 c2 c1 _ y6..y1 of Y0..Y9
  localparam logic [8:0] CODE [10] = '{
    9'b111_000000, 9'b000_001101, 9'b010_001010, 9'b000_111000,
    9'b100_100001, 9'b001_101000, 9'b001_001100, 9'b110_010000,
    9'b101_000100, 9'b100_100010
  };

  rmn_encoder dut (.y(y), .c(c));

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
      $display("FAIL %s: y=%b c=%b", what, y, c);
    end
  endtask

  initial begin
    foreach (CODE[j]) begin
      y = CODE[j][5:0];
      #1;
      check(c == CODE[j][8:6], $sformatf("Y%0d control bits", j));
      check($countones({c, y}) == 3, "exactly m ones");
    end
    for (int v = 0; v < 64; v++) begin
      y = v[5:0];
      #1;
      check(c[0] == !(y[0] || y[1] || y[4]), "c1");
      check(c[1] == !(y[2] || y[5]), "c2");
      check(c[2] == !y[3], "c3");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
