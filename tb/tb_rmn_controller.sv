// tb_rmn_controller -- test of the encoded microinstruction memory. After
// reset the outputs must hold Y0 (all y = 0, all c = 1) with out_valid low.
// Each address then presented with mi_valid must produce the tabulated data
// and control bits exactly one clock later; holding mi_valid low must keep
// the word; addresses 10..15 must read Y0.
module tb_rmn_controller;
  import rmn_pkg::*;

  logic       clk = 0, rst_n = 1, mi_valid = 0;
  logic [3:0] mi_addr = '0;
  logic [5:0] y;
  logic [2:0] c;
  logic       out_valid;
  int         checks = 0, failures = 0;

  localparam logic [8:0] CODE [10] = '{
    9'b111_000000, 9'b000_001101, 9'b010_001010, 9'b000_111000,
    9'b100_100001, 9'b001_101000, 9'b001_001100, 9'b110_010000,
    9'b101_000100, 9'b100_100010
  };

  rmn_controller dut (
    .clk(clk), .rst_n(rst_n), .mi_valid(mi_valid), .mi_addr(mi_addr),
    .y(y), .c(c), .out_valid(out_valid)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s: addr=%0d y=%b c=%b v=%b", what, mi_addr, y, c, out_valid);
    end
  endtask

  initial begin
    logic [8:0] prev;
    #1 rst_n = 0;
    #1;
    check({c, y} == 9'b111_000000 && !out_valid, "reset word");
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int rep = 0; rep < 3; rep++) begin
      for (int j = 0; j < 16; j++) begin
        @(negedge clk);
        prev = {c, y};
        mi_addr  = 4'(j);
        mi_valid = 1;
        #1;
        check({c, y} == prev, "no change before clock edge");
        @(negedge clk);
        check(out_valid, "out_valid after one clock");
        check({c, y} == ((j < 10) ? CODE[j] : CODE[0]), $sformatf("word of address %0d", j));
        mi_valid = 0;
        mi_addr  = 4'($urandom_range(0, 15));
        prev = {c, y};
        @(negedge clk);
        check(!out_valid && {c, y} == prev, "word held while idle");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
