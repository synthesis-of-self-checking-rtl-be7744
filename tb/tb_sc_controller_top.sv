// tb_sc_controller_top -- end-to-end test of the self-checking controller at
// its default (worked-example) size.
// Every microinstruction is issued fault-free (the checker must report a
// valid pair), then with every single stuck-at-0 and stuck-at-1 output line,
// then with random multi-line stuck-at-0 and stuck-at-1 sets. A fault that
// changes the word is a unidirectional error and must raise error in the
// same cycle the word appears; a fault that leaves the word unchanged must
// not. The word must appear one clock after its address. Each mechanism is
// counted and must occur at least once: code word accepted, 1->0 error
// detected, 0->1 error detected, multi-bit error detected, fault masked by
// the word, out-of-range address reading Y0, reset word Y0.
module tb_sc_controller_top;
  import rmn_pkg::*;

  logic     clk = 0, rst_n = 1, mi_valid = 0;
  logic [3:0] mi_addr = '0;
  ex_word_t inj_sa0 = '0, inj_sa1 = '0;
  ex_data_t y;
  ex_ctrl_t c;
  logic     out_valid, error;
  pp_t      r;
  int       checks = 0, failures = 0;
  int       n_ok = 0, n_down = 0, n_up = 0, n_multi = 0, n_masked = 0;
  int       n_oor = 0, n_reset = 0;

  localparam logic [8:0] CODE [10] = '{
    9'b111_000000, 9'b000_001101, 9'b010_001010, 9'b000_111000,
    9'b100_100001, 9'b001_101000, 9'b001_001100, 9'b110_010000,
    9'b101_000100, 9'b100_100010
  };

  sc_controller_top dut (
    .clk(clk), .rst_n(rst_n), .mi_valid(mi_valid), .mi_addr(mi_addr),
    .inj_sa0(inj_sa0), .inj_sa1(inj_sa1),
    .y(y), .c(c), .out_valid(out_valid), .r(r), .error(error)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s: addr=%0d z=%b r=%b err=%b sa0=%b sa1=%b",
               what, mi_addr, {c, y}, r, error, inj_sa0, inj_sa1);
    end
  endtask

  // Issue address j, wait one clock, and check the word under the current
  // fault masks.
  task automatic issue(input int j);
    logic [8:0] exp_word, good;
    @(negedge clk);
    mi_addr  = 4'(j);
    mi_valid = 1;
    @(negedge clk);
    mi_valid = 0;
    good     = (j < 10) ? CODE[j] : CODE[0];
    exp_word = (good & ~inj_sa0) | inj_sa1;
    check(out_valid, "word one clock after address");
    check({c, y} == exp_word, "output lines");
    if (exp_word == good) begin
      check(!error && (r.r1 != r.r2), "valid word accepted");
      if (inj_sa0 == '0 && inj_sa1 == '0) n_ok++;
      else n_masked++;
      if (j >= 10) n_oor++;
    end else begin
      check(error && (r.r1 == r.r2), "unidirectional error detected");
      if ($countones(exp_word ^ good) > 1) n_multi++;
      if (inj_sa0 != '0) n_down++;
      else n_up++;
    end
  endtask

  initial begin
    #1 rst_n = 0;
    #1;
    check({c, y} == CODE[0] && !error, "reset word Y0 accepted");
    n_reset++;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int j = 0; j < 16; j++) issue(j);
    for (int j = 0; j < 10; j++) begin
      for (int b = 0; b < 9; b++) begin
        inj_sa0 = ex_word_t'(1) << b; inj_sa1 = '0;
        issue(j);
        inj_sa0 = '0; inj_sa1 = ex_word_t'(1) << b;
        issue(j);
      end
    end
    for (int t = 0; t < 400; t++) begin
      if (t[0]) begin inj_sa0 = ex_word_t'($urandom); inj_sa1 = '0; end
      else      begin inj_sa0 = '0; inj_sa1 = ex_word_t'($urandom); end
      issue($urandom_range(0, 9));
    end
    inj_sa0 = '0; inj_sa1 = '0;
    $display("accepted=%0d masked=%0d sa0_detected=%0d sa1_detected=%0d multi=%0d oor=%0d reset=%0d",
             n_ok, n_masked, n_down, n_up, n_multi, n_oor, n_reset);
    checks++; if (n_ok == 0)     begin failures++; $display("FAIL no fault-free word"); end
    checks++; if (n_down == 0)   begin failures++; $display("FAIL no 1->0 error"); end
    checks++; if (n_up == 0)     begin failures++; $display("FAIL no 0->1 error"); end
    checks++; if (n_multi == 0)  begin failures++; $display("FAIL no multi-bit error"); end
    checks++; if (n_masked == 0) begin failures++; $display("FAIL no masked fault"); end
    checks++; if (n_oor == 0)    begin failures++; $display("FAIL no out-of-range address"); end
    checks++; if (n_reset == 0)  begin failures++; $display("FAIL no reset word"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
