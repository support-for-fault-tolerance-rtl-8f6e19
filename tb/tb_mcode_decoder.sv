// tb_mcode_decoder: every single-error syndrome must select exactly its code
// bit; every other syndrome must select nothing.
module tb_mcode_decoder;
  import ft_pkg::*;
  int checks = 0, failures = 0;

  check_t syn;
  code_t  flip;
  logic   loc;

  mcode_decoder dut (.syndrome(syn), .flip(flip), .located(loc));

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < (1 << CHECK_W); s++) begin
      code_t exp;
      exp = '0;
      for (int i = 0; i < DATA_W; i++) if (mcode_col(i) == check_t'(s)) exp[i] = 1'b1;
      for (int r = 0; r < CHECK_W; r++) if (s == (1 << r)) exp[DATA_W + r] = 1'b1;
      syn = check_t'(s);
      #1;
      check(flip == exp, $sformatf("syndrome %b: flip %h expected %h", syn, flip, exp));
      check(loc == (exp != '0), $sformatf("syndrome %b: located", syn));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
