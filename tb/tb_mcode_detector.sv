// tb_mcode_detector: stores random words with correct check bits, flips
// none, one or two of the 39 code bits, and checks the syndrome and the
// error / single / double flags.
module tb_mcode_detector;
  import ft_pkg::*;
  int checks = 0, failures = 0;

  data_t  d;
  check_t c, syn;
  logic   err, sgl, dbl;

  mcode_detector dut (.data(d), .check(c), .syndrome(syn), .error(err),
                      .single_err(sgl), .double_err(dbl));

  function automatic check_t ref_check(data_t v);
    check_t r;
    for (int k = 0; k < CHECK_W; k++) r[k] = ^(v & mcode_row(k));
    return r;
  endfunction

  function automatic check_t col_of(int pos);
    return (pos < DATA_W) ? mcode_col(pos) : check_t'(1 << (pos - DATA_W));
  endfunction

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
    for (int n = 0; n < 3000; n++) begin
      data_t  v;
      code_t  w;
      int     nerr, p0, p1;
      check_t esyn;
      v = $urandom;
      w = {ref_check(v), v};
      nerr = n % 3;
      p0 = $urandom_range(CODE_W - 1);
      p1 = (p0 + 1 + $urandom_range(CODE_W - 2)) % CODE_W;
      esyn = '0;
      if (nerr >= 1) begin w[p0] = ~w[p0]; esyn ^= col_of(p0); end
      if (nerr == 2) begin w[p1] = ~w[p1]; esyn ^= col_of(p1); end
      {c, d} = w;
      #1;
      check(syn == esyn, $sformatf("syndrome %b expected %b", syn, esyn));
      check(err == (nerr != 0), $sformatf("error flag, %0d errors", nerr));
      check(sgl == (nerr == 1), $sformatf("single flag, %0d errors", nerr));
      check(dbl == (nerr == 2), $sformatf("double flag, %0d errors", nerr));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
