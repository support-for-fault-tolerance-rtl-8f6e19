// tb_mcode_encoder: checks the M-code check-bit generator against the
// parity-check matrix, and checks the matrix itself: 32 distinct weight-three
// data columns, every row at most 14 data bits.
module tb_mcode_encoder;
  import ft_pkg::*;
  int checks = 0, failures = 0;

  data_t  d;
  check_t c;

  mcode_encoder dut (.data(d), .check(c));

  function automatic check_t ref_check(data_t v);
    check_t r;
    for (int k = 0; k < CHECK_W; k++) r[k] = ^(v & mcode_row(k));
    return r;
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
    for (int i = 0; i < DATA_W; i++) begin
      check($countones(mcode_col(i)) == 3, $sformatf("column %0d weight", i));
      for (int j = 0; j < i; j++)
        check(mcode_col(i) != mcode_col(j), $sformatf("columns %0d and %0d distinct", i, j));
    end
    for (int k = 0; k < CHECK_W; k++)
      check(mcode_row_weight(k) <= MCODE_MAX_ROW, $sformatf("row %0d weight", k));

    // a single data bit sets exactly the check bits of its column
    for (int i = 0; i < DATA_W; i++) begin
      d = data_t'(1) << i;
      #1;
      check(c == mcode_col(i), $sformatf("one-hot data bit %0d: %b", i, c));
    end
    d = '0;
    #1;
    check(c == '0, "zero word");
    for (int n = 0; n < 2000; n++) begin
      d = $urandom;
      #1;
      check(c == ref_check(d), $sformatf("data %h check %b expected %b", d, c, ref_check(d)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
