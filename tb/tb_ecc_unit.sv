// tb_ecc_unit: random code words with no, one or two flipped bits through
// the full single-bus SEC-DED circuit: single errors must come out repaired,
// double errors flagged uncorrectable and passed unchanged.
module tb_ecc_unit;
  import ft_pkg::*;
  int checks = 0, failures = 0;

  data_t  d, dq;
  check_t c, cq, syn;
  logic   err, cor, unc;

  ecc_unit dut (.data(d), .check(c), .data_out(dq), .check_out(cq), .syndrome(syn),
                .error(err), .corrected(cor), .uncorrectable(unc));

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
    for (int n = 0; n < 3000; n++) begin
      data_t v;
      code_t good, w;
      int    nerr, p0, p1;
      v = $urandom;
      good = {ref_check(v), v};
      w = good;
      nerr = n % 3;
      p0 = $urandom_range(CODE_W - 1);
      p1 = (p0 + 1 + $urandom_range(CODE_W - 2)) % CODE_W;
      if (nerr >= 1) w[p0] = ~w[p0];
      if (nerr == 2) w[p1] = ~w[p1];
      {c, d} = w;
      #1;
      check(err == (nerr != 0), "error flag");
      check(cor == (nerr == 1), "corrected flag");
      check(unc == (nerr == 2), "uncorrectable flag");
      if (nerr <= 1) check({cq, dq} == good, $sformatf("repaired word %h expected %h", {cq, dq}, good));
      else           check({cq, dq} == w, "double-error word passed unchanged");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
