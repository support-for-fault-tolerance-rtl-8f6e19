// tb_mcode_correct: the controlled inverters must invert exactly the code
// bits selected by the flip lines.
module tb_mcode_correct;
  import ft_pkg::*;
  int checks = 0, failures = 0;

  data_t  d, dq;
  check_t c, cq;
  code_t  f;

  mcode_correct dut (.data(d), .check(c), .flip(f), .data_out(dq), .check_out(cq));

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 500; n++) begin
      code_t w;
      int    pos;
      w = {7'($urandom), 32'($urandom)};
      pos = $urandom_range(CODE_W - 1);
      {c, d} = w;
      f = (n % 5 == 0) ? code_t'(0) : (code_t'(1) << pos);
      #1;
      checks++;
      if ({cq, dq} !== (w ^ f)) begin
        failures++;
        $display("FAIL word %h flip %h got %h", w, f, {cq, dq});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
