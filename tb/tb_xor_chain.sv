// tb_xor_chain: checks the switching-cell parity chain: even/odd rails
// against a population count, complementary rails while evaluating, and both
// rails high while precharging. 32-cell default and a 14-cell chain.
module tb_xor_chain;
  int checks = 0, failures = 0;

  logic [31:0] d32;
  logic [13:0] d14;
  logic        pre;
  logic        e32, o32, e14, o14;

  xor_chain           dut32 (.d(d32), .precharge(pre), .even(e32), .odd(o32));
  xor_chain #(.M(14)) dut14 (.d(d14), .precharge(pre), .even(e14), .odd(o14));

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0b expected %0b", what, got, exp);
    end
  endtask

  task automatic apply(input logic [31:0] v);
    logic par32, par14;
    par32 = logic'($countones(v) % 2);
    par14 = logic'($countones(v[13:0]) % 2);
    d32 = v; d14 = v[13:0];
    pre = 1'b1;
    #1;
    check(e32 & o32, 1'b1, "precharged rails 32");
    check(e14 & o14, 1'b1, "precharged rails 14");
    pre = 1'b0;
    #1;
    check(o32, par32, $sformatf("odd32 %h", v));
    check(e32, ~par32, $sformatf("even32 %h", v));
    check(o14, par14, $sformatf("odd14 %h", v[13:0]));
    check(e14, ~par14, $sformatf("even14 %h", v[13:0]));
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    apply('0);
    apply('1);
    apply(32'hB000_0005);   // d0 = 1, d1 = 0, d2 = 1, ..., d31 = 1
    for (int i = 0; i < 32; i++) apply(32'h1 << i);
    for (int i = 0; i < 1000; i++) apply($urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
