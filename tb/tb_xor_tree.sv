// tb_xor_tree: checks the static XOR-tree parity generator against a
// population count, for the 32-input default, the 16-input tree and a
// 5-input tree that needs padding. Random vectors plus all-zero, all-one and
// one-hot words.
module tb_xor_tree;
  int checks = 0, failures = 0;

  logic [31:0] x32;
  logic [15:0] x16;
  logic [4:0]  x5;
  logic        p32, p16, p5;

  xor_tree             dut32 (.x(x32), .parity(p32));
  xor_tree #(.M(16))   dut16 (.x(x16), .parity(p16));
  xor_tree #(.M(5))    dut5  (.x(x5),  .parity(p5));

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0b expected %0b", what, got, exp);
    end
  endtask

  task automatic apply(input logic [31:0] v);
    x32 = v; x16 = v[15:0]; x5 = v[4:0];
    #1;
    check(p32, logic'($countones(v) % 2), $sformatf("32-bit %h", v));
    check(p16, logic'($countones(v[15:0]) % 2), $sformatf("16-bit %h", v[15:0]));
    check(p5,  logic'($countones(v[4:0]) % 2), $sformatf("5-bit %h", v[4:0]));
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
    for (int i = 0; i < 32; i++) apply(32'h1 << i);
    for (int i = 0; i < 2000; i++) apply($urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
