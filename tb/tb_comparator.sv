// tb_comparator: the 32-input comparator must report a == b exactly, for
// equal words, every single-bit difference and random words, and read
// equal while the match line is precharged.
module tb_comparator;
  int checks = 0, failures = 0;

  logic        pre;
  logic [31:0] a, b;
  logic        eq;

  comparator dut (.prech(pre), .a(a), .b(b), .eq(eq));

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
    for (int n = 0; n < 1500; n++) begin
      a = $urandom;
      case (n % 3)
        0: b = a;
        1: b = a ^ (32'h1 << (n % 32));
        default: b = $urandom;
      endcase
      pre = 1'b1;
      #1;
      check(eq, "precharged line reads high");
      pre = 1'b0;
      #1;
      check(eq == (a == b), $sformatf("a=%h b=%h eq=%0b", a, b, eq));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
