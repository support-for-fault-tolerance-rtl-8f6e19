// tb_duplex_comparator: signatures are presented every cycle; mismatch must
// report each unequal valid pair exactly two cycles later, and flush must
// drop pairs in flight.
module tb_duplex_comparator;
  int checks = 0, failures = 0;

  logic       clk = 1'b0, rst_n = 1'b0;
  logic       fl, v;
  logic [3:0] sa, sb;
  logic       mm;

  always #5 clk = ~clk;

  duplex_comparator dut (.clk(clk), .rst_n(rst_n), .flush(fl), .valid(v),
                         .sig_a(sa), .sig_b(sb), .mismatch(mm));

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic e1, e2;
    fl = 1'b0; v = 1'b0; sa = '0; sb = '0;
    e1 = 1'b0; e2 = 1'b0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 1000; n++) begin
      @(negedge clk);
      // e2: outcome due now, from the pair presented two cycles ago
      check(mm == e2, $sformatf("cycle %0d mismatch=%0b expected %0b", n, mm, e2));
      sa = $urandom;
      sb = ($urandom_range(3) == 0) ? sa ^ 4'(1 << $urandom_range(3)) : sa;
      v  = ($urandom_range(9) != 0);
      fl = (n % 50 == 25);
      // pipeline of expected outcomes, cleared by flush
      e2 = fl ? 1'b0 : e1;
      e1 = fl ? 1'b0 : (v && (sa != sb));
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
