// tb_xor_senseamp: checks the sense-amplifier parity generators. The
// two-level form (4 chains of 8, then a 4-cell chain) must give the parity of
// the word presented two enabled edges earlier; the one-level form one edge
// earlier. With latch or trigger low the outputs must hold.
module tb_xor_senseamp;
  int checks = 0, failures = 0;

  logic        clk = 1'b0, rst_n = 1'b0;
  logic        trig, lat;
  logic [31:0] d;
  logic        p2, p2n, v2, p1, p1n, v1;

  always #5 clk = ~clk;

  xor_senseamp                          dut2 (.clk(clk), .rst_n(rst_n), .trigger(trig), .latch(lat),
                                              .d(d), .parity(p2), .parity_n(p2n), .valid(v2));
  xor_senseamp #(.TWO_LEVEL(1'b0))      dut1 (.clk(clk), .rst_n(rst_n), .trigger(trig), .latch(lat),
                                              .d(d), .parity(p1), .parity_n(p1n), .valid(v1));

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0b expected %0b", what, got, exp);
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0] hist [3];
  int          n_en;

  initial begin
    trig = 1'b0; lat = 1'b0; d = '0; n_en = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(v2, 1'b0, "two-level not valid after reset");
    check(v1, 1'b0, "one-level not valid after reset");
    for (int i = 0; i < 600; i++) begin
      logic en;
      en = (i % 5 != 4);           // every fifth cycle latch is held low
      d = $urandom;
      trig = 1'b1;
      lat = en;
      if (i % 7 == 6) begin trig = 1'b0; lat = 1'b1; en = 1'b0; end
      @(posedge clk);
      if (en) begin
        hist[2] = hist[1]; hist[1] = hist[0]; hist[0] = d;
        n_en++;
      end
      @(negedge clk);
      if (n_en >= 1) begin
        check(p1, logic'($countones(hist[0]) % 2), "one-level parity");
        check(p1n, ~p1, "one-level complement");
        check(v1, 1'b1, "one-level valid");
      end
      if (n_en >= 2) begin
        check(p2, logic'($countones(hist[1]) % 2), "two-level parity");
        check(p2n, ~p2, "two-level complement");
        check(v2, 1'b1, "two-level valid");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
