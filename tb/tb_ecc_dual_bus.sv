// tb_ecc_dual_bus: two buses checked at once with one shared decoder.
// Scenarios: clean words; single error on A only, on B only, on both (A is
// corrected one cycle after the abort, B the cycle after); a double error on
// one bus beside a single on the other. op_abort must be combinational in the
// read cycle; the corrected words and their cycles are checked.
module tb_ecc_dual_bus;
  import ft_pkg::*;
  int checks = 0, failures = 0;

  logic   clk = 1'b0, rst_n = 1'b0;
  logic   va, vb;
  data_t  da, db, cdat;
  check_t ca, cb, cchk;
  logic   ea, eb, ab, st, busy, cv, cbus, unc;

  always #5 clk = ~clk;

  ecc_dual_bus dut (
    .clk(clk), .rst_n(rst_n), .valid_a(va), .data_a(da), .check_a(ca),
    .valid_b(vb), .data_b(db), .check_b(cb), .err_a(ea), .err_b(eb), .op_abort(ab),
    .start(st), .busy(busy), .corr_valid(cv), .corr_bus(cbus), .corr_data(cdat),
    .corr_check(cchk), .uncorrectable(unc));

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
    #200000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // nerr_a / nerr_b: 0, 1 or 2 flipped bits on each bus
  task automatic scenario(input int nerr_a, input int nerr_b);
    code_t ga, gb, wa, wb;
    int    p;
    begin
      data_t x, y;
      x = $urandom; y = $urandom;
      ga = {ref_check(x), x};
      gb = {ref_check(y), y};
    end
    wa = ga; wb = gb;
    for (int k = 0; k < nerr_a; k++) begin p = $urandom_range(CODE_W-1); wa[p] = ~wa[p]; if (wa == ga) wa[p] = ~wa[p]; end
    for (int k = 0; k < nerr_b; k++) begin p = $urandom_range(CODE_W-1); wb[p] = ~wb[p]; if (wb == gb) wb[p] = ~wb[p]; end
    if (nerr_a == 2 && $countones(wa ^ ga) != 2) begin nerr_a = $countones(wa ^ ga); end
    if (nerr_b == 2 && $countones(wb ^ gb) != 2) begin nerr_b = $countones(wb ^ gb); end

    @(negedge clk);
    va = 1'b1; vb = 1'b1;
    {ca, da} = wa; {cb, db} = wb;
    #1;
    check(ab == ((nerr_a != 0) || (nerr_b != 0)), $sformatf("abort in read cycle (%0d,%0d)", nerr_a, nerr_b));
    check(ea == (nerr_a != 0), "err_a");
    check(eb == (nerr_b != 0), "err_b");
    @(negedge clk);
    va = 1'b0; vb = 1'b0;
    {ca, da} = '0; {cb, db} = '0;
    #1;
    if (nerr_a != 0) begin
      check(busy, "busy while correcting A");
      check(cbus == 1'b0, "A served first");
      if (nerr_a == 1) begin
        check(cv && {cchk, cdat} == ga, $sformatf("A corrected one cycle after abort: %h vs %h", {cchk, cdat}, ga));
      end else begin
        check(!cv && unc, "A double error flagged uncorrectable");
      end
      @(negedge clk);
      #1;
    end
    if (nerr_b != 0) begin
      check(busy, "busy while correcting B");
      check(cbus == 1'b1, "B served by the shared decoder");
      if (nerr_b == 1) begin
        check(cv && {cchk, cdat} == gb, $sformatf("B corrected: %h vs %h", {cchk, cdat}, gb));
      end else begin
        check(!cv && unc, "B double error flagged uncorrectable");
      end
      @(negedge clk);
      #1;
    end
    check(!busy && !cv && !unc, "idle after corrections");
  endtask

  initial begin
    va = 1'b0; vb = 1'b0; da = '0; db = '0; ca = '0; cb = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 200; n++) begin
      scenario(0, 0);
      scenario(1, 0);
      scenario(0, 1);
      scenario(1, 1);
      scenario(2, 1);
      scenario(1, 2);
    end
    // an error on a port that is not reading must be ignored
    @(negedge clk);
    va = 1'b0; vb = 1'b1;
    {ca, da} = {7'h1, 32'h0};
    {cb, db} = '0;
    #1;
    check(!ab, "invalid port ignored");
    @(negedge clk);
    vb = 1'b0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
