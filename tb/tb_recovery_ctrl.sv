// tb_recovery_ctrl: drives mismatches into the recovery controller while
// two modelled register files answer its scan. Checks the schedule (rollback
// of 3 cycles one cycle after the mismatch, comparator flush, stall, then one
// register per cycle) and the decisions: copy from B into A where only A's
// parity fails, from A into B where only B's does, unrecoverable where both
// do, and a transient recovery when neither does.
module tb_recovery_ctrl;
  int checks = 0, failures = 0;

  logic        clk = 1'b0, rst_n = 1'b0;
  logic        mm, stl, rb, fl, cwa, cwb, e_rb, e_cp, e_un, e_tr;
  logic [2:0]  rbc;
  logic [4:0]  scan, caddr;
  logic [31:0] sda, sdb, cdata;
  logic        spa, spb;

  logic [31:0] va [32], vb [32];
  logic        ba [32], bb [32];

  always #5 clk = ~clk;

  recovery_ctrl dut (
    .clk(clk), .rst_n(rst_n), .mismatch(mm), .stall(stl), .rollback(rb), .rb_count(rbc),
    .cmp_flush(fl), .scan_addr(scan), .sd_a(sda), .sperr_a(spa), .sd_b(sdb), .sperr_b(spb),
    .copy_we_a(cwa), .copy_we_b(cwb), .copy_addr(caddr), .copy_data(cdata),
    .ev_rollback(e_rb), .ev_copy(e_cp), .ev_unrecoverable(e_un), .ev_transient(e_tr));

  always_comb begin
    sda = va[scan]; spa = ba[scan];
    sdb = vb[scan]; spb = bb[scan];
  end

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    #500000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic recovery(input int mode);
    int nca, ncb, nun, ntr;
    for (int i = 0; i < 32; i++) begin
      va[i] = $urandom; vb[i] = $urandom; ba[i] = 1'b0; bb[i] = 1'b0;
    end
    if (mode == 1) begin ba[3] = 1'b1; bb[17] = 1'b1; end
    if (mode == 2) begin ba[8] = 1'b1; bb[8] = 1'b1; end
    @(negedge clk);
    check(!stl && !rb, "idle before mismatch");
    mm = 1'b1;
    #1;
    check(!stl, "the mismatch cycle still executes");
    @(negedge clk);
    mm = 1'b0;
    check(rb && rbc == 3'd3 && fl && stl && e_rb, "rollback by 3 cycles one cycle after mismatch");
    nca = 0; ncb = 0; nun = 0; ntr = 0;
    for (int i = 0; i < 32; i++) begin
      @(negedge clk);
      check(stl && !rb && scan == 5'(i), $sformatf("scan step %0d", i));
      if (cwa) begin
        nca++;
        check(caddr == 5'(i) && cdata == vb[i], "copy B -> A value");
      end
      if (cwb) begin
        ncb++;
        check(caddr == 5'(i) && cdata == va[i], "copy A -> B value");
      end
      if (e_un) nun++;
      if (e_tr) ntr++;
    end
    @(negedge clk);
    check(!stl, "stall released after the scan");
    case (mode)
      0: check(nca == 0 && ncb == 0 && nun == 0 && ntr == 1, "transient: nothing copied");
      1: check(nca == 1 && ncb == 1 && nun == 0 && ntr == 0, "one copy into each module");
      default: check(nca == 0 && ncb == 0 && nun == 1 && ntr == 0, "both bad: unrecoverable");
    endcase
  endtask

  initial begin
    mm = 1'b0;
    for (int i = 0; i < 32; i++) begin va[i] = '0; vb[i] = '0; ba[i] = 1'b0; bb[i] = 1'b0; end
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int r = 0; r < 5; r++) begin
      recovery(0);
      recovery(1);
      recovery(2);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
