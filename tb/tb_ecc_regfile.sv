// tb_ecc_regfile: fills the register file, reads it back on both ports, then
// injects storage faults: a single-bit fault must raise op_abort in the read
// cycle, be corrected and written back (a re-read is clean and correct);
// faults read on both ports at once are repaired one after the other through
// the shared decoder; a double-bit fault is flagged uncorrectable and left.
module tb_ecc_regfile;
  import ft_pkg::*;
  int checks = 0, failures = 0;

  localparam int N = 32;
  logic         clk = 1'b0, rst_n = 1'b0;
  logic         we, rea, reb, inj;
  logic [4:0]   wa, raa, rab, ia;
  data_t        wd, rda, rdb;
  code_t        im;
  logic         ab, stl, cor, unc;
  data_t        model [N];

  always #5 clk = ~clk;

  ecc_regfile dut (
    .clk(clk), .rst_n(rst_n), .we(we), .waddr(wa), .wdata(wd),
    .re_a(rea), .ra_a(raa), .rd_a(rda), .re_b(reb), .ra_b(rab), .rd_b(rdb),
    .op_abort(ab), .stall(stl), .corrected(cor), .uncorrectable(unc),
    .inj_en(inj), .inj_addr(ia), .inj_mask(im));

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

  task automatic idle();
    we = 1'b0; rea = 1'b0; reb = 1'b0; inj = 1'b0;
  endtask

  task automatic inject(input int addr, input code_t mask);
    @(negedge clk);
    idle();
    inj = 1'b1; ia = 5'(addr); im = mask;
    @(negedge clk);
    inj = 1'b0;
  endtask

  task automatic read2(input int a, input int b, input logic exp_abort);
    @(negedge clk);
    idle();
    rea = 1'b1; reb = 1'b1; raa = 5'(a); rab = 5'(b);
    #1;
    check(ab == exp_abort, $sformatf("abort=%0b for reads %0d,%0d", ab, a, b));
  endtask

  initial begin
    idle();
    wa = '0; wd = '0; raa = '0; rab = '0; ia = '0; im = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < N; i++) begin
      @(negedge clk);
      we = 1'b1; wa = 5'(i); wd = $urandom; model[i] = wd;
    end
    @(negedge clk);
    idle();
    for (int i = 0; i < N; i++) begin
      read2(i, N - 1 - i, 1'b0);
      check(rda == model[i] && rdb == model[N-1-i], $sformatf("clean read %0d", i));
    end

    // single fault on port A: abort now, corrected word written back next cycle
    inject(5, code_t'(1) << 17);
    read2(5, 6, 1'b1);
    check(rda == (model[5] ^ 32'h0002_0000), "raw word goes to datapath unchecked");
    @(negedge clk);
    idle();
    check(stl && cor, "correction cycle, A");
    @(negedge clk);
    check(!stl, "stall released after one correction");
    read2(5, 6, 1'b0);
    check(rda == model[5], "re-read after write-back is correct");

    // single faults on both ports: A in cycle 1, B in cycle 2
    inject(9, code_t'(1) << 3);
    inject(20, code_t'(1) << 35);     // a check bit
    read2(9, 20, 1'b1);
    @(negedge clk);
    idle();
    check(stl && cor, "correction cycle 1 (A)");
    @(negedge clk);
    check(stl && cor, "correction cycle 2 (B, shared decoder)");
    @(negedge clk);
    check(!stl, "stall released after two corrections");
    read2(9, 20, 1'b0);
    check(rda == model[9] && rdb == model[20], "both words repaired");

    // writes are ignored while stalled
    inject(2, code_t'(1) << 0);
    read2(2, 3, 1'b1);
    @(negedge clk);
    rea = 1'b0; reb = 1'b0;
    we = 1'b1; wa = 5'd3; wd = 32'hDEAD_BEEF;
    @(negedge clk);
    idle();
    read2(3, 2, 1'b0);
    check(rda == model[3] && rdb == model[2], "write during stall dropped, correction kept");

    // double fault: uncorrectable, nothing written back
    inject(12, (code_t'(1) << 4) | (code_t'(1) << 30));
    read2(12, 13, 1'b1);
    @(negedge clk);
    idle();
    check(unc && !cor, "double fault uncorrectable");
    @(negedge clk);
    read2(12, 13, 1'b1);
    check(rda == (model[12] ^ 32'h4000_0010), "double-fault word left as stored");
    @(negedge clk);
    idle();
    @(negedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
