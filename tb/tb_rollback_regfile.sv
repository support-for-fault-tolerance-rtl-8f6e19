// tb_rollback_regfile: random writes, reads and rollbacks of 1..DEPTH
// cycles against a reference model that keeps the architectural register
// values and an undo record for each of the last DEPTH cycles. Every cycle
// all three read ports are compared with the model. Then storage faults are
// injected into committed registers: the parity check must flag them on
// every port, including a fault in the parity bit itself, and a new write
// must clear the error.
module tb_rollback_regfile;
  int checks = 0, failures = 0;

  localparam int N = 32, D = 4;
  logic        clk = 1'b0, rst_n = 1'b0;
  logic        we, rb, inj;
  logic [4:0]  wa, r0, r1, sa, ia;
  logic [31:0] wd, d0, d1, sd;
  logic        pe0, pe1, spe;
  logic [2:0]  rbc;
  logic [5:0]  ib;

  always #5 clk = ~clk;

  rollback_regfile dut (
    .clk(clk), .rst_n(rst_n), .we(we), .waddr(wa), .wdata(wd),
    .ra0(r0), .rd0(d0), .perr0(pe0), .ra1(r1), .rd1(d1), .perr1(pe1),
    .sa(sa), .sd(sd), .sperr(spe), .rollback(rb), .rb_count(rbc),
    .inj_en(inj), .inj_addr(ia), .inj_bit(ib));

  // reference model
  logic [31:0] arch [N];
  typedef struct { bit v; int a; logic [31:0] old; } undo_t;
  undo_t hist [D];
  int n_rollback = 0, n_undone = 0;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_reads(input logic exp_perr);
    #1;
    check(d0 == arch[r0] && pe0 == exp_perr, $sformatf("rd0 r%0d = %h expected %h", r0, d0, arch[r0]));
    check(d1 == arch[r1] && pe1 == exp_perr, $sformatf("rd1 r%0d = %h expected %h", r1, d1, arch[r1]));
    check(sd == arch[sa] && spe == exp_perr, $sformatf("scan r%0d = %h expected %h", sa, sd, arch[sa]));
  endtask

  task automatic idle_cycle();
    @(negedge clk);
    we = 1'b0; rb = 1'b0; inj = 1'b0;
    for (int i = D - 1; i > 0; i--) hist[i] = hist[i-1];
    hist[0].v = 1'b0;
    @(posedge clk);
  endtask

  initial begin
    we = 1'b0; rb = 1'b0; inj = 1'b0; wa = '0; wd = '0; r0 = '0; r1 = '0; sa = '0;
    ia = '0; ib = '0; rbc = 3'd1;
    for (int i = 0; i < N; i++) arch[i] = '0;
    for (int i = 0; i < D; i++) hist[i].v = 1'b0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;

    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      r0 = $urandom_range(N-1); r1 = $urandom_range(N-1); sa = $urandom_range(N-1);
      // bias reads towards recently written registers
      if (hist[0].v && n % 2 == 0) r0 = 5'(hist[0].a);
      if (hist[1].v && n % 3 == 0) r1 = 5'(hist[1].a);
      check_reads(1'b0);
      if ($urandom_range(9) == 0) begin
        int k;
        k = $urandom_range(D, 1);
        rb = 1'b1; rbc = 3'(k); we = 1'b1; wa = $urandom; wd = $urandom;  // write ignored
        for (int i = 0; i < k; i++)
          if (hist[i].v) begin
            arch[hist[i].a] = hist[i].old;
            hist[i].v = 1'b0;
            n_undone++;
          end
        n_rollback++;
      end else begin
        rb = 1'b0;
        we = ($urandom_range(3) != 0);
        wa = $urandom_range(N-1);
        wd = $urandom;
        for (int i = D - 1; i > 0; i--) hist[i] = hist[i-1];
        hist[0].v = we; hist[0].a = int'(wa); hist[0].old = arch[wa];
        if (we) arch[wa] = wd;
      end
      @(posedge clk);
    end
    check(n_rollback > 100 && n_undone > 100, "rollbacks exercised");

    // storage faults in committed registers
    repeat (D + 1) idle_cycle();
    for (int t = 0; t < 40; t++) begin
      int r, b;
      r = $urandom_range(N-1);
      b = (t % 8 == 7) ? 32 : $urandom_range(31);
      @(negedge clk);
      inj = 1'b1; ia = 5'(r); ib = 6'(b);
      @(posedge clk);
      @(negedge clk);
      inj = 1'b0;
      r0 = 5'(r); r1 = 5'(r); sa = 5'(r);
      #1;
      check(pe0 && pe1 && spe, $sformatf("fault in r%0d bit %0d flagged", r, b));
      check(d0 == ((b == 32) ? arch[r] : arch[r] ^ (32'h1 << b)), "faulty data read as stored");
      // repair by a fresh write; good while still in the buffer and after commit
      we = 1'b1; wa = 5'(r); wd = $urandom; arch[r] = wd;
      @(posedge clk);
      @(negedge clk);
      we = 1'b0;
      check_reads(1'b0);
      repeat (D) @(posedge clk);
      @(negedge clk);
      check_reads(1'b0);
    end
    $display("rollbacks %0d, writes undone %0d", n_rollback, n_undone);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
