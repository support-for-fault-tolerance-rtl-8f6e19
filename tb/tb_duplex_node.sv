// tb_duplex_node: the node's signature must be the interleaved parity of its
// 100-bit state bus; register writes and reads go through; a copy write from
// the recovery controller takes the write port over a processor write in the
// same cycle; a rollback undoes the last writes; an injected storage fault
// shows on the scan port.
module tb_duplex_node;
  int checks = 0, failures = 0;

  logic        clk = 1'b0, rst_n = 1'b0;
  logic        we, rb, cwe, inj;
  logic [4:0]  wa, r0, r1, sa, ca, ia;
  logic [31:0] wd, d0, d1, sd, cd;
  logic        pe0, pe1, spe;
  logic [99:0] st;
  logic [3:0]  sig;
  logic [2:0]  rbc;
  logic [5:0]  ib;

  always #5 clk = ~clk;

  duplex_node dut (
    .clk(clk), .rst_n(rst_n), .we(we), .waddr(wa), .wdata(wd),
    .ra0(r0), .rd0(d0), .perr0(pe0), .ra1(r1), .rd1(d1), .perr1(pe1),
    .state(st), .sig(sig), .rollback(rb), .rb_count(rbc),
    .sa(sa), .sd(sd), .sperr(spe), .copy_we(cwe), .copy_addr(ca), .copy_data(cd),
    .inj_en(inj), .inj_addr(ia), .inj_bit(ib));

  function automatic logic [3:0] ref_sig(logic [99:0] v);
    logic [3:0] r;
    r = '0;
    for (int i = 0; i < 100; i++) r[i % 4] ^= v[i];
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

  task automatic write(input logic [4:0] a, input logic [31:0] v);
    @(negedge clk);
    we = 1'b1; wa = a; wd = v;
    @(posedge clk);
    @(negedge clk);
    we = 1'b0;
  endtask

  initial begin
    we = 1'b0; rb = 1'b0; cwe = 1'b0; inj = 1'b0; wa = '0; r0 = '0; r1 = '0; sa = '0;
    ca = '0; ia = '0; wd = '0; cd = '0; st = '0; rbc = 3'd3; ib = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 300; n++) begin
      st = {$urandom, $urandom, $urandom, $urandom};
      #1;
      check(sig == ref_sig(st), "state signature");
    end
    write(5'd1, 32'h1111_1111);
    write(5'd2, 32'h2222_2222);
    r0 = 5'd1; r1 = 5'd2;
    #1;
    check(d0 == 32'h1111_1111 && d1 == 32'h2222_2222 && !pe0 && !pe1, "writes read back");
    // copy write wins over a processor write in the same cycle
    @(negedge clk);
    we = 1'b1; wa = 5'd3; wd = 32'hAAAA_AAAA;
    cwe = 1'b1; ca = 5'd4; cd = 32'h4444_4444;
    @(posedge clk);
    @(negedge clk);
    we = 1'b0; cwe = 1'b0;
    r0 = 5'd4; r1 = 5'd3;
    #1;
    check(d0 == 32'h4444_4444, "copy write landed");
    check(d1 == 32'h0, "processor write dropped in favour of copy");
    // rollback of one cycle undoes the copy write
    @(negedge clk);
    rb = 1'b1; rbc = 3'd2;   // the copy cycle and the idle cycle after it
    @(posedge clk);
    @(negedge clk);
    rb = 1'b0;
    #1;
    check(d0 == 32'h0, "rollback undid the last write");
    // storage fault visible on the scan port
    repeat (5) @(posedge clk);
    @(negedge clk);
    inj = 1'b1; ia = 5'd1; ib = 6'd7;
    @(posedge clk);
    @(negedge clk);
    inj = 1'b0; sa = 5'd1;
    #1;
    check(spe && sd == (32'h1111_1111 ^ 32'h80), "storage fault seen by scan");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
