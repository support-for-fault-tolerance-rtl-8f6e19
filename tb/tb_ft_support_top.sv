// tb_ft_support_top: end-to-end test of the whole design at its default
// sizes.
//
// Duplex part: two identical processors are modelled here. Each runs the
// same program in lockstep: in step pc it reads register (3*pc+1) mod 32,
// adds pc*0x9E3779B9 and writes the result to register (7*pc+2) mod 32; its
// 100-bit state bus is {pc (34 bits), read data, 2'b00, write data}. The read
// and write data sit two bit positions apart modulo 4, so that a flipped read
// bit and the bits it changes in the write data cannot cancel in the 4-bit
// interleaved signature. On rollback a
// processor steps its pc back by rb_count. Faults are then forced:
//   - a transient fault corrupts processor 2's write data and state bus for
//     one cycle: the pair must roll back and re-execute, nothing copied;
//   - a storage fault flips a committed bit in one module's register file
//     just before that register is read: rollback, then the register is
//     copied from the other module (once into each module);
//   - at the end, different bits of the same register in both modules:
//     reported unrecoverable.
// Before the last case the register files of both modules must equal a
// fault-free run of the program.
// ECC part: single faults on one port, on both ports (sequential
// correction through the shared decoder), and a double fault.
// Single-bus SEC-DED: clean and single-error words must come out correct.
// Sense-amplifier parity: random words through the two-level generator.
// Each mechanism is counted and one that never happened is a failure.
module tb_ft_support_top;
  import ft_pkg::*;
  int checks = 0, failures = 0;

  localparam int N = 32, PC_END = 1500;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  // ---------------------------------------------------------- DUT signals
  logic [1:0]             p_we, p_perr0, p_perr1, p_inj_en;
  logic [1:0][4:0]        p_waddr, p_ra0, p_ra1, p_inj_addr;
  logic [1:0][31:0]       p_wdata, p_rd0, p_rd1;
  logic                   p_state_valid;
  logic [1:0][99:0]       p_state;
  logic [1:0][3:0]        p_sig;
  logic [1:0][5:0]        p_inj_bit;
  logic                   p_mismatch, p_stall, p_rollback, p_ev_copy, p_ev_unrec, p_ev_trans;
  logic [2:0]             p_rb_count;
  logic                   ecc_we, ecc_re_a, ecc_re_b, ecc_abort, ecc_stall, ecc_cor, ecc_unc, ecc_inj_en;
  logic [4:0]             ecc_waddr, ecc_ra_a, ecc_ra_b, ecc_inj_addr;
  data_t                  ecc_wdata, ecc_rd_a, ecc_rd_b;
  code_t                  ecc_inj_mask;
  data_t                  sb_data, sb_data_out;
  check_t                 sb_check, sb_check_out;
  logic                   sb_error, sb_corrected, sb_unc;
  logic                   sp_trigger, sp_latch, sp_parity, sp_parity_n, sp_valid;
  data_t                  sp_d;

  ft_support_top dut (
    .clk(clk), .rst_n(rst_n),
    .p_we(p_we), .p_waddr(p_waddr), .p_wdata(p_wdata),
    .p_ra0(p_ra0), .p_rd0(p_rd0), .p_perr0(p_perr0),
    .p_ra1(p_ra1), .p_rd1(p_rd1), .p_perr1(p_perr1),
    .p_state_valid(p_state_valid), .p_state(p_state), .p_sig(p_sig),
    .p_inj_en(p_inj_en), .p_inj_addr(p_inj_addr), .p_inj_bit(p_inj_bit),
    .p_mismatch(p_mismatch), .p_stall(p_stall), .p_rollback(p_rollback),
    .p_rb_count(p_rb_count), .p_ev_copy(p_ev_copy),
    .p_ev_unrecoverable(p_ev_unrec), .p_ev_transient(p_ev_trans),
    .ecc_we(ecc_we), .ecc_waddr(ecc_waddr), .ecc_wdata(ecc_wdata),
    .ecc_re_a(ecc_re_a), .ecc_ra_a(ecc_ra_a), .ecc_rd_a(ecc_rd_a),
    .ecc_re_b(ecc_re_b), .ecc_ra_b(ecc_ra_b), .ecc_rd_b(ecc_rd_b),
    .ecc_abort(ecc_abort), .ecc_stall(ecc_stall), .ecc_corrected(ecc_cor),
    .ecc_uncorrectable(ecc_unc), .ecc_inj_en(ecc_inj_en), .ecc_inj_addr(ecc_inj_addr),
    .ecc_inj_mask(ecc_inj_mask),
    .sb_data(sb_data), .sb_check(sb_check), .sb_data_out(sb_data_out),
    .sb_check_out(sb_check_out), .sb_error(sb_error), .sb_corrected(sb_corrected),
    .sb_uncorrectable(sb_unc),
    .sp_trigger(sp_trigger), .sp_latch(sp_latch), .sp_d(sp_d),
    .sp_parity(sp_parity), .sp_parity_n(sp_parity_n), .sp_valid(sp_valid));

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    #400000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------- processor pair model
  function automatic logic [4:0] rd_reg(int pc);  return 5'((3 * pc + 1) % N); endfunction
  function automatic logic [4:0] wr_reg(int pc);  return 5'((7 * pc + 2) % N); endfunction
  function automatic logic [31:0] result(logic [31:0] x, int pc);
    return x + 32'(pc) * 32'h9E37_79B9;
  endfunction

  int   pc = 0;
  logic running = 1'b0;
  logic flip_now = 1'b0;          // transient fault on processor 2, this cycle

  always_comb begin
    for (int p = 0; p < 2; p++) begin
      p_ra0[p]   = rd_reg(pc);
      p_waddr[p] = wr_reg(pc);
      p_we[p]    = running && (pc < PC_END);
      p_wdata[p] = result(p_rd0[p], pc);
      if (p == 1 && flip_now) p_wdata[p] = p_wdata[p] ^ 32'h0000_0100;
      p_state[p] = {34'(pc), p_rd0[p], 2'b00, p_wdata[p]};
    end
    p_state_valid = running;
  end

  always @(posedge clk) begin
    if (p_rollback)                               pc <= pc - int'(p_rb_count);
    else if (running && !p_stall && pc < PC_END)  pc <= pc + 1;
  end

  // ------------------------------------------------------ event counters
  int n_mismatch = 0, n_rollback = 0, n_copy = 0, n_unrec = 0, n_trans = 0, n_stall = 0;
  int n_ecc_abort = 0, n_ecc_cor = 0, n_ecc_unc = 0, n_ecc_seq = 0, n_sp = 0, n_sb = 0;
  logic ecc_cor_q = 1'b0;
  always @(posedge clk) if (rst_n) begin
    if (p_mismatch && !p_stall) n_mismatch++;
    if (p_rollback) begin
      n_rollback++;
      check(p_rb_count == 3'd3, "rollback distance 3 cycles");
    end
    if (p_ev_copy)  n_copy++;
    if (p_ev_unrec) n_unrec++;
    if (p_ev_trans) n_trans++;
    if (p_stall)    n_stall++;
    if (ecc_abort && !ecc_stall) n_ecc_abort++;
    if (ecc_cor) n_ecc_cor++;
    if (ecc_unc) n_ecc_unc++;
    if (ecc_cor && ecc_cor_q) n_ecc_seq++;
    ecc_cor_q <= ecc_cor;
  end

  task automatic wait_idle();
    // let any fault reach the comparator, then wait for recovery to end
    repeat (6) @(posedge clk);
    while (p_stall) @(posedge clk);
    repeat (2) @(posedge clk);
  endtask

  // Flip one committed bit of a register of module m that is read two steps
  // ahead and written neither recently nor before that read.
  task automatic storage_fault(input int m, input int bitpos);
    int x;
    bit ok;
    ok = 0;
    while (!ok) begin
      @(negedge clk);
      x = int'(rd_reg(pc + 2));
      ok = 1;
      for (int q = pc - 6; q <= pc + 2; q++) if (q >= 0 && int'(wr_reg(q)) == x) ok = 0;
      if (p_stall) ok = 0;
    end
    p_inj_en[m] = 1'b1; p_inj_addr[m] = 5'(x); p_inj_bit[m] = 6'(bitpos);
    @(negedge clk);
    p_inj_en[m] = 1'b0;
  endtask

  // ---------------------------------------------------------- ECC helpers
  data_t ecc_model [N];

  task automatic ecc_read(input int a, input int b);
    @(negedge clk);
    ecc_we = 1'b0; ecc_re_a = 1'b1; ecc_re_b = 1'b1;
    ecc_ra_a = 5'(a); ecc_ra_b = 5'(b);
  endtask

  task automatic ecc_inject(input int a, input code_t m);
    @(negedge clk);
    ecc_re_a = 1'b0; ecc_re_b = 1'b0;
    ecc_inj_en = 1'b1; ecc_inj_addr = 5'(a); ecc_inj_mask = m;
    @(negedge clk);
    ecc_inj_en = 1'b0;
  endtask

  task automatic ecc_settle();
    @(negedge clk);
    ecc_re_a = 1'b0; ecc_re_b = 1'b0;
    while (ecc_stall) @(negedge clk);
  endtask

  // ------------------------------------------------------------ stimulus
  initial begin
    logic [31:0] golden [N];
    p_inj_en = '0; p_inj_addr = '0; p_inj_bit = '0; p_ra1 = '0;
    ecc_we = 1'b0; ecc_re_a = 1'b0; ecc_re_b = 1'b0; ecc_waddr = '0; ecc_wdata = '0;
    ecc_ra_a = '0; ecc_ra_b = '0; ecc_inj_en = 1'b0; ecc_inj_addr = '0; ecc_inj_mask = '0;
    sp_trigger = 1'b0; sp_latch = 1'b0; sp_d = '0; sb_data = '0; sb_check = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    // ---- duplex pair with micro rollback
    @(negedge clk);
    running = 1'b1;
    repeat (60) @(posedge clk);
    check(n_mismatch == 0 && !p_stall, "fault-free run has no mismatch");
    for (int r = 0; r < 3; r++) begin
      int t0, c0;
      t0 = n_trans; c0 = n_copy;
      @(negedge clk);
      flip_now = 1'b1;
      @(negedge clk);
      flip_now = 1'b0;
      wait_idle();
      check(n_trans == t0 + 1 && n_copy == c0, "transient fault: rollback and re-execution");
      t0 = n_trans; c0 = n_copy;
      storage_fault(0, $urandom_range(31));
      wait_idle();
      check(n_copy == c0 + 1 && n_trans == t0, "storage fault in module 1 repaired by copy");
      c0 = n_copy;
      storage_fault(1, $urandom_range(31));
      wait_idle();
      check(n_copy == c0 + 1 && n_trans == t0, "storage fault in module 2 repaired by copy");
      repeat (20) @(posedge clk);
    end
    while (pc < PC_END) @(posedge clk);
    repeat (8) @(posedge clk);

    // compare both register files with a fault-free run of the program
    for (int i = 0; i < N; i++) golden[i] = '0;
    for (int q = 0; q < PC_END; q++) golden[wr_reg(q)] = result(golden[rd_reg(q)], q);
    for (int i = 0; i < N; i++) begin
      @(negedge clk);
      p_ra1[0] = 5'(i); p_ra1[1] = 5'(i);
      #1;
      check(p_rd1[0] == golden[i] && p_rd1[1] == golden[i] && p_perr1 == 2'b00,
            $sformatf("r%0d after recovery: %h %h expected %h", i, p_rd1[0], p_rd1[1], golden[i]));
    end

    // the same register corrupted differently in both modules
    @(negedge clk);
    running = 1'b0;
    pc = 0;                                  // rerun the program from the start
    @(negedge clk);
    running = 1'b1;
    begin
      int u0;
      u0 = n_unrec;
      storage_fault(0, 5);
      @(negedge clk);
      p_inj_en[1] = 1'b1; p_inj_addr[1] = p_inj_addr[0]; p_inj_bit[1] = 6'd9;
      @(negedge clk);
      p_inj_en[1] = 1'b0;
      wait_idle();
      check(n_unrec > u0, "double storage fault reported unrecoverable");
    end
    @(negedge clk);
    running = 1'b0;

    // ---- ECC register file
    for (int i = 0; i < N; i++) begin
      @(negedge clk);
      ecc_we = 1'b1; ecc_waddr = 5'(i); ecc_wdata = $urandom; ecc_model[i] = ecc_wdata;
    end
    @(negedge clk);
    ecc_we = 1'b0;
    for (int r = 0; r < 4; r++) begin
      int a, b;
      a = $urandom_range(N-1);
      b = (a + 1 + $urandom_range(N-2)) % N;
      ecc_inject(a, code_t'(1) << $urandom_range(CODE_W-1));
      ecc_read(a, b);
      #1;
      check(ecc_abort, "single fault aborts in the read cycle");
      ecc_settle();
      ecc_inject(a, code_t'(1) << $urandom_range(CODE_W-1));
      ecc_inject(b, code_t'(1) << $urandom_range(CODE_W-1));
      ecc_read(a, b);
      #1;
      check(ecc_abort, "faults on both buses abort");
      ecc_settle();
      ecc_read(a, b);
      #1;
      check(!ecc_abort && ecc_rd_a == ecc_model[a] && ecc_rd_b == ecc_model[b], "both words repaired");
    end
    ecc_inject(7, (code_t'(1) << 1) | (code_t'(1) << 2));
    ecc_read(7, 8);
    ecc_settle();
    check(n_ecc_unc >= 1, "double fault uncorrectable");

    // ---- single-bus SEC-DED; check bits computed from the parity-check matrix
    for (int i = 0; i < 300; i++) begin
      data_t  v;
      check_t cv;
      code_t  w;
      v = $urandom;
      for (int k = 0; k < CHECK_W; k++) cv[k] = ^(v & mcode_row(k));
      w = {cv, v};
      if (i % 3 != 0) w[$urandom_range(CODE_W-1)] ^= 1'b1;
      {sb_check, sb_data} = w;
      #1;
      check({sb_check_out, sb_data_out} == {cv, v} && sb_error == (i % 3 != 0) && !sb_unc,
            "single-bus correction");
      if (sb_corrected) n_sb++;
    end

    // ---- sense-amplifier parity
    begin
      logic [31:0] h0, h1;
      h0 = '0; h1 = '0;
      for (int i = 0; i < 200; i++) begin
        @(negedge clk);
        sp_trigger = 1'b1; sp_latch = 1'b1; sp_d = $urandom;
        @(posedge clk);
        h1 = h0; h0 = sp_d;
        @(negedge clk);
        if (i >= 1) begin
          check(sp_valid && sp_parity == logic'($countones(h1) % 2) && sp_parity_n == ~sp_parity,
                "sense-amplifier parity");
          n_sp++;
        end
      end
    end

    $display("mismatch %0d rollback %0d transient %0d copy %0d unrecoverable %0d stall-cycles %0d",
             n_mismatch, n_rollback, n_trans, n_copy, n_unrec, n_stall);
    $display("ecc abort %0d corrected %0d back-to-back %0d uncorrectable %0d; parity words %0d",
             n_ecc_abort, n_ecc_cor, n_ecc_seq, n_ecc_unc, n_sp);
    check(n_mismatch > 0, "mechanism: signature mismatch");
    check(n_rollback > 0, "mechanism: micro rollback");
    check(n_trans > 0, "mechanism: transient recovery");
    check(n_copy >= 2, "mechanism: state copy into each module");
    check(n_unrec > 0, "mechanism: unrecoverable storage error");
    check(n_stall > 0, "mechanism: stall");
    check(n_ecc_abort > 0, "mechanism: ECC abort");
    check(n_ecc_cor > 0, "mechanism: ECC correction");
    check(n_ecc_seq > 0, "mechanism: sequential correction with shared decoder");
    check(n_ecc_unc > 0, "mechanism: ECC double error");
    check(n_sp > 0, "mechanism: sense-amplifier parity");
    check(n_sb > 0, "mechanism: single-bus correction");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
