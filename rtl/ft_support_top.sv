// ft_support_top: fault-tolerance support for a pair of VLSI RISC processors.
//
// Three parts stand side by side, each with its own ports:
//
// 1. Duplex checking with micro rollback (p_*, the main part). Two processors
//    run the same program in lockstep. Each has a duplex_node: a register
//    file that can be rolled back a few cycles and carries one parity bit per
//    register, and a compressor that folds the processor's 100-bit
//    internal-state bus into a 4-bit signature every cycle. The signatures
//    (sig) go to a duplex_comparator, whose outcome returns two cycles later.
//    Because the register files can be rolled back, the processors keep
//    running while the comparison is in flight. On a mismatch the
//    recovery_ctrl stalls both processors, rolls both back, and scans their
//    registers: a register whose parity fails in one module is rewritten with
//    the other module's value. The processors themselves are outside this
//    block: their register-file accesses and state bus are ports, and they
//    must also roll back their own state when rollback pulses.
// 2. An ECC-protected two-port register file (ecc_*), the alternative local
//    recovery by SEC-DED M-code: errors on either read port raise ecc_abort
//    in the read cycle, and the words are corrected through a shared decoder
//    and written back.
// 3. A single-bus SEC-DED checker/corrector (sb_*), the complete circuit for
//    one bus, for other M-code protected storage read one word at a time.
// 4. A fast sense-amplifier parity generator (sp_*) for a 32-bit bus.
//
// Processor writes and the signature valid are blocked while p_stall is 1.
// All parameters default to the sizes of the design: 32-bit words, 7 check
// bits, 100-bit state bus, 4-bit signature. The register count (32) and the
// rollback depth (4) are this design's choices.
module ft_support_top
  import ft_pkg::*;
#(
  parameter int NREGS   = 32,
  parameter int DEPTH   = 4,
  parameter int STATE_W = 100,
  parameter int S       = 4,
  parameter int RB_DIST = 3
) (
  input  logic                                 clk,
  input  logic                                 rst_n,
  // ---- duplex pair: index 0 = processor 1, index 1 = processor 2
  input  logic [1:0]                           p_we,
  input  logic [1:0][$clog2(NREGS)-1:0]        p_waddr,
  input  logic [1:0][DATA_W-1:0]               p_wdata,
  input  logic [1:0][$clog2(NREGS)-1:0]        p_ra0,
  output logic [1:0][DATA_W-1:0]               p_rd0,
  output logic [1:0]                           p_perr0,
  input  logic [1:0][$clog2(NREGS)-1:0]        p_ra1,
  output logic [1:0][DATA_W-1:0]               p_rd1,
  output logic [1:0]                           p_perr1,
  input  logic                                 p_state_valid,
  input  logic [1:0][STATE_W-1:0]              p_state,
  output logic [1:0][S-1:0]                    p_sig,
  input  logic [1:0]                           p_inj_en,
  input  logic [1:0][$clog2(NREGS)-1:0]        p_inj_addr,
  input  logic [1:0][$clog2(DATA_W+1)-1:0]     p_inj_bit,
  output logic                                 p_mismatch,
  output logic                                 p_stall,
  output logic                                 p_rollback,
  output logic [$clog2(DEPTH+1)-1:0]           p_rb_count,
  output logic                                 p_ev_copy,
  output logic                                 p_ev_unrecoverable,
  output logic                                 p_ev_transient,
  // ---- ECC register file
  input  logic                                 ecc_we,
  input  logic [$clog2(NREGS)-1:0]             ecc_waddr,
  input  data_t                                ecc_wdata,
  input  logic                                 ecc_re_a,
  input  logic [$clog2(NREGS)-1:0]             ecc_ra_a,
  output data_t                                ecc_rd_a,
  input  logic                                 ecc_re_b,
  input  logic [$clog2(NREGS)-1:0]             ecc_ra_b,
  output data_t                                ecc_rd_b,
  output logic                                 ecc_abort,
  output logic                                 ecc_stall,
  output logic                                 ecc_corrected,
  output logic                                 ecc_uncorrectable,
  input  logic                                 ecc_inj_en,
  input  logic [$clog2(NREGS)-1:0]             ecc_inj_addr,
  input  code_t                                ecc_inj_mask,
  // ---- single-bus SEC-DED
  input  data_t                                sb_data,
  input  check_t                               sb_check,
  output data_t                                sb_data_out,
  output check_t                               sb_check_out,
  output logic                                 sb_error,
  output logic                                 sb_corrected,
  output logic                                 sb_uncorrectable,
  // ---- sense-amplifier parity generator
  input  logic                                 sp_trigger,
  input  logic                                 sp_latch,
  input  data_t                                sp_d,
  output logic                                 sp_parity,
  output logic                                 sp_parity_n,
  output logic                                 sp_valid
);
  localparam int AW = $clog2(NREGS);

  // ------------------------------------------------------------ duplex pair
  logic                       cmp_flush, copy_we_a, copy_we_b;
  logic [AW-1:0]              scan_addr, copy_addr;
  logic [DATA_W-1:0]          copy_data;
  logic [1:0][DATA_W-1:0]     sd;
  logic [1:0]                 sperr;
  logic [1:0]                 copy_we;

  assign copy_we = {copy_we_b, copy_we_a};

  for (genvar p = 0; p < 2; p++) begin : g_node
    duplex_node #(.NREGS(NREGS), .W(DATA_W), .DEPTH(DEPTH), .STATE_W(STATE_W), .S(S)) u_node (
      .clk(clk), .rst_n(rst_n),
      .we(p_we[p] & ~p_stall), .waddr(p_waddr[p]), .wdata(p_wdata[p]),
      .ra0(p_ra0[p]), .rd0(p_rd0[p]), .perr0(p_perr0[p]),
      .ra1(p_ra1[p]), .rd1(p_rd1[p]), .perr1(p_perr1[p]),
      .state(p_state[p]), .sig(p_sig[p]),
      .rollback(p_rollback), .rb_count(p_rb_count),
      .sa(scan_addr), .sd(sd[p]), .sperr(sperr[p]),
      .copy_we(copy_we[p]), .copy_addr(copy_addr), .copy_data(copy_data),
      .inj_en(p_inj_en[p]), .inj_addr(p_inj_addr[p]), .inj_bit(p_inj_bit[p]));
  end

  duplex_comparator #(.S(S)) u_dcmp (
    .clk(clk), .rst_n(rst_n), .flush(cmp_flush),
    .valid(p_state_valid & ~p_stall), .sig_a(p_sig[0]), .sig_b(p_sig[1]),
    .mismatch(p_mismatch));

  recovery_ctrl #(.NREGS(NREGS), .W(DATA_W), .DEPTH(DEPTH), .RB_DIST(RB_DIST)) u_rec (
    .clk(clk), .rst_n(rst_n), .mismatch(p_mismatch),
    .stall(p_stall), .rollback(p_rollback), .rb_count(p_rb_count), .cmp_flush(cmp_flush),
    .scan_addr(scan_addr),
    .sd_a(sd[0]), .sperr_a(sperr[0]), .sd_b(sd[1]), .sperr_b(sperr[1]),
    .copy_we_a(copy_we_a), .copy_we_b(copy_we_b), .copy_addr(copy_addr), .copy_data(copy_data),
    .ev_rollback(), .ev_copy(p_ev_copy),
    .ev_unrecoverable(p_ev_unrecoverable), .ev_transient(p_ev_transient));

  // ------------------------------------------------------- ECC register file
  ecc_regfile #(.NREGS(NREGS)) u_ecc (
    .clk(clk), .rst_n(rst_n),
    .we(ecc_we), .waddr(ecc_waddr), .wdata(ecc_wdata),
    .re_a(ecc_re_a), .ra_a(ecc_ra_a), .rd_a(ecc_rd_a),
    .re_b(ecc_re_b), .ra_b(ecc_ra_b), .rd_b(ecc_rd_b),
    .op_abort(ecc_abort), .stall(ecc_stall),
    .corrected(ecc_corrected), .uncorrectable(ecc_uncorrectable),
    .inj_en(ecc_inj_en), .inj_addr(ecc_inj_addr), .inj_mask(ecc_inj_mask));

  // ------------------------------------------------------ single-bus ECC
  check_t sb_syndrome;
  ecc_unit u_sb (
    .data(sb_data), .check(sb_check), .data_out(sb_data_out), .check_out(sb_check_out),
    .syndrome(sb_syndrome), .error(sb_error), .corrected(sb_corrected),
    .uncorrectable(sb_uncorrectable));

  // ------------------------------------------------ sense-amplifier parity
  xor_senseamp #(.M(DATA_W), .GROUP(8), .TWO_LEVEL(1'b1)) u_sp (
    .clk(clk), .rst_n(rst_n), .trigger(sp_trigger), .latch(sp_latch), .d(sp_d),
    .parity(sp_parity), .parity_n(sp_parity_n), .valid(sp_valid));
endmodule
