// ecc_dual_bus: SEC-DED checking of two buses read in the same cycle, with a
// shared syndrome decoder and sequential correction.
//
// Detection is doubled: each bus has its own mcode_detector, so errors on
// both words are flagged in the cycle the words arrive (err_a, err_b and
// their OR, op_abort, are combinational). The correction circuits are doubled
// too, but there is one mcode_decoder: when an error is seen while idle, both
// words and syndromes are captured and the decoder serves bus A in the next
// cycle and bus B in the cycle after (a bus without error is skipped).
//
// Timing: cycle 0 words in, op_abort; cycle 1 corrected word of A (if A had an
// error); cycle 1 or 2 corrected word of B. busy is 1 while corrections are
// pending, and inputs are not looked at for new corrections then (the
// processor is expected to be stalled). corr_valid marks a corrected word on
// corr_data/corr_check for bus corr_bus (0 = A, 1 = B); uncorrectable pulses
// instead when that bus held a double error or an unlocatable syndrome.
//
// Doubling detection and correction while sharing one decoder over several
// phases follows the design; the cycle-per-bus schedule is this design's
// choice.
module ecc_dual_bus
  import ft_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   valid_a,
  input  data_t  data_a,
  input  check_t check_a,
  input  logic   valid_b,
  input  data_t  data_b,
  input  check_t check_b,
  output logic   err_a,
  output logic   err_b,
  output logic   op_abort,
  output logic   start,
  output logic   busy,
  output logic   corr_valid,
  output logic   corr_bus,
  output data_t  corr_data,
  output check_t corr_check,
  output logic   uncorrectable
);
  typedef enum logic [1:0] {IDLE, FIX_A, FIX_B} state_t;
  state_t state, state_n;

  check_t syn_a, syn_b;
  logic   e_a, e_b, s_a, s_b, d_a, d_b;

  mcode_detector u_det_a (.data(data_a), .check(check_a), .syndrome(syn_a),
                          .error(e_a), .single_err(s_a), .double_err(d_a));
  mcode_detector u_det_b (.data(data_b), .check(check_b), .syndrome(syn_b),
                          .error(e_b), .single_err(s_b), .double_err(d_b));

  assign err_a = valid_a & e_a;
  assign err_b = valid_b & e_b;
  assign op_abort = err_a | err_b;
  assign busy  = (state != IDLE);
  assign start = op_abort & ~busy;

  // Captured words awaiting correction.
  data_t  wa_q, wb_q;
  check_t ca_q, cb_q, sa_q, sb_q;
  logic   sgl_a_q, sgl_b_q, need_b_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wa_q <= '0; wb_q <= '0; ca_q <= '0; cb_q <= '0; sa_q <= '0; sb_q <= '0;
      sgl_a_q <= 1'b0; sgl_b_q <= 1'b0; need_b_q <= 1'b0;
    end else if (start) begin
      wa_q <= data_a; ca_q <= check_a; sa_q <= syn_a; sgl_a_q <= s_a;
      wb_q <= data_b; cb_q <= check_b; sb_q <= syn_b; sgl_b_q <= s_b;
      need_b_q <= err_b;
    end
  end

  // The shared decoder.
  check_t dec_syn;
  code_t  flip;
  logic   located;
  assign dec_syn = (state == FIX_B) ? sb_q : sa_q;
  mcode_decoder u_dec (.syndrome(dec_syn), .flip(flip), .located(located));

  // Doubled correction circuits, each enabled in its own phase.
  data_t  da_out, db_out;
  check_t ca_out, cb_out;
  code_t  flip_a, flip_b;
  assign flip_a = (state == FIX_A && sgl_a_q) ? flip : '0;
  assign flip_b = (state == FIX_B && sgl_b_q) ? flip : '0;
  mcode_correct u_cor_a (.data(wa_q), .check(ca_q), .flip(flip_a), .data_out(da_out), .check_out(ca_out));
  mcode_correct u_cor_b (.data(wb_q), .check(cb_q), .flip(flip_b), .data_out(db_out), .check_out(cb_out));

  logic fixable;
  assign fixable = located & ((state == FIX_A) ? sgl_a_q : sgl_b_q);

  always_comb begin
    corr_bus   = (state == FIX_B);
    corr_data  = corr_bus ? db_out : da_out;
    corr_check = corr_bus ? cb_out : ca_out;
    corr_valid = busy & fixable;
    uncorrectable = busy & ~fixable;
  end

  always_comb begin
    state_n = state;
    unique case (state)
      IDLE:    if (start) state_n = err_a ? FIX_A : FIX_B;
      FIX_A:   state_n = need_b_q ? FIX_B : IDLE;
      FIX_B:   state_n = IDLE;
      default: state_n = IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) state <= IDLE;
    else        state <= state_n;
  end
endmodule
