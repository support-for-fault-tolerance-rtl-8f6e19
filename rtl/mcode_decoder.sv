// mcode_decoder: syndrome decoder selecting the code bit to flip.
//
// flip[i] (i = 0..31, data) is 1 when the syndrome equals the matrix column
// of data bit i; flip[32 + r] (check bit c_r) is 1 when the syndrome is the
// single bit r. At most one flip bit is ever set. located is 1 when some
// position matched; a single-error syndrome (odd weight) that matches no
// column comes from three or more errors and must be treated as
// uncorrectable. Purely combinational. The decoder's role follows the
// design; its comparison-per-position form is the simplest one that does it.
module mcode_decoder
  import ft_pkg::*;
(
  input  check_t syndrome,
  output code_t  flip,
  output logic   located
);
  for (genvar i = 0; i < DATA_W; i++) begin : g_data
    localparam check_t COL = mcode_col(i);
    assign flip[i] = (syndrome == COL);
  end
  for (genvar r = 0; r < CHECK_W; r++) begin : g_chk
    assign flip[DATA_W + r] = (syndrome == check_t'(1 << r));
  end

  assign located = |flip;

  always_comb assert ($onehot0(flip));
endmodule
