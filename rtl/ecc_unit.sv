// ecc_unit: complete single-bus SEC-DED circuit.
//
// A word read from storage, {check, data}, goes through the syndrome
// detector; the syndrome drives the decoder and the controlled inverters,
// which deliver the corrected word. Outputs:
//   error          syndrome not zero
//   corrected      single-bit error that was located and repaired
//   uncorrectable  double-bit error, or an odd syndrome that matches no column
// data_out / check_out equal the input when there is no error and when the
// error is uncorrectable. Purely combinational. Structure (detection rows,
// 1-or-2-errors logic, decoders, correction) follows the design.
module ecc_unit
  import ft_pkg::*;
(
  input  data_t  data,
  input  check_t check,
  output data_t  data_out,
  output check_t check_out,
  output check_t syndrome,
  output logic   error,
  output logic   corrected,
  output logic   uncorrectable
);
  logic  single_err, double_err, located;
  code_t flip, flip_q;

  mcode_detector u_det (
    .data(data), .check(check), .syndrome(syndrome),
    .error(error), .single_err(single_err), .double_err(double_err));

  mcode_decoder u_dec (.syndrome(syndrome), .flip(flip), .located(located));

  // Only a single-error syndrome may flip a bit.
  assign flip_q = single_err ? flip : '0;

  mcode_correct u_cor (
    .data(data), .check(check), .flip(flip_q), .data_out(data_out), .check_out(check_out));

  assign corrected     = single_err & located;
  assign uncorrectable = double_err | (single_err & ~located);
endmodule
