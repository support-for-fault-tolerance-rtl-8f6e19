// mcode_correct: controlled inverters that repair the faulty code bit.
//
// Each of the 39 code bits passes through an XOR with its decoder line, so the
// bit selected by flip is inverted and all others pass unchanged. Purely
// combinational, one XOR deep. Follows the controlled-inverter correction of
// the design.
module mcode_correct
  import ft_pkg::*;
(
  input  data_t  data,
  input  check_t check,
  input  code_t  flip,
  output data_t  data_out,
  output check_t check_out
);
  assign data_out  = data  ^ flip[DATA_W-1:0];
  assign check_out = check ^ flip[CODE_W-1:DATA_W];
endmodule
