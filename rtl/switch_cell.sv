// switch_cell: one switching cell of a pass-gate parity chain.
//
// Four pass gates either pass the two rails straight through (d = 0:
// o0 = i0, o1 = i1) or interchange them (d = 1: o0 = i1, o1 = i0). A chain of
// these cells fed with (1, 0) therefore ends in (1, 0) after an even number of
// ones and in (0, 1) after an odd number. Combinational. Follows the switching
// cell of the design; transistor choice (N-only, precharged or full
// transmission gates) does not change this logic.
module switch_cell (
  input  logic d,
  input  logic i0,
  input  logic i1,
  output logic o0,
  output logic o1
);
  assign o0 = d ? i1 : i0;
  assign o1 = d ? i0 : i1;
endmodule
