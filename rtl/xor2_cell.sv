// xor2_cell: the basic two-input static XOR cell of the parity tree.
//
// Logic: y = a ^ b. In the full-custom layout this is a static CMOS cell laid
// out to the datapath pitch; here it is the logic function only. Purely
// combinational.
module xor2_cell (
  input  logic a,
  input  logic b,
  output logic y
);
  assign y = a ^ b;
endmodule
