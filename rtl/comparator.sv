// comparator: W-input equality comparator on a precharged match line.
//
// While prech = 1 the match line is charged high (eq reads 1, no result
// yet). When prech falls, each bit position whose inputs differ
// (a[i] ^ b[i]) opens a discharge path and pulls the shared line low, so eq
// stays 1 only when a == b. Purely combinational. The precharged wired line
// and the per-bit discharge follow the design; modelling the precharge phase
// as eq = 1 is this design's choice. prech is the logical precharge phase,
// active high; the electrical polarity of the precharge device is not
// modelled.
module comparator #(
  parameter int W = 32
) (
  input  logic         prech,
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic         eq
);
  logic [W-1:0] discharge;
  assign discharge = a ^ b;
  assign eq = prech | ~(|discharge);
endmodule
