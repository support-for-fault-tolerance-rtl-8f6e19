// xor_chain: M-input parity generator built as a chain of switching cells.
//
// The left end of the chain is driven with rail0 = 1 (Vdd) and rail1 = 0
// (GND). Each switching cell swaps the two rails when its data bit is 1, so
// the right end reads even = 1, odd = 0 for an even number of ones and
// even = 0, odd = 1 for an odd number. The chain is divided into groups of
// BUF_EVERY cells; in silicon a restoring buffer follows each group, which in
// logic is the identity, so the grouping only appears as named stages.
//
// precharge models the precharged variants: while it is 1 both output rails
// read 1 (the precharged state, no result yet); when it falls the chain
// evaluates and one rail is discharged. A non-precharged chain ties it to 0.
// Purely combinational; M cells deep.
//
// The dual-rail chain, the Vdd/GND end connections and the buffer spacing of
// four cells follow the design; representing the precharge phase as a
// both-rails-high output is this design's choice.
module xor_chain #(
  parameter int M         = 32,
  parameter int BUF_EVERY = 4
) (
  input  logic [M-1:0] d,
  input  logic         precharge,
  output logic         even,
  output logic         odd
);
  logic [M:0] r0, r1;

  assign r0[0] = 1'b1;
  assign r1[0] = 1'b0;

  for (genvar i = 0; i < M; i++) begin : g_cell
    switch_cell u_cell (.d(d[i]), .i0(r0[i]), .i1(r1[i]), .o0(r0[i+1]), .o1(r1[i+1]));
  end

  assign even = precharge | r0[M];
  assign odd  = precharge | r1[M];

  // The rails are always complementary once evaluated.
  always_comb begin
    if (!precharge) assert (even != odd);
  end

  // Number of restoring-buffer groups, kept for reference by users.
  localparam int GROUPS = (M + BUF_EVERY - 1) / BUF_EVERY;
  if (GROUPS < 1) begin : g_bad
    $error("xor_chain needs at least one cell");
  end
endmodule
