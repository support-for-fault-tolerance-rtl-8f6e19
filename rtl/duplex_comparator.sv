// duplex_comparator: the off-chip comparator of a duplex pair.
//
// Each cycle both processors send an S-bit signature. The comparator latches
// the two signatures (edge 1), compares them with a comparator block, and the
// outcome is latched back on the processor side (edge 2): mismatch is valid
// two cycles after the signatures were presented (LATENCY = 2). valid
// qualifies the signatures; flush empties both stages, used after a rollback
// so that comparisons of undone cycles are dropped.
//
// The sequence latch-compare-return follows the design; its count as two
// clock cycles is this design's choice.
module duplex_comparator #(
  parameter int S = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         flush,
  input  logic         valid,
  input  logic [S-1:0] sig_a,
  input  logic [S-1:0] sig_b,
  output logic         mismatch
);
  logic [S-1:0] a_q, b_q;
  logic         v_q, eq;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_q <= '0;
      b_q <= '0;
      v_q <= 1'b0;
    end else begin
      a_q <= sig_a;
      b_q <= sig_b;
      v_q <= valid & ~flush;
    end
  end

  comparator #(.W(S)) u_cmp (.prech(1'b0), .a(a_q), .b(b_q), .eq(eq));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) mismatch <= 1'b0;
    else        mismatch <= v_q & ~eq & ~flush;
  end
endmodule
