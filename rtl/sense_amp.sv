// sense_amp: clocked sense amplifier at the end of a dual-rail chain.
//
// On a rising clk edge with latch = 1 it resolves the two rails and holds the
// result: out follows in_p and out_n is its complement. Between latch events
// it keeps its value. Reset clears it to out = 0. A real sense amplifier
// resolves a small rail difference quickly; here it is the clocked capture of
// an already resolved logic pair. One flip-flop of state.
module sense_amp (
  input  logic clk,
  input  logic rst_n,
  input  logic latch,
  input  logic in_p,
  input  logic in_n,
  output logic out,
  output logic out_n
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     out <= 1'b0;
    else if (latch) out <= in_p & ~in_n;
  end
  assign out_n = ~out;
endmodule
