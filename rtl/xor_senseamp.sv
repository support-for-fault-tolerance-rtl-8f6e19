// xor_senseamp: fast parity generator of switching-cell chains read by sense
// amplifiers.
//
// TWO_LEVEL = 1 (default): the M inputs are cut into M/GROUP chains of GROUP
// switching cells (four chains of eight for a 32-bit word). A sense amplifier
// at the end of each chain latches that group's parity; a second, short chain
// of M/GROUP cells XORs the latched group parities and a last sense
// amplifier latches the word parity.
// TWO_LEVEL = 0: one chain of M cells with a single sense amplifier.
//
// Timing: the chains evaluate while trigger = 1 and a sense amplifier latches
// on a rising clk edge with latch = 1 (enable = trigger & latch). The
// two-level form returns parity on the second enabled edge after the data are
// applied (one edge per level); the one-level form on the first. valid marks
// a parity that has passed through every level since reset.
//
// The chain grouping (4 x 8 inputs, then 4) and the trigger/latch controls
// follow the design; treating each level's latch as one clocked stage is this
// design's choice. The circuit drives its latch line active low; here trigger
// and latch are the logical enables, active high.
module xor_senseamp #(
  parameter int M         = 32,
  parameter int GROUP     = 8,
  parameter bit TWO_LEVEL = 1'b1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         trigger,
  input  logic         latch,
  input  logic [M-1:0] d,
  output logic         parity,
  output logic         parity_n,
  output logic         valid
);
  logic en;
  assign en = trigger & latch;

  if (TWO_LEVEL) begin : g_two
    localparam int G = M / GROUP;
    logic [G-1:0] ev, od, grp, grp_n;
    logic         ev2, od2;
    logic         v1;

    for (genvar g = 0; g < G; g++) begin : g_grp
      xor_chain #(.M(GROUP)) u_chain (
        .d(d[g*GROUP +: GROUP]), .precharge(1'b0), .even(ev[g]), .odd(od[g]));
      sense_amp u_sa (
        .clk(clk), .rst_n(rst_n), .latch(en),
        .in_p(od[g]), .in_n(ev[g]), .out(grp[g]), .out_n(grp_n[g]));
    end

    xor_chain #(.M(G)) u_chain2 (.d(grp), .precharge(1'b0), .even(ev2), .odd(od2));
    sense_amp u_sa2 (
      .clk(clk), .rst_n(rst_n), .latch(en),
      .in_p(od2), .in_n(ev2), .out(parity), .out_n(parity_n));

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        v1    <= 1'b0;
        valid <= 1'b0;
      end else if (en) begin
        v1    <= 1'b1;
        valid <= v1;
      end
    end

    if (M % GROUP != 0) begin : g_bad
      $error("xor_senseamp: M must be a multiple of GROUP");
    end
  end else begin : g_one
    logic ev, od;
    xor_chain #(.M(M)) u_chain (.d(d), .precharge(1'b0), .even(ev), .odd(od));
    sense_amp u_sa (
      .clk(clk), .rst_n(rst_n), .latch(en),
      .in_p(od), .in_n(ev), .out(parity), .out_n(parity_n));

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)  valid <= 1'b0;
      else if (en) valid <= 1'b1;
    end
  end
endmodule
