// rollback_regfile: register file with micro rollback and per-register
// parity.
//
// Micro rollback lets the state be returned to what it was up to DEPTH cycles
// earlier, so work can go on while a slow check (here the off-chip duplex
// comparison) is still in flight. It is built as a delayed-write buffer: the
// write of every cycle (or an empty slot when there is none) enters a DEPTH
// entry shift buffer, and only the entry leaving the far end is committed to
// the register array. Reads search the buffer from the newest entry to the
// oldest and fall back to the array, so they always see the latest value.
// A rollback of k cycles (rollback = 1, rb_count = k, 1 <= k <= DEPTH)
// discards the k newest entries, which undoes the writes of the last k
// cycles; in that cycle the buffer does not shift, nothing commits and the
// write port is ignored.
//
// Each stored value carries an even-parity bit generated with a static XOR
// tree on the write data; every read port re-computes parity over
// {parity, data} and reports perr = 1 on a mismatch. This local storage check
// is what tells the faulty module of a duplex pair from the good one.
//
// Ports: one write port, two read ports (rd0/rd1) and a scan read port used
// by the recovery controller; inj_* flips one committed bit to emulate a
// storage fault in test (bit W is the parity bit). Reads are combinational, writes and rollback act on
// the rising edge. Reset clears the array and empties the buffer.
//
// Rollback of state by several cycles and parity-based local detection follow
// the design; the delayed-write buffer, DEPTH = 4 and the 32 x 32 array are
// this design's choices.
module rollback_regfile #(
  parameter int NREGS = 32,
  parameter int W     = 32,
  parameter int DEPTH = 4
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       we,
  input  logic [$clog2(NREGS)-1:0]   waddr,
  input  logic [W-1:0]               wdata,
  input  logic [$clog2(NREGS)-1:0]   ra0,
  output logic [W-1:0]               rd0,
  output logic                       perr0,
  input  logic [$clog2(NREGS)-1:0]   ra1,
  output logic [W-1:0]               rd1,
  output logic                       perr1,
  input  logic [$clog2(NREGS)-1:0]   sa,
  output logic [W-1:0]               sd,
  output logic                       sperr,
  input  logic                       rollback,
  input  logic [$clog2(DEPTH+1)-1:0] rb_count,
  input  logic                       inj_en,
  input  logic [$clog2(NREGS)-1:0]   inj_addr,
  input  logic [$clog2(W+1)-1:0]     inj_bit
);
  localparam int AW = $clog2(NREGS);

  typedef struct packed {
    logic          v;
    logic [AW-1:0] a;
    logic          p;
    logic [W-1:0]  d;
  } entry_t;

  logic [W:0] mem [NREGS];     // {parity, data}
  entry_t     dwb [DEPTH];     // delayed-write buffer, 0 = newest
  logic       wpar;

  xor_tree #(.M(W)) u_wpar (.x(wdata), .parity(wpar));

  // Latest value of a register: newest buffer entry first, then the array.
  function automatic logic [W:0] lookup(input logic [AW-1:0] addr);
    logic [W:0] r;
    logic       hit;
    r   = mem[addr];
    hit = 1'b0;
    for (int i = 0; i < DEPTH; i++) begin
      if (!hit && dwb[i].v && dwb[i].a == addr) begin
        r   = {dwb[i].p, dwb[i].d};
        hit = 1'b1;
      end
    end
    return r;
  endfunction

  logic [W:0] q0, q1, qs;
  always_comb begin
    q0 = lookup(ra0);
    q1 = lookup(ra1);
    qs = lookup(sa);
  end

  assign rd0 = q0[W-1:0];
  assign rd1 = q1[W-1:0];
  assign sd  = qs[W-1:0];

  xor_tree #(.M(W + 1)) u_chk0 (.x(q0), .parity(perr0));
  xor_tree #(.M(W + 1)) u_chk1 (.x(q1), .parity(perr1));
  xor_tree #(.M(W + 1)) u_chks (.x(qs), .parity(sperr));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < DEPTH; i++) dwb[i] <= '0;
    end else if (rollback) begin
      for (int i = 0; i < DEPTH; i++)
        if (i < int'(rb_count)) dwb[i].v <= 1'b0;
    end else begin
      dwb[0] <= '{v: we, a: waddr, p: wpar, d: wdata};
      for (int i = 1; i < DEPTH; i++) dwb[i] <= dwb[i-1];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NREGS; i++) mem[i] <= '0;
    end else begin
      if (!rollback && dwb[DEPTH-1].v)
        mem[dwb[DEPTH-1].a] <= {dwb[DEPTH-1].p, dwb[DEPTH-1].d};
      if (inj_en)
        mem[inj_addr][inj_bit] <= ~mem[inj_addr][inj_bit];
    end
  end

  a_rb_count: assert property (@(posedge clk) disable iff (!rst_n)
    rollback |-> (rb_count >= 1 && int'(rb_count) <= DEPTH));
endmodule
