// duplex_node: the fault-tolerance support carried by one module of a duplex
// pair.
//
// It holds the module's register file (rollback_regfile: micro rollback plus
// per-register parity) and compresses the module's internal-state bus
// (ALU output, status word, state registers: STATE_W bits) into an S-bit
// interleaved-parity signature that leaves the chip for comparison. While the
// recovery controller copies state (copy_we = 1) the copy write takes the
// register-file write port in place of the processor's write.
//
// Timing: sig is combinational from state; register-file timing as in
// rollback_regfile. The 100-bit state bus compressed to 4 bits follows the
// duplex arrangement of the design; the copy-port multiplexing is this
// design's choice.
module duplex_node #(
  parameter int NREGS   = 32,
  parameter int W       = 32,
  parameter int DEPTH   = 4,
  parameter int STATE_W = 100,
  parameter int S       = 4
) (
  input  logic                       clk,
  input  logic                       rst_n,
  // processor side
  input  logic                       we,
  input  logic [$clog2(NREGS)-1:0]   waddr,
  input  logic [W-1:0]               wdata,
  input  logic [$clog2(NREGS)-1:0]   ra0,
  output logic [W-1:0]               rd0,
  output logic                       perr0,
  input  logic [$clog2(NREGS)-1:0]   ra1,
  output logic [W-1:0]               rd1,
  output logic                       perr1,
  input  logic [STATE_W-1:0]         state,
  output logic [S-1:0]               sig,
  // recovery side
  input  logic                       rollback,
  input  logic [$clog2(DEPTH+1)-1:0] rb_count,
  input  logic [$clog2(NREGS)-1:0]   sa,
  output logic [W-1:0]               sd,
  output logic                       sperr,
  input  logic                       copy_we,
  input  logic [$clog2(NREGS)-1:0]   copy_addr,
  input  logic [W-1:0]               copy_data,
  // storage fault injection
  input  logic                       inj_en,
  input  logic [$clog2(NREGS)-1:0]   inj_addr,
  input  logic [$clog2(W+1)-1:0]     inj_bit
);
  logic                     rf_we;
  logic [$clog2(NREGS)-1:0] rf_waddr;
  logic [W-1:0]             rf_wdata;

  always_comb begin
    rf_we    = copy_we | we;
    rf_waddr = copy_we ? copy_addr : waddr;
    rf_wdata = copy_we ? copy_data : wdata;
  end

  rollback_regfile #(.NREGS(NREGS), .W(W), .DEPTH(DEPTH)) u_rf (
    .clk(clk), .rst_n(rst_n),
    .we(rf_we), .waddr(rf_waddr), .wdata(rf_wdata),
    .ra0(ra0), .rd0(rd0), .perr0(perr0),
    .ra1(ra1), .rd1(rd1), .perr1(perr1),
    .sa(sa), .sd(sd), .sperr(sperr),
    .rollback(rollback), .rb_count(rb_count),
    .inj_en(inj_en), .inj_addr(inj_addr), .inj_bit(inj_bit));

  interleaved_compressor #(.W(STATE_W), .S(S)) u_cmp (.data(state), .sig(sig));
endmodule
