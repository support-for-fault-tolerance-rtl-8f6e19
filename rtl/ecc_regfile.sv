// ecc_regfile: two-read-port register file protected by the M-code, with the
// ECC checking in parallel with the datapath.
//
// Every write stores {mcode_encoder(wdata), wdata}. The two read ports are
// combinational: rd_a / rd_b go to the datapath in the same cycle, without
// waiting for the check. ecc_dual_bus checks both words at the same time and
// raises op_abort in that same cycle, so the operation that used a bad word can
// be cancelled before it changes processor state. The captured words are then
// corrected one per cycle through the shared decoder and written back into
// their registers, after which the aborted operation can be reissued and will
// read clean data. stall is 1 while corrections are pending; the write port
// is ignored then, because the correction write-back owns it.
//
// inj_en / inj_addr / inj_mask invert bits of a stored code word, to emulate
// storage faults in test.
//
// Timing: writes land on the rising edge; reads and op_abort are combinational;
// write-back happens 1 or 2 cycles after op_abort. Reset clears every register
// to the all-zero word, which is a valid code word. The parallel connection
// and the op_abort-before-damage rule follow the design; scrubbing the register
// by write-back, the register count and the injection port are this design's
// choices.
module ecc_regfile
  import ft_pkg::*;
#(
  parameter int NREGS = 32
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     we,
  input  logic [$clog2(NREGS)-1:0] waddr,
  input  data_t                    wdata,
  input  logic                     re_a,
  input  logic [$clog2(NREGS)-1:0] ra_a,
  output data_t                    rd_a,
  input  logic                     re_b,
  input  logic [$clog2(NREGS)-1:0] ra_b,
  output data_t                    rd_b,
  output logic                     op_abort,
  output logic                     stall,
  output logic                     corrected,
  output logic                     uncorrectable,
  input  logic                     inj_en,
  input  logic [$clog2(NREGS)-1:0] inj_addr,
  input  code_t                    inj_mask
);
  localparam int AW = $clog2(NREGS);

  code_t  mem [NREGS];
  check_t wcheck;
  logic   err_a, err_b, start, busy, corr_valid, corr_bus;
  data_t  corr_data;
  check_t corr_check;
  logic [AW-1:0] addr_a_q, addr_b_q;

  mcode_encoder u_enc (.data(wdata), .check(wcheck));

  assign rd_a = mem[ra_a][DATA_W-1:0];
  assign rd_b = mem[ra_b][DATA_W-1:0];

  ecc_dual_bus u_ecc (
    .clk(clk), .rst_n(rst_n),
    .valid_a(re_a), .data_a(mem[ra_a][DATA_W-1:0]), .check_a(mem[ra_a][CODE_W-1:DATA_W]),
    .valid_b(re_b), .data_b(mem[ra_b][DATA_W-1:0]), .check_b(mem[ra_b][CODE_W-1:DATA_W]),
    .err_a(err_a), .err_b(err_b), .op_abort(op_abort), .start(start), .busy(busy),
    .corr_valid(corr_valid), .corr_bus(corr_bus), .corr_data(corr_data),
    .corr_check(corr_check), .uncorrectable(uncorrectable));

  assign stall     = busy;
  assign corrected = corr_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      addr_a_q <= '0;
      addr_b_q <= '0;
    end else if (start) begin
      addr_a_q <= ra_a;
      addr_b_q <= ra_b;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NREGS; i++) mem[i] <= '0;
    end else begin
      if (corr_valid)
        mem[corr_bus ? addr_b_q : addr_a_q] <= {corr_check, corr_data};
      else if (we && !busy)
        mem[waddr] <= {wcheck, wdata};
      if (inj_en)
        mem[inj_addr] <= mem[inj_addr] ^ inj_mask;
    end
  end
endmodule
