// recovery_ctrl: micro-rollback recovery of a duplex pair.
//
// When the duplex comparator reports a mismatch, both modules are rolled
// back RB_DIST cycles (enough to undo every cycle whose signature was still
// in flight, comparator latency 2 plus the cycle itself) and the comparator
// is flushed. The controller then scans all NREGS registers of both modules
// through their scan ports, one per cycle, checking the local parity:
//   parity error in one module only  copy the other module's value into it
//   parity error in both             unrecoverable (flagged, scan goes on)
//   no parity error anywhere         the fault was transient; re-executing
//                                    the rolled-back cycles is the recovery
// stall holds both processors from the cycle after the mismatch until the
// scan ends. The cycle in which the mismatch is seen still executes, so the
// rollback undoes exactly the last RB_DIST executed cycles, and a processor
// restarts RB_DIST cycles back.
//
// Timing: cycle 0 mismatch seen; cycle 1 rollback pulse; cycles 2..NREGS+1
// scan; then idle. Event outputs pulse once per occurrence: ev_rollback,
// ev_copy (per register copied), ev_unrecoverable (per register lost),
// ev_transient (a recovery with nothing to copy).
//
// Rolling back on mismatch, and copying valid state from the fault-free
// module to the one whose parity shows a storage error, follow the design;
// the scan order and cycle schedule are this design's choices.
module recovery_ctrl #(
  parameter int NREGS   = 32,
  parameter int W       = 32,
  parameter int DEPTH   = 4,
  parameter int RB_DIST = 3
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       mismatch,
  output logic                       stall,
  output logic                       rollback,
  output logic [$clog2(DEPTH+1)-1:0] rb_count,
  output logic                       cmp_flush,
  output logic [$clog2(NREGS)-1:0]   scan_addr,
  input  logic [W-1:0]               sd_a,
  input  logic                       sperr_a,
  input  logic [W-1:0]               sd_b,
  input  logic                       sperr_b,
  output logic                       copy_we_a,
  output logic                       copy_we_b,
  output logic [$clog2(NREGS)-1:0]   copy_addr,
  output logic [W-1:0]               copy_data,
  output logic                       ev_rollback,
  output logic                       ev_copy,
  output logic                       ev_unrecoverable,
  output logic                       ev_transient
);
  localparam int AW = $clog2(NREGS);

  typedef enum logic [1:0] {IDLE, ROLLBACK, SCAN} state_t;
  state_t        st;
  logic [AW-1:0] addr;
  logic          any_perr;

  assign stall     = (st != IDLE);
  assign rollback  = (st == ROLLBACK);
  assign rb_count  = ($clog2(DEPTH+1))'(RB_DIST);
  assign cmp_flush = (st != IDLE);
  assign scan_addr = addr;

  always_comb begin
    copy_we_a = (st == SCAN) &  sperr_a & ~sperr_b;
    copy_we_b = (st == SCAN) &  sperr_b & ~sperr_a;
    copy_addr = addr;
    copy_data = sperr_a ? sd_b : sd_a;
  end

  assign ev_rollback      = rollback;
  assign ev_copy          = copy_we_a | copy_we_b;
  assign ev_unrecoverable = (st == SCAN) & sperr_a & sperr_b;
  assign ev_transient     = (st == SCAN) & (addr == AW'(NREGS - 1)) & ~any_perr & ~(sperr_a | sperr_b);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st       <= IDLE;
      addr     <= '0;
      any_perr <= 1'b0;
    end else begin
      unique case (st)
        IDLE: if (mismatch) st <= ROLLBACK;
        ROLLBACK: begin
          st       <= SCAN;
          addr     <= '0;
          any_perr <= 1'b0;
        end
        SCAN: begin
          if (sperr_a || sperr_b) any_perr <= 1'b1;
          if (addr == AW'(NREGS - 1)) st <= IDLE;
          else                         addr <= addr + 1'b1;
        end
        default: st <= IDLE;
      endcase
    end
  end

  if (RB_DIST < 1 || RB_DIST > DEPTH) begin : g_bad
    $error("recovery_ctrl: RB_DIST must be within the rollback depth");
  end
endmodule
