// mcode_detector: syndrome generation and error identification for one bus.
//
// Each of the 7 rows XORs the same data bits as the encoder plus its own
// stored check bit, giving syndrome bit r; a word read back unchanged has a
// zero syndrome. Because every code column has odd weight, the XOR of the
// syndrome (a further 7-cell chain) separates the cases:
//   syndrome == 0               no error
//   ^syndrome == 1              single-bit error (correction possible)
//   ^syndrome == 0, syndrome!=0 double-bit error (signalled, not corrected)
// Purely combinational. This detection logic, including the syndrome-XOR
// rule for single versus double errors, follows the design.
module mcode_detector
  import ft_pkg::*;
(
  input  data_t  data,
  input  check_t check,
  output check_t syndrome,
  output logic   error,
  output logic   single_err,
  output logic   double_err
);
  for (genvar r = 0; r < CHECK_W; r++) begin : g_row
    localparam data_t ROW = mcode_row(r);
    logic [MCODE_MAX_ROW:0] sel;
    logic ev, od;

    always_comb begin
      int n;
      n   = 0;
      sel = '0;
      for (int i = 0; i < DATA_W; i++) begin
        if (ROW[i]) begin
          sel[n] = data[i];
          n++;
        end
      end
      sel[MCODE_MAX_ROW] = check[r];
    end

    xor_chain #(.M(MCODE_MAX_ROW + 1)) u_chain (.d(sel), .precharge(1'b0), .even(ev), .odd(od));
    assign syndrome[r] = od;
  end

  logic sev, sod;
  xor_chain #(.M(CHECK_W)) u_synxor (.d(syndrome), .precharge(1'b0), .even(sev), .odd(sod));

  assign error      = |syndrome;
  assign single_err = sod;
  assign double_err = error & ~sod;
endmodule
