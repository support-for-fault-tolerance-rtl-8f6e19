// mcode_encoder: generates the 7 M-code check bits of a 32-bit data word.
//
// One XOR row per check bit: row r gathers the data bits whose matrix column
// has bit r set (ft_pkg::mcode_row) into a MCODE_MAX_ROW-bit vector, padded
// with zeros, and a switching-cell chain (xor_chain) produces its parity.
// check[r] is that parity, so a stored word {check, data} has an all-zero
// syndrome. Purely combinational, at most 14 cells deep.
//
// Seven XOR rows fed from the data bus, and switching-cell chains for them,
// follow the design; the column assignment is the one described in ft_pkg.
module mcode_encoder
  import ft_pkg::*;
(
  input  data_t  data,
  output check_t check
);
  for (genvar r = 0; r < CHECK_W; r++) begin : g_row
    localparam data_t ROW = mcode_row(r);
    logic [MCODE_MAX_ROW-1:0] sel;
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
    end

    xor_chain #(.M(MCODE_MAX_ROW)) u_chain (.d(sel), .precharge(1'b0), .even(ev), .odd(od));
    assign check[r] = od;
  end
endmodule
