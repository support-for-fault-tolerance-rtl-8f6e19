// interleaved_compressor: compresses a W-bit word into an S-bit signature of
// interleaved parities.
//
// Signature bit k is the parity of data bits k, k+S, k+2S, ...: S parity
// chains, each taking every S-th bit. Comparing signatures of a correct and a
// faulty word catches every single-bit error, every odd number of errors,
// every burst of up to S adjacent bit errors, and 1 - 2**-S of random
// multi-bit errors (93.75 % for S = 4). Each chain is a switching-cell chain
// of ceil(W/S) cells, padded with zeros where W is not a multiple of S.
// Purely combinational.
//
// The interleaving and the default 32-bit word with a 4-bit signature follow
// the design; the duplex top uses the same block with W = 100 for its
// internal-state bus.
module interleaved_compressor #(
  parameter int W = 32,
  parameter int S = 4
) (
  input  logic [W-1:0] data,
  output logic [S-1:0] sig
);
  localparam int CH = (W + S - 1) / S;

  for (genvar k = 0; k < S; k++) begin : g_chain
    logic [CH-1:0] sel;
    logic ev, od;
    for (genvar j = 0; j < CH; j++) begin : g_bit
      if (k + j * S < W) begin : g_in
        assign sel[j] = data[k + j*S];
      end else begin : g_pad
        assign sel[j] = 1'b0;
      end
    end
    xor_chain #(.M(CH)) u_chain (.d(sel), .precharge(1'b0), .even(ev), .odd(od));
    assign sig[k] = od;
  end
endmodule
