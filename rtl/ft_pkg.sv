// ft_pkg: shared constants, types and the M-code parity-check matrix.
//
// The error-correcting code is a SEC-DED code for 32-bit words with 7 check
// bits (39 code bits). Its data columns are 32 distinct 7-bit columns of
// weight three; each check bit has a weight-one column. Every column thus has
// odd weight, so the XOR of a syndrome is 1 for any single-bit error and 0 for
// any double-bit error, which is how single and double errors are told apart.
// The columns are the weight-three combinations {a<b<c} of the rows 0..6 in
// lexicographic order, leaving out {0,1,2}, {3,4,5} and {0,3,6}; that leaves
// every check bit the XOR of at most 14 data bits (row weights 13 or 14). The
// 7-check-bit size and the 14-bit row limit follow the M-code described for
// this design; the exact bit positions of each row are this design's choice.
//
// Code bit numbering used everywhere: bits 0..31 are data, 32..38 are check
// bits c0..c6.
package ft_pkg;

  localparam int DATA_W  = 32;
  localparam int CHECK_W = 7;
  localparam int CODE_W  = DATA_W + CHECK_W;

  typedef logic [DATA_W-1:0]  data_t;
  typedef logic [CHECK_W-1:0] check_t;
  typedef logic [CODE_W-1:0]  code_t;

  // Column of data bit i (0..31) in the parity-check matrix: bit r set means
  // data bit i takes part in check bit r.
  function automatic check_t mcode_col(int i);
    int n;
    check_t c;
    n = 0;
    c = '0;
    for (int a = 0; a < CHECK_W; a++)
      for (int b = a + 1; b < CHECK_W; b++)
        for (int k = b + 1; k < CHECK_W; k++) begin
          if (!((a == 0 && b == 1 && k == 2) ||
                (a == 3 && b == 4 && k == 5) ||
                (a == 0 && b == 3 && k == 6))) begin
            if (n == i) begin
              c = '0;
              c[a] = 1'b1;
              c[b] = 1'b1;
              c[k] = 1'b1;
            end
            n++;
          end
        end
    return c;
  endfunction

  // Row r of the matrix over the data bits: the data bits XORed into check r.
  function automatic data_t mcode_row(int r);
    data_t m;
    check_t c;
    m = '0;
    for (int i = 0; i < DATA_W; i++) begin
      c = mcode_col(i);
      m[i] = c[r];
    end
    return m;
  endfunction

  // Number of data bits in row r.
  function automatic int mcode_row_weight(int r);
    data_t m;
    int n;
    m = mcode_row(r);
    n = 0;
    for (int i = 0; i < DATA_W; i++) n += int'(m[i]);
    return n;
  endfunction

  // Largest row weight; sizes the XOR chains of the encoder and detector.
  localparam int MCODE_MAX_ROW = 14;

endpackage
