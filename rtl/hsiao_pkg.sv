// hsiao_pkg: the Hsiao (39,32) single-error-correcting, double-error-
// detecting code used in the memory banks.
//
// The parity-check matrix has 39 columns of odd weight: the 7 check bits
// own the weight-1 columns, and data bit i owns the i-th smallest 7-bit
// value of weight 3 (7, 11, 13, 14, 19, ...; 32 of the 35 such values).
// Because all columns have odd weight, any double error gives a nonzero
// syndrome of even weight and is never mistaken for a single error. The
// codeword is {check[6:0], data[31:0]}. The TETRISC description names the code; the
// choice of columns is this design's own.
package hsiao_pkg;

  localparam int unsigned K = 32;   // data bits
  localparam int unsigned R = 7;    // check bits
  localparam int unsigned N = K + R;

  typedef logic [K-1:0][R-1:0] hcols_t;

  function automatic int unsigned weight(logic [R-1:0] v);
    int unsigned w;
    w = 0;
    for (int unsigned b = 0; b < R; b++) w += {31'b0, v[b]};
    return w;
  endfunction

  function automatic hcols_t gen_cols();
    hcols_t cols;
    int unsigned i;
    cols = '0;
    i = 0;
    for (int unsigned v = 0; v < 2**R; v++)
      if (weight(R'(v)) == 3 && i < K) begin
        cols[i] = R'(v);
        i++;
      end
    return cols;
  endfunction

  localparam hcols_t HCOLS = gen_cols();

  function automatic logic [R-1:0] check_bits(logic [K-1:0] data);
    logic [R-1:0] chk;
    chk = '0;
    for (int unsigned i = 0; i < K; i++)
      if (data[i]) chk ^= HCOLS[i];
    return chk;
  endfunction

endpackage
