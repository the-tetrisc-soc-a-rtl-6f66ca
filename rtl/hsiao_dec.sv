// hsiao_dec: Hsiao (39,32) SEC-DED decoder. The syndrome is the stored
// check bits XOR the check bits recomputed from the stored data. A zero
// syndrome means no error. A syndrome equal to a data column flips that data
// bit; a syndrome of weight one marks an error in a check bit; both are
// corrected single errors (corrected=1). Any other syndrome, in particular
// every nonzero even-weight one, is an uncorrectable (double) error
// (uncorrectable=1), and the data is passed on unchanged. code_fixed is the
// corrected codeword, ready to be written back by a scrubber. Combinational.
module hsiao_dec
  import hsiao_pkg::*;
(
  input  logic [N-1:0] code,
  output logic [K-1:0] data,
  output logic [N-1:0] code_fixed,
  output logic         corrected,
  output logic         uncorrectable
);

  logic [R-1:0] syn;
  logic [K-1:0] flip;

  assign syn = code[N-1:K] ^ check_bits(code[K-1:0]);

  always_comb begin
    for (int unsigned i = 0; i < K; i++) flip[i] = (syn == HCOLS[i]);
  end

  always_comb begin
    data          = code[K-1:0];
    code_fixed    = code;
    corrected     = 1'b0;
    uncorrectable = 1'b0;
    if (syn != '0) begin
      if (|flip) begin
        data       = code[K-1:0] ^ flip;
        code_fixed = {code[N-1:K], data};
        corrected  = 1'b1;
      end else if ((syn & (syn - 1'b1)) == '0) begin
        code_fixed = {check_bits(code[K-1:0]), code[K-1:0]};
        corrected  = 1'b1;
      end else begin
        uncorrectable = 1'b1;
      end
    end
  end

endmodule
