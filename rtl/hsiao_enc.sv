// hsiao_enc: Hsiao (39,32) encoder. Appends the 7 check bits of the code in
// hsiao_pkg to a 32-bit word: code = {check, data}. Each check bit is the
// XOR of the data bits whose column has a one in that row. Combinational.
module hsiao_enc
  import hsiao_pkg::*;
(
  input  logic [K-1:0] data,
  output logic [N-1:0] code
);

  assign code = {check_bits(data), data};

endmodule
