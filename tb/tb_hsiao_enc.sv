// tb_hsiao_enc: checks the encoder against a parity-check matrix built
// independently here: data bit i gets the i-th 7-bit weight-3 column in
// increasing numeric order, enumerated with three nested loops over bit
// positions (highest bit outermost). Also checks that every codeword has a
// zero syndrome under that matrix and that the data passes unchanged.
module tb_hsiao_enc;
  int checks = 0, failures = 0;
  logic [31:0] data;
  logic [38:0] code;
  logic [31:0][6:0] col;

  hsiao_enc dut (.data, .code);

  logic clk = 0;
  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int i;
    logic [6:0] chk_exp;
    i = 0;
    for (int c = 2; c < 7; c++)
      for (int b = 1; b < c; b++)
        for (int a = 0; a < b; a++)
          if (i < 32) begin
            col[i] = 7'((1 << a) | (1 << b) | (1 << c));
            i++;
          end
    for (int n = 0; n < 5000; n++) begin
      data = (n < 32) ? 32'(1) << n : $urandom;
      #1;
      chk_exp = '0;
      for (int k = 0; k < 32; k++) if (data[k]) chk_exp ^= col[k];
      checks++;
      if (code !== {chk_exp, data}) begin
        failures++;
        $display("FAIL data %h code %h exp %h", data, code, {chk_exp, data});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
