// tb_hsiao_dec: encodes random words, then injects no error, every single
// bit error (in all 39 positions) and random double errors. Expected: clean
// words pass with no flag; single errors are corrected (data and the whole
// codeword restored, corrected=1); double errors are flagged uncorrectable
// and never reported as corrected.
module tb_hsiao_dec;
  int checks = 0, failures = 0;
  logic [31:0] data, dout;
  logic [38:0] code, bad, fixed;
  logic corr, unc;

  hsiao_enc u_enc (.data, .code);
  hsiao_dec dut (.code(bad), .data(dout), .code_fixed(fixed), .corrected(corr), .uncorrectable(unc));

  logic clk = 0;
  always #5 clk = ~clk;
  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s data %h bad %h out %h c%b u%b", what, data, bad, dout, corr, unc); end
  endtask

  initial begin
    for (int n = 0; n < 300; n++) begin
      data = $urandom;
      #1 bad = code;
      #1 chk("clean", dout == data && fixed == code && !corr && !unc);
      for (int p = 0; p < 39; p++) begin
        bad = code ^ (39'(1) << p);
        #1 chk("single", dout == data && fixed == code && corr && !unc);
      end
      for (int k = 0; k < 20; k++) begin
        int p1, p2;
        p1 = $urandom_range(0, 38);
        do p2 = $urandom_range(0, 38); while (p2 == p1);
        bad = code ^ (39'(1) << p1) ^ (39'(1) << p2);
        #1 chk("double", unc && !corr);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
