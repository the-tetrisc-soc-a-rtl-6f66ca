// tb_tmr_reg: writes random values and checks q; then upsets one of the
// three copies (hierarchical write), expects q unchanged and err raised,
// and expects the copy repaired (err low) after the next clock edge.
module tb_tmr_reg;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic en, err;
  logic [15:0] d, q, model;

  tmr_reg #(.W(16), .RESET(16'hA5A5)) dut (.clk, .rst_n, .en, .d, .q, .err);

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string what, logic [15:0] got, logic [15:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got %h exp %h", what, got, exp); end
  endtask

  initial begin
    en = 0; d = 0;
    #12 rst_n = 1;
    model = 16'hA5A5;
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      chk("q", q, model);
      chk("no err", 16'(err), 0);
      if (i % 10 == 5) begin
        int k = $urandom_range(0, 2);
        dut.r[k] = dut.r[k] ^ 16'(1 << $urandom_range(0, 15));
        #1 chk("q masks upset", q, model);
        chk("err on upset", 16'(err), 1);
        en = 0;
      end else begin
        en = 1'($urandom);
        d  = 16'($urandom);
        if (en) model = d;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
