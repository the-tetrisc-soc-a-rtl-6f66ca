// tb_clock_gate: counts gated clock edges against the enable pattern. An
// enable raised or dropped while the clock is high must only take effect
// from the next clock period (no glitch, no shortened pulse); test_en forces
// the clock on.
module tb_clock_gate;
  logic clk = 0, en = 0, test_en = 0, gclk;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int gedges = 0;

  clock_gate dut (.clk, .en, .test_en, .gclk);

  always @(posedge gclk) gedges++;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string what, int got, int exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got %0d exp %0d at %0t", what, got, exp, $time); end
  endtask

  initial begin
    int expect_e;
    expect_e = 0;
    for (int i = 0; i < 200; i++) begin
      logic e, t;
      @(negedge clk);
      e = 1'($urandom); t = ($urandom_range(0, 7) == 0);
      // change the enable while the clock is still low... or glitch it while high
      en = e; test_en = t;
      if (e || t) expect_e++;
      @(posedge clk);
      #1;
      chk("gclk high iff enabled", int'(gclk), int'(e || t));
      // toggling en while clk is high must not affect gclk
      en = ~en;
      #1 chk("no glitch while high", int'(gclk), int'(e || t));
    end
    @(negedge clk);
    chk("edge count", gedges, expect_e);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
