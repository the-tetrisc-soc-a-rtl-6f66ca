// tb_sram_macro: random single-port traffic against a reference array.
// A read returns the addressed word after the clock edge and the output
// holds until the next read (writes and idle cycles leave it alone).
module tb_sram_macro;
  localparam int WORDS = 8192;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic ce, we;
  logic [12:0] addr;
  logic [39:0] wdata, rdata, exp_r;
  logic [39:0] ref_mem [WORDS];
  bit          valid [WORDS];

  sram_macro dut (.clk, .ce, .we, .addr, .wdata, .rdata);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic have;
    ce = 0; we = 0; addr = 0; wdata = 0; have = 0;
    // fill a window so reads hit known words
    for (int a = 0; a < 64; a++) begin
      @(negedge clk);
      ce = 1; we = 1; addr = 13'(a * 128 + 5); wdata = {$urandom, $urandom};
      ref_mem[addr] = 40'(wdata); valid[addr] = 1;
    end
    for (int i = 0; i < 20000; i++) begin
      @(negedge clk);
      if (have) begin
        checks++;
        if (rdata !== exp_r) begin failures++; $display("FAIL read %h exp %h", rdata, exp_r); end
      end
      ce = 1'($urandom_range(0, 3) != 0);
      we = 1'($urandom);
      addr = 13'($urandom_range(0, 63) * 128 + 5);
      if ($urandom_range(0, 7) == 0) addr = 13'($urandom);
      wdata = {$urandom, $urandom};
      if (ce && we) begin ref_mem[addr] = 40'(wdata); valid[addr] = 1; end
      if (ce && !we) begin
        have = valid[addr];
        exp_r = ref_mem[addr];
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
