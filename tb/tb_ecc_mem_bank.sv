// tb_ecc_mem_bank: a 64-word bank with a scrub read every 4 cycles.
// Random bus traffic is compared with a reference array; every response
// must come exactly one cycle after its grant. Single-bit upsets injected
// into the SRAM array (hierarchical writes) must be invisible on reads and
// must have been repaired in the array by the scrubber (or a read write-back)
// after a full scrub pass; double-bit upsets must be reported on rsp.err and
// by the uncorrectable pulse. Counts grants withheld for write-backs.
module tb_ecc_mem_bank;
  import tetrisc_pkg::*;
  import hsiao_pkg::*;
  localparam int WORDS = 64;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  mem_req_t req;
  mem_rsp_t rsp;
  logic corr, unc;
  logic [31:0] model [WORDS];

  ecc_mem_bank #(.WORDS(WORDS), .SCRUB_INTERVAL(4)) dut (.clk, .rst_n, .req, .rsp,
                                                          .corrected(corr), .uncorrectable(unc));

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  int n_corr = 0, n_unc = 0, n_stall = 0;
  always @(posedge clk) begin
    if (corr) n_corr++;
    if (unc)  n_unc++;
  end

  // one bus access; returns read data and err
  task automatic access(logic we, int a, logic [31:0] wd, output logic [31:0] rd, output logic e);
    @(negedge clk);
    req = '{req: 1'b1, we: we, addr: 32'(a * 4), wdata: wd};
    #1;
    while (!rsp.gnt) begin
      n_stall++;
      @(negedge clk);
      #1;
    end
    @(negedge clk);
    req.req = 1'b0;
    chk("rvalid one cycle after grant", rsp.rvalid);
    rd = rsp.rdata; e = rsp.err;
  endtask

  initial begin
    logic [31:0] rd; logic e;
    int a;
    req = '0;
    #12 rst_n = 1;
    for (int i = 0; i < WORDS; i++) begin
      model[i] = $urandom;
      access(1, i, model[i], rd, e);
    end
    for (int i = 0; i < 2000; i++) begin
      a = $urandom_range(0, WORDS - 1);
      if ($urandom_range(0, 3) == 0) begin
        model[a] = $urandom;
        access(1, a, model[a], rd, e);
      end else begin
        if ($urandom_range(0, 7) == 0)   // single upset before the read
          dut.u_sram.mem[a] = dut.u_sram.mem[a] ^ (40'(1) << $urandom_range(0, 38));
        access(0, a, 'x, rd, e);
        chk("read data", rd == model[a] && !e);
      end
      if ($urandom_range(0, 3) == 0) repeat ($urandom_range(1, 6)) @(negedge clk);
    end
    // upsets in many words, then let the scrubber run one full pass
    for (int i = 0; i < WORDS; i += 3)
      dut.u_sram.mem[i] = dut.u_sram.mem[i] ^ (40'(1) << (i % 39));
    repeat (WORDS * 6) @(negedge clk);
    for (int i = 0; i < WORDS; i++)
      chk("scrubbed", dut.u_sram.mem[i] == {1'b0, check_bits(model[i]), model[i]});
    // double upset: detected, not corrected
    dut.u_sram.mem[7] = dut.u_sram.mem[7] ^ 40'h3;
    access(0, 7, 'x, rd, e);
    chk("double error flagged", e);
    chk("corrections seen", n_corr > 20);
    chk("uncorrectable seen", n_unc > 0);
    chk("write-back stalls seen", n_stall > 0);
    $display("corrected=%0d uncorrectable=%0d stalls=%0d", n_corr, n_unc, n_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
