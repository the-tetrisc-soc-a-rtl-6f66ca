// tb_rc_sequencer: reconfiguration sequence. From performance mode to DMR
// core 1 must be programmed from core 0 for exactly one cycle while the new
// mode is not yet active, then in the next cycle the DMR matrix is active
// and core 1 is redundant (latency start -> active = 2 cycles). Going back
// to performance mode programs nothing and takes one cycle. Also checked:
// QMR from DMR programs only cores 2 and 3, a clock-gated mode gates the
// clock enables, programming forces the clocks of a core and its master on,
// and resync produces a one-cycle copy for redundant cores only.
module tb_rc_sequencer;
  import tetrisc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic start;
  hfc_mode_t target, active;
  logic [3:0] resync, prog, red, clk_en;
  logic [3:0][1:0] src;
  logic busy, terr;

  rc_sequencer dut (.clk, .rst_n, .start, .target, .resync, .port_gnt(4'b0000), .active, .busy,
                    .src_sel(src), .prog, .red, .core_clk_en(clk_en), .tmr_err(terr));

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got %h exp %h at %0t", what, got, exp, $time); end
  endtask

  // request a mode, return cycles until it is active
  task automatic go(hfc_mode_t m, output int lat, output logic [3:0] progged);
    @(negedge clk);
    target = m; start = 1;
    @(negedge clk);
    start = 0;
    lat = 1; progged = '0;
    while (active != m) begin
      progged |= prog;
      for (int c = 0; c < 4; c++) if (prog[c]) begin
        chk("src", 32'(src[c]), 32'(master_of(m.matrix, c)));
        chk("clk on while programming", 32'(clk_en[c] & clk_en[src[c]]), 1);
      end
      @(negedge clk);
      lat++;
    end
    chk("idle after", 32'(busy), 0);
  endtask

  initial begin
    int lat; logic [3:0] pg;
    start = 0; resync = 0; target = '{cg: '0, matrix: MATRIX_PERF};
    #12 rst_n = 1;
    repeat (3) @(posedge clk);
    chk("reset mode", 32'(active), 32'({4'b0, MATRIX_PERF}));
    go('{cg: '0, matrix: MATRIX_DMR}, lat, pg);
    chk("dmr latency", lat, 2); chk("dmr programmed", 32'(pg), 32'b0010); chk("dmr red", 32'(red), 32'b0010);
    go('{cg: '0, matrix: MATRIX_QMR}, lat, pg);
    chk("qmr programmed", 32'(pg), 32'b1100); chk("qmr red", 32'(red), 32'b1110);
    // resync core 2
    @(negedge clk); resync = 4'b0101; #1;
    chk("resync only redundant", 32'(prog), 32'b0100); chk("resync src", 32'(src[2]), 0);
    @(negedge clk); resync = 0; #1 chk("resync one cycle", 32'(prog), 0);
    go('{cg: '0, matrix: MATRIX_DDMR}, lat, pg);
    chk("ddmr programmed (3 changes master)", 32'(pg), 32'b1000); chk("ddmr red", 32'(red), 32'b1010);
    go('{cg: 4'b1100, matrix: MATRIX_PERF}, lat, pg);
    chk("perf latency", lat, 1); chk("perf programmed", 32'(pg), 0); chk("perf red", 32'(red), 0);
    chk("destress clock enables", 32'(clk_en), 32'b0011);
    go('{cg: 4'b0000, matrix: MATRIX_TMR}, lat, pg);
    chk("tmr programmed", 32'(pg), 32'b0110); chk("tmr red", 32'(red), 32'b0110);
    chk("tmr err", 32'(terr), 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
