// tb_hfc_iml: input multiplexing. For every operating mode each core must
// receive the response and interrupt of the port of its group's master.
module tb_hfc_iml;
  import tetrisc_pkg::*;
  int checks = 0, failures = 0;

  nmr_matrix_t matrix;
  mem_rsp_t [3:0] port_rsp, core_rsp;
  logic [3:0] port_irq, core_irq;

  hfc_iml dut (.matrix, .port_rsp, .port_irq, .core_rsp, .core_irq);

  logic clk = 0;
  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  nmr_matrix_t modes[5] = '{MATRIX_PERF, MATRIX_DMR, MATRIX_DDMR, MATRIX_TMR, MATRIX_QMR};
  // expected master of each core per mode, written out by hand
  int exp_m[5][4] = '{'{0,1,2,3}, '{0,0,2,3}, '{0,0,2,2}, '{0,0,0,3}, '{0,0,0,0}};

  initial begin
    for (int i = 0; i < 2000; i++) begin
      matrix = modes[i % 5];
      for (int p = 0; p < 4; p++) port_rsp[p] = mem_rsp_t'({$urandom, $urandom});
      port_irq = 4'($urandom);
      #1;
      for (int c = 0; c < 4; c++) begin
        checks++;
        if (core_rsp[c] !== port_rsp[exp_m[i % 5][c]] || core_irq[c] !== port_irq[exp_m[i % 5][c]]) begin
          failures++;
          $display("FAIL mode %0d core %0d", i % 5, c);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
