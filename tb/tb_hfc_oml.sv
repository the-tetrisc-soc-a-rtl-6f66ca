// tb_hfc_oml: output multiplexing. For each of the TETRISC description's operating
// modes (performance, DMR, dual DMR, TMR, QMR) the four cores issue
// requests; members of a group issue the same request, occasionally with one
// corrupted core. Expected: the port of each group's master carries the
// majority request, ports of member cores are idle, and the discrepancy and
// voter-error flags name the corrupted core / undecidable group.
module tb_hfc_oml;
  import tetrisc_pkg::*;
  int checks = 0, failures = 0;

  nmr_matrix_t matrix;
  mem_req_t [3:0] core_req, port_req;
  logic [3:0] disc, verr;

  hfc_oml dut (.matrix, .core_req, .port_req, .disc, .voter_err(verr));

  logic clk = 0;
  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string what, logic [127:0] got, logic [127:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got %h exp %h", what, got, exp); end
  endtask

  nmr_matrix_t modes[5] = '{MATRIX_PERF, MATRIX_DMR, MATRIX_DDMR, MATRIX_TMR, MATRIX_QMR};

  initial begin
    mem_req_t grp_req [4];
    int bad, m, n;
    for (int i = 0; i < 5000; i++) begin
      matrix = modes[i % 5];
      for (int g = 0; g < 4; g++) begin
        grp_req[g] = mem_req_t'({$urandom, $urandom, $urandom});
      end
      for (int c = 0; c < 4; c++) core_req[c] = grp_req[master_of(matrix, c)];
      bad = -1;
      if ($urandom_range(0, 1)) begin
        bad = $urandom_range(0, 3);
        core_req[bad].wdata ^= 32'h1 << $urandom_range(0, 31);
      end
      #1;
      for (int g = 0; g < 4; g++) begin
        n = $countones(matrix[g]);
        if (n == 0) chk("idle port", 128'(port_req[g]), 0);
        else if (n == 1 || bad < 0 || !matrix[g][bad])
          chk("port", 128'(port_req[g]), 128'(n == 1 ? core_req[g] : grp_req[g]));
        else if (n >= 3) chk("corrected port", 128'(port_req[g]), 128'(grp_req[g]));
        else chk("dmr passes master", 128'(port_req[g]), 128'(core_req[g]));
      end
      if (bad >= 0) begin
        m = master_of(matrix, bad);
        case ($countones(matrix[m]))
          1: begin chk("no disc single", 128'(disc), 0); chk("no verr single", 128'(verr), 0); end
          2: begin chk("dmr disc", 128'(disc), 0); chk("dmr verr", 128'(verr), 128'(1 << m)); end
          default: begin chk("disc", 128'(disc), 128'(1 << bad)); chk("verr", 128'(verr), 0); end
        endcase
      end else begin
        chk("no disc", 128'(disc), 0); chk("no verr", 128'(verr), 0);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
