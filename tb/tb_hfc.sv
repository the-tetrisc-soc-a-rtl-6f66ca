// tb_hfc: the HiRel Framework Controller on its own. A register-bus driver
// writes modes and actions; the four cores are played by the testbench,
// which drives identical requests from the members of a group and can
// corrupt one core. Checked: programming and switching of the ResiliCell
// controls for a user-defined DMR mode (one programming cycle, src = master),
// voting and idle member ports, input fan-out, refusal of an invalid
// matrix, TMR correction with error counting, interrupt and resync, a
// DMR voter error, the clk_off action degrading QMR to TMR with the dropped
// core gated, sensor-defined NMR entered and left with the alarm, and the
// aging registers freezing while a core's clock is off.
module tb_hfc;
  import tetrisc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  mem_req_t reg_req;
  mem_rsp_t reg_rsp;
  mem_req_t [3:0] core_req, port_req;
  mem_rsp_t [3:0] port_rsp, core_rsp;
  logic [3:0] port_irq, core_irq, prog, red, clk_en, cell_err, aging_en;
  logic [3:0][1:0] src;
  logic [2:0] alarm;
  logic [3:0][15:0] aging;
  logic irq;

  hfc dut (.clk, .rst_n, .reg_req, .reg_rsp, .core_req, .port_req, .port_rsp, .port_irq,
           .core_rsp, .core_irq, .rc_src_sel(src), .rc_prog(prog), .rc_red(red),
           .core_clk_en(clk_en), .cell_err, .sensor_alarm(alarm), .aging_count(aging),
           .aging_en, .irq);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got %h exp %h at %0t", what, got, exp, $time); end
  endtask

  task automatic wr(int off, logic [31:0] d);
    @(negedge clk);
    reg_req = '{req: 1'b1, we: 1'b1, addr: 32'h1000_0000 + 32'(off), wdata: d};
    @(negedge clk);
    reg_req.req = 1'b0;
  endtask

  task automatic rd(int off, output logic [31:0] d);
    @(negedge clk);
    reg_req = '{req: 1'b1, we: 1'b0, addr: 32'h1000_0000 + 32'(off), wdata: 0};
    @(negedge clk);
    reg_req.req = 1'b0;
    d = reg_rsp.rdata;
    chk("reg rvalid", 32'(reg_rsp.rvalid), 1);
  endtask

  task automatic wait_active(logic [19:0] m);
    logic [31:0] v;
    for (int i = 0; i < 20; i++) begin
      rd('h18, v);
      if (v[19:0] == m) return;
    end
    chk("mode became active", v, 32'(m));
  endtask

  // testbench cores: every core issues grp[its master]; corrupt[c] flips a data bit
  mem_req_t [3:0] grp;
  logic [3:0] corrupt;
  always_comb begin
    for (int c = 0; c < 4; c++) begin
      core_req[c] = grp[master_of(dut.active.matrix, c)];
      if (corrupt[c]) core_req[c].wdata ^= 32'h0000_0100;
    end
  end

  initial begin
    logic [31:0] v;
    int prog_cycles;
    reg_req = '0; corrupt = 0; alarm = 0; cell_err = 0; port_irq = 4'b0101;
    for (int c = 0; c < 4; c++) begin
      grp[c] = '{req: 1'b1, we: 1'b1, addr: 32'(c * 32'h100), wdata: 32'(32'hC0DE_0000 + c)};
      port_rsp[c] = '{gnt: 1'b0, rvalid: 1'b0, err: 1'b0, rdata: 32'(c + 1)};
      aging[c] = 16'(c * 100);
    end
    #12 rst_n = 1;
    repeat (2) @(negedge clk);
    // performance mode: straight through
    for (int c = 0; c < 4; c++) chk("perf port", 32'(port_req[c].addr), 32'(c * 32'h100));
    // user-defined DMR: cores 0,1
    fork
      wr('h00, 32'(MATRIX_DMR));
      begin
        prog_cycles = 0;
        repeat (6) begin
          @(posedge clk);
          if (prog[1]) begin prog_cycles++; chk("src of core 1", 32'(src[1]), 0); end
        end
      end
    join
    chk("one programming cycle", prog_cycles, 1);
    chk("core 1 redundant", 32'(red), 32'b0010);
    wait_active({4'b0, MATRIX_DMR});
    chk("member port idle", 32'(port_req[1].req), 0);
    chk("group port", 32'(port_req[0].addr), 0);
    chk("member gets master response", core_rsp[1].rdata, 1);
    chk("member gets master irq", 32'(core_irq[1]), 1);
    // invalid matrix refused
    wr('h00, 32'h0000_0003);   // group {0,1} but cores 2,3 in no group
    rd('h14, v); chk("bad mode flagged", 32'(v[5]), 1);
    rd('h18, v); chk("mode kept", v, 32'(MATRIX_DMR));
    wr('h14, 32'hFFFF_FFFF);
    // TMR with irq + resync actions, core 2 corrupted for one cycle
    wr('h04, 32'b1001);
    wr('h00, 32'(MATRIX_TMR));
    wait_active({4'b0, MATRIX_TMR});
    chk("tmr red", 32'(red), 32'b0110);
    @(negedge clk); corrupt = 4'b0100;
    #1 chk("resync copy of core 2", 32'(prog), 32'b0100);
    chk("corrected output", port_req[0].wdata, 32'hC0DE_0000);
    @(negedge clk); corrupt = 0;
    rd('h28, v); chk("error counter core 2", v, 1);
    rd('h14, v); chk("disc flag core 2", v[3:0], 4'b0100);
    chk("irq on discrepancy", 32'(irq), 1);
    wr('h28, 0); rd('h28, v); chk("counter cleared", v, 0);
    wr('h14, 32'hFFFF_FFFF);
    chk("irq cleared", 32'(irq), 0);
    // DMR voter error
    wr('h04, 32'b0010);
    wr('h00, 32'(MATRIX_DMR));
    wait_active({4'b0, MATRIX_DMR});
    @(negedge clk); corrupt = 4'b0010;
    #1 chk("dmr passes master", port_req[0].wdata, 32'hC0DE_0000);
    @(negedge clk); corrupt = 0;
    rd('h40, v); chk("voter error counted", v, 1);
    chk("irq on voter error", 32'(irq), 1);
    wr('h14, 32'hFFFF_FFFF);
    // QMR with clk_off: core 3 goes bad and is dropped and gated
    wr('h04, 32'b0100);
    wr('h00, 32'(MATRIX_QMR));
    wait_active({4'b0, MATRIX_QMR});
    @(negedge clk); corrupt = 4'b1000;
    wait_active({4'b1000, 16'b1000_0000_0000_0111});
    corrupt = 0;
    chk("core 3 clock off", 32'(clk_en), 32'b0111);
    chk("core 3 not aging", 32'(aging_en[3]), 0);
    aging[3] = 16'd999; aging[0] = 16'd7;
    repeat (2) @(negedge clk);
    rd('h3C, v); chk("aging frozen while gated", v, 300);
    rd('h30, v); chk("aging sampled", v, 7);
    // sensor-defined NMR: alarm 1 selects QMR... of the three healthy cores: TMR
    wr('h04, 32'b0000);
    wr('h00, 32'(MATRIX_PERF));
    wait_active({4'b0, MATRIX_PERF});
    wr('h0C, {12'b0, 4'b0000, MATRIX_DDMR});
    wr('h08, 32'b010);
    alarm = 3'b001;                       // not enabled: nothing happens
    repeat (6) @(negedge clk);
    rd('h18, v); chk("disabled alarm ignored", v, 32'(MATRIX_PERF));
    alarm = 3'b010;
    wait_active({4'b0, MATRIX_DDMR});
    rd('h10, v); chk("sensor mode flagged", v[1], 1);
    chk("ddmr red", 32'(red), 32'b1010);
    alarm = 3'b000;
    wait_active({4'b0, MATRIX_PERF});
    chk("back to perf", 32'(red), 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
