// tb_tetrisc_top: end-to-end test of the SoC at its default size (four
// cores with 3041-flip-flop ResiliCell state registers, four 8192x40 banks).
// Four behavioural cores (tb_core_model) run a write/read-back/update loop
// in shared bank 0 and, through core 0, program the HFC and the event unit
// over the bus. The test walks through performance, DMR, dual DMR, TMR,
// QMR, destress and sensor-defined TMR modes, injects core faults (one
// corrupted next-state bit) and memory upsets, and checks:
//   * lockstep: every group member's state equals its master's state in
//     every cycle (apart from the cycles right after an injected fault);
//   * no state is lost: at the end each core's memory region holds exactly
//     the value stream its loop produces when run without interruption;
//   * clock-gated cores keep their state; faults are voted out and counted,
//     re-synchronised or dropped according to the action register; memory
//     upsets are corrected; interrupts reach the cores.
// Each mechanism is counted and a failure is counted for one that never
// happened.
module tb_tetrisc_top;
  import tetrisc_pkg::*;
  localparam int unsigned SW = 3041;
  localparam logic [31:0] HFC = 32'h1000_0000, EU = 32'h1000_1000;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic     [3:0][SW-1:0] core_d, core_q, model_d, inj;
  logic     [3:0]         clk_en, cell_err, core_irq, aging_en;
  mem_req_t [3:0]         core_req;
  mem_rsp_t [3:0]         core_rsp;
  logic     [2:0]         alarm;
  logic     [3:0][15:0]   aging;
  logic     [5:0]         ext_ev;
  logic     [3:0]         ecc_c, ecc_u;
  logic                   cmd_valid, cmd_we;
  logic     [31:0]        cmd_addr, cmd_wdata;

  tetrisc_top dut (
    .clk, .rst_n, .test_en(1'b0),
    .core_d, .core_q, .core_clk_en(clk_en), .core_cell_err(cell_err),
    .core_req, .core_rsp, .core_irq,
    .sensor_alarm(alarm), .aging_count(aging), .aging_en, .ext_events(ext_ev),
    .ecc_corrected(ecc_c), .ecc_uncorrectable(ecc_u)
  );

  for (genvar c = 0; c < 4; c++) begin : g_core
    tb_core_model #(.STATE_W(SW)) u_core (
      .q(core_q[c]), .d(model_d[c]), .hart_id(2'(c)), .req(core_req[c]), .rsp(core_rsp[c]),
      .irq(core_irq[c]), .cmd_valid, .cmd_we, .cmd_addr, .cmd_wdata);
    assign core_d[c] = model_d[c] ^ inj[c];
  end

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // ------------------------------------------------------------- monitors
  int n_mode[string];
  int n_lock = 0, n_prog = 0, n_blocked = 0, n_disc = 0, n_verr = 0, n_resync = 0, n_drop = 0;
  int n_gated = 0, n_sensor = 0, n_ecc = 0, n_contention = 0, n_irq = 0, n_ecc_inj = 0;
  int quiet = 0;                 // cycles left without lockstep checks after a fault
  logic [3:0][SW-1:0] prev_q;
  logic [3:0]         prev_en;

  function automatic string mode_name(hfc_mode_t m);
    if (m.matrix == MATRIX_PERF) return (m.cg != 0) ? "destress" : "performance";
    if (m.matrix == MATRIX_DMR)  return "DMR";
    if (m.matrix == MATRIX_DDMR) return "D-DMR";
    if (m.matrix == MATRIX_TMR)  return "TMR";
    if (m.matrix == MATRIX_QMR)  return "QMR";
    return "other";
  endfunction

  always @(negedge clk) if (rst_n) begin
    hfc_mode_t act;
    act = dut.u_hfc.active;
    n_mode[mode_name(act)]++;
    if (|dut.rc_prog) n_prog++;
    if (dut.u_hfc.u_seq.state_q == 1'b1 && dut.u_hfc.u_seq.join_blocked) n_blocked++;
    if (|dut.u_hfc.disc) n_disc++;
    if (|dut.u_hfc.verr_g) n_verr++;
    if (|dut.u_hfc.resync_req && |dut.rc_prog) n_resync++;
    if (|dut.u_hfc.drop) n_drop++;
    if (dut.u_hfc.sensor_active) n_sensor++;
    if (|ecc_c) n_ecc++;
    if (|core_irq) n_irq++;
    if ($countones({core_req[0].req, core_req[1].req, core_req[2].req, core_req[3].req}) > 1 &&
        act.matrix == MATRIX_PERF) n_contention++;
    if (quiet > 0) quiet--;
    else for (int c = 0; c < 4; c++) begin
      int m;
      m = int'(master_of(act.matrix, c));
      if (m != c && dut.rc_red[c] && !dut.u_hfc.u_seq.busy) begin
        n_lock++;
        chk($sformatf("lockstep core %0d with %0d", c, m), core_q[c] == core_q[m]);
      end
    end
    for (int c = 0; c < 4; c++) begin
      if (!prev_en[c] && !clk_en[c]) begin
        n_gated++;
        chk("gated core keeps its state", core_q[c] == prev_q[c]);
      end
    end
    prev_q = core_q;
    prev_en = clk_en;
  end

  // memory upsets: flip a bit of the word core 0 is about to read back
  always @(negedge clk) if (rst_n) begin
    if (core_q[0][3:1] == 3'd2 && $urandom_range(0, 40) == 0 && core_req[0].req &&
        core_rsp[0].gnt) begin
      int w;
      w = int'(core_req[0].addr[14:2]);
      dut.g_bank[0].u_bank.u_sram.mem[w] = dut.g_bank[0].u_bank.u_sram.mem[w] ^ (40'(1) << $urandom_range(0, 38));
      n_ecc_inj++;
    end
  end

  // ------------------------------------------------------------ commands
  task automatic cmd(logic we, logic [31:0] a, logic [31:0] wd, output logic [31:0] rd);
    @(negedge clk);
    cmd_valid = 1; cmd_we = we; cmd_addr = a; cmd_wdata = wd;
    while (!core_q[0][54]) @(negedge clk);
    rd = core_q[0][86:55];
    cmd_valid = 0;
    while (core_q[0][54]) @(negedge clk);
  endtask

  task automatic wr(logic [31:0] a, logic [31:0] wd);
    logic [31:0] rd;
    cmd(1, a, wd, rd);
  endtask

  task automatic wait_mode(logic [19:0] m);
    int n;
    n = 0;
    while (dut.u_hfc.active != m && n < 200) begin @(negedge clk); n++; end
    chk($sformatf("mode %h reached", m), dut.u_hfc.active == m);
  endtask

  task automatic set_mode(logic [19:0] m, int run);
    wr(HFC + 'h00, 32'(m));
    wait_mode(m);
    repeat (run) @(negedge clk);
  endtask

  // corrupt one next-state bit (ptr[0]) of core c for one cycle
  task automatic inject(int c, int q);
    @(negedge clk);
    inj[c][6] = 1'b1;
    quiet = q;
    @(negedge clk);
    inj[c] = '0;
  endtask

  function automatic logic [31:0] stream(int c, int p);
    logic [31:0] a;
    a = 32'h1234_5678 ^ (32'(c) * 32'h9E37_79B9);
    for (int i = 0; i < p; i++) a = {a[30:0], a[31]} + 32'h9E37_79B9;
    return a;
  endfunction

  initial begin
    logic [31:0] v;
    logic [3:0][15:0] ptr_before;
    foreach (inj[c]) inj[c] = '0;
    alarm = 0; ext_ev = 0; cmd_valid = 0; cmd_we = 0; cmd_addr = 0; cmd_wdata = 0;
    foreach (prev_q[c]) prev_q[c] = '0;
    prev_en = '1;
    for (int c = 0; c < 4; c++) aging[c] = 16'(100 + c);
    for (int b = 0; b < 4; b++)
      for (int w = 0; w < 8192; w++) begin
        case (b)
          0: dut.g_bank[0].u_bank.u_sram.mem[w] = '0;
          1: dut.g_bank[1].u_bank.u_sram.mem[w] = '0;
          2: dut.g_bank[2].u_bank.u_sram.mem[w] = '0;
          default: dut.g_bank[3].u_bank.u_sram.mem[w] = '0;
        endcase
      end
    #22 rst_n = 1;
    repeat (200) @(negedge clk);
    // interrupts: every core listens to the HFC interrupt (event 0)
    for (int c = 0; c < 4; c++) wr(EU + 32'(4 * c), 32'h1);
    wr(HFC + 'h04, 32'b1001);                       // irq on discrepancy + resync
    set_mode({4'b0, MATRIX_DMR}, 300);
    set_mode({4'b0, MATRIX_DDMR}, 300);
    set_mode({4'b0, MATRIX_TMR}, 100);
    inject(2, 12);
    repeat (200) @(negedge clk);
    cmd(0, HFC + 'h28, 0, v);
    chk("error counter of core 2", v >= 1);
    chk("HFC interrupt reached the cores", n_irq > 0);
    wr(HFC + 'h14, 32'hFFFF_FFFF);
    for (int c = 0; c < 4; c++) wr(EU + 'h10 + 32'(4 * c), 32'hFF);
    set_mode({4'b0, MATRIX_QMR}, 100);
    wr(HFC + 'h04, 32'b0100);                       // drop a disagreeing member
    inject(3, 12);
    wait_mode({4'b1000, 16'b1000_0000_0000_0111});
    chk("core 3 clock off", clk_en[3] == 1'b0);
    repeat (100) @(negedge clk);
    wr(HFC + 'h04, 32'b0000);
    set_mode({4'b0, MATRIX_DMR}, 100);
    inject(1, 100000);                              // DMR only detects: core 1 stays diverged
    repeat (100) @(negedge clk);
    cmd(0, HFC + 'h40, 0, v);
    chk("voter error counted", v >= 1);
    set_mode({4'b1100, MATRIX_PERF}, 0);            // destress: cores 2 and 3 gated
    quiet = 0;
    repeat (200) @(negedge clk);
    set_mode({4'b0000, MATRIX_PERF}, 200);
    wr(HFC + 'h0C, 32'(MATRIX_TMR));
    wr(HFC + 'h08, 32'b001);
    alarm = 3'b001;
    wait_mode({4'b0, MATRIX_TMR});
    repeat (200) @(negedge clk);
    alarm = 3'b000;
    wait_mode({4'b0, MATRIX_PERF});
    repeat (300) @(negedge clk);
    // final state: every core's region must hold its uninterrupted stream
    for (int c = 0; c < 4; c++) begin
      int n, lo;
      logic ok;
      n = int'(core_q[c][21:6]);
      lo = (n > 255) ? n - 255 : 0;     // word n may already hold iteration n
      ok = 1;
      for (int p = lo; p < n; p++)
        if (dut.g_bank[0].u_bank.u_sram.mem[c * 1024 + (p % 256)][31:0] != stream(c, p)) begin
          if (ok) $display("core %0d: word %0d holds %h, expected %h", c, p,
                           dut.g_bank[0].u_bank.u_sram.mem[c * 1024 + (p % 256)][31:0], stream(c, p));
          ok = 0;
        end
      chk($sformatf("core %0d value stream intact (%0d iterations)", c, n), ok && n > 50);
    end
    begin
      automatic string names[6] = '{"performance", "DMR", "D-DMR", "TMR", "QMR", "destress"};
      foreach (names[i]) begin
        $display("mode %-12s %0d cycles", names[i], n_mode[names[i]]);
        chk({"mode used: ", names[i]}, n_mode[names[i]] > 0);
      end
    end
    $display("lockstep checks %0d, programming cycles %0d, switch postponed %0d", n_lock, n_prog, n_blocked);
    $display("discrepancies %0d, voter errors %0d, resyncs %0d, drops %0d", n_disc, n_verr, n_resync, n_drop);
    $display("gated %0d, sensor %0d, ecc injected %0d corrected %0d, contention %0d, irq %0d",
             n_gated, n_sensor, n_ecc_inj, n_ecc, n_contention, n_irq);
    chk("lockstep checked", n_lock > 100);
    chk("ResiliCells programmed", n_prog > 0);
    chk("switch postponed for a bus grant", n_blocked > 0);
    chk("discrepancy voted out", n_disc > 0);
    chk("voter error", n_verr > 0);
    chk("resync", n_resync > 0);
    chk("member dropped", n_drop > 0);
    chk("clock gating", n_gated > 0);
    chk("sensor-defined mode", n_sensor > 0);
    chk("memory error corrected", n_ecc > 0);
    chk("bus contention", n_contention > 0);
    chk("no uncorrectable memory error", ecc_u == 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
