// hfc: HiRel Framework Controller, the control unit that runs the four cores
// in performance, destress (clock-gated) or NMR lockstep modes.
//
// Parts:
//   * mode registers. MODE (user-defined NMR) and SENSOR_MODE hold an NMR
//     membership matrix plus a clock-gate mask (tetrisc_pkg). While an
//     enabled sensor alarm is present (sensor-defined NMR), SENSOR_MODE
//     is the wanted mode, otherwise MODE. Whenever the wanted mode differs
//     from the one last applied, rc_sequencer reconfigures the cores: it
//     programs the ResiliCells of every new group member with its master's
//     state and then switches them over. A matrix that is not valid is
//     refused and flagged. Cores inside a group of two or more are never
//     clock-gated.
//   * OML (hfc_oml): per-group programmable voters on the cores' bus
//     requests; IML (hfc_iml): the group master's responses and interrupt
//     go to every member.
//   * error counters, one per core, incremented in every cycle in which the
//     voter finds that core disagreeing, and a counter of voter errors
//     (undecidable votes), all saturating.
//   * ACTION register, the measures taken on a discrepancy of a member core:
//     interrupt (irq_disc / irq_voter), re-synchronise the member from its
//     master (resync, only if the master itself agreed with the vote), or
//     drop the member from its group and switch its clock off (clk_off,
//     which rewrites the mode register in use).
//   * four aging-monitor registers sampling each core's aging sensor while
//     the core is clocked; the sensor is disabled with the core's clock.
// Register map (word offsets on the register bus, tetrisc_pkg bus timing):
//   0x00 MODE          rw  [15:0] matrix, [19:16] clock-gate mask
//   0x04 ACTION        rw  [0] irq_disc [1] irq_voter [2] clk_off [3] resync
//   0x08 SENSOR_EN     rw  [NUM_SENSORS-1:0] alarms that trigger SENSOR_MODE
//   0x0C SENSOR_MODE   rw  like MODE
//   0x10 STATUS        ro  [0] reconfiguration busy [1] sensor mode wanted
//   0x14 ERR           w1c [3:0] core discrepancy [4] voter error
//                          [5] invalid mode written [9:6] vIII cell upset
//                          [10] TMR register upset
//   0x18 ACTIVE        ro  mode now in effect
//   0x20+4*c ERRCNT[c] r, write clears
//   0x30+4*c AGING[c]  ro
//   0x40 VERRCNT       r, write clears
// irq is high while an enabled error flag in ERR is set.
// The TETRISC description gives the parts (voter, IML, OML, mode and action registers,
// four error counters, four aging monitors, user- and sensor-defined NMR);
// the register layout, the counting rule and the action semantics are this
// design's own. Control registers are TMR flip-flops, as for all logic
// outside the cores.
module hfc
  import tetrisc_pkg::*;
#(
  parameter int unsigned NUM_MASTERS = 4,
  parameter int unsigned PROG_CYCLES = 1,
  parameter int unsigned CNT_W       = 16,
  parameter int unsigned AGING_W     = 16,
  parameter int unsigned NUM_SENSORS = 3
) (
  input  logic                                clk,
  input  logic                                rst_n,
  input  mem_req_t                            reg_req,
  output mem_rsp_t                            reg_rsp,
  input  mem_req_t    [NUM_CORES-1:0]         core_req,
  output mem_req_t    [NUM_CORES-1:0]         port_req,
  input  mem_rsp_t    [NUM_CORES-1:0]         port_rsp,
  input  logic        [NUM_CORES-1:0]         port_irq,
  output mem_rsp_t    [NUM_CORES-1:0]         core_rsp,
  output logic        [NUM_CORES-1:0]         core_irq,
  output logic        [NUM_CORES-1:0][1:0]    rc_src_sel,
  output logic        [NUM_CORES-1:0]         rc_prog,
  output logic        [NUM_CORES-1:0]         rc_red,
  output logic        [NUM_CORES-1:0]         core_clk_en,
  input  logic        [NUM_CORES-1:0]         cell_err,
  input  logic        [NUM_SENSORS-1:0]       sensor_alarm,
  input  logic        [NUM_CORES-1:0][AGING_W-1:0] aging_count,
  output logic        [NUM_CORES-1:0]         aging_en,
  output logic                                irq
);

  localparam hfc_mode_t RESET_MODE = '{cg: '0, matrix: MATRIX_PERF};
  localparam int unsigned MW = $bits(hfc_mode_t);

  // ---------------------------------------------------------------- registers
  hfc_mode_t            user_mode, sensor_mode, user_d, sensor_d, wanted, applied_q, active;
  hfc_action_t          action;
  logic [NUM_SENSORS-1:0] sensor_en;
  logic                 user_we, sensor_we;
  logic [3:0]           tmr_errs;
  logic                 seq_tmr_err, busy, start;
  logic [NUM_CORES-1:0] port_gnt;

  logic [NUM_SENSORS-1:0] alarm_s1_q, alarm_s2_q;
  logic                 sensor_active;

  logic [NUM_CORES-1:0] disc, verr_g, resync_req, drop;
  logic [NUM_CORES-1:0] disc_st_q, cell_st_q;
  logic                 verr_st_q, bad_st_q, tmr_st_q;
  logic [NUM_CORES-1:0][CNT_W-1:0]   errcnt_q;
  logic [CNT_W-1:0]                  verrcnt_q;
  logic [NUM_CORES-1:0][AGING_W-1:0] aging_q;

  logic [5:0]  off;
  logic        wr;
  logic        rvalid_q, err_q;
  logic [31:0] rdata_q;

  assign off = reg_req.addr[7:2];
  assign wr  = reg_req.req && reg_req.we;

  // mode writes from the bus, or a core dropped by the clk_off action
  always_comb begin
    hfc_mode_t cur;
    cur       = sensor_active ? sensor_mode : user_mode;
    user_d    = user_mode;
    sensor_d  = sensor_mode;
    user_we   = 1'b0;
    sensor_we = 1'b0;
    if (wr && off == 6'd0 && matrix_valid(reg_req.wdata[15:0], NUM_MASTERS)) begin
      user_d  = hfc_mode_t'(reg_req.wdata[MW-1:0]);
      user_we = 1'b1;
    end
    if (wr && off == 6'd3 && matrix_valid(reg_req.wdata[15:0], NUM_MASTERS)) begin
      sensor_d  = hfc_mode_t'(reg_req.wdata[MW-1:0]);
      sensor_we = 1'b1;
    end
    if (|drop) begin
      for (int unsigned c = 0; c < NUM_CORES; c++)
        if (drop[c]) begin
          for (int unsigned g = 0; g < NUM_CORES; g++) cur.matrix[g][c] = 1'b0;
          cur.matrix[c][c] = 1'b1;
          cur.cg[c]        = 1'b1;
        end
      if (sensor_active) begin
        sensor_d  = cur;
        sensor_we = 1'b1;
      end else begin
        user_d  = cur;
        user_we = 1'b1;
      end
    end
  end

  tmr_reg #(.W(MW), .RESET(RESET_MODE)) u_user_mode (
    .clk, .rst_n, .en(user_we), .d(user_d), .q(user_mode), .err(tmr_errs[0]));
  tmr_reg #(.W(MW), .RESET(RESET_MODE)) u_sensor_mode (
    .clk, .rst_n, .en(sensor_we), .d(sensor_d), .q(sensor_mode), .err(tmr_errs[1]));
  tmr_reg #(.W($bits(hfc_action_t))) u_action (
    .clk, .rst_n, .en(wr && off == 6'd1), .d(hfc_action_t'(reg_req.wdata[3:0])),
    .q(action), .err(tmr_errs[2]));
  tmr_reg #(.W(NUM_SENSORS)) u_sensor_en (
    .clk, .rst_n, .en(wr && off == 6'd2), .d(reg_req.wdata[NUM_SENSORS-1:0]),
    .q(sensor_en), .err(tmr_errs[3]));

  // ------------------------------------------------------- mode selection
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      alarm_s1_q <= '0;
      alarm_s2_q <= '0;
    end else begin
      alarm_s1_q <= sensor_alarm;
      alarm_s2_q <= alarm_s1_q;
    end
  end
  assign sensor_active = |(alarm_s2_q & sensor_en);

  always_comb begin
    wanted = sensor_active ? sensor_mode : user_mode;
    // cores in a group of two or more keep their clock
    for (int unsigned g = 0; g < NUM_CORES; g++)
      if (group_size(wanted.matrix[g]) > 1) wanted.cg &= ~wanted.matrix[g];
  end

  assign start = !busy && (wanted != applied_q);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     applied_q <= RESET_MODE;
    else if (start) applied_q <= wanted;
  end

  rc_sequencer #(.PROG_CYCLES(PROG_CYCLES)) u_seq (
    .clk, .rst_n,
    .start,
    .target     (wanted),
    .resync     (resync_req),
    .port_gnt   (port_gnt),
    .active,
    .busy,
    .src_sel    (rc_src_sel),
    .prog       (rc_prog),
    .red        (rc_red),
    .core_clk_en,
    .tmr_err    (seq_tmr_err)
  );

  always_comb begin
    for (int unsigned c = 0; c < NUM_CORES; c++) port_gnt[c] = port_rsp[c].gnt;
  end

  // ------------------------------------------------------------ OML / IML
  hfc_oml u_oml (
    .matrix   (active.matrix),
    .core_req,
    .port_req,
    .disc,
    .voter_err(verr_g)
  );

  hfc_iml u_iml (
    .matrix  (active.matrix),
    .port_rsp,
    .port_irq,
    .core_rsp,
    .core_irq
  );

  // ------------------------------------------------------------- actions
  always_comb begin
    for (int unsigned c = 0; c < NUM_CORES; c++) begin
      logic [1:0] m;
      m       = master_of(active.matrix, c);
      drop[c] = action.clk_off && disc[c] && rc_red[c] && !busy;
      // resync only from a master that agreed with the vote
      resync_req[c] = 1'b0;
      if (action.resync && !action.clk_off && disc[c] && rc_red[c] && !disc[m])
        resync_req[c] = 1'b1;
    end
  end

  // ------------------------------------------- counters, status, aging
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      errcnt_q    <= '0;
      verrcnt_q   <= '0;
      disc_st_q   <= '0;
      cell_st_q   <= '0;
      verr_st_q   <= 1'b0;
      bad_st_q    <= 1'b0;
      tmr_st_q    <= 1'b0;
      aging_q     <= '0;
    end else begin
      for (int unsigned c = 0; c < NUM_CORES; c++) begin
        if (wr && off == 6'(8 + c))
          errcnt_q[c] <= '0;
        else if (disc[c] && errcnt_q[c] != '1)
          errcnt_q[c] <= errcnt_q[c] + 1'b1;
        if (aging_en[c]) aging_q[c] <= aging_count[c];
      end
      if (wr && off == 6'd16)                verrcnt_q <= '0;
      else if (|verr_g && verrcnt_q != '1)   verrcnt_q <= verrcnt_q + 1'b1;

      if (wr && off == 6'd5) begin
        disc_st_q <= disc_st_q & ~reg_req.wdata[3:0];
        verr_st_q <= verr_st_q & ~reg_req.wdata[4];
        bad_st_q  <= bad_st_q  & ~reg_req.wdata[5];
        cell_st_q <= cell_st_q & ~reg_req.wdata[9:6];
        tmr_st_q  <= tmr_st_q  & ~reg_req.wdata[10];
      end else begin
        disc_st_q <= disc_st_q | disc;
        verr_st_q <= verr_st_q | (|verr_g);
        cell_st_q <= cell_st_q | cell_err;
        tmr_st_q  <= tmr_st_q  | (|tmr_errs) | seq_tmr_err;
        if (wr && (off == 6'd0 || off == 6'd3) && !matrix_valid(reg_req.wdata[15:0], NUM_MASTERS))
          bad_st_q <= 1'b1;
      end
    end
  end

  assign aging_en = core_clk_en;
  assign irq = (action.irq_disc && |disc_st_q) || (action.irq_voter && verr_st_q);

  // ------------------------------------------------------------ bus reads
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rvalid_q <= 1'b0;
      err_q    <= 1'b0;
      rdata_q  <= '0;
    end else begin
      rvalid_q <= reg_req.req;
      err_q    <= 1'b0;
      rdata_q  <= '0;
      if (reg_req.req) begin
        unique case (off) inside
          6'd0:  rdata_q <= 32'(user_mode);
          6'd1:  rdata_q <= 32'(action);
          6'd2:  rdata_q <= 32'(sensor_en);
          6'd3:  rdata_q <= 32'(sensor_mode);
          6'd4:  rdata_q <= {30'b0, sensor_active, busy};
          6'd5:  rdata_q <= {21'b0, tmr_st_q, cell_st_q, bad_st_q, verr_st_q, disc_st_q};
          6'd6:  rdata_q <= 32'(active);
          [6'd8:6'd11]:  rdata_q <= 32'(errcnt_q[off[1:0]]);
          [6'd12:6'd15]: rdata_q <= 32'(aging_q[off[1:0]]);
          6'd16: rdata_q <= 32'(verrcnt_q);
          default: err_q <= 1'b1;
        endcase
      end
    end
  end

  assign reg_rsp.gnt    = reg_req.req;
  assign reg_rsp.rvalid = rvalid_q;
  assign reg_rsp.err    = err_q;
  assign reg_rsp.rdata  = rdata_q;

endmodule
