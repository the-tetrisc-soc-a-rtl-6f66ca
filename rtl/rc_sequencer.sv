// rc_sequencer: switches the cores between operating modes by steering their
// ResiliCells.
//
// A reconfiguration is requested with start and the target mode (membership
// matrix and clock-gate mask). Every core that becomes a member of another
// core's group is first programmed: for PROG_CYCLES cycles its slave
// flip-flops copy the state of its new master while it keeps running its own
// task (state PROG). At the end of the last programming cycle the sequencer
// makes the target mode active and sets the redundant-mode switch of each
// member core in the same clock edge, so the first cycle in the new mode
// already has identical state in all cores of a group. Cores that leave a
// group only drop their redundant-mode switch: they resume from their
// original flip-flops, which held their state. A change that programs no
// core takes effect at the clock edge that ends the start cycle; otherwise
// the mode is active PROG_CYCLES cycles later. The switch is postponed
// (programming continues) while the own bus port of a core that joins a
// group or is being clock-gated is granted (port_gnt), since that response
// would arrive after the core has changed state or stopped. busy is high during programming; start is accepted only while busy
// is low.
//
// resync requests, per core, a one-cycle re-copy of the master state into a
// member of a group (used after a voting discrepancy); it is honoured only
// while idle and only for cores in redundant mode.
//
// Core clocks: core_clk_en follows the clock-gate mask of the active mode,
// but a core being programmed and its master are always clocked.
// The active mode is kept in TMR flip-flops. The TETRISC description gives the
// programme-then-switch principle; the state machine and the one-cycle
// default length of the programming phase are this design's own.
module rc_sequencer
  import tetrisc_pkg::*;
#(
  parameter int unsigned PROG_CYCLES = 1
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         start,
  input  hfc_mode_t                    target,
  input  logic      [NUM_CORES-1:0]    resync,
  input  logic      [NUM_CORES-1:0]    port_gnt,
  output hfc_mode_t                    active,
  output logic                         busy,
  output logic      [NUM_CORES-1:0][1:0] src_sel,
  output logic      [NUM_CORES-1:0]    prog,
  output logic      [NUM_CORES-1:0]    red,
  output logic      [NUM_CORES-1:0]    core_clk_en,
  output logic                         tmr_err
);

  typedef enum logic {S_IDLE, S_PROG} state_e;

  localparam hfc_mode_t RESET_MODE = '{cg: '0, matrix: MATRIX_PERF};
  localparam int unsigned CNT_W = (PROG_CYCLES > 1) ? $clog2(PROG_CYCLES) : 1;

  state_e                 state_q;
  logic [CNT_W-1:0]       cnt_q;
  hfc_mode_t              target_q, tgt;
  logic [NUM_CORES-1:0]   red_q;
  logic [NUM_CORES-1:0]   new_red, new_prog;
  logic [NUM_CORES-1:0][1:0] new_src, act_src;
  logic                   apply, join_blocked;
  logic [NUM_CORES-1:0]   resync_ok;

  // the mode being applied: the request itself while idle, then its copy
  assign tgt = (state_q == S_IDLE) ? target : target_q;

  always_comb begin
    for (int unsigned c = 0; c < NUM_CORES; c++) begin
      new_src[c] = master_of(tgt.matrix, c);
      act_src[c] = master_of(active.matrix, c);
      new_red[c] = (new_src[c] != 2'(c));
      // a core needs a copy if it joins a group or changes its master
      new_prog[c] = new_red[c] && !(red_q[c] && act_src[c] == new_src[c]);
    end
  end

  // a core may not join a group or lose its clock in a cycle in which its own
  // port is granted: the response would arrive after the switch and be lost
  assign join_blocked = |((new_red & ~red_q | tgt.cg & ~active.cg) & port_gnt);
  assign apply = (state_q == S_IDLE && start && new_prog == '0 && !join_blocked) ||
                 (state_q == S_PROG && cnt_q == CNT_W'(PROG_CYCLES - 1) && !join_blocked);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q  <= S_IDLE;
      cnt_q    <= '0;
      target_q <= RESET_MODE;
      red_q    <= '0;
    end else begin
      case (state_q)
        S_IDLE: if (start && (new_prog != '0 || join_blocked)) begin
          target_q <= target;
          state_q  <= S_PROG;
          cnt_q    <= '0;
        end
        S_PROG: begin
          if (cnt_q != CNT_W'(PROG_CYCLES - 1)) cnt_q <= cnt_q + 1'b1;
          if (apply) state_q <= S_IDLE;
        end
        default: state_q <= S_IDLE;
      endcase
      if (apply) red_q <= new_red;
    end
  end

  tmr_reg #(.W($bits(hfc_mode_t)), .RESET(RESET_MODE)) u_active (
    .clk, .rst_n,
    .en (apply),
    .d  (tgt),
    .q  (active),
    .err(tmr_err)
  );

  assign resync_ok = (state_q == S_IDLE) ? (resync & red_q) : '0;

  always_comb begin
    for (int unsigned c = 0; c < NUM_CORES; c++) begin
      if (state_q == S_PROG) begin
        prog[c]    = new_prog[c];
        src_sel[c] = new_src[c];
      end else begin
        prog[c]    = resync_ok[c];
        src_sel[c] = act_src[c];
      end
    end
    core_clk_en = ~active.cg;
    for (int unsigned c = 0; c < NUM_CORES; c++)
      if (prog[c]) begin
        core_clk_en[c]          = 1'b1;
        core_clk_en[src_sel[c]] = 1'b1;
      end
  end

  assign red  = red_q;
  assign busy = (state_q != S_IDLE);

endmodule
