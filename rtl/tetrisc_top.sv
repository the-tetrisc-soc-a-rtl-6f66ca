// tetrisc_top: the TETRISC resilient quad-core SoC fabric.
//
// Four cores share one memory and can be run independently (performance),
// partly clock-gated (destress), or grouped into NMR lockstep subsystems
// (DMR, dual DMR, TMR, QMR) without losing any core's state. Every flip-flop
// of every core is a ResiliCell: the HiRel Framework Controller (HFC) copies
// a master core's state into the slave flip-flops of the cores joining its
// group and then switches those cores over to their slave flip-flops; they
// now carry the master's state, receive the master's inputs through the
// input multiplexing logic, and their bus requests are voted in the output
// multiplexing logic before reaching the crossbar. Leaving the group simply
// switches a core back to its original flip-flops, which held its own state.
//
// The processor cores themselves are outside this module: each core's
// combinational logic reads its state on core_q[c] and returns the next
// state on core_d[c]; its bus port is core_req[c] / core_rsp[c] and its
// interrupt core_irq[c]. The core's state register (STATE_W ResiliCells,
// 3041 for the RI5CY core) lives here, clocked by a per-core gated clock.
// core_clk_en[c] tells the core whether its clock runs.
//
// Memory: NUM_BANKS banks of WORDS 40-bit SRAM words, each protected by a
// Hsiao (39,32) code and scrubbed in the background, behind a round-robin
// crossbar with equal access for all cores (address map in mem_xbar). The
// HFC registers sit at 0x1000_0000, the per-core event/interrupt unit at
// 0x1000_1000. Event inputs of the event unit: [0] HFC interrupt,
// [1] uncorrectable memory error in any bank, [NUM_EVENTS-1:2] ext_events.
// Sensors (temperature, aging, SEU/solar particle event monitor) are outside;
// their alarms enter on sensor_alarm and the four aging sensors on
// aging_count / aging_en.
// Bus timing: see tetrisc_pkg. All logic outside the cores runs on clk;
// asynchronous active-low reset rst_n.
module tetrisc_top
  import tetrisc_pkg::*;
#(
  parameter int unsigned STATE_W        = 3041,
  parameter int unsigned NUM_MASTERS    = 4,
  parameter int unsigned PROG_CYCLES    = 1,
  parameter int unsigned NUM_BANKS      = 4,
  parameter int unsigned WORDS          = 8192,
  parameter int unsigned SCRUB_INTERVAL = 64,
  parameter int unsigned NUM_EVENTS     = 8,
  parameter int unsigned NUM_SENSORS    = 3,
  parameter int unsigned AGING_W        = 16
) (
  input  logic                                  clk,
  input  logic                                  rst_n,
  input  logic                                  test_en,
  // core state registers
  input  logic     [NUM_CORES-1:0][STATE_W-1:0] core_d,
  output logic     [NUM_CORES-1:0][STATE_W-1:0] core_q,
  output logic     [NUM_CORES-1:0]              core_clk_en,
  output logic     [NUM_CORES-1:0]              core_cell_err,
  // core bus ports and interrupts
  input  mem_req_t [NUM_CORES-1:0]              core_req,
  output mem_rsp_t [NUM_CORES-1:0]              core_rsp,
  output logic     [NUM_CORES-1:0]              core_irq,
  // sensors and events
  input  logic     [NUM_SENSORS-1:0]            sensor_alarm,
  input  logic     [NUM_CORES-1:0][AGING_W-1:0] aging_count,
  output logic     [NUM_CORES-1:0]              aging_en,
  input  logic     [NUM_EVENTS-3:0]             ext_events,
  // memory health
  output logic     [NUM_BANKS-1:0]              ecc_corrected,
  output logic     [NUM_BANKS-1:0]              ecc_uncorrectable
);

  mem_req_t [NUM_CORES-1:0] port_req;
  mem_rsp_t [NUM_CORES-1:0] port_rsp;
  mem_req_t [NUM_BANKS-1:0] bank_req;
  mem_rsp_t [NUM_BANKS-1:0] bank_rsp;
  mem_req_t                 per_req, hfc_req, eu_req;
  mem_rsp_t                 per_rsp, hfc_rsp, eu_rsp;
  logic                     per_sel_q;

  logic [NUM_CORES-1:0][1:0] rc_src_sel;
  logic [NUM_CORES-1:0]      rc_prog, rc_red, gclk, port_irq;
  logic                      hfc_irq;
  logic [NUM_EVENTS-1:0]     events;

  // ---------------------------------------------------- core state registers
  logic [NUM_MASTERS-1:0][STATE_W-1:0] master_d, master_q;
  for (genvar m = 0; m < NUM_MASTERS; m++) begin : g_master
    assign master_d[m] = core_d[m];
    assign master_q[m] = core_q[m];
  end

  for (genvar c = 0; c < NUM_CORES; c++) begin : g_core
    localparam int unsigned SEL_W = (NUM_MASTERS > 1) ? $clog2(NUM_MASTERS) : 1;
    clock_gate u_cg (
      .clk,
      .en     (core_clk_en[c]),
      .test_en,
      .gclk   (gclk[c])
    );
    resilicell_bank #(
      .WIDTH      (STATE_W),
      .NUM_MASTERS(NUM_MASTERS)
    ) u_state (
      .clk     (gclk[c]),
      .rst_n,
      .d       (core_d[c]),
      .master_d,
      .master_q,
      .src_sel (SEL_W'(rc_src_sel[c])),
      .prog    (rc_prog[c]),
      .red     (rc_red[c]),
      .q       (core_q[c]),
      .err     (core_cell_err[c])
    );
  end

  // ---------------------------------------------------------------- HFC
  hfc #(
    .NUM_MASTERS(NUM_MASTERS),
    .PROG_CYCLES(PROG_CYCLES),
    .AGING_W    (AGING_W),
    .NUM_SENSORS(NUM_SENSORS)
  ) u_hfc (
    .clk, .rst_n,
    .reg_req    (hfc_req),
    .reg_rsp    (hfc_rsp),
    .core_req,
    .port_req,
    .port_rsp,
    .port_irq,
    .core_rsp,
    .core_irq,
    .rc_src_sel,
    .rc_prog,
    .rc_red,
    .core_clk_en,
    .cell_err   (core_cell_err),
    .sensor_alarm,
    .aging_count,
    .aging_en,
    .irq        (hfc_irq)
  );

  // ------------------------------------------------------------ memory
  mem_xbar #(.NUM_BANKS(NUM_BANKS), .WORDS(WORDS)) u_xbar (
    .clk, .rst_n,
    .port_req,
    .port_rsp,
    .bank_req,
    .bank_rsp,
    .per_req,
    .per_rsp
  );

  for (genvar b = 0; b < NUM_BANKS; b++) begin : g_bank
    ecc_mem_bank #(.WORDS(WORDS), .SCRUB_INTERVAL(SCRUB_INTERVAL)) u_bank (
      .clk, .rst_n,
      .req          (bank_req[b]),
      .rsp          (bank_rsp[b]),
      .corrected    (ecc_corrected[b]),
      .uncorrectable(ecc_uncorrectable[b])
    );
  end

  // -------------------------------------------------------- peripherals
  always_comb begin
    hfc_req     = per_req;
    eu_req      = per_req;
    hfc_req.req = per_req.req && !per_req.addr[12];
    eu_req.req  = per_req.req &&  per_req.addr[12];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)           per_sel_q <= 1'b0;
    else if (per_req.req) per_sel_q <= per_req.addr[12];
  end

  always_comb begin
    per_rsp     = per_sel_q ? eu_rsp : hfc_rsp;
    per_rsp.gnt = per_req.addr[12] ? eu_rsp.gnt : hfc_rsp.gnt;
  end

  assign events = {ext_events, |ecc_uncorrectable, hfc_irq};

  event_unit #(.NUM_EVENTS(NUM_EVENTS)) u_eu (
    .clk, .rst_n,
    .reg_req(eu_req),
    .reg_rsp(eu_rsp),
    .events,
    .irq    (port_irq)
  );

endmodule
