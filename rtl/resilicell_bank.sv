// resilicell_bank: the complete state register of one core, built from
// ResiliCells.
//
// Every flip-flop of a core is replaced by a ResiliCell; this module holds
// WIDTH of them (the RI5CY core has 3041 flip-flops) and shares the control
// of the whole core among them: one master select, one programming strobe
// and one redundant-mode switch, so the complete processor state is copied
// and swapped at once. d is the core's next state, q the state its logic
// sees. master_d / master_q carry the next and current state of every master
// core. HARDEN_MASK selects the cells built as vIII (the TETRISC description recommends
// hardening every cell whose SIFR is above 0; which flip-flops those are
// depends on the core netlist, so the default hardens none). err is the OR
// of the vIII upset flags. Timing as in resilicell: the copy takes one cycle.
module resilicell_bank #(
  parameter int unsigned     WIDTH       = 3041,
  parameter int unsigned     NUM_MASTERS = 4,
  parameter bit              DAISY       = 1'b0,
  parameter logic [WIDTH-1:0] HARDEN_MASK = '0,
  localparam int unsigned    SEL_W       = (NUM_MASTERS > 1) ? $clog2(NUM_MASTERS) : 1
) (
  input  logic                                clk,
  input  logic                                rst_n,
  input  logic [WIDTH-1:0]                    d,
  input  logic [NUM_MASTERS-1:0][WIDTH-1:0]   master_d,
  input  logic [NUM_MASTERS-1:0][WIDTH-1:0]   master_q,
  input  logic [SEL_W-1:0]                    src_sel,
  input  logic                                prog,
  input  logic                                red,
  output logic [WIDTH-1:0]                    q,
  output logic                                err
);

  logic [WIDTH-1:0] cell_err;

  for (genvar i = 0; i < WIDTH; i++) begin : g_cell
    logic [NUM_MASTERS-1:0] md, mq;
    for (genvar m = 0; m < NUM_MASTERS; m++) begin : g_m
      assign md[m] = master_d[m][i];
      assign mq[m] = master_q[m][i];
    end
    resilicell #(
      .NUM_MASTERS(NUM_MASTERS),
      .DAISY      (DAISY),
      .HARDEN     (HARDEN_MASK[i])
    ) u_cell (
      .clk, .rst_n,
      .d       (d[i]),
      .master_d(md),
      .master_q(mq),
      .src_sel,
      .prog,
      .red,
      .q       (q[i]),
      .err     (cell_err[i])
    );
  end

  assign err = |cell_err;

endmodule
