// resilicell: one ResiliCell, the replacement for every flip-flop of a core.
//
// The cell extends the core's original flip-flop (F) with a slave flip-flop
// (S) and a master multiplexer. In performance mode (red=0) the core runs on
// F and S is idle. While the controller programs the cell (prog=1), S copies
// the state of the selected master core without disturbing F, so the core
// keeps running its own task. Switching to redundant mode (red=1) reroutes
// the core's logic from F to S: the core now carries the master's state and,
// fed the master's inputs, runs in lockstep with it. F holds the core's own
// state meanwhile, and leaving redundant mode (red=0) resumes it as it was.
//
// Variants of the cell:
//   NUM_MASTERS  number of cores whose state can be copied in. The basic cell
//                (v0) accepts every core (4); the reduced cell (vI) keeps
//                fewer multiplexer inputs and hence fewer master cores.
//   DAISY        vII: S copies the master's current flip-flop output instead
//                of its next state, so the core runs one cycle behind the
//                master (delayed lockstep).
//   HARDEN       vIII: a second copy of F is kept and compared with F; err
//                flags an upset of F, also while F is parked in redundant
//                mode. In silicon the copy is clocked through a delay element;
//                here it shares the clock, which is this design's own choice.
//
// Timing: with DAISY=0 a copy made in cycle t loads the master's next state,
// so from cycle t+1 on S equals the master's F. prog has priority over red,
// so programming while redundant re-synchronises a member. Asynchronous
// active-low reset clears F, S and the copy to RESET_VAL.
module resilicell #(
  parameter int unsigned NUM_MASTERS = 4,
  parameter bit          DAISY       = 1'b0,
  parameter bit          HARDEN      = 1'b0,
  parameter bit          RESET_VAL   = 1'b0,
  localparam int unsigned SEL_W      = (NUM_MASTERS > 1) ? $clog2(NUM_MASTERS) : 1
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   d,          // next state from the own core's logic
  input  logic [NUM_MASTERS-1:0] master_d,   // next state of the same cell in each master core
  input  logic [NUM_MASTERS-1:0] master_q,   // current state of the same cell in each master core
  input  logic [SEL_W-1:0]       src_sel,    // master to copy from
  input  logic                   prog,       // copy the master's state into S
  input  logic                   red,        // redundant mode: the core runs on S
  output logic                   q,          // state seen by the core's logic
  output logic                   err         // vIII: upset of F detected
);

  logic f_q, s_q;
  logic src;

  assign src = DAISY ? master_q[src_sel] : master_d[src_sel];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) f_q <= RESET_VAL;
    else if (!red) f_q <= d;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    s_q <= RESET_VAL;
    else if (prog) s_q <= src;
    else if (red)  s_q <= d;
  end

  if (HARDEN) begin : g_harden
    logic h_q;
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) h_q <= RESET_VAL;
      else if (!red) h_q <= d;
    end
    assign err = f_q ^ h_q;
  end else begin : g_plain
    assign err = 1'b0;
  end

  assign q = red ? s_q : f_q;

endmodule
