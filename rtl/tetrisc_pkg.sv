// tetrisc_pkg: types and constants shared by the TETRISC quad-core SoC.
//
// The SoC runs four cores either independently, clock-gated (destress) or
// grouped into lockstep NMR subsystems. A configuration is described by a
// 4x4 binary membership matrix: row g lists the cores voting in the group
// whose master is core g. A valid matrix puts every core in exactly one
// group, and a core that is the member of another core's group has an empty
// row of its own. Together with a clock-gate mask this forms the HFC mode.
//
// The core bus is a simple request/grant/rvalid protocol: a request is
// granted in the cycle it is made (gnt), and its response (rvalid, rdata,
// err) arrives one cycle after the grant. The TETRISC description does not give the
// bus; this protocol and the 32-bit word-only access are this design's own.
package tetrisc_pkg;

  localparam int unsigned NUM_CORES = 4;
  localparam int unsigned ADDR_W    = 32;
  localparam int unsigned DATA_W    = 32;

  // one request of a core (or of a voted NMR group) towards the interconnect
  typedef struct packed {
    logic              req;
    logic              we;
    logic [ADDR_W-1:0] addr;   // byte address, word aligned
    logic [DATA_W-1:0] wdata;
  } mem_req_t;

  // response of the interconnect towards a core
  typedef struct packed {
    logic              gnt;
    logic              rvalid;
    logic              err;    // uncorrectable memory error or bad address
    logic [DATA_W-1:0] rdata;
  } mem_rsp_t;

  // membership matrix [group/master][core]
  typedef logic [NUM_CORES-1:0][NUM_CORES-1:0] nmr_matrix_t;

  // HFC operating mode: clock-gate mask and NMR grouping
  typedef struct packed {
    logic [NUM_CORES-1:0] cg;
    nmr_matrix_t          matrix;
  } hfc_mode_t;

  // action register: measures taken on voting discrepancies / voter errors
  typedef struct packed {
    logic resync;     // re-copy the master state into a disagreeing member
    logic clk_off;    // drop a disagreeing member from its group and gate it
    logic irq_voter;  // interrupt on an uncorrectable vote (tie)
    logic irq_disc;   // interrupt on any discrepancy
  } hfc_action_t;

  localparam nmr_matrix_t MATRIX_PERF = 16'b1000_0100_0010_0001; // 4 independent
  localparam nmr_matrix_t MATRIX_DMR  = 16'b1000_0100_0000_0011; // {0,1}, 2, 3
  localparam nmr_matrix_t MATRIX_DDMR = 16'b0000_1100_0000_0011; // {0,1}, {2,3}
  localparam nmr_matrix_t MATRIX_TMR  = 16'b1000_0000_0000_0111; // {0,1,2}, 3
  localparam nmr_matrix_t MATRIX_QMR  = 16'b0000_0000_0000_1111; // {0,1,2,3}

  // number of cores in a group (row of the matrix)
  function automatic int unsigned group_size(logic [NUM_CORES-1:0] row);
    int unsigned n;
    n = 0;
    for (int unsigned c = 0; c < NUM_CORES; c++) n += {31'b0, row[c]};
    return n;
  endfunction

  // master (group index) of core c in matrix m
  function automatic logic [1:0] master_of(nmr_matrix_t m, int unsigned c);
    logic [1:0] g;
    g = 2'(c);
    for (int unsigned i = 0; i < NUM_CORES; i++)
      if (m[i][c]) g = 2'(i);
    return g;
  endfunction

  // a matrix is valid if every core is in exactly one group, every master is
  // a member of its own group and only cores below num_masters lead a group
  // of more than one core
  function automatic logic matrix_valid(nmr_matrix_t m, int unsigned num_masters);
    logic ok;
    int unsigned n;
    ok = 1'b1;
    for (int unsigned c = 0; c < NUM_CORES; c++) begin
      n = 0;
      for (int unsigned g = 0; g < NUM_CORES; g++) n += {31'b0, m[g][c]};
      if (n != 1) ok = 1'b0;
    end
    for (int unsigned g = 0; g < NUM_CORES; g++) begin
      if (m[g] != '0 && !m[g][g]) ok = 1'b0;
      if (group_size(m[g]) > 1 && g >= num_masters) ok = 1'b0;
    end
    return ok;
  endfunction

endpackage
