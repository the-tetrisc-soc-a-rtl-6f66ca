// hfc_oml: Output Multiplexing Logic of the HiRel Framework Controller.
//
// Gathers the primary outputs (bus requests) of the four cores and routes
// them to the four interconnect ports. Port g carries the output of the
// group led by core g: one voter per group compares the requests of all its
// members (row g of the membership matrix) and forwards the voted request.
// A core that is a member of another core's group has no group of its own,
// so its port stays idle. disc collects, per core, the discrepancies of the
// voter of the group it belongs to; voter_err, per group, undecidable votes.
// Purely combinational.
module hfc_oml
  import tetrisc_pkg::*;
(
  input  nmr_matrix_t                 matrix,
  input  mem_req_t    [NUM_CORES-1:0] core_req,
  output mem_req_t    [NUM_CORES-1:0] port_req,
  output logic        [NUM_CORES-1:0] disc,
  output logic        [NUM_CORES-1:0] voter_err
);

  localparam int unsigned RW = $bits(mem_req_t);

  logic [NUM_CORES-1:0][NUM_CORES-1:0] disc_g;
  logic [NUM_CORES-1:0][RW-1:0]        din;

  for (genvar c = 0; c < NUM_CORES; c++) begin : g_in
    assign din[c] = core_req[c];
  end

  for (genvar g = 0; g < NUM_CORES; g++) begin : g_grp
    logic [RW-1:0] voted;
    nmr_voter #(.W(RW), .N(NUM_CORES)) u_voter (
      .members  (matrix[g]),
      .master   (2'(g)),
      .din      (din),
      .dout     (voted),
      .disc     (disc_g[g]),
      .voter_err(voter_err[g])
    );
    assign port_req[g] = mem_req_t'(voted);
  end

  always_comb begin
    disc = '0;
    for (int unsigned g = 0; g < NUM_CORES; g++) disc |= disc_g[g];
  end

endmodule
