// hfc_iml: Input Multiplexing Logic of the HiRel Framework Controller.
//
// Supplies identical inputs to all cores of an NMR group: every core receives
// the bus response and the interrupt of the port of its group's master
// (the row of the membership matrix that holds the core). In performance
// mode every core is its own master and gets its own port. Purely
// combinational.
module hfc_iml
  import tetrisc_pkg::*;
(
  input  nmr_matrix_t                 matrix,
  input  mem_rsp_t    [NUM_CORES-1:0] port_rsp,
  input  logic        [NUM_CORES-1:0] port_irq,
  output mem_rsp_t    [NUM_CORES-1:0] core_rsp,
  output logic        [NUM_CORES-1:0] core_irq
);

  always_comb begin
    for (int unsigned c = 0; c < NUM_CORES; c++) begin
      core_rsp[c] = port_rsp[master_of(matrix, c)];
      core_irq[c] = port_irq[master_of(matrix, c)];
    end
  end

endmodule
