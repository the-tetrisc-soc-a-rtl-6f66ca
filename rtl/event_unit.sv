// event_unit: event/interrupt unit extended so that each of the four cores
// receives its interrupts separately.
//
// Every event input is latched into a pending register of every core; each
// core has its own mask, and irq[c] is high while core c has a pending event
// that its mask enables. A core acknowledges by writing ones to its pending
// register, which clears those bits (an event present in the same cycle
// sets its bit again). Register map, word offsets on the register bus:
//   0x00 + 4*c  MASK[c]     read/write
//   0x10 + 4*c  PENDING[c]  read, write 1 to clear
// Bus timing as tetrisc_pkg: granted at once, read data one cycle later; an
// unknown offset answers with err. The TETRISC description states only that the unit
// was extended for four separately interrupted cores; the register layout
// is this design's own.
module event_unit
  import tetrisc_pkg::*;
#(
  parameter int unsigned NUM_EVENTS = 8
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  mem_req_t                     reg_req,
  output mem_rsp_t                     reg_rsp,
  input  logic [NUM_EVENTS-1:0]        events,
  output logic [NUM_CORES-1:0]         irq
);

  logic [NUM_CORES-1:0][NUM_EVENTS-1:0] mask_q, pend_q;
  logic [5:0]  off;
  logic        hit_mask, hit_pend;
  logic [1:0]  idx;
  logic        rvalid_q, err_q;
  logic [31:0] rdata_q;

  assign off      = reg_req.addr[7:2];
  assign idx      = off[1:0];
  assign hit_mask = (off[5:2] == 4'd0);
  assign hit_pend = (off[5:2] == 4'd1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mask_q   <= '0;
      pend_q   <= '0;
      rvalid_q <= 1'b0;
      err_q    <= 1'b0;
      rdata_q  <= '0;
    end else begin
      for (int unsigned c = 0; c < NUM_CORES; c++) begin
        if (reg_req.req && reg_req.we && hit_pend && idx == 2'(c))
          pend_q[c] <= (pend_q[c] & ~reg_req.wdata[NUM_EVENTS-1:0]) | events;
        else
          pend_q[c] <= pend_q[c] | events;
      end
      if (reg_req.req && reg_req.we && hit_mask) mask_q[idx] <= reg_req.wdata[NUM_EVENTS-1:0];
      rvalid_q <= reg_req.req;
      err_q    <= reg_req.req && !(hit_mask || hit_pend);
      rdata_q  <= '0;
      if (reg_req.req && !reg_req.we) begin
        if (hit_mask) rdata_q <= 32'(mask_q[idx]);
        if (hit_pend) rdata_q <= 32'(pend_q[idx]);
      end
    end
  end

  always_comb begin
    for (int unsigned c = 0; c < NUM_CORES; c++) irq[c] = |(pend_q[c] & mask_q[c]);
  end

  assign reg_rsp.gnt    = reg_req.req;
  assign reg_rsp.rvalid = rvalid_q;
  assign reg_rsp.err    = err_q;
  assign reg_rsp.rdata  = rdata_q;

endmodule
