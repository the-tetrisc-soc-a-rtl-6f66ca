// mem_xbar: memory interface giving all four cores equal access to the whole
// address space.
//
// Four initiator ports (one per core, or per NMR group after output voting)
// reach NUM_BANKS memory banks and one peripheral port. Each target has its
// own round-robin arbiter, so different cores can use different banks in the
// same cycle and no core can starve another. Address map (byte addresses):
//   0 .. NUM_BANKS*WORDS*4-1   memory, bank = addr / (WORDS*4), contiguous
//   0x1xxx_xxxx                peripheral port (HFC, event unit)
//   anything else              answered by the crossbar itself with err=1
// Timing: a request is granted in the cycle it is made if its target grants
// it and the arbiter picks it; rvalid/rdata/err return one cycle after the
// grant, routed by the initiator index registered at grant time. Targets
// must answer exactly one cycle after their grant.
// The TETRISC description states only that the memory interface offers equal access
// to all cores over the entire address space; map and arbitration are this
// design's own.
module mem_xbar
  import tetrisc_pkg::*;
#(
  parameter int unsigned NUM_BANKS = 4,
  parameter int unsigned WORDS     = 8192
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  mem_req_t [NUM_CORES-1:0]    port_req,
  output mem_rsp_t [NUM_CORES-1:0]    port_rsp,
  output mem_req_t [NUM_BANKS-1:0]    bank_req,
  input  mem_rsp_t [NUM_BANKS-1:0]    bank_rsp,
  output mem_req_t                    per_req,
  input  mem_rsp_t                    per_rsp
);

  localparam int unsigned NT     = NUM_BANKS + 1;       // targets, last = peripherals
  localparam int unsigned BANK_B = $clog2(WORDS) + 2;   // byte address bits per bank
  localparam int unsigned MEM_SZ = NUM_BANKS * WORDS * 4;
  localparam int unsigned TB     = $clog2(NT);
  localparam int unsigned MB     = $clog2(NUM_CORES);

  logic [NUM_CORES-1:0][TB-1:0]    tgt;
  logic [NUM_CORES-1:0]            bad;
  logic [NT-1:0][NUM_CORES-1:0]    want;
  logic [NT-1:0][MB-1:0]           win;
  logic [NT-1:0]                   any;
  logic [NT-1:0][MB-1:0]           rr_q;
  logic [NT-1:0]                   tgt_gnt;
  mem_req_t [NT-1:0]               tgt_req;
  mem_rsp_t [NT-1:0]               tgt_rsp;
  logic [NT-1:0]                   vld_q;
  logic [NT-1:0][MB-1:0]           who_q;
  logic [NUM_CORES-1:0]            bad_q;

  // address decode
  always_comb begin
    for (int unsigned m = 0; m < NUM_CORES; m++) begin
      bad[m] = 1'b0;
      tgt[m] = TB'(NUM_BANKS);
      if (port_req[m].addr < MEM_SZ)
        tgt[m] = TB'(port_req[m].addr >> BANK_B);
      else if (port_req[m].addr[31:28] != 4'h1)
        bad[m] = 1'b1;
    end
    for (int unsigned t = 0; t < NT; t++)
      for (int unsigned m = 0; m < NUM_CORES; m++)
        want[t][m] = port_req[m].req && !bad[m] && (tgt[m] == TB'(t));
  end

  // round-robin arbitration per target, starting at rr_q
  always_comb begin
    for (int unsigned t = 0; t < NT; t++) begin
      any[t] = |want[t];
      win[t] = rr_q[t];
      for (int unsigned k = NUM_CORES; k > 0; k--) begin
        if (want[t][MB'(rr_q[t] + MB'(k - 1))]) win[t] = MB'(rr_q[t] + MB'(k - 1));
      end
      tgt_req[t]     = port_req[win[t]];
      tgt_req[t].req = any[t];
    end
  end

  for (genvar b = 0; b < NUM_BANKS; b++) begin : g_bank
    assign bank_req[b] = tgt_req[b];
    assign tgt_rsp[b]  = bank_rsp[b];
  end
  assign per_req           = tgt_req[NUM_BANKS];
  assign tgt_rsp[NUM_BANKS] = per_rsp;

  always_comb begin
    for (int unsigned t = 0; t < NT; t++) tgt_gnt[t] = any[t] && tgt_rsp[t].gnt;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rr_q  <= '0;
      vld_q <= '0;
      who_q <= '0;
      bad_q <= '0;
    end else begin
      for (int unsigned t = 0; t < NT; t++) begin
        vld_q[t] <= tgt_gnt[t];
        if (tgt_gnt[t]) begin
          who_q[t] <= win[t];
          rr_q[t]  <= win[t] + 1'b1;
        end
      end
      for (int unsigned m = 0; m < NUM_CORES; m++) bad_q[m] <= port_req[m].req && bad[m];
    end
  end

  always_comb begin
    for (int unsigned m = 0; m < NUM_CORES; m++) begin
      port_rsp[m]        = '0;
      port_rsp[m].gnt    = port_req[m].req && bad[m];
      port_rsp[m].rvalid = bad_q[m];
      port_rsp[m].err    = bad_q[m];
      for (int unsigned t = 0; t < NT; t++) begin
        if (tgt_gnt[t] && win[t] == MB'(m)) port_rsp[m].gnt = 1'b1;
        if (vld_q[t] && who_q[t] == MB'(m)) begin
          port_rsp[m].rvalid = 1'b1;
          port_rsp[m].err    = tgt_rsp[t].err;
          port_rsp[m].rdata  = tgt_rsp[t].rdata;
        end
      end
    end
  end

endmodule
