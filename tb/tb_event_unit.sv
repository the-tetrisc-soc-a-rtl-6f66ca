// tb_event_unit: random event pulses and register accesses against a
// reference model of the four per-core pending and mask registers. Checks
// every core's irq each cycle, read data one cycle after the request,
// write-1-to-clear of pending bits, and err for unknown offsets.
module tb_event_unit;
  import tetrisc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  mem_req_t req;
  mem_rsp_t rsp;
  logic [7:0] ev;
  logic [3:0] irq;
  logic [3:0][7:0] m_mask, m_pend;

  event_unit #(.NUM_EVENTS(8)) dut (.clk, .rst_n, .reg_req(req), .reg_rsp(rsp), .events(ev), .irq);

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got %h exp %h at %0t", what, got, exp, $time); end
  endtask

  initial begin
    logic        pend_rd;
    logic [31:0] exp_rd;
    logic        exp_err, was_req;
    int          n_irq = 0;
    req = '0; ev = 0; m_mask = 0; m_pend = 0; was_req = 0; exp_rd = 0; exp_err = 0;
    #12 rst_n = 1;
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      for (int c = 0; c < 4; c++) chk("irq", 32'(irq[c]), 32'(|(m_pend[c] & m_mask[c])));
      if (|irq) n_irq++;
      if (was_req) begin
        chk("rvalid", 32'(rsp.rvalid), 1);
        chk("err", 32'(rsp.err), 32'(exp_err));
        if (!exp_err) chk("rdata", rsp.rdata, exp_rd);
      end
      // new stimulus
      ev = ($urandom_range(0, 3) == 0) ? 8'(1 << $urandom_range(0, 7)) : 8'h0;
      req = '0;
      was_req = 0;
      if ($urandom_range(0, 1)) begin
        int off;
        off = $urandom_range(0, 8);
        req = '{req: 1'b1, we: 1'($urandom), addr: 32'h1000_1000 + 32'(off * 4), wdata: $urandom};
        was_req = 1;
        exp_err = (off == 8);
        exp_rd = 0;
        if (!req.we && off < 4) exp_rd = 32'(m_mask[off]);
        if (!req.we && off >= 4 && off < 8) exp_rd = 32'(m_pend[off - 4]);
        if (req.we && off < 4) m_mask[off] = req.wdata[7:0];
      end
      for (int c = 0; c < 4; c++)
        if (req.req && req.we && req.addr[7:2] == 6'(4 + c)) m_pend[c] = (m_pend[c] & ~req.wdata[7:0]) | ev;
        else m_pend[c] = m_pend[c] | ev;
    end
    chk("irq seen", 32'(n_irq > 0), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
