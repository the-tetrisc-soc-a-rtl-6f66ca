// tb_mem_xbar: four initiators issue random reads and writes to all banks,
// the peripheral window and unmapped addresses, while behavioural targets
// grant randomly and answer one cycle after a grant. Each initiator owns its
// own words (spread over every bank, so initiators collide on banks) and
// keeps a reference copy; every read must return its last write, every
// response must come one cycle after its grant, unmapped addresses must
// answer with err, and no request may wait longer than a fairness bound.
module tb_mem_xbar;
  import tetrisc_pkg::*;
  localparam int NB = 4, WORDS = 64;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  mem_req_t [3:0]    port_req;
  mem_rsp_t [3:0]    port_rsp;
  mem_req_t [NB-1:0] bank_req;
  mem_rsp_t [NB-1:0] bank_rsp;
  mem_req_t          per_req;
  mem_rsp_t          per_rsp;

  mem_xbar #(.NUM_BANKS(NB), .WORDS(WORDS)) dut (.clk, .rst_n, .port_req, .port_rsp,
    .bank_req, .bank_rsp, .per_req, .per_rsp);

  // behavioural targets: index NB is the peripheral window (16 words)
  logic [31:0] tmem [NB+1][WORDS];
  logic [NB:0] tgnt;
  logic [NB:0] vld_q;
  logic [NB:0][31:0] rd_q;
  mem_req_t [NB:0] treq;
  always_comb begin
    for (int t = 0; t < NB; t++) treq[t] = bank_req[t];
    treq[NB] = per_req;
    for (int t = 0; t < NB; t++) bank_rsp[t] = '{gnt: tgnt[t], rvalid: vld_q[t], err: 1'b0, rdata: rd_q[t]};
    per_rsp = '{gnt: tgnt[NB], rvalid: vld_q[NB], err: 1'b0, rdata: rd_q[NB]};
  end
  always @(negedge clk) for (int t = 0; t <= NB; t++) tgnt[t] = ($urandom_range(0, 3) != 0);
  always @(posedge clk) begin
    for (int t = 0; t <= NB; t++) begin
      vld_q[t] <= treq[t].req && tgnt[t];
      rd_q[t]  <= 'x;
      if (treq[t].req && tgnt[t]) begin
        if (treq[t].we) tmem[t][treq[t].addr[7:2]] <= treq[t].wdata;
        else            rd_q[t] <= tmem[t][treq[t].addr[7:2]];
      end
    end
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int max_wait = 0, n_contention = 0, n_err = 0, n_per = 0;
  always @(posedge clk) begin
    for (int t = 0; t < NB; t++) begin
      int n = 0;
      for (int m = 0; m < 4; m++)
        if (port_req[m].req && port_req[m].addr < NB * WORDS * 4 && (port_req[m].addr / (WORDS * 4)) == t) n++;
      if (n > 1) n_contention++;
    end
  end

  for (genvar m = 0; m < 4; m++) begin : g_init
    logic [31:0] refm [NB+1][16];
    bit          wr [NB+1][16];
    initial begin
      int t, w, wait_c;
      logic we, bad;
      logic [31:0] a, wd;
      port_req[m] = '0;
      @(posedge rst_n);
      for (int i = 0; i < 1500; i++) begin
        @(negedge clk);
        t = $urandom_range(0, NB); w = $urandom_range(0, 15);
        bad = ($urandom_range(0, 19) == 0);
        we = 1'($urandom) || !wr[t][w];
        wd = $urandom;
        a = (t == NB) ? 32'h1000_0000 + 32'((m * 16 + w) * 4) : 32'(t * WORDS * 4 + (m * 16 + w) * 4);
        if (bad) a = 32'h2000_0000 + 32'(w * 4);
        port_req[m] = '{req: 1'b1, we: we, addr: a, wdata: wd};
        #1;
        wait_c = 0;
        while (!port_rsp[m].gnt) begin
          @(negedge clk); #1; wait_c++;
        end
        if (wait_c > max_wait) max_wait = wait_c;
        @(negedge clk);
        port_req[m].req = 1'b0;
        checks++;
        if (!port_rsp[m].rvalid) begin failures++; $display("FAIL %0d no rvalid", m); end
        if (bad) begin
          n_err++;
          checks++;
          if (!port_rsp[m].err) begin failures++; $display("FAIL %0d no err", m); end
        end else if (we) begin
          refm[t][w] = wd; wr[t][w] = 1;
          if (t == NB) n_per++;
        end else begin
          checks++;
          if (port_rsp[m].rdata !== refm[t][w] || port_rsp[m].err) begin
            failures++; $display("FAIL %0d read t%0d w%0d got %h exp %h", m, t, w, port_rsp[m].rdata, refm[t][w]);
          end
        end
        if ($urandom_range(0, 3) == 0) @(negedge clk);
      end
      done[m] = 1'b1;
    end
  end

  logic [3:0] done = '0;
  initial begin
    #12 rst_n = 1;
    wait (done == 4'hF);
    checks++;
    if (max_wait > 40) begin failures++; $display("FAIL fairness: waited %0d", max_wait); end
    checks++;
    if (n_contention == 0 || n_err == 0 || n_per == 0) begin failures++; $display("FAIL coverage"); end
    $display("max_wait=%0d contention=%0d err=%0d", max_wait, n_contention, n_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
