// tb_resilicell: self-checking test of the ResiliCell in its basic (v0),
// daisy-chained (vII) and hardened (vIII) forms. Random next-state values
// drive the own and the master inputs while prog / red / src_sel walk
// through programming, redundant operation, re-synchronisation and return.
// A reference model of F and S, written from the cell's description,
// predicts q every cycle. The vIII copy is checked by upsetting F through a
// hierarchical write and expecting err, also while F is parked.
module tb_resilicell;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic       d, prog, red;
  logic [3:0] md, mq;
  logic [1:0] sel;
  logic       q0, q2, q3, e0, e2, e3;

  resilicell #(.NUM_MASTERS(4))                u_v0 (.clk, .rst_n, .d, .master_d(md), .master_q(mq),
                                                     .src_sel(sel), .prog, .red, .q(q0), .err(e0));
  resilicell #(.NUM_MASTERS(4), .DAISY(1'b1))  u_v2 (.clk, .rst_n, .d, .master_d(md), .master_q(mq),
                                                     .src_sel(sel), .prog, .red, .q(q2), .err(e2));
  resilicell #(.NUM_MASTERS(4), .HARDEN(1'b1)) u_v3 (.clk, .rst_n, .d, .master_d(md), .master_q(mq),
                                                     .src_sel(sel), .prog, .red, .q(q3), .err(e3));

  // reference model
  logic f_m, s_m, s2_m;

  task automatic chk(string what, logic got, logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %b expected %b at %0t", what, got, exp, $time);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int n_prog = 0, n_red = 0, n_back = 0;

  initial begin
    d = 0; prog = 0; red = 0; md = 0; mq = 0; sel = 0;
    f_m = 0; s_m = 0; s2_m = 0;
    #12 rst_n = 1'b1;
    for (int cyc = 0; cyc < 4000; cyc++) begin
      @(negedge clk);
      // q seen during this cycle
      chk("v0 q", q0, red ? s_m : f_m);
      chk("v2 q", q2, red ? s2_m : f_m);
      chk("v3 q", q3, red ? s_m : f_m);
      chk("v3 err", e3, 1'b0);
      chk("v0 err", e0, 1'b0);
      // update model for the coming edge with the inputs of this cycle
      d   = 1'($urandom);
      md  = 4'($urandom);
      mq  = 4'($urandom);
      if (cyc % 40 == 0)  sel = 2'($urandom);
      // phases: 0-9 perf, 10-11 prog, 12-29 red (with a resync at 20), 30-39 perf
      prog = ((cyc % 40) inside {[10:11]}) || (cyc % 40 == 20);
      red  = (cyc % 40) inside {[12:29]};
      if (prog) n_prog++;
      if (red)  n_red++;
      if ((cyc % 40) == 30) n_back++;
      #1;
      chk("v0 q comb", q0, red ? s_m : f_m);
      // model the coming edge
      if (!red) f_m = d;
      if (prog) begin s_m = md[sel]; s2_m = mq[sel]; end
      else if (red) begin s_m = d; s2_m = d; end
    end
    // vIII: upset F while the core runs on S
    @(negedge clk);
    prog = 1'b0; red = 1'b1;
    @(negedge clk);
    u_v3.f_q = ~u_v3.f_q;
    #1 chk("v3 err on parked upset", e3, 1'b1);
    u_v0.f_q = ~u_v0.f_q;
    #1 chk("v0 has no upset detection", e0, 1'b0);
    if (n_prog == 0 || n_red == 0 || n_back == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
