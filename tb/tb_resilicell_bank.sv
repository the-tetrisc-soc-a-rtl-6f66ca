// tb_resilicell_bank: four 64-bit ResiliCell banks play the state registers
// of four toy cores, each with its own next-state function (a per-core
// LFSR-like update). Core 1 is programmed from core 0 and switched into
// redundant mode: from the first redundant cycle on its state must equal
// core 0's state every cycle (lockstep, both now fed the same input). When
// it leaves redundant mode it must continue exactly from the state it had
// before the switch. A reduced bank (vI, two masters) is checked the same
// way with core 1 as master of core 3.
module tb_resilicell_bank;
  localparam int W = 64;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [3:0][W-1:0] d, q;
  logic [3:0][1:0]   sel;
  logic [3:0]        prog, red, err;

  // next-state function of a toy core: depends on its state and its input
  function automatic logic [W-1:0] nxt(logic [W-1:0] s, logic [W-1:0] in);
    return {s[W-2:0], s[W-1] ^ s[W-3] ^ s[0]} + in;
  endfunction

  logic [3:0][W-1:0] inp;   // per-core "input" (the IML would make these equal)

  for (genvar c = 0; c < 4; c++) begin : g_c
    if (c == 3) begin : g_vi
      resilicell_bank #(.WIDTH(W), .NUM_MASTERS(2)) u_bank (
        .clk, .rst_n, .d(d[c]), .master_d(d[1:0]), .master_q(q[1:0]),
        .src_sel(sel[c][0]), .prog(prog[c]), .red(red[c]), .q(q[c]), .err(err[c]));
    end else begin : g_v0
      resilicell_bank #(.WIDTH(W), .NUM_MASTERS(4)) u_bank (
        .clk, .rst_n, .d(d[c]), .master_d(d), .master_q(q),
        .src_sel(sel[c]), .prog(prog[c]), .red(red[c]), .q(q[c]), .err(err[c]));
    end
  end

  always_comb for (int c = 0; c < 4; c++) d[c] = nxt(q[c], inp[c]);

  task automatic chk(string what, logic [W-1:0] got, logic [W-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h at %0t", what, got, exp, $time);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // run core `slave` in lockstep with `master` for `len` cycles and back
  task automatic lockstep(int slave, int master, int len);
    logic [W-1:0] saved, expect_own;
    @(negedge clk);
    saved = q[slave];
    sel[slave] = 2'(master); prog[slave] = 1'b1;       // programming cycle
    inp[slave] = 64'(slave * 17 + 1);
    expect_own = nxt(saved, inp[slave]);                // the slave keeps running
    @(negedge clk);
    chk("slave runs during programming", q[slave], expect_own);
    saved = q[slave];
    prog[slave] = 1'b0; red[slave] = 1'b1;
    inp[slave] = inp[master];
    #1 chk("state copied at switch", q[slave], q[master]);
    for (int k = 0; k < len; k++) begin
      @(negedge clk);
      inp[master] = W'({$urandom, $urandom}); inp[slave] = inp[master];
      #1 chk("lockstep", q[slave], q[master]);
    end
    red[slave] = 1'b0;
    inp[slave] = 64'(slave * 17 + 1);
    #1 chk("own state restored", q[slave], saved);
    @(negedge clk);
    chk("resumes own task", q[slave], nxt(saved, inp[slave]));
  endtask

  initial begin
    sel = '0; prog = '0; red = '0;
    for (int c = 0; c < 4; c++) inp[c] = 64'(c * 17 + 1);
    #12 rst_n = 1'b1;
    repeat (20) @(posedge clk);
    lockstep(1, 0, 50);
    repeat (5) @(posedge clk);
    lockstep(2, 1, 30);
    lockstep(3, 1, 30);     // reduced-master bank
    lockstep(0, 3, 10);     // any core may mirror core 3 in v0
    checks++;
    if (err != '0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
