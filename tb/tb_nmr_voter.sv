// tb_nmr_voter: checks the programmable voter against an independent
// reference: for random member masks and random inputs (built as a common
// value with a few bit flips per core, so that every split occurs), each
// output bit is the strict majority of the members, a tie yields the
// master's bit and a voter error, and a member is flagged when it differs
// from a majority-decided bit. Directed cases cover DMR detection, TMR
// correction and QMR correction of two different errors.
module tb_nmr_voter;
  localparam int W = 16, N = 4;
  int checks = 0, failures = 0;

  logic [N-1:0]        members;
  logic [1:0]          master;
  logic [N-1:0][W-1:0] din;
  logic [W-1:0]        dout;
  logic [N-1:0]        disc;
  logic                verr;

  nmr_voter #(.W(W), .N(N)) dut (.members, .master, .din, .dout, .disc, .voter_err(verr));

  logic clk = 0;
  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic ref_check();
    logic [W-1:0] e_out, dec;
    logic [N-1:0] e_disc;
    logic         e_err;
    int n;
    n = $countones(members);
    e_err = 0; dec = '0;
    for (int b = 0; b < W; b++) begin
      int ones = 0;
      for (int c = 0; c < N; c++) if (members[c] && din[c][b]) ones++;
      if (n == 0) begin e_out[b] = 0; dec[b] = 1; end
      else if (ones * 2 > n) begin e_out[b] = 1; dec[b] = 1; end
      else if (ones * 2 < n) begin e_out[b] = 0; dec[b] = 1; end
      else begin e_out[b] = din[master][b]; e_err = 1; end
    end
    for (int c = 0; c < N; c++) e_disc[c] = members[c] && (((din[c] ^ e_out) & dec) != 0);
    checks++;
    if (dout !== e_out || disc !== e_disc || verr !== e_err) begin
      failures++;
      $display("FAIL m=%b din=%h out=%h/%h disc=%b/%b err=%b/%b", members, din, dout, e_out,
               disc, e_disc, verr, e_err);
    end
  endtask

  initial begin
    logic [W-1:0] base;
    int n_dmr = 0, n_tmr = 0, n_qmr = 0;
    // directed: TMR, core 2 wrong -> corrected, core 2 flagged
    members = 4'b0111; master = 0; base = 16'hBEEF;
    din = {16'h0, base ^ 16'h0010, base, base};
    #1 checks++;
    if (dout != base || disc != 4'b0100 || verr) begin failures++; $display("FAIL TMR directed"); end
    // QMR, two different errors -> corrected
    members = 4'b1111;
    din = {base ^ 16'h0001, base ^ 16'h8000, base, base};
    #1 checks++;
    if (dout != base || disc != 4'b1100 || verr) begin failures++; $display("FAIL QMR directed"); end
    // QMR, identical errors -> tie, detected
    din = {base ^ 16'h0001, base ^ 16'h0001, base, base};
    #1 checks++;
    if (!verr || dout != base) begin failures++; $display("FAIL QMR tie"); end
    // DMR mismatch -> detected only
    members = 4'b0011; din = {16'h0, 16'h0, base ^ 16'h4, base};
    #1 checks++;
    if (!verr || dout != base || disc != 0) begin failures++; $display("FAIL DMR directed"); end
    // random
    for (int i = 0; i < 20000; i++) begin
      members = 4'($urandom);
      master  = 2'($urandom);
      base    = 16'($urandom);
      for (int c = 0; c < N; c++) begin
        din[c] = base;
        if ($urandom_range(0, 2) == 0) din[c] ^= 16'(1 << $urandom_range(0, W - 1));
        if ($urandom_range(0, 9) == 0) din[c] = 16'($urandom);
      end
      case ($countones(members)) 2: n_dmr++; 3: n_tmr++; 4: n_qmr++; default: ; endcase
      #1 ref_check();
    end
    if (n_dmr == 0 || n_tmr == 0 || n_qmr == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
