// nmr_voter: binary-matrix programmable NMR majority voter for one group.
//
// members selects, by a bit per core, which cores take part in the vote;
// master names the group's leading core. Each output bit is the bitwise
// majority of the members' bits. Where the members are split evenly (any
// mismatch in a DMR pair, a 2:2 split in QMR) the bit cannot be decided: the
// master's bit is passed on and voter_err is raised. disc flags every member
// whose value differs from a bit that was decided by majority, which is the
// per-core error indication used by the error counters. One member simply
// passes through; an empty group outputs zero. Purely combinational.
//
// The TETRISC description gives the function (programmable majority voter, DMR single
// error detection, TMR single error correction, QMR double error correction
// if the errors are not identical); the tie rule is this design's own.
module nmr_voter #(
  parameter int unsigned W = 8,
  parameter int unsigned N = 4
) (
  input  logic [N-1:0]              members,
  input  logic [$clog2(N)-1:0]      master,
  input  logic [N-1:0][W-1:0]       din,
  output logic [W-1:0]              dout,
  output logic [N-1:0]              disc,
  output logic                      voter_err
);

  logic [W-1:0] decided;

  always_comb begin
    int unsigned n, ones;
    n = 0;
    for (int unsigned c = 0; c < N; c++) n += int'({31'b0, members[c]});
    dout    = '0;
    decided = '0;
    for (int unsigned b = 0; b < W; b++) begin
      ones = 0;
      for (int unsigned c = 0; c < N; c++) ones += int'({31'b0, members[c] & din[c][b]});
      if (n == 0 || 2 * ones < n) begin
        dout[b]    = 1'b0;
        decided[b] = 1'b1;
      end else if (2 * ones > n) begin
        dout[b]    = 1'b1;
        decided[b] = 1'b1;
      end else begin
        dout[b]    = din[master][b];
        decided[b] = 1'b0;
      end
    end
    voter_err = ~&decided;
    for (int unsigned c = 0; c < N; c++)
      disc[c] = members[c] & |((din[c] ^ dout) & decided);
  end

endmodule
