// tmr_reg: register built from triple-modular-redundant flip-flops, used to
// harden the state of components outside the cores against single event
// upsets. Three copies are written together; q is their bitwise majority.
// Each cycle without a write, every copy reloads the voted value, so a
// single upset is corrected in the next cycle instead of accumulating. err
// flags that the copies disagree. Asynchronous active-low reset to RESET.
// The TETRISC description names TMR flip-flops for the peripherals; the self-correcting
// feedback is this design's choice.
module tmr_reg #(
  parameter int unsigned    W     = 8,
  parameter logic [W-1:0]   RESET = '0
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic [W-1:0] d,
  output logic [W-1:0] q,
  output logic         err
);

  logic [2:0][W-1:0] r;

  for (genvar k = 0; k < 3; k++) begin : g_copy
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) r[k] <= RESET;
      else        r[k] <= en ? d : q;
    end
  end

  assign q   = (r[0] & r[1]) | (r[0] & r[2]) | (r[1] & r[2]);
  assign err = (r[0] != r[1]) || (r[0] != r[2]);

endmodule
