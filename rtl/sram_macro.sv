// sram_macro: one single-port synchronous SRAM block of the SoC memory,
// 8192 words of 40 bits (the chip carries four of them). One access per
// cycle: with ce high the word at addr is written (we=1) or read (we=0);
// read data appears on rdata after the clock edge and stays until the next
// read. The memory array is not reset. Written as an inferable array; in
// silicon this is a foundry SRAM macro.
module sram_macro #(
  parameter int unsigned WORDS = 8192,
  parameter int unsigned WIDTH = 40,
  localparam int unsigned AW   = $clog2(WORDS)
) (
  input  logic             clk,
  input  logic             ce,
  input  logic             we,
  input  logic [AW-1:0]    addr,
  input  logic [WIDTH-1:0] wdata,
  output logic [WIDTH-1:0] rdata
);

  logic [WIDTH-1:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (ce) begin
      if (we) mem[addr] <= wdata;
      else    rdata     <= mem[addr];
    end
  end

endmodule
