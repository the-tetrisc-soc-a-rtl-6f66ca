// ecc_mem_bank: one memory bank with Hsiao (39,32) SEC-DED protection and a
// background scrubber.
//
// Each 32-bit word is stored as its 39-bit Hsiao codeword in a 40-bit SRAM
// word (the top bit is unused and written as zero). Reads are decoded on the
// way out: single errors are corrected, double errors are reported on
// rsp.err. The scrubber walks through the bank, reading one word every
// SCRUB_INTERVAL cycles whenever the port is idle; any word found with a
// correctable error, by the scrubber or by a normal read, is written back
// corrected, so single upsets do not accumulate into double ones. The
// write-back takes the port for one cycle (gnt stays low then); it is
// dropped if a bus write to the same word is granted in the cycle the error
// is found, because that write already replaced the word.
//
// Bus timing (tetrisc_pkg): a request is granted in the cycle it is made
// unless a write-back is pending; rvalid and rdata follow one cycle later.
// Only whole 32-bit words are accessed. corrected / uncorrectable pulse once
// per decoded word that had a single / double error.
// The TETRISC description names the code, the 8192x40 SRAM blocks and scrubbing; the
// scrub rate and the write-back policy are this design's own.
module ecc_mem_bank
  import tetrisc_pkg::*;
#(
  parameter int unsigned WORDS          = 8192,
  parameter int unsigned SCRUB_INTERVAL = 64,
  localparam int unsigned AW            = $clog2(WORDS)
) (
  input  logic     clk,
  input  logic     rst_n,
  input  mem_req_t req,
  output mem_rsp_t rsp,
  output logic     corrected,
  output logic     uncorrectable
);

  localparam int unsigned TW = (SCRUB_INTERVAL > 1) ? $clog2(SCRUB_INTERVAL) : 1;

  logic            sram_ce, sram_we;
  logic [AW-1:0]   sram_addr;
  logic [39:0]     sram_wdata, sram_rdata;
  logic [38:0]     enc_code, fixed_code;
  logic [31:0]     dec_data;
  logic            dec_corr, dec_unc;

  logic [TW-1:0]   timer_q;
  logic            scrub_pend_q;
  logic [AW-1:0]   scrub_addr_q;
  logic            rd_q, rvalid_q, chk_q;
  logic [AW-1:0]   chk_addr_q;
  logic            wb_q;
  logic [AW-1:0]   wb_addr_q;
  logic [38:0]     wb_code_q;

  logic            gnt, scrub_rd, check, wb_set;
  logic [AW-1:0]   req_word;

  assign req_word = req.addr[AW+1:2];
  assign gnt      = req.req && !wb_q;
  assign scrub_rd = !wb_q && !req.req && scrub_pend_q;

  hsiao_enc u_enc (.data(req.wdata), .code(enc_code));
  hsiao_dec u_dec (
    .code         (sram_rdata[38:0]),
    .data         (dec_data),
    .code_fixed   (fixed_code),
    .corrected    (dec_corr),
    .uncorrectable(dec_unc)
  );

  always_comb begin
    sram_ce    = 1'b0;
    sram_we    = 1'b0;
    sram_addr  = req_word;
    sram_wdata = {1'b0, enc_code};
    if (wb_q) begin
      sram_ce    = 1'b1;
      sram_we    = 1'b1;
      sram_addr  = wb_addr_q;
      sram_wdata = {1'b0, wb_code_q};
    end else if (req.req) begin
      sram_ce = 1'b1;
      sram_we = req.we;
    end else if (scrub_rd) begin
      sram_ce   = 1'b1;
      sram_addr = scrub_addr_q;
    end
  end

  sram_macro #(.WORDS(WORDS), .WIDTH(40)) u_sram (
    .clk,
    .ce   (sram_ce),
    .we   (sram_we),
    .addr (sram_addr),
    .wdata(sram_wdata),
    .rdata(sram_rdata)
  );

  // a word read last cycle (bus read or scrub read) is checked now
  assign check  = rd_q || chk_q;
  assign wb_set = check && dec_corr &&
                  !(gnt && req.we && req_word == chk_addr_q);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      timer_q      <= '0;
      scrub_pend_q <= 1'b0;
      scrub_addr_q <= '0;
      rd_q         <= 1'b0;
      rvalid_q     <= 1'b0;
      chk_q        <= 1'b0;
      chk_addr_q   <= '0;
      wb_q         <= 1'b0;
      wb_addr_q    <= '0;
      wb_code_q    <= '0;
    end else begin
      if (scrub_rd) begin
        scrub_pend_q <= 1'b0;
        scrub_addr_q <= scrub_addr_q + 1'b1;
      end else if (!scrub_pend_q) begin
        if (timer_q == TW'(SCRUB_INTERVAL - 1)) begin
          timer_q      <= '0;
          scrub_pend_q <= 1'b1;
        end else begin
          timer_q <= timer_q + 1'b1;
        end
      end
      rvalid_q <= gnt;
      rd_q     <= gnt && !req.we;
      chk_q    <= scrub_rd;
      if (gnt)           chk_addr_q <= req_word;
      else if (scrub_rd) chk_addr_q <= scrub_addr_q;
      wb_q <= wb_set;
      if (wb_set) begin
        wb_addr_q <= chk_addr_q;
        wb_code_q <= fixed_code;
      end
    end
  end

  assign rsp.gnt    = gnt;
  assign rsp.rvalid = rvalid_q;
  assign rsp.rdata  = rd_q ? dec_data : '0;
  assign rsp.err    = rd_q && dec_unc;

  assign corrected     = check && dec_corr;
  assign uncorrectable = check && dec_unc;

endmodule
