// tb_core_model: behavioural stand-in for the combinational logic of one
// processor core, used to exercise the SoC fabric. Its whole state lives in
// the SoC's ResiliCell register (q in, d out); it has no storage itself.
//
// State fields (bit positions):
//   [0] booted  [3:1] st  [5:4] id  [21:6] ptr  [53:22] acc  [54] cmd_ack
//   [86:55] cmd_rdata  [102:87] irq_cnt  [STATE_W-1:103] filler
// After reset the core latches its hart id, then loops: write acc to
// base(id)+4*(ptr mod 256), read the word back, acc = rotl(readback, 1) +
// 0x9E3779B9, ptr++. base(id) = id * 0x1000, so all cores share bank 0.
// A command (cmd_valid, issued by the testbench) is executed between two
// iterations by the core whose state says id 0, i.e. by core 0 and every
// core mirroring it, and reported in cmd_ack / cmd_rdata. irq_cnt counts
// cycles with the interrupt input high; the filler bits shift acc[0]
// through the rest of the state so that every ResiliCell carries data.
module tb_core_model
  import tetrisc_pkg::*;
#(
  parameter int unsigned STATE_W = 3041
) (
  input  logic [STATE_W-1:0] q,
  output logic [STATE_W-1:0] d,
  input  logic [1:0]         hart_id,
  output mem_req_t           req,
  input  mem_rsp_t           rsp,
  input  logic               irq,
  input  logic               cmd_valid,
  input  logic               cmd_we,
  input  logic [31:0]        cmd_addr,
  input  logic [31:0]        cmd_wdata
);
  localparam int unsigned FW = STATE_W - 103;

  typedef enum logic [2:0] {WR, WRW, RD, RDW, CMD, CMDW} st_e;

  logic        booted, cmd_ack;
  st_e         st;
  logic [1:0]  id;
  logic [15:0] ptr, irq_cnt;
  logic [31:0] acc, cmd_rdata, addr;
  logic [FW-1:0] filler;

  assign booted    = q[0];
  assign st        = st_e'(q[3:1]);
  assign id        = q[5:4];
  assign ptr       = q[21:6];
  assign acc       = q[53:22];
  assign cmd_ack   = q[54];
  assign cmd_rdata = q[86:55];
  assign irq_cnt   = q[102:87];
  assign filler    = q[STATE_W-1:103];

  assign addr = 32'(id) * 32'h1000 + 32'(ptr[7:0]) * 4;

  always_comb begin
    logic        n_booted, n_ack;
    st_e         n_st;
    logic [1:0]  n_id;
    logic [15:0] n_ptr, n_irq;
    logic [31:0] n_acc, n_crd;
    n_booted = 1'b1; n_st = st; n_id = id; n_ptr = ptr; n_acc = acc;
    n_ack = cmd_ack && cmd_valid; n_crd = cmd_rdata;
    n_irq = irq ? irq_cnt + 1'b1 : irq_cnt;
    req = '0;
    if (!booted) begin
      n_id  = hart_id;
      n_acc = 32'h1234_5678 ^ (32'(hart_id) * 32'h9E37_79B9);
      n_st  = WR;
      n_ptr = '0;
      n_ack = 1'b0;
      n_irq = '0;
    end else begin
      case (st)
        WR: if (cmd_valid && !cmd_ack && id == 2'd0) n_st = CMD;
            else begin
              req = '{req: 1'b1, we: 1'b1, addr: addr, wdata: acc};
              if (rsp.gnt) n_st = WRW;
            end
        WRW: if (rsp.rvalid) n_st = RD;
        RD: begin
          req = '{req: 1'b1, we: 1'b0, addr: addr, wdata: '0};
          if (rsp.gnt) n_st = RDW;
        end
        RDW: if (rsp.rvalid) begin
          n_acc = {rsp.rdata[30:0], rsp.rdata[31]} + 32'h9E37_79B9;
          n_ptr = ptr + 1'b1;
          n_st  = WR;
        end
        CMD: begin
          req = '{req: 1'b1, we: cmd_we, addr: cmd_addr, wdata: cmd_wdata};
          if (rsp.gnt) n_st = CMDW;
        end
        CMDW: if (rsp.rvalid) begin
          n_crd = rsp.rdata;
          n_ack = 1'b1;
          n_st  = WR;
        end
        default: n_st = WR;
      endcase
    end
    d = {filler[FW-2:0], filler[FW-1] ^ acc[0], n_irq, n_crd, n_ack,
         n_acc, n_ptr, n_id, 3'(n_st), n_booted};
  end
endmodule
