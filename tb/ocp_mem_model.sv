// ocp_mem_model -- behavioural OCP target memory for testbenches.
// Stands in for a DDR2 controller with its DRAM bank (or any OCP target):
// sparse storage (associative array of DW-bit words, unwritten words read as
// {addr, ~addr} pattern), command accepted after CMD_WAIT idle cycles, write
// beats taken one per cycle, reads answered after RD_WAIT cycles with one beat
// per cycle.  Writes answer one DVA beat.  Counts the commands it served.
module ocp_mem_model
  import mp3noc_pkg::*;
#(
  parameter int unsigned DW       = 64,
  parameter int unsigned AW       = 28,
  parameter int unsigned CMD_WAIT = 1,
  parameter int unsigned RD_WAIT  = 3
) (
  input  logic          clk,
  input  logic          rst_n,
  input  ocp_cmd_e      MCmd,
  input  logic [AW-1:0] MAddr,
  input  logic [7:0]    MBurstLen,
  output logic          SCmdAcc,
  input  logic [DW-1:0] MData,
  input  logic          MDataValid,
  input  logic          MDataLast,
  output logic          SDataAcc,
  output ocp_resp_e     SResp,
  output logic [DW-1:0] SData,
  output logic          SRespLast,
  input  logic          MRespAcc
);
  localparam int WB = $clog2(DW / 8);
  logic [DW-1:0] mem [longint];
  int unsigned served = 0;

  typedef enum {I, WR, WRESP, RDW, RD} st_e;
  st_e st = I;
  int unsigned cnt = 0, left = 0;
  longint idx = 0;

  function automatic logic [DW-1:0] rd(longint a);
    if (mem.exists(a)) return mem[a];
    return {DW/32{a[15:0], ~a[15:0]}};
  endfunction

  assign SCmdAcc  = (st == I) && (cnt >= CMD_WAIT) && (MCmd != OCP_IDLE);
  assign SDataAcc = (st == WR);
  assign SResp    = (st == WRESP || st == RD) ? RESP_DVA : RESP_NULL;
  assign SData    = (st == RD) ? rd(idx) : '0;
  assign SRespLast = (st == WRESP) || (left == 1);

  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin st <= I; cnt <= 0; end
    else case (st)
      I: if (MCmd != OCP_IDLE) begin
           if (cnt >= CMD_WAIT) begin
             served <= served + 1;
             idx  <= longint'(MAddr >> WB);
             left <= (MBurstLen == 0) ? 1 : MBurstLen;
             cnt  <= 0;
             st   <= (MCmd == OCP_WR || MCmd == OCP_WRNP || MCmd == OCP_WRC) ? WR : RDW;
           end else cnt <= cnt + 1;
         end
      WR: if (MDataValid) begin mem[idx] = MData; idx <= idx + 1; if (MDataLast) st <= WRESP; end
      WRESP: if (MRespAcc) st <= I;
      RDW: if (cnt >= RD_WAIT) begin cnt <= 0; st <= RD; end else cnt <= cnt + 1;
      RD: if (MRespAcc) begin idx <= idx + 1; left <= left - 1; if (left == 1) st <= I; end
      default: st <= I;
    endcase
  end
endmodule
