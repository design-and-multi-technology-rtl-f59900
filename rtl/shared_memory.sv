// shared_memory -- on-chip shared memory behind the Synchronization NoC.
//
// A SIZE_BYTES memory (64 KByte in the system) of DW-bit words with an OCP
// target port.  The processor tiles keep their synchronization variables
// here; ReadLinked/WriteConditional are resolved by the exclusive access
// manager in front of it, so this block sees only RD/RDEX/RDL as reads and
// every write command as a write.
// Timing (this implementation's choice): the command is accepted at once when
// idle; write beats are taken one per cycle to consecutive words and answered
// with one DVA beat; a read of N beats returns them on N consecutive cycles
// starting the cycle after acceptance, each held until MRespAcc.
module shared_memory
  import mp3noc_pkg::*;
#(
  parameter int unsigned SIZE_BYTES = 65536,
  parameter int unsigned DW         = 32,
  parameter int unsigned AW         = 16
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
  localparam int unsigned WORDS = SIZE_BYTES / (DW / 8);
  localparam int unsigned IW    = $clog2(WORDS);
  localparam int unsigned WB    = $clog2(DW / 8);

  logic [DW-1:0] mem [WORDS];

  typedef enum logic [1:0] {M_IDLE, M_WR, M_WRESP, M_RD} st_e;
  st_e st;
  logic [IW-1:0] idx;
  logic [7:0]    left;

  assign SCmdAcc   = (st == M_IDLE);
  assign SDataAcc  = (st == M_WR);
  assign SResp     = (st == M_WRESP || st == M_RD) ? RESP_DVA : RESP_NULL;
  assign SData     = (st == M_RD) ? mem[idx] : '0;
  assign SRespLast = (st == M_WRESP) || (left == 8'd1);

  function automatic logic is_write(ocp_cmd_e c);
    return (c == OCP_WR) || (c == OCP_WRNP) || (c == OCP_WRC) || (c == OCP_BCST);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= M_IDLE; idx <= '0; left <= '0;
    end else begin
      unique case (st)
        M_IDLE: if (MCmd != OCP_IDLE) begin
          idx  <= IW'(MAddr >> WB);
          left <= (MBurstLen == 8'd0) ? 8'd1 : MBurstLen;
          st   <= is_write(MCmd) ? M_WR : M_RD;
        end
        M_WR: if (MDataValid) begin
          idx <= idx + 1'b1;
          if (MDataLast) st <= M_WRESP;
        end
        M_WRESP: if (MRespAcc) st <= M_IDLE;
        M_RD: if (MRespAcc) begin
          idx  <= idx + 1'b1;
          left <= left - 8'd1;
          if (left == 8'd1) st <= M_IDLE;
        end
        default: st <= M_IDLE;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (st == M_WR && MDataValid) mem[idx] <= MData;
  end

endmodule
