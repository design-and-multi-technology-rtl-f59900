// service_host_bridge -- entry point of the service network.
//
// Takes single 32-bit OCP transfers from the monitoring tile's service
// adapter and turns each into one request word on the main service ring
// (write: wr=1 with the data; read: wr=0).  It then waits for the answer word
// to come round the ring and returns it as the OCP response (DVA with the read
// data).  A request that comes back unanswered (no stop claimed it) is
// answered ERR.  The byte address is used as the 16-bit ring address directly.
// Timing: one transfer at a time; latency = ring length in hops + 2 cycles.
module service_host_bridge
  import mp3noc_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // OCP target port (basic signals only)
  input  ocp_cmd_e    MCmd,
  input  logic [31:0] MAddr,
  output logic        SCmdAcc,
  input  logic [31:0] MData,
  input  logic        MDataValid,
  output logic        SDataAcc,
  output ocp_resp_e   SResp,
  output logic [31:0] SData,
  output logic        SRespLast,
  input  logic        MRespAcc,
  // main ring
  output logic        out_vld,
  input  logic        out_rdy,
  output svc_word_t   out_data,
  input  logic        in_vld,
  output logic        in_rdy,
  input  svc_word_t   in_data
);
  typedef enum logic [2:0] {B_IDLE, B_WDATA, B_SEND, B_WAIT, B_RESP} st_e;
  st_e st;
  svc_word_t req;
  ocp_resp_e rstat;
  logic [31:0] rdata;

  function automatic logic is_write(ocp_cmd_e c);
    return (c == OCP_WR) || (c == OCP_WRNP) || (c == OCP_WRC) || (c == OCP_BCST);
  endfunction

  assign SCmdAcc   = (st == B_IDLE) && (MCmd != OCP_IDLE);
  assign SDataAcc  = (st == B_WDATA);
  assign SResp     = (st == B_RESP) ? rstat : RESP_NULL;
  assign SData     = rdata;
  assign SRespLast = 1'b1;
  assign out_vld   = (st == B_SEND);
  assign out_data  = req;
  assign in_rdy    = 1'b1;      // the bridge is the ring's sink

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= B_IDLE; req <= '0; rstat <= RESP_NULL; rdata <= '0;
    end else begin
      unique case (st)
        B_IDLE: if (MCmd != OCP_IDLE) begin
          req.resp <= 1'b0;
          req.wr   <= is_write(MCmd);
          req.addr <= MAddr[SVC_AW-1:0];
          req.data <= '0;
          st <= is_write(MCmd) ? B_WDATA : B_SEND;
        end
        B_WDATA: if (MDataValid) begin req.data <= MData; st <= B_SEND; end
        B_SEND:  if (out_rdy) st <= B_WAIT;
        B_WAIT:  if (in_vld) begin
          rstat <= in_data.resp ? RESP_DVA : RESP_ERR;
          rdata <= in_data.data;
          st    <= B_RESP;
        end
        B_RESP:  if (MRespAcc) st <= B_IDLE;
        default: st <= B_IDLE;
      endcase
    end
  end

endmodule
