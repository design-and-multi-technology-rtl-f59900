// sync_noc -- the Synchronization NoC with the shared memory behind it.
//
// Every tile's synchronization adapter connects here through its own
// OCP-to-NTTP NIU (32-bit data, basic OCP signals, no bursts).  One request
// switch (N_M x 1) carries the requests to the single NTTP-to-OCP NIU of the
// shared memory; one response switch (1 x N_M) returns the answers.  Between
// the slave NIU and the memory sits the exclusive access manager.  Two
// synchronization modes result:
//   locked  - ReadExclusive makes the NIU send LOCK before the LOAD; the
//             request switch then serves only that tile until the write that
//             follows is completed by an UNLOCK (atomic read-modify-write);
//   lazy    - ReadLinked / WriteConditional travel with the exclusive bit and
//             are resolved by the exclusive access manager (FAIL when another
//             tile wrote the location in between).
// The two modes, the memory and the manager's position follow the design;
// the single-switch topology is this implementation's choice.  Clock: the
// Synchronization NoC clock for everything inside.
module sync_noc
  import mp3noc_pkg::*;
#(
  parameter int unsigned N_M        = 16,
  parameter int unsigned MEM_BYTES  = 65536
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  ocp_cmd_e [N_M-1:0]      m_MCmd,
  input  logic [N_M-1:0][31:0]    m_MAddr,
  input  logic [N_M-1:0][1:0]     m_MFlag,
  output logic [N_M-1:0]          m_SCmdAcc,
  input  logic [N_M-1:0][31:0]    m_MData,
  input  logic [N_M-1:0]          m_MDataValid,
  input  logic [N_M-1:0]          m_MDataLast,
  output logic [N_M-1:0]          m_SDataAcc,
  output ocp_resp_e [N_M-1:0]     m_SResp,
  output logic [N_M-1:0][31:0]    m_SData,
  output logic [N_M-1:0]          m_SRespLast,
  input  logic [N_M-1:0]          m_MRespAcc,
  // status of the request switch (bit m: output locked)
  output logic                    locked
);
  localparam int unsigned MAW = $clog2(MEM_BYTES);

  logic [N_M-1:0]        q_vld, q_rdy, q_head, q_tail;
  logic [N_M-1:0][1:0]   q_press;
  logic [N_M-1:0][31:0]  q_data;
  logic [N_M-1:0]        r_vld, r_rdy, r_head, r_tail;
  logic [N_M-1:0][1:0]   r_press;
  logic [N_M-1:0][31:0]  r_data;

  logic        sq_vld, sq_rdy, sq_head, sq_tail;
  logic [1:0]  sq_press;
  logic [31:0] sq_data;
  logic        sr_vld, sr_rdy, sr_head, sr_tail;
  logic [1:0]  sr_press;
  logic [31:0] sr_data;

  for (genvar m = 0; m < N_M; m++) begin : g_mniu
    ocp_master_niu #(.DW(32), .AW(32), .MASTER_ID(m), .N_SLAVES(1), .SLV_LSB(MAW)) u_niu (
      .clk, .rst_n,
      .MCmd(m_MCmd[m]), .MAddr(m_MAddr[m]), .MBurstLen(8'd1), .MFlag(m_MFlag[m]),
      .SCmdAcc(m_SCmdAcc[m]), .MData(m_MData[m]), .MDataValid(m_MDataValid[m]),
      .MDataLast(m_MDataLast[m]), .SDataAcc(m_SDataAcc[m]), .SResp(m_SResp[m]),
      .SData(m_SData[m]), .SRespLast(m_SRespLast[m]), .MRespAcc(m_MRespAcc[m]),
      .tx_vld(q_vld[m]), .tx_rdy(q_rdy[m]), .tx_head(q_head[m]), .tx_tail(q_tail[m]),
      .tx_press(q_press[m]), .tx_data(q_data[m]),
      .rx_vld(r_vld[m]), .rx_rdy(r_rdy[m]), .rx_head(r_head[m]), .rx_tail(r_tail[m]),
      .rx_data(r_data[m]));
  end

  logic [31:0] req_status;
  nttp_switch #(.NIN(N_M), .NOUT(1), .DW(32), .ROUTE_SHIFT(0)) u_req_sw (
    .clk, .rst_n,
    .in_vld(q_vld), .in_rdy(q_rdy), .in_head(q_head), .in_tail(q_tail),
    .in_press(q_press), .in_data(q_data),
    .out_vld(sq_vld), .out_rdy(sq_rdy), .out_head(sq_head), .out_tail(sq_tail),
    .out_press(sq_press), .out_data(sq_data),
    .cfg_we(1'b0), .cfg_addr(12'h000), .cfg_wdata('0), .cfg_rdata(req_status));
  assign locked = req_status[16];

  logic [31:0] rsp_status;
  nttp_switch #(.NIN(1), .NOUT(N_M), .DW(32), .ROUTE_SHIFT(0)) u_rsp_sw (
    .clk, .rst_n,
    .in_vld(sr_vld), .in_rdy(sr_rdy), .in_head(sr_head), .in_tail(sr_tail),
    .in_press(sr_press), .in_data(sr_data),
    .out_vld(r_vld), .out_rdy(r_rdy), .out_head(r_head), .out_tail(r_tail),
    .out_press(r_press), .out_data(r_data),
    .cfg_we(1'b0), .cfg_addr(12'h000), .cfg_wdata('0), .cfg_rdata(rsp_status));

  // slave NIU -> exclusive access manager -> memory
  ocp_cmd_e        n_MCmd, e_MCmd;
  logic [MAW-1:0]  n_MAddr, e_MAddr;
  logic [7:0]      n_MBurstLen, e_MBurstLen;
  logic [ID_W-1:0] n_MReqInfo;
  logic            n_SCmdAcc, e_SCmdAcc;
  logic [31:0]     n_MData, e_MData;
  logic            n_MDataValid, e_MDataValid, n_MDataLast, e_MDataLast;
  logic            n_SDataAcc, e_SDataAcc;
  ocp_resp_e       n_SResp, e_SResp;
  logic [31:0]     n_SData, e_SData;
  logic            n_SRespLast, e_SRespLast, n_MRespAcc, e_MRespAcc;

  ocp_slave_niu #(.DW(32), .AW(MAW), .SLAVE_ID(0)) u_sniu (
    .clk, .rst_n,
    .rx_vld(sq_vld), .rx_rdy(sq_rdy), .rx_head(sq_head), .rx_tail(sq_tail), .rx_data(sq_data),
    .tx_vld(sr_vld), .tx_rdy(sr_rdy), .tx_head(sr_head), .tx_tail(sr_tail),
    .tx_press(sr_press), .tx_data(sr_data),
    .MCmd(n_MCmd), .MAddr(n_MAddr), .MBurstLen(n_MBurstLen), .MReqInfo(n_MReqInfo),
    .SCmdAcc(n_SCmdAcc), .MData(n_MData), .MDataValid(n_MDataValid), .MDataLast(n_MDataLast),
    .SDataAcc(n_SDataAcc), .SResp(n_SResp), .SData(n_SData), .SRespLast(n_SRespLast),
    .MRespAcc(n_MRespAcc));

  exclusive_access_manager #(.DW(32), .AW(MAW), .N_INIT(N_M)) u_eam (
    .clk, .rst_n,
    .s_MCmd(n_MCmd), .s_MAddr(n_MAddr), .s_MBurstLen(n_MBurstLen), .s_MReqInfo(n_MReqInfo),
    .s_SCmdAcc(n_SCmdAcc), .s_MData(n_MData), .s_MDataValid(n_MDataValid),
    .s_MDataLast(n_MDataLast), .s_SDataAcc(n_SDataAcc), .s_SResp(n_SResp), .s_SData(n_SData),
    .s_SRespLast(n_SRespLast), .s_MRespAcc(n_MRespAcc),
    .m_MCmd(e_MCmd), .m_MAddr(e_MAddr), .m_MBurstLen(e_MBurstLen), .m_SCmdAcc(e_SCmdAcc),
    .m_MData(e_MData), .m_MDataValid(e_MDataValid), .m_MDataLast(e_MDataLast),
    .m_SDataAcc(e_SDataAcc), .m_SResp(e_SResp), .m_SData(e_SData),
    .m_SRespLast(e_SRespLast), .m_MRespAcc(e_MRespAcc));

  shared_memory #(.SIZE_BYTES(MEM_BYTES), .DW(32), .AW(MAW)) u_mem (
    .clk, .rst_n,
    .MCmd(e_MCmd), .MAddr(e_MAddr), .MBurstLen(e_MBurstLen), .SCmdAcc(e_SCmdAcc),
    .MData(e_MData), .MDataValid(e_MDataValid), .MDataLast(e_MDataLast), .SDataAcc(e_SDataAcc),
    .SResp(e_SResp), .SData(e_SData), .SRespLast(e_SRespLast), .MRespAcc(e_MRespAcc));

endmodule
