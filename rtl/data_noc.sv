// data_noc -- the Data NoC: 16 tiles to 4 DDR2 banks.
//
// A cascading two-stage multistage interconnection network built from
// nttp_switch, with a request part and a mirrored response part:
//   request  stage 1: N_M/4 switches of 4 in x N_S out; masters 4g..4g+3
//                     enter switch g, its output j goes to stage-2 switch j
//            stage 2: N_S switches of N_M/4 in x 1 out, each feeding the
//                     slave NIU (and DDR2 controller) of bank j
//   response stage A: N_S switches of 1 in x N_M/4 out (from slave NIU j)
//            stage B: N_M/4 switches of N_S in x 4 out (to masters 4g..4g+3)
// With the defaults this is 8 request + 8 response switches, 16 OCP-to-NTTP
// NIUs and 4 NTTP-to-OCP NIUs, as in the design.  Any tile reaches any bank;
// the bank is chosen by address bits [SLV_LSB+1:SLV_LSB] (256 MByte banks).
//
// Performance monitoring: a probe point sits on every NIU/switch connection
// (20 points).  Statistic collectors 0..3 each watch four master NIUs (request
// and response link), collector 4 watches the four slave NIUs.  Their dump
// frames are merged by pm_switch onto the pm_* output towards the monitoring
// tile.
// Service access: switch pair k (k<4: stage-1 switch k with stage-B switch k;
// k>=4: stage-2 switch k-4 with stage-A switch k-4) has one register port;
// sw_addr[k][10] selects the response switch of the pair, [9:0] the switch
// register.  Collector c and the PM switch have their own register ports.
// All of it runs on one clock, the Data NoC clock.
module data_noc
  import mp3noc_pkg::*;
#(
  parameter int unsigned N_M     = 16,
  parameter int unsigned N_S     = 4,
  parameter int unsigned DW      = 64,
  parameter int unsigned AW      = 32,
  parameter int unsigned SLV_LSB = 28
) (
  input  logic                        clk,
  input  logic                        rst_n,
  // OCP target ports, one per tile
  input  ocp_cmd_e [N_M-1:0]          m_MCmd,
  input  logic [N_M-1:0][AW-1:0]      m_MAddr,
  input  logic [N_M-1:0][7:0]         m_MBurstLen,
  input  logic [N_M-1:0][1:0]         m_MFlag,
  output logic [N_M-1:0]              m_SCmdAcc,
  input  logic [N_M-1:0][DW-1:0]      m_MData,
  input  logic [N_M-1:0]              m_MDataValid,
  input  logic [N_M-1:0]              m_MDataLast,
  output logic [N_M-1:0]              m_SDataAcc,
  output ocp_resp_e [N_M-1:0]         m_SResp,
  output logic [N_M-1:0][DW-1:0]      m_SData,
  output logic [N_M-1:0]              m_SRespLast,
  input  logic [N_M-1:0]              m_MRespAcc,
  // OCP master ports, one per DDR2 controller
  output ocp_cmd_e [N_S-1:0]          d_MCmd,
  output logic [N_S-1:0][SLV_LSB-1:0] d_MAddr,
  output logic [N_S-1:0][7:0]         d_MBurstLen,
  output logic [N_S-1:0][ID_W-1:0]    d_MReqInfo,
  input  logic [N_S-1:0]              d_SCmdAcc,
  output logic [N_S-1:0][DW-1:0]      d_MData,
  output logic [N_S-1:0]              d_MDataValid,
  output logic [N_S-1:0]              d_MDataLast,
  input  logic [N_S-1:0]              d_SDataAcc,
  input  ocp_resp_e [N_S-1:0]         d_SResp,
  input  logic [N_S-1:0][DW-1:0]      d_SData,
  input  logic [N_S-1:0]              d_SRespLast,
  output logic [N_S-1:0]              d_MRespAcc,
  // monitoring dump output
  output logic                        pm_vld,
  input  logic                        pm_rdy,
  output logic [31:0]                 pm_data,
  output logic                        pm_last,
  // register ports: switch pairs, collectors, PM switch
  input  logic [2*N_M/4-1:0]          sw_we,
  input  logic [2*N_M/4-1:0][11:0]    sw_addr,
  input  logic [2*N_M/4-1:0][31:0]    sw_wdata,
  output logic [2*N_M/4-1:0][31:0]    sw_rdata,
  input  logic [N_M/4:0]              sc_we,
  input  logic [N_M/4:0][11:0]        sc_addr,
  input  logic [N_M/4:0][31:0]        sc_wdata,
  output logic [N_M/4:0][31:0]        sc_rdata,
  input  logic                        pms_we,
  input  logic [11:0]                 pms_addr,
  input  logic [31:0]                 pms_wdata,
  output logic [31:0]                 pms_rdata
);
  localparam int unsigned NG = N_M / 4;     // master groups = stage-1 switches

  typedef logic [DW-1:0] word_t;

  // ---------------- master-side links
  logic  [N_M-1:0]      mq_vld, mq_rdy, mq_head, mq_tail;   // NIU -> stage 1
  logic  [N_M-1:0][1:0] mq_press;
  word_t [N_M-1:0]      mq_data;
  logic  [N_M-1:0]      mr_vld, mr_rdy, mr_head, mr_tail;   // stage B -> NIU
  logic  [N_M-1:0][1:0] mr_press;
  word_t [N_M-1:0]      mr_data;

  // ---------------- slave-side links
  logic  [N_S-1:0]      sq_vld, sq_rdy, sq_head, sq_tail;   // stage 2 -> NIU
  logic  [N_S-1:0][1:0] sq_press;
  word_t [N_S-1:0]      sq_data;
  logic  [N_S-1:0]      sr_vld, sr_rdy, sr_head, sr_tail;   // NIU -> stage A
  logic  [N_S-1:0][1:0] sr_press;
  word_t [N_S-1:0]      sr_data;

  // ---------------- inter-stage links, [from][to] and transposed [to][from]
  logic  [NG-1:0][N_S-1:0]      x_vld, x_rdy, x_head, x_tail;      // stage1 g -> stage2 j
  logic  [NG-1:0][N_S-1:0][1:0] x_press;
  word_t [NG-1:0][N_S-1:0]      x_data;
  logic  [N_S-1:0][NG-1:0]      xt_vld, xt_rdy, xt_head, xt_tail;
  logic  [N_S-1:0][NG-1:0][1:0] xt_press;
  word_t [N_S-1:0][NG-1:0]      xt_data;

  logic  [N_S-1:0][NG-1:0]      y_vld, y_rdy, y_head, y_tail;      // stageA j -> stageB g
  logic  [N_S-1:0][NG-1:0][1:0] y_press;
  word_t [N_S-1:0][NG-1:0]      y_data;
  logic  [NG-1:0][N_S-1:0]      yt_vld, yt_rdy, yt_head, yt_tail;
  logic  [NG-1:0][N_S-1:0][1:0] yt_press;
  word_t [NG-1:0][N_S-1:0]      yt_data;

  always_comb begin
    for (int g = 0; g < NG; g++)
      for (int j = 0; j < N_S; j++) begin
        xt_vld[j][g]   = x_vld[g][j];   xt_head[j][g] = x_head[g][j];
        xt_tail[j][g]  = x_tail[g][j];  xt_press[j][g] = x_press[g][j];
        xt_data[j][g]  = x_data[g][j];  x_rdy[g][j]   = xt_rdy[j][g];
        yt_vld[g][j]   = y_vld[j][g];   yt_head[g][j] = y_head[j][g];
        yt_tail[g][j]  = y_tail[j][g];  yt_press[g][j] = y_press[j][g];
        yt_data[g][j]  = y_data[j][g];  y_rdy[j][g]   = yt_rdy[g][j];
      end
  end

  // ---------------- switch register ports
  logic [2*NG-1:0] rq_we, rs_we;
  logic [2*NG-1:0][11:0] rx_addr;
  logic [2*NG-1:0][31:0] rq_rdata, rs_rdata;
  always_comb begin
    for (int k = 0; k < 2*NG; k++) begin
      rq_we[k]    = sw_we[k] && !sw_addr[k][10];
      rs_we[k]    = sw_we[k] &&  sw_addr[k][10];
      rx_addr[k]  = {2'b00, sw_addr[k][9:0]};
      sw_rdata[k] = sw_addr[k][10] ? rs_rdata[k] : rq_rdata[k];
    end
  end

  // ---------------- master NIUs
  for (genvar m = 0; m < N_M; m++) begin : g_mniu
    ocp_master_niu #(.DW(DW), .AW(AW), .MASTER_ID(m), .N_SLAVES(N_S), .SLV_LSB(SLV_LSB)) u_niu (
      .clk, .rst_n,
      .MCmd(m_MCmd[m]), .MAddr(m_MAddr[m]), .MBurstLen(m_MBurstLen[m]), .MFlag(m_MFlag[m]),
      .SCmdAcc(m_SCmdAcc[m]), .MData(m_MData[m]), .MDataValid(m_MDataValid[m]),
      .MDataLast(m_MDataLast[m]), .SDataAcc(m_SDataAcc[m]), .SResp(m_SResp[m]),
      .SData(m_SData[m]), .SRespLast(m_SRespLast[m]), .MRespAcc(m_MRespAcc[m]),
      .tx_vld(mq_vld[m]), .tx_rdy(mq_rdy[m]), .tx_head(mq_head[m]), .tx_tail(mq_tail[m]),
      .tx_press(mq_press[m]), .tx_data(mq_data[m]),
      .rx_vld(mr_vld[m]), .rx_rdy(mr_rdy[m]), .rx_head(mr_head[m]), .rx_tail(mr_tail[m]),
      .rx_data(mr_data[m]));
  end

  // ---------------- slave NIUs
  for (genvar s = 0; s < N_S; s++) begin : g_sniu
    ocp_slave_niu #(.DW(DW), .AW(SLV_LSB), .SLAVE_ID(s)) u_niu (
      .clk, .rst_n,
      .rx_vld(sq_vld[s]), .rx_rdy(sq_rdy[s]), .rx_head(sq_head[s]), .rx_tail(sq_tail[s]),
      .rx_data(sq_data[s]),
      .tx_vld(sr_vld[s]), .tx_rdy(sr_rdy[s]), .tx_head(sr_head[s]), .tx_tail(sr_tail[s]),
      .tx_press(sr_press[s]), .tx_data(sr_data[s]),
      .MCmd(d_MCmd[s]), .MAddr(d_MAddr[s]), .MBurstLen(d_MBurstLen[s]), .MReqInfo(d_MReqInfo[s]),
      .SCmdAcc(d_SCmdAcc[s]), .MData(d_MData[s]), .MDataValid(d_MDataValid[s]),
      .MDataLast(d_MDataLast[s]), .SDataAcc(d_SDataAcc[s]), .SResp(d_SResp[s]),
      .SData(d_SData[s]), .SRespLast(d_SRespLast[s]), .MRespAcc(d_MRespAcc[s]));
  end

  // ---------------- request network
  for (genvar g = 0; g < NG; g++) begin : g_s1
    nttp_switch #(.NIN(4), .NOUT(N_S), .DW(DW), .ROUTE_SHIFT(0)) u_sw (
      .clk, .rst_n,
      .in_vld(mq_vld[4*g +: 4]), .in_rdy(mq_rdy[4*g +: 4]), .in_head(mq_head[4*g +: 4]),
      .in_tail(mq_tail[4*g +: 4]), .in_press(mq_press[4*g +: 4]), .in_data(mq_data[4*g +: 4]),
      .out_vld(x_vld[g]), .out_rdy(x_rdy[g]), .out_head(x_head[g]), .out_tail(x_tail[g]),
      .out_press(x_press[g]), .out_data(x_data[g]),
      .cfg_we(rq_we[g]), .cfg_addr(rx_addr[g]), .cfg_wdata(sw_wdata[g]), .cfg_rdata(rq_rdata[g]));
  end
  for (genvar j = 0; j < N_S; j++) begin : g_s2
    nttp_switch #(.NIN(NG), .NOUT(1), .DW(DW), .ROUTE_SHIFT(0)) u_sw (
      .clk, .rst_n,
      .in_vld(xt_vld[j]), .in_rdy(xt_rdy[j]), .in_head(xt_head[j]), .in_tail(xt_tail[j]),
      .in_press(xt_press[j]), .in_data(xt_data[j]),
      .out_vld(sq_vld[j +: 1]), .out_rdy(sq_rdy[j +: 1]), .out_head(sq_head[j +: 1]),
      .out_tail(sq_tail[j +: 1]), .out_press(sq_press[j +: 1]), .out_data(sq_data[j +: 1]),
      .cfg_we(rq_we[NG+j]), .cfg_addr(rx_addr[NG+j]), .cfg_wdata(sw_wdata[NG+j]),
      .cfg_rdata(rq_rdata[NG+j]));
  end

  // ---------------- response network (mirror)
  for (genvar j = 0; j < N_S; j++) begin : g_sa
    nttp_switch #(.NIN(1), .NOUT(NG), .DW(DW), .ROUTE_SHIFT(2)) u_sw (
      .clk, .rst_n,
      .in_vld(sr_vld[j +: 1]), .in_rdy(sr_rdy[j +: 1]), .in_head(sr_head[j +: 1]),
      .in_tail(sr_tail[j +: 1]), .in_press(sr_press[j +: 1]), .in_data(sr_data[j +: 1]),
      .out_vld(y_vld[j]), .out_rdy(y_rdy[j]), .out_head(y_head[j]), .out_tail(y_tail[j]),
      .out_press(y_press[j]), .out_data(y_data[j]),
      .cfg_we(rs_we[NG+j]), .cfg_addr(rx_addr[NG+j]), .cfg_wdata(sw_wdata[NG+j]),
      .cfg_rdata(rs_rdata[NG+j]));
  end
  for (genvar g = 0; g < NG; g++) begin : g_sb
    nttp_switch #(.NIN(N_S), .NOUT(4), .DW(DW), .ROUTE_SHIFT(0)) u_sw (
      .clk, .rst_n,
      .in_vld(yt_vld[g]), .in_rdy(yt_rdy[g]), .in_head(yt_head[g]), .in_tail(yt_tail[g]),
      .in_press(yt_press[g]), .in_data(yt_data[g]),
      .out_vld(mr_vld[4*g +: 4]), .out_rdy(mr_rdy[4*g +: 4]), .out_head(mr_head[4*g +: 4]),
      .out_tail(mr_tail[4*g +: 4]), .out_press(mr_press[4*g +: 4]), .out_data(mr_data[4*g +: 4]),
      .cfg_we(rs_we[g]), .cfg_addr(rx_addr[g]), .cfg_wdata(sw_wdata[g]), .cfg_rdata(rs_rdata[g]));
  end

  // ---------------- performance monitoring
  logic [NG:0]       d_vld, d_rdy, d_last;
  logic [NG:0][31:0] d_data;

  for (genvar c = 0; c <= NG; c++) begin : g_sc
    logic [3:0]       p_qv, p_qr, p_qh, p_rv, p_rr, p_rh;
    logic [3:0][31:0] p_hdr;
    always_comb begin
      for (int p = 0; p < 4; p++) begin
        if (c < NG) begin
          p_qv[p] = mq_vld[4*c+p]; p_qr[p] = mq_rdy[4*c+p]; p_qh[p] = mq_head[4*c+p];
          p_hdr[p] = mq_data[4*c+p][31:0];
          p_rv[p] = mr_vld[4*c+p]; p_rr[p] = mr_rdy[4*c+p]; p_rh[p] = mr_head[4*c+p];
        end else if (p < N_S) begin
          p_qv[p] = sq_vld[p]; p_qr[p] = sq_rdy[p]; p_qh[p] = sq_head[p];
          p_hdr[p] = sq_data[p][31:0];
          p_rv[p] = sr_vld[p]; p_rr[p] = sr_rdy[p]; p_rh[p] = sr_head[p];
        end else begin
          p_qv[p] = 1'b0; p_qr[p] = 1'b0; p_qh[p] = 1'b0; p_hdr[p] = '0;
          p_rv[p] = 1'b0; p_rr[p] = 1'b0; p_rh[p] = 1'b0;
        end
      end
    end
    statistic_collector #(.NPROBE(4), .SC_ID(c)) u_sc (
      .clk, .rst_n,
      .rq_vld(p_qv), .rq_rdy(p_qr), .rq_head(p_qh), .rq_hdr(p_hdr),
      .rs_vld(p_rv), .rs_rdy(p_rr), .rs_head(p_rh),
      .dump_vld(d_vld[c]), .dump_rdy(d_rdy[c]), .dump_data(d_data[c]), .dump_last(d_last[c]),
      .cfg_we(sc_we[c]), .cfg_addr(sc_addr[c]), .cfg_wdata(sc_wdata[c]), .cfg_rdata(sc_rdata[c]));
  end

  pm_switch #(.NSRC(NG + 1)) u_pm_switch (
    .clk, .rst_n,
    .in_vld(d_vld), .in_rdy(d_rdy), .in_data(d_data), .in_last(d_last),
    .out_vld(pm_vld), .out_rdy(pm_rdy), .out_data(pm_data), .out_last(pm_last),
    .cfg_we(pms_we), .cfg_addr(pms_addr), .cfg_wdata(pms_wdata), .cfg_rdata(pms_rdata));

endmodule
