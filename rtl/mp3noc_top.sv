// mp3noc_top -- the MP3NOC multiprocessor system around its three NoCs.
//
// Sixteen processor tiles share four DDR2 banks through the Data NoC and
// synchronise through a 64 KByte shared memory on the Synchronization NoC; a
// service network configures and observes the Data NoC at run time, and
// statistic collectors on all 20 Data NoC connection points report traffic
// frames to the monitoring tile.  The system is GALS: each tile runs on its
// own clock, the Data NoC (with the service network) on data_clk and the
// Synchronization NoC on sync_clk.  Every tile meets the NoCs through OCP
// adapters, each holding a pair of bi-synchronous FIFOs:
//   * a data adapter (64-bit OCP with bursts and MFlag) into the Data NoC,
//   * a synchronization adapter (32-bit OCP with ReadLinked/WriteConditional)
//     into the Synchronization NoC,
//   * tile PPC_TILE (the PowerPC tile in the system) also has a service
//     adapter into the service network and receives the monitoring frames on
//     an FSL-style "PM receive" port through one more bi-synchronous FIFO.
// The processors themselves, the DDR2 controllers and the DRAM are outside
// this RTL: the tiles' FSL links and the controllers' OCP ports are the ports
// of this module.  FSL word formats: see ocp_adapter.
// Beside the system, and unconnected to it, sit the coprocessors of the
// coprocessor case study: two 3x3 image filters (mean and median), the
// 256-point radix-4 FFT and the ray-casting grid traversal, each with its own
// ports on the cop_clk clock.
// Service address map (ring address = OCP byte address bits [15:0]):
//   stop 0..3  statistic collectors of master groups, stop 4 the slave one;
//   stop 16..19 request stage-1 switch k (bit 10: its mirror stage-B switch),
//   stop 20..23 request stage-2 switch k (bit 10: its mirror stage-A switch),
//   stop 24 the PM switch.
module mp3noc_top
  import mp3noc_pkg::*;
#(
  parameter int unsigned N_TILES  = 16,
  parameter int unsigned N_BANKS  = 4,
  parameter int unsigned PPC_TILE = 15,
  parameter int unsigned SHM_BYTES = 65536
) (
  input  logic                          rst_n,
  input  logic [N_TILES-1:0]            pe_clk,
  input  logic                          data_clk,
  input  logic                          sync_clk,
  // data adapters, FSL side
  input  logic [N_TILES-1:0][31:0]      dfsl_m_data,
  input  logic [N_TILES-1:0]            dfsl_m_control,
  input  logic [N_TILES-1:0]            dfsl_m_write,
  output logic [N_TILES-1:0]            dfsl_m_full,
  output logic [N_TILES-1:0][31:0]      dfsl_s_data,
  output logic [N_TILES-1:0]            dfsl_s_control,
  input  logic [N_TILES-1:0]            dfsl_s_read,
  output logic [N_TILES-1:0]            dfsl_s_exists,
  // synchronization adapters, FSL side
  input  logic [N_TILES-1:0][31:0]      sfsl_m_data,
  input  logic [N_TILES-1:0]            sfsl_m_control,
  input  logic [N_TILES-1:0]            sfsl_m_write,
  output logic [N_TILES-1:0]            sfsl_m_full,
  output logic [N_TILES-1:0][31:0]      sfsl_s_data,
  output logic [N_TILES-1:0]            sfsl_s_control,
  input  logic [N_TILES-1:0]            sfsl_s_read,
  output logic [N_TILES-1:0]            sfsl_s_exists,
  // service adapter of the monitoring tile, FSL side
  input  logic [31:0]                   vfsl_m_data,
  input  logic                          vfsl_m_control,
  input  logic                          vfsl_m_write,
  output logic                          vfsl_m_full,
  output logic [31:0]                   vfsl_s_data,
  output logic                          vfsl_s_control,
  input  logic                          vfsl_s_read,
  output logic                          vfsl_s_exists,
  // monitoring frames to the monitoring tile (its clock); control = last word
  output logic [31:0]                   pm_s_data,
  output logic                          pm_s_control,
  input  logic                          pm_s_read,
  output logic                          pm_s_exists,
  // OCP master ports to the DDR2 controllers (data_clk)
  output ocp_cmd_e [N_BANKS-1:0]        d_MCmd,
  output logic [N_BANKS-1:0][27:0]      d_MAddr,
  output logic [N_BANKS-1:0][7:0]       d_MBurstLen,
  output logic [N_BANKS-1:0][ID_W-1:0]  d_MReqInfo,
  input  logic [N_BANKS-1:0]            d_SCmdAcc,
  output logic [N_BANKS-1:0][63:0]      d_MData,
  output logic [N_BANKS-1:0]            d_MDataValid,
  output logic [N_BANKS-1:0]            d_MDataLast,
  input  logic [N_BANKS-1:0]            d_SDataAcc,
  input  ocp_resp_e [N_BANKS-1:0]       d_SResp,
  input  logic [N_BANKS-1:0][63:0]      d_SData,
  input  logic [N_BANKS-1:0]            d_SRespLast,
  output logic [N_BANKS-1:0]            d_MRespAcc,
  // Synchronization NoC request path held by a locked transfer
  output logic                          sync_locked,
  // 3x3 image filter coprocessors, index 0 mean, 1 median (cop_clk)
  input  logic                          cop_clk,
  input  logic [1:0]                    cop_in_valid,
  output logic [1:0]                    cop_in_ready,
  input  logic [1:0][2:0][31:0]         cop_in_row,
  output logic [1:0]                    cop_out_valid,
  input  logic [1:0]                    cop_out_ready,
  output logic [1:0][31:0]              cop_out_data,
  // 256-point radix-4 FFT coprocessor (cop_clk)
  input  logic                          fft_in_valid,
  output logic                          fft_in_ready,
  input  logic signed [15:0]            fft_in_re,
  input  logic signed [15:0]            fft_in_im,
  output logic                          fft_out_valid,
  input  logic                          fft_out_ready,
  output logic signed [15:0]            fft_out_re,
  output logic signed [15:0]            fft_out_im,
  output logic                          fft_out_last,
  // ray-casting grid traversal (cop_clk); the occupancy map is outside
  input  logic                          rc_start_valid,
  output logic                          rc_start_ready,
  input  logic [2:0][3:0]               rc_start_cell,
  input  logic [2:0]                    rc_dir_neg,
  input  logic [2:0][15:0]              rc_t_max0,
  input  logic [2:0][15:0]              rc_t_delta,
  output logic [2:0][3:0]               rc_occ_cell,
  input  logic                          rc_occ_hit,
  output logic                          rc_out_valid,
  input  logic                          rc_out_ready,
  output logic [2:0][3:0]               rc_out_cell,
  output logic [1:0]                    rc_out_axis,
  output logic                          rc_out_hit,
  output logic                          rc_out_last
);
  localparam int unsigned NG = N_TILES / 4;

  // ---------------- reset synchronisers per clock domain
  logic [1:0] d_rs, s_rs;
  logic       data_rst_n, sync_rst_n;
  always_ff @(posedge data_clk or negedge rst_n)
    if (!rst_n) d_rs <= '0; else d_rs <= {d_rs[0], 1'b1};
  always_ff @(posedge sync_clk or negedge rst_n)
    if (!rst_n) s_rs <= '0; else s_rs <= {s_rs[0], 1'b1};
  assign data_rst_n = d_rs[1];
  assign sync_rst_n = s_rs[1];

  logic [N_TILES-1:0] pe_rst_n;
  for (genvar t = 0; t < N_TILES; t++) begin : g_prst
    logic [1:0] rs;
    always_ff @(posedge pe_clk[t] or negedge rst_n)
      if (!rst_n) rs <= '0; else rs <= {rs[0], 1'b1};
    assign pe_rst_n[t] = rs[1];
  end

  // ---------------- Data NoC side of the data adapters
  ocp_cmd_e [N_TILES-1:0]         dm_MCmd;
  logic [N_TILES-1:0][31:0]       dm_MAddr;
  logic [N_TILES-1:0][7:0]        dm_MBurstLen;
  logic [N_TILES-1:0][1:0]        dm_MFlag;
  logic [N_TILES-1:0]             dm_SCmdAcc, dm_MDataValid, dm_MDataLast, dm_SDataAcc;
  logic [N_TILES-1:0][63:0]       dm_MData, dm_SData;
  ocp_resp_e [N_TILES-1:0]        dm_SResp;
  logic [N_TILES-1:0]             dm_SRespLast, dm_MRespAcc;

  // ---------------- Synchronization NoC side of the sync adapters
  ocp_cmd_e [N_TILES-1:0]         sm_MCmd;
  logic [N_TILES-1:0][31:0]       sm_MAddr, sm_MData, sm_SData;
  logic [N_TILES-1:0][7:0]        sm_MBurstLen;
  logic [N_TILES-1:0][1:0]        sm_MFlag;
  logic [N_TILES-1:0]             sm_SCmdAcc, sm_MDataValid, sm_MDataLast, sm_SDataAcc;
  ocp_resp_e [N_TILES-1:0]        sm_SResp;
  logic [N_TILES-1:0]             sm_SRespLast, sm_MRespAcc;

  for (genvar t = 0; t < N_TILES; t++) begin : g_tile
    ocp_adapter #(.DW(64), .AW(32), .BURST_EN(1'b1), .LAZY_EN(1'b0)) u_data_adapter (
      .pe_clk(pe_clk[t]), .pe_rst_n(pe_rst_n[t]),
      .fsl_m_data(dfsl_m_data[t]), .fsl_m_control(dfsl_m_control[t]),
      .fsl_m_write(dfsl_m_write[t]), .fsl_m_full(dfsl_m_full[t]),
      .fsl_s_data(dfsl_s_data[t]), .fsl_s_control(dfsl_s_control[t]),
      .fsl_s_read(dfsl_s_read[t]), .fsl_s_exists(dfsl_s_exists[t]),
      .noc_clk(data_clk), .noc_rst_n(data_rst_n),
      .MCmd(dm_MCmd[t]), .MAddr(dm_MAddr[t]), .MBurstLen(dm_MBurstLen[t]), .MFlag(dm_MFlag[t]),
      .SCmdAcc(dm_SCmdAcc[t]), .MData(dm_MData[t]), .MDataValid(dm_MDataValid[t]),
      .MDataLast(dm_MDataLast[t]), .SDataAcc(dm_SDataAcc[t]), .SResp(dm_SResp[t]),
      .SData(dm_SData[t]), .SRespLast(dm_SRespLast[t]), .MRespAcc(dm_MRespAcc[t]));

    ocp_adapter #(.DW(32), .AW(32), .BURST_EN(1'b0), .LAZY_EN(1'b1)) u_sync_adapter (
      .pe_clk(pe_clk[t]), .pe_rst_n(pe_rst_n[t]),
      .fsl_m_data(sfsl_m_data[t]), .fsl_m_control(sfsl_m_control[t]),
      .fsl_m_write(sfsl_m_write[t]), .fsl_m_full(sfsl_m_full[t]),
      .fsl_s_data(sfsl_s_data[t]), .fsl_s_control(sfsl_s_control[t]),
      .fsl_s_read(sfsl_s_read[t]), .fsl_s_exists(sfsl_s_exists[t]),
      .noc_clk(sync_clk), .noc_rst_n(sync_rst_n),
      .MCmd(sm_MCmd[t]), .MAddr(sm_MAddr[t]), .MBurstLen(sm_MBurstLen[t]), .MFlag(sm_MFlag[t]),
      .SCmdAcc(sm_SCmdAcc[t]), .MData(sm_MData[t]), .MDataValid(sm_MDataValid[t]),
      .MDataLast(sm_MDataLast[t]), .SDataAcc(sm_SDataAcc[t]), .SResp(sm_SResp[t]),
      .SData(sm_SData[t]), .SRespLast(sm_SRespLast[t]), .MRespAcc(sm_MRespAcc[t]));
  end

  // ---------------- service adapter of the monitoring tile
  ocp_cmd_e    v_MCmd;
  logic [31:0] v_MAddr, v_MData, v_SData;
  logic [7:0]  v_MBurstLen;
  logic [1:0]  v_MFlag;
  logic        v_SCmdAcc, v_MDataValid, v_MDataLast, v_SDataAcc, v_SRespLast, v_MRespAcc;
  ocp_resp_e   v_SResp;

  ocp_adapter #(.DW(32), .AW(32), .BURST_EN(1'b0), .LAZY_EN(1'b0)) u_service_adapter (
    .pe_clk(pe_clk[PPC_TILE]), .pe_rst_n(pe_rst_n[PPC_TILE]),
    .fsl_m_data(vfsl_m_data), .fsl_m_control(vfsl_m_control),
    .fsl_m_write(vfsl_m_write), .fsl_m_full(vfsl_m_full),
    .fsl_s_data(vfsl_s_data), .fsl_s_control(vfsl_s_control),
    .fsl_s_read(vfsl_s_read), .fsl_s_exists(vfsl_s_exists),
    .noc_clk(data_clk), .noc_rst_n(data_rst_n),
    .MCmd(v_MCmd), .MAddr(v_MAddr), .MBurstLen(v_MBurstLen), .MFlag(v_MFlag),
    .SCmdAcc(v_SCmdAcc), .MData(v_MData), .MDataValid(v_MDataValid),
    .MDataLast(v_MDataLast), .SDataAcc(v_SDataAcc), .SResp(v_SResp),
    .SData(v_SData), .SRespLast(v_SRespLast), .MRespAcc(v_MRespAcc));

  // ---------------- service network
  logic [NG:0]          pm_we;
  logic [NG:0][11:0]    pm_addr;
  logic [NG:0][31:0]    pm_wdata, pm_rdata;
  logic [2*NG:0]        sw_we;
  logic [2*NG:0][11:0]  sw_addr;
  logic [2*NG:0][31:0]  sw_wdata, sw_rdata;

  service_noc #(.N_PM(NG + 1), .N_SW(2*NG + 1)) u_service_noc (
    .clk(data_clk), .rst_n(data_rst_n),
    .MCmd(v_MCmd), .MAddr(v_MAddr), .SCmdAcc(v_SCmdAcc), .MData(v_MData),
    .MDataValid(v_MDataValid), .SDataAcc(v_SDataAcc), .SResp(v_SResp), .SData(v_SData),
    .SRespLast(v_SRespLast), .MRespAcc(v_MRespAcc),
    .pm_we, .pm_addr, .pm_wdata, .pm_rdata,
    .sw_we, .sw_addr, .sw_wdata, .sw_rdata);

  // ---------------- Data NoC
  logic        pmo_vld, pmo_rdy, pmo_last, pm_full;
  logic [31:0] pmo_data;

  data_noc #(.N_M(N_TILES), .N_S(N_BANKS), .DW(64), .AW(32), .SLV_LSB(28)) u_data_noc (
    .clk(data_clk), .rst_n(data_rst_n),
    .m_MCmd(dm_MCmd), .m_MAddr(dm_MAddr), .m_MBurstLen(dm_MBurstLen), .m_MFlag(dm_MFlag),
    .m_SCmdAcc(dm_SCmdAcc), .m_MData(dm_MData), .m_MDataValid(dm_MDataValid),
    .m_MDataLast(dm_MDataLast), .m_SDataAcc(dm_SDataAcc), .m_SResp(dm_SResp),
    .m_SData(dm_SData), .m_SRespLast(dm_SRespLast), .m_MRespAcc(dm_MRespAcc),
    .d_MCmd, .d_MAddr, .d_MBurstLen, .d_MReqInfo, .d_SCmdAcc, .d_MData, .d_MDataValid,
    .d_MDataLast, .d_SDataAcc, .d_SResp, .d_SData, .d_SRespLast, .d_MRespAcc,
    .pm_vld(pmo_vld), .pm_rdy(pmo_rdy), .pm_data(pmo_data), .pm_last(pmo_last),
    .sw_we(sw_we[2*NG-1:0]), .sw_addr(sw_addr[2*NG-1:0]), .sw_wdata(sw_wdata[2*NG-1:0]),
    .sw_rdata(sw_rdata[2*NG-1:0]),
    .sc_we(pm_we), .sc_addr(pm_addr), .sc_wdata(pm_wdata), .sc_rdata(pm_rdata),
    .pms_we(sw_we[2*NG]), .pms_addr(sw_addr[2*NG]), .pms_wdata(sw_wdata[2*NG]),
    .pms_rdata(sw_rdata[2*NG]));

  // monitoring frames cross into the monitoring tile's clock domain
  assign pmo_rdy = !pm_full;
  bisync_fifo #(.DATA_W(32), .DEPTH(16)) u_pm_fifo (
    .M_Clk(data_clk), .M_Rst_n(data_rst_n), .M_Data(pmo_data), .M_Control(pmo_last),
    .M_Write(pmo_vld), .M_Full(pm_full),
    .S_Clk(pe_clk[PPC_TILE]), .S_Rst_n(pe_rst_n[PPC_TILE]), .S_Data(pm_s_data),
    .S_Control(pm_s_control), .S_Read(pm_s_read), .S_Exists(pm_s_exists));

  // ---------------- Synchronization NoC
  sync_noc #(.N_M(N_TILES), .MEM_BYTES(SHM_BYTES)) u_sync_noc (
    .clk(sync_clk), .rst_n(sync_rst_n),
    .m_MCmd(sm_MCmd), .m_MAddr(sm_MAddr), .m_MFlag(sm_MFlag), .m_SCmdAcc(sm_SCmdAcc),
    .m_MData(sm_MData), .m_MDataValid(sm_MDataValid), .m_MDataLast(sm_MDataLast),
    .m_SDataAcc(sm_SDataAcc), .m_SResp(sm_SResp), .m_SData(sm_SData),
    .m_SRespLast(sm_SRespLast), .m_MRespAcc(sm_MRespAcc),
    .locked(sync_locked));

  // ---------------- filter coprocessors (a separate case study, own ports)
  logic [1:0] c_rs;
  always_ff @(posedge cop_clk or negedge rst_n)
    if (!rst_n) c_rs <= '0; else c_rs <= {c_rs[0], 1'b1};
  for (genvar f = 0; f < 2; f++) begin : g_cop
    image_filter_3x3 #(.MEDIAN(f == 1)) u_filter (
      .clk(cop_clk), .rst_n(c_rs[1]),
      .in_valid(cop_in_valid[f]), .in_ready(cop_in_ready[f]),
      .in_row0(cop_in_row[f][0]), .in_row1(cop_in_row[f][1]), .in_row2(cop_in_row[f][2]),
      .out_valid(cop_out_valid[f]), .out_ready(cop_out_ready[f]), .out_data(cop_out_data[f]));
  end
  fft_radix4_256 u_fft (
    .clk(cop_clk), .rst_n(c_rs[1]),
    .in_valid(fft_in_valid), .in_ready(fft_in_ready), .in_re(fft_in_re), .in_im(fft_in_im),
    .out_valid(fft_out_valid), .out_ready(fft_out_ready), .out_re(fft_out_re), .out_im(fft_out_im),
    .out_last(fft_out_last));
  rcpg_traversal #(.GB(4), .TW(16)) u_rcpg (
    .clk(cop_clk), .rst_n(c_rs[1]),
    .start_valid(rc_start_valid), .start_ready(rc_start_ready), .start_cell(rc_start_cell),
    .dir_neg(rc_dir_neg), .t_max0(rc_t_max0), .t_delta(rc_t_delta),
    .occ_cell(rc_occ_cell), .occ_hit(rc_occ_hit),
    .out_valid(rc_out_valid), .out_ready(rc_out_ready), .out_cell(rc_out_cell),
    .out_axis(rc_out_axis), .out_hit(rc_out_hit), .out_last(rc_out_last));

endmodule
