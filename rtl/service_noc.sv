// service_noc -- the run-time configuration and status network.
//
// Main ring:      bridge -> node -> N_PM monitor stops -> back to the bridge
// Secondary ring: node -> N_SW switch stops -> back to the node
// The bridge takes OCP transfers from the monitoring tile; each becomes one
// word that travels the ring to the stop owning its address and comes back as
// an answer.  Ring addresses (16-bit byte address used as a word index):
//   [15:11] stop id: 0..N_PM-1 monitor stops, 16..16+N_SW-1 switch stops
//   [10:0]  register index inside the stop
// Every stop exposes a plain register port (we / addr / wdata / rdata) that
// the top level wires to a statistic collector or a switch.  The ring
// structure (one main ring with the monitors, a node, a secondary ring with
// the switch hosts) follows the design; the address map is this
// implementation's own.
module service_noc
  import mp3noc_pkg::*;
#(
  parameter int unsigned N_PM = 5,
  parameter int unsigned N_SW = 9
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // OCP target port from the service adapter
  input  ocp_cmd_e              MCmd,
  input  logic [31:0]           MAddr,
  output logic                  SCmdAcc,
  input  logic [31:0]           MData,
  input  logic                  MDataValid,
  output logic                  SDataAcc,
  output ocp_resp_e             SResp,
  output logic [31:0]           SData,
  output logic                  SRespLast,
  input  logic                  MRespAcc,
  // register ports of the monitor stops
  output logic [N_PM-1:0]       pm_we,
  output logic [N_PM-1:0][11:0] pm_addr,
  output logic [N_PM-1:0][31:0] pm_wdata,
  input  logic [N_PM-1:0][31:0] pm_rdata,
  // register ports of the switch stops
  output logic [N_SW-1:0]       sw_we,
  output logic [N_SW-1:0][11:0] sw_addr,
  output logic [N_SW-1:0][31:0] sw_wdata,
  input  logic [N_SW-1:0][31:0] sw_rdata
);
  // main ring links: m[0] bridge->node, m[1] node->pm0, ..., m[N_PM+1] -> bridge
  logic      m_vld [N_PM+2];
  logic      m_rdy [N_PM+2];
  svc_word_t m_dat [N_PM+2];
  // secondary ring links: s[0] node->sw0, ..., s[N_SW] -> node
  logic      s_vld [N_SW+1];
  logic      s_rdy [N_SW+1];
  svc_word_t s_dat [N_SW+1];

  service_host_bridge u_bridge (
    .clk, .rst_n, .MCmd, .MAddr, .SCmdAcc, .MData, .MDataValid, .SDataAcc,
    .SResp, .SData, .SRespLast, .MRespAcc,
    .out_vld(m_vld[0]), .out_rdy(m_rdy[0]), .out_data(m_dat[0]),
    .in_vld(m_vld[N_PM+1]), .in_rdy(m_rdy[N_PM+1]), .in_data(m_dat[N_PM+1]));

  service_node #(.SEC_LO(16), .SEC_HI(16 + N_SW - 1)) u_node (
    .clk, .rst_n,
    .main_in_vld(m_vld[0]), .main_in_rdy(m_rdy[0]), .main_in_data(m_dat[0]),
    .main_out_vld(m_vld[1]), .main_out_rdy(m_rdy[1]), .main_out_data(m_dat[1]),
    .sec_out_vld(s_vld[0]), .sec_out_rdy(s_rdy[0]), .sec_out_data(s_dat[0]),
    .sec_in_vld(s_vld[N_SW]), .sec_in_rdy(s_rdy[N_SW]), .sec_in_data(s_dat[N_SW]));

  for (genvar p = 0; p < N_PM; p++) begin : g_pm
    service_ring_stop #(.STOP_ID(p)) u_stop (
      .clk, .rst_n,
      .in_vld(m_vld[p+1]), .in_rdy(m_rdy[p+1]), .in_data(m_dat[p+1]),
      .out_vld(m_vld[p+2]), .out_rdy(m_rdy[p+2]), .out_data(m_dat[p+2]),
      .reg_we(pm_we[p]), .reg_addr(pm_addr[p]), .reg_wdata(pm_wdata[p]), .reg_rdata(pm_rdata[p]));
  end

  for (genvar k = 0; k < N_SW; k++) begin : g_sw
    service_ring_stop #(.STOP_ID(16 + k)) u_stop (
      .clk, .rst_n,
      .in_vld(s_vld[k]), .in_rdy(s_rdy[k]), .in_data(s_dat[k]),
      .out_vld(s_vld[k+1]), .out_rdy(s_rdy[k+1]), .out_data(s_dat[k+1]),
      .reg_we(sw_we[k]), .reg_addr(sw_addr[k]), .reg_wdata(sw_wdata[k]), .reg_rdata(sw_rdata[k]));
  end

endmodule
