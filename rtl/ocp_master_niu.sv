// ocp_master_niu -- OCP-to-NTTP network interface unit (initiator side).
//
// Sits at the NoC boundary in front of each tile's OCP adapter.  It accepts one
// OCP transfer at a time on its OCP target port, turns it into an NTTP request
// packet on the request network, and turns the matching response packet back
// into OCP response beats.
//   * Translation table: the OCP byte address is split in two; the bits from
//     SLV_LSB upward select the target (slave id in the header cell), the bits
//     below are the offset carried by the necker cell.
//   * Packets: header cell, necker cell, then one data cell per OCP beat for
//     stores.  Responses are a header cell (status) plus data cells for loads.
//   * Locked synchronization: ReadExclusive sends a LOCK packet ahead of the
//     LOAD; the next write sends its STORE followed by an UNLOCK packet.  The
//     switches keep the locked path reserved in between.
//   * Lazy synchronization: ReadLinked / WriteConditional become LOAD / STORE
//     with the header's "exclusive" bit set; a FAIL status in the response is
//     handed to the initiator as SResp=FAIL.
//   * MFlag is copied into the header's pressure field and onto the link's
//     Press wires for arbitration.
// The packet behaviour follows the design; the header layout (mp3noc_pkg),
// the one-transfer-at-a-time policy and the local ERR answer to Broadcast are
// this implementation's choices.
//
// Link timing: a cell moves when vld && rdy.  OCP timing as in ocp_adapter.
module ocp_master_niu
  import mp3noc_pkg::*;
#(
  parameter int unsigned DW        = 64,
  parameter int unsigned AW        = 32,
  parameter int unsigned MASTER_ID = 0,
  parameter int unsigned N_SLAVES  = 4,
  parameter int unsigned SLV_LSB   = 28
) (
  input  logic          clk,
  input  logic          rst_n,
  // OCP target port (from the tile's adapter)
  input  ocp_cmd_e      MCmd,
  input  logic [AW-1:0] MAddr,
  input  logic [7:0]    MBurstLen,
  input  logic [1:0]    MFlag,
  output logic          SCmdAcc,
  input  logic [DW-1:0] MData,
  input  logic          MDataValid,
  input  logic          MDataLast,
  output logic          SDataAcc,
  output ocp_resp_e     SResp,
  output logic [DW-1:0] SData,
  output logic          SRespLast,
  input  logic          MRespAcc,
  // NTTP request link out
  output logic          tx_vld,
  input  logic          tx_rdy,
  output logic          tx_head,
  output logic          tx_tail,
  output logic [1:0]    tx_press,
  output logic [DW-1:0] tx_data,
  // NTTP response link in
  input  logic          rx_vld,
  output logic          rx_rdy,
  input  logic          rx_head,
  input  logic          rx_tail,
  input  logic [DW-1:0] rx_data
);
  localparam int unsigned SB = (N_SLAVES > 1) ? $clog2(N_SLAVES) : 1;

  typedef enum logic [3:0] {
    S_IDLE, S_LOCK, S_HDR, S_NECK, S_DATA, S_UNLOCK, S_RHDR, S_RDATA, S_WRESP, S_LERR
  } st_e;
  st_e st;

  ocp_cmd_e        cmd_q;
  logic [AW-1:0]   addr_q;
  logic [7:0]      len_q;
  logic [1:0]      press_q;
  logic            locked;          // a ReadExclusive has locked the path
  ocp_resp_e       rstat;
  nttp_hdr_t       rh;

  logic is_rd, is_wr;
  assign is_rd = (cmd_q == OCP_RD) || (cmd_q == OCP_RDEX) || (cmd_q == OCP_RDL);
  assign is_wr = (cmd_q == OCP_WR) || (cmd_q == OCP_WRNP) || (cmd_q == OCP_WRC);

  logic [ID_W-1:0] dst;
  assign dst = (N_SLAVES > 1) ? ID_W'(addr_q[SLV_LSB +: SB]) : '0;

  logic [DW-1:0] offset;
  assign offset = DW'(addr_q[SLV_LSB-1:0]);

  nttp_hdr_t hdr;
  always_comb begin
    hdr = make_hdr(is_wr ? PKT_STORE : PKT_LOAD, dst, ID_W'(MASTER_ID), len_q, press_q,
                   (cmd_q == OCP_RDL) || (cmd_q == OCP_WRC), RESP_NULL);
    if (st == S_LOCK)   hdr.op = PKT_LOCK;
    if (st == S_UNLOCK) hdr.op = PKT_UNLOCK;
    if (st == S_LOCK || st == S_UNLOCK) hdr.len = '0;
  end

  assign rh = nttp_hdr_t'(rx_data[HDR_W-1:0]);

  // ---------------- outputs
  always_comb begin
    SCmdAcc  = (st == S_IDLE) && (MCmd != OCP_IDLE);
    SDataAcc = (st == S_DATA) && tx_rdy;
    tx_vld   = 1'b0; tx_head = 1'b0; tx_tail = 1'b0;
    tx_press = press_q;
    tx_data  = '0;
    rx_rdy   = 1'b0;
    SResp    = RESP_NULL; SData = rx_data; SRespLast = 1'b0;
    unique case (st)
      S_LOCK, S_UNLOCK: begin
        tx_vld = 1'b1; tx_head = 1'b1; tx_tail = 1'b1;
        tx_data = DW'(hdr);
      end
      S_HDR:  begin tx_vld = 1'b1; tx_head = 1'b1; tx_data = DW'(hdr); end
      S_NECK: begin tx_vld = 1'b1; tx_tail = !is_wr; tx_data = offset; end
      S_DATA: begin tx_vld = MDataValid; tx_tail = MDataLast; tx_data = MData; end
      S_RHDR: rx_rdy = 1'b1;
      S_RDATA: begin
        SResp = rx_vld ? rstat : RESP_NULL;
        SRespLast = rx_tail;
        rx_rdy = MRespAcc;
      end
      S_WRESP: begin SResp = rstat; SRespLast = 1'b1; end
      S_LERR:  begin SResp = RESP_ERR; SRespLast = 1'b1; end
      default: ;
    endcase
  end

  // ---------------- sequencing
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; cmd_q <= OCP_IDLE; addr_q <= '0; len_q <= 8'd1; press_q <= '0;
      locked <= 1'b0; rstat <= RESP_NULL;
    end else begin
      unique case (st)
        S_IDLE: if (MCmd != OCP_IDLE) begin
          cmd_q   <= MCmd;
          addr_q  <= MAddr;
          len_q   <= (MBurstLen == 8'd0) ? 8'd1 : MBurstLen;
          press_q <= MFlag;
          if (MCmd == OCP_BCST) st <= S_LERR;
          else if (MCmd == OCP_RDEX && !locked) st <= S_LOCK;
          else st <= S_HDR;
        end
        S_LOCK:   if (tx_rdy) begin locked <= 1'b1; st <= S_HDR; end
        S_HDR:    if (tx_rdy) st <= S_NECK;
        S_NECK:   if (tx_rdy) st <= is_wr ? S_DATA : S_RHDR;
        S_DATA:   if (MDataValid && tx_rdy && MDataLast) st <= locked ? S_UNLOCK : S_RHDR;
        S_UNLOCK: if (tx_rdy) begin locked <= 1'b0; st <= S_RHDR; end
        S_RHDR: if (rx_vld && rx_head) begin
          rstat <= (rh.status == RESP_NULL) ? RESP_DVA : rh.status;
          if (rx_tail) st <= is_rd ? S_IDLE : S_WRESP;   // a load always carries data
          else st <= S_RDATA;
        end
        S_RDATA: if (rx_vld && MRespAcc && rx_tail) st <= S_IDLE;
        S_WRESP: if (MRespAcc) st <= S_IDLE;
        S_LERR:  if (MRespAcc) st <= S_IDLE;
        default: st <= S_IDLE;
      endcase
    end
  end

endmodule
