// ocp_slave_niu -- NTTP-to-OCP network interface unit (target side).
//
// Sits at the NoC boundary in front of a memory controller (Data NoC) or the
// shared memory (Synchronization NoC).  It takes one request packet at a time
// from the request network, drives the matching OCP transfer on its OCP master
// port and sends the answer back as a response packet addressed to the
// initiator named in the request header.
//   LOAD  -> RD  (RDL when the exclusive bit is set), MBurstLen = header len
//   STORE -> WR  (WRC when the exclusive bit is set), data cells -> write beats
//   LOCK / UNLOCK -> consumed here without an answer; they only steer the
//                    switches on the way.
// MReqInfo carries the initiator id to the target so that an exclusive access
// manager can keep one reservation per initiator.  The response header takes
// its status from the first response beat; for loads each beat becomes one
// data cell, so nothing is buffered.
// The packet conversion follows the design; MReqInfo and the no-answer rule
// for LOCK/UNLOCK are this implementation's choices.
module ocp_slave_niu
  import mp3noc_pkg::*;
#(
  parameter int unsigned DW       = 64,
  parameter int unsigned AW       = 28,
  parameter int unsigned SLAVE_ID = 0
) (
  input  logic            clk,
  input  logic            rst_n,
  // NTTP request link in
  input  logic            rx_vld,
  output logic            rx_rdy,
  input  logic            rx_head,
  input  logic            rx_tail,
  input  logic [DW-1:0]   rx_data,
  // NTTP response link out
  output logic            tx_vld,
  input  logic            tx_rdy,
  output logic            tx_head,
  output logic            tx_tail,
  output logic [1:0]      tx_press,
  output logic [DW-1:0]   tx_data,
  // OCP master port (to the target)
  output ocp_cmd_e        MCmd,
  output logic [AW-1:0]   MAddr,
  output logic [7:0]      MBurstLen,
  output logic [ID_W-1:0] MReqInfo,
  input  logic            SCmdAcc,
  output logic [DW-1:0]   MData,
  output logic            MDataValid,
  output logic            MDataLast,
  input  logic            SDataAcc,
  input  ocp_resp_e       SResp,
  input  logic [DW-1:0]   SData,
  input  logic            SRespLast,
  output logic            MRespAcc
);
  typedef enum logic [2:0] {S_HDR, S_NECK, S_CMD, S_WDATA, S_RHDR, S_RDATA} st_e;
  st_e st;

  nttp_hdr_t hq, rxh;
  logic [AW-1:0] addr_q;
  assign rxh = nttp_hdr_t'(rx_data[HDR_W-1:0]);

  logic is_store;
  assign is_store = (hq.op == PKT_STORE);

  nttp_hdr_t rsp_hdr;
  assign rsp_hdr = make_hdr(PKT_RESP, hq.src, ID_W'(SLAVE_ID), is_store ? '0 : hq.len,
                            hq.press, hq.excl, SResp);

  always_comb begin
    rx_rdy = 1'b0;
    tx_vld = 1'b0; tx_head = 1'b0; tx_tail = 1'b0; tx_data = '0;
    tx_press = hq.press;
    MCmd = OCP_IDLE;
    MAddr = addr_q; MBurstLen = hq.len; MReqInfo = hq.src;
    MData = rx_data; MDataValid = 1'b0; MDataLast = rx_tail;
    MRespAcc = 1'b0;
    unique case (st)
      S_HDR:  rx_rdy = 1'b1;
      S_NECK: rx_rdy = 1'b1;
      S_CMD:  MCmd = is_store ? (hq.excl ? OCP_WRC : OCP_WR) : (hq.excl ? OCP_RDL : OCP_RD);
      S_WDATA: begin MDataValid = rx_vld; rx_rdy = SDataAcc; end
      S_RHDR: begin
        tx_vld  = (SResp != RESP_NULL);
        tx_head = 1'b1;
        tx_tail = is_store;
        tx_data = DW'(rsp_hdr);
        MRespAcc = is_store && tx_rdy;      // a write answer is fully in the header
      end
      S_RDATA: begin
        tx_vld  = (SResp != RESP_NULL);
        tx_tail = SRespLast;
        tx_data = SData;
        MRespAcc = tx_rdy;
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_HDR; hq <= '0; addr_q <= '0;
    end else begin
      unique case (st)
        S_HDR: if (rx_vld && rx_head) begin
          hq <= rxh;
          if (rxh.len == '0 && rxh.op == PKT_LOAD) hq.len <= 8'd1;
          // LOCK / UNLOCK are single-cell packets consumed here
          if (!rx_tail && (rxh.op == PKT_LOAD || rxh.op == PKT_STORE)) st <= S_NECK;
        end
        S_NECK: if (rx_vld) begin
          addr_q <= AW'(rx_data);
          st <= S_CMD;
        end
        S_CMD:   if (SCmdAcc) st <= is_store ? S_WDATA : S_RHDR;
        S_WDATA: if (rx_vld && SDataAcc && rx_tail) st <= S_RHDR;
        S_RHDR:  if (SResp != RESP_NULL && tx_rdy) st <= is_store ? S_HDR : S_RDATA;
        S_RDATA: if (SResp != RESP_NULL && tx_rdy && SRespLast) st <= S_HDR;
        default: st <= S_HDR;
      endcase
    end
  end

endmodule
