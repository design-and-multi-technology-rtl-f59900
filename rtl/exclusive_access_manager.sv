// exclusive_access_manager -- reservation monitor for lazy synchronization.
//
// The shared memory's controller has no monitor logic of its own, so this
// block sits in front of it on the OCP path from the Synchronization NoC's
// target interface.  It gives Load-Linked / Store-Conditional semantics:
//   * ReadLinked from initiator m at address a sets m's reservation tag on a
//     and is passed on as a plain read.
//   * WriteConditional from m at a is passed on as a plain write only if m's
//     tag is still set on a; otherwise it is not performed, its data beats are
//     absorbed and the initiator gets SResp=FAIL.
//   * Every write that reaches memory (Write, WriteNonPost or a successful
//     WriteConditional) clears the tags of all initiators on that address, so
//     competing traffic between the ReadLinked and the WriteConditional breaks
//     the reservation.  Nothing is locked.
// The behaviour follows the design's description of lazy synchronization; one
// tag per initiator (N_INIT of them), word-address matching and keeping the
// tags in this OCP-side block rather than in the packet layer are this
// implementation's choices.  It adds no cycle of latency: commands, data and
// responses pass through combinationally except for a failed WriteConditional,
// which is answered by the block itself one cycle after its last data beat.
module exclusive_access_manager
  import mp3noc_pkg::*;
#(
  parameter int unsigned DW     = 32,
  parameter int unsigned AW     = 16,
  parameter int unsigned N_INIT = 16
) (
  input  logic            clk,
  input  logic            rst_n,
  // OCP target port (from the slave NIU)
  input  ocp_cmd_e        s_MCmd,
  input  logic [AW-1:0]   s_MAddr,
  input  logic [7:0]      s_MBurstLen,
  input  logic [ID_W-1:0] s_MReqInfo,
  output logic            s_SCmdAcc,
  input  logic [DW-1:0]   s_MData,
  input  logic            s_MDataValid,
  input  logic            s_MDataLast,
  output logic            s_SDataAcc,
  output ocp_resp_e       s_SResp,
  output logic [DW-1:0]   s_SData,
  output logic            s_SRespLast,
  input  logic            s_MRespAcc,
  // OCP master port (to the memory)
  output ocp_cmd_e        m_MCmd,
  output logic [AW-1:0]   m_MAddr,
  output logic [7:0]      m_MBurstLen,
  input  logic            m_SCmdAcc,
  output logic [DW-1:0]   m_MData,
  output logic            m_MDataValid,
  output logic            m_MDataLast,
  input  logic            m_SDataAcc,
  input  ocp_resp_e       m_SResp,
  input  logic [DW-1:0]   m_SData,
  input  logic            m_SRespLast,
  output logic            m_MRespAcc
);
  localparam int unsigned WB = $clog2(DW / 8);     // byte-offset bits ignored

  typedef enum logic [1:0] {E_PASS, E_ABSORB, E_FAIL} st_e;
  st_e st;

  logic [N_INIT-1:0] resv;
  logic [AW-1:0]     resv_addr [N_INIT];
  localparam int unsigned RW = (N_INIT > 1) ? $clog2(N_INIT) : 1;
  logic [RW-1:0]     rid;      // reservation slot of the requesting initiator
  assign rid = RW'(s_MReqInfo);

  logic [AW-1:0] waddr;
  assign waddr = s_MAddr >> WB;

  logic wrc_ok;
  assign wrc_ok = (32'(s_MReqInfo) < N_INIT) && resv[rid] &&
                  (resv_addr[rid] == waddr);

  logic fail_now;   // a WriteConditional that must not reach memory
  assign fail_now = (st == E_PASS) && (s_MCmd == OCP_WRC) && !wrc_ok;

  always_comb begin
    m_MCmd       = OCP_IDLE;
    m_MAddr      = s_MAddr;
    m_MBurstLen  = s_MBurstLen;
    m_MData      = s_MData;
    m_MDataValid = 1'b0;
    m_MDataLast  = s_MDataLast;
    m_MRespAcc   = s_MRespAcc;
    s_SCmdAcc    = 1'b0;
    s_SDataAcc   = 1'b0;
    s_SResp      = m_SResp;
    s_SData      = m_SData;
    s_SRespLast  = m_SRespLast;
    unique case (st)
      E_PASS: begin
        if (fail_now) s_SCmdAcc = 1'b1;
        else begin
          unique case (s_MCmd)
            OCP_RDL: m_MCmd = OCP_RD;
            OCP_WRC: m_MCmd = OCP_WR;
            default: m_MCmd = s_MCmd;
          endcase
          s_SCmdAcc    = m_SCmdAcc;
          m_MDataValid = s_MDataValid;
          s_SDataAcc   = m_SDataAcc;
        end
      end
      E_ABSORB: begin
        s_SDataAcc = 1'b1;
        s_SResp    = RESP_NULL;
        m_MRespAcc = 1'b0;
      end
      E_FAIL: begin
        s_SResp     = RESP_FAIL;
        s_SData     = '0;
        s_SRespLast = 1'b1;
        m_MRespAcc  = 1'b0;
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st   <= E_PASS;
      resv <= '0;
      for (int i = 0; i < N_INIT; i++) resv_addr[i] <= '0;
    end else begin
      unique case (st)
        E_PASS: if (s_MCmd != OCP_IDLE && s_SCmdAcc) begin
          if (fail_now) st <= E_ABSORB;
          else if (s_MCmd == OCP_RDL && 32'(s_MReqInfo) < N_INIT) begin
            resv[rid]      <= 1'b1;
            resv_addr[rid] <= waddr;
          end else if (s_MCmd == OCP_WR || s_MCmd == OCP_WRNP || s_MCmd == OCP_WRC) begin
            for (int i = 0; i < N_INIT; i++)
              if (resv_addr[i] == waddr) resv[i] <= 1'b0;
          end
        end
        E_ABSORB: if (s_MDataValid && s_MDataLast) st <= E_FAIL;
        E_FAIL:   if (s_MRespAcc) st <= E_PASS;
        default:  st <= E_PASS;
      endcase
    end
  end

endmodule
