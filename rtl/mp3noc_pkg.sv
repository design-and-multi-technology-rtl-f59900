// mp3noc_pkg -- types and constants shared by the MP3NOC multiprocessor.
//
// The system joins 16 processor tiles to 4 DDR2 banks through a Data NoC and to
// one shared on-chip memory through a Synchronization NoC, both wormhole packet
// networks.  This package fixes the encodings those blocks agree on:
//  * OCP commands (MCmd) and responses (SResp), as listed for the OCP 2.2
//    profile the tiles use (IDLE/WR/RD/RDEX/WRNP/RDL/WRC/BCST, NULL/DVA/FAIL/ERR).
//  * The NTTP transport: a packet is a header cell, an optional necker cell
//    holding the target offset, and data cells.  Cells travel one per word on a
//    link carrying Vld/RxRdy/Head/Tail/Data/Press.  The bit layout of the
//    header below is this implementation's own; only its fields (routing,
//    payload size, packet type, pressure, exclusive bit) come from the design.
//  * The service-ring host word and the performance-monitor event codes.
package mp3noc_pkg;

  // ---------------------------------------------------------------- OCP
  typedef enum logic [2:0] {
    OCP_IDLE = 3'd0, OCP_WR = 3'd1, OCP_RD = 3'd2, OCP_RDEX = 3'd3,
    OCP_WRNP = 3'd4, OCP_RDL = 3'd5, OCP_WRC = 3'd6, OCP_BCST = 3'd7
  } ocp_cmd_e;

  typedef enum logic [1:0] {
    RESP_NULL = 2'd0, RESP_DVA = 2'd1, RESP_FAIL = 2'd2, RESP_ERR = 2'd3
  } ocp_resp_e;

  // ---------------------------------------------------------------- NTTP
  typedef enum logic [2:0] {
    PKT_LOAD = 3'd0, PKT_STORE = 3'd1, PKT_LOCK = 3'd2, PKT_UNLOCK = 3'd3,
    PKT_RESP = 3'd4
  } pkt_op_e;

  localparam int unsigned ID_W  = 5;   // node identifiers (masters 0..15, slaves 0..3)
  localparam int unsigned LEN_W = 8;   // payload size in data cells
  localparam int unsigned HDR_W = 32;  // header cell occupies the low 32 bits of a word

  // Header cell (low HDR_W bits of the link word).
  typedef struct packed {
    logic [2:0]       rsvd;
    ocp_resp_e        status;   // response packets: DVA / FAIL / ERR
    logic             excl;     // "exclusive" information bit (lazy sync)
    logic [1:0]       press;    // pressure level copied from MFlag
    logic [LEN_W-1:0] len;      // number of data cells that follow
    logic [ID_W-1:0]  src;      // initiator id (response routing)
    logic [ID_W-1:0]  dst;      // target id (slave for requests, master for responses)
    pkt_op_e          op;
  } nttp_hdr_t;

  function automatic nttp_hdr_t make_hdr(pkt_op_e op, logic [ID_W-1:0] dst,
                                         logic [ID_W-1:0] src, logic [LEN_W-1:0] len,
                                         logic [1:0] press, logic excl, ocp_resp_e status);
    nttp_hdr_t h;
    h.rsvd = '0; h.status = status; h.excl = excl; h.press = press;
    h.len = len; h.src = src; h.dst = dst; h.op = op;
    return h;
  endfunction

  // ---------------------------------------------------------------- service ring
  // One host word per access: requests travel the ring until a stop whose
  // address window matches; it answers with a response word that travels on to
  // the bridge.  Register address = {stop base, register index}.
  localparam int unsigned SVC_AW = 16;
  localparam int unsigned SVC_DW = 32;
  typedef struct packed {
    logic              resp;   // 1: answer travelling back to the bridge
    logic              wr;     // 1: write, 0: read
    logic [SVC_AW-1:0] addr;
    logic [SVC_DW-1:0] data;
  } svc_word_t;
  localparam int unsigned SVC_WW = $bits(svc_word_t);

  // ---------------------------------------------------------------- monitoring
  typedef enum logic [2:0] {
    EV_PACKETS = 3'd0,  // request packets seen
    EV_LATENCY = 3'd1,  // cycles from request header to response header
    EV_WAIT    = 3'd2,  // cycles a request cell waited (Vld & !RxRdy)
    EV_PAYLOAD = 3'd3,  // request data cells
    EV_IDLE    = 3'd4   // cycles with no request cell
  } pm_event_e;

endpackage
