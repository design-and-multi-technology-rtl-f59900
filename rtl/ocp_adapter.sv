// ocp_adapter -- joins a processor's FSL links to an OCP master port of a NoC.
//
// A tile's processor talks over FSL, a 32-bit point-to-point FIFO channel with
// one control bit per word.  The adapter holds a pair of bi-synchronous FIFOs
// (request: tile -> NoC, response: NoC -> tile), so the tile and the NoC each
// keep their own clock, and a kernel in the NoC clock domain that turns the
// FSL word stream into OCP transfers and OCP responses back into FSL words.
// Three variants exist in the system, selected by parameters:
//   data adapter (DW=64, BURST_EN=1): OCP basic + burst signals + MFlag;
//   synchronization adapter (DW=32, LAZY_EN=1): single transfers, passes
//     ReadLinked / WriteConditional for lazy synchronization;
//   service adapter (DW=32): single transfers only, RDL/WRC become RD/WR.
// The variants and the FIFO pair follow the design; the FSL word format below
// is this implementation's own:
//   request  : word0 (Control=1) = {.., MFlag[12:11], BurstLen[10:3], MCmd[2:0]}
//              word1 (Control=0) = byte address
//              writes: BurstLen beats of DW/32 words each, low word first
//   response : word0 (Control=1) = {.., SResp[1:0]}
//              reads: BurstLen beats of DW/32 words each, low word first
// A BurstLen of 0 is taken as 1; without BURST_EN it is forced to 1.
//
// OCP timing used throughout the system: MCmd is held until SCmdAcc; write
// beats follow with MDataValid until SDataAcc; the target answers every
// command (reads with BurstLen beats, writes with one DVA/FAIL/ERR beat),
// each beat held until MRespAcc.  One transfer is outstanding at a time.
module ocp_adapter
  import mp3noc_pkg::*;
#(
  parameter int unsigned DW         = 64,
  parameter int unsigned AW         = 32,
  parameter bit          BURST_EN   = 1'b1,
  parameter bit          LAZY_EN    = 1'b0,
  parameter int unsigned FIFO_DEPTH = 16
) (
  // tile clock domain: FSL master (tile -> adapter) and FSL slave (adapter -> tile)
  input  logic          pe_clk,
  input  logic          pe_rst_n,
  input  logic [31:0]   fsl_m_data,
  input  logic          fsl_m_control,
  input  logic          fsl_m_write,
  output logic          fsl_m_full,
  output logic [31:0]   fsl_s_data,
  output logic          fsl_s_control,
  input  logic          fsl_s_read,
  output logic          fsl_s_exists,
  // NoC clock domain: OCP master
  input  logic          noc_clk,
  input  logic          noc_rst_n,
  output ocp_cmd_e      MCmd,
  output logic [AW-1:0] MAddr,
  output logic [7:0]    MBurstLen,
  output logic [1:0]    MFlag,
  input  logic          SCmdAcc,
  output logic [DW-1:0] MData,
  output logic          MDataValid,
  output logic          MDataLast,
  input  logic          SDataAcc,
  input  ocp_resp_e     SResp,
  input  logic [DW-1:0] SData,
  input  logic          SRespLast,
  output logic          MRespAcc
);
  localparam int unsigned NW = DW / 32;          // FSL words per OCP beat
  localparam int unsigned WW = (NW > 1) ? $clog2(NW) : 1;

  // ---------------- FIFO pair
  logic [31:0] rq_data;  logic rq_ctrl, rq_read, rq_exists;
  logic [31:0] rs_data;  logic rs_ctrl, rs_write, rs_full;

  bisync_fifo #(.DATA_W(32), .DEPTH(FIFO_DEPTH)) u_req_fifo (
    .M_Clk(pe_clk), .M_Rst_n(pe_rst_n), .M_Data(fsl_m_data), .M_Control(fsl_m_control),
    .M_Write(fsl_m_write), .M_Full(fsl_m_full),
    .S_Clk(noc_clk), .S_Rst_n(noc_rst_n), .S_Data(rq_data), .S_Control(rq_ctrl),
    .S_Read(rq_read), .S_Exists(rq_exists));

  bisync_fifo #(.DATA_W(32), .DEPTH(FIFO_DEPTH)) u_rsp_fifo (
    .M_Clk(noc_clk), .M_Rst_n(noc_rst_n), .M_Data(rs_data), .M_Control(rs_ctrl),
    .M_Write(rs_write), .M_Full(rs_full),
    .S_Clk(pe_clk), .S_Rst_n(pe_rst_n), .S_Data(fsl_s_data), .S_Control(fsl_s_control),
    .S_Read(fsl_s_read), .S_Exists(fsl_s_exists));

  // ---------------- kernel
  typedef enum logic [2:0] {K_CMD, K_ADDR, K_REQ, K_WGATHER, K_WBEAT, K_RHDR, K_RDATA} kst_e;
  kst_e            st;
  ocp_cmd_e        cmd_q;
  logic [7:0]      len_q, beat_q;
  logic [1:0]      flag_q;
  logic [AW-1:0]   addr_q;
  logic [DW-1:0]   wbuf;
  logic [WW-1:0]   widx;
  logic            is_wr;

  function automatic ocp_cmd_e map_cmd(logic [2:0] c);
    ocp_cmd_e m;
    m = ocp_cmd_e'(c);
    if (!LAZY_EN && m == OCP_RDL) m = OCP_RD;
    if (!LAZY_EN && m == OCP_WRC) m = OCP_WR;
    return m;
  endfunction

  function automatic logic cmd_is_write(ocp_cmd_e c);
    return (c == OCP_WR) || (c == OCP_WRNP) || (c == OCP_WRC) || (c == OCP_BCST);
  endfunction

  assign MCmd       = (st == K_REQ) ? cmd_q : OCP_IDLE;
  assign MAddr      = addr_q;
  assign MBurstLen  = len_q;
  assign MFlag      = flag_q;
  assign MData      = wbuf;
  assign MDataValid = (st == K_WBEAT);
  assign MDataLast  = (st == K_WBEAT) && (beat_q == len_q - 8'd1);

  always_comb begin
    rq_read  = 1'b0;
    rs_write = 1'b0;
    rs_ctrl  = 1'b0;
    rs_data  = '0;
    MRespAcc = 1'b0;
    unique case (st)
      K_CMD:     rq_read = rq_exists;                       // drop stray data words
      K_ADDR:    rq_read = rq_exists;
      K_WGATHER: rq_read = rq_exists;
      K_RHDR: begin
        rs_write = (SResp != RESP_NULL) && !rs_full;
        rs_ctrl  = 1'b1;
        rs_data  = {30'd0, SResp};
        // a write answer is a single beat: consume it with the header word
        MRespAcc = rs_write && is_wr;
      end
      K_RDATA: begin
        rs_write = (SResp != RESP_NULL) && !rs_full;
        rs_data  = SData[32*widx +: 32];
        MRespAcc = rs_write && (widx == WW'(NW-1));
      end
      default: ;
    endcase
  end

  always_ff @(posedge noc_clk or negedge noc_rst_n) begin
    if (!noc_rst_n) begin
      st <= K_CMD; cmd_q <= OCP_IDLE; len_q <= 8'd1; beat_q <= '0; flag_q <= '0;
      addr_q <= '0; wbuf <= '0; widx <= '0; is_wr <= 1'b0;
    end else begin
      unique case (st)
        K_CMD: if (rq_exists && rq_ctrl) begin
          cmd_q  <= map_cmd(rq_data[2:0]);
          is_wr  <= cmd_is_write(map_cmd(rq_data[2:0]));
          len_q  <= (!BURST_EN || rq_data[10:3] == 8'd0) ? 8'd1 : rq_data[10:3];
          flag_q <= rq_data[12:11];
          st     <= K_ADDR;
        end
        K_ADDR: if (rq_exists) begin
          addr_q <= AW'(rq_data);
          beat_q <= '0;
          widx   <= '0;
          st     <= K_REQ;
        end
        K_REQ: if (SCmdAcc) st <= is_wr ? K_WGATHER : K_RHDR;
        K_WGATHER: if (rq_exists) begin
          wbuf[32*widx +: 32] <= rq_data;
          if (widx == WW'(NW-1)) begin widx <= '0; st <= K_WBEAT; end
          else widx <= widx + 1'b1;
        end
        K_WBEAT: if (SDataAcc) begin
          if (beat_q == len_q - 8'd1) begin beat_q <= '0; st <= K_RHDR; end
          else begin beat_q <= beat_q + 8'd1; st <= K_WGATHER; end
        end
        K_RHDR: if (rs_write) st <= is_wr ? K_CMD : K_RDATA;
        K_RDATA: if (rs_write) begin
          if (widx == WW'(NW-1)) begin
            widx <= '0;
            if (SRespLast || beat_q == len_q - 8'd1) st <= K_CMD;
            beat_q <= beat_q + 8'd1;
          end else widx <= widx + 1'b1;
        end
        default: st <= K_CMD;
      endcase
    end
  end

endmodule
