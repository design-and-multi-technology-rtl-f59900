// tb_exclusive_access_manager -- self-checking test of the LL/SC reservation
// monitor.  The testbench is an OCP initiator that impersonates several
// processors through MReqInfo; a shared_memory instance is the target, so the
// memory contents are checked as well as the answers.  Scenarios: a clean
// ReadLinked/WriteConditional pair succeeds; of two processors racing for the
// same word only the first WriteConditional succeeds; a plain write between
// ReadLinked and WriteConditional breaks the reservation; a WriteConditional
// with no reservation or to another address fails.  A failed
// WriteConditional must leave the memory unchanged and answer FAIL.
`timescale 1ns/1ps
module tb_exclusive_access_manager;
  import mp3noc_pkg::*;
  localparam int DW = 32, AW = 16;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  ocp_cmd_e s_MCmd, m_MCmd; logic [AW-1:0] s_MAddr, m_MAddr; logic [7:0] s_MBurstLen, m_MBurstLen;
  logic [ID_W-1:0] s_MReqInfo;
  logic s_SCmdAcc, s_MDataValid, s_MDataLast, s_SDataAcc, s_SRespLast, s_MRespAcc;
  logic m_SCmdAcc, m_MDataValid, m_MDataLast, m_SDataAcc, m_SRespLast, m_MRespAcc;
  logic [DW-1:0] s_MData, s_SData, m_MData, m_SData; ocp_resp_e s_SResp, m_SResp;

  exclusive_access_manager #(.DW(DW), .AW(AW), .N_INIT(16)) dut (.*);
  shared_memory #(.SIZE_BYTES(4096), .DW(DW), .AW(AW)) mem (.clk, .rst_n,
    .MCmd(m_MCmd), .MAddr(m_MAddr), .MBurstLen(m_MBurstLen), .SCmdAcc(m_SCmdAcc),
    .MData(m_MData), .MDataValid(m_MDataValid), .MDataLast(m_MDataLast), .SDataAcc(m_SDataAcc),
    .SResp(m_SResp), .SData(m_SData), .SRespLast(m_SRespLast), .MRespAcc(m_MRespAcc));

  int checks = 0, failures = 0;
  function automatic void chk(input bit ok, input string msg);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endfunction
  initial begin
    #200000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  logic cacc_q, dacc_q, racc_q; int mem_writes = 0;
  always @(negedge clk) begin
    #2;
    cacc_q = (s_MCmd != OCP_IDLE) && s_SCmdAcc;
    dacc_q = s_MDataValid && s_SDataAcc;
    racc_q = (s_SResp != RESP_NULL) && s_MRespAcc;
  end
  always @(posedge clk) if (m_MDataValid && m_SDataAcc) mem_writes++;

  // one OCP transfer of one beat; returns the response and read data
  task automatic xfer(input ocp_cmd_e c, input logic [AW-1:0] a, input int who,
                      input logic [DW-1:0] wd, output ocp_resp_e r, output logic [DW-1:0] rd);
    bit wr; int t;
    wr = (c == OCP_WR || c == OCP_WRC || c == OCP_WRNP);
    @(negedge clk);
    s_MCmd = c; s_MAddr = a; s_MBurstLen = 1; s_MReqInfo = ID_W'(who);
    t = 0; do begin @(negedge clk); t++; end while (!cacc_q && t < 100);
    s_MCmd = OCP_IDLE;
    if (wr) begin
      s_MData = wd; s_MDataValid = 1; s_MDataLast = 1;
      t = 0; do begin @(negedge clk); t++; end while (!dacc_q && t < 100);
      s_MDataValid = 0;
    end
    t = 0;
    forever begin
      s_MRespAcc = ($urandom_range(0, 2) != 0);
      @(negedge clk); t++;
      if (racc_q) begin r = s_SResp_q; rd = s_SData_q; break; end
      if (t > 200) begin r = RESP_NULL; rd = '0; break; end
    end
    s_MRespAcc = 0;
  endtask
  ocp_resp_e s_SResp_q; logic [DW-1:0] s_SData_q;
  always @(negedge clk) begin #2; s_SResp_q = s_SResp; s_SData_q = s_SData; end

  ocp_resp_e r; logic [DW-1:0] d;
  int w0;
  initial begin
    s_MCmd = OCP_IDLE; s_MAddr = 0; s_MBurstLen = 1; s_MReqInfo = 0; s_MData = 0;
    s_MDataValid = 0; s_MDataLast = 0; s_MRespAcc = 0;
    repeat (3) @(negedge clk); rst_n = 1;

    xfer(OCP_WR, 16'h10, 0, 32'd5, r, d);            chk(r == RESP_DVA, "plain write");
    // 1. clean LL/SC
    xfer(OCP_RDL, 16'h10, 1, 0, r, d);               chk(r == RESP_DVA && d == 5, "RDL reads 5");
    xfer(OCP_WRC, 16'h10, 1, 32'd6, r, d);           chk(r == RESP_DVA, "WRC succeeds");
    xfer(OCP_RD, 16'h10, 0, 0, r, d);                chk(d == 6, "memory holds 6");
    // 2. two processors race: the first WRC wins, the second fails
    xfer(OCP_RDL, 16'h10, 1, 0, r, d);
    xfer(OCP_RDL, 16'h10, 2, 0, r, d);
    xfer(OCP_WRC, 16'h10, 2, 32'd7, r, d);           chk(r == RESP_DVA, "first WRC of race succeeds");
    w0 = mem_writes;
    xfer(OCP_WRC, 16'h10, 1, 32'd8, r, d);           chk(r == RESP_FAIL, "second WRC of race fails");
    chk(mem_writes == w0, "failed WRC wrote nothing");
    xfer(OCP_RD, 16'h10, 0, 0, r, d);                chk(d == 7, "memory holds winner's 7");
    // 3. a plain write in between breaks the reservation
    xfer(OCP_RDL, 16'h20, 3, 0, r, d);
    xfer(OCP_WR, 16'h20, 4, 32'd9, r, d);
    xfer(OCP_WRC, 16'h20, 3, 32'd10, r, d);          chk(r == RESP_FAIL, "WRC after foreign write fails");
    xfer(OCP_RD, 16'h20, 0, 0, r, d);                chk(d == 9, "memory keeps 9");
    // 4. no reservation / other address
    xfer(OCP_WRC, 16'h40, 5, 32'd1, r, d);           chk(r == RESP_FAIL, "WRC without RDL fails");
    xfer(OCP_RDL, 16'h30, 6, 0, r, d);
    xfer(OCP_WRC, 16'h34, 6, 32'd2, r, d);           chk(r == RESP_FAIL, "WRC to another word fails");
    xfer(OCP_WRC, 16'h30, 6, 32'd3, r, d);           chk(r == RESP_DVA, "reservation on 0x30 still held");
    // 5. a reservation is used once
    xfer(OCP_WRC, 16'h30, 6, 32'd4, r, d);           chk(r == RESP_FAIL, "reservation consumed by own WRC");
    xfer(OCP_RD, 16'h30, 0, 0, r, d);                chk(d == 3, "memory holds 3");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
