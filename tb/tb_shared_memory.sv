// tb_shared_memory -- self-checking test of the shared memory's OCP target.
// Random burst writes (1..4 beats, with gaps between beats) and random burst
// reads (with random MRespAcc back-pressure) over a small memory are compared
// against a reference array kept by the testbench.  It also checks that every
// write is answered by exactly one DVA beat marked last, that read beats carry
// SRespLast only on the last one, and the read latency: with MRespAcc held
// high the first beat is presented the cycle after the command is accepted.
`timescale 1ns/1ps
module tb_shared_memory;
  import mp3noc_pkg::*;
  localparam int DW = 32, AW = 16, BYTES = 1024, WORDS = BYTES / 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  ocp_cmd_e MCmd; logic [AW-1:0] MAddr; logic [7:0] MBurstLen;
  logic SCmdAcc, MDataValid, MDataLast, SDataAcc, SRespLast, MRespAcc;
  logic [DW-1:0] MData, SData; ocp_resp_e SResp;
  shared_memory #(.SIZE_BYTES(BYTES), .DW(DW), .AW(AW)) dut (.*);

  int checks = 0, failures = 0;
  function automatic void chk(input bit ok, input string msg);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endfunction
  initial begin
    #2000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  logic cacc_q, dacc_q, racc_q, rlast_q; ocp_resp_e resp_q; logic [DW-1:0] data_q;
  always @(negedge clk) begin
    #2;
    cacc_q = (MCmd != OCP_IDLE) && SCmdAcc;
    dacc_q = MDataValid && SDataAcc;
    racc_q = (SResp != RESP_NULL) && MRespAcc;
    resp_q = SResp; data_q = SData; rlast_q = SRespLast;
  end

  logic [DW-1:0] ref_mem [WORDS];
  bit            valid [WORDS];

  task automatic burst(input bit wr, input int w, input int len, input bit eager);
    int t, got, lat;
    @(negedge clk);
    MCmd = wr ? OCP_WR : OCP_RD; MAddr = AW'(w * 4); MBurstLen = 8'(len);
    do @(negedge clk); while (!cacc_q);
    MCmd = OCP_IDLE;
    if (wr) for (int b = 0; b < len; b++) begin
      while ($urandom_range(0, 2) == 0) @(negedge clk);
      MData = $urandom; MDataValid = 1; MDataLast = (b == len - 1);
      ref_mem[w + b] = MData; valid[w + b] = 1;
      do @(negedge clk); while (!dacc_q);
      MDataValid = 0; MDataLast = 0;
    end
    got = 0; t = 0; lat = -1;
    while (got < (wr ? 1 : len) && t < 500) begin
      MRespAcc = eager || ($urandom_range(0, 2) != 0);
      @(negedge clk); t++;
      if (resp_q != RESP_NULL && lat < 0) lat = t;
      if (racc_q) begin
        chk(resp_q == RESP_DVA, "DVA response");
        if (wr) chk(rlast_q, "write answer marked last");
        else begin
          chk(rlast_q == (got == len - 1), "SRespLast on last read beat only");
          if (valid[w + got]) chk(data_q == ref_mem[w + got], $sformatf("read word %0d", w + got));
        end
        got++;
      end
    end
    MRespAcc = 0;
    chk(got == (wr ? 1 : len), "all response beats received");
    if (!wr && eager) chk(lat == 1, $sformatf("read latency 1 cycle after accept, got %0d", lat));
  endtask

  initial begin
    MCmd = OCP_IDLE; MAddr = 0; MBurstLen = 1; MData = 0; MDataValid = 0; MDataLast = 0; MRespAcc = 0;
    for (int i = 0; i < WORDS; i++) valid[i] = 0;
    repeat (3) @(negedge clk); rst_n = 1;
    for (int i = 0; i < WORDS; i += 4) burst(1, i, 4, 0);      // fill
    for (int n = 0; n < 300; n++) begin
      int len, w;
      len = $urandom_range(1, 4); w = $urandom_range(0, WORDS - len);
      burst($urandom_range(0, 1), w, len, $urandom_range(0, 1));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
