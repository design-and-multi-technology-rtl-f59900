// tb_sync_noc -- self-checking test of the Synchronization NoC with its
// exclusive access manager and shared memory.
// Sixteen OCP initiators run at once.  Each adds 1 to two shared counters
// ITER times:
//   counter A with lazy synchronization: ReadLinked, then WriteConditional of
//     the value + 1, retried from the ReadLinked whenever it answers FAIL;
//   counter B with locked synchronization: ReadExclusive (the path is locked)
//     followed by a Write of the value + 1 (which unlocks it).
// Checks: both counters end at 16 * ITER (no lost update in either mode),
// contention really happened (at least one WriteConditional failed, the
// request switch was seen locked), and every answer was DVA or, for a
// WriteConditional only, FAIL.
`timescale 1ns/1ps
module tb_sync_noc;
  import mp3noc_pkg::*;
  localparam int NM = 16, ITER = 4;
  localparam logic [31:0] CNT_A = 32'h100, CNT_B = 32'h200;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  ocp_cmd_e [NM-1:0] m_MCmd; logic [NM-1:0][31:0] m_MAddr, m_MData, m_SData; logic [NM-1:0][1:0] m_MFlag;
  logic [NM-1:0] m_SCmdAcc, m_MDataValid, m_MDataLast, m_SDataAcc, m_SRespLast, m_MRespAcc;
  ocp_resp_e [NM-1:0] m_SResp; logic locked;
  sync_noc #(.N_M(NM), .MEM_BYTES(4096)) dut (.*);

  int checks = 0, failures = 0;
  function automatic void chk(input bit ok, input string msg);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endfunction
  initial begin
    #5000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  logic [NM-1:0] cacc_q, dacc_q, racc_q; logic [NM-1:0][31:0] rdata_q; ocp_resp_e [NM-1:0] resp_q;
  always @(negedge clk) begin
    #2;
    for (int m = 0; m < NM; m++) begin
      cacc_q[m] = (m_MCmd[m] != OCP_IDLE) && m_SCmdAcc[m];
      dacc_q[m] = m_MDataValid[m] && m_SDataAcc[m];
      racc_q[m] = (m_SResp[m] != RESP_NULL) && m_MRespAcc[m];
      resp_q[m] = m_SResp[m]; rdata_q[m] = m_SData[m];
    end
  end
  int lock_cycles = 0, fails = 0;
  always @(posedge clk) if (locked) lock_cycles++;

  bit [NM-1:0] done;
  for (genvar m = 0; m < NM; m++) begin : g_master
    task automatic xfer(ocp_cmd_e c, logic [31:0] a, logic [31:0] wd, output ocp_resp_e r,
                        output logic [31:0] rd);
      bit wr; int t;
      wr = (c == OCP_WR || c == OCP_WRC);
      @(negedge clk);
      m_MCmd[m] = c; m_MAddr[m] = a; m_MFlag[m] = 0;
      do @(negedge clk); while (!cacc_q[m]);
      m_MCmd[m] = OCP_IDLE;
      if (wr) begin
        m_MData[m] = wd; m_MDataValid[m] = 1; m_MDataLast[m] = 1;
        do @(negedge clk); while (!dacc_q[m]);
        m_MDataValid[m] = 0;
      end
      m_MRespAcc[m] = 1; t = 0;
      do begin @(negedge clk); t++; end while (!racc_q[m] && t < 20000);
      m_MRespAcc[m] = 0;
      r = resp_q[m]; rd = rdata_q[m];
      chk(r == RESP_DVA || (r == RESP_FAIL && c == OCP_WRC), $sformatf("master %0d answer %0d to cmd %0d", m, r, c));
    endtask
    initial begin
      ocp_resp_e r; logic [31:0] v, dummy;
      m_MCmd[m] = OCP_IDLE; m_MAddr[m] = 0; m_MData[m] = 0; m_MFlag[m] = 0;
      m_MDataValid[m] = 0; m_MDataLast[m] = 0; m_MRespAcc[m] = 0; done[m] = 0;
      wait (rst_n); repeat (20 + m) @(negedge clk);
      for (int k = 0; k < ITER; k++) begin
        // lazy increment of A
        do begin
          xfer(OCP_RDL, CNT_A, 0, r, v);
          repeat ($urandom_range(0, 6)) @(negedge clk);
          xfer(OCP_WRC, CNT_A, v + 1, r, dummy);
          if (r == RESP_FAIL) fails++;
        end while (r == RESP_FAIL);
        // locked increment of B
        xfer(OCP_RDEX, CNT_B, 0, r, v);
        repeat ($urandom_range(0, 3)) @(negedge clk);
        xfer(OCP_WR, CNT_B, v + 1, r, dummy);
      end
      done[m] = 1;
    end
  end

  logic [31:0] a, b;
  initial begin
    repeat (3) @(negedge clk); rst_n = 1;
    wait (&done);
    repeat (10) @(negedge clk);
    a = dut.u_mem.mem[CNT_A >> 2]; b = dut.u_mem.mem[CNT_B >> 2];
    chk(a - a0 == NM * ITER, $sformatf("lazy counter advanced by %0d, expected %0d", a - a0, NM * ITER));
    chk(b - b0 == NM * ITER, $sformatf("locked counter advanced by %0d, expected %0d", b - b0, NM * ITER));
    chk(fails > 0, $sformatf("WriteConditional failures seen: %0d", fails));
    chk(lock_cycles > 0, $sformatf("cycles with the request switch locked: %0d", lock_cycles));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  // the memory is not reset: remember the counters' start values
  logic [31:0] a0, b0;
  initial begin
    wait (rst_n); @(negedge clk);
    a0 = dut.u_mem.mem[CNT_A >> 2]; b0 = dut.u_mem.mem[CNT_B >> 2];
  end
endmodule
