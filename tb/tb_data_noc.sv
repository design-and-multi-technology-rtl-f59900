// tb_data_noc -- self-checking test of the Data NoC (16 masters, 4 banks).
// Sixteen OCP initiators run concurrently, one process each.  Every initiator
// writes bursts of random length (1..8 beats, random MFlag pressure) to its
// own area of a random bank and reads each back, so all masters compete for
// the stage-2 switches and banks at once.  Four ocp_mem_model instances play
// the DDR2 controllers.  Checks:
//   * every read returns what the same master wrote, in order;
//   * every bank's memory holds the final data (burst addresses decoded
//     through the two switch stages and the slave NIU's offset);
//   * monitoring: collectors 0..3 count exactly the request packets of their
//     four masters and collector 4 those reaching each bank; a dump started
//     through a collector's register port arrives on the PM output with the
//     collector's id and counts;
//   * service access: a route-table entry read back through a switch pair's
//     register port has its reset value.
`timescale 1ns/1ps
module tb_data_noc;
  import mp3noc_pkg::*;
  localparam int NM = 16, NS = 4, DW = 64, AW = 32, NG = NM / 4, ITER = 6;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  ocp_cmd_e [NM-1:0] m_MCmd; logic [NM-1:0][AW-1:0] m_MAddr; logic [NM-1:0][7:0] m_MBurstLen;
  logic [NM-1:0][1:0] m_MFlag; logic [NM-1:0] m_SCmdAcc, m_MDataValid, m_MDataLast, m_SDataAcc;
  logic [NM-1:0][DW-1:0] m_MData, m_SData; ocp_resp_e [NM-1:0] m_SResp;
  logic [NM-1:0] m_SRespLast, m_MRespAcc;
  ocp_cmd_e [NS-1:0] d_MCmd; logic [NS-1:0][27:0] d_MAddr; logic [NS-1:0][7:0] d_MBurstLen;
  logic [NS-1:0][ID_W-1:0] d_MReqInfo; logic [NS-1:0] d_SCmdAcc, d_MDataValid, d_MDataLast, d_SDataAcc;
  logic [NS-1:0][DW-1:0] d_MData, d_SData; ocp_resp_e [NS-1:0] d_SResp; logic [NS-1:0] d_SRespLast, d_MRespAcc;
  logic pm_vld, pm_rdy, pm_last; logic [31:0] pm_data;
  logic [2*NG-1:0] sw_we; logic [2*NG-1:0][11:0] sw_addr; logic [2*NG-1:0][31:0] sw_wdata, sw_rdata;
  logic [NG:0] sc_we; logic [NG:0][11:0] sc_addr; logic [NG:0][31:0] sc_wdata, sc_rdata;
  logic pms_we; logic [11:0] pms_addr; logic [31:0] pms_wdata, pms_rdata;

  data_noc #(.N_M(NM), .N_S(NS), .DW(DW), .AW(AW), .SLV_LSB(28)) dut (.*);

  for (genvar b = 0; b < NS; b++) begin : g_bank
    ocp_mem_model #(.DW(DW), .AW(28), .CMD_WAIT(2), .RD_WAIT(4)) mem (.clk, .rst_n,
      .MCmd(d_MCmd[b]), .MAddr(d_MAddr[b]), .MBurstLen(d_MBurstLen[b]), .SCmdAcc(d_SCmdAcc[b]),
      .MData(d_MData[b]), .MDataValid(d_MDataValid[b]), .MDataLast(d_MDataLast[b]),
      .SDataAcc(d_SDataAcc[b]), .SResp(d_SResp[b]), .SData(d_SData[b]),
      .SRespLast(d_SRespLast[b]), .MRespAcc(d_MRespAcc[b]));
  end

  int checks = 0, failures = 0;
  function automatic void chk(input bit ok, input string msg);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endfunction
  initial begin
    #3000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  logic [NM-1:0] cacc_q, dacc_q, racc_q, rlast_q; logic [NM-1:0][DW-1:0] rdata_q;
  ocp_resp_e [NM-1:0] resp_q;
  always @(negedge clk) begin
    #2;
    for (int m = 0; m < NM; m++) begin
      cacc_q[m] = (m_MCmd[m] != OCP_IDLE) && m_SCmdAcc[m];
      dacc_q[m] = m_MDataValid[m] && m_SDataAcc[m];
      racc_q[m] = (m_SResp[m] != RESP_NULL) && m_MRespAcc[m];
      resp_q[m] = m_SResp[m]; rdata_q[m] = m_SData[m]; rlast_q[m] = m_SRespLast[m];
    end
  end

  int pkts [NM], bank_pkts [NS];
  bit [NM-1:0] done;
  typedef struct { int bank; logic [27:0] off; int len; } wr_t;
  wr_t log_q [NM][$];

  for (genvar m = 0; m < NM; m++) begin : g_master
    task automatic burst(bit wr, int bank, logic [27:0] off, int len, int k);
      int t, got;
      @(negedge clk);
      m_MCmd[m] = wr ? OCP_WR : OCP_RD; m_MAddr[m] = {4'(bank), off};
      m_MBurstLen[m] = 8'(len); m_MFlag[m] = 2'($urandom_range(0, 3));
      do @(negedge clk); while (!cacc_q[m]);
      m_MCmd[m] = OCP_IDLE;
      pkts[m]++; bank_pkts[bank]++;
      if (wr) for (int b = 0; b < len; b++) begin
        m_MData[m] = {8'(m), 8'(k), 8'(b), 8'(bank), 4'd0, off}; m_MDataValid[m] = 1; m_MDataLast[m] = (b == len - 1);
        do @(negedge clk); while (!dacc_q[m]);
        m_MDataValid[m] = 0; m_MDataLast[m] = 0;
      end
      got = 0; t = 0;
      while (got < (wr ? 1 : len) && t < 5000) begin
        m_MRespAcc[m] = $urandom_range(0, 3) != 0;
        @(negedge clk); t++;
        if (racc_q[m]) begin
          chk(resp_q[m] == RESP_DVA, "DVA");
          if (!wr) chk(rdata_q[m] == {8'(m), 8'(k), 8'(got), 8'(bank), 4'd0, off},
                       $sformatf("master %0d read beat %0d: %h", m, got, rdata_q[m]));
          chk(rlast_q[m] == (wr || got == len - 1), "SRespLast");
          got++;
        end
      end
      m_MRespAcc[m] = 0;
      chk(got == (wr ? 1 : len), $sformatf("master %0d: all response beats", m));
    endtask
    initial begin
      m_MCmd[m] = OCP_IDLE; m_MAddr[m] = 0; m_MBurstLen[m] = 0; m_MFlag[m] = 0; m_MData[m] = 0;
      m_MDataValid[m] = 0; m_MDataLast[m] = 0; m_MRespAcc[m] = 0; done[m] = 0;
      wait (rst_n); repeat (30) @(negedge clk);
      for (int k = 0; k < ITER; k++) begin
        int bank, len; logic [27:0] off;
        bank = $urandom_range(0, NS - 1); len = $urandom_range(1, 8);
        off = 28'(m * 32'h10000 + k * 32'h100);
        burst(1, bank, off, len, k);
        burst(0, bank, off, len, k);
        log_q[m].push_back('{bank, off, len});
      end
      done[m] = 1;
    end
  end

  task automatic sc_rd(int c, int a, output logic [31:0] d);
    @(negedge clk); sc_addr[c] = 12'(a); #1 d = sc_rdata[c];
  endtask
  task automatic sc_wr(int c, int a, logic [31:0] v);
    @(negedge clk); sc_we[c] = 1; sc_addr[c] = 12'(a); sc_wdata[c] = v; @(negedge clk); sc_we[c] = 0;
  endtask

  logic [31:0] d, frame[$];
  initial begin
    sw_we = 0; sw_addr = 0; sw_wdata = 0; sc_we = 0; sc_addr = 0; sc_wdata = 0;
    pms_we = 0; pms_addr = 0; pms_wdata = 0; pm_rdy = 1;
    for (int m = 0; m < NM; m++) pkts[m] = 0;
    for (int b = 0; b < NS; b++) bank_pkts[b] = 0;
    repeat (3) @(negedge clk); rst_n = 1;
    for (int c = 0; c <= NG; c++) sc_wr(c, 0, 1);          // count request packets
    wait (&done);
    repeat (20) @(negedge clk);

    // data left in the banks
    for (int m = 0; m < NM; m++) foreach (log_q[m][i]) begin
      wr_t w; logic [DW-1:0] v; longint idx; w = log_q[m][i];
      for (int b = 0; b < w.len; b++) begin
        idx = longint'(w.off >> 3) + b;
        case (w.bank)
          0: v = g_bank[0].mem.mem[idx];
          1: v = g_bank[1].mem.mem[idx];
          2: v = g_bank[2].mem.mem[idx];
          default: v = g_bank[3].mem.mem[idx];
        endcase
        chk(v == {8'(m), 8'(i), 8'(b), 8'(w.bank), 4'd0, w.off}, $sformatf("bank %0d word %0d", w.bank, idx));
      end
    end

    // collectors' packet counters
    for (int m = 0; m < NM; m++) begin
      sc_rd(m / 4, 8 + 2 * (m % 4), d);
      chk(d == 32'(pkts[m]), $sformatf("collector %0d probe %0d: %0d packets, expected %0d", m / 4, m % 4, d, pkts[m]));
    end
    for (int b = 0; b < NS; b++) begin
      sc_rd(NG, 8 + 2 * b, d);
      chk(d == 32'(bank_pkts[b]), $sformatf("slave probe %0d: %0d packets, expected %0d", b, d, bank_pkts[b]));
    end
    // a dump from collector 2 through the PM switch
    pm_rdy = 0;
    sc_wr(2, 0, 3);
    for (int t = 0; t < 100; t++) begin
      @(negedge clk); pm_rdy = 1; #2 if (pm_vld && pm_rdy) frame.push_back(pm_data);
    end
    chk(frame.size() == 9 && frame[0] == {16'hC011, 8'd2, 8'd4}, $sformatf("dump frame header of collector 2 (%0d words, %h)", frame.size(), frame.size() ? frame[0] : 0));
    if (frame.size() == 9) chk(frame[1] == 32'(pkts[8]) && frame[7] == 32'(pkts[11]), "dump frame counts");
    // a route entry through switch pair 0 (stage-1 switch 0, input 1, dst 3)
    @(negedge clk); sw_addr[0] = 12'h100 + 32 + 3; #1 chk(sw_rdata[0] == 3, "route table entry read back");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
