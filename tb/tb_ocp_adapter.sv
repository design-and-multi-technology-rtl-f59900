// tb_ocp_adapter -- self-checking test of the FSL-to-OCP adapter.
// Two adapters run side by side, each between its own tile clock and NoC
// clock (unrelated periods) with an ocp_mem_model as OCP target:
//   A: data-adapter variant (64-bit, bursts, LAZY_EN=0), pe 7 ns / noc 5 ns;
//   B: synchronization variant (32-bit, no bursts, LAZY_EN=1), pe 13 ns / noc 4 ns.
// The testbench writes FSL request words and collects FSL response words.
// Checks: burst writes land in the memory beat by beat (two FSL words per
// 64-bit beat, low word first), burst reads return the written words after a
// control word carrying SResp, unwritten words return the model's pattern,
// MFlag and MBurstLen reach OCP, BurstLen 0 is one beat, the data variant maps
// ReadLinked to Read, the synchronization variant passes ReadLinked and
// WriteConditional through and forces single-beat transfers.
`timescale 1ns/1ps
module tb_ocp_adapter;
  import mp3noc_pkg::*;
  logic pclk [2], nclk [2];
  logic rst_n = 0;
  initial begin pclk[0] = 0; pclk[1] = 0; nclk[0] = 0; nclk[1] = 0; end
  always #3.5 pclk[0] = ~pclk[0];
  always #2.5 nclk[0] = ~nclk[0];
  always #6.5 pclk[1] = ~pclk[1];
  always #2   nclk[1] = ~nclk[1];

  logic [31:0] m_data [2]; logic m_ctrl [2], m_write [2], m_full [2];
  logic [31:0] s_data [2]; logic s_ctrl [2], s_read [2], s_exists [2];

  // adapter A (64-bit) and its memory
  ocp_cmd_e aCmd; logic [31:0] aAddr; logic [7:0] aLen; logic [1:0] aFlag;
  logic aCAcc, aDV, aDL, aDAcc, aRL, aRAcc; logic [63:0] aMD, aSD; ocp_resp_e aResp;
  ocp_adapter #(.DW(64), .AW(32), .BURST_EN(1), .LAZY_EN(0)) dutA (
    .pe_clk(pclk[0]), .pe_rst_n(rst_n), .fsl_m_data(m_data[0]), .fsl_m_control(m_ctrl[0]),
    .fsl_m_write(m_write[0]), .fsl_m_full(m_full[0]), .fsl_s_data(s_data[0]),
    .fsl_s_control(s_ctrl[0]), .fsl_s_read(s_read[0]), .fsl_s_exists(s_exists[0]),
    .noc_clk(nclk[0]), .noc_rst_n(rst_n), .MCmd(aCmd), .MAddr(aAddr), .MBurstLen(aLen),
    .MFlag(aFlag), .SCmdAcc(aCAcc), .MData(aMD), .MDataValid(aDV), .MDataLast(aDL),
    .SDataAcc(aDAcc), .SResp(aResp), .SData(aSD), .SRespLast(aRL), .MRespAcc(aRAcc));
  ocp_mem_model #(.DW(64), .AW(32)) memA (.clk(nclk[0]), .rst_n, .MCmd(aCmd), .MAddr(aAddr),
    .MBurstLen(aLen), .SCmdAcc(aCAcc), .MData(aMD), .MDataValid(aDV), .MDataLast(aDL),
    .SDataAcc(aDAcc), .SResp(aResp), .SData(aSD), .SRespLast(aRL), .MRespAcc(aRAcc));

  // adapter B (32-bit, lazy synchronization) and its memory
  ocp_cmd_e bCmd; logic [31:0] bAddr; logic [7:0] bLen; logic [1:0] bFlag;
  logic bCAcc, bDV, bDL, bDAcc, bRL, bRAcc; logic [31:0] bMD, bSD; ocp_resp_e bResp;
  ocp_adapter #(.DW(32), .AW(32), .BURST_EN(0), .LAZY_EN(1)) dutB (
    .pe_clk(pclk[1]), .pe_rst_n(rst_n), .fsl_m_data(m_data[1]), .fsl_m_control(m_ctrl[1]),
    .fsl_m_write(m_write[1]), .fsl_m_full(m_full[1]), .fsl_s_data(s_data[1]),
    .fsl_s_control(s_ctrl[1]), .fsl_s_read(s_read[1]), .fsl_s_exists(s_exists[1]),
    .noc_clk(nclk[1]), .noc_rst_n(rst_n), .MCmd(bCmd), .MAddr(bAddr), .MBurstLen(bLen),
    .MFlag(bFlag), .SCmdAcc(bCAcc), .MData(bMD), .MDataValid(bDV), .MDataLast(bDL),
    .SDataAcc(bDAcc), .SResp(bResp), .SData(bSD), .SRespLast(bRL), .MRespAcc(bRAcc));
  ocp_mem_model #(.DW(32), .AW(32)) memB (.clk(nclk[1]), .rst_n, .MCmd(bCmd), .MAddr(bAddr),
    .MBurstLen(bLen), .SCmdAcc(bCAcc), .MData(bMD), .MDataValid(bDV), .MDataLast(bDL),
    .SDataAcc(bDAcc), .SResp(bResp), .SData(bSD), .SRespLast(bRL), .MRespAcc(bRAcc));

  int checks = 0, failures = 0;
  function automatic void chk(input bit ok, input string msg);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endfunction
  initial begin
    #400000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // OCP command monitors
  typedef struct packed { ocp_cmd_e c; logic [31:0] a; logic [7:0] l; logic [1:0] f; } cmd_t;
  cmd_t cmdsA[$], cmdsB[$];
  always @(posedge nclk[0]) if (aCmd != OCP_IDLE && aCAcc) cmdsA.push_back('{aCmd, aAddr, aLen, aFlag});
  always @(posedge nclk[1]) if (bCmd != OCP_IDLE && bCAcc) cmdsB.push_back('{bCmd, bAddr, bLen, bFlag});

  // FSL drivers and collectors, one per adapter
  logic [32:0] txq [2][$];
  logic [32:0] rxq [2][$];
  for (genvar k = 0; k < 2; k++) begin : g_fsl
    // full/exists only change at posedges, so the decision taken at a negedge
    // is the one the FIFO sees at the following posedge
    always @(negedge pclk[k]) begin
      if (txq[k].size() > 0 && !m_full[k] && $urandom_range(0, 3) != 0) begin
        {m_ctrl[k], m_data[k]} = txq[k].pop_front();
        m_write[k] = 1;
      end else m_write[k] = 0;
      s_read[k] = rst_n && s_exists[k] && ($urandom_range(0, 2) != 0);
      if (s_read[k]) rxq[k].push_back({s_ctrl[k], s_data[k]});
    end
  end

  function automatic logic [32:0] w0(ocp_cmd_e c, int len, int flag);
    return {1'b1, 19'd0, 2'(flag), 8'(len), 3'(c)};
  endfunction
  task automatic wait_rx(int k, int n);
    int t; t = 0;
    while (rxq[k].size() < n && t < 4000) begin @(negedge pclk[k]); t++; end
    repeat (20) @(negedge pclk[k]);
    chk(rxq[k].size() == n, $sformatf("adapter %0d: expected %0d response words, got %0d", k, n, rxq[k].size()));
  endtask
  function automatic logic [31:0] pat(longint widx);
    return {widx[15:0], ~widx[15:0]};
  endfunction

  initial begin
    for (int k = 0; k < 2; k++) begin m_write[k] = 0; m_ctrl[k] = 0; m_data[k] = 0; s_read[k] = 0; end
    repeat (5) @(negedge pclk[1]); rst_n = 1;
    repeat (3) @(negedge pclk[1]);

    // ---- A: burst write of 3 beats, MFlag 2
    txq[0].push_back(w0(OCP_WR, 3, 2)); txq[0].push_back({1'b0, 32'h0000_0100});
    for (int i = 0; i < 6; i++) txq[0].push_back({1'b0, 32'hA000_0000 + i});
    wait_rx(0, 1);
    chk(rxq[0][0] == {1'b1, 30'd0, RESP_DVA}, "A: write answered with control word DVA");
    chk(cmdsA.size() == 1 && cmdsA[0] == '{OCP_WR, 32'h100, 8'd3, 2'd2}, "A: OCP WR burst of 3, MFlag 2");
    for (int b = 0; b < 3; b++)
      chk(memA.mem[32 + b] == {32'hA000_0001 + 2 * b, 32'hA000_0000 + 2 * b}, "A: beat in memory");
    rxq[0].delete();
    // ---- A: burst read of 4 beats: 3 written, one unwritten
    txq[0].push_back(w0(OCP_RD, 4, 0)); txq[0].push_back({1'b0, 32'h0000_0100});
    wait_rx(0, 9);
    chk(rxq[0][0] == {1'b1, 30'd0, RESP_DVA}, "A: read control word");
    for (int i = 0; i < 6; i++) chk(rxq[0][1 + i] == {1'b0, 32'hA000_0000 + i}, "A: read word");
    chk(rxq[0][7] == {1'b0, pat(35)} && rxq[0][8] == {1'b0, pat(35)}, "A: unwritten beat pattern");
    rxq[0].delete();
    // ---- A: BurstLen 0 read is one beat; ReadLinked maps to Read in this variant
    txq[0].push_back(w0(OCP_RDL, 0, 1)); txq[0].push_back({1'b0, 32'h0000_0800});
    wait_rx(0, 3);
    chk(cmdsA.size() == 3 && cmdsA[2].c == OCP_RD && cmdsA[2].l == 1 && cmdsA[2].f == 1,
        "A: RDL -> RD, BurstLen 0 -> 1");
    chk(rxq[0][1] == {1'b0, pat(256)}, "A: single read word");
    rxq[0].delete();

    // ---- B: write with BurstLen 4 is forced to one beat
    txq[1].push_back(w0(OCP_WR, 4, 0)); txq[1].push_back({1'b0, 32'h0000_0040});
    txq[1].push_back({1'b0, 32'h1234_5678});
    wait_rx(1, 1);
    chk(cmdsB.size() == 1 && cmdsB[0].l == 1 && memB.mem[16] == 32'h1234_5678, "B: single-beat write");
    rxq[1].delete();
    // ---- B: ReadLinked / WriteConditional pass through
    txq[1].push_back(w0(OCP_RDL, 1, 0)); txq[1].push_back({1'b0, 32'h0000_0040});
    wait_rx(1, 2);
    chk(rxq[1][1] == {1'b0, 32'h1234_5678}, "B: RDL data");
    txq[1].push_back(w0(OCP_WRC, 1, 0)); txq[1].push_back({1'b0, 32'h0000_0040});
    txq[1].push_back({1'b0, 32'h1234_5679});
    wait_rx(1, 3);
    chk(cmdsB.size() == 3 && cmdsB[1].c == OCP_RDL && cmdsB[2].c == OCP_WRC, "B: RDL/WRC reach OCP");
    chk(memB.mem[16] == 32'h1234_5679, "B: WRC data written");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
