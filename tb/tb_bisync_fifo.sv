// tb_bisync_fifo -- self-checking test of the bi-synchronous FIFO.
// Two unrelated clocks (10 ns sender, 7 ns receiver).  Checks: every word
// (data + control bit) arrives once and in order against a reference queue
// under random write/read activity; M_Full rises after exactly DEPTH words
// when the receiver is stalled; a word becomes visible to the receiver within
// 4 receiver cycles of being written.
`timescale 1ns/1ps
module tb_bisync_fifo;
  localparam int DEPTH = 16;
  logic mclk = 0, sclk = 0, mrst_n = 0, srst_n = 0;
  always #5 mclk = ~mclk;
  always #3.5 sclk = ~sclk;

  logic [31:0] md, sd; logic mc, sc, mw, mf, sr, se;
  bisync_fifo #(.DATA_W(32), .DEPTH(DEPTH)) dut (
    .M_Clk(mclk), .M_Rst_n(mrst_n), .M_Data(md), .M_Control(mc), .M_Write(mw), .M_Full(mf),
    .S_Clk(sclk), .S_Rst_n(srst_n), .S_Data(sd), .S_Control(sc), .S_Read(sr), .S_Exists(se));

  int checks = 0, failures = 0;
  logic [32:0] q[$];
  int sent = 0, rcvd = 0;
  bit rd_en = 0;

  initial begin
    #200000;
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // receiver: random reads, compare
  // checked at the falling edge, so the values are the ones the next rising
  // edge will act on
  always @(negedge sclk) begin
    logic nsr;
    nsr = rd_en && ($urandom_range(0, 3) != 0);
    if (srst_n && se && nsr) begin
      logic [32:0] exp;
      exp = q.pop_front();
      checks++; rcvd++;
      if ({sc, sd} !== exp) begin failures++; $display("mismatch got %h exp %h", {sc,sd}, exp); end
    end
    sr <= nsr;
  end

  task automatic put(input logic [32:0] w);
    @(negedge mclk);
    while (mf) @(negedge mclk);
    md <= w[31:0]; mc <= w[32]; mw <= 1;
    q.push_back(w); sent++;
    @(negedge mclk);
    mw <= 0;
  endtask

  initial begin
    int n, lat;
    md = 0; mc = 0; mw = 0; sr = 0;
    repeat (3) @(posedge mclk);
    mrst_n = 1; srst_n = 1;
    repeat (3) @(posedge mclk);
    // latency of the first word
    @(negedge mclk);
    md <= 32'hA5A5_0001; mc <= 1; mw <= 1; @(negedge mclk); q.push_back({1'b1, 32'hA5A5_0001}); sent++;
    mw <= 0;
    lat = 0;
    while (!se) begin @(negedge sclk); lat++; end
    checks++; if (lat > 4) begin failures++; $display("visibility latency %0d", lat); end
    // fill with the receiver stalled: full after DEPTH words
    n = 1;
    @(negedge mclk);
    while (!mf && n < 40) begin
      md <= 32'h1000 + n; mc <= 0; mw <= 1; @(negedge mclk);
      q.push_back({1'b0, 32'h1000 + n}); sent++; n++; mw <= 0; @(negedge mclk);
    end
    checks++; if (n != DEPTH) begin failures++; $display("full after %0d words", n); end
    rd_en = 1;
    // random traffic
    for (int i = 0; i < 300; i++) begin
      put({1'($urandom), $urandom});
      repeat ($urandom_range(0, 2)) @(posedge mclk);
    end
    wait (rcvd == sent);
    repeat (5) @(posedge sclk);
    checks++; if (q.size() != 0 || se) begin failures++; $display("leftover words"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
