// tb_service_noc -- self-checking test of the service (configuration) network:
// host bridge, main ring with five monitor stops, node, secondary ring with
// nine switch stops.  Each stop's register port is connected to a small
// register file in the testbench.  Random single-word OCP reads and writes
// are issued to random registers of random stops; checks: a write changes
// exactly the addressed register of the addressed stop, a read returns the
// register's value with DVA, an address no stop owns (on either ring) comes
// back ERR, and the round-trip latency is the same for every stop of a ring
// (a request always travels the whole ring).
`timescale 1ns/1ps
module tb_service_noc;
  import mp3noc_pkg::*;
  localparam int NPM = 5, NSW = 9, NR = 16;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  ocp_cmd_e MCmd; logic [31:0] MAddr, MData, SData; ocp_resp_e SResp;
  logic SCmdAcc, MDataValid, SDataAcc, SRespLast, MRespAcc;
  logic [NPM-1:0] pm_we; logic [NPM-1:0][11:0] pm_addr; logic [NPM-1:0][31:0] pm_wdata, pm_rdata;
  logic [NSW-1:0] sw_we; logic [NSW-1:0][11:0] sw_addr; logic [NSW-1:0][31:0] sw_wdata, sw_rdata;
  service_noc #(.N_PM(NPM), .N_SW(NSW)) dut (.*);

  int checks = 0, failures = 0;
  function automatic void chk(input bit ok, input string msg);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endfunction
  initial begin
    #2000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // register files of the stops: index 0..NPM-1 monitors, NPM.. switches
  logic [31:0] regs [NPM + NSW][NR];
  logic [31:0] shadow [NPM + NSW][NR];
  always_comb begin
    for (int p = 0; p < NPM; p++) pm_rdata[p] = regs[p][pm_addr[p][3:0]];
    for (int k = 0; k < NSW; k++) sw_rdata[k] = regs[NPM + k][sw_addr[k][3:0]];
  end
  always @(posedge clk) begin
    for (int p = 0; p < NPM; p++) if (pm_we[p]) regs[p][pm_addr[p][3:0]] <= pm_wdata[p];
    for (int k = 0; k < NSW; k++) if (sw_we[k]) regs[NPM + k][sw_addr[k][3:0]] <= sw_wdata[k];
  end

  logic cacc_q, dacc_q, racc_q; ocp_resp_e resp_q; logic [31:0] data_q;
  always @(negedge clk) begin
    #2;
    cacc_q = (MCmd != OCP_IDLE) && SCmdAcc; dacc_q = MDataValid && SDataAcc;
    racc_q = (SResp != RESP_NULL) && MRespAcc; resp_q = SResp; data_q = SData;
  end

  task automatic xfer(input bit wr, input logic [15:0] a, input logic [31:0] wd,
                      output ocp_resp_e r, output logic [31:0] rd, output int lat);
    int t;
    @(negedge clk);
    MCmd = wr ? OCP_WR : OCP_RD; MAddr = {16'd0, a};
    do @(negedge clk); while (!cacc_q);
    MCmd = OCP_IDLE;
    if (wr) begin
      MData = wd; MDataValid = 1;
      do @(negedge clk); while (!dacc_q);
      MDataValid = 0;
    end
    MRespAcc = 1; t = 0;
    do begin @(negedge clk); t++; end while (!racc_q && t < 500);
    MRespAcc = 0;
    r = resp_q; rd = data_q; lat = t;
  endtask

  ocp_resp_e r; logic [31:0] d; int lat, lat_pm, lat_sw;
  initial begin
    MCmd = OCP_IDLE; MAddr = 0; MData = 0; MDataValid = 0; MRespAcc = 0;
    for (int s = 0; s < NPM + NSW; s++)
      for (int i = 0; i < NR; i++) begin regs[s][i] = {8'(s), 8'(i), 16'h5A5A}; shadow[s][i] = regs[s][i]; end
    lat_pm = -1; lat_sw = -1;
    repeat (3) @(negedge clk); rst_n = 1;

    for (int n = 0; n < 300; n++) begin
      int s, i, id; bit wr; logic [31:0] v;
      s = $urandom_range(0, NPM + NSW - 1); i = $urandom_range(0, NR - 1);
      id = (s < NPM) ? s : 16 + s - NPM;
      wr = $urandom_range(0, 1); v = $urandom;
      xfer(wr, {5'(id), 7'd0, 4'(i)}, v, r, d, lat);
      chk(r == RESP_DVA, $sformatf("stop %0d answered", id));
      if (wr) shadow[s][i] = v;
      else chk(d == shadow[s][i], $sformatf("read stop %0d reg %0d = %h, expected %h", id, i, d, shadow[s][i]));
      if (!wr) begin
        if (s < NPM) begin if (lat_pm < 0) lat_pm = lat; chk(lat == lat_pm, "monitor ring latency constant"); end
        else begin if (lat_sw < 0) lat_sw = lat; chk(lat == lat_sw, "switch ring latency constant"); end
      end
    end
    for (int s = 0; s < NPM + NSW; s++)
      for (int i = 0; i < NR; i++) chk(regs[s][i] == shadow[s][i], "no stray register write");
    chk(lat_sw == lat_pm + NSW + 1, $sformatf("secondary ring adds its hops: %0d vs %0d", lat_sw, lat_pm));

    // unowned addresses: stop 10 (main ring) and stop 16+NSW (past the switch stops)
    xfer(0, {5'd10, 11'd3}, 0, r, d, lat);          chk(r == RESP_ERR, "unclaimed main-ring address -> ERR");
    xfer(1, {5'(16 + NSW), 11'd3}, 7, r, d, lat);   chk(r == RESP_ERR, "unclaimed address -> ERR");
    xfer(0, {5'd31, 11'd0}, 0, r, d, lat);          chk(r == RESP_ERR, "unclaimed high address -> ERR");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
