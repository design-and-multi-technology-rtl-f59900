// tb_ocp_slave_niu -- self-checking test of the NTTP-to-OCP NIU.
// The testbench injects request packets and watches the response link; an
// ocp_mem_model plays the target.  Checks: a STORE packet becomes an OCP
// write burst (data in memory, DVA header-only answer to the right initiator),
// a LOAD packet becomes a read burst whose beats come back as data cells after
// a header with the right length, the exclusive bit turns LOAD/STORE into
// RDL/WRC with MReqInfo = initiator, LOCK/UNLOCK packets reach no target and
// get no answer.
`timescale 1ns/1ps
module tb_ocp_slave_niu;
  import mp3noc_pkg::*;
  localparam int DW = 64;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic rx_vld, rx_rdy, rx_head, rx_tail, tx_vld, tx_rdy, tx_head, tx_tail;
  logic [DW-1:0] rx_data, tx_data; logic [1:0] tx_press;
  ocp_cmd_e MCmd; logic [27:0] MAddr; logic [7:0] MBurstLen; logic [ID_W-1:0] MReqInfo;
  logic SCmdAcc, MDataValid, MDataLast, SDataAcc, SRespLast, MRespAcc;
  logic [DW-1:0] MData, SData; ocp_resp_e SResp;

  ocp_slave_niu #(.DW(DW), .AW(28), .SLAVE_ID(2)) dut (.*);
  ocp_mem_model #(.DW(DW), .AW(28)) mem (.clk, .rst_n, .MCmd, .MAddr, .MBurstLen, .SCmdAcc,
    .MData, .MDataValid, .MDataLast, .SDataAcc, .SResp, .SData, .SRespLast, .MRespAcc);

  int checks = 0, failures = 0;
  function automatic void chk(input bit ok, input string msg);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endfunction
  initial begin
    #500000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  typedef struct packed { logic head, tail; logic [DW-1:0] data; } cell_t;
  cell_t inq[$], outq[$];
  ocp_cmd_e cmds[$]; logic [ID_W-1:0] infos[$];

  always @(negedge clk) begin
    #2;
    if (rx_vld && rx_rdy) void'(inq.pop_front());
    if (tx_vld && tx_rdy) outq.push_back('{tx_head, tx_tail, tx_data});
    if (MCmd != OCP_IDLE && SCmdAcc) begin cmds.push_back(MCmd); infos.push_back(MReqInfo); end
  end
  always @(negedge clk) begin
    rx_vld = inq.size() > 0 && $urandom_range(0, 3) != 0;
    if (inq.size() > 0) begin rx_head = inq[0].head; rx_tail = inq[0].tail; rx_data = inq[0].data; end
    tx_rdy = $urandom_range(0, 2) != 0;
  end

  task automatic pkt(pkt_op_e op, int src, int len, bit excl, logic [27:0] off);
    inq.push_back('{1'b1, op == PKT_LOCK || op == PKT_UNLOCK,
                    DW'(make_hdr(op, 2, ID_W'(src), LEN_W'(len), 0, excl, RESP_NULL))});
    if (op == PKT_LOAD || op == PKT_STORE) begin
      inq.push_back('{1'b0, op == PKT_LOAD, DW'(off)});
      if (op == PKT_STORE)
        for (int b = 0; b < len; b++) inq.push_back('{1'b0, b == len - 1, {32'hBEEF0000 + b, 4'h0, off}});
    end
  endtask
  task automatic settle(int n);
    int t; t = 0;
    while (outq.size() < n && t < 3000) begin @(negedge clk); t++; end
    repeat (10) @(negedge clk);
    chk(outq.size() == n, $sformatf("expected %0d response cells, got %0d", n, outq.size()));
  endtask
  function automatic void chk_rh(cell_t c, int dst, int len, ocp_resp_e st, bit tail);
    nttp_hdr_t h; h = nttp_hdr_t'(c.data[31:0]);
    chk(c.head && c.tail == tail && h.op == PKT_RESP && h.dst == ID_W'(dst) && h.src == 2 &&
        h.len == LEN_W'(len) && h.status == st, $sformatf("response header %h", c.data[31:0]));
  endfunction

  initial begin
    rx_vld = 0; rx_head = 0; rx_tail = 0; rx_data = 0; tx_rdy = 0;
    repeat (3) @(negedge clk); rst_n = 1;

    pkt(PKT_STORE, 7, 2, 0, 28'h100);
    settle(1);
    chk_rh(outq[0], 7, 0, RESP_DVA, 1);
    chk(cmds.size() == 1 && cmds[0] == OCP_WR && infos[0] == 7, "STORE -> WR from initiator 7");
    chk(mem.mem[28'h100 >> 3] == {32'hBEEF0000, 4'h0, 28'h100} &&
        mem.mem[(28'h100 >> 3) + 1] == {32'hBEEF0001, 4'h0, 28'h100}, "stored burst");
    outq.delete();

    pkt(PKT_LOAD, 12, 2, 0, 28'h100);
    settle(3);
    chk_rh(outq[0], 12, 2, RESP_DVA, 0);
    chk(outq[1].data == {32'hBEEF0000, 4'h0, 28'h100} && !outq[1].tail, "load beat 0");
    chk(outq[2].data == {32'hBEEF0001, 4'h0, 28'h100} && outq[2].tail, "load beat 1");
    outq.delete();

    pkt(PKT_LOCK, 3, 0, 0, 0);
    pkt(PKT_LOAD, 3, 1, 1, 28'h200);
    pkt(PKT_STORE, 3, 1, 1, 28'h200);
    pkt(PKT_UNLOCK, 3, 0, 0, 0);
    settle(3);
    chk(cmds.size() == 4 && cmds[2] == OCP_RDL && cmds[3] == OCP_WRC && infos[3] == 3,
        "exclusive LOAD/STORE -> RDL/WRC; LOCK/UNLOCK reach no target");
    chk_rh(outq[0], 3, 1, RESP_DVA, 0);
    chk_rh(outq[2], 3, 0, RESP_DVA, 1);
    chk(inq.size() == 0, "all request cells consumed");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
