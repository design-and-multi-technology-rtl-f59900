// tb_ocp_master_niu -- self-checking test of the OCP-to-NTTP NIU.
// The testbench plays the OCP initiator and the network.  For each OCP
// command it checks the exact packets leaving on the request link (header
// fields, necker offset, data cells, head/tail marks, Press wires) and answers
// with a response packet, then checks the OCP response beats:
//   write burst, read burst, ReadExclusive + Write (LOCK ... UNLOCK),
//   ReadLinked / WriteConditional with a FAIL answer, Broadcast (local ERR).
`timescale 1ns/1ps
module tb_ocp_master_niu;
  import mp3noc_pkg::*;
  localparam int DW = 64, MID = 5;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  ocp_cmd_e MCmd; logic [31:0] MAddr; logic [7:0] MBurstLen; logic [1:0] MFlag;
  logic SCmdAcc, MDataValid, MDataLast, SDataAcc, SRespLast, MRespAcc;
  logic [DW-1:0] MData, SData; ocp_resp_e SResp;
  logic tx_vld, tx_rdy, tx_head, tx_tail, rx_vld, rx_rdy, rx_head, rx_tail;
  logic [1:0] tx_press; logic [DW-1:0] tx_data, rx_data;

  ocp_master_niu #(.DW(DW), .AW(32), .MASTER_ID(MID), .N_SLAVES(4), .SLV_LSB(28)) dut (.*);

  int checks = 0, failures = 0;
  function automatic void chk(input bit ok, input string msg);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endfunction
  initial begin
    #500000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  typedef struct packed { logic head, tail; logic [1:0] press; logic [DW-1:0] data; } cell_t;
  cell_t sent[$];          // cells seen on the request link
  cell_t rsp[$];           // cells to deliver on the response link
  logic [DW-1:0] rbeats[$]; ocp_resp_e rstat[$]; logic rlast[$];

  // network side: request link sink with random ready, response link source
  always @(negedge clk) begin
    #2;
    if (tx_vld && tx_rdy) sent.push_back('{tx_head, tx_tail, tx_press, tx_data});
    if (rx_vld && rx_rdy) void'(rsp.pop_front());
    if (SResp != RESP_NULL && MRespAcc) begin rbeats.push_back(SData); rstat.push_back(SResp); rlast.push_back(SRespLast); end
  end
  always @(negedge clk) begin
    tx_rdy <= ($urandom_range(0, 2) != 0);
    rx_vld <= rsp.size() > 0 && $urandom_range(0, 3) != 0;
    if (rsp.size() > 0) begin rx_head <= rsp[0].head; rx_tail <= rsp[0].tail; rx_data <= rsp[0].data; end
  end

  // OCP initiator
  task automatic ocp(input ocp_cmd_e c, input logic [31:0] a, input int len, input logic [1:0] f,
                     input bit wr);
    @(negedge clk);
    MCmd = c; MAddr = a; MBurstLen = 8'(len); MFlag = f;
    do @(negedge clk); while (!SCmdAcc_q);
    MCmd = OCP_IDLE;
    if (wr) for (int b = 0; b < len; b++) begin
      MData = {32'hDA7A0000 + b, a}; MDataValid = 1; MDataLast = (b == len - 1);
      do @(negedge clk); while (!SDataAcc_q);
      MDataValid = 0;
    end
  endtask
  logic SCmdAcc_q, SDataAcc_q;
  always @(negedge clk) begin #2; SCmdAcc_q = (MCmd != OCP_IDLE) && SCmdAcc; SDataAcc_q = MDataValid && SDataAcc; end
  always @(negedge clk) MRespAcc <= ($urandom_range(0, 2) != 0);

  task automatic wait_resp(input int n);
    int t; t = 0;
    while (rbeats.size() < n && t < 2000) begin @(negedge clk); t++; end
    chk(rbeats.size() == n, $sformatf("expected %0d response beats, got %0d", n, rbeats.size()));
  endtask
  task automatic wait_cells(input int n);
    int t; t = 0;
    while (sent.size() < n && t < 2000) begin @(negedge clk); t++; end
    repeat (5) @(negedge clk);
    chk(sent.size() == n, $sformatf("expected %0d request cells, got %0d", n, sent.size()));
  endtask

  function automatic void chk_hdr(cell_t c, pkt_op_e op, int dst, int len, int press, bit excl, bit tail);
    nttp_hdr_t h; h = nttp_hdr_t'(c.data[31:0]);
    chk(c.head && c.tail == tail, "head/tail marks of header");
    chk(h.op == op && h.dst == ID_W'(dst) && h.src == ID_W'(MID) && h.len == LEN_W'(len) &&
        h.press == 2'(press) && h.excl == excl,
        $sformatf("header %h: op %0d dst %0d src %0d len %0d press %0d excl %0d", c.data[31:0],
                  h.op, h.dst, h.src, h.len, h.press, h.excl));
    chk(c.press == 2'(press), "Press wires");
  endfunction

  function automatic cell_t rhdr(ocp_resp_e st, int len);
    return '{1'b1, len == 0, 2'b0, DW'(make_hdr(PKT_RESP, ID_W'(MID), 0, LEN_W'(len), 0, 0, st))};
  endfunction

  initial begin
    MCmd = OCP_IDLE; MAddr = 0; MBurstLen = 0; MFlag = 0; MData = 0; MDataValid = 0; MDataLast = 0;
    rx_vld = 0; rx_head = 0; rx_tail = 0; rx_data = 0; tx_rdy = 0; MRespAcc = 0;
    SCmdAcc_q = 0; SDataAcc_q = 0;
    repeat (3) @(negedge clk); rst_n = 1;

    // 1. write burst of 3 to bank 2, offset 0x40, pressure 2
    ocp(OCP_WR, 32'h2000_0040, 3, 2'd2, 1);
    wait_cells(5);
    chk_hdr(sent[0], PKT_STORE, 2, 3, 2, 0, 0);
    chk(!sent[1].head && !sent[1].tail && sent[1].data == 64'h40, "necker = offset");
    for (int b = 0; b < 3; b++)
      chk(sent[2+b].data == {32'hDA7A0000 + b, 32'h2000_0040} && sent[2+b].tail == (b == 2), "write data cell");
    rsp.push_back(rhdr(RESP_DVA, 0));
    wait_resp(1);
    chk(rstat[0] == RESP_DVA && rlast[0], "write answered DVA");
    sent.delete(); rbeats.delete(); rstat.delete(); rlast.delete();

    // 2. read burst of 2 from bank 1, offset 8
    ocp(OCP_RD, 32'h1000_0008, 2, 2'd0, 0);
    wait_cells(2);
    chk_hdr(sent[0], PKT_LOAD, 1, 2, 0, 0, 0);
    chk(sent[1].tail && sent[1].data == 64'h8, "load necker ends the packet");
    rsp.push_back(rhdr(RESP_DVA, 2));
    rsp.push_back('{1'b0, 1'b0, 2'b0, 64'h1111_2222_3333_4444});
    rsp.push_back('{1'b0, 1'b1, 2'b0, 64'h5555_6666_7777_8888});
    wait_resp(2);
    chk(rbeats[0] == 64'h1111_2222_3333_4444 && rbeats[1] == 64'h5555_6666_7777_8888, "read data");
    chk(!rlast[0] && rlast[1] && rstat[1] == RESP_DVA, "read beat marks");
    sent.delete(); rbeats.delete(); rstat.delete(); rlast.delete();

    // 3. locked read-modify-write on bank 3
    ocp(OCP_RDEX, 32'h3000_0100, 1, 2'd0, 0);
    wait_cells(3);
    chk_hdr(sent[0], PKT_LOCK, 3, 0, 0, 0, 1);
    chk_hdr(sent[1], PKT_LOAD, 3, 1, 0, 0, 0);
    rsp.push_back(rhdr(RESP_DVA, 1));
    rsp.push_back('{1'b0, 1'b1, 2'b0, 64'd41});
    wait_resp(1);
    ocp(OCP_WR, 32'h3000_0100, 1, 2'd0, 1);
    wait_cells(3 + 4);
    chk_hdr(sent[3], PKT_STORE, 3, 1, 0, 0, 0);
    chk(sent[5].tail, "store ends");
    chk_hdr(sent[6], PKT_UNLOCK, 3, 0, 0, 0, 1);
    rsp.push_back(rhdr(RESP_DVA, 0));
    wait_resp(2);
    sent.delete(); rbeats.delete(); rstat.delete(); rlast.delete();

    // 4. ReadLinked / WriteConditional with a failed reservation
    ocp(OCP_RDL, 32'h0000_0200, 1, 2'd1, 0);
    wait_cells(2);
    chk_hdr(sent[0], PKT_LOAD, 0, 1, 1, 1, 0);
    rsp.push_back(rhdr(RESP_DVA, 1));
    rsp.push_back('{1'b0, 1'b1, 2'b0, 64'd7});
    wait_resp(1);
    ocp(OCP_WRC, 32'h0000_0200, 1, 2'd1, 1);
    wait_cells(2 + 3);
    chk_hdr(sent[2], PKT_STORE, 0, 1, 1, 1, 0);
    rsp.push_back(rhdr(RESP_FAIL, 0));
    wait_resp(2);
    chk(rstat[1] == RESP_FAIL, "WriteConditional failure reported");
    sent.delete(); rbeats.delete(); rstat.delete(); rlast.delete();

    // 5. broadcast is refused locally
    ocp(OCP_BCST, 32'h0, 1, 2'd0, 0);
    wait_resp(1);
    chk(rstat[0] == RESP_ERR && sent.size() == 0, "broadcast answered ERR without packets");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
