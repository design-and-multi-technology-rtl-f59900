// tb_pm_switch -- self-checking test of the monitoring-network switch.
// Five sources emit frames of random length whose words are tagged
// {source, frame number, word index}; the sink applies random back-pressure.
// Checks: every frame arrives whole and in order, frames are never
// interleaved, the last word is marked, round-robin fairness (while a source
// waits, no other source is granted twice), and a source masked in the
// enable register is not served until it is enabled again.
`timescale 1ns/1ps
module tb_pm_switch;
  localparam int NS = 5;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [NS-1:0] in_vld, in_rdy, in_last; logic [NS-1:0][31:0] in_data;
  logic out_vld, out_rdy, out_last; logic [31:0] out_data;
  logic cfg_we; logic [11:0] cfg_addr; logic [31:0] cfg_wdata, cfg_rdata;
  pm_switch #(.NSRC(NS)) dut (.*);

  int checks = 0, failures = 0;
  function automatic void chk(input bit ok, input string msg);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endfunction
  initial begin
    #1000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  int sent_frames [NS], recv_frames [NS], len [NS], idx [NS], left_frames [NS];
  int cur_src = -1, widx = 0;
  int grants_while_waiting [NS];
  bit produce;

  // sources: a frame is {src[31:28], frame[27:12], index[11:0]}
  always @(negedge clk) begin
    #2;
    for (int s = 0; s < NS; s++) if (in_vld[s] && in_rdy[s]) begin
      if (in_last[s]) begin sent_frames[s]++; idx[s] = 0; len[s] = $urandom_range(1, 9); end
      else idx[s]++;
    end
    // sink
    if (out_vld && out_rdy) begin
      int s, f, i;
      s = out_data[31:28]; f = out_data[27:12]; i = out_data[11:0];
      if (cur_src < 0) begin
        // a new frame starts: fairness bookkeeping
        for (int o = 0; o < NS; o++)
          if (o != s && in_vld[o]) begin
            grants_while_waiting[o]++;
            chk(grants_while_waiting[o] <= NS - 1, $sformatf("source %0d starved", o));
          end
        grants_while_waiting[s] = 0;
        cur_src = s;
        chk(f == recv_frames[s], $sformatf("frame order of source %0d", s));
        chk(i == 0, "frame starts with word 0");
      end else chk(s == cur_src && i == widx, $sformatf("interleaving or gap: src %0d idx %0d", s, i));
      widx = i + 1;
      if (out_last) begin
        chk(out_data[11:0] == 12'(len_at_send(s)), "last word marks the frame end");
        recv_frames[s]++; cur_src = -1; widx = 0;
      end
    end
  end
  int flen [NS][$];
  function automatic int len_at_send(int s); return flen[s][recv_frames[s]] - 1; endfunction

  always @(negedge clk) begin
    for (int s = 0; s < NS; s++) begin
      in_vld[s] = produce && left_frames[s] > 0 && (idx[s] > 0 || $urandom_range(0, 3) == 0);
      if (idx[s] == 0 && flen[s].size() == sent_frames[s]) flen[s].push_back(len[s]);
      in_data[s] = {4'(s), 16'(sent_frames[s]), 12'(idx[s])};
      in_last[s] = (idx[s] == len[s] - 1);
    end
    out_rdy = $urandom_range(0, 3) != 0;
  end

  always @(posedge clk) for (int s = 0; s < NS; s++) if (in_vld[s] && in_rdy[s] && in_last[s]) left_frames[s]--;

  initial begin
    in_vld = 0; in_data = 0; in_last = 0; out_rdy = 0; cfg_we = 0; cfg_addr = 0; cfg_wdata = 0;
    produce = 0;
    for (int s = 0; s < NS; s++) begin
      sent_frames[s] = 0; recv_frames[s] = 0; idx[s] = 0; len[s] = 3 + s; left_frames[s] = 20;
      grants_while_waiting[s] = 0;
    end
    repeat (3) @(negedge clk); rst_n = 1;
    produce = 1;
    repeat (1500) @(negedge clk);
    for (int s = 0; s < NS; s++) chk(recv_frames[s] == 20, $sformatf("source %0d: %0d of 20 frames", s, recv_frames[s]));

    // mask source 2, then give every source more frames
    @(negedge clk); cfg_we = 1; cfg_addr = 1; cfg_wdata = 32'b11011; @(negedge clk); cfg_we = 0;
    for (int s = 0; s < NS; s++) left_frames[s] = 5;
    repeat (600) @(negedge clk);
    chk(recv_frames[2] == 20, "masked source is not served");
    chk(recv_frames[0] == 25 && recv_frames[4] == 25, "other sources still served");
    cfg_addr = 1; #1 chk(cfg_rdata == 32'b11011, "enable register read back");
    @(negedge clk); cfg_we = 1; cfg_addr = 1; cfg_wdata = 32'b11111; @(negedge clk); cfg_we = 0;
    repeat (300) @(negedge clk);
    chk(recv_frames[2] == 25, "source served again once enabled");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
