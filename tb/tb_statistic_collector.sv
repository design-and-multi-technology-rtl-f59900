// tb_statistic_collector -- self-checking test of the NoC statistic collector.
// Four probe points are driven with random traffic (valid/ready/head and
// random headers) while a reference model in the testbench counts, cycle by
// cycle, what each event type should give.  Checks:
//   * packet counting with and without a header filter (mask/match on dst);
//   * payload, wait and idle cycle counting, in clearing and cumulative mode;
//   * periodic dumps: a frame every PERIOD cycles, frame layout
//     {C011, id, probes} followed by packet/event count pairs;
//   * latency: directed request/response pairs with known delays, the event
//     counter must hold the exact sum of the delays;
//   * register read-back of counters, a manual "send", and the dropped-dump
//     status bit when a trigger arrives while a frame is still in flight.
`timescale 1ns/1ps
module tb_statistic_collector;
  import mp3noc_pkg::*;
  localparam int NP = 4, SCID = 3, NFW = 1 + 2 * NP;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [NP-1:0] rq_vld, rq_rdy, rq_head, rs_vld, rs_rdy, rs_head;
  logic [NP-1:0][31:0] rq_hdr;
  logic dump_vld, dump_rdy, dump_last; logic [31:0] dump_data;
  logic cfg_we; logic [11:0] cfg_addr; logic [31:0] cfg_wdata, cfg_rdata;
  statistic_collector #(.NPROBE(NP), .SC_ID(SCID)) dut (.*);

  int checks = 0, failures = 0;
  function automatic void chk(input bit ok, input string msg);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endfunction
  initial begin
    #2000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // ---------------- reference model (inputs are driven at negedges)
  bit m_en, m_cumul; int m_ev; longint m_period, m_tick;
  logic [31:0] m_fmask, m_fmatch;
  longint m_pkt [NP], m_evc [NP];
  int m_busy;
  typedef logic [31:0] frame_t [NFW];
  logic [31:0] exp_q[$], got_q[$];
  always @(posedge clk) if (rst_n) begin
    bit trig, snap;
    trig = m_en && ((cfg_we && cfg_addr == 0 && cfg_wdata[1]) || (m_period != 0 && m_tick == m_period - 1));
    snap = trig && m_busy == 0;
    if (snap) begin
      exp_q.push_back({16'hC011, 8'(SCID), 8'(NP)});
      for (int p = 0; p < NP; p++) begin exp_q.push_back(32'(m_pkt[p])); exp_q.push_back(32'(m_evc[p])); end
    end
    if (m_busy > 0 && dump_rdy) m_busy--;
    if (snap) m_busy = NFW;
    if (m_en) begin
      if (m_period != 0) m_tick = (m_tick == m_period - 1) ? 0 : m_tick + 1;
      for (int p = 0; p < NP; p++) begin
        bit x, pass; longint inc;
        x = rq_vld[p] && rq_rdy[p];
        pass = x && rq_head[p] && ((rq_hdr[p] & m_fmask) == m_fmatch);
        case (m_ev)
          0: inc = pass;
          2: inc = rq_vld[p] && !rq_rdy[p];
          3: inc = x && !rq_head[p];
          4: inc = !rq_vld[p];
          default: inc = 0;
        endcase
        if (snap && !m_cumul) begin m_pkt[p] = pass; m_evc[p] = inc; end
        else begin m_pkt[p] += pass; m_evc[p] += inc; end
      end
    end
    if (cfg_we) case (cfg_addr)
      0: begin m_en = cfg_wdata[0]; m_cumul = cfg_wdata[2]; end
      1: m_ev = int'(cfg_wdata[2:0]);
      2: begin m_period = cfg_wdata; m_tick = 0; end
      3: m_fmask = cfg_wdata;
      4: m_fmatch = cfg_wdata;
      default: ;
    endcase
  end
  always @(negedge clk) begin
    #2;
    if (dump_vld && dump_rdy) begin
    got_q.push_back(dump_data);
    chk(dump_last == (got_q.size() % NFW == 0), "dump_last on the last frame word only");
    end
  end

  // ---------------- stimulus helpers
  bit random_traffic;
  always @(negedge clk) if (random_traffic) begin
    for (int p = 0; p < NP; p++) begin
      rq_vld[p] = $urandom_range(0, 2) != 0;
      rq_rdy[p] = $urandom_range(0, 3) != 0;
      rq_head[p] = $urandom_range(0, 2) == 0;
      rq_hdr[p] = $urandom;
      rs_vld[p] = 0; rs_rdy[p] = 1; rs_head[p] = 0;
    end
  end
  task automatic wr(input int a, input logic [31:0] d);
    @(negedge clk); cfg_we = 1; cfg_addr = 12'(a); cfg_wdata = d;
    @(negedge clk); cfg_we = 0;
  endtask
  task automatic rd(input int a, output logic [31:0] d);
    @(negedge clk); cfg_addr = 12'(a); #1 d = cfg_rdata;
  endtask
  task automatic compare_frames(string what);
    repeat (NFW + 4) @(negedge clk);
    chk(got_q.size() == exp_q.size() && got_q.size() > 0,
        $sformatf("%s: %0d frame words, expected %0d", what, got_q.size(), exp_q.size()));
    for (int i = 0; i < got_q.size() && i < exp_q.size(); i++)
      chk(got_q[i] == exp_q[i], $sformatf("%s: frame word %0d = %h, expected %h", what, i, got_q[i], exp_q[i]));
    got_q.delete(); exp_q.delete();
  endtask
  task automatic stop();
    random_traffic = 0;
    @(negedge clk); rq_vld = '0; rs_vld = '0;
    wr(0, 0);
  endtask

  logic [31:0] d;
  initial begin
    rq_vld = 0; rq_rdy = 0; rq_head = 0; rq_hdr = 0; rs_vld = 0; rs_rdy = 0; rs_head = 0;
    dump_rdy = 1; cfg_we = 0; cfg_addr = 0; cfg_wdata = 0; random_traffic = 0;
    m_en = 0; m_cumul = 0; m_ev = 0; m_period = 0; m_tick = 0; m_fmask = 0; m_fmatch = 0; m_busy = 0;
    for (int p = 0; p < NP; p++) begin m_pkt[p] = 0; m_evc[p] = 0; end
    repeat (3) @(negedge clk); rst_n = 1;

    // 1. packets, no filter, manual send
    wr(1, EV_PACKETS); wr(0, 1);
    random_traffic = 1; repeat (300) @(negedge clk);
    wr(0, 3);
    compare_frames("manual packets");
    stop();
    rd(8, d); chk(d == 32'(m_pkt[0]), "packet counter of probe 0 read back");
    rd(11, d); chk(d == 32'(m_evc[1]), "event counter of probe 1 read back");
    rd(0, d); chk(d == 0, "CTRL read back");

    // 2. payload cells, filter on dst == 2, dump every 50 cycles
    wr(1, EV_PAYLOAD); wr(3, 32'h0F8); wr(4, 32'h010); wr(2, 50); wr(0, 1);
    random_traffic = 1; repeat (260) @(negedge clk);
    stop(); compare_frames("periodic payload with filter");

    // 3. wait cycles, cumulative
    wr(1, EV_WAIT); wr(3, 0); wr(4, 0); wr(2, 40); wr(0, 5);
    random_traffic = 1; repeat (200) @(negedge clk);
    stop(); compare_frames("cumulative wait");

    // 4. idle cycles
    wr(1, EV_IDLE); wr(2, 30); wr(0, 1);
    random_traffic = 1; repeat (150) @(negedge clk);
    stop(); compare_frames("idle");

    // 5. latency: probe p answers L = 3 + p + k cycles after request k
    wr(1, EV_LATENCY); wr(2, 0); wr(0, 1); wr(0, 3);       // clear counters with a send
    repeat (NFW + 4) @(negedge clk); got_q.delete(); exp_q.delete();
    for (int k = 0; k < 3; k++) begin
      @(negedge clk);
      rq_vld = '1; rq_rdy = '1; rq_head = '1; rq_hdr = '0;
      @(negedge clk); rq_vld = '0;
      for (int c = 1; c <= 3 + NP + k; c++) begin
        rs_vld = '0; rs_head = '0; rs_rdy = '1;
        for (int p = 0; p < NP; p++) if (c == 3 + p + k) begin rs_vld[p] = 1; rs_head[p] = 1; end
        @(negedge clk);
      end
      rs_vld = '0;
    end
    wr(0, 0);
    for (int p = 0; p < NP; p++) begin
      rd(9 + 2 * p, d);
      chk(d == 32'(3 * (3 + p) + 3), $sformatf("latency sum of probe %0d = %0d", p, d));
      rd(8 + 2 * p, d);
      chk(d == 3, "latency test packets");
    end

    // 6. dropped dump while a frame is stalled
    got_q.delete(); exp_q.delete();
    dump_rdy = 0; wr(0, 1); wr(0, 3); wr(0, 3);
    rd(5, d); chk(d == 3, "STATUS: frame in flight and a dump dropped");
    dump_rdy = 1; repeat (NFW + 2) @(negedge clk);
    chk(got_q.size() == NFW, $sformatf("the stalled frame is delivered whole (%0d words)", got_q.size()));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
