// statistic_collector -- non-intrusive NoC performance monitor.
//
// Each collector watches NPROBE probe points.  A probe point is a pair of NTTP
// links at one NIU/switch connection: the request link and the response link
// of the same NIU.  The probes only listen (they drive no flow control).
// Stages, as in the design's collector:
//   event detection  - per probe, the selected event (mp3noc_pkg::pm_event_e):
//                      request packets, latency (request header to response
//                      header), wait cycles, payload cells or idle cycles;
//   filtering        - a request packet counts only if
//                      (header & FILTER_MASK) == FILTER_MATCH;
//   counting         - per probe a packet counter and an event counter;
//   dump             - when the collect period expires, or when software
//                      writes the send bit, the counters are copied into a
//                      frame and sent on the dump port: word 0 = {16'hC011,
//                      8'd SC_ID, 8'd NPROBE}, then per probe its packet count
//                      and its event count.  In "clear" counting mode the
//                      counters restart from zero after each dump.
// Registers (service network port, word addresses):
//   0 CTRL    [0] enable, [1] send (self-clearing), [2] cumulative mode
//   1 EVENT   event type      2 PERIOD  collect time in cycles (0: manual)
//   3 FMASK   filter mask     4 FMATCH  filter match
//   5 STATUS  (RO) [0] frame in flight, [1] a dump was dropped
//   8+2p / 9+2p (RO) packet / event counter of probe p
// Latency is measured with one outstanding request per probe, which matches
// the one-transfer-at-a-time interfaces of this system.  The register map,
// frame layout and single filter per collector are this implementation's
// choices; the stages and event types follow the design.
module statistic_collector
  import mp3noc_pkg::*;
#(
  parameter int unsigned NPROBE = 4,
  parameter int unsigned SC_ID  = 0
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // probes (request link and response link of each point)
  input  logic [NPROBE-1:0]       rq_vld,
  input  logic [NPROBE-1:0]       rq_rdy,
  input  logic [NPROBE-1:0]       rq_head,
  input  logic [NPROBE-1:0][31:0] rq_hdr,
  input  logic [NPROBE-1:0]       rs_vld,
  input  logic [NPROBE-1:0]       rs_rdy,
  input  logic [NPROBE-1:0]       rs_head,
  // dump frame output
  output logic                    dump_vld,
  input  logic                    dump_rdy,
  output logic [31:0]             dump_data,
  output logic                    dump_last,
  // register port
  input  logic                    cfg_we,
  input  logic [11:0]             cfg_addr,
  input  logic [31:0]             cfg_wdata,
  output logic [31:0]             cfg_rdata
);
  localparam int unsigned NFW = 1 + 2 * NPROBE;       // frame words
  localparam int unsigned FB  = $clog2(NFW + 1);

  logic        en, cumul, dropped;
  pm_event_e   ev_sel;
  logic [31:0] period, fmask, fmatch, tick, now;
  logic [31:0] pkt_cnt [NPROBE];
  logic [31:0] ev_cnt  [NPROBE];
  logic [31:0] ts      [NPROBE];
  logic [NPROBE-1:0] pend;

  logic [31:0] frame [NFW];
  logic        busy;
  logic [FB-1:0] widx;

  logic send_req, trigger;
  assign send_req = cfg_we && cfg_addr == 12'd0 && cfg_wdata[1];
  assign trigger  = en && (send_req || (period != 0 && tick == period - 1));

  // ---------------- event detection + filtering
  logic [NPROBE-1:0] rq_x, rs_x, rq_pass;
  always_comb begin
    for (int p = 0; p < NPROBE; p++) begin
      rq_x[p]    = rq_vld[p] && rq_rdy[p];
      rs_x[p]    = rs_vld[p] && rs_rdy[p] && rs_head[p];
      rq_pass[p] = rq_x[p] && rq_head[p] && ((rq_hdr[p] & fmask) == fmatch);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      en <= 1'b0; cumul <= 1'b0; dropped <= 1'b0; ev_sel <= EV_PACKETS;
      period <= '0; fmask <= '0; fmatch <= '0; tick <= '0; now <= '0;
      pend <= '0; busy <= 1'b0; widx <= '0;
      for (int p = 0; p < NPROBE; p++) begin pkt_cnt[p] <= '0; ev_cnt[p] <= '0; ts[p] <= '0; end
      for (int w = 0; w < NFW; w++) frame[w] <= '0;
    end else begin
      now <= now + 1;
      // registers
      if (cfg_we) unique case (cfg_addr)
        12'd0: begin en <= cfg_wdata[0]; cumul <= cfg_wdata[2]; end
        12'd1: ev_sel <= pm_event_e'(cfg_wdata[2:0]);
        12'd2: begin period <= cfg_wdata; tick <= '0; end
        12'd3: fmask  <= cfg_wdata;
        12'd4: fmatch <= cfg_wdata;
        default: ;
      endcase
      // counting
      if (en) begin
        if (period != 0) tick <= (tick == period - 1) ? '0 : tick + 1;
        for (int p = 0; p < NPROBE; p++) begin
          logic [31:0] inc;
          inc = '0;
          if (rq_pass[p]) pkt_cnt[p] <= pkt_cnt[p] + 1;
          if (rq_pass[p]) begin pend[p] <= 1'b1; ts[p] <= now; end
          unique case (ev_sel)
            EV_PACKETS: inc = 32'(rq_pass[p]);
            EV_LATENCY: if (rs_x[p] && pend[p]) begin inc = now - ts[p]; pend[p] <= 1'b0; end
            EV_WAIT:    inc = 32'(rq_vld[p] && !rq_rdy[p]);
            EV_PAYLOAD: inc = 32'(rq_x[p] && !rq_head[p]);
            EV_IDLE:    inc = 32'(!rq_vld[p]);
            default:    inc = '0;
          endcase
          ev_cnt[p] <= ev_cnt[p] + inc;
          if (trigger && !busy && !cumul) begin
            pkt_cnt[p] <= 32'(rq_pass[p]);
            ev_cnt[p]  <= inc;
          end
        end
      end
      // dump
      if (trigger) begin
        if (busy) dropped <= 1'b1;
        else begin
          busy     <= 1'b1;
          widx     <= '0;
          frame[0] <= {16'hC011, 8'(SC_ID), 8'(NPROBE)};
          for (int p = 0; p < NPROBE; p++) begin
            frame[1 + 2*p] <= pkt_cnt[p];
            frame[2 + 2*p] <= ev_cnt[p];
          end
        end
      end else if (busy && dump_rdy) begin
        if (32'(widx) == NFW - 1) busy <= 1'b0;
        widx <= widx + 1'b1;
      end
    end
  end

  assign dump_vld  = busy;
  assign dump_data = frame[widx[FB-1:0] < FB'(NFW) ? widx : '0];
  assign dump_last = busy && (32'(widx) == NFW - 1);

  always_comb begin
    cfg_rdata = '0;
    unique case (cfg_addr)
      12'd0: cfg_rdata = {29'd0, cumul, 1'b0, en};
      12'd1: cfg_rdata = 32'(ev_sel);
      12'd2: cfg_rdata = period;
      12'd3: cfg_rdata = fmask;
      12'd4: cfg_rdata = fmatch;
      12'd5: cfg_rdata = {30'd0, dropped, busy};
      default:
        for (int p = 0; p < NPROBE; p++) begin
          if (cfg_addr == 12'(8 + 2*p)) cfg_rdata = pkt_cnt[p];
          if (cfg_addr == 12'(9 + 2*p)) cfg_rdata = ev_cnt[p];
        end
    endcase
  end

endmodule
