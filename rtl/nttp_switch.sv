// nttp_switch -- NIN x NOUT wormhole packet switch of the NoCs.
//
// Every request and response network in the system is built from this one
// switch.  Its parts are the ones of the design's switch: input control, a
// route table, a full crossbar moving up to one word per port per cycle, one
// arbiter per output and an output register stage.
//   * Routing: the header cell's dst field indexes a route table that gives
//     the output port.  There is one table per input port; all entries reset
//     to (dst >> ROUTE_SHIFT) % NOUT and can be rewritten at run time.
//   * Wormhole: a granted output stays with its input until the tail cell.
//   * Arbitration: among heads waiting for a free output, the highest Press
//     (pressure) level wins; ties are broken round-robin.  An output whose
//     arbitration-enable bit is cleared grants nothing.
//   * Lock: a LOCK packet keeps its output reserved for its input after its
//     tail, until an UNLOCK packet from that input has passed.
// Register port (used by the service network), word addresses:
//   0x000 status (RO): [15:0] output owned, [31:16] output locked
//   0x001 arbitration enable per output (RW, resets to all ones)
//   0x100 + 32*in + dst: route table entry of input "in" (RW)
// Choices of this implementation: the round-robin policy (the design lists
// several), the single output register stage and the register map.
// Timing: a cell accepted at an input appears at the output one cycle later.
module nttp_switch
  import mp3noc_pkg::*;
#(
  parameter int unsigned NIN         = 4,
  parameter int unsigned NOUT        = 4,
  parameter int unsigned DW          = 64,
  parameter int unsigned ROUTE_SHIFT = 0
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic [NIN-1:0]            in_vld,
  output logic [NIN-1:0]            in_rdy,
  input  logic [NIN-1:0]            in_head,
  input  logic [NIN-1:0]            in_tail,
  input  logic [NIN-1:0][1:0]       in_press,
  input  logic [NIN-1:0][DW-1:0]    in_data,
  output logic [NOUT-1:0]           out_vld,
  input  logic [NOUT-1:0]           out_rdy,
  output logic [NOUT-1:0]           out_head,
  output logic [NOUT-1:0]           out_tail,
  output logic [NOUT-1:0][1:0]      out_press,
  output logic [NOUT-1:0][DW-1:0]   out_data,
  // register port
  input  logic                      cfg_we,
  input  logic [11:0]               cfg_addr,
  input  logic [31:0]               cfg_wdata,
  output logic [31:0]               cfg_rdata
);
  localparam int unsigned OB   = (NOUT > 1) ? $clog2(NOUT) : 1;
  localparam int unsigned IB   = (NIN > 1) ? $clog2(NIN) : 1;
  localparam int unsigned NDST = 1 << ID_W;

  logic [OB-1:0]   route [NIN][NDST];
  logic [NOUT-1:0] arb_en;

  logic [NIN-1:0]          act;        // input is inside a packet
  logic [NIN-1:0][OB-1:0]  dest;       // output of the packet in progress
  logic [NOUT-1:0]         own_v, lock;
  logic [NOUT-1:0][IB-1:0] own, rr;

  // ---------------- requested output per input
  logic [NIN-1:0][OB-1:0] req_o;
  always_comb begin
    for (int i = 0; i < NIN; i++) begin
      nttp_hdr_t h;
      h = nttp_hdr_t'(in_data[i][HDR_W-1:0]);
      req_o[i] = act[i] ? dest[i] : route[i][h.dst];
    end
  end

  // ---------------- per-output arbitration and crossbar
  logic [NOUT-1:0]          sel_v, xfer;
  logic [NOUT-1:0][IB-1:0]  sel;
  logic [1:0]  best;
  int unsigned cand;
  always_comb begin
    best = '0;
    cand = 0;
    xfer = '0;
    for (int o = 0; o < NOUT; o++) begin
      sel_v[o] = 1'b0;
      sel[o]   = '0;
      if (own_v[o]) begin
        sel[o]   = own[o];
        sel_v[o] = in_vld[own[o]] && (req_o[own[o]] == OB'(o));
      end else if (arb_en[o]) begin
        best = '0;
        for (int k = 0; k < NIN; k++) begin
          cand = (32'(rr[o]) + 32'(k)) % NIN;
          if (in_vld[cand] && in_head[cand] && !act[cand] && req_o[cand] == OB'(o) &&
              (!sel_v[o] || in_press[cand] > best)) begin
            sel_v[o] = 1'b1;
            sel[o]   = IB'(cand);
            best     = in_press[cand];
          end
        end
      end
      xfer[o] = sel_v[o] && (!out_vld[o] || out_rdy[o]);
    end
  end

  always_comb begin
    in_rdy = '0;
    for (int o = 0; o < NOUT; o++)
      if (xfer[o]) in_rdy[sel[o]] = 1'b1;
  end

  // ---------------- state
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      act <= '0; dest <= '0; own_v <= '0; own <= '0; lock <= '0; rr <= '0;
      out_vld <= '0; out_head <= '0; out_tail <= '0; out_press <= '0; out_data <= '0;
    end else begin
      for (int o = 0; o < NOUT; o++) begin
        if (out_vld[o] && out_rdy[o]) out_vld[o] <= 1'b0;
        if (xfer[o]) begin
          automatic int unsigned i = 32'(sel[o]);
          automatic nttp_hdr_t h = nttp_hdr_t'(in_data[i][HDR_W-1:0]);
          automatic logic lock_nx = lock[o];
          out_vld[o]   <= 1'b1;
          out_head[o]  <= in_head[i];
          out_tail[o]  <= in_tail[i];
          out_press[o] <= in_press[i];
          out_data[o]  <= in_data[i];
          if (in_head[i]) begin
            if (h.op == PKT_LOCK)   lock_nx = 1'b1;
            if (h.op == PKT_UNLOCK) lock_nx = 1'b0;
            if (!own_v[o]) rr[o] <= IB'((i + 1) % NIN);
          end
          lock[o] <= lock_nx;
          if (in_tail[i]) begin
            act[i]   <= 1'b0;
            own_v[o] <= lock_nx;
            own[o]   <= IB'(i);
          end else begin
            act[i]   <= 1'b1;
            dest[i]  <= OB'(o);
            own_v[o] <= 1'b1;
            own[o]   <= IB'(i);
          end
        end
      end
    end
  end

  // ---------------- registers
  logic [11:0] ri;        // offset into the route-table window
  logic        ri_ok;
  assign ri    = cfg_addr - 12'h100;
  assign ri_ok = (cfg_addr >= 12'h100) && (int'(ri) < NIN * NDST);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      arb_en <= '1;
      for (int i = 0; i < NIN; i++)
        for (int d = 0; d < NDST; d++)
          route[i][d] <= OB'((d >> ROUTE_SHIFT) % NOUT);
    end else if (cfg_we) begin
      if (cfg_addr == 12'h001) arb_en <= cfg_wdata[NOUT-1:0];
      else if (ri_ok) route[ri[5 +: IB]][ri[4:0]] <= cfg_wdata[OB-1:0];
    end
  end

  always_comb begin
    cfg_rdata = '0;
    if (cfg_addr == 12'h000) begin
      cfg_rdata[NOUT-1:0]      = own_v;
      cfg_rdata[16 +: NOUT]    = lock;
    end else if (cfg_addr == 12'h001) cfg_rdata[NOUT-1:0] = arb_en;
    else if (ri_ok) cfg_rdata[OB-1:0] = route[ri[5 +: IB]][ri[4:0]];
  end

endmodule
