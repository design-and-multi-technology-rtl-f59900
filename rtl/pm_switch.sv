// pm_switch -- merges the dump frames of the statistic collectors.
//
// The performance-monitoring network has one switch that gathers the frames
// of all collectors and delivers them to the monitoring tile (the PowerPC tile
// in the system).  Frames are never interleaved: an input keeps the output
// from its first word to the word marked last, then the next requesting
// input is chosen round-robin.  Inputs can be masked through the enable
// register (service network), which resets to all enabled.
// Timing: combinational forwarding, one word per cycle, no added latency.
module pm_switch #(
  parameter int unsigned NSRC = 5
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [NSRC-1:0]       in_vld,
  output logic [NSRC-1:0]       in_rdy,
  input  logic [NSRC-1:0][31:0] in_data,
  input  logic [NSRC-1:0]       in_last,
  output logic                  out_vld,
  input  logic                  out_rdy,
  output logic [31:0]           out_data,
  output logic                  out_last,
  // register port: word 1 = input enable mask, word 0 = status (RO)
  input  logic                  cfg_we,
  input  logic [11:0]           cfg_addr,
  input  logic [31:0]           cfg_wdata,
  output logic [31:0]           cfg_rdata
);
  localparam int unsigned SB = (NSRC > 1) ? $clog2(NSRC) : 1;

  logic [NSRC-1:0] enable;
  logic            busy;
  logic [SB-1:0]   cur, rr;
  logic [SB-1:0]   pick;
  logic            pick_v;
  int unsigned     cand;

  always_comb begin
    pick = '0; pick_v = 1'b0; cand = 0;
    for (int k = NSRC - 1; k >= 0; k--) begin
      cand = (32'(rr) + 32'(k)) % NSRC;
      if (in_vld[cand] && enable[cand]) begin pick = SB'(cand); pick_v = 1'b1; end
    end
  end

  logic [SB-1:0] s;
  logic          s_v;
  assign s   = busy ? cur : pick;
  assign s_v = busy ? 1'b1 : pick_v;

  assign out_vld  = s_v && in_vld[s];
  assign out_data = in_data[s];
  assign out_last = in_last[s];
  always_comb begin
    in_rdy = '0;
    if (s_v) in_rdy[s] = out_rdy;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; cur <= '0; rr <= '0; enable <= '1;
    end else begin
      if (cfg_we && cfg_addr == 12'd1) enable <= cfg_wdata[NSRC-1:0];
      if (out_vld && out_rdy) begin
        if (out_last) begin
          busy <= 1'b0;
          rr   <= SB'((32'(s) + 1) % NSRC);
        end else begin
          busy <= 1'b1;
          cur  <= s;
        end
      end
    end
  end

  assign cfg_rdata = (cfg_addr == 12'd1) ? 32'(enable) :
                     (cfg_addr == 12'd0) ? {27'd0, busy, 4'(cur)} : '0;

endmodule
