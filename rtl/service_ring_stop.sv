// service_ring_stop -- host-interface slave on a service-network ring.
//
// The service network is a ring of host interfaces; each configurable unit
// (switch, statistic collector) owns one stop.  Words travel the ring one hop
// per cycle with a Vld/Data/Rdy handshake.  A request word whose address falls
// in this stop's window (addr[15:11] == STOP_ID) is consumed: the register
// access is made on the stop's register port and an answer word (resp=1,
// data = read value, or the written value for a write) is sent on along the
// ring in its place, so it reaches the bridge that issued the request.  Every
// other word is forwarded unchanged.
// Register port: reg_we pulses for one cycle on a write; reg_addr is the
// 11-bit register index; reg_rdata is sampled in the same cycle.
// Timing: one output register per stop, so each hop costs one cycle.  The
// window size and the word format (mp3noc_pkg::svc_word_t) are this
// implementation's choices.
module service_ring_stop
  import mp3noc_pkg::*;
#(
  parameter int unsigned STOP_ID = 0
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_vld,
  output logic        in_rdy,
  input  svc_word_t   in_data,
  output logic        out_vld,
  input  logic        out_rdy,
  output svc_word_t   out_data,
  output logic        reg_we,
  output logic [11:0] reg_addr,
  output logic [31:0] reg_wdata,
  input  logic [31:0] reg_rdata
);
  logic hit;
  assign hit = !in_data.resp && (in_data.addr[15:11] == 5'(STOP_ID));

  assign in_rdy    = !out_vld || out_rdy;
  assign reg_we    = in_vld && in_rdy && hit && in_data.wr;
  assign reg_addr  = {1'b0, in_data.addr[10:0]};
  assign reg_wdata = in_data.data;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_vld <= 1'b0; out_data <= '0;
    end else begin
      if (out_vld && out_rdy) out_vld <= 1'b0;
      if (in_vld && in_rdy) begin
        out_vld  <= 1'b1;
        out_data <= in_data;
        if (hit) begin
          out_data.resp <= 1'b1;
          if (!in_data.wr) out_data.data <= reg_rdata;
        end
      end
    end
  end

endmodule
