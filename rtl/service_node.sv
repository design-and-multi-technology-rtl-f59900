// service_node -- joins a secondary service ring to the main ring.
//
// A request word on the main ring whose address lies in the node's window
// (addr[15:11] between SEC_LO and SEC_HI) leaves the main ring for the
// secondary ring; every other main-ring word continues on the main ring.
// Words coming back around the secondary ring (answers, or requests nobody
// claimed) are put back on the main ring, with priority over main-ring
// traffic so the secondary ring always drains.
// Timing: one output register on each ring output, one cycle per hop.
module service_node
  import mp3noc_pkg::*;
#(
  parameter int unsigned SEC_LO = 16,
  parameter int unsigned SEC_HI = 31
) (
  input  logic      clk,
  input  logic      rst_n,
  // main ring
  input  logic      main_in_vld,
  output logic      main_in_rdy,
  input  svc_word_t main_in_data,
  output logic      main_out_vld,
  input  logic      main_out_rdy,
  output svc_word_t main_out_data,
  // secondary ring
  output logic      sec_out_vld,
  input  logic      sec_out_rdy,
  output svc_word_t sec_out_data,
  input  logic      sec_in_vld,
  output logic      sec_in_rdy,
  input  svc_word_t sec_in_data
);
  logic to_sec;
  assign to_sec = !main_in_data.resp &&
                  (32'(main_in_data.addr[15:11]) >= SEC_LO) &&
                  (32'(main_in_data.addr[15:11]) <= SEC_HI);

  logic mo_free, so_free;
  assign mo_free = !main_out_vld || main_out_rdy;
  assign so_free = !sec_out_vld || sec_out_rdy;

  assign sec_in_rdy  = mo_free;
  assign main_in_rdy = to_sec ? so_free : (mo_free && !sec_in_vld);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      main_out_vld <= 1'b0; main_out_data <= '0;
      sec_out_vld  <= 1'b0; sec_out_data  <= '0;
    end else begin
      if (main_out_vld && main_out_rdy) main_out_vld <= 1'b0;
      if (sec_out_vld && sec_out_rdy)   sec_out_vld  <= 1'b0;
      if (sec_in_vld && sec_in_rdy) begin
        main_out_vld <= 1'b1; main_out_data <= sec_in_data;
      end else if (main_in_vld && main_in_rdy && !to_sec) begin
        main_out_vld <= 1'b1; main_out_data <= main_in_data;
      end
      if (main_in_vld && main_in_rdy && to_sec) begin
        sec_out_vld <= 1'b1; sec_out_data <= main_in_data;
      end
    end
  end

endmodule
