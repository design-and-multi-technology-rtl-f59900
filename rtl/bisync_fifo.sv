// bisync_fifo -- bi-synchronous FIFO joining two independent clock domains.
//
// It is the building block of the GALS partitioning: every processor tile and
// every NoC runs on its own clock, and words cross between them only through
// FIFOs like this one.  The port names follow the FSL-style signal list of the
// design: a sender side (M_*) clocked by M_Clk and a receiver side (S_*)
// clocked by S_Clk, each word carrying DATA_W data bits plus one control bit.
//
// How it works (this implementation's choice; the design gives only the ports
// and the behaviour): a dual-clock RAM of DEPTH entries, binary write/read
// pointers one bit wider than the address, exchanged between the domains as
// Gray code through two-flop synchronisers.  M_Full and S_Exists are therefore
// conservative: a word written becomes visible to the receiver 2-3 S_Clk
// cycles later, and freed space is seen by the sender 2-3 M_Clk cycles later.
//
// Timing: S_Data/S_Control show the oldest word whenever S_Exists is high
// (first-word fall-through); S_Read pops it at the next S_Clk edge.  M_Write
// while M_Full is high is ignored.  Each side has its own active-low reset;
// both must be asserted together at start-up.
module bisync_fifo #(
  parameter int unsigned DATA_W = 32,
  parameter int unsigned DEPTH  = 16      // power of two
) (
  input  logic              M_Clk,
  input  logic              M_Rst_n,
  input  logic [DATA_W-1:0] M_Data,
  input  logic              M_Control,
  input  logic              M_Write,
  output logic              M_Full,

  input  logic              S_Clk,
  input  logic              S_Rst_n,
  output logic [DATA_W-1:0] S_Data,
  output logic              S_Control,
  input  logic              S_Read,
  output logic              S_Exists
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [DATA_W:0] mem [DEPTH];

  logic [AW:0] wbin, wgray, rbin, rgray;
  logic [AW:0] rgray_m1, rgray_m2;   // read pointer seen in the sender domain
  logic [AW:0] wgray_s1, wgray_s2;   // write pointer seen in the receiver domain

  function automatic logic [AW:0] bin2gray(logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  // ---------------- sender domain
  logic        do_write;
  logic [AW:0] wbin_nx;
  assign do_write = M_Write && !M_Full;
  assign wbin_nx  = wbin + (AW+1)'(do_write);

  always_ff @(posedge M_Clk or negedge M_Rst_n) begin
    if (!M_Rst_n) begin
      wbin <= '0; wgray <= '0; rgray_m1 <= '0; rgray_m2 <= '0;
    end else begin
      wbin     <= wbin_nx;
      wgray    <= bin2gray(wbin_nx);
      rgray_m1 <= rgray;
      rgray_m2 <= rgray_m1;
    end
  end

  always_ff @(posedge M_Clk) begin
    if (do_write) mem[wbin[AW-1:0]] <= {M_Control, M_Data};
  end

  // full: write pointer one lap ahead of the synchronised read pointer
  assign M_Full = (wgray == {~rgray_m2[AW:AW-1], rgray_m2[AW-2:0]});

  // ---------------- receiver domain
  logic        do_read;
  logic [AW:0] rbin_nx;
  assign S_Exists = (rgray != wgray_s2);
  assign do_read  = S_Read && S_Exists;
  assign rbin_nx  = rbin + (AW+1)'(do_read);

  always_ff @(posedge S_Clk or negedge S_Rst_n) begin
    if (!S_Rst_n) begin
      rbin <= '0; rgray <= '0; wgray_s1 <= '0; wgray_s2 <= '0;
    end else begin
      rbin     <= rbin_nx;
      rgray    <= bin2gray(rbin_nx);
      wgray_s1 <= wgray;
      wgray_s2 <= wgray_s1;
    end
  end

  assign {S_Control, S_Data} = mem[rbin[AW-1:0]];

endmodule
