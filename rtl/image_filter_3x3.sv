// image_filter_3x3 -- streaming 3x3 image filter coprocessor (mean or median).
//
// One of the coprocessor case studies: a 3x3 window slides along three
// neighbouring image lines.  Each input transfer brings one 32-bit word per
// line (in_row0..2), i.e. four 8-bit pixels per line, pixel 0 in the low
// byte.  The filter keeps six pixels per line: the last two of the previous
// word and the four new ones (the 6 x 3 pixel store of the design).  From
// them it forms four windows, centred on stored pixels 1..4, and produces one
// 32-bit result word of four 8-bit results.  Following the stream code of the
// design, the result of the first window (centre pixel 1) is in the high byte
// and that of the fourth in the low byte.
//   MEAN   (MEDIAN=0): sum of the nine pixels / 9, as in the reference C code.
//                      The hardware divides by multiplying with 7282 and
//                      shifting right by 16. This is exact for every sum up to
//                      9 * 255.
//   MEDIAN (MEDIAN=1): the middle value of the nine pixels, found with a
//                      bubble sort, as the design describes.
// The window is stored in registers, the design's "pipeline using registers"
// variant.  The two stored pixels of every line reset to zero, so the first
// word of an image sees zeros to its left.
// Interface: valid/ready streams (FIFO-like, as the stream channels of the
// design).  A word is taken when in_valid && in_ready.  Its result appears
// registered on out_data the next cycle and is held until out_ready.  Rate:
// one word in and one word out per cycle; latency: one cycle.
// Own choices: the handshake, the byte orders above, the exact divide-by-9
// (the stream code shifts the sum right by 3, which cannot fit in 8 bits and
// is not taken).
module image_filter_3x3 #(
  parameter bit MEDIAN = 1'b0
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  output logic        in_ready,
  input  logic [31:0] in_row0,
  input  logic [31:0] in_row1,
  input  logic [31:0] in_row2,
  output logic        out_valid,
  input  logic        out_ready,
  output logic [31:0] out_data
);
  logic [7:0] keep [3][2];          // last two pixels of each line
  logic [7:0] win  [3][6];          // window store after the incoming word
  logic [31:0] res;

  assign in_ready = !out_valid || out_ready;

  always_comb begin
    logic [31:0] rows [3];
    rows[0] = in_row0; rows[1] = in_row1; rows[2] = in_row2;
    for (int r = 0; r < 3; r++) begin
      win[r][0] = keep[r][0];
      win[r][1] = keep[r][1];
      for (int k = 0; k < 4; k++) win[r][2 + k] = rows[r][8*k +: 8];
    end
  end

  // four window results
  always_comb begin
    res = '0;
    for (int c = 1; c <= 4; c++) begin
      logic [7:0]  v [9];
      logic [7:0]  t;
      logic [11:0] sum;
      logic [7:0]  r8;
      sum = '0;
      t   = '0;
      r8  = '0;
      for (int r = 0; r < 3; r++)
        for (int d = 0; d < 3; d++) begin
          v[3*r + d] = win[r][c - 1 + d];
          sum += 12'(win[r][c - 1 + d]);
        end
      if (MEDIAN) begin
        for (int i = 0; i < 8; i++)
          for (int j = 0; j < 8 - i; j++)
            if (v[j] > v[j + 1]) begin t = v[j]; v[j] = v[j + 1]; v[j + 1] = t; end
        r8 = v[4];
      end else begin
        r8 = 8'((28'(sum) * 28'd7282) >> 16);
      end
      res[8*(4 - c) +: 8] = r8;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_data  <= '0;
      for (int r = 0; r < 3; r++) begin keep[r][0] <= '0; keep[r][1] <= '0; end
    end else begin
      if (out_valid && out_ready) out_valid <= 1'b0;
      if (in_valid && in_ready) begin
        out_valid <= 1'b1;
        out_data  <= res;
        for (int r = 0; r < 3; r++) begin keep[r][0] <= win[r][4]; keep[r][1] <= win[r][5]; end
      end
    end
  end

endmodule
