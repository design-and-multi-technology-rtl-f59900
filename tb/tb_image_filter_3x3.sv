// tb_image_filter_3x3 -- self-checking test of the 3x3 filter coprocessor,
// both variants (mean and median) side by side on the same stream.
// Random images of three lines by 4*NW pixels are streamed in with random
// input gaps and random output back-pressure.  The expected results are
// computed from whole stored lines: window column c of word n sits at image
// column 4n-2+c, with columns left of the image (and the carry-over from the
// previous image) taken from what the filter kept: zero after reset, else the
// last two pixels of the previous word.  The mean is floor(sum/9) and the
// median the fifth of the nine values after sorting.  Also checked: one word
// per cycle at full rate (no gaps, no back-pressure), one cycle latency.
`timescale 1ns/1ps
module tb_image_filter_3x3;
  localparam int NW = 40;               // words per line and image
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid, in_ready_m, in_ready_d, out_valid_m, out_valid_d, out_ready;
  logic [31:0] row [3], out_m, out_d;

  image_filter_3x3 #(.MEDIAN(1'b0)) u_mean (.clk, .rst_n, .in_valid, .in_ready(in_ready_m),
    .in_row0(row[0]), .in_row1(row[1]), .in_row2(row[2]),
    .out_valid(out_valid_m), .out_ready, .out_data(out_m));
  image_filter_3x3 #(.MEDIAN(1'b1)) u_med (.clk, .rst_n, .in_valid, .in_ready(in_ready_d),
    .in_row0(row[0]), .in_row1(row[1]), .in_row2(row[2]),
    .out_valid(out_valid_d), .out_ready, .out_data(out_d));

  int checks = 0, failures = 0;
  function automatic void chk(input bit ok, input string msg);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endfunction
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // image lines with two carried pixels in front: pix[r][0..1] = carried
  logic [7:0] pix [3][4*NW + 2];
  logic [31:0] exp_m [$], exp_d [$];

  function automatic void expect_word(int n);
    logic [31:0] em, ed;
    em = '0; ed = '0;
    for (int c = 1; c <= 4; c++) begin
      logic [7:0] v [9]; logic [7:0] t; int sum;
      sum = 0;
      for (int r = 0; r < 3; r++)
        for (int d = 0; d < 3; d++) begin
          v[3*r + d] = pix[r][4*n + c - 1 + d];
          sum += pix[r][4*n + c - 1 + d];
        end
      for (int i = 0; i < 9; i++)        // selection sort, independent of the RTL's order
        for (int j = i + 1; j < 9; j++)
          if (v[j] < v[i]) begin t = v[i]; v[i] = v[j]; v[j] = t; end
      em[8*(4 - c) +: 8] = 8'(sum / 9);
      ed[8*(4 - c) +: 8] = v[4];
    end
    exp_m.push_back(em); exp_d.push_back(ed);
  endfunction

  int nout = 0, stall = 0;
  always @(posedge clk) if (in_valid && !in_ready_m) stall++;
  // output checker
  always @(negedge clk) if (rst_n) begin
    chk(in_ready_m == in_ready_d && out_valid_m == out_valid_d, "variants stay in step");
  end
  always @(posedge clk) if (rst_n && out_valid_m && out_ready) begin
    chk(exp_m.size() > 0 && out_m == exp_m[0], $sformatf("mean word %0d: %h exp %h", nout, out_m, exp_m[0]));
    chk(exp_d.size() > 0 && out_d == exp_d[0], $sformatf("median word %0d: %h exp %h", nout, out_d, exp_d[0]));
    void'(exp_m.pop_front()); void'(exp_d.pop_front());
    nout++;
  end

  task automatic run_image(int gaps, int bp);
    for (int r = 0; r < 3; r++) for (int c = 2; c < 4*NW + 2; c++)
      pix[r][c] = ($urandom_range(0, 9) == 0) ? 8'hFF : 8'($urandom);
    for (int n = 0; n < NW; n++) begin
      @(negedge clk);
      while (gaps && $urandom_range(0, 2) == 0) begin in_valid = 0; out_ready = !bp || $urandom_range(0, 1); @(negedge clk); end
      in_valid = 1;
      for (int r = 0; r < 3; r++) for (int k = 0; k < 4; k++) row[r][8*k +: 8] = pix[r][4*n + 2 + k];
      out_ready = !bp || $urandom_range(0, 1);
      expect_word(n);
      #1;
      while (!in_ready_m) begin @(negedge clk); out_ready = !bp || $urandom_range(0, 1); #1; end
    end
    @(negedge clk); in_valid = 0; out_ready = 1;
    repeat (3) @(negedge clk);
    // the next image starts with this one's last two pixels per line
    for (int r = 0; r < 3; r++) begin pix[r][0] = pix[r][4*NW]; pix[r][1] = pix[r][4*NW + 1]; end
  endtask

  initial begin
    in_valid = 0; out_ready = 1; row[0] = 0; row[1] = 0; row[2] = 0;
    for (int r = 0; r < 3; r++) begin pix[r][0] = 0; pix[r][1] = 0; end
    #22 rst_n = 1;
    run_image(0, 0);
    // full rate: NW words in NW cycles, first result one cycle after the first word
    chk(nout == NW && stall == 0, $sformatf("full-rate image: %0d results, %0d stalls", nout, stall));
    run_image(1, 1);
    run_image(1, 0);
    run_image(0, 1);
    chk(nout == 4 * NW && exp_m.size() == 0, $sformatf("%0d results of %0d", nout, 4 * NW));
    // latency and rate at full speed
    @(negedge clk);
    in_valid = 1; out_ready = 1;
    for (int r = 0; r < 3; r++) row[r] = $urandom;
    for (int r = 0; r < 3; r++) for (int k = 0; k < 4; k++) pix[r][2 + k] = row[r][8*k +: 8];
    expect_word(0);
    @(posedge clk); #1;
    chk(out_valid_m && in_ready_m, "result one cycle after the word, next word accepted");
    in_valid = 0;
    @(posedge clk); #1;
    chk(exp_m.size() == 0, "latency word checked");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
