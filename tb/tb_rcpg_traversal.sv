// tb_rcpg_traversal -- self-checking test of the grid traversal core.
// Rays with random start cells, directions and face parameters walk through a
// 16x16x16 grid with a sparse random occupancy map.  A reference walk is made
// here from the ray's geometry: cell boundaries crossed on an axis happen at
// t_max0 + n * t_delta, and the next boundary in time order (x before y
// before z on ties) decides the next cell.  Every visited cell, its entry
// axis, the hit flag and the last flag are compared, with random output
// back-pressure.  Also checked: one cell per cycle without back-pressure.
`timescale 1ns/1ps
module tb_rcpg_traversal;
  localparam int GB = 4, TW = 16, G = 1 << GB;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start_valid, start_ready, occ_hit, out_valid, out_ready, out_hit, out_last;
  logic [2:0][GB-1:0] start_cell, occ_cell, out_cell;
  logic [2:0] dir_neg; logic [2:0][TW-1:0] t_max0, t_delta; logic [1:0] out_axis;

  rcpg_traversal #(.GB(GB), .TW(TW)) dut (.*);

  int checks = 0, failures = 0;
  function automatic void chk(input bit ok, input string msg);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endfunction
  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  bit occ [G][G][G];
  assign occ_hit = occ[occ_cell[0]][occ_cell[1]][occ_cell[2]];

  // expected walk: cells, entry axis, hit, last
  typedef struct { int c [3]; int axis; bit hit; bit last; } step_t;
  step_t exp_q [$];

  function automatic void ref_walk(int c0 [3], bit ng [3], int tm [3], int td [3]);
    int c [3], n [3];
    int axis;
    c = c0; n = '{0, 0, 0}; axis = 3;
    forever begin
      step_t s; int best, a; bit out_of;
      best = -1; a = 0;
      for (int k = 0; k < 3; k++) begin
        int tk; tk = tm[k] + n[k] * td[k];
        if (best < 0 || tk < best) begin best = tk; a = k; end
      end
      out_of = ng[a] ? (c[a] == 0) : (c[a] == G - 1);
      s.c = c; s.axis = axis; s.hit = occ[c[0]][c[1]][c[2]];
      s.last = s.hit || out_of;
      exp_q.push_back(s);
      if (s.last) break;
      c[a] += ng[a] ? -1 : 1; n[a]++; axis = a;
    end
  endfunction

  int nsteps = 0;
  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    step_t s;
    chk(exp_q.size() > 0, "unexpected cell");
    if (exp_q.size() > 0) begin
      s = exp_q.pop_front();
      chk(out_cell[0] == s.c[0] && out_cell[1] == s.c[1] && out_cell[2] == s.c[2] &&
          out_axis == 2'(s.axis) && out_hit == s.hit && out_last == s.last,
          $sformatf("cell %0d,%0d,%0d axis %0d hit %0b last %0b; expected %0d,%0d,%0d axis %0d hit %0b last %0b",
                    out_cell[0], out_cell[1], out_cell[2], out_axis, out_hit, out_last,
                    s.c[0], s.c[1], s.c[2], s.axis, s.hit, s.last));
    end
    nsteps++;
  end

  task automatic ray(bit bp, output int cycles);
    int c0 [3], tm [3], td [3]; bit ng [3]; int t0;
    for (int k = 0; k < 3; k++) begin
      c0[k] = $urandom_range(0, G - 1); ng[k] = $urandom_range(0, 1);
      td[k] = $urandom_range(1, 1000); tm[k] = $urandom_range(0, td[k]);
      start_cell[k] = GB'(c0[k]); dir_neg[k] = ng[k]; t_max0[k] = TW'(tm[k]); t_delta[k] = TW'(td[k]);
    end
    ref_walk(c0, ng, tm, td);
    @(negedge clk); start_valid = 1;
    @(negedge clk); start_valid = 0;
    t0 = $time; cycles = 0;
    while (exp_q.size() > 0) begin
      out_ready = !bp || $urandom_range(0, 1);
      @(negedge clk);
    end
    cycles = ($time - t0) / 10;
    out_ready = 0;
  endtask

  initial begin
    int cyc, n0;
    start_valid = 0; out_ready = 0; start_cell = '0; dir_neg = '0; t_max0 = '0; t_delta = '0;
    for (int x = 0; x < G; x++) for (int y = 0; y < G; y++) for (int z = 0; z < G; z++)
      occ[x][y][z] = ($urandom_range(0, 49) == 0);
    #22 rst_n = 1;
    for (int r = 0; r < 60; r++) begin
      n0 = nsteps;
      ray(r % 2 == 1, cyc);
      if (r % 2 == 0) chk(cyc == nsteps - n0, $sformatf("ray %0d: %0d cells in %0d cycles", r, nsteps - n0, cyc));
    end
    // an empty grid: the ray must run to the border
    for (int x = 0; x < G; x++) for (int y = 0; y < G; y++) for (int z = 0; z < G; z++) occ[x][y][z] = 0;
    for (int r = 0; r < 20; r++) ray(1'b0, cyc);
    $display("%0d cells visited", nsteps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
