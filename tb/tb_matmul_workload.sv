// tb_matmul_workload -- the monitored matrix-multiplication workload on the
// whole system at its default size (16 tiles, 4 DDR2 banks).
//
// Tiles 0..14 play the 15 compute processors, tile 15 the monitoring tile.
// C = A * B with A of M x K, B of K x N, 32-bit elements, M = 15 (one row of A
// per compute tile), K = 8, N = 4 (one column of B per bank).  Each tile reads
// its row of A (one burst), then each column of B (one burst each, stored
// column-wise), computes its row of C and writes it back (one burst): six
// Data NoC requests per tile.  The same computation runs with the three data
// distribution schemes of the design's evaluation:
//   1 matrix per bank : A in bank 0, B in bank 1, C in bank 2;
//   2 line interleaved: column j of B in bank j, rows of A and C in bank i%4,
//                       every tile reads the columns in the order 0,1,2,3;
//   3 shift access    : same layout, tile t starts with column t%4.
// The monitoring tile sets all five statistic collectors to the latency event
// through the service network before the first scheme, and after each scheme
// asks every collector for a dump (clear mode, so each scheme starts from
// zero).  The frames are checked against the known request counts per tile
// and per bank, C is compared with a product computed here, and the average
// request latency of the schemes is compared: the spread schemes must beat
// the single-bank one, as in the design's evaluation.  The matrix sizes are
// this testbench's own (the evaluation does not give them).
`timescale 1ns/1ps
module tb_matmul_workload;
  import mp3noc_pkg::*;
  localparam int NT = 16, NB = 4, PPC = 15, NPE = 15;
  localparam int M = NPE, K = 8, N = 4;

  logic rst_n = 0;
  logic [NT-1:0] pe_clk; logic data_clk = 0, sync_clk = 0;
  always #2.5 data_clk = ~data_clk;
  always #2.0 sync_clk = ~sync_clk;
  for (genvar t = 0; t < NT; t++) begin : g_clk
    initial pe_clk[t] = 0;
    always #(5.0 + 0.11 * t) pe_clk[t] = ~pe_clk[t];
  end

  logic [NT-1:0][31:0] dfsl_m_data, dfsl_s_data, sfsl_m_data, sfsl_s_data;
  logic [NT-1:0] dfsl_m_control, dfsl_m_write, dfsl_m_full, dfsl_s_control, dfsl_s_read, dfsl_s_exists;
  logic [NT-1:0] sfsl_m_control, sfsl_m_write, sfsl_m_full, sfsl_s_control, sfsl_s_read, sfsl_s_exists;
  logic [31:0] vfsl_m_data, vfsl_s_data, pm_s_data;
  logic vfsl_m_control, vfsl_m_write, vfsl_m_full, vfsl_s_control, vfsl_s_read, vfsl_s_exists;
  logic pm_s_control, pm_s_read, pm_s_exists;
  ocp_cmd_e [NB-1:0] d_MCmd; logic [NB-1:0][27:0] d_MAddr; logic [NB-1:0][7:0] d_MBurstLen;
  logic [NB-1:0][ID_W-1:0] d_MReqInfo; logic [NB-1:0] d_SCmdAcc, d_MDataValid, d_MDataLast, d_SDataAcc;
  logic [NB-1:0][63:0] d_MData, d_SData; ocp_resp_e [NB-1:0] d_SResp; logic [NB-1:0] d_SRespLast, d_MRespAcc;
  logic sync_locked;

  logic cop_clk = 0;
  always #4 cop_clk = ~cop_clk;
  logic [1:0] cop_in_valid, cop_in_ready, cop_out_valid, cop_out_ready;
  logic [1:0][2:0][31:0] cop_in_row; logic [1:0][31:0] cop_out_data;

  logic fft_in_valid, fft_in_ready, fft_out_valid, fft_out_ready, fft_out_last;
  logic signed [15:0] fft_in_re, fft_in_im, fft_out_re, fft_out_im;
  logic rc_start_valid, rc_start_ready, rc_occ_hit, rc_out_valid, rc_out_ready, rc_out_hit, rc_out_last;
  logic [2:0][3:0] rc_start_cell, rc_occ_cell, rc_out_cell; logic [2:0] rc_dir_neg;
  logic [2:0][15:0] rc_t_max0, rc_t_delta; logic [1:0] rc_out_axis;

  mp3noc_top dut (.*);
  assign cop_in_valid = '0;  assign cop_in_row = '0;  assign cop_out_ready = '1;
  assign fft_in_valid = 0;  assign fft_in_re = 0;  assign fft_in_im = 0;  assign fft_out_ready = 1;
  assign rc_start_valid = 0;  assign rc_start_cell = '0;  assign rc_dir_neg = '0;  assign rc_t_max0 = '0;
  assign rc_t_delta = '0;  assign rc_occ_hit = 0;  assign rc_out_ready = 1;

  for (genvar b = 0; b < NB; b++) begin : g_ddr
    ocp_mem_model #(.DW(64), .AW(28), .CMD_WAIT(2), .RD_WAIT(6)) mem (.clk(data_clk), .rst_n,
      .MCmd(d_MCmd[b]), .MAddr(d_MAddr[b]), .MBurstLen(d_MBurstLen[b]), .SCmdAcc(d_SCmdAcc[b]),
      .MData(d_MData[b]), .MDataValid(d_MDataValid[b]), .MDataLast(d_MDataLast[b]),
      .SDataAcc(d_SDataAcc[b]), .SResp(d_SResp[b]), .SData(d_SData[b]),
      .SRespLast(d_SRespLast[b]), .MRespAcc(d_MRespAcc[b]));
  end

  int checks = 0, failures = 0;
  function automatic void chk(input bit ok, input string msg);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endfunction
  initial begin
    #4000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // ---------------- matrices and layout
  function automatic logic [31:0] a_el(int i, int k); return 32'(i * 7 + k * 3 + 1); endfunction
  function automatic logic [31:0] b_el(int k, int j); return 32'(k * 5 + j * 11 + 2); endfunction
  // layout 0 = matrix per bank, 1 = interleaved (schemes 2 and 3)
  function automatic int a_bank(int lay, int i); return lay == 0 ? 0 : i % NB; endfunction
  function automatic int b_bank(int lay, int j); return lay == 0 ? 1 : j; endfunction
  function automatic int c_bank(int lay, int i); return lay == 0 ? 2 : i % NB; endfunction
  function automatic logic [27:0] a_off(int lay, int i); return 28'(lay * 32'h10000 + 32'h1000 + i * 64); endfunction
  function automatic logic [27:0] b_off(int lay, int j); return 28'(lay * 32'h10000 + 32'h2000 + j * 64); endfunction
  function automatic logic [27:0] c_off(int s, int i); return 28'(32'h40000 + s * 32'h1000 + i * 64); endfunction

  // ---------------- FSL drivers
  logic [32:0] dtx [NT][$], drx [NT][$], vtx[$], vrx[$], pmrx[$];
  for (genvar t = 0; t < NT; t++) begin : g_fsl
    always @(negedge pe_clk[t]) begin
      if (dtx[t].size() > 0 && !dfsl_m_full[t]) begin
        {dfsl_m_control[t], dfsl_m_data[t]} = dtx[t].pop_front(); dfsl_m_write[t] = 1;
      end else dfsl_m_write[t] = 0;
      dfsl_s_read[t] = rst_n && dfsl_s_exists[t];
      if (dfsl_s_read[t]) drx[t].push_back({dfsl_s_control[t], dfsl_s_data[t]});
    end
  end
  always @(negedge pe_clk[PPC]) begin
    if (vtx.size() > 0 && !vfsl_m_full) begin {vfsl_m_control, vfsl_m_data} = vtx.pop_front(); vfsl_m_write = 1; end
    else vfsl_m_write = 0;
    vfsl_s_read = rst_n && vfsl_s_exists;
    if (vfsl_s_read) vrx.push_back({vfsl_s_control, vfsl_s_data});
    pm_s_read = rst_n && pm_s_exists;
    if (pm_s_read) pmrx.push_back({pm_s_control, pm_s_data});
  end

  function automatic logic [32:0] w0(ocp_cmd_e c, int len);
    return {1'b1, 21'd0, 8'(len), 3'(c)};
  endfunction

  task automatic svc(bit wr, int stop, int regi, logic [31:0] v);
    int t;
    vtx.push_back(w0(wr ? OCP_WR : OCP_RD, 1));
    vtx.push_back({1'b0, 16'd0, 5'(stop), 11'(regi)});
    if (wr) vtx.push_back({1'b0, v});
    t = 0;
    while (vrx.size() < (wr ? 1 : 2) && t < 20000) begin @(negedge pe_clk[PPC]); t++; end
    chk(vrx.size() >= 1 && vrx[0] == {1'b1, 30'd0, RESP_DVA}, "service answer");
    vrx.delete();
  endtask

  // ---------------- compute tiles
  int go = 0;
  bit [NPE-1:0] done;
  for (genvar t = 0; t < NPE; t++) begin : g_tile
    // one burst: write len words from wd, or read len words into rd
    task automatic xfer(bit wr, int bank, logic [27:0] off, int nwords,
                        input logic [31:0] wd [], output logic [31:0] rd []);
      int n, tmo;
      dtx[t].push_back(w0(wr ? OCP_WR : OCP_RD, nwords / 2));
      dtx[t].push_back({1'b0, 4'(bank), off});
      if (wr) for (int w = 0; w < nwords; w++) dtx[t].push_back({1'b0, wd[w]});
      n = wr ? 1 : 1 + nwords; tmo = 0;
      while (drx[t].size() < n && tmo < 100000) begin @(negedge pe_clk[t]); tmo++; end
      chk(drx[t].size() == n && drx[t][0] == {1'b1, 30'd0, RESP_DVA}, $sformatf("tile %0d answer", t));
      rd = new[nwords];
      if (!wr) for (int w = 0; w < nwords && w + 1 < drx[t].size(); w++) rd[w] = drx[t][w + 1][31:0];
      drx[t].delete();
    endtask
    initial begin
      logic [31:0] row [], col [], crow [], none [];
      dfsl_m_write[t] = 0; dfsl_m_control[t] = 0; dfsl_m_data[t] = 0; dfsl_s_read[t] = 0;
      sfsl_m_write[t] = 0; sfsl_m_control[t] = 0; sfsl_m_data[t] = 0; sfsl_s_read[t] = 0;
      done[t] = 0;
      wait (go == 1);
      // set-up: row t of A in both layouts, and tiles 0..3 store column t of B
      row = new[K]; col = new[K];
      for (int k = 0; k < K; k++) begin row[k] = a_el(t, k); col[k] = b_el(k, t % N); end
      for (int lay = 0; lay < 2; lay++) begin
        xfer(1, a_bank(lay, t), a_off(lay, t), K, row, none);
        if (t < N) xfer(1, b_bank(lay, t), b_off(lay, t), K, col, none);
      end
      done[t] = 1;
      for (int s = 0; s < 3; s++) begin
        int lay;
        lay = (s == 0) ? 0 : 1;
        wait (go == 2 + s);
        done[t] = 0;
        crow = new[N];
        xfer(0, a_bank(lay, t), a_off(lay, t), K, none, row);
        for (int jj = 0; jj < N; jj++) begin
          int j;
          j = (s == 2) ? (t + jj) % N : jj;
          xfer(0, b_bank(lay, j), b_off(lay, j), K, none, col);
          crow[j] = 0;
          for (int k = 0; k < K; k++) crow[j] += row[k] * col[k];
        end
        xfer(1, c_bank(lay, t), c_off(s, t), N, crow, none);
        done[t] = 1;
      end
    end
  end

  // ---------------- monitoring tile
  int pkt [3][20], lat [3][20];
  initial begin
    vfsl_m_write = 0; vfsl_m_control = 0; vfsl_m_data = 0; vfsl_s_read = 0; pm_s_read = 0;
    for (int t = NPE; t < NT; t++) begin
      dfsl_m_write[t] = 0; dfsl_m_control[t] = 0; dfsl_m_data[t] = 0; dfsl_s_read[t] = 0;
      sfsl_m_write[t] = 0; sfsl_m_control[t] = 0; sfsl_m_data[t] = 0; sfsl_s_read[t] = 0;
    end
    #60 rst_n = 1;
    repeat (10) @(negedge pe_clk[PPC]);
    go = 1;
    wait (&done);
    for (int c = 0; c <= NT / 4; c++) begin
      svc(1, c, 1, EV_LATENCY);
      svc(1, c, 0, 1);                 // enable, clear mode
    end
    for (int s = 0; s < 3; s++) begin
      int lay, exp_bank [NB], tsum, nsum;
      lay = (s == 0) ? 0 : 1;
      go = 2 + s;
      repeat (4) @(negedge pe_clk[PPC]);
      wait (&done);
      repeat (100) @(negedge pe_clk[PPC]);
      pmrx.delete();
      for (int c = 0; c <= NT / 4; c++) svc(1, c, 0, 3);   // dump
      for (int w = 0; w < 20000 && pmrx.size() < 45; w++) @(negedge pe_clk[PPC]);
      chk(pmrx.size() == 45, $sformatf("scheme %0d: %0d frame words", s + 1, pmrx.size()));
      for (int f = 0; f < 5 && 9 * f + 8 < pmrx.size(); f++) begin
        int id;
        id = pmrx[9 * f][15:8];
        chk(pmrx[9 * f][31:16] == 16'hC011 && id <= 4 && pmrx[9 * f + 8][32], "frame header and last word");
        for (int p = 0; p < 4 && id <= 4; p++) begin
          pkt[s][4 * id + p] = pmrx[9 * f + 1 + 2 * p][31:0];
          lat[s][4 * id + p] = pmrx[9 * f + 2 + 2 * p][31:0];
        end
      end
      // expected request counts: six per compute tile, none from tile 15
      for (int t = 0; t < NT; t++)
        chk(pkt[s][t] == (t < NPE ? 2 + N : 0),
            $sformatf("scheme %0d tile %0d: %0d packets", s + 1, t, pkt[s][t]));
      for (int b = 0; b < NB; b++) exp_bank[b] = 0;
      for (int i = 0; i < M; i++) begin
        exp_bank[a_bank(lay, i)]++; exp_bank[c_bank(lay, i)]++;
        for (int j = 0; j < N; j++) exp_bank[b_bank(lay, j)]++;
      end
      for (int b = 0; b < NB; b++)
        chk(pkt[s][16 + b] == exp_bank[b],
            $sformatf("scheme %0d bank %0d: %0d packets, expected %0d", s + 1, b, pkt[s][16 + b], exp_bank[b]));
      // the product
      for (int i = 0; i < M; i++)
        for (int j = 0; j < N; j += 2) begin
          logic [31:0] e0, e1; logic [63:0] got;
          e0 = 0; e1 = 0;
          for (int k = 0; k < K; k++) begin e0 += a_el(i, k) * b_el(k, j); e1 += a_el(i, k) * b_el(k, j + 1); end
          case (c_bank(lay, i))
            0: got = g_ddr[0].mem.rd(longint'((c_off(s, i) >> 3) + j / 2));
            1: got = g_ddr[1].mem.rd(longint'((c_off(s, i) >> 3) + j / 2));
            2: got = g_ddr[2].mem.rd(longint'((c_off(s, i) >> 3) + j / 2));
            default: got = g_ddr[3].mem.rd(longint'((c_off(s, i) >> 3) + j / 2));
          endcase
          chk(got == {e1, e0}, $sformatf("scheme %0d C[%0d][%0d..%0d]", s + 1, i, j, j + 1));
        end
      tsum = 0; nsum = 0;
      for (int t = 0; t < NPE; t++) begin tsum += lat[s][t]; nsum += pkt[s][t]; end
      $display("scheme %0d: average tile request latency %0d.%02d cycles; bank packets %0d/%0d/%0d/%0d",
               s + 1, tsum / nsum, (100 * tsum / nsum) % 100,
               pkt[s][16], pkt[s][17], pkt[s][18], pkt[s][19]);
      lat[s][19] = tsum;                 // keep the sum for the comparison
    end
    chk(lat[1][19] < lat[0][19], "line interleaving lowers the latency of matrix per bank");
    chk(lat[2][19] < lat[0][19], "shift access lowers the latency of matrix per bank");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
