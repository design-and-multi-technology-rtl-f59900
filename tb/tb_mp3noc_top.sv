// tb_mp3noc_top -- end-to-end test of the whole system at its default size
// (16 tiles, 4 DDR2 banks, 64 KByte shared memory), driven only through the
// tiles' FSL links, as the processors' software would.  Every tile has its own
// clock; the Data NoC and the Synchronization NoC have two more.  Four
// ocp_mem_model instances stand in for the DDR2 controllers.
// Each tile runs a small program:
//   * data: burst writes of 2..8 64-bit beats (40 for one of tile 0's, to
//     fill its FSL FIFOs) to a bank chosen from its id, with MFlag pressure
//     = (id / 4) % 4 so that tiles of different groups meeting at a bank
//     differ in Press; each burst is read back and compared;
//   * synchronization: increments a shared counter with ReadLinked /
//     WriteConditional (retrying on FAIL) and another with ReadExclusive /
//     Write (locked path); both must end at 16 * ITER.
// The monitoring tile (tile 15) first configures all five statistic
// collectors through its service adapter, and at the end asks collector 1 for
// a dump, receives the frame on its PM port, reads a collector counter and a
// switch register back through the service network and probes an address no
// stop owns.
// Mechanisms counted (each must occur at least once): burst transfers,
// pressure arbitration decided by Press, locked cycles of the sync request
// switch, lazy FAIL answers, monitoring frames received, service accesses,
// service ERR answers, FSL back-pressure (a full request FIFO), and use of
// every DDR2 bank, words through both filter coprocessors (a flat image
// whose mean and median are known), an FFT block (an impulse) and a ray
// walk to an occupied cell.
`timescale 1ns/1ps
module tb_mp3noc_top;
  import mp3noc_pkg::*;
  localparam int NT = 16, NB = 4, PPC = 15, ITER = 2;
  localparam logic [31:0] CNT_A = 32'h40, CNT_B = 32'h80;

  logic rst_n = 0;
  logic [NT-1:0] pe_clk; logic data_clk = 0, sync_clk = 0;
  always #2.5 data_clk = ~data_clk;
  always #3.1 sync_clk = ~sync_clk;
  for (genvar t = 0; t < NT; t++) begin : g_clk
    initial pe_clk[t] = 0;
    always #(3.0 + 0.17 * t) pe_clk[t] = ~pe_clk[t];
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

  // filter coprocessors: a flat image (line r = 90 + 6r) through both variants;
  // after the first word (which sees the reset zeros) mean and median are 96
  int n_filter = 0, f_words = 0;
  initial begin
    cop_in_valid = '0; cop_out_ready = '1;
    for (int f = 0; f < 2; f++) for (int r = 0; r < 3; r++) cop_in_row[f][r] = {4{8'(90 + 6 * r)}};
    wait (rst_n);
    repeat (10) @(negedge cop_clk);
    cop_in_valid = 2'b11;
    repeat (6) @(negedge cop_clk);
    cop_in_valid = '0;
  end
  // FFT: an impulse of 8192 at n = 0 gives 32 in every bin (the result is
  // scaled by 1/256)
  int n_fft = 0;
  initial begin
    fft_in_valid = 0; fft_in_re = 0; fft_in_im = 0; fft_out_ready = 1;
    wait (rst_n);
    repeat (10) @(negedge cop_clk);
    for (int n = 0; n < 256; n++) begin
      fft_in_valid = 1; fft_in_re = (n == 0) ? 16'sd8192 : 16'sd0;
      @(negedge cop_clk);
    end
    fft_in_valid = 0;
  end
  // ray casting: a ray from cell (0,5,9) along +x (y and z faces far away)
  // meets the occupied cell (7,5,9): eight cells, entered through x
  int n_ray = 0;
  assign rc_occ_hit = (rc_occ_cell == {4'd9, 4'd5, 4'd7});
  initial begin
    rc_start_valid = 0; rc_out_ready = 1; rc_dir_neg = '0;
    rc_start_cell = {4'd9, 4'd5, 4'd0};
    rc_t_max0 = {16'd60000, 16'd60000, 16'd10}; rc_t_delta = {16'd1, 16'd1, 16'd100};
    wait (rst_n);
    repeat (10) @(negedge cop_clk);
    rc_start_valid = 1; @(negedge cop_clk); rc_start_valid = 0;
  end
  always @(posedge cop_clk) if (rst_n && rc_out_valid && rc_out_ready) begin
    chk(rc_out_cell == {4'd9, 4'd5, 4'(n_ray)} && rc_out_axis == (n_ray == 0 ? 2'd3 : 2'd0) &&
        rc_out_last == (n_ray == 7) && rc_out_hit == (n_ray == 7), $sformatf("ray step %0d", n_ray));
    n_ray++;
  end
  always @(posedge cop_clk) if (rst_n && fft_out_valid && fft_out_ready) begin
    chk(fft_out_re == 32 && fft_out_im == 0, $sformatf("FFT bin %0d: %0d,%0d", n_fft, fft_out_re, fft_out_im));
    chk(fft_out_last == (n_fft == 255), "FFT last result marked");
    n_fft++;
  end
  always @(posedge cop_clk) if (rst_n && cop_out_valid[0] && cop_out_valid[1]) begin
    if (f_words > 0) begin
      chk(cop_out_data[0] == {4{8'd96}} && cop_out_data[1] == {4{8'd96}},
          $sformatf("filter results %h %h", cop_out_data[0], cop_out_data[1]));
      n_filter += 2;
    end
    f_words++;
  end

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
    #3000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // ---------------- mechanism counters
  int n_burst = 0, n_press = 0, n_lock_cycles = 0, n_lazy_fail = 0, n_frames = 0;
  int n_service = 0, n_service_err = 0, n_fsl_full = 0;
  int n_bank [NB];
  always @(posedge sync_clk) if (sync_locked) n_lock_cycles++;
  for (genvar b = 0; b < NB; b++) begin : g_bankmon
    always @(posedge data_clk) if (d_MCmd[b] != OCP_IDLE && d_SCmdAcc[b]) n_bank[b]++;
  end
  // Press decided a grant: the winner's Press beats another head waiting for
  // the same free output of a stage-2 (bank) switch
  for (genvar j = 0; j < NB; j++) begin : g_pressmon
    always @(posedge data_clk) begin
      if (!dut.u_data_noc.g_s2[j].u_sw.own_v[0] && dut.u_data_noc.g_s2[j].u_sw.xfer[0]) begin
        int w; w = dut.u_data_noc.g_s2[j].u_sw.sel[0];
        for (int i = 0; i < NT / 4; i++)
          if (i != w && dut.u_data_noc.g_s2[j].u_sw.in_vld[i] && dut.u_data_noc.g_s2[j].u_sw.in_head[i] &&
              dut.u_data_noc.g_s2[j].u_sw.in_press[i] < dut.u_data_noc.g_s2[j].u_sw.in_press[w]) begin
            n_press++; break;
          end
      end
    end
  end

  // ---------------- FSL drivers (data and sync links of every tile, service of tile 15)
  logic [32:0] dtx [NT][$], drx [NT][$], stx [NT][$], srx [NT][$], vtx[$], vrx[$], pmrx[$];
  for (genvar t = 0; t < NT; t++) begin : g_fsl
    always @(negedge pe_clk[t]) begin
      if (dtx[t].size() > 0 && dfsl_m_full[t]) n_fsl_full++;
      if (dtx[t].size() > 0 && !dfsl_m_full[t] && $urandom_range(0, 7) != 0) begin
        {dfsl_m_control[t], dfsl_m_data[t]} = dtx[t].pop_front(); dfsl_m_write[t] = 1;
      end else dfsl_m_write[t] = 0;
      dfsl_s_read[t] = rst_n && dfsl_s_exists[t] && ($urandom_range(0, 3) != 0);
      if (dfsl_s_read[t]) drx[t].push_back({dfsl_s_control[t], dfsl_s_data[t]});
      if (stx[t].size() > 0 && !sfsl_m_full[t]) begin
        {sfsl_m_control[t], sfsl_m_data[t]} = stx[t].pop_front(); sfsl_m_write[t] = 1;
      end else sfsl_m_write[t] = 0;
      sfsl_s_read[t] = rst_n && sfsl_s_exists[t];
      if (sfsl_s_read[t]) srx[t].push_back({sfsl_s_control[t], sfsl_s_data[t]});
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

  function automatic logic [32:0] w0(ocp_cmd_e c, int len, int flag);
    return {1'b1, 19'd0, 2'(flag), 8'(len), 3'(c)};
  endfunction

  // service access from tile 15: one word request, one or two word answer
  task automatic svc(bit wr, int stop, int regi, logic [31:0] v, output ocp_resp_e r, output logic [31:0] d);
    int t;
    vtx.push_back(w0(wr ? OCP_WR : OCP_RD, 1, 0));
    vtx.push_back({1'b0, 16'd0, 5'(stop), 11'(regi)});
    if (wr) vtx.push_back({1'b0, v});
    t = 0;
    while (vrx.size() < (wr ? 1 : 2) && t < 20000) begin @(negedge pe_clk[PPC]); t++; end
    chk(vrx.size() >= 1 && vrx[0][32], "service answer control word");
    r = ocp_resp_e'(vrx[0][1:0]);
    d = (!wr && vrx.size() > 1) ? vrx[1][31:0] : '0;
    vrx.delete();
    n_service++;
    if (r == RESP_ERR) n_service_err++;
  endtask

  // ---------------- tile programs
  bit [NT-1:0] done; bit cfg_done = 0;
  int pkts [NT];
  for (genvar t = 0; t < NT; t++) begin : g_tile
    task automatic data_xfer(bit wr, int bank, logic [27:0] off, int len, int k);
      int n, tmo;
      dtx[t].push_back(w0(wr ? OCP_WR : OCP_RD, len, (t / 4) % 4));
      dtx[t].push_back({1'b0, 4'(bank), off});
      if (wr) for (int b = 0; b < len; b++) begin
        dtx[t].push_back({1'b0, 8'(t), 8'(k), 8'(b), 8'hA0});
        dtx[t].push_back({1'b0, 8'(t), 8'(k), 8'(b), 8'hA1});
      end
      n = wr ? 1 : 1 + 2 * len; tmo = 0;
      while (drx[t].size() < n && tmo < 40000) begin @(negedge pe_clk[t]); tmo++; end
      chk(drx[t].size() == n && drx[t][0] == {1'b1, 30'd0, RESP_DVA}, $sformatf("tile %0d data answer", t));
      if (!wr) for (int b = 0; b < len && drx[t].size() == n; b++)
        chk(drx[t][1 + 2 * b] == {1'b0, 8'(t), 8'(k), 8'(b), 8'hA0} &&
            drx[t][2 + 2 * b] == {1'b0, 8'(t), 8'(k), 8'(b), 8'hA1}, $sformatf("tile %0d read beat %0d", t, b));
      drx[t].delete();
      pkts[t]++;
      if (len > 1) n_burst++;
    endtask
    task automatic sync_xfer(ocp_cmd_e c, logic [31:0] a, logic [31:0] v, output ocp_resp_e r,
                             output logic [31:0] d);
      bit wr; int n, tmo;
      wr = (c == OCP_WR || c == OCP_WRC);
      stx[t].push_back(w0(c, 1, 0)); stx[t].push_back({1'b0, a});
      if (wr) stx[t].push_back({1'b0, v});
      n = wr ? 1 : 2; tmo = 0;
      while (srx[t].size() < n && tmo < 40000) begin @(negedge pe_clk[t]); tmo++; end
      chk(srx[t].size() == n && srx[t][0][32], $sformatf("tile %0d sync answer", t));
      r = ocp_resp_e'(srx[t][0][1:0]); d = (n == 2) ? srx[t][1][31:0] : '0;
      srx[t].delete();
    endtask
    initial begin
      ocp_resp_e r; logic [31:0] v, dummy;
      dfsl_m_write[t] = 0; dfsl_m_control[t] = 0; dfsl_m_data[t] = 0; dfsl_s_read[t] = 0;
      sfsl_m_write[t] = 0; sfsl_m_control[t] = 0; sfsl_m_data[t] = 0; sfsl_s_read[t] = 0;
      pkts[t] = 0; done[t] = 0;
      wait (cfg_done);
      for (int k = 0; k < ITER; k++) begin
        int bank, len; logic [27:0] off;
        bank = (t + k) % NB; len = (t == 0 && k == 0) ? 40 : 2 + (t + 3 * k) % 7;
        off = 28'(t * 32'h1000 + k * 32'h100);
        data_xfer(1, bank, off, len, k);
        data_xfer(0, bank, off, len, k);
        do begin
          sync_xfer(OCP_RDL, CNT_A, 0, r, v);
          sync_xfer(OCP_WRC, CNT_A, v + 1, r, dummy);
          chk(r == RESP_DVA || r == RESP_FAIL, "WriteConditional answer");
          if (r == RESP_FAIL) n_lazy_fail++;
        end while (r == RESP_FAIL);
        sync_xfer(OCP_RDEX, CNT_B, 0, r, v);
        sync_xfer(OCP_WR, CNT_B, v + 1, r, dummy);
        chk(r == RESP_DVA, "locked write answer");
      end
      done[t] = 1;
    end
  end

  // ---------------- monitoring tile: configuration, then the final report
  logic [31:0] a0, b0, a, b, d; ocp_resp_e r;
  initial begin
    vfsl_m_write = 0; vfsl_m_control = 0; vfsl_m_data = 0; vfsl_s_read = 0; pm_s_read = 0;
    for (int b = 0; b < NB; b++) n_bank[b] = 0;
    #40 rst_n = 1;
    repeat (10) @(negedge pe_clk[PPC]);
    // the shared memory is not reset: note the counters' start values
    a0 = dut.u_sync_noc.u_mem.mem[CNT_A >> 2]; b0 = dut.u_sync_noc.u_mem.mem[CNT_B >> 2];
    for (int c = 0; c <= NT / 4; c++) begin
      svc(1, c, 1, EV_PACKETS, r, d); chk(r == RESP_DVA, "collector EVENT write");
      svc(1, c, 0, 1, r, d);          chk(r == RESP_DVA, "collector enable");
    end
    svc(0, 24, 1, 0, r, d); chk(r == RESP_DVA && d == 32'h1F, "PM switch enable mask read through service");
    cfg_done = 1;
    wait (&done);
    repeat (50) @(negedge pe_clk[PPC]);
    a = dut.u_sync_noc.u_mem.mem[CNT_A >> 2]; b = dut.u_sync_noc.u_mem.mem[CNT_B >> 2];
    chk(a - a0 == NT * ITER, $sformatf("lazy counter +%0d, expected %0d", a - a0, NT * ITER));
    chk(b - b0 == NT * ITER, $sformatf("locked counter +%0d, expected %0d", b - b0, NT * ITER));
    // collector 1 watches tiles 4..7: packet counter of tile 5, then a dump
    svc(0, 1, 8 + 2 * 1, 0, r, d);
    chk(r == RESP_DVA && d == 32'(pkts[5]), $sformatf("collector 1 counted %0d packets of tile 5, expected %0d", d, pkts[5]));
    svc(1, 1, 0, 3, r, d);
    for (int t = 0; t < 2000 && pmrx.size() < 9; t++) @(negedge pe_clk[PPC]);
    chk(pmrx.size() == 9 && pmrx[0] == {1'b0, 16'hC011, 8'd1, 8'd4} && pmrx[8][32],
        $sformatf("monitoring frame of collector 1 (%0d words)", pmrx.size()));
    if (pmrx.size() == 9) begin
      n_frames++;
      for (int p = 0; p < 4; p++) chk(pmrx[1 + 2 * p][31:0] == 32'(pkts[4 + p]), "frame packet count");
    end
    // a route entry of stage-1 switch 2 (input 3, destination 1) and an unowned stop
    svc(0, 16 + 2, 12'h100 + 32 * 3 + 1, 0, r, d); chk(r == RESP_DVA && d == 1, "route entry through service");
    svc(0, 10, 0, 0, r, d); chk(r == RESP_ERR, "unowned service address answers ERR");

    $display("mechanisms: burst=%0d press=%0d lock_cycles=%0d lazy_fail=%0d frames=%0d service=%0d service_err=%0d fsl_full=%0d filter=%0d fft=%0d ray=%0d banks=%0d/%0d/%0d/%0d",
             n_burst, n_press, n_lock_cycles, n_lazy_fail, n_frames, n_service, n_service_err, n_fsl_full, n_filter, n_fft, n_ray,
             n_bank[0], n_bank[1], n_bank[2], n_bank[3]);
    chk(n_burst > 0, "burst transfers happened");
    chk(n_ray == 8, $sformatf("ray visited %0d cells", n_ray));
    chk(n_fft == 256, $sformatf("FFT produced %0d results", n_fft));
    chk(n_filter == 10, $sformatf("filter coprocessors produced %0d checked words", n_filter));
    chk(n_press > 0, "pressure decided an arbitration");
    chk(n_lock_cycles > 0, "locked synchronization held the path");
    chk(n_lazy_fail > 0, "a WriteConditional failed");
    chk(n_frames > 0, "a monitoring frame arrived");
    chk(n_service > 0, "service accesses happened");
    chk(n_service_err > 0, "a service ERR happened");
    chk(n_fsl_full > 0, "FSL back-pressure happened");
    for (int b = 0; b < NB; b++) chk(n_bank[b] > 0, $sformatf("bank %0d used", b));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
