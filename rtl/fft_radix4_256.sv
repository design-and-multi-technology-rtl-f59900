// fft_radix4_256 -- 256-point radix-4 FFT coprocessor, sequential variant.
//
// Computes X[k] = (1/256) * sum_n x[n] * exp(-2*pi*i*n*k/256) on 256 complex
// values of 16 bits per component (two's complement).  It works in three
// phases over one store of 256 complex words:
//   load    - 256 input samples in natural order, one per accepted transfer;
//   compute - four decimation-in-frequency radix-4 stages of 64 butterflies,
//             one butterfly per cycle (256 cycles).  A butterfly of span L
//             reads points a, a+L, a+2L, a+3L, forms the 4-point DFT, scales
//             it by 1/4 (so the result never grows), multiplies outputs 1..3
//             by the twiddles W^(m*j*256/(4L)) and writes the four points
//             back in place;
//   unload  - 256 results in natural order, read at base-4 digit-reversed
//             addresses, one per accepted transfer.
// The twiddle table (cos and -sin of 2*pi*k/256 in Q1.14) is computed at
// elaboration with $cos / $sin.  Products are truncated (arithmetic shift).
// Because each stage scales by 1/4 and a rotation keeps the magnitude, the
// result cannot overflow as long as every input sample has a magnitude below
// 2^15.
// Interface: valid/ready streams for input and output (in_re/in_im and
// out_re/out_im); out_last marks the 256th result.  A new block can be loaded
// as soon as the previous one has been unloaded.
// Follows the design: 256 points, radix 4, 16-bit complex data, a sequential
// variant.  Own choices: the in-place DIF order, the 1/4 scaling per stage,
// Q1.14 twiddles, one butterfly per cycle and the handshake.
module fft_radix4_256 (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               in_valid,
  output logic               in_ready,
  input  logic signed [15:0] in_re,
  input  logic signed [15:0] in_im,
  output logic               out_valid,
  input  logic               out_ready,
  output logic signed [15:0] out_re,
  output logic signed [15:0] out_im,
  output logic               out_last
);
  localparam int N = 256;

  typedef logic signed [15:0] tw_t [N];
  function automatic tw_t make_tw(bit sine);
    tw_t t;
    for (int k = 0; k < N; k++) begin
      real a, v;
      a = 6.283185307179586 * k / N;
      v = sine ? -$sin(a) : $cos(a);
      t[k] = 16'($rtoi(v * 16384.0 + (v >= 0.0 ? 0.5 : -0.5)));
    end
    return t;
  endfunction
  localparam tw_t TW_C = make_tw(1'b0);   // cos(2 pi k / N)
  localparam tw_t TW_S = make_tw(1'b1);   // -sin(2 pi k / N)

  logic signed [15:0] mre [N];
  logic signed [15:0] mim [N];

  typedef enum logic [1:0] {P_LOAD, P_CALC, P_UNLOAD} ph_e;
  ph_e        ph;
  logic [7:0] cnt;          // sample index (load/unload) or butterfly index in [5:0]
  logic [1:0] stg;          // stage 0..3, span L = 64 >> (2*stg)

  // ---------------- butterfly addressing
  logic [7:0] a0, a1, a2, a3, jj, tstep;
  logic [7:0] ti1, ti2, ti3;
  always_comb begin
    logic [7:0] l, grp;
    l     = 8'd64 >> (2 * stg);
    jj    = {2'b00, cnt[5:0]} & (l - 8'd1);                      // position inside the group
    grp   = 8'(cnt[5:0] >> (6 - 2 * stg));            // group number
    a0    = 8'(grp * (4 * l)) + jj;
    a1    = a0 + l;
    a2    = a1 + l;
    a3    = a2 + l;
    tstep = 8'd1 << (2 * stg);                         // 256 / (4L)
    ti1   = 8'(jj * tstep);
    ti2   = 8'(2 * jj * tstep);
    ti3   = 8'(3 * jj * tstep);
  end

  // ---------------- butterfly arithmetic
  function automatic logic signed [15:0] rot_re(logic signed [15:0] xr, logic signed [15:0] xi,
                                                logic [7:0] k);
    logic signed [31:0] p;
    p = xr * TW_C[k] - xi * TW_S[k];
    return 16'(p >>> 14);
  endfunction
  function automatic logic signed [15:0] rot_im(logic signed [15:0] xr, logic signed [15:0] xi,
                                                logic [7:0] k);
    logic signed [31:0] p;
    p = xr * TW_S[k] + xi * TW_C[k];
    return 16'(p >>> 14);
  endfunction

  logic signed [15:0] yr [4], yi [4];
  always_comb begin
    logic signed [17:0] r0, r1, r2, r3, i0, i1, i2, i3;
    logic signed [17:0] sr [4], si [4];
    r0 = 18'(mre[a0]); r1 = 18'(mre[a1]); r2 = 18'(mre[a2]); r3 = 18'(mre[a3]);
    i0 = 18'(mim[a0]); i1 = 18'(mim[a1]); i2 = 18'(mim[a2]); i3 = 18'(mim[a3]);
    // 4-point DFT, forward: y1 = x0 - j x1 - x2 + j x3, y3 = x0 + j x1 - x2 - j x3
    sr[0] = r0 + r1 + r2 + r3;   si[0] = i0 + i1 + i2 + i3;
    sr[1] = r0 + i1 - r2 - i3;   si[1] = i0 - r1 - i2 + r3;
    sr[2] = r0 - r1 + r2 - r3;   si[2] = i0 - i1 + i2 - i3;
    sr[3] = r0 - i1 - r2 + i3;   si[3] = i0 + r1 - i2 - r3;
    for (int m = 0; m < 4; m++) begin
      yr[m] = 16'(sr[m] >>> 2);
      yi[m] = 16'(si[m] >>> 2);
    end
  end

  // ---------------- output side
  logic [7:0] rev;
  assign rev = {cnt[1:0], cnt[3:2], cnt[5:4], cnt[7:6]};   // base-4 digit reversal
  assign in_ready  = (ph == P_LOAD);
  assign out_valid = (ph == P_UNLOAD);
  assign out_re    = mre[rev];
  assign out_im    = mim[rev];
  assign out_last  = (ph == P_UNLOAD) && (cnt == 8'd255);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ph <= P_LOAD; cnt <= '0; stg <= '0;
    end else begin
      unique case (ph)
        P_LOAD: if (in_valid) begin
          cnt <= cnt + 8'd1;
          if (cnt == 8'd255) begin ph <= P_CALC; stg <= '0; end
        end
        P_CALC: begin
          if (cnt[5:0] == 6'd63) begin
            cnt <= '0;
            stg <= stg + 2'd1;
            if (stg == 2'd3) ph <= P_UNLOAD;
          end else cnt <= cnt + 8'd1;
        end
        P_UNLOAD: if (out_ready) begin
          cnt <= cnt + 8'd1;
          if (cnt == 8'd255) ph <= P_LOAD;
        end
        default: ph <= P_LOAD;
      endcase
    end
  end

  // sample store (no reset: a RAM)
  always_ff @(posedge clk) begin
    if (ph == P_LOAD && in_valid) begin
      mre[cnt] <= in_re;
      mim[cnt] <= in_im;
    end else if (ph == P_CALC) begin
      mre[a0] <= yr[0];                     mim[a0] <= yi[0];
      mre[a1] <= rot_re(yr[1], yi[1], ti1); mim[a1] <= rot_im(yr[1], yi[1], ti1);
      mre[a2] <= rot_re(yr[2], yi[2], ti2); mim[a2] <= rot_im(yr[2], yi[2], ti2);
      mre[a3] <= rot_re(yr[3], yi[3], ti3); mim[a3] <= rot_im(yr[3], yi[3], ti3);
    end
  end

endmodule
