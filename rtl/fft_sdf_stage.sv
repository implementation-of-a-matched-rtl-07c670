// fft_sdf_stage: one radix-2 decimation-in-frequency stage of a single-path
// delay-feedback (SDF) pipeline FFT.
//
// The stage works on blocks of 2*D samples. During the first D samples of a
// block it stores the inputs in a D-deep feedback memory and emits the
// differences left there by the previous block, multiplied by the twiddle
// W^(m*STRIDE), W = exp(-+j*2*pi/N), m = position within the half block.
// During the last D samples it forms the butterfly with the stored partner
// x[m]: it emits x[m] + x[m+D] and stores x[m] - x[m+D]. A stage therefore
// delays the stream by D samples and reorders nothing itself; a chain of
// stages with D = N/2, N/4, .., 1 produces the transform in bit-reversed
// order.
//
// Timing: every register moves only on an input sample (in_valid); the
// output register is loaded in the same cycle, so out_valid is in_valid
// delayed by one clock. The data on the output belong to the sample D
// samples earlier. Arithmetic is W bits without scaling; the caller provides
// the headroom. Twiddles are TW_W-bit with TW_W-2 fraction bits, rounded.
// INVERSE conjugates the twiddles (inverse transform without the 1/N).
module fft_sdf_stage #(
  parameter int N       = 1024,
  parameter int D       = 512,
  parameter int W       = 24,
  parameter int TW_W    = 16,
  parameter bit INVERSE = 1'b0
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic signed [W-1:0] in_re,
  input  logic signed [W-1:0] in_im,
  output logic                out_valid,
  output logic signed [W-1:0] out_re,
  output logic signed [W-1:0] out_im
);

  localparam int STRIDE = N / (2 * D);
  localparam int CW     = $clog2(2 * D);        // block position counter
  localparam int PW     = (D > 1) ? $clog2(D) : 1;
  localparam int FRAC   = TW_W - 2;

  logic [CW-1:0] cnt;
  logic          second_half;
  logic [PW-1:0] ptr;

  logic signed [W-1:0]    fb_re [D];
  logic signed [W-1:0]    fb_im [D];
  logic signed [TW_W-1:0] tw_re [D];
  logic signed [TW_W-1:0] tw_im [D];

  // Twiddle table of this stage: W_N^(m*STRIDE), m = 0 .. D-1.
  initial begin : init_twiddles
    longint c, sn;
    for (int m = 0; m < D; m++) begin
      mf_pkg::sincos((longint'(m * STRIDE) <<< mf_pkg::PH_FRAC) / longint'(N), c, sn);
      tw_re[m] = TW_W'(mf_pkg::round_shift(c, mf_pkg::TRIG_FRAC - FRAC));
      tw_im[m] = TW_W'(mf_pkg::round_shift(INVERSE ? sn : -sn, mf_pkg::TRIG_FRAC - FRAC));
    end
  end

  assign second_half = cnt[CW-1];
  assign ptr = (D > 1) ? PW'(cnt) : '0;

  logic signed [W-1:0]      a_re, a_im, sum_re, sum_im, dif_re, dif_im;
  logic signed [W+TW_W:0]   p_re, p_im;
  logic signed [W-1:0]      rot_re, rot_im;
  logic signed [TW_W-1:0]   wr, wi;

  always_comb begin
    a_re   = fb_re[ptr];
    a_im   = fb_im[ptr];
    sum_re = a_re + in_re;
    sum_im = a_im + in_im;
    dif_re = a_re - in_re;
    dif_im = a_im - in_im;
    wr     = tw_re[ptr];
    wi     = tw_im[ptr];
    // Rotation of the stored difference, rounded to nearest.
    p_re   = (W+TW_W+1)'(a_re) * (W+TW_W+1)'(wr) - (W+TW_W+1)'(a_im) * (W+TW_W+1)'(wi)
             + (W+TW_W+1)'(1 <<< (FRAC - 1));
    p_im   = (W+TW_W+1)'(a_re) * (W+TW_W+1)'(wi) + (W+TW_W+1)'(a_im) * (W+TW_W+1)'(wr)
             + (W+TW_W+1)'(1 <<< (FRAC - 1));
    rot_re = W'(p_re >>> FRAC);
    rot_im = W'(p_im >>> FRAC);
  end

  always_ff @(posedge clk) begin
    if (in_valid) begin
      if (second_half) begin
        fb_re[ptr] <= dif_re;
        fb_im[ptr] <= dif_im;
      end else begin
        fb_re[ptr] <= in_re;
        fb_im[ptr] <= in_im;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt       <= '0;
      out_valid <= 1'b0;
      out_re    <= '0;
      out_im    <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        cnt <= cnt + 1'b1;
        if (second_half) begin
          out_re <= sum_re;
          out_im <= sum_im;
        end else begin
          out_re <= rot_re;
          out_im <= rot_im;
        end
      end
    end
  end

endmodule
