// ref_spectrum_rom: dual-port memory holding the conjugated spectrum of the
// reference up-chirp, C[k] = conj(S_up[k]), k = 0 .. N-1.
//
// Storing the reference spectra instead of the time-domain chirps removes
// the forward transform of the references from the receiver, as the original design
// proposes. Port A, addressed by the up-counter, returns conj(S_up[k]);
// port B, addressed by the down-counter ((N-k) mod N), returns
// conj(S_up[(N-k) mod N]) = conj(S_dn[k]), the spectrum of the down-chirp
// s_dn[n] = s_up[(N-n) mod N]. Both ports are read in the same cycle.
//
// Contents: S_up[k] = sum_n exp(j*2*pi*phi(n)) * exp(-j*2*pi*k*n/N) with the
// chirp phase phi of mf_pkg, computed by a radix-2 FFT in integer arithmetic
// when the memory is initialised. Each
// component is scaled so that the largest one maps to 2^(C_W-1)-1 and is
// rounded; the scaling is this design's choice (the original gives none).
//
// Timing: synchronous read, data for the addresses presented in an enabled
// cycle appear on q_* after that clock edge and hold while 'en' is low.
module ref_spectrum_rom #(
  parameter int     N          = mf_pkg::N_POINTS,
  parameter int     C_W        = 16,
  parameter longint F_START_HZ = mf_pkg::F_START_HZ,
  parameter longint BW_HZ      = mf_pkg::BW_HZ,
  parameter longint FS_HZ      = mf_pkg::FS_HZ,
  parameter int     AW         = $clog2(N)
) (
  input  logic                  clk,
  input  logic                  en,
  input  logic [AW-1:0]         addr_a,
  input  logic [AW-1:0]         addr_b,
  output logic signed [C_W-1:0] qa_re,
  output logic signed [C_W-1:0] qa_im,
  output logic signed [C_W-1:0] qb_re,
  output logic signed [C_W-1:0] qb_im
);

  logic signed [C_W-1:0] mem_re [N];
  logic signed [C_W-1:0] mem_im [N];

  // The table is filled by an in-place radix-2 transform of the chirp
  // (bit-reversed load, then log2(N) butterfly passes) in 64-bit integers:
  // chirp samples with XF = 20 fraction bits, twiddles with 30.
  localparam int XF = 20;

  initial begin : init_table
    longint x_re [N];
    longint x_im [N];
    longint peak, c, sn, w_re, w_im, t_re, t_im, lim;
    logic [AW-1:0] j;
    int  half, step;
    for (int n = 0; n < N; n++) begin
      mf_pkg::sincos(mf_pkg::chirp_phase(n, N, F_START_HZ, BW_HZ, FS_HZ), c, sn);
      j = AW'(mf_pkg::bit_reverse(n, AW));
      x_re[j] = mf_pkg::round_shift(c, mf_pkg::TRIG_FRAC - XF);
      x_im[j] = mf_pkg::round_shift(sn, mf_pkg::TRIG_FRAC - XF);
    end
    half = 1;
    while (half < N) begin
      step = N / (2 * half);
      for (int m = 0; m < half; m++) begin
        // W_N^(m*step) = exp(-j*2*pi*m*step/N)
        mf_pkg::sincos((longint'(m * step) <<< mf_pkg::PH_FRAC) / longint'(N), w_re, w_im);
        w_im = -w_im;
        for (int b = m; b < N; b += 2 * half) begin
          t_re = mf_pkg::round_shift(x_re[b + half] * w_re - x_im[b + half] * w_im, mf_pkg::TRIG_FRAC);
          t_im = mf_pkg::round_shift(x_re[b + half] * w_im + x_im[b + half] * w_re, mf_pkg::TRIG_FRAC);
          x_re[b + half] = x_re[b] - t_re;
          x_im[b + half] = x_im[b] - t_im;
          x_re[b] = x_re[b] + t_re;
          x_im[b] = x_im[b] + t_im;
        end
      end
      half = 2 * half;
    end
    peak = 1;
    for (int k = 0; k < N; k++) begin
      if (x_re[k] > peak) peak = x_re[k];
      if (-x_re[k] > peak) peak = -x_re[k];
      if (x_im[k] > peak) peak = x_im[k];
      if (-x_im[k] > peak) peak = -x_im[k];
    end
    lim = (longint'(1) <<< (C_W - 1)) - 1;
    for (int k = 0; k < N; k++) begin
      mem_re[k] = C_W'(mf_pkg::round_div(x_re[k] * lim, peak));
      mem_im[k] = C_W'(mf_pkg::round_div(-x_im[k] * lim, peak));  // conjugate
    end
  end

  always_ff @(posedge clk) begin
    if (en) begin
      qa_re <= mem_re[addr_a];
      qa_im <= mem_im[addr_a];
      qb_re <= mem_re[addr_b];
      qb_im <= mem_im[addr_b];
    end
  end

endmodule
