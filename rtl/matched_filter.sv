// matched_filter: BOK chirp-spread-spectrum receiver matched filter, with
// the memory-based BOK chirp generator of the transmit side alongside.
//
// Receive path. The 12-bit complex baseband stream from the transceiver is
// cut into frames of N = 1024 samples (one chirp, 16.6667 us at 61.44 MHz)
// and correlated with both reference chirps at once by fast convolution:
//   Y_up = IFFT(FFT(u) * conj(S_up)),   Y_dn = IFFT(FFT(u) * conj(S_dn)).
//   fft_r2sdf (forward, natural order)
//     -> spectral_mult (reference spectra from one dual-port memory read by
//        an up-counter and a down-counter)
//     -> two fft_r2sdf (inverse, bit-reversed order), one per chirp
//     -> two corr_peak_detect (peak energy and position per frame)
//     -> bok_decision (larger peak wins: 1 = up-chirp, 0 = down-chirp).
// The reference spectra are stored, so no transform of the references is
// computed in hardware. The correlations are circular over each frame: a
// frame aligned with a symbol gives its peak at index 0, a frame that
// starts d samples before the symbol (with the same symbol on both sides)
// gives it at index d.
//
// Transmit path. bok_chirp_gen turns a bit stream into up- and down-chirps
// read from one table; its ports are separate from the receiver's.
//
// Timing: one sample per clock when rx_valid is high (the pipeline also
// accepts gaps). The correlation of frame f leaves on corr_* in time-index
// bit-reversed order (corr_idx gives the index) while input frame f+3 is
// entering; its decision follows the frame's last correlation sample by
// two clocks. Fixed-point: forward transform 24 bits unscaled, products
// scaled by 2^-PROD_SHIFT into 40 bits, inverse transforms 40 bits
// unscaled, peak energy from the top 24 bits of each component.
//
// The dataflow, the sizes (1024 points, 12-bit input) and the dual-port
// reference memory with two counters follow the original design; the transform
// architecture, word widths, scaling and decision rule are this design's.
module matched_filter
  import mf_pkg::*;
#(
  parameter int N          = N_POINTS,
  parameter int FFT_W      = 24,
  parameter int REF_W      = 16,
  parameter int PROD_SHIFT = 10,
  parameter int IFFT_W     = 40,
  parameter int MAG_SHIFT  = 16,
  parameter int AW         = $clog2(N),
  parameter int MAG_W      = 2 * (IFFT_W - MAG_SHIFT)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // receive stream from the transceiver
  input  logic                     rx_valid,
  input  iq_sample_t               rx,
  // correlation outputs of both branches
  output logic                     corr_valid,
  output logic [AW-1:0]            corr_idx,
  output logic signed [IFFT_W-1:0] corr_up_re,
  output logic signed [IFFT_W-1:0] corr_up_im,
  output logic signed [IFFT_W-1:0] corr_dn_re,
  output logic signed [IFFT_W-1:0] corr_dn_im,
  // per-frame decision
  output logic                     sym_valid,
  output logic                     sym_bit,
  output logic                     sym_detect,
  output logic [AW-1:0]            sym_offset,
  output logic [MAG_W-1:0]         sym_mag,
  output logic [MAG_W-1:0]         up_peak_mag,
  output logic [MAG_W-1:0]         dn_peak_mag,
  // transmit side: BOK chirp generator
  input  logic                     tx_en,
  input  logic                     tx_bit,
  output logic                     tx_bit_take,
  output logic                     tx_valid,
  output logic                     tx_sof,
  output iq_sample_t               tx
);

  // Forward transform of the received frame.
  logic                    f_valid, f_last;
  logic [AW-1:0]           f_idx;
  logic signed [FFT_W-1:0] f_re, f_im;

  fft_r2sdf #(.N(N), .IN_W(SAMPLE_W), .W(FFT_W), .INVERSE(1'b0), .NATURAL_OUT(1'b1)) u_fft (
    .clk(clk), .rst_n(rst_n),
    .in_valid(rx_valid), .in_re(rx.i), .in_im(rx.q),
    .out_valid(f_valid), .out_idx(f_idx), .out_last(f_last), .out_re(f_re), .out_im(f_im)
  );

  // Products with both reference spectra.
  logic                     m_valid, m_last;
  logic [AW-1:0]            m_idx;
  logic signed [IFFT_W-1:0] mu_re, mu_im, md_re, md_im;

  spectral_mult #(.N(N), .U_W(FFT_W), .C_W(REF_W), .P_W(IFFT_W), .SHIFT(PROD_SHIFT)) u_mult (
    .clk(clk), .rst_n(rst_n),
    .in_valid(f_valid), .in_idx(f_idx), .in_last(f_last), .u_re(f_re), .u_im(f_im),
    .out_valid(m_valid), .out_idx(m_idx), .out_last(m_last),
    .up_re(mu_re), .up_im(mu_im), .dn_re(md_re), .dn_im(md_im)
  );

  // Inverse transforms: the two correlation functions.
  logic          iu_valid, iu_last, id_valid, id_last;
  logic [AW-1:0] iu_idx, id_idx;

  fft_r2sdf #(.N(N), .IN_W(IFFT_W), .W(IFFT_W), .INVERSE(1'b1), .NATURAL_OUT(1'b0)) u_ifft_up (
    .clk(clk), .rst_n(rst_n),
    .in_valid(m_valid), .in_re(mu_re), .in_im(mu_im),
    .out_valid(iu_valid), .out_idx(iu_idx), .out_last(iu_last),
    .out_re(corr_up_re), .out_im(corr_up_im)
  );

  fft_r2sdf #(.N(N), .IN_W(IFFT_W), .W(IFFT_W), .INVERSE(1'b1), .NATURAL_OUT(1'b0)) u_ifft_dn (
    .clk(clk), .rst_n(rst_n),
    .in_valid(m_valid), .in_re(md_re), .in_im(md_im),
    .out_valid(id_valid), .out_idx(id_idx), .out_last(id_last),
    .out_re(corr_dn_re), .out_im(corr_dn_im)
  );

  assign corr_valid = iu_valid;
  assign corr_idx   = iu_idx;

  // Peak search in each branch.
  logic          pu_valid, pd_valid;
  logic [AW-1:0] pu_idx, pd_idx;

  corr_peak_detect #(.N(N), .W(IFFT_W), .MAG_SHIFT(MAG_SHIFT)) u_peak_up (
    .clk(clk), .rst_n(rst_n),
    .in_valid(iu_valid), .in_idx(iu_idx), .in_last(iu_last),
    .in_re(corr_up_re), .in_im(corr_up_im),
    .peak_valid(pu_valid), .peak_mag(up_peak_mag), .peak_idx(pu_idx)
  );

  corr_peak_detect #(.N(N), .W(IFFT_W), .MAG_SHIFT(MAG_SHIFT)) u_peak_dn (
    .clk(clk), .rst_n(rst_n),
    .in_valid(id_valid), .in_idx(id_idx), .in_last(id_last),
    .in_re(corr_dn_re), .in_im(corr_dn_im),
    .peak_valid(pd_valid), .peak_mag(dn_peak_mag), .peak_idx(pd_idx)
  );

  bok_decision #(.MAG_W(MAG_W), .AW(AW)) u_decide (
    .clk(clk), .rst_n(rst_n),
    .up_valid(pu_valid), .up_mag(up_peak_mag), .up_idx(pu_idx),
    .dn_valid(pd_valid), .dn_mag(dn_peak_mag), .dn_idx(pd_idx),
    .sym_valid(sym_valid), .sym_bit(sym_bit), .sym_detect(sym_detect),
    .sym_offset(sym_offset), .sym_mag(sym_mag)
  );

  // Transmit side.
  bok_chirp_gen #(.N(N), .OUT_W(SAMPLE_W)) u_tx (
    .clk(clk), .rst_n(rst_n), .en(tx_en), .bit_in(tx_bit), .bit_take(tx_bit_take),
    .out_valid(tx_valid), .out_sof(tx_sof), .out_i(tx.i), .out_q(tx.q)
  );

  // Bins reach the inverse transforms in natural order, one frame at a time.
  a_bins: assert property (@(posedge clk) disable iff (!rst_n)
                           m_valid |-> (m_last == (m_idx == AW'(N - 1))));

  // The two inverse transforms run in lockstep.
  a_branches: assert property (@(posedge clk) disable iff (!rst_n)
                               iu_valid == id_valid && iu_idx == id_idx && iu_last == id_last);

endmodule
