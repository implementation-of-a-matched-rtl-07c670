// fft_r2sdf: streaming N-point FFT / IFFT, one complex sample per clock.
//
// The transform is a radix-2 single-path delay-feedback pipeline: log2(N)
// fft_sdf_stage instances with feedback depths N/2, N/4, .., 1, so it
// accepts an unbroken stream of N-sample frames and returns one transformed
// frame per N input samples. The pipeline produces bins in bit-reversed
// order; with NATURAL_OUT = 1 a double-buffered bitrev_reorder memory
// restores natural order at the cost of one more frame of delay. out_idx
// always names the bin (or, for the inverse transform, the time index) of
// the sample on the output, and out_last marks the last sample of a frame.
//
// Frames are counted from the first input sample after reset: samples
// 0..N-1 form frame 0, and so on. Registers move only on in_valid, so the
// input may pause; latency is counted in input samples: the first sample of
// a frame's result leaves while input sample (frame_start + N - 1) enters
// (plus N more with NATURAL_OUT), one to a few clocks later.
//
// Number format: the IN_W-bit input is sign-extended to W bits and carried
// unscaled (no 1/N, neither forward nor inverse), so W must be at least
// IN_W + log2(N) + 2 for full-scale complex inputs. INVERSE selects
// exp(+j) twiddles.
//
// The original design uses a 1024-point forward transform and two inverse
// transforms of the same length; the pipeline architecture, the fixed-point
// format and the reorder memory are this design's choices.
module fft_r2sdf #(
  parameter int N           = mf_pkg::N_POINTS,
  parameter int IN_W        = mf_pkg::SAMPLE_W,
  parameter int W           = 24,
  parameter int TW_W        = 16,
  parameter bit INVERSE     = 1'b0,
  parameter bit NATURAL_OUT = 1'b1,
  parameter int AW          = $clog2(N)
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   in_valid,
  input  logic signed [IN_W-1:0] in_re,
  input  logic signed [IN_W-1:0] in_im,
  output logic                   out_valid,
  output logic [AW-1:0]          out_idx,
  output logic                   out_last,
  output logic signed [W-1:0]    out_re,
  output logic signed [W-1:0]    out_im
);

  localparam int L = AW;

  logic                v  [L+1];
  logic signed [W-1:0] re [L+1];
  logic signed [W-1:0] im [L+1];

  assign v[0]  = in_valid;
  assign re[0] = W'(in_re);
  assign im[0] = W'(in_im);

  for (genvar s = 0; s < L; s++) begin : g_stage
    fft_sdf_stage #(
      .N(N), .D(N >> (s + 1)), .W(W), .TW_W(TW_W), .INVERSE(INVERSE)
    ) u_stage (
      .clk(clk), .rst_n(rst_n),
      .in_valid(v[s]), .in_re(re[s]), .in_im(im[s]),
      .out_valid(v[s+1]), .out_re(re[s+1]), .out_im(im[s+1])
    );
  end

  // The first N-1 samples leaving the pipeline come from the uninitialised
  // feedback memories; after them, samples arrive frame-aligned.
  logic [AW-1:0] skip;
  logic          primed;
  logic [AW-1:0] pos;
  logic          pipe_valid;

  assign pipe_valid = v[L] && primed;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      skip   <= '0;
      primed <= (N == 1);
      pos    <= '0;
    end else if (v[L]) begin
      if (!primed) begin
        skip <= skip + 1'b1;
        if (skip == AW'(N - 2)) primed <= 1'b1;
      end else begin
        pos <= pos + 1'b1;
      end
    end
  end

  if (NATURAL_OUT) begin : g_natural
    bitrev_reorder #(.N(N), .W(W)) u_reorder (
      .clk(clk), .rst_n(rst_n),
      .in_valid(pipe_valid), .in_re(re[L]), .in_im(im[L]),
      .out_valid(out_valid), .out_idx(out_idx),
      .out_re(out_re), .out_im(out_im)
    );
    assign out_last = (out_idx == AW'(N - 1));
  end else begin : g_bitrev
    logic [AW-1:0] pos_rev;
    always_comb begin
      for (int b = 0; b < AW; b++) pos_rev[b] = pos[AW-1-b];
    end
    assign out_valid = pipe_valid;
    assign out_idx   = pos_rev;
    assign out_last  = (pos == AW'(N - 1));
    assign out_re    = re[L];
    assign out_im    = im[L];
  end

endmodule
