// tb_fft_r2sdf: self-checking test of the streaming FFT core.
//
// Two instances are driven with the same continuous stream of random 12-bit
// complex frames: a forward 64-point transform with natural-order output and
// an inverse 64-point transform with bit-reversed output. Every output
// sample is compared with a direct DFT computed here in real arithmetic
// (tolerance of a few LSBs for twiddle rounding), its index is checked, and
// the latency in input samples is checked (2N-1 for natural order, N-1 for
// bit-reversed order).
module tb_fft_r2sdf;
  localparam int N = 64;
  localparam int AW = $clog2(N);
  localparam int FRAMES = 5;
  localparam int W = 24;
  localparam real TOL = 12.0;  // plus 2^-11 of the value: twiddle rounding

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0;
  logic signed [11:0] in_re = '0, in_im = '0;

  logic f_valid, f_last, i_valid, i_last;
  logic [AW-1:0] f_idx, i_idx;
  logic signed [W-1:0] f_re, f_im, i_re, i_im;

  fft_r2sdf #(.N(N), .IN_W(12), .W(W), .INVERSE(1'b0), .NATURAL_OUT(1'b1)) dut_f (
    .clk, .rst_n, .in_valid, .in_re, .in_im,
    .out_valid(f_valid), .out_idx(f_idx), .out_last(f_last), .out_re(f_re), .out_im(f_im));
  fft_r2sdf #(.N(N), .IN_W(12), .W(W), .INVERSE(1'b1), .NATURAL_OUT(1'b0)) dut_i (
    .clk, .rst_n, .in_valid, .in_re, .in_im,
    .out_valid(i_valid), .out_idx(i_idx), .out_last(i_last), .out_re(i_re), .out_im(i_im));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int x_re [FRAMES*N];
  int x_im [FRAMES*N];
  int n_in = 0;
  int f_cnt = 0, i_cnt = 0;
  int f_first_at = -1, i_first_at = -1;

  function automatic void dft(input int frame, input int k, input bit inv,
                              output real yr, output real yi);
    real a;
    yr = 0.0; yi = 0.0;
    for (int n = 0; n < N; n++) begin
      a = (inv ? 2.0 : -2.0) * mf_pkg::PI * real'(k * n) / real'(N);
      yr += real'(x_re[frame*N+n]) * $cos(a) - real'(x_im[frame*N+n]) * $sin(a);
      yi += real'(x_re[frame*N+n]) * $sin(a) + real'(x_im[frame*N+n]) * $cos(a);
    end
  endfunction

  function automatic real absr(input real v);
    return (v < 0.0) ? -v : v;
  endfunction

  function automatic real tol(input real v);
    return TOL + absr(v) / 2048.0;
  endfunction

  always @(posedge clk) begin
    real yr, yi;
    int fr, k;
    if (rst_n && f_valid) begin
      if (f_first_at < 0) f_first_at = n_in;
      fr = f_cnt / N; k = f_cnt % N;
      if (fr < FRAMES) begin
        dft(fr, k, 1'b0, yr, yi);
        checks++;
        if (int'(f_idx) != k || absr(real'(f_re) - yr) > tol(yr) || absr(real'(f_im) - yi) > tol(yi)
            || f_last != (k == N-1)) begin
          failures++;
          if (failures < 10) $display("FWD frame %0d bin %0d idx %0d: got %0d,%0d want %f,%f",
                                      fr, k, f_idx, f_re, f_im, yr, yi);
        end
      end
      f_cnt++;
    end
    if (rst_n && i_valid) begin
      if (i_first_at < 0) i_first_at = n_in;
      fr = i_cnt / N;
      k = int'(mf_pkg::bit_reverse(i_cnt % N, AW));
      if (fr < FRAMES) begin
        dft(fr, k, 1'b1, yr, yi);
        checks++;
        if (int'(i_idx) != k || absr(real'(i_re) - yr) > tol(yr) || absr(real'(i_im) - yi) > tol(yi)
            || i_last != ((i_cnt % N) == N-1)) begin
          failures++;
          if (failures < 10) $display("INV frame %0d n %0d idx %0d: got %0d,%0d want %f,%f",
                                      fr, k, i_idx, i_re, i_im, yr, yi);
        end
      end
      i_cnt++;
    end
  end

  initial begin
    for (int n = 0; n < FRAMES*N; n++) begin
      // Frame 0 is a full-scale impulse train, frame 1 a full-scale tone,
      // the rest random full-scale data.
      if (n < N) begin
        x_re[n] = (n % 8 == 0) ? 2047 : 0; x_im[n] = (n % 8 == 0) ? -2048 : 0;
      end else if (n < 2*N) begin
        x_re[n] = int'(2047.0 * $cos(2.0 * mf_pkg::PI * 5.0 * real'(n) / real'(N)));
        x_im[n] = int'(2047.0 * $sin(2.0 * mf_pkg::PI * 5.0 * real'(n) / real'(N)));
      end else begin
        x_re[n] = int'($urandom_range(4095)) - 2048;
        x_im[n] = int'($urandom_range(4095)) - 2048;
      end
    end
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    // Continuous stream, with a few one-cycle pauses, then two flush frames.
    for (int n = 0; n < (FRAMES + 2) * N; n++) begin
      if (n % 37 == 20) begin
        in_valid <= 1'b0;
        @(posedge clk);
      end
      in_valid <= 1'b1;
      in_re <= (n < FRAMES*N) ? 12'(x_re[n]) : 12'($urandom);
      in_im <= (n < FRAMES*N) ? 12'(x_im[n]) : 12'($urandom);
      @(posedge clk);
      n_in++;
    end
    in_valid <= 1'b0;
    repeat (10) @(posedge clk);
    // Latency: N-1 samples (plus N for the reorder memory) and one clock per
    // stage; the input count seen with the first output is therefore
    // N + log2(N) (2N + log2(N) with natural order).
    checks++;
    if (f_first_at != 2*N + AW) begin
      failures++; $display("forward latency: first output after %0d inputs", f_first_at);
    end
    checks++;
    if (i_first_at != N + AW) begin
      failures++; $display("inverse latency: first output after %0d inputs", i_first_at);
    end
    checks++;
    if (f_cnt < FRAMES*N || i_cnt < FRAMES*N) begin
      failures++; $display("missing outputs %0d %0d", f_cnt, i_cnt);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
