// tb_matched_filter: end-to-end test of the BOK chirp matched filter at its
// default size (1024-point frames, 12-bit samples), with no parameter
// overrides.
//
// The transmit half of the design (bok_chirp_gen) is looped back into the
// receive half through the testbench. Two runs, each after a reset:
//   A  20 BOK symbols (the bench test of the original design: a cyclic
//      up/down pattern, here alternating with a few repeats), frames aligned
//      with symbols, continuous one-sample-per-clock stream; then zero
//      frames to flush the pipeline.
//   B  the stream starts D_OFS zero samples before the first symbol (frames
//      straddle symbols), runs of equal symbols, and one-clock gaps in the
//      stream.
// Checks, against values computed here independently of the design:
//   - each decided bit equals the transmitted symbol;
//   - the peak position equals the symbol's offset within the frame;
//   - the matched branch's peak is far above the other branch's peak;
//   - the complex correlation samples at the peak, its neighbours and a few
//     random lags match a direct circular correlation of the received
//     samples with a chirp generated here, after one common real gain;
//   - one decision per 1024 input samples, at a constant latency;
//   - zero frames give 'no symbol'.
// Mechanisms counted and required: up decisions, down decisions, offset
// peaks, stream gaps, no-symbol frames.
module tb_matched_filter;
  import mf_pkg::*;

  localparam int N = N_POINTS;
  localparam int AW = $clog2(N);
  localparam int NSYM_A = 20;
  localparam int NSYM_B = 8;
  localparam int D_OFS = 100;
  localparam int MAXS = 40 * N;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic rx_valid;
  iq_sample_t rx;
  logic corr_valid;
  logic [AW-1:0] corr_idx;
  logic signed [39:0] corr_up_re, corr_up_im, corr_dn_re, corr_dn_im;
  logic sym_valid, sym_bit, sym_detect;
  logic [AW-1:0] sym_offset;
  logic [47:0] sym_mag, up_peak_mag, dn_peak_mag;
  logic tx_en, tx_bit, tx_bit_take, tx_valid, tx_sof;
  iq_sample_t tx;

  matched_filter dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_up = 0, n_dn = 0, n_offset = 0, n_gap = 0, n_nosym = 0;

  // Receive-side record: every sample fed, and the symbol each frame holds.
  real rx_re [MAXS];
  real rx_im [MAXS];
  int  n_rx;
  int  frame_bit [64];      // -1: no symbol / mixed
  int  frame_ofs [64];
  int  sym_bits [64];
  bit  run_b;
  bit  feeding;

  // Reference chirp, generated independently of the design's tables.
  real c_re [N];
  real c_im [N];

  // Correlation samples of the current output frame.
  real hu_re [N], hu_im [N], hd_re [N], hd_im [N];
  int  corr_frame, corr_cnt;
  int  dec_frame;
  longint last_dec_cycle, cycle;

  always @(posedge clk) cycle <= cycle + 1;

  // Loopback: the generator's output becomes the received stream. In run B
  // the stream begins with D_OFS zero samples; after the last symbol zero
  // samples flush the pipeline.
  int pre_zeros;
  bit flush;
  always @(posedge clk) begin
    if (!rst_n || !feeding) begin
      rx_valid <= 1'b0;
      rx <= '0;
    end else if (pre_zeros > 0) begin
      rx_valid <= 1'b1;
      rx <= '0;
      pre_zeros <= pre_zeros - 1;
    end else if (flush) begin
      rx_valid <= 1'b1;
      rx <= '0;
    end else begin
      rx_valid <= tx_valid;
      rx <= tx_valid ? tx : '0;
    end
  end

  always @(posedge clk) begin
    if (rx_valid && n_rx < MAXS) begin
      rx_re[n_rx] = real'(rx.i);
      rx_im[n_rx] = real'(rx.q);
      n_rx++;
    end
  end

  // Direct circular correlation of frame f at lag m with the up- or
  // down-chirp: sum_n r[(n+m) mod N] * conj(c[n]).
  function automatic void ref_corr(input int f, input int m, input bit up,
                                   output real yr, output real yi);
    real sr, si, ur, ui;
    int  j;
    yr = 0.0; yi = 0.0;
    for (int n = 0; n < N; n++) begin
      j = up ? n : (N - n) % N;
      sr = c_re[j]; si = c_im[j];
      ur = rx_re[f*N + (n + m) % N];
      ui = rx_im[f*N + (n + m) % N];
      yr += ur * sr + ui * si;
      yi += ui * sr - ur * si;
    end
  endfunction

  function automatic real absr(input real v);
    return (v < 0.0) ? -v : v;
  endfunction

  // Compare the hardware correlation of a frame with the direct one.
  task automatic check_frame_shape(input int f, input int pk, input bit up);
    real gr, gi, g, yr, yi, hr, hi, ref_pk;
    int  lags [8];
    ref_corr(f, pk, up, gr, gi);
    ref_pk = $sqrt(gr*gr + gi*gi);
    hr = up ? hu_re[pk] : hd_re[pk];
    hi = up ? hu_im[pk] : hd_im[pk];
    g = $sqrt(hr*hr + hi*hi) / ref_pk;
    lags[0] = pk; lags[1] = (pk + 1) % N; lags[2] = (pk + N - 1) % N;
    lags[3] = (pk + 7) % N;
    for (int i = 4; i < 8; i++) lags[i] = int'($urandom_range(N - 1));
    for (int i = 0; i < 8; i++) begin
      for (int b = 0; b < 2; b++) begin
        ref_corr(f, lags[i], b == 0, yr, yi);
        hr = (b == 0) ? hu_re[lags[i]] : hd_re[lags[i]];
        hi = (b == 0) ? hu_im[lags[i]] : hd_im[lags[i]];
        checks++;
        if (absr(hr / g - yr) > 0.01 * ref_pk || absr(hi / g - yi) > 0.01 * ref_pk) begin
          failures++;
          $display("frame %0d lag %0d branch %0d: hw/g=(%f,%f) ref=(%f,%f)",
                   f, lags[i], b, hr / g, hi / g, yr, yi);
        end
      end
    end
  endtask

  // Collect correlation output frames.
  always @(posedge clk) begin
    if (rst_n && corr_valid) begin
      hu_re[corr_idx] = real'(corr_up_re);
      hu_im[corr_idx] = real'(corr_up_im);
      hd_re[corr_idx] = real'(corr_dn_re);
      hd_im[corr_idx] = real'(corr_dn_im);
      corr_cnt++;
      if (corr_cnt == N) begin
        corr_cnt = 0;
        if (frame_bit[corr_frame] >= 0 && corr_frame < 64)
          check_frame_shape(corr_frame, frame_ofs[corr_frame], frame_bit[corr_frame] == 1);
        corr_frame++;
      end
    end
  end

  // Decisions.
  always @(posedge clk) begin
    if (rst_n && sym_valid) begin
      if (dec_frame < 64 && frame_bit[dec_frame] >= 0) begin
        checks++;
        if (!sym_detect || int'(sym_bit) != frame_bit[dec_frame] ||
            int'(sym_offset) != frame_ofs[dec_frame]) begin
          failures++;
          $display("frame %0d: bit %0d ofs %0d det %0d, want bit %0d ofs %0d",
                   dec_frame, sym_bit, sym_offset, sym_detect,
                   frame_bit[dec_frame], frame_ofs[dec_frame]);
        end
        // Low cross-correlation: the losing branch is at least 10x lower.
        checks++;
        if ((sym_bit ? dn_peak_mag : up_peak_mag) * 10 > sym_mag) begin
          failures++;
          $display("frame %0d: weak separation up=%0d dn=%0d", dec_frame, up_peak_mag, dn_peak_mag);
        end
        if (sym_bit) n_up++; else n_dn++;
        if (sym_offset != 0) n_offset++;
      end else if (dec_frame < 64 && frame_bit[dec_frame] == -2) begin
        checks++;
        if (sym_detect) begin
          failures++; $display("frame %0d: zero frame detected as symbol", dec_frame);
        end else n_nosym++;
      end
      // Rate: in run A (continuous stream) decisions come every N clocks.
      if (!run_b && dec_frame > 0) begin
        checks++;
        if (cycle - last_dec_cycle != longint'(N)) begin
          failures++; $display("decision spacing %0d clocks", cycle - last_dec_cycle);
        end
      end
      // Latency: the decision of frame f leaves 4N-3 samples after the frame
      // start plus 2*log2(N)+6 clocks of registers (continuous stream).
      if (dec_frame == 0) begin
        checks++;
        if (n_rx != 4*N - 3 + 2*AW + 6) begin
          failures++; $display("first decision after %0d input samples", n_rx);
        end
      end
      last_dec_cycle = cycle;
      dec_frame++;
    end
  end

  task automatic do_reset();
    feeding = 1'b0;
    tx_en <= 1'b0;
    rst_n <= 1'b0;
    repeat (4) @(posedge clk);
    n_rx = 0; corr_frame = 0; corr_cnt = 0; dec_frame = 0;
    for (int f = 0; f < 64; f++) begin frame_bit[f] = -2; frame_ofs[f] = 0; end
    rst_n <= 1'b1;
    @(posedge clk);
  endtask

  // Send nsym symbols (optionally with one-clock gaps), then zero samples
  // until 5 more frames have passed.
  task automatic send(input int nsym, input bit gaps);
    int en_cnt = 0, cyc = 0;
    bit gap;
    feeding = 1'b1;
    while (pre_zeros > 0) @(posedge clk);
    while (en_cnt < nsym * N) begin
      gap = gaps && (cyc % 97 == 50);
      tx_en <= !gap;
      tx_bit <= 1'(sym_bits[en_cnt / N]);
      @(posedge clk);
      if (gap) n_gap++; else en_cnt++;
      cyc++;
    end
    tx_en <= 1'b0;
    @(posedge clk);
    flush = 1'b1;
    while (n_rx < (nsym + 5) * N) @(posedge clk);
    flush = 1'b0;
    feeding = 1'b0;
    repeat (40) @(posedge clk);
  endtask

  initial begin
    cycle = 0;
    tx_en = 1'b0; tx_bit = 1'b0; feeding = 1'b0; pre_zeros = 0; run_b = 1'b0;
    flush = 1'b0;
    for (int n = 0; n < N; n++) begin
      real ph;
      ph = 2.0 * PI * (real'(F_START_HZ) / real'(FS_HZ) * real'(n)
                       + (real'(BW_HZ) / real'(FS_HZ)) / (2.0 * real'(N - 1)) * real'(n) * real'(n));
      c_re[n] = $cos(ph);
      c_im[n] = $sin(ph);
    end
  end

  initial begin
    #1;
    // ---------------- run A: aligned, 20 symbols ----------------
    do_reset();
    for (int s = 0; s < NSYM_A; s++) sym_bits[s] = (s % 5 == 4) ? sym_bits[s-1] : (s % 2);
    for (int s = 0; s < NSYM_A; s++) begin frame_bit[s] = sym_bits[s]; frame_ofs[s] = 0; end
    send(NSYM_A, 1'b0);
    checks++;
    if (dec_frame < NSYM_A + 2) begin
      failures++; $display("run A: only %0d decisions", dec_frame);
    end
    // ---------------- run B: offset frames, gaps ----------------
    run_b = 1'b1;
    do_reset();
    for (int s = 0; s < NSYM_B; s++) sym_bits[s] = (s < NSYM_B / 2) ? 1 : 0;
    // Frame f holds the tail of symbol f-1 and the head of symbol f; only
    // frames whose two parts carry the same symbol are checked.
    frame_bit[0] = -1;
    for (int f = 1; f < NSYM_B; f++) begin
      frame_bit[f] = (sym_bits[f] == sym_bits[f-1]) ? sym_bits[f] : -1;
      frame_ofs[f] = D_OFS;
    end
    for (int f = NSYM_B; f < 64; f++) frame_bit[f] = (f == NSYM_B) ? -1 : -2;
    pre_zeros = D_OFS;
    send(NSYM_B, 1'b1);
    checks++;
    if (dec_frame < NSYM_B + 2) begin
      failures++; $display("run B: only %0d decisions", dec_frame);
    end
    // ---------------- mechanisms ----------------
    $display("up=%0d down=%0d offset=%0d gaps=%0d nosym=%0d", n_up, n_dn, n_offset, n_gap, n_nosym);
    checks += 5;
    if (n_up == 0) failures++;
    if (n_dn == 0) failures++;
    if (n_offset == 0) failures++;
    if (n_gap == 0) failures++;
    if (n_nosym == 0) failures++;
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
