// tb_ref_spectrum_rom: checks the stored reference spectra at the default
// size (1024 points). The expected values are a direct DFT, computed here,
// of an up-chirp and of a separately built down-chirp
// s_dn[n] = s_up[(N-n) mod N]; both are conjugated and scaled by the
// largest up-chirp component. Port A read at k must give conj(S_up[k]) and
// port B read at (N-k) mod N must give conj(S_dn[k]), within 1 LSB.
// Also checks that the read is synchronous and holds while 'en' is low.
module tb_ref_spectrum_rom;
  import mf_pkg::*;
  localparam int N = N_POINTS;
  localparam int C_W = 16;
  logic clk = 1'b0, en = 1'b0;
  logic [9:0] addr_a = '0, addr_b = '0;
  logic signed [C_W-1:0] qa_re, qa_im, qb_re, qb_im;
  int checks = 0, failures = 0;
  real su_re [N], su_im [N], sd_re [N], sd_im [N];
  real Su_re [N], Su_im [N], Sd_re [N], Sd_im [N];
  real peak, sc;

  ref_spectrum_rom dut (.*);
  always #5 clk = ~clk;

  function automatic real absr(input real v);
    return (v < 0.0) ? -v : v;
  endfunction

  initial begin
    real ph, a;
    for (int n = 0; n < N; n++) begin
      ph = 2.0 * PI * (real'(F_START_HZ) / real'(FS_HZ) * real'(n)
                       + real'(BW_HZ) / real'(FS_HZ) / (2.0 * real'(N - 1)) * real'(n) * real'(n));
      su_re[n] = $cos(ph); su_im[n] = $sin(ph);
    end
    for (int n = 0; n < N; n++) begin
      sd_re[n] = su_re[(N - n) % N]; sd_im[n] = su_im[(N - n) % N];
    end
    peak = 0.0;
    for (int k = 0; k < N; k++) begin
      Su_re[k] = 0.0; Su_im[k] = 0.0; Sd_re[k] = 0.0; Sd_im[k] = 0.0;
      for (int n = 0; n < N; n++) begin
        a = -2.0 * PI * real'((k * n) % N) / real'(N);
        Su_re[k] += su_re[n] * $cos(a) - su_im[n] * $sin(a);
        Su_im[k] += su_re[n] * $sin(a) + su_im[n] * $cos(a);
        Sd_re[k] += sd_re[n] * $cos(a) - sd_im[n] * $sin(a);
        Sd_im[k] += sd_re[n] * $sin(a) + sd_im[n] * $cos(a);
      end
      if (absr(Su_re[k]) > peak) peak = absr(Su_re[k]);
      if (absr(Su_im[k]) > peak) peak = absr(Su_im[k]);
    end
    sc = 32767.0 / peak;
    @(posedge clk);
    for (int k = 0; k < N; k++) begin
      addr_a <= 10'(k);
      addr_b <= 10'((N - k) % N);
      en <= 1'b1;
      @(posedge clk);
      en <= 1'b0;
      addr_a <= 10'($urandom);
      addr_b <= 10'($urandom);
      @(posedge clk);   // data must hold while en is low
      #1;
      checks++;
      if (absr(real'(qa_re) - Su_re[k] * sc) > 1.0 || absr(real'(qa_im) + Su_im[k] * sc) > 1.0 ||
          absr(real'(qb_re) - Sd_re[k] * sc) > 1.0 || absr(real'(qb_im) + Sd_im[k] * sc) > 1.0) begin
        failures++;
        if (failures < 10)
          $display("k=%0d: A=(%0d,%0d) want (%f,%f)  B=(%0d,%0d) want (%f,%f)", k, qa_re, qa_im,
                   Su_re[k]*sc, -Su_im[k]*sc, qb_re, qb_im, Sd_re[k]*sc, -Sd_im[k]*sc);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
