// tb_bok_chirp_gen: checks the memory-based BOK chirp generator at the
// default size (1024 samples, 12 bits). Random bits are offered; each
// output sample must equal round(2047*cos/sin(2*pi*phi(n))) computed here,
// with phi the chirp phase, n the sample position for bit 1 and
// (1024-n) mod 1024 for bit 0. bit_take must pulse once per symbol, at its
// first enabled cycle, and out_sof must mark the first sample. 'en' has
// random gaps; out_valid must follow 'en' by one clock.
module tb_bok_chirp_gen;
  import mf_pkg::*;
  localparam int N = N_POINTS;
  localparam int NSYM = 12;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0, bit_in = 1'b0;
  logic bit_take, out_valid, out_sof;
  logic signed [11:0] out_i, out_q;
  int checks = 0, failures = 0;
  int ref_i [N], ref_q [N];
  int bits [NSYM];
  int n_out = 0, n_take = 0;
  bit en_q = 1'b0;

  bok_chirp_gen dut (.*);
  always #5 clk = ~clk;

  function automatic int rnd(input real x);
    return (x >= 0.0) ? int'($floor(x + 0.5)) : -int'($floor(-x + 0.5));
  endfunction

  always @(posedge clk) begin
    en_q <= en;
    if (rst_n && out_valid != en_q) begin
      checks++; failures++; $display("out_valid does not follow en");
    end
    if (rst_n && out_valid) begin
      int s, p, j;
      s = n_out / N; p = n_out % N;
      j = (bits[s] != 0) ? p : (N - p) % N;
      checks++;
      if (int'(out_i) != ref_i[j] || int'(out_q) != ref_q[j] || out_sof != (p == 0)) begin
        failures++;
        if (failures < 10) $display("sym %0d pos %0d: (%0d,%0d) want (%0d,%0d)", s, p,
                                    out_i, out_q, ref_i[j], ref_q[j]);
      end
      n_out++;
    end
  end

  initial begin
    real ph;
    int cnt;
    for (int n = 0; n < N; n++) begin
      ph = 2.0 * PI * (real'(F_START_HZ) / real'(FS_HZ) * real'(n)
                       + real'(BW_HZ) / real'(FS_HZ) / (2.0 * real'(N - 1)) * real'(n) * real'(n));
      ref_i[n] = rnd(2047.0 * $cos(ph));
      ref_q[n] = rnd(2047.0 * $sin(ph));
    end
    for (int s = 0; s < NSYM; s++) bits[s] = int'($urandom_range(1));
    bits[0] = 1; bits[1] = 0;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    cnt = 0;
    while (cnt < NSYM * N) begin
      en <= ($urandom_range(7) != 0);
      bit_in <= 1'(bits[cnt / N]);
      @(negedge clk);
      if (en) begin
        checks++;
        if (bit_take != (cnt % N == 0)) begin
          failures++; $display("bit_take wrong at sample %0d", cnt);
        end
        if (bit_take) n_take++;
        cnt++;
      end
      @(posedge clk);
    end
    en <= 1'b0;
    repeat (4) @(posedge clk);
    checks++;
    if (n_out != NSYM * N || n_take != NSYM) begin
      failures++; $display("samples %0d takes %0d", n_out, n_take);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
