// tb_corr_peak_detect: checks the per-frame peak search at N = 16.
// Frames of random complex 40-bit samples arrive in bit-reversed index
// order, with gaps. The expected peak energy is computed here as
// (re>>>16)^2 + (im>>>16)^2 and the peak index is the first sample in
// arrival order holding the maximum; frames with deliberate ties are
// included. The result must appear one clock after the frame's last sample.
module tb_corr_peak_detect;
  localparam int N = 16, AW = 4, W = 40, MS = 16, MAG_W = 48;
  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0, in_last = 1'b0;
  logic [AW-1:0] in_idx = '0;
  logic signed [W-1:0] in_re = '0, in_im = '0;
  logic peak_valid;
  logic [MAG_W-1:0] peak_mag;
  logic [AW-1:0] peak_idx;
  int checks = 0, failures = 0;
  longint exp_mag;
  int exp_idx;
  bit pending = 0;
  int n_tie = 0;

  corr_peak_detect #(.N(N), .W(W), .MAG_SHIFT(MS)) dut (.*);
  always #5 clk = ~clk;

  always @(posedge clk) begin
    if (rst_n && peak_valid) begin
      checks++;
      if (!pending || longint'(peak_mag) != exp_mag || int'(peak_idx) != exp_idx) begin
        failures++;
        $display("peak %0d@%0d, want %0d@%0d", peak_mag, peak_idx, exp_mag, exp_idx);
      end
      pending = 0;
    end
  end

  initial begin
    longint r, i, m;
    int idx;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int f = 0; f < 40; f++) begin
      exp_mag = -1;
      for (int p = 0; p < N; p++) begin
        if ($urandom_range(3) == 0) begin
          in_valid <= 1'b0;
          @(posedge clk);
        end
        idx = int'(mf_pkg::bit_reverse(p, AW));
        r = longint'($signed(W'({$urandom, $urandom}))) >>> ($urandom_range(12));
        i = longint'($signed(W'({$urandom, $urandom}))) >>> ($urandom_range(12));
        if (f % 4 == 1) begin r = 65536 * 5; i = -65536 * 3; end   // all tied
        m = (r >>> MS) * (r >>> MS) + (i >>> MS) * (i >>> MS);
        if (m > exp_mag) begin exp_mag = m; exp_idx = idx; end
        in_valid <= 1'b1;
        in_idx <= AW'(idx);
        in_last <= (p == N - 1);
        in_re <= r;
        in_im <= i;
        @(posedge clk);
      end
      pending = 1;
      in_valid <= 1'b0;
      in_last <= 1'b0;
      @(posedge clk);
      #1;
      checks++;
      if (pending) begin
        failures++; $display("frame %0d: no result one clock after the last sample", f);
        pending = 0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
