// tb_spectral_mult: checks the spectral products at N = 16.
// Random 24-bit bins are streamed in natural order, frame after frame,
// with random gaps. For bin k the expected outputs are
//   round((U * C_up[k]) / 2^SHIFT) and round((U * C_up[(N-k) mod N]) / 2^SHIFT),
// computed here in 64-bit integers from the reference table (read through
// the hierarchy, since its contents are tested on their own). Index, last
// flag and the two-clock latency are checked as well.
module tb_spectral_mult;
  localparam int N = 16, AW = 4, U_W = 24, C_W = 16, P_W = 40, SHIFT = 10;
  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0, in_last = 1'b0;
  logic [AW-1:0] in_idx = '0;
  logic signed [U_W-1:0] u_re = '0, u_im = '0;
  logic out_valid, out_last;
  logic [AW-1:0] out_idx;
  logic signed [P_W-1:0] up_re, up_im, dn_re, dn_im;
  int checks = 0, failures = 0;

  spectral_mult #(.N(N), .U_W(U_W), .C_W(C_W), .P_W(P_W), .SHIFT(SHIFT)) dut (.*);
  always #5 clk = ~clk;

  // expected-value queue
  longint q_ur [$], q_ui [$], q_dr [$], q_di [$];
  int     q_k [$];
  int     q_t [$];
  int     cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  function automatic longint rnd(input longint p);
    return (p + (longint'(1) <<< (SHIFT - 1))) >>> SHIFT;
  endfunction

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      longint er, ei, fr, fi;
      int k, t;
      checks++;
      if (q_k.size() == 0) begin
        failures++; $display("unexpected output");
      end else begin
        er = q_ur.pop_front(); ei = q_ui.pop_front();
        fr = q_dr.pop_front(); fi = q_di.pop_front();
        k = q_k.pop_front(); t = q_t.pop_front();
        if (longint'(up_re) != er || longint'(up_im) != ei || longint'(dn_re) != fr ||
            longint'(dn_im) != fi || int'(out_idx) != k || out_last != (k == N-1) ||
            cyc - t != 2) begin
          failures++;
          $display("bin %0d: up=(%0d,%0d) want (%0d,%0d) dn=(%0d,%0d) want (%0d,%0d) lat %0d",
                   k, up_re, up_im, er, ei, dn_re, dn_im, fr, fi, cyc - t);
        end
      end
    end
  end

  initial begin
    longint ur, ui, cr, ci, dr, di;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int n = 0; n < 6 * N; n++) begin
      while ($urandom_range(4) == 0) begin
        in_valid <= 1'b0;
        @(posedge clk);
      end
      ur = longint'($signed(U_W'($urandom)));
      ui = longint'($signed(U_W'($urandom)));
      if (n < N) begin ur = (n == 3) ? 1000 : 0; ui = 0; end   // one impulse-like frame
      cr = longint'(dut.u_rom.mem_re[n % N]); ci = longint'(dut.u_rom.mem_im[n % N]);
      dr = longint'(dut.u_rom.mem_re[(N - n % N) % N]); di = longint'(dut.u_rom.mem_im[(N - n % N) % N]);
      q_ur.push_back(rnd(ur * cr - ui * ci));
      q_ui.push_back(rnd(ur * ci + ui * cr));
      q_dr.push_back(rnd(ur * dr - ui * di));
      q_di.push_back(rnd(ur * di + ui * dr));
      q_k.push_back(n % N);
      q_t.push_back(cyc + 1);
      in_valid <= 1'b1;
      in_idx <= AW'(n % N);
      in_last <= (n % N == N - 1);
      u_re <= U_W'(ur);
      u_im <= U_W'(ui);
      @(posedge clk);
    end
    in_valid <= 1'b0;
    repeat (10) @(posedge clk);
    checks++;
    if (q_k.size() != 0) begin
      failures++; $display("%0d outputs missing", q_k.size());
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
