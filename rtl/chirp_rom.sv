// chirp_rom: dual-port memory holding the complex samples of one up-chirp,
// the table of the memory-based chirp generator.
//
// Entry n holds round(AMP*cos(2*pi*phi(n))) and round(AMP*sin(2*pi*phi(n)))
// with the chirp phase phi of mf_pkg (1 MHz to 26 MHz in 1024 samples at
// 61.44 MHz by default), both OUT_W bits wide. Two read ports work in the
// same cycle at different addresses: addressed by an up-counter and a
// down-counter (modulo N) they play the up-chirp and the down-chirp at once.
// Storing the samples and reading them with counters follows the original design;
// the amplitude is this design's choice (full 12-bit scale).
//
// Timing: synchronous read; data appear on q_* after the clock edge of an
// enabled cycle and hold while 'en' is low.
module chirp_rom #(
  parameter int     N          = mf_pkg::N_POINTS,
  parameter int     OUT_W      = mf_pkg::SAMPLE_W,
  parameter int     AMP        = (1 << (OUT_W - 1)) - 1,
  parameter longint F_START_HZ = mf_pkg::F_START_HZ,
  parameter longint BW_HZ      = mf_pkg::BW_HZ,
  parameter longint FS_HZ      = mf_pkg::FS_HZ,
  parameter int     AW         = $clog2(N)
) (
  input  logic                    clk,
  input  logic                    en,
  input  logic [AW-1:0]           addr_a,
  input  logic [AW-1:0]           addr_b,
  output logic signed [OUT_W-1:0] qa_i,
  output logic signed [OUT_W-1:0] qa_q,
  output logic signed [OUT_W-1:0] qb_i,
  output logic signed [OUT_W-1:0] qb_q
);

  logic signed [OUT_W-1:0] mem_i [N];
  logic signed [OUT_W-1:0] mem_q [N];

  initial begin : init_table
    longint c, sn;
    for (int n = 0; n < N; n++) begin
      mf_pkg::sincos(mf_pkg::chirp_phase(n, N, F_START_HZ, BW_HZ, FS_HZ), c, sn);
      mem_i[n] = OUT_W'(mf_pkg::round_shift(longint'(AMP) * c, mf_pkg::TRIG_FRAC));
      mem_q[n] = OUT_W'(mf_pkg::round_shift(longint'(AMP) * sn, mf_pkg::TRIG_FRAC));
    end
  end

  always_ff @(posedge clk) begin
    if (en) begin
      qa_i <= mem_i[addr_a];
      qa_q <= mem_q[addr_a];
      qb_i <= mem_i[addr_b];
      qb_q <= mem_q[addr_b];
    end
  end

endmodule
