// corr_peak_detect: finds the correlation peak of each N-sample output
// frame of one matched-filter branch.
//
// For every sample it forms the energy |y|^2 = yr^2 + yi^2 of the value
// shifted right by MAG_SHIFT bits (truncation that keeps the squarer small)
// and keeps the largest energy of the frame and the time index at which it
// occurred (first occurrence wins on a tie). Samples may arrive in any
// order; in_idx gives each one's time index and in_last closes the frame.
// The original design description only states that the correlation of each reference is
// computed and a decision taken from it; the energy measure and the peak
// search are this design's choice.
//
// Timing: one sample per in_valid. One clock after the in_last sample the
// result appears on peak_* with peak_valid high for one clock.
module corr_peak_detect #(
  parameter int N         = mf_pkg::N_POINTS,
  parameter int W         = 40,
  parameter int MAG_SHIFT = 16,
  parameter int AW        = $clog2(N),
  parameter int MAG_W     = 2 * (W - MAG_SHIFT)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic [AW-1:0]       in_idx,
  input  logic                in_last,
  input  logic signed [W-1:0] in_re,
  input  logic signed [W-1:0] in_im,
  output logic                peak_valid,
  output logic [MAG_W-1:0]    peak_mag,
  output logic [AW-1:0]       peak_idx
);

  localparam int SW = W - MAG_SHIFT;

  logic signed [SW-1:0] sr, si;
  logic [MAG_W-1:0]     mag;
  logic [MAG_W-1:0]     best;
  logic [AW-1:0]        best_idx;
  logic                 first;     // next sample opens a new frame
  logic                 take;

  always_comb begin
    sr   = SW'(in_re >>> MAG_SHIFT);
    si   = SW'(in_im >>> MAG_SHIFT);
    mag  = MAG_W'(sr * sr) + MAG_W'(si * si);
    take = first || (mag > best);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      best       <= '0;
      best_idx   <= '0;
      first      <= 1'b1;
      peak_valid <= 1'b0;
      peak_mag   <= '0;
      peak_idx   <= '0;
    end else begin
      peak_valid <= 1'b0;
      if (in_valid) begin
        if (take) begin
          best     <= mag;
          best_idx <= in_idx;
        end
        first <= in_last;
        if (in_last) begin
          peak_valid <= 1'b1;
          peak_mag   <= take ? mag : best;
          peak_idx   <= take ? in_idx : best_idx;
        end
      end
    end
  end

endmodule
