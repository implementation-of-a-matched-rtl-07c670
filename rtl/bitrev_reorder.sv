// bitrev_reorder: double-buffered reorder memory that turns a stream of
// N-sample frames in bit-reversed order into natural order.
//
// Sample p of an incoming frame (p = 0 .. N-1 in arrival order) is written
// to address bitrev(p) of one bank while the other bank, holding the
// previous frame, is read at address p; the banks swap at each frame
// boundary. The first frame boundary must coincide with the first sample
// seen after reset. The memory is this design's addition: the original design's
// transform core delivers natural order, and an SDF pipeline does not.
//
// Timing: registers move only on in_valid; out_valid is in_valid delayed by
// one clock. Output samples lag the input by one frame (N samples) and are
// flagged as real data (out_valid) only once a whole frame has been stored.
// out_idx is the natural index of the sample on the output.
module bitrev_reorder #(
  parameter int N  = 1024,
  parameter int W  = 24,
  parameter int AW = $clog2(N)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic signed [W-1:0] in_re,
  input  logic signed [W-1:0] in_im,
  output logic                out_valid,
  output logic [AW-1:0]       out_idx,
  output logic signed [W-1:0] out_re,
  output logic signed [W-1:0] out_im
);

  logic signed [W-1:0] mem_re [2*N];
  logic signed [W-1:0] mem_im [2*N];
  logic [AW-1:0] pos;
  logic          bank;
  logic          primed;
  logic [AW-1:0] pos_rev;

  always_comb begin
    for (int b = 0; b < AW; b++) pos_rev[b] = pos[AW-1-b];
  end

  always_ff @(posedge clk) begin
    if (in_valid) begin
      mem_re[{bank, pos_rev}] <= in_re;
      mem_im[{bank, pos_rev}] <= in_im;
      out_re <= mem_re[{~bank, pos}];
      out_im <= mem_im[{~bank, pos}];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pos       <= '0;
      bank      <= 1'b0;
      primed    <= 1'b0;
      out_valid <= 1'b0;
      out_idx   <= '0;
    end else begin
      out_valid <= in_valid && primed;
      if (in_valid) begin
        out_idx <= pos;
        pos     <= pos + 1'b1;
        if (pos == AW'(N - 1)) begin
          bank   <= ~bank;
          primed <= 1'b1;
        end
      end
    end
  end

endmodule
