// spectral_mult: multiplies the spectrum of the received frame by the
// stored reference spectra of both chirps, the frequency-domain half of the
// fast correlation Y = IFFT(FFT(u) * conj(FFT(s))).
//
// For each input bin k it forms
//   P_up[k] = U[k] * conj(S_up[k])   and   P_dn[k] = U[k] * conj(S_dn[k]).
// The reference spectra come from one dual-port memory (ref_spectrum_rom)
// read through two synchronous counters of modulus N (ref_addr_counters):
// the up-counter reads conj(S_up[k]); the down-counter reads the same table
// backwards modulo N, which is conj(S_dn[k]). This read scheme follows the
// document. Both products are rounded and shifted right by SHIFT bits
// (this design's scaling) into P_W-bit outputs.
//
// Interface: one bin per in_valid, bins in natural order starting at 0 after
// reset (in_idx must equal the up-counter; an assertion checks it). Timing:
// two register stages; outputs follow the input by two clocks, with index
// and last-bin flag carried along.
module spectral_mult #(
  parameter int N     = mf_pkg::N_POINTS,
  parameter int U_W   = 24,
  parameter int C_W   = 16,
  parameter int P_W   = 40,
  parameter int SHIFT = 10,
  parameter int AW    = $clog2(N)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  in_valid,
  input  logic [AW-1:0]         in_idx,
  input  logic                  in_last,
  input  logic signed [U_W-1:0] u_re,
  input  logic signed [U_W-1:0] u_im,
  output logic                  out_valid,
  output logic [AW-1:0]         out_idx,
  output logic                  out_last,
  output logic signed [P_W-1:0] up_re,
  output logic signed [P_W-1:0] up_im,
  output logic signed [P_W-1:0] dn_re,
  output logic signed [P_W-1:0] dn_im
);

  localparam int PROD_W = U_W + C_W + 1;

  logic [AW-1:0] a_up, a_dn;
  logic          a_last;

  ref_addr_counters #(.N(N)) u_cnt (
    .clk(clk), .rst_n(rst_n), .en(in_valid), .clr(1'b0),
    .up_addr(a_up), .dn_addr(a_dn), .last(a_last)
  );

  logic signed [C_W-1:0] cu_re, cu_im, cd_re, cd_im;

  ref_spectrum_rom #(.N(N), .C_W(C_W)) u_rom (
    .clk(clk), .en(in_valid), .addr_a(a_up), .addr_b(a_dn),
    .qa_re(cu_re), .qa_im(cu_im), .qb_re(cd_re), .qb_im(cd_im)
  );

  // Stage 1: hold the bin while the memory is read.
  logic                  v1, last1;
  logic [AW-1:0]         idx1;
  logic signed [U_W-1:0] u1_re, u1_im;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1 <= 1'b0; last1 <= 1'b0; idx1 <= '0; u1_re <= '0; u1_im <= '0;
    end else begin
      v1 <= in_valid;
      if (in_valid) begin
        last1 <= in_last;
        idx1  <= in_idx;
        u1_re <= u_re;
        u1_im <= u_im;
      end
    end
  end

  // Stage 2: complex products, rounded and scaled.
  function automatic logic signed [P_W-1:0] scale_round(input logic signed [PROD_W-1:0] p);
    logic signed [PROD_W-1:0] r;
    r = p + (PROD_W)'(SHIFT > 0 ? (1 <<< (SHIFT - 1)) : 0);
    return P_W'(r >>> SHIFT);
  endfunction

  logic signed [PROD_W-1:0] pu_re, pu_im, pd_re, pd_im;

  always_comb begin
    pu_re = PROD_W'(u1_re) * PROD_W'(cu_re) - PROD_W'(u1_im) * PROD_W'(cu_im);
    pu_im = PROD_W'(u1_re) * PROD_W'(cu_im) + PROD_W'(u1_im) * PROD_W'(cu_re);
    pd_re = PROD_W'(u1_re) * PROD_W'(cd_re) - PROD_W'(u1_im) * PROD_W'(cd_im);
    pd_im = PROD_W'(u1_re) * PROD_W'(cd_im) + PROD_W'(u1_im) * PROD_W'(cd_re);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0; out_last <= 1'b0; out_idx <= '0;
      up_re <= '0; up_im <= '0; dn_re <= '0; dn_im <= '0;
    end else begin
      out_valid <= v1;
      if (v1) begin
        out_last <= last1;
        out_idx  <= idx1;
        up_re    <= scale_round(pu_re);
        up_im    <= scale_round(pu_im);
        dn_re    <= scale_round(pd_re);
        dn_im    <= scale_round(pd_im);
      end
    end
  end

  // The bin stream and the reference read counters must stay in step.
  a_aligned: assert property (@(posedge clk) disable iff (!rst_n)
                              in_valid |-> (in_idx == a_up && in_last == a_last));

endmodule
