// bok_decision: binary orthogonal keying (BOK) symbol decision.
//
// The two matched-filter branches report, once per frame, the peak energy
// of their correlation with the up-chirp and with the down-chirp. Because
// the cross-correlation of the two chirps is low, the larger peak names the
// transmitted chirp: bit 1 for the up-chirp, bit 0 for the down-chirp, as in
// the original design. The peak position of the winning branch is passed on as the
// symbol timing offset within the frame. A frame whose winning peak is not
// above MIN_MAG (a threshold of this design, 0 by default) is flagged as
// 'no symbol'.
//
// Timing: both inputs must be valid in the same cycle (the branches run in
// lockstep; an assertion checks it). The decision is registered: sym_valid
// pulses one clock after the peaks.
module bok_decision #(
  parameter int MAG_W = 48,
  parameter int AW    = 10,
  parameter logic [MAG_W-1:0] MIN_MAG = '0
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             up_valid,
  input  logic [MAG_W-1:0] up_mag,
  input  logic [AW-1:0]    up_idx,
  input  logic             dn_valid,
  input  logic [MAG_W-1:0] dn_mag,
  input  logic [AW-1:0]    dn_idx,
  output logic             sym_valid,
  output logic             sym_bit,
  output logic             sym_detect,
  output logic [AW-1:0]    sym_offset,
  output logic [MAG_W-1:0] sym_mag
);

  logic is_up;
  assign is_up = (up_mag > dn_mag);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sym_valid  <= 1'b0;
      sym_bit    <= 1'b0;
      sym_detect <= 1'b0;
      sym_offset <= '0;
      sym_mag    <= '0;
    end else begin
      sym_valid <= up_valid;
      if (up_valid) begin
        sym_bit    <= is_up;
        sym_offset <= is_up ? up_idx : dn_idx;
        sym_mag    <= is_up ? up_mag : dn_mag;
        sym_detect <= (is_up ? up_mag : dn_mag) > MIN_MAG;
      end
    end
  end

  a_lockstep: assert property (@(posedge clk) disable iff (!rst_n) up_valid == dn_valid);

endmodule
