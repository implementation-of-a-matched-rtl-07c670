// bok_chirp_gen: memory-based chirp generator with binary orthogonal keying
// (BOK) modulation.
//
// Each data bit becomes one N-sample chirp: bit 1 an up-chirp, bit 0 a
// down-chirp. One dual-port table (chirp_rom) holds the up-chirp; an
// up-counter and a down-counter of the same modulus (ref_addr_counters)
// read it forwards and backwards in the same cycle, and the bit selects
// which port drives the output. Switching between the two chirps at a
// symbol boundary is therefore only a multiplexer setting. This scheme is
// the memory-based generator and counter read control of the original design; the
// handshake is this design's own.
//
// Interface: while 'en' is high one complex sample is produced per clock.
// At the first sample of each symbol (counter at 0) bit_in is taken and
// bit_take pulses in that cycle. Timing: out_i/out_q/out_sof follow the
// enabled cycle by one clock (synchronous table read), with out_valid high;
// out_sof marks the first sample of a symbol.
module bok_chirp_gen #(
  parameter int N     = mf_pkg::N_POINTS,
  parameter int OUT_W = mf_pkg::SAMPLE_W,
  parameter int AW    = $clog2(N)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    en,
  input  logic                    bit_in,
  output logic                    bit_take,
  output logic                    out_valid,
  output logic                    out_sof,
  output logic signed [OUT_W-1:0] out_i,
  output logic signed [OUT_W-1:0] out_q
);

  logic [AW-1:0] a_up, a_dn;
  logic          a_last;
  logic          sym_bit, cur_bit, sel_up, sof_q;
  logic signed [OUT_W-1:0] up_i, up_q, dn_i, dn_q;

  ref_addr_counters #(.N(N)) u_cnt (
    .clk(clk), .rst_n(rst_n), .en(en), .clr(1'b0),
    .up_addr(a_up), .dn_addr(a_dn), .last(a_last)
  );

  chirp_rom #(.N(N), .OUT_W(OUT_W)) u_rom (
    .clk(clk), .en(en), .addr_a(a_up), .addr_b(a_dn),
    .qa_i(up_i), .qa_q(up_q), .qb_i(dn_i), .qb_q(dn_q)
  );

  assign bit_take = en && (a_up == '0);
  assign cur_bit  = (a_up == '0) ? bit_in : sym_bit;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sym_bit   <= 1'b0;
      sel_up    <= 1'b0;
      sof_q     <= 1'b0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= en;
      if (en) begin
        sym_bit <= cur_bit;
        sel_up  <= cur_bit;
        sof_q   <= (a_up == '0);
      end
    end
  end

  assign out_sof = sof_q;
  assign out_i   = sel_up ? up_i : dn_i;
  assign out_q   = sel_up ? up_q : dn_q;

  // Unused: the symbol end is implied by the counter wrapping to 0.
  logic unused;
  assign unused = a_last;

endmodule
