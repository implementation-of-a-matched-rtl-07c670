// ref_addr_counters: read control of the dual-port chirp and reference
// memories.
//
// Two synchronous counters with the same modulus N advance together on every
// enabled cycle. The up-counter gives 0, 1, 2, .., N-1; the down-counter gives
// 0, N-1, N-2, .., 1, i.e. (N - up) mod N. Port A of a dual-port memory
// addressed by the up-counter plays the stored table forwards (up-chirp);
// port B addressed by the down-counter plays it backwards modulo N, which
// yields the down-chirp, or the down-chirp's spectrum when the table holds a
// spectrum. Using two counters of one modulus follows the original design; starting
// the down-counter at 0 (so the reversal is modulo N) is this design's
// choice, because it makes the reversed spectrum exactly that of the
// reversed chirp.
//
// Interface: 'en' advances both counters, 'clr' (synchronous, has priority)
// returns both to 0. 'last' is high while the up-counter holds N-1, the final
// address of a symbol. Addresses are registers: they change on the clock
// edge after an enabled cycle.
module ref_addr_counters #(
  parameter int N  = 1024,
  parameter int AW = $clog2(N)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          en,
  input  logic          clr,
  output logic [AW-1:0] up_addr,
  output logic [AW-1:0] dn_addr,
  output logic          last
);

  localparam logic [AW-1:0] TOP = AW'(N - 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      up_addr <= '0;
      dn_addr <= '0;
    end else if (clr) begin
      up_addr <= '0;
      dn_addr <= '0;
    end else if (en) begin
      up_addr <= (up_addr == TOP) ? '0 : up_addr + 1'b1;
      dn_addr <= (dn_addr == '0) ? TOP : dn_addr - 1'b1;
    end
  end

  assign last = (up_addr == TOP);

  // The two counters always stay mirror images of each other.
  property p_mirror;
    @(posedge clk) disable iff (!rst_n) (AW'(up_addr + dn_addr) == '0);
  endproperty
  a_mirror: assert property (p_mirror);

endmodule
