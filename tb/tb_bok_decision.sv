// tb_bok_decision: checks the BOK symbol decision with random peak pairs:
// bit = 1 when the up-chirp peak is larger, the winner's index and energy
// are passed on, 'detect' is set when the winning energy is above MIN_MAG
// (set to 1000 here), and the result follows the inputs by one clock.
module tb_bok_decision;
  localparam int MAG_W = 48, AW = 10;
  logic clk = 1'b0, rst_n = 1'b0;
  logic up_valid = 1'b0, dn_valid = 1'b0;
  logic [MAG_W-1:0] up_mag = '0, dn_mag = '0;
  logic [AW-1:0] up_idx = '0, dn_idx = '0;
  logic sym_valid, sym_bit, sym_detect;
  logic [AW-1:0] sym_offset;
  logic [MAG_W-1:0] sym_mag;
  int checks = 0, failures = 0;

  bok_decision #(.MAG_W(MAG_W), .AW(AW), .MIN_MAG(48'd1000)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    longint u, d;
    int ui, di;
    bit eb;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int t = 0; t < 300; t++) begin
      u = longint'($urandom_range(3000));
      d = longint'($urandom_range(3000));
      if (t % 10 == 0) d = u;              // tie goes to the down-chirp
      ui = int'($urandom_range(1023)); di = int'($urandom_range(1023));
      up_valid <= 1'b1; dn_valid <= 1'b1;
      up_mag <= MAG_W'(u); dn_mag <= MAG_W'(d);
      up_idx <= AW'(ui); dn_idx <= AW'(di);
      @(posedge clk);
      up_valid <= 1'b0; dn_valid <= 1'b0;
      @(negedge clk);
      eb = (u > d);
      checks++;
      if (!sym_valid || sym_bit != eb || int'(sym_offset) != (eb ? ui : di) ||
          longint'(sym_mag) != (eb ? u : d) || sym_detect != ((eb ? u : d) > 1000)) begin
        failures++;
        $display("u=%0d d=%0d: bit %0d ofs %0d mag %0d det %0d", u, d, sym_bit, sym_offset,
                 sym_mag, sym_detect);
      end
      @(posedge clk);
      #1;
      checks++;
      if (sym_valid) begin failures++; $display("sym_valid longer than one clock"); end
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
