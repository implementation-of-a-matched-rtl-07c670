// tb_ref_addr_counters: checks the up/down read counters against a model.
// N = 16: after reset both are 0; with 'en' the up-counter walks 0..15 and
// wraps, the down-counter walks 0,15,14,..,1; 'last' is high at 15; 'en'
// low holds both; 'clr' returns both to 0. Random enable pattern.
module tb_ref_addr_counters;
  localparam int N = 16;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0, clr = 1'b0;
  logic [3:0] up_addr, dn_addr;
  logic last;
  int checks = 0, failures = 0;
  int m_up = 0;

  ref_addr_counters #(.N(N)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    for (int c = 0; c < 400; c++) begin
      @(negedge clk);
      checks++;
      if (int'(up_addr) != m_up || int'(dn_addr) != (N - m_up) % N || last != (m_up == N - 1)) begin
        failures++;
        $display("cycle %0d: up=%0d dn=%0d last=%0d, model up=%0d", c, up_addr, dn_addr, last, m_up);
      end
      en  = ($urandom_range(3) != 0);
      clr = (c == 200) || (c == 333);
      @(posedge clk);
      if (clr) m_up = 0;
      else if (en) m_up = (m_up + 1) % N;
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
