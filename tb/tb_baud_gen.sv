// tb_baud_gen: self-checking test of the serial clock divider.
//
// For every jumper setting measures the period of baud_clk in processor
// clocks and checks it against the rate table: at CLK = 4.9152 MHz a period
// of 4, 8, 16, 32 clocks is 64 x 19200, 9600, 4800, 2400 baud. Also checks
// PCLK = CLK/2 and one baud_tick per baud_clk period.
module tb_baud_gen;
  logic clk = 0, rst_n = 0, pclk, baud_clk, baud_tick;
  logic [1:0] sel = 0;
  int checks = 0, failures = 0;

  baud_gen dut (.*);
  always #5 clk = ~clk;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Period of baud_clk in clocks, measured between rising edges.
  task automatic measure(output int period, output int ticks);
    logic prev;
    int t0;
    int n;
    n = 0; t0 = -1; period = 0; ticks = 0;
    prev = baud_clk;
    for (int c = 0; c < 200; c++) begin
      @(posedge clk); #1;
      if (baud_tick) ticks++;
      if (baud_clk && !prev) begin
        if (t0 >= 0 && period == 0) period = c - t0;
        if (t0 < 0) t0 = c;
      end
      prev = baud_clk;
    end
  endtask

  int p, tk;
  // baud = CLK / (period * 64), CLK = 4915200 Hz
  int exp_baud [4] = '{19200, 9600, 4800, 2400};
  logic pprev;
  int pchanges;
  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int s = 0; s < 4; s++) begin
      sel = 2'(s);
      measure(p, tk);
      check(p == (4 << s), $sformatf("sel %0d period %0d", s, p));
      check(p > 0 && 4915200 / (p * 64) == exp_baud[s],
            $sformatf("sel %0d gives %0d baud", s, p > 0 ? 4915200 / (p * 64) : 0));
      check(tk >= 200 / p - 1 && tk <= 200 / p + 1, $sformatf("sel %0d ticks %0d", s, tk));
    end
    pchanges = 0;
    pprev = pclk;
    for (int c = 0; c < 20; c++) begin
      @(posedge clk); #1;
      if (pclk != pprev) pchanges++;
      pprev = pclk;
    end
    check(pchanges == 20, "PCLK toggles every clock (CLK/2)");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
