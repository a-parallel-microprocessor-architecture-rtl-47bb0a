// tb_bus_arbiter: self-checking test of the fixed-priority bus arbiter.
//
// Directed checks: one-clock grant latency, lowest line wins, a grant is
// kept while its owner requests even when a higher-priority request comes,
// release hands over on the next edge and fires a token pulse exactly
// TOKEN_CYCLES long, boot override grants line 0 only, real mode drives the
// grants from the software byte. Then 2000 random clocks against a
// reference model written here.
module tb_bus_arbiter;
  localparam int N = 8;
  localparam int TC = 3;

  logic         clk = 0, rst_n = 0;
  logic [N-1:0] brq = '0, grant_data = '0, bg;
  logic         boot = 0, real_mode = 0, grant_wr = 0, token, owner_valid;
  logic [2:0]   owner;
  int checks = 0, failures = 0;

  bus_arbiter #(.N(N), .TOKEN_CYCLES(TC)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference model
  logic [N-1:0] ref_g;
  int           ref_tok;
  function automatic logic [N-1:0] pick(input logic [N-1:0] r);
    for (int i = 0; i < N; i++) if (r[i]) return N'(1) << i;
    return '0;
  endfunction

  int tok_len;
  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(bg == 0, "no request, no grant");
    brq = 8'b0110;
    @(negedge clk);
    check(bg == 8'b0010, "line 1 wins over line 2 after one clock");
    brq = 8'b0111;
    @(negedge clk);
    check(bg == 8'b0010, "grant held against higher priority request");
    repeat (3) @(negedge clk);
    check(bg == 8'b0010 && !token, "still held, no token");
    brq = 8'b0101;
    @(negedge clk);
    check(bg == 8'b0001, "release hands bus to line 0");
    tok_len = 0;
    while (token) begin tok_len++; @(negedge clk); end
    check(tok_len == TC, $sformatf("token pulse %0d clocks", tok_len));
    brq = 8'b0100;
    @(negedge clk);
    check(bg == 8'b0100, "then line 2");
    brq = 0;
    @(negedge clk);
    check(bg == 0 && token, "all released, token");
    // boot override
    boot = 1;
    brq  = 8'b1000_0100;
    @(negedge clk);
    check(bg == 8'b0000_0001, "boot grants line 0 only");
    grant_data = 8'h0F; grant_wr = 1;
    @(negedge clk);
    grant_wr = 0;
    check(bg == 8'b0000_0001, "software byte ignored without real");
    real_mode = 1;
    #1;
    check(bg == 8'h0F, "real mode: software byte drives all grants");
    real_mode = 0; boot = 0; brq = 0;
    repeat (2) @(negedge clk);
    check(bg == 0, "back to normal arbitration");
    // random against reference
    ref_g = '0; ref_tok = 0;
    @(posedge clk);
    for (int k = 0; k < 2000; k++) begin
      brq = N'($urandom) & N'($urandom);
      @(posedge clk);
      // model the edge
      if (ref_tok > 0) ref_tok--;
      if (ref_g != 0 && (ref_g & brq) == 0) ref_tok = TC;
      if ((ref_g & brq) == 0) ref_g = pick(brq);
      #1;
      check(bg == ref_g, "random: grant matches model");
      check(token == (ref_tok > 0), "random: token matches model");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
