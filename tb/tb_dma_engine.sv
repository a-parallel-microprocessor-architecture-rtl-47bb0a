// tb_dma_engine: self-checking test of the DMA block-move circuit.
//
// Around the DMA sit two models written here: main memory on the private
// path (registered read) and a bus target (local memory, registered read).
// The test programs the registers with I/O cycles, checks that nothing
// moves until targets_ready, that hold is up for the whole move, that a
// block of n words streams at one word per clock (n bus cycles on n
// consecutive clocks, busy for n + 1 clocks after the hold wait), and that
// data arrive in order in both directions.
module tb_dma_engine;
  import tf_pkg::*;
  localparam int RAM_AW = 15;

  logic clk = 0, rst_n = 0;
  sbus_req_t req = SBUS_IDLE, mreq;
  sbus_rsp_t rsp;
  logic busy, hold, targets_ready = 0;
  logic [15:0] bus_rdata;
  logic mem_en, mem_we;
  logic [RAM_AW-1:0] mem_addr;
  logic [15:0] mem_wdata, mem_rdata;
  int checks = 0, failures = 0;

  dma_engine #(.RAM_AW(RAM_AW)) dut (.*);
  always #5 clk = ~clk;

  // main memory model (private path)
  logic [15:0] mm [1024];
  always @(posedge clk) begin
    mem_rdata <= mem_en ? mm[mem_addr[9:0]] : 16'h0;
    if (mem_en && mem_we) mm[mem_addr[9:0]] <= mem_wdata;
  end
  // bus target model: local addresses only, byte address / 2
  logic [15:0] lm [1024];
  always @(posedge clk) begin
    bus_rdata <= 16'h0;
    if (mreq.cyc && mreq.mio && mreq.addr[19:18] == 2'b00) begin
      if (mreq.we) lm[mreq.addr[10:1]] <= mreq.wdata;
      else         bus_rdata <= lm[mreq.addr[10:1]];
    end
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic io(input logic we, input logic [7:0] port, input logic [15:0] wd,
                    output logic [15:0] rd);
    int lat;
    @(negedge clk);
    req = '{cyc: 1'b1, we: we, mio: 1'b0, addr: 20'(port), wdata: wd, be: 2'b11};
    lat = 0;
    do begin @(posedge clk); lat++; #1; end while (!rsp.ack && lat < 8);
    check(lat == 1, "register access acknowledged after one clock");
    rd = rsp.rdata;
    @(negedge clk);
    req = SBUS_IDLE;
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int n_cyc, first_cyc, last_cyc, busy_clks, clk_i;
  always @(posedge clk) begin
    clk_i++;
    if (mem_en) busy_clks++;
    if (mreq.cyc) begin
      if (n_cyc == 0) first_cyc = clk_i;
      last_cyc = clk_i;
      n_cyc++;
    end
  end

  task automatic run(input logic dir, input int n, input logic [14:0] ca,
                     input logic [19:0] cb);
    logic [15:0] rd;
    io(1, 8'h40, 16'(ca), rd);
    io(1, 8'h42, cb[15:0], rd);
    io(1, 8'h44, {12'h0, cb[19:16]}, rd);
    io(1, 8'h46, 16'(n), rd);
    n_cyc = 0; busy_clks = 0;
    targets_ready = 0;
    io(1, 8'h48, {14'h0, dir, 1'b1}, rd);
    check(busy && hold, "busy and hold after start");
    repeat (4) @(negedge clk);
    check(n_cyc == 0 && hold, "no transfer before targets are ready");
    io(0, 8'h48, 0, rd);
    check(rd == 16'h0001, "status reads busy");
    targets_ready = 1;
    while (busy) @(negedge clk);
    targets_ready = 0;
    check(!hold, "hold dropped at the end");
    check(n_cyc == n, $sformatf("%0d bus cycles for %0d words", n_cyc, n));
    check(last_cyc - first_cyc == n - 1, "one word per clock, back to back");
    check(busy_clks == n + 1, $sformatf("transfer took %0d clocks for %0d words", busy_clks, n));
  endtask

  logic [15:0] rd;
  initial begin
    for (int i = 0; i < 1024; i++) begin mm[i] = 16'(i * 7 + 3); lm[i] = 16'hFFFF - 16'(i); end
    clk_i = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // main -> local: 16 words from main word 100 to local byte address 0x200
    run(0, 16, 15'd100, 20'h00200);
    for (int i = 0; i < 16; i++)
      check(lm[256 + i] == 16'((100 + i) * 7 + 3), $sformatf("main->local word %0d", i));
    check(lm[255] == 16'hFFFF - 16'd255 && lm[272] == 16'hFFFF - 16'd272, "neighbours untouched");
    io(0, 8'h40, 0, rd);
    check(rd == 16'd116, "main counter advanced by the block length");
    io(0, 8'h42, 0, rd);
    check(rd == 16'h0220, "bus counter advanced by two per word");
    // local -> main: 8 words from local byte 0x000 to main word 500
    run(1, 8, 15'd500, 20'h00000);
    for (int i = 0; i < 8; i++)
      check(mm[500 + i] == 16'hFFFF - 16'(i), $sformatf("local->main word %0d", i));
    check(mm[508] == 16'(508 * 7 + 3), "main neighbour untouched");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
