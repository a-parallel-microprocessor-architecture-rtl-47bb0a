// tb_main_memory: self-checking test of the main memory board.
//
// Checks byte-lane writes (A0/BHE banks), read-back with one-clock
// acknowledge, RAM repeating every 64 KiB, ROM contents at the top of the
// address space and its refusal of writes, no answer to local-memory
// addresses or I/O cycles, and the DMA path (which also silences the bus
// side). Random writes and reads are compared with a model kept here.
module tb_main_memory;
  import tf_pkg::*;

  logic clk = 0, rst_n = 0;
  sbus_req_t req = SBUS_IDLE;
  sbus_rsp_t rsp;
  logic dma_en = 0, dma_we = 0;
  logic [14:0] dma_addr = '0;
  logic [15:0] dma_wdata = '0, dma_rdata;
  int checks = 0, failures = 0;

  main_memory #(.ROM_INIT("tb/tb_main_memory_rom.hex")) dut (.*);
  always #5 clk = ~clk;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic cyc(input logic we, input logic mio, input logic [19:0] a,
                     input logic [15:0] wd, input logic [1:0] be,
                     output logic [15:0] rd, output int lat);
    @(negedge clk);
    req = '{cyc: 1'b1, we: we, mio: mio, addr: a, wdata: wd, be: be};
    lat = 0;
    do begin @(posedge clk); lat++; #1; end while (!rsp.ack && lat < 8);
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

  logic [15:0] rd, model [logic [14:0]];
  int lat;
  logic [14:0] wa;
  logic [15:0] wd;
  logic [1:0]  be;
  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    cyc(1, 1, 20'h40010, 16'h1234, 2'b11, rd, lat);
    check(lat == 1, "write acknowledged after one clock");
    cyc(0, 1, 20'h40010, 0, 2'b11, rd, lat);
    check(rd == 16'h1234 && lat == 1, "read back");
    cyc(1, 1, 20'h40010, 16'hAB00, 2'b10, rd, lat);   // odd byte only
    cyc(0, 1, 20'h40010, 0, 2'b11, rd, lat);
    check(rd == 16'hAB34, "BHE writes the odd bank only");
    cyc(1, 1, 20'h40010, 16'h00CD, 2'b01, rd, lat);   // even byte only
    cyc(0, 1, 20'h50010, 0, 2'b11, rd, lat);
    check(rd == 16'hABCD, "A0 writes the even bank; RAM repeats every 64 KiB");
    cyc(0, 1, 20'hF0000, 0, 2'b11, rd, lat);
    check(rd == 16'hA5C3, "ROM word 0");
    cyc(0, 1, 20'hFE00A, 0, 2'b11, rd, lat);
    check(rd == (16'h5555 ^ 16'hA5C3), "ROM word 5 (repeats every 8 KiB)");
    cyc(1, 1, 20'hF0000, 16'hFFFF, 2'b11, rd, lat);
    cyc(0, 1, 20'hF0000, 0, 2'b11, rd, lat);
    check(rd == 16'hA5C3, "ROM is not writable");
    cyc(0, 1, 20'h00010, 0, 2'b11, rd, lat);
    check(lat == 8, "local-memory address not answered");
    cyc(0, 0, 20'h40010, 0, 2'b11, rd, lat);
    check(lat == 8, "I/O cycle not answered");
    // DMA path
    @(negedge clk);
    dma_en = 1; dma_we = 1; dma_addr = 15'h0008; dma_wdata = 16'hBEEF;
    @(negedge clk);
    dma_we = 0;
    @(negedge clk);
    check(dma_rdata == 16'hBEEF, "DMA path read after write");
    req = '{cyc: 1'b1, we: 1'b0, mio: 1'b1, addr: 20'h40010, wdata: 0, be: 2'b11};
    repeat (2) @(posedge clk);
    #1 check(!rsp.ack && rsp.rdata == 0, "bus side silent during DMA");
    @(negedge clk);
    req = SBUS_IDLE; dma_en = 0;
    cyc(0, 1, 20'h40010, 0, 2'b11, rd, lat);
    check(rd == 16'hBEEF, "DMA word visible from the bus");
    // random against a model
    for (int k = 0; k < 300; k++) begin
      wa = 15'($urandom_range(0, 63));
      wd = 16'($urandom);
      be = 2'($urandom_range(1, 3));
      if ($urandom_range(0, 1) == 1 || !model.exists(wa)) begin
        if (!model.exists(wa)) be = 2'b11;
        cyc(1, 1, {4'h4, wa, 1'b0}, wd, be, rd, lat);
        if (!model.exists(wa)) model[wa] = 16'h0000;
        if (be[0]) model[wa][7:0]  = wd[7:0];
        if (be[1]) model[wa][15:8] = wd[15:8];
      end else begin
        cyc(0, 1, {4'h8, wa, 1'b0}, 0, 2'b11, rd, lat);
        check(rd == model[wa], "random read matches model");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
