// tb_local_memory: self-checking test of a node's local RAM.
//
// Checks the processor path (byte lanes, one-clock registered read), the
// bus path while bus_en is high (writes land, reads return data one clock
// later with an acknowledge, non-local addresses and I/O ignored), that the
// processor path is shut while the bus path is open, and 300 random
// processor accesses against a model.
module tb_local_memory;
  import tf_pkg::*;
  localparam int AW = 13;

  logic clk = 0, rst_n = 0;
  logic cpu_en = 0, cpu_we = 0, bus_en = 0;
  logic [1:0] cpu_be = 2'b11;
  logic [AW-1:0] cpu_addr = '0;
  logic [15:0] cpu_wdata = '0, cpu_rdata;
  sbus_req_t req = SBUS_IDLE;
  sbus_rsp_t rsp;
  int checks = 0, failures = 0;

  local_memory #(.AW(AW)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic cpu(input logic we, input logic [AW-1:0] a, input logic [15:0] wd,
                     input logic [1:0] be, output logic [15:0] rd);
    @(negedge clk);
    cpu_en = 1; cpu_we = we; cpu_addr = a; cpu_wdata = wd; cpu_be = be;
    @(negedge clk);
    cpu_en = 0;
    rd = cpu_rdata;
  endtask

  task automatic bus(input logic we, input logic mio, input logic [19:0] a,
                     input logic [15:0] wd, output logic [15:0] rd, output logic ack);
    @(negedge clk);
    req = '{cyc: 1'b1, we: we, mio: mio, addr: a, wdata: wd, be: 2'b11};
    @(negedge clk);
    rd = rsp.rdata; ack = rsp.ack;
    req = SBUS_IDLE;
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [15:0] rd, model [logic [AW-1:0]];
  logic ack;
  logic [AW-1:0] a;
  logic [15:0] wd;
  logic [1:0] be;
  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    cpu(1, 13'h0010, 16'h1234, 2'b11, rd);
    cpu(0, 13'h0010, 0, 2'b11, rd);
    check(rd == 16'h1234, "CPU write/read one clock");
    cpu(1, 13'h0010, 16'hFF00, 2'b10, rd);
    cpu(0, 13'h0010, 0, 2'b11, rd);
    check(rd == 16'hFF34, "CPU odd byte lane");
    // bus path
    bus_en = 1;
    bus(1, 1, 20'h00040, 16'hCAFE, rd, ack);      // word 0x20
    check(ack, "bus write acknowledged after one clock");
    bus(0, 1, 20'h00040, 0, rd, ack);
    check(ack && rd == 16'hCAFE, "bus read back");
    bus(1, 1, 20'h40040, 16'h0BAD, rd, ack);
    check(!ack, "main-memory address ignored");
    bus(1, 0, 20'h00040, 16'h0BAD, rd, ack);
    check(!ack, "I/O cycle ignored");
    cpu(1, 13'h0020, 16'h7777, 2'b11, rd);         // CPU path shut
    bus(0, 1, 20'h00040, 0, rd, ack);
    check(rd == 16'hCAFE, "CPU path shut while bus path open");
    bus_en = 0;
    bus(0, 1, 20'h00040, 0, rd, ack);
    check(!ack && rd == 0, "bus path closed without bus_en");
    cpu(0, 13'h0020, 0, 2'b11, rd);
    check(rd == 16'hCAFE, "bus-written word seen by CPU");
    for (int k = 0; k < 300; k++) begin
      a  = AW'($urandom_range(0, 31));
      wd = 16'($urandom);
      be = 2'($urandom_range(1, 3));
      if (!model.exists(a)) be = 2'b11;
      if ($urandom_range(0, 1) == 1 || !model.exists(a)) begin
        cpu(1, a, wd, be, rd);
        if (!model.exists(a)) model[a] = 0;
        if (be[0]) model[a][7:0]  = wd[7:0];
        if (be[1]) model[a][15:8] = wd[15:8];
      end else begin
        cpu(0, a, 0, 2'b11, rd);
        check(rd == model[a], "random read matches model");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
