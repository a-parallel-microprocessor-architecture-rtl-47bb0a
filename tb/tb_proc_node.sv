// tb_proc_node: self-checking test of one node (interface plus local RAM).
//
// A processor model writes and reads local memory, asks for the bus and
// makes a bus cycle to a slave model. Then the node is held (boot) and
// granted, a bus master model writes a block into its local memory through
// the bus path, and after the hold the processor reads the block back.
module tb_proc_node;
  import tf_pkg::*;

  logic clk = 0, rst_n = 0;
  sbus_req_t cpu_req = SBUS_IDLE, mreq, bus_req;
  logic cpu_ready, cpu_hold, cpu_hlda = 0, cpu_nmi, brq, bg = 0, boot = 0;
  logic hold_bp = 0, token_in = 0, token_out, in_use;
  logic [15:0] cpu_rdata;
  sbus_rsp_t bus_rsp, srsp, slv_rsp;
  sbus_req_t tb_master = SBUS_IDLE;
  int checks = 0, failures = 0;

  proc_node #(.IS_BOOT_NODE(1'b0)) dut (.*);
  always #5 clk = ~clk;

  // the bus: the node's drive, or the testbench master
  assign bus_req = tb_master.cyc ? tb_master : mreq;
  assign bus_rsp = slv_rsp | srsp;
  // slave model for non-local memory: one-clock ack, one register
  logic [15:0] slv_reg;
  always @(posedge clk) begin
    slv_rsp <= SRSP_NONE;
    if (bus_req.cyc && !is_local(bus_req.addr) && !slv_rsp.ack) begin
      slv_rsp.ack <= 1'b1;
      if (bus_req.we) slv_reg <= bus_req.wdata;
      else slv_rsp.rdata <= slv_reg;
    end
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic cyc(input logic we, input logic mio, input logic [19:0] a,
                     input logic [15:0] wd, output logic [15:0] rd, output int lat);
    @(negedge clk);
    cpu_req = '{cyc: 1'b1, we: we, mio: mio, addr: a, wdata: wd, be: 2'b11};
    lat = 0;
    #1;
    while (!cpu_ready && lat < 30) begin @(negedge clk); lat++; #1; end
    rd = cpu_rdata;
    @(negedge clk);
    cpu_req = SBUS_IDLE;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [15:0] rd;
  int lat;
  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    cyc(1, 1, 20'h00010, 16'h1111, rd, lat);
    cyc(0, 1, 20'h00010, 0, rd, lat);
    check(rd == 16'h1111 && lat == 1, "local memory read after write, two clocks");
    cyc(1, 0, 20'h00080, 16'h0001, rd, lat);
    check(brq, "bus requested");
    bg = 1;
    cyc(1, 1, 20'h40000, 16'h2222, rd, lat);
    cyc(0, 1, 20'h40000, 0, rd, lat);
    check(rd == 16'h2222, "bus write and read through the node");
    // held and granted: bus writes land in local memory
    boot = 1;
    @(negedge clk);
    check(cpu_hold, "node held in boot");
    cpu_hlda = 1;
    for (int i = 0; i < 8; i++) begin
      @(negedge clk);
      tb_master = '{cyc: 1'b1, we: 1'b1, mio: 1'b1, addr: 20'h00100 + 20'(2 * i),
                    wdata: 16'hA000 + 16'(i), be: 2'b11};
    end
    @(negedge clk);
    tb_master = '{cyc: 1'b1, we: 1'b0, mio: 1'b1, addr: 20'h00104, wdata: 0, be: 2'b11};
    @(negedge clk);
    check(srsp.ack && srsp.rdata == 16'hA002, "node answers bus read while held");
    tb_master = SBUS_IDLE;
    boot = 0;
    @(negedge clk);
    cpu_hlda = 0;
    check(!cpu_hold, "hold released");
    for (int i = 0; i < 8; i++) begin
      cyc(0, 1, 20'h00100 + 20'(2 * i), 0, rd, lat);
      check(rd == 16'hA000 + 16'(i), $sformatf("broadcast word %0d in local memory", i));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
