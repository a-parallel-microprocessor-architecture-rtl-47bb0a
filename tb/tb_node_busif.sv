// tb_node_busif: self-checking test of a node's bus interface logic.
//
// A processor model (tasks here) runs cycles into the interface; a local
// memory model and a bus slave model answer. Checks: BRQ/IU latch by node
// I/O writes and the status read, two-clock local cycles without the bus,
// bus cycles that wait for the grant and finish on the slave's acknowledge,
// local cycles copied to the bus while granted, HOLD during boot on a
// non-boot node only, HOLD on a DMA request only with a grant, the bus
// path into local memory under HLDA and grant, and the token chain.
module tb_node_busif;
  import tf_pkg::*;
  localparam int LM_AW = 13;

  logic clk = 0, rst_n = 0;
  sbus_req_t cpu_req = SBUS_IDLE, mreq, mreq_b;
  logic cpu_ready, cpu_hold, cpu_hlda = 0, cpu_nmi;
  logic [15:0] cpu_rdata;
  logic lm_cpu_en, lm_cpu_we, lm_bus_en;
  logic [1:0] lm_cpu_be;
  logic [LM_AW-1:0] lm_cpu_addr;
  logic [15:0] lm_cpu_wdata, lm_cpu_rdata;
  logic brq, bg = 0, boot = 0, hold_bp = 0, token_in = 0, token_out, in_use;
  sbus_rsp_t bus_rsp;
  int checks = 0, failures = 0;

  node_busif #(.IS_BOOT_NODE(1'b0), .LM_AW(LM_AW)) dut (.*);

  // a boot node, only to compare its HOLD
  logic hold_b, rdy_b, nmi_b, en_b, we_b, lbe_b, brq_b, to_b, iu_b;
  node_busif #(.IS_BOOT_NODE(1'b1), .LM_AW(LM_AW)) dut_boot (
    .clk, .rst_n, .cpu_req(SBUS_IDLE), .cpu_ready(rdy_b), .cpu_rdata(),
    .cpu_hold(hold_b), .cpu_hlda(1'b0), .cpu_nmi(nmi_b),
    .lm_cpu_en(en_b), .lm_cpu_we(we_b), .lm_cpu_be(), .lm_cpu_addr(),
    .lm_cpu_wdata(), .lm_cpu_rdata(16'h0), .lm_bus_en(lbe_b),
    .brq(brq_b), .bg(1'b0), .boot, .hold_bp(1'b0), .mreq(mreq_b),
    .bus_rsp(SRSP_NONE), .token_in(1'b0), .token_out(to_b), .in_use(iu_b));

  always #5 clk = ~clk;

  // local memory model: registered read
  logic [15:0] lm [2**LM_AW];
  always @(posedge clk) begin
    if (lm_cpu_en && lm_cpu_we) lm[lm_cpu_addr] <= lm_cpu_wdata;
    if (lm_cpu_en && !lm_cpu_we) lm_cpu_rdata <= lm[lm_cpu_addr];
  end
  // bus slave model: acknowledges non-local cycles after SLV_WAIT clocks
  int slv_wait = 1, slv_cnt = 0, n_bus_cycles = 0;
  logic [15:0] slv_mem [256];
  always @(posedge clk) begin
    bus_rsp <= SRSP_NONE;
    if (mreq.cyc && !is_local(mreq.addr)) begin
      if (slv_cnt + 1 >= slv_wait && !bus_rsp.ack) begin
        bus_rsp.ack <= 1'b1;
        n_bus_cycles++;
        if (mreq.we) slv_mem[mreq.addr[8:1]] <= mreq.wdata;
        else         bus_rsp.rdata <= slv_mem[mreq.addr[8:1]];
        slv_cnt <= 0;
      end else if (!bus_rsp.ack) slv_cnt <= slv_cnt + 1;
    end else slv_cnt <= 0;
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // processor cycle: returns data and clocks to READY
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
  logic saw_mirror;
  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    check(!brq && !in_use && !cpu_hold, "reset state");
    // local memory cycles
    cyc(1, 1, 20'h00100, 16'h4321, rd, lat);
    check(lat == 1, $sformatf("local write ready after one clock (%0d)", lat));
    cyc(0, 1, 20'h00100, 0, rd, lat);
    check(lat == 1 && rd == 16'h4321, "local read");
    check(n_bus_cycles == 0, "local cycles do not use the bus");
    // bus request latch
    cyc(1, 0, 20'h00080, 16'h0001, rd, lat);
    check(brq && !in_use && lat == 1, "BRQ set by node I/O write");
    cyc(1, 0, 20'h00082, 16'h0001, rd, lat);
    check(brq && in_use, "IU set");
    cyc(0, 0, 20'h00080, 0, rd, lat);
    check(rd == 16'h0300, "status: latch bits, no grant");
    // bus cycle waits for grant
    fork
      cyc(1, 1, 20'h40010, 16'h7777, rd, lat);
      begin
        repeat (5) begin @(negedge clk); #2; check(!mreq.cyc, "no bus drive without grant"); end
        bg = 1;
      end
    join
    check(lat >= 5 && n_bus_cycles == 1, $sformatf("bus write waited for grant (%0d)", lat));
    check(slv_mem[8] == 16'h7777, "bus write arrived");
    slv_wait = 3;
    cyc(0, 1, 20'h40010, 0, rd, lat);
    check(rd == 16'h7777 && lat == 3, $sformatf("bus read ends on slave ack (%0d)", lat));
    slv_wait = 1;
    cyc(0, 0, 20'h00080, 0, rd, lat);
    check(rd == 16'h0301, "status shows grant");
    // local cycle copied to the bus while granted
    saw_mirror = 0;
    fork
      cyc(1, 1, 20'h00200, 16'hAAAA, rd, lat);
      begin @(negedge clk); #2; saw_mirror = mreq.cyc && mreq.addr == 20'h00200; end
    join
    check(saw_mirror && lat == 1, "local write driven onto the bus while granted");
    // token chain
    token_in = 1; #1;
    check(token_out && !cpu_nmi, "busy node passes the token");
    cyc(1, 0, 20'h00082, 16'h0000, rd, lat);
    #1 check(!token_out && cpu_nmi, "idle node keeps the token, interrupt");
    token_in = 0;
    // hold in boot
    boot = 1;
    @(negedge clk);
    check(cpu_hold && !hold_b, "boot holds non-boot node only");
    cpu_hlda = 1; #1;
    check(lm_bus_en && !mreq.cyc, "held and granted: bus path into local memory");
    bg = 0; #1;
    check(!lm_bus_en, "no grant: bus path closed");
    boot = 0; cpu_hlda = 0;
    @(negedge clk);
    check(!cpu_hold, "hold released after boot");
    hold_bp = 1;
    @(negedge clk);
    check(!cpu_hold, "DMA hold needs a grant");
    bg = 1;
    @(negedge clk);
    check(cpu_hold, "DMA hold on the granted node");
    hold_bp = 0;
    @(negedge clk);
    check(!cpu_hold, "DMA hold released");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
