// tb_tf_system: end-to-end test of the whole machine at its default sizes.
//
// Four processor models (tasks in this file, one per node, standing in for
// the 8086s) run the power-up sequence and a small task-flow job:
//   1. Reset: Boot high, Real low. Only node 0 runs and owns the bus (grant
//      from the boot resistors); nodes 1..3 are held. Node 0 reads the boot
//      ROM, talks to the host through the serial controller ports, writes
//      to the display, and stores a kernel image into main memory (standing
//      in for the host download).
//   2. Node 0 loads the software grant byte with all four nodes and raises
//      Real, then block-moves the kernel from main memory into its own local
//      memory; every held node takes the same writes (broadcast).
//   3. Node 0 keeps the bus by raising its own BRQ, grants itself alone,
//      lowers Boot; the other nodes leave hold. Every node checks the kernel
//      in its local memory.
//   4. Task heap: each node sets IU, requests the bus, and all three of
//      nodes 1..3 then do a read-modify-write of a shared task counter in
//      main memory. The arbiter serialises them in priority order; each
//      release fires a token that the daisy chain delivers to the idle node.
//   5. DMA: node 1 owns the bus and moves a block from main memory into its
//      local memory and back with the DMA circuit, which holds node 1 during
//      the move; one word per clock is checked.
// Every mechanism is counted (boot override, broadcast write, real-mode
// grant, held node, bus wait, priority hand-over, token, idle-node
// interrupt, DMA in both directions, serial and display strobes, baud
// clock); a mechanism that never happened counts as a failure.
module tb_tf_system;
  import tf_pkg::*;
  localparam int NODES = 4;
  localparam int KWORDS = 64;           // kernel image size in words

  logic clk = 0, rst_n = 0;
  sbus_req_t         cpu_req   [NODES];
  logic              cpu_ready [NODES];
  logic [DATA_W-1:0] cpu_rdata [NODES];
  logic              cpu_hold  [NODES];
  logic              cpu_hlda  [NODES];
  logic              cpu_nmi   [NODES];
  logic [7:4]        brq_ext = '0;
  logic [1:0]        baud_sel = 2'd0;
  logic pclk, baud_clk, usart_cs, usart_cd, usart_wr, usart_rd, disp_wr;
  logic [7:0] usart_wdata, usart_rdata = 8'h00, disp_wdata, ctrl_q, bg;
  logic [3:0] disp_addr;
  logic boot, real_mode, token, dma_busy;
  logic [NODES-1:0] in_use;
  sbus_req_t bus_req;

  tf_system dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // ---------------- processor models ----------------
  // HLDA follows HOLD one clock later when the processor has no cycle open.
  for (genvar n = 0; n < NODES; n++) begin : g_cpu
    initial begin cpu_req[n] = SBUS_IDLE; cpu_hlda[n] = 1'b0; end
    always @(posedge clk) begin
      if (!rst_n) cpu_hlda[n] <= 1'b0;
      else        cpu_hlda[n] <= cpu_hold[n] && !cpu_req[n].cyc;
    end
  end

  task automatic cyc(input int n, input logic we, input logic mio,
                     input logic [19:0] a, input logic [15:0] wd,
                     output logic [15:0] rd);
    int t;
    @(negedge clk);
    while (cpu_hold[n] || cpu_hlda[n]) @(negedge clk);
    cpu_req[n] = '{cyc: 1'b1, we: we, mio: mio, addr: a, wdata: wd, be: 2'b11};
    t = 0;
    #1;
    while (!cpu_ready[n] && t < 5000) begin @(negedge clk); t++; #1; end
    if (t >= 5000) begin failures++; $display("FAIL node %0d cycle hung at %h", n, a); end
    rd = cpu_rdata[n];
    @(negedge clk);
    cpu_req[n] = SBUS_IDLE;
  endtask

  task automatic wr(input int n, input logic mio, input logic [19:0] a, input logic [15:0] d);
    logic [15:0] rd;
    cyc(n, 1'b1, mio, a, d, rd);
  endtask

  task automatic rdw(input int n, input logic mio, input logic [19:0] a, output logic [15:0] d);
    cyc(n, 1'b0, mio, a, 16'h0, d);
  endtask

  // ---------------- mechanism counters ----------------
  int n_boot_clk, n_real_clk, n_bcast, n_held, n_wait, n_handover, n_token;
  int n_nmi, n_dma_out, n_dma_in, n_usart, n_disp, n_baud;
  logic [7:0] bg_q;
  logic tok_q, baud_q;
  logic nmi_q [NODES];
  always @(posedge clk) if (rst_n) begin
    if (boot && !real_mode) n_boot_clk++;
    if (boot && real_mode && bg == 8'h0F) n_real_clk++;
    for (int i = 0; i < NODES; i++) begin
      if (cpu_hlda[i]) n_held++;
      if (cpu_req[i].cyc && !cpu_hlda[i] && !bg[i] && !is_local(cpu_req[i].addr)) n_wait++;
      if (cpu_nmi[i] && !nmi_q[i]) n_nmi++;
      nmi_q[i] = cpu_nmi[i];
      if (i > 0 && cpu_hlda[i] && bg[i] && bus_req.cyc && bus_req.we && is_local(bus_req.addr)
          && !dma_busy) n_bcast++;
    end
    if (!boot && bg_q != 0 && bg != 0 && bg != bg_q) n_handover++;
    if (token && !tok_q) n_token++;
    if (dma_busy && bus_req.cyc && bus_req.mio && bus_req.we) n_dma_out++;
    if (dma_busy && bus_req.cyc && bus_req.mio && !bus_req.we) n_dma_in++;
    if (usart_wr) n_usart++;
    if (disp_wr) n_disp++;
    if (baud_clk && !baud_q) n_baud++;
    bg_q  = bg;
    tok_q = token;
    baud_q = baud_clk;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [15:0] kword(input int i);
    return 16'h5000 ^ 16'(i * 37);
  endfunction

  localparam logic [19:0] KERNEL  = 20'h40000;   // kernel image in main memory
  localparam logic [19:0] COUNTER = 20'h4F000;   // shared task counter
  localparam logic [19:0] BLOCK   = 20'h48000;   // DMA source block

  logic [15:0] d;
  int order [$];
  int t0, t1, ok;

  initial begin
    for (int i = 0; i < NODES; i++) nmi_q[i] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    // ---- 1. boot: node 0 alone ----
    check(boot && !real_mode, "power-up: Boot high, Real low");
    check(bg == 8'h01, "power-up: boot resistors grant node 0 only");
    repeat (2) @(negedge clk);
    check(cpu_hlda[1] && cpu_hlda[2] && cpu_hlda[3] && !cpu_hlda[0], "nodes 1..3 held");
    rdw(0, 1, 20'hFFFF0, d);                    // reset vector in boot ROM
    check(d == 16'h0000, "boot ROM read (blank image)");
    wr(0, 0, 20'h00000, 16'h0041);              // serial link: send to host
    usart_rdata = 8'h27;
    rdw(0, 0, 20'h00002, d);
    check(d == 16'h0027, "serial status from host link");
    wr(0, 0, 20'h00030, 16'h0042);              // display character 0
    for (int i = 0; i < KWORDS; i++) wr(0, 1, KERNEL + 20'(2 * i), kword(i));
    // ---- 2. Real: grant all, broadcast kernel ----
    wr(0, 0, 20'h00020, 16'h000F);              // software grant byte: nodes 0..3
    wr(0, 0, 20'h00010, 16'h0001);              // Real <- 1
    check(real_mode && boot && bg == 8'h0F, "real mode grants every node");
    for (int i = 0; i < KWORDS; i++) begin
      rdw(0, 1, KERNEL + 20'(2 * i), d);
      wr(0, 1, 20'h00000 + 20'(2 * i), d);       // own local memory, copied to all
    end
    // ---- 3. leave boot ----
    wr(0, 0, 20'h00080, 16'h0001);              // node 0 BRQ
    wr(0, 0, 20'h00020, 16'h0001);              // grant node 0 alone
    wr(0, 0, 20'h00012, 16'h0001);              // Boot <- 0
    repeat (3) @(negedge clk);
    check(!boot && bg == 8'h01, "normal mode, node 0 keeps the bus");
    check(!cpu_hlda[1] && !cpu_hlda[2] && !cpu_hlda[3], "nodes leave hold");
    for (int n = 0; n < NODES; n++) begin
      ok = 1;
      for (int i = 0; i < KWORDS; i++) begin
        rdw(n, 1, 20'h00000 + 20'(2 * i), d);
        if (d != kword(i)) ok = 0;
      end
      check(ok == 1, $sformatf("kernel present in node %0d local memory", n));
    end
    // ---- 4. task heap: contention on a shared counter ----
    wr(0, 1, COUNTER, 16'h0000);
    wr(0, 0, 20'h00080, 16'h0000);              // node 0 releases the bus
    check(bg == 8'h00, "bus free");
    wr(1, 0, 20'h00082, 16'h0001);              // node 1 in use
    wr(3, 0, 20'h00082, 16'h0001);              // node 3 in use; node 2 idle
    fork
      begin : n1
        wr(1, 0, 20'h00080, 16'h0001);
        rdw(1, 1, COUNTER, d); wr(1, 1, COUNTER, d + 16'd1);
        order.push_back(1);
        wr(1, 0, 20'h00080, 16'h0000);
      end
      begin : n3
        wr(3, 0, 20'h00080, 16'h0001);
        rdw(3, 1, COUNTER, d); wr(3, 1, COUNTER, d + 16'd1);
        order.push_back(3);
        wr(3, 0, 20'h00080, 16'h0000);
      end
      begin : n2
        repeat (2) @(negedge clk);
        wr(2, 0, 20'h00080, 16'h0001);
        rdw(2, 1, COUNTER, d); wr(2, 1, COUNTER, d + 16'd1);
        order.push_back(2);
        wr(2, 0, 20'h00080, 16'h0000);
        wr(2, 0, 20'h00082, 16'h0001);
      end
    join
    rdw(0, 0, 20'h00080, d);
    wr(0, 0, 20'h00080, 16'h0001);
    rdw(0, 1, COUNTER, d);
    check(d == 16'd3, $sformatf("task counter %0d after three nodes", d));
    check(order.size() == 3 && order[0] == 1, "highest-priority requester first");
    wr(0, 0, 20'h00080, 16'h0000);
    // ---- 5. DMA ----
    wr(1, 0, 20'h00080, 16'h0001);              // node 1 takes the bus
    for (int i = 0; i < 32; i++) wr(1, 1, BLOCK + 20'(2 * i), 16'hD000 + 16'(i));
    wr(1, 0, 20'h00040, 16'((BLOCK - 20'h40000) >> 1));   // main word address
    wr(1, 0, 20'h00042, 16'h1000);              // local byte address 0x01000
    wr(1, 0, 20'h00044, 16'h0000);
    wr(1, 0, 20'h00046, 16'd32);
    t0 = 0;
    wr(1, 0, 20'h00048, 16'h0001);              // start main -> local
    while (dma_busy) begin @(negedge clk); t0++; end
    ok = 1;
    for (int i = 0; i < 32; i++) begin
      rdw(1, 1, 20'h01000 + 20'(2 * i), d);
      if (d != 16'hD000 + 16'(i)) ok = 0;
    end
    check(ok == 1, "DMA main -> local block arrived");
    check(t0 <= 32 + 4, $sformatf("DMA 32 words in %0d clocks", t0));
    for (int i = 0; i < 16; i++) wr(1, 1, 20'h01100 + 20'(2 * i), 16'hE000 + 16'(i));
    wr(1, 0, 20'h00040, 16'h7000);              // main word 0x7000 = byte 0x4E000
    wr(1, 0, 20'h00042, 16'h1100);
    wr(1, 0, 20'h00046, 16'd16);
    wr(1, 0, 20'h00048, 16'h0003);              // start local -> main
    while (dma_busy) @(negedge clk);
    ok = 1;
    for (int i = 0; i < 16; i++) begin
      rdw(1, 1, 20'h4E000 + 20'(2 * i), d);
      if (d != 16'hE000 + 16'(i)) ok = 0;
    end
    check(ok == 1, "DMA local -> main block arrived");
    wr(1, 0, 20'h00080, 16'h0000);
    repeat (4) @(negedge clk);
    // ---- mechanism coverage ----
    $display("boot-only clocks %0d, real-mode clocks %0d, broadcast writes %0d, held clocks %0d",
             n_boot_clk, n_real_clk, n_bcast, n_held);
    $display("bus waits %0d, hand-overs %0d, tokens %0d, idle interrupts %0d",
             n_wait, n_handover, n_token, n_nmi);
    $display("DMA bus writes %0d, DMA bus reads %0d, serial %0d, display %0d, baud edges %0d",
             n_dma_out, n_dma_in, n_usart, n_disp, n_baud);
    check(n_boot_clk > 0, "boot override happened");
    check(n_real_clk > 0, "real-mode software grant happened");
    check(n_bcast >= 3 * KWORDS, $sformatf("broadcast writes %0d", n_bcast));
    check(n_held > 0, "hold happened");
    check(n_wait > 0, "bus wait happened");
    check(n_handover > 0, "grant hand-over happened");
    check(n_token > 0, "token pulse happened");
    check(n_nmi > 0, "idle-node token interrupt happened");
    check(n_dma_out == 32, "DMA main -> local words on the bus");
    check(n_dma_in == 16, "DMA local -> main words on the bus");
    check(n_usart == 1, "serial write happened");
    check(n_disp == 1, "display write happened");
    check(n_baud > 0, "baud clock ran");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
