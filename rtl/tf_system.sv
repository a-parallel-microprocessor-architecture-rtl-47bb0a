// tf_system: the complete task flow multiprocessor.
//
// Four processing nodes, a control board and a main memory board share one
// system bus. No node is master: any node may run any task, and the task
// heap and every scheduling table live in shared main memory, so a node
// that fails only slows the machine. The hardware supports this with
//   * a centralized fixed-priority arbiter (node 0 highest) that lets one
//     node at a time own the bus for as long as it requests it,
//   * a Token pulse after each release that only the highest-priority idle
//     node receives, so idle nodes need not poll the heap on the bus,
//   * a power-up mode (Boot, Real) in which node 0 alone boots from ROM and
//     then grants every node at once to broadcast the kernel into all local
//     memories,
//   * a DMA circuit in main memory that moves a block between main memory
//     and local memory at one word per clock.
//
// The processors themselves (8086), the serial controller to the host
// (8251A), the diagnostic display and the clock chip are bought parts and
// are not modelled: each node's processor bus is a port (cpu_req/cpu_ready/
// cpu_rdata/cpu_hold/cpu_hlda/cpu_nmi), as are the serial controller's and
// the display's select, strobes and data. Request lines 4..7 of the
// eight-line arbiter are brought out for more nodes (brq_ext).
//
// The system bus: the granted, not-held node (or the running DMA) drives the
// single cycle on the bus; every slave answers with ack/rdata and the
// answers are ORed. See tf_pkg for the address map.
//
// From the document: the board partition, the four nodes, the arbiter, the
// boot sequence, the token, the DMA and the memory organisation. This
// design's choices: a synchronous single-clock model of the bus, the port
// and address assignments listed in tf_pkg, the DMA register map and its
// use of HOLD.
module tf_system
  import tf_pkg::*;
#(
  parameter int unsigned NODES        = NUM_NODES,
  parameter int unsigned LM_AW        = 13,   // local memory: 8 Ki words
  parameter int unsigned RAM_AW       = 15,   // main RAM: 32 Ki words
  parameter int unsigned ROM_AW       = 12,   // boot ROM: 4 Ki words
  parameter string       ROM_INIT     = "",
  parameter int unsigned TOKEN_CYCLES = 3
) (
  input  logic              clk,
  input  logic              rst_n,
  // processors
  input  sbus_req_t         cpu_req   [NODES],
  output logic              cpu_ready [NODES],
  output logic [DATA_W-1:0] cpu_rdata [NODES],
  output logic              cpu_hold  [NODES],
  input  logic              cpu_hlda  [NODES],
  output logic              cpu_nmi   [NODES],
  // spare arbiter request lines
  input  logic [NUM_BRQ-1:NODES] brq_ext,
  // serial link to the host
  input  logic [1:0]        baud_sel,
  output logic              pclk,
  output logic              baud_clk,
  output logic              usart_cs,
  output logic              usart_cd,
  output logic              usart_wr,
  output logic              usart_rd,
  output logic [7:0]        usart_wdata,
  input  logic [7:0]        usart_rdata,
  // diagnostic display
  output logic              disp_wr,
  output logic [3:0]        disp_addr,
  output logic [7:0]        disp_wdata,
  // status
  output logic              boot,
  output logic              real_mode,
  output logic [7:0]        ctrl_q,
  output logic [NUM_BRQ-1:0] bg,
  output logic              token,
  output logic              dma_busy,
  output logic [NODES-1:0]  in_use,
  output sbus_req_t         bus_req
);

  // ---------------- nodes ----------------
  logic [NUM_BRQ-1:0] brq;
  logic [NODES:0]     tok_chain;
  sbus_req_t          node_mreq [NODES];
  sbus_rsp_t          node_rsp  [NODES];
  sbus_rsp_t          bus_rsp;
  logic               dma_hold;
  logic               targets_ready;

  assign tok_chain[0] = token;

  for (genvar i = 0; i < NODES; i++) begin : g_node
    proc_node #(
      .IS_BOOT_NODE (i == 0),
      .LM_AW        (LM_AW)
    ) u_node (
      .clk, .rst_n,
      .cpu_req   (cpu_req[i]),
      .cpu_ready (cpu_ready[i]),
      .cpu_rdata (cpu_rdata[i]),
      .cpu_hold  (cpu_hold[i]),
      .cpu_hlda  (cpu_hlda[i]),
      .cpu_nmi   (cpu_nmi[i]),
      .brq       (brq[i]),
      .bg        (bg[i]),
      .boot,
      .hold_bp   (dma_hold),
      .mreq      (node_mreq[i]),
      .bus_req,
      .bus_rsp,
      .srsp      (node_rsp[i]),
      .token_in  (tok_chain[i]),
      .token_out (tok_chain[i+1]),
      .in_use    (in_use[i])
    );
  end

  assign brq[NUM_BRQ-1:NODES] = brq_ext;

  // ---------------- control board ----------------
  logic       grant_wr;
  logic [7:0] grant_data;
  sbus_rsp_t  ctrl_rsp;
  logic       baud_tick_unused;

  bus_arbiter #(
    .N            (NUM_BRQ),
    .TOKEN_CYCLES (TOKEN_CYCLES)
  ) u_arb (
    .clk, .rst_n,
    .brq,
    .boot,
    .real_mode,
    .grant_wr,
    .grant_data,
    .bg,
    .owner_valid (),
    .owner       (),
    .token
  );

  ctrl_regs u_ctrl (
    .clk, .rst_n,
    .req (bus_req),
    .rsp (ctrl_rsp),
    .real_mode, .boot, .ctrl_q,
    .grant_wr, .grant_data,
    .usart_cs, .usart_cd, .usart_wr, .usart_rd, .usart_wdata, .usart_rdata,
    .disp_wr, .disp_addr, .disp_wdata
  );

  baud_gen u_baud (
    .clk, .rst_n,
    .sel       (baud_sel),
    .pclk,
    .baud_clk,
    .baud_tick (baud_tick_unused)
  );

  // ---------------- main memory board ----------------
  sbus_rsp_t         mem_rsp, dma_rsp;
  sbus_req_t         dma_mreq;
  logic              mem_en, mem_we;
  logic [RAM_AW-1:0] mem_addr;
  logic [DATA_W-1:0] mem_wdata, mem_rdata;

  main_memory #(
    .RAM_AW   (RAM_AW),
    .ROM_AW   (ROM_AW),
    .ROM_INIT (ROM_INIT)
  ) u_mem (
    .clk, .rst_n,
    .req       (bus_req),
    .rsp       (mem_rsp),
    .dma_en    (mem_en),
    .dma_we    (mem_we),
    .dma_addr  (mem_addr),
    .dma_wdata (mem_wdata),
    .dma_rdata (mem_rdata)
  );

  dma_engine #(
    .RAM_AW (RAM_AW)
  ) u_dma (
    .clk, .rst_n,
    .req           (bus_req),
    .rsp           (dma_rsp),
    .busy          (dma_busy),
    .hold          (dma_hold),
    .targets_ready,
    .mreq          (dma_mreq),
    .bus_rdata     (bus_rsp.rdata),
    .mem_en, .mem_we, .mem_addr, .mem_wdata, .mem_rdata
  );

  // Every granted node has floated its processor.
  always_comb begin
    targets_ready = 1'b1;
    for (int i = 0; i < NODES; i++) begin
      if (bg[i] && !cpu_hlda[i]) targets_ready = 1'b0;
    end
  end

  // ---------------- system bus ----------------
  // Driver: the running DMA, else a node whose transceivers drive.
  always_comb begin
    bus_req = SBUS_IDLE;
    for (int i = NODES - 1; i >= 0; i--) begin
      if (node_mreq[i].cyc) bus_req = node_mreq[i];
    end
    if (dma_mreq.cyc) bus_req = dma_mreq;
  end

  // Slaves' answers, ORed.
  always_comb begin
    bus_rsp = ctrl_rsp | mem_rsp | dma_rsp;
    for (int i = 0; i < NODES; i++) bus_rsp = bus_rsp | node_rsp[i];
  end

endmodule
