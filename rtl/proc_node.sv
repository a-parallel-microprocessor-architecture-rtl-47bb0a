// proc_node: one processing node of the machine, less its processor.
//
// A node is an 8086-class processor with its own local memory, joined to
// the shared system bus through buffered transceivers. This module holds the
// node's glue logic (node_busif) and its local RAM (local_memory); the
// processor's bus cycles enter at cpu_req and finish on cpu_ready.
// IS_BOOT_NODE marks the node that runs alone at power-up (processor 0).
//
// Timing: local memory cycles take two clocks; bus cycles wait for a grant
// and then take as long as the slave needs (two clocks for every slave in
// this design). See node_busif and local_memory for details.
//
// From the document: node = processor + local memory on the system bus, all
// nodes identical apart from the boot jumper. The split into two modules is
// this design's.
module proc_node
  import tf_pkg::*;
#(
  parameter bit          IS_BOOT_NODE = 1'b0,
  parameter int unsigned LM_AW        = 13
) (
  input  logic              clk,
  input  logic              rst_n,
  input  sbus_req_t         cpu_req,
  output logic              cpu_ready,
  output logic [DATA_W-1:0] cpu_rdata,
  output logic              cpu_hold,
  input  logic              cpu_hlda,
  output logic              cpu_nmi,
  output logic              brq,
  input  logic              bg,
  input  logic              boot,
  input  logic              hold_bp,
  output sbus_req_t         mreq,
  input  sbus_req_t         bus_req,   // the cycle on the system bus
  input  sbus_rsp_t         bus_rsp,   // all slaves' answers, ORed
  output sbus_rsp_t         srsp,      // this node's answer as a slave
  input  logic              token_in,
  output logic              token_out,
  output logic              in_use
);

  logic              lm_cpu_en, lm_cpu_we, lm_bus_en;
  logic [1:0]        lm_cpu_be;
  logic [LM_AW-1:0]  lm_cpu_addr;
  logic [DATA_W-1:0] lm_cpu_wdata, lm_cpu_rdata;

  node_busif #(
    .IS_BOOT_NODE (IS_BOOT_NODE),
    .LM_AW        (LM_AW)
  ) u_busif (
    .clk, .rst_n,
    .cpu_req, .cpu_ready, .cpu_rdata, .cpu_hold, .cpu_hlda, .cpu_nmi,
    .lm_cpu_en, .lm_cpu_we, .lm_cpu_be, .lm_cpu_addr, .lm_cpu_wdata,
    .lm_cpu_rdata, .lm_bus_en,
    .brq, .bg, .boot, .hold_bp, .mreq, .bus_rsp,
    .token_in, .token_out, .in_use
  );

  local_memory #(
    .AW (LM_AW)
  ) u_lmem (
    .clk, .rst_n,
    .cpu_en    (lm_cpu_en),
    .cpu_we    (lm_cpu_we),
    .cpu_be    (lm_cpu_be),
    .cpu_addr  (lm_cpu_addr),
    .cpu_wdata (lm_cpu_wdata),
    .cpu_rdata (lm_cpu_rdata),
    .bus_en    (lm_bus_en),
    .req       (bus_req),
    .rsp       (srsp)
  );

endmodule
