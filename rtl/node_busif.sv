// node_busif: bus interface logic of one processing node.
//
// Sits between the node's processor (an 8086 in minimum mode, outside this
// design), its local memory and the shared system bus, and does what the
// glue logic of the processor board does:
//
//  * Decode. Memory cycles with A19:A18 = 00 go to local memory and finish
//    in two clocks without the bus. I/O cycles with A7 = 1 are node-local.
//    Every other cycle needs the system bus and waits (READY low) until the
//    node holds a bus grant; it then appears on the bus and ends when a
//    slave acknowledges.
//  * Bus request and in-use flags. A node-local I/O write sets bit Q[A3..A1]
//    of an addressable latch (74HC259) to data bit D0. Q0 is the node's bus
//    request BRQ, Q1 its in-use flag IU. Software therefore asks for the bus
//    and keeps it until it clears BRQ. A node-local I/O read returns the
//    grant in bit 0 and the latch in bits 15..8.
//  * Hold. A flip-flop drives the processor's HOLD input. It is set while
//    Boot is high on every node except the boot node (IS_BOOT_NODE, a jumper
//    on the board), and while the DMA circuit asks for the bus (hold_bp) on
//    a node that holds a grant. Once the processor answers HLDA, and the
//    node has a grant, the transceivers point from the bus into the node and
//    local memory becomes a bus target (lm_bus_en).
//  * Transceivers. While the node has a grant and is not held, every cycle
//    of its processor is driven onto the bus, local ones too. That is what
//    lets processor 0, during boot with every node granted, copy the kernel
//    into its own local memory and into all held nodes' local memories at
//    once.
//  * Token chain. The arbiter's token pulse enters at token_in. A node in
//    use passes it on to token_out; an idle node keeps it and it interrupts
//    the processor (cpu_nmi), so only the highest-priority idle node goes to
//    look for work.
//
// Timing: local memory and node I/O cycles acknowledge one clock after they
// start; a bus cycle acknowledges in the clock the slave acknowledges.
//
// From the document and the board: BRQ/IU from a 74HC259 latch, HOLD from a
// flip-flop with a boot-node jumper, transceiver direction from HLDA and
// enable from BG, token passed on while the node is in use. This design's
// choices: active-high signals, the port numbers, the status read, the
// A19:A18 local decode and the DMA's use of HOLD.
module node_busif
  import tf_pkg::*;
#(
  parameter bit          IS_BOOT_NODE = 1'b0,
  parameter int unsigned LM_AW        = 13
) (
  input  logic              clk,
  input  logic              rst_n,
  // processor side
  input  sbus_req_t         cpu_req,
  output logic              cpu_ready,     // cycle done this clock
  output logic [DATA_W-1:0] cpu_rdata,
  output logic              cpu_hold,
  input  logic              cpu_hlda,
  output logic              cpu_nmi,
  // local memory
  output logic              lm_cpu_en,
  output logic              lm_cpu_we,
  output logic [1:0]        lm_cpu_be,
  output logic [LM_AW-1:0]  lm_cpu_addr,
  output logic [DATA_W-1:0] lm_cpu_wdata,
  input  logic [DATA_W-1:0] lm_cpu_rdata,
  output logic              lm_bus_en,
  // system bus side
  output logic              brq,
  input  logic              bg,
  input  logic              boot,
  input  logic              hold_bp,       // DMA asks granted nodes to hold
  output sbus_req_t         mreq,
  input  sbus_rsp_t         bus_rsp,
  input  logic              token_in,
  output logic              token_out,
  output logic              in_use
);

  logic [7:0]        ioq;        // 74HC259 latch
  logic              hold_q;
  logic              active;     // processor is running a cycle
  logic              is_lcl, is_nio, is_sys;
  logic              first, ack_q;
  logic [DATA_W-1:0] nio_rd_q;
  logic              drive;      // transceivers point node -> bus

  assign active = cpu_req.cyc && !cpu_hlda;
  assign is_lcl = active && cpu_req.mio && is_local(cpu_req.addr);
  assign is_nio = active && !cpu_req.mio && is_node_io(cpu_req.addr);
  assign is_sys = active && !is_lcl && !is_nio;
  assign first  = (is_lcl || is_nio) && !ack_q;
  assign drive  = bg && !hold_q && !cpu_hlda;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ack_q    <= 1'b0;
      nio_rd_q <= '0;
      ioq      <= '0;
      hold_q   <= 1'b0;
    end else begin
      ack_q    <= first;
      nio_rd_q <= '0;
      if (first && is_nio) begin
        if (cpu_req.we) ioq[cpu_req.addr[3:1]] <= cpu_req.wdata[0];
        else            nio_rd_q <= {ioq, 7'b0, bg};
      end
      hold_q <= (boot && !IS_BOOT_NODE) || (hold_bp && bg);
    end
  end

  assign brq      = ioq[NODE_BRQ];
  assign in_use   = ioq[NODE_IU];
  assign cpu_hold = hold_q;

  // Local memory: one access on the first clock of a local cycle.
  assign lm_cpu_en    = first && is_lcl;
  assign lm_cpu_we    = cpu_req.we;
  assign lm_cpu_be    = cpu_req.be;
  assign lm_cpu_addr  = cpu_req.addr[LM_AW:1];
  assign lm_cpu_wdata = cpu_req.wdata;
  assign lm_bus_en    = cpu_hlda && bg;

  // Transceivers: the processor's cycle goes out while the node drives.
  always_comb begin
    mreq = SBUS_IDLE;
    if (drive && (is_lcl || is_sys)) mreq = cpu_req;
  end

  // READY back to the processor.
  always_comb begin
    cpu_ready = 1'b0;
    cpu_rdata = '0;
    if (ack_q && (is_lcl || is_nio)) begin
      cpu_ready = 1'b1;
      cpu_rdata = is_lcl ? lm_cpu_rdata : nio_rd_q;
    end else if (is_sys && drive && bus_rsp.ack) begin
      cpu_ready = 1'b1;
      cpu_rdata = bus_rsp.rdata;
    end
  end

  // Token daisy chain.
  assign token_out = token_in && in_use;
  assign cpu_nmi   = token_in && !in_use;

  a_no_drive_when_held: assert property (@(posedge clk) disable iff (!rst_n)
    cpu_hlda |-> !mreq.cyc);

endmodule
