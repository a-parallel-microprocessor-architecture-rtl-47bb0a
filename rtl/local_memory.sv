// local_memory: private RAM of one processing node.
//
// Holds the kernel copy, the task being run and its local data. It is a
// single-ported 16-bit RAM built, like the board, from an even-byte bank
// (D7..D0, written when be[0], i.e. A0 = 0) and an odd-byte bank (D15..D8,
// written when be[1], i.e. BHE). 2^AW words; the default 8 Ki words is two
// 8 KiB 6264 chips. The chips see A13..A1, so the word address is
// addr[AW:1] and the memory repeats through the node's local space.
//
// Two paths share the one port:
//   CPU path : used while the node's processor runs. cpu_en for one clock
//              performs the access; read data is registered (next clock).
//   bus path : used while bus_en is high, i.e. the processor is in hold and
//              the node holds a bus grant, so its transceivers point from
//              the system bus into the node. Memory cycles with
//              A19:A18 = 00 then reach this RAM: every master's write lands
//              here (all held, granted nodes take it at once: broadcast).
//              Read data is registered, zero when not answering; ack is a
//              one-clock pulse one clock after the cycle starts.
//
// From the document: local RAM per node of 6264 chips in byte banks, filled
// from the bus through the node's transceivers while its processor is held.
// This design's choices: the registered one-clock read and the handshake.
module local_memory
  import tf_pkg::*;
#(
  parameter int unsigned AW = 13   // word address bits
) (
  input  logic              clk,
  input  logic              rst_n,
  // processor path
  input  logic              cpu_en,
  input  logic              cpu_we,
  input  logic [1:0]        cpu_be,
  input  logic [AW-1:0]     cpu_addr,
  input  logic [DATA_W-1:0] cpu_wdata,
  output logic [DATA_W-1:0] cpu_rdata,
  // system bus path
  input  logic              bus_en,
  input  sbus_req_t         req,
  output sbus_rsp_t         rsp
);

  logic [7:0] mem_lo [2**AW];
  logic [7:0] mem_hi [2**AW];

  logic              bsel, first, ack_q;
  logic              en, we;
  logic [1:0]        be;
  logic [AW-1:0]     a;
  logic [DATA_W-1:0] wd;
  logic [DATA_W-1:0] bus_rd_q;

  assign bsel  = bus_en && req.cyc && req.mio && is_local(req.addr);
  assign first = bsel && !ack_q;

  // Port multiplexer: the bus path wins while the node is held.
  always_comb begin
    if (bus_en) begin
      en = bsel;
      we = req.we;
      be = req.be;
      a  = req.addr[AW:1];
      wd = req.wdata;
    end else begin
      en = cpu_en;
      we = cpu_we;
      be = cpu_be;
      a  = cpu_addr;
      wd = cpu_wdata;
    end
  end

  always_ff @(posedge clk) begin
    if (en && we && be[0]) mem_lo[a] <= wd[7:0];
    if (en && we && be[1]) mem_hi[a] <= wd[15:8];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ack_q     <= 1'b0;
      bus_rd_q  <= '0;
      cpu_rdata <= '0;
    end else begin
      ack_q    <= first;
      bus_rd_q <= (bsel && !req.we) ? {mem_hi[a], mem_lo[a]} : '0;
      if (!bus_en && cpu_en && !cpu_we) cpu_rdata <= {mem_hi[a], mem_lo[a]};
    end
  end

  assign rsp.ack   = ack_q;
  assign rsp.rdata = bus_rd_q;

endmodule
