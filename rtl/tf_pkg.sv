// tf_pkg: types and constants shared by the task flow multiprocessor.
//
// The machine is four 8086-class nodes, a control board and a main memory
// board on one shared system bus (20-bit address, 16-bit data, byte lanes
// selected by A0 and BHE as on the 8086). The system bus is modelled here as
// a request/response pair of packed structs rather than tri-state wires:
// every master drives a sbus_req_t, the top selects the driving master from
// the bus grants, and every slave returns a sbus_rsp_t that the top ORs.
//
// Address map. The 8086 sees 1 MiB. From the processor and memory board
// schematics: a node keeps A19:A18 = 00 for its own local memory; the main
// memory board answers when A19 or A18 is set, its boot ROM in the top 64 KiB
// (A19 = 1, A18..A16 = 111). The exact place of main RAM inside the rest and
// the I/O port numbers are this design's choice.
package tf_pkg;

  localparam int unsigned ADDR_W    = 20;   // 8086 address bus
  localparam int unsigned DATA_W    = 16;   // 8086 data bus
  localparam int unsigned NUM_NODES = 4;    // built with four nodes
  localparam int unsigned NUM_BRQ   = 8;    // arbiter built for eight

  // I/O port groups on the system bus (port address bits 7..4). Ports with
  // A7 = 1 stay on the node and never reach the system bus.
  localparam logic [3:0] IO_USART = 4'h0;   // 8251A, C/D on A1
  localparam logic [3:0] IO_CTRL  = 4'h1;   // 74LS259 control latch, Q index on A3..A1
  localparam logic [3:0] IO_GRANT = 4'h2;   // arbiter software grant byte
  localparam logic [3:0] IO_DISP  = 4'h3;   // HDSP-2112 display, char address on A4..A1
  localparam logic [3:0] IO_DMA   = 4'h4;   // DMA registers on the main memory board

  // Control latch bit numbers.
  localparam int unsigned CTRL_REAL   = 0;  // Q0 drives Real
  localparam int unsigned CTRL_NBOOT  = 1;  // Q1, inverted, drives Boot

  // Node-local I/O latch (74HC259 on the processor board) bit numbers.
  localparam int unsigned NODE_BRQ = 0;     // Q0 -> BRQ (bus request)
  localparam int unsigned NODE_IU  = 1;     // Q1 -> IU (processor in use)

  // One system bus cycle as a master drives it.
  typedef struct packed {
    logic                 cyc;    // a transfer is under way
    logic                 we;     // write (else read)
    logic                 mio;    // 1 = memory, 0 = I/O (8086 M/IO)
    logic [ADDR_W-1:0]    addr;
    logic [DATA_W-1:0]    wdata;
    logic [1:0]           be;     // byte lanes: [0] = even (A0 = 0), [1] = odd (BHE)
  } sbus_req_t;

  // A slave's answer. rdata must be zero when the slave is not answering so
  // that the top can OR all slaves together.
  typedef struct packed {
    logic                 ack;
    logic [DATA_W-1:0]    rdata;
  } sbus_rsp_t;

  localparam sbus_req_t SBUS_IDLE = '{default: '0};
  localparam sbus_rsp_t SRSP_NONE = '{default: '0};

  // Memory cycle aimed at a node's local memory (A19:A18 = 00)?
  function automatic logic is_local(input logic [ADDR_W-1:0] a);
    return a[19:18] == 2'b00;
  endfunction

  // I/O cycle that stays on the node (A7 = 1)?
  function automatic logic is_node_io(input logic [ADDR_W-1:0] a);
    return a[7];
  endfunction

endpackage
