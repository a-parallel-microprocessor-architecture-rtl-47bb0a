// ctrl_regs: I/O side of the control board.
//
// Decodes I/O cycles on the system bus (M/IO = 0, port bit A7 = 0) by port
// bits A7..A4, the way the board's 74LS139 decoders split the port space,
// and serves four groups:
//   IO_USART : chip select of the serial controller to the host (8251A),
//              register select C/D on A1. The controller itself is outside
//              this design; its select, strobes and data are ports.
//   IO_CTRL  : the addressable control latch (74LS259). A write sets latch
//              bit Q[A3..A1] to data bit D0. Q0 is Real, Q1 inverted is Boot,
//              so reset (all bits cleared) leaves Real low and Boot high, the
//              power-up state in which only processor 0 runs.
//   IO_GRANT : strobe that loads the arbiter's software grant byte from D7..D0.
//   IO_DISP  : the eight-character diagnostic display, character address on
//              A4..A1; also outside this design and brought out as ports.
// Other port groups are left for other boards to answer.
//
// Timing: a selected cycle is acknowledged one clock after it appears; the
// write side effect happens on that same first edge, and read data (USART
// only, others read zero) is registered with the acknowledge.
//
// From the document: the control latch making Real low and Boot high upon
// reset, the USART, the display and the arbiter's software grant latch on
// the control board. This design's choices: the port numbers, the bit
// assignment of the latch, and the one-cycle acknowledge.
module ctrl_regs
  import tf_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  sbus_req_t   req,
  output sbus_rsp_t   rsp,
  // control latch
  output logic        real_mode,
  output logic        boot,
  output logic [7:0]  ctrl_q,
  // arbiter software grant byte
  output logic        grant_wr,
  output logic [7:0]  grant_data,
  // serial controller (outside this design)
  output logic        usart_cs,
  output logic        usart_cd,
  output logic        usart_wr,
  output logic        usart_rd,
  output logic [7:0]  usart_wdata,
  input  logic [7:0]  usart_rdata,
  // diagnostic display (outside this design)
  output logic        disp_wr,
  output logic [3:0]  disp_addr,
  output logic [7:0]  disp_wdata
);

  logic       io_cyc;
  logic       sel_usart, sel_ctrl, sel_grant, sel_disp, sel_any;
  logic       first;      // first clock of a selected cycle
  logic       ack_q;
  logic [7:0] rdata_q;

  assign io_cyc    = req.cyc && !req.mio && !req.addr[7];
  assign sel_usart = io_cyc && (req.addr[7:4] == IO_USART);
  assign sel_ctrl  = io_cyc && (req.addr[7:4] == IO_CTRL);
  assign sel_grant = io_cyc && (req.addr[7:4] == IO_GRANT);
  assign sel_disp  = io_cyc && (req.addr[7:4] == IO_DISP);
  assign sel_any   = sel_usart || sel_ctrl || sel_grant || sel_disp;
  assign first     = sel_any && !ack_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ack_q   <= 1'b0;
      rdata_q <= '0;
    end else begin
      ack_q   <= first;
      rdata_q <= (first && sel_usart && !req.we) ? usart_rdata : 8'h00;
    end
  end

  // 74LS259 addressable latch: one bit written per cycle, cleared by reset.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ctrl_q <= '0;
    end else if (first && sel_ctrl && req.we) begin
      ctrl_q[req.addr[3:1]] <= req.wdata[0];
    end
  end

  assign real_mode = ctrl_q[CTRL_REAL];
  assign boot      = !ctrl_q[CTRL_NBOOT];

  assign grant_wr    = first && sel_grant && req.we;
  assign grant_data  = req.wdata[7:0];

  assign usart_cs    = first && sel_usart;
  assign usart_cd    = req.addr[1];
  assign usart_wr    = first && sel_usart && req.we;
  assign usart_rd    = first && sel_usart && !req.we;
  assign usart_wdata = req.wdata[7:0];

  assign disp_wr     = first && sel_disp && req.we;
  assign disp_addr   = req.addr[4:1];
  assign disp_wdata  = req.wdata[7:0];

  assign rsp.ack   = ack_q;
  assign rsp.rdata = {8'h00, rdata_q};

endmodule
