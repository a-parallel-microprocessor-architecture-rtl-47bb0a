// dma_engine: block-move DMA circuit on the main memory board.
//
// Moves a block of 16-bit words between main memory and the local memories
// of the nodes at one word per clock. It has two address counters: one
// addresses main memory through a private path (ca, a RAM word address),
// the other drives the system address bus (cb, a byte address that steps by
// two). While the DMA runs, the buffer that normally joins the system
// address bus to the memory chips is switched off (dma_en), so a main
// memory read and a local memory write, or the reverse, happen in the same
// clock at two different addresses.
//
// Registers (I/O group IO_DMA, port = 0x40 + offset):
//   0x0 : main memory word address (counter ca)
//   0x2 : system bus byte address bits 15..0 (counter cb)
//   0x4 : system bus byte address bits 19..16 (data bits 3..0)
//   0x6 : word count
//   0x8 : write: bit 0 start, bit 1 direction (0 main -> bus, 1 bus -> main)
//         read : bit 0 busy
// Reads of 0x0..0x6 return the registers, which count as the block moves.
//
// Sequence after start: hold is raised; the DMA waits for targets_ready
// (every node it will talk to has floated its processor and turned its
// transceivers toward the bus); then it streams the block, one word per
// clock after a one-clock pipeline fill; then it drops hold and busy.
//   main -> bus : clock k reads main[ca]; clock k+1 writes it to bus cb.
//   bus -> main : clock k reads bus cb;   clock k+1 writes it to main[ca].
// A block of n words takes n + 1 clocks from the first transfer clock.
//
// From the document: DMA inside main memory, two address counters, the
// buffer with its output control switched against the counters by one
// inverter, simultaneous read and write at different addresses in the two
// memories. This design's choices: the register map, using the processors'
// hold request to borrow the bus and the local memories, the one-word-per-
// clock pipeline.
module dma_engine
  import tf_pkg::*;
#(
  parameter int unsigned RAM_AW = 15
) (
  input  logic              clk,
  input  logic              rst_n,
  // register access (slave on the system bus)
  input  sbus_req_t         req,
  output sbus_rsp_t         rsp,
  // bus mastering
  output logic              busy,
  output logic              hold,          // ask nodes to float their CPUs
  input  logic              targets_ready, // every granted node has done so
  output sbus_req_t         mreq,          // this circuit's bus cycle
  input  logic [DATA_W-1:0] bus_rdata,     // read data returned on the bus
  // private path into main memory
  output logic              mem_en,
  output logic              mem_we,
  output logic [RAM_AW-1:0] mem_addr,
  output logic [DATA_W-1:0] mem_wdata,
  input  logic [DATA_W-1:0] mem_rdata
);

  typedef enum logic [1:0] {S_IDLE, S_HOLD, S_RUN} state_t;

  state_t            state;
  logic [RAM_AW-1:0] ca;
  logic [ADDR_W-1:0] cb;
  logic [15:0]       rd_left, wr_left;
  logic              dir;            // 0 main -> bus, 1 bus -> main
  logic              v1;             // a word read last clock is in flight
  logic [RAM_AW-1:0] ca_w;           // main address of the word in flight
  logic [ADDR_W-1:0] cb_w;           // bus address of the word in flight

  // ---------------- register slave ----------------
  logic        sel, first, ack_q;
  logic [15:0] rdata_q;

  assign sel   = req.cyc && !req.mio && !req.addr[7] && (req.addr[7:4] == IO_DMA);
  assign first = sel && !ack_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ack_q   <= 1'b0;
      rdata_q <= '0;
    end else begin
      ack_q   <= first;
      rdata_q <= '0;
      if (first && !req.we) begin
        unique case (req.addr[3:1])
          3'd0:    rdata_q <= 16'(ca);
          3'd1:    rdata_q <= cb[15:0];
          3'd2:    rdata_q <= {12'h000, cb[19:16]};
          3'd3:    rdata_q <= wr_left;
          3'd4:    rdata_q <= {15'h0000, busy};
          default: rdata_q <= '0;
        endcase
      end
    end
  end

  assign rsp.ack   = ack_q;
  assign rsp.rdata = rdata_q;

  // ---------------- transfer engine ----------------
  logic rd_now;   // issue a read this clock
  logic wr_now;   // complete a write this clock

  assign rd_now = (state == S_RUN) && (rd_left != '0);
  assign wr_now = (state == S_RUN) && v1;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      ca      <= '0;
      cb      <= '0;
      rd_left <= '0;
      wr_left <= '0;
      dir     <= 1'b0;
      v1      <= 1'b0;
      ca_w    <= '0;
      cb_w    <= '0;
    end else begin
      unique case (state)
        S_IDLE: begin
          if (first && req.we) begin
            unique case (req.addr[3:1])
              3'd0: ca          <= req.wdata[RAM_AW-1:0];
              3'd1: cb[15:0]    <= req.wdata;
              3'd2: cb[19:16]   <= req.wdata[3:0];
              3'd3: begin
                rd_left <= req.wdata;
                wr_left <= req.wdata;
              end
              3'd4: begin
                dir <= req.wdata[1];
                if (req.wdata[0] && wr_left != '0) state <= S_HOLD;
              end
              default: ;
            endcase
          end
        end
        S_HOLD: begin
          if (targets_ready) state <= S_RUN;
        end
        S_RUN: begin
          v1 <= rd_now;
          if (rd_now) begin
            rd_left <= rd_left - 1'b1;
            ca_w    <= ca;
            cb_w    <= cb;
            ca      <= ca + 1'b1;
            cb      <= cb + 20'd2;
          end
          if (wr_now) begin
            wr_left <= wr_left - 1'b1;
            if (wr_left == 16'd1) state <= S_IDLE;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);
  assign hold = busy;

  // Private memory path: read at ca (main -> bus) or write the word read
  // from the bus last clock (bus -> main).
  assign mem_en    = (state == S_RUN);
  assign mem_we    = wr_now && dir;
  assign mem_addr  = dir ? ca_w : ca;
  assign mem_wdata = bus_rdata;

  // System bus cycle: write of the word read from main memory last clock
  // (main -> bus), or read at cb (bus -> main).
  always_comb begin
    mreq = SBUS_IDLE;
    if (!dir && wr_now) begin
      mreq.cyc   = 1'b1;
      mreq.we    = 1'b1;
      mreq.mio   = 1'b1;
      mreq.addr  = cb_w;
      mreq.wdata = mem_rdata;
      mreq.be    = 2'b11;
    end else if (dir && rd_now) begin
      mreq.cyc   = 1'b1;
      mreq.we    = 1'b0;
      mreq.mio   = 1'b1;
      mreq.addr  = cb;
      mreq.be    = 2'b11;
    end
  end

  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n)
    wr_now |-> wr_left != '0);

endmodule
