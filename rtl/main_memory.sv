// main_memory: the shared main memory board.
//
// Holds the program, the task list, the task heap and the data heap that all
// nodes share, plus the boot ROM that processor 0 runs after power-up.
//   RAM : 2^RAM_AW 16-bit words (default 32 Ki words = 64 KiB, eight 8 KiB
//         6264 chips as four even/odd pairs). The even bank holds D7..D0 and
//         is written when be[0] (A0 = 0), the odd bank D15..D8 when be[1]
//         (BHE). The RAM chips see A13..A1; A15..A14 pick the chip pair, so
//         the word address is addr[RAM_AW:1].
//   ROM : 2^ROM_AW 16-bit words (default 4 Ki words = two 4 KiB 2732s), word
//         address A12..A1, read only, optionally filled from ROM_INIT.
// The board answers memory cycles with A19 or A18 set (A19:A18 = 00 is local
// memory on every node). The ROM occupies the top 64 KiB (A19 = 1 and
// A18..A16 = 111, where the 8086 starts after reset); the RAM answers the
// rest and repeats every 64 KiB.
//
// DMA port: the DMA circuit sits on this board with its own address counter
// into the memory. While dma_en is high the buffer between the system
// address bus and the memory is off, the memory answers only the DMA port
// (RAM only) and the system bus side stays silent.
//
// Timing: writes happen on every edge a selected write cycle is present
// (a master holds a cycle until acknowledged, so repeats are harmless); read
// data is registered, valid one clock after the address, and zero when the
// board is not answering so the bus can OR all slaves. ack is a one-clock
// pulse one clock after a cycle starts.
//
// From the document: 6264 RAM in byte banks selected by A0/BHE, A14/A15 chip
// pair decode, 2732 ROM pair, board select from A18/A19, ROM decode on
// A16..A19, DMA inside main memory with a separated address path. This
// design's choices: the exact placement and mirroring of RAM, the
// one-cycle read.
module main_memory
  import tf_pkg::*;
#(
  parameter int unsigned RAM_AW   = 15,  // word address bits of RAM
  parameter int unsigned ROM_AW   = 12,  // word address bits of ROM
  parameter string       ROM_INIT = ""   // optional hex image of the ROM
) (
  input  logic              clk,
  input  logic              rst_n,
  input  sbus_req_t         req,
  output sbus_rsp_t         rsp,
  // private port of the DMA circuit
  input  logic              dma_en,
  input  logic              dma_we,
  input  logic [RAM_AW-1:0] dma_addr,
  input  logic [DATA_W-1:0] dma_wdata,
  output logic [DATA_W-1:0] dma_rdata
);

  logic [7:0]        ram_lo [2**RAM_AW];   // even bytes, D7..D0
  logic [7:0]        ram_hi [2**RAM_AW];   // odd bytes, D15..D8
  logic [DATA_W-1:0] rom    [2**ROM_AW];

  initial begin
    for (int i = 0; i < 2**ROM_AW; i++) rom[i] = '0;
    if (ROM_INIT != "") $readmemh(ROM_INIT, rom);
  end

  logic              sel, sel_rom, sel_ram, first, ack_q;
  logic [RAM_AW-1:0] ram_a;
  logic [ROM_AW-1:0] rom_a;
  logic [DATA_W-1:0] rdata_q;

  assign sel     = req.cyc && req.mio && (req.addr[19] || req.addr[18]) && !dma_en;
  assign sel_rom = sel && (req.addr[19:16] == 4'hF);
  assign sel_ram = sel && !sel_rom;
  assign first   = sel && !ack_q;
  assign ram_a   = dma_en ? dma_addr : req.addr[RAM_AW:1];
  assign rom_a   = req.addr[ROM_AW:1];

  always_ff @(posedge clk) begin
    if ((sel_ram && req.we && req.be[0]) || (dma_en && dma_we)) begin
      ram_lo[ram_a] <= dma_en ? dma_wdata[7:0] : req.wdata[7:0];
    end
    if ((sel_ram && req.we && req.be[1]) || (dma_en && dma_we)) begin
      ram_hi[ram_a] <= dma_en ? dma_wdata[15:8] : req.wdata[15:8];
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ack_q     <= 1'b0;
      rdata_q   <= '0;
      dma_rdata <= '0;
    end else begin
      ack_q     <= first;
      rdata_q   <= '0;
      if (sel_rom && !req.we) rdata_q <= rom[rom_a];
      if (sel_ram && !req.we) rdata_q <= {ram_hi[ram_a], ram_lo[ram_a]};
      dma_rdata <= dma_en ? {ram_hi[ram_a], ram_lo[ram_a]} : '0;
    end
  end

  assign rsp.ack   = ack_q;
  assign rsp.rdata = rdata_q;

endmodule
