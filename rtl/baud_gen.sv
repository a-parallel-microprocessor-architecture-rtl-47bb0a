// baud_gen: serial-link clock divider of the control board.
//
// The clock chip runs from a 14.7456 MHz crystal and gives the processor
// clock CLK = 14.7456 / 3 = 4.9152 MHz and the peripheral clock
// PCLK = CLK / 2 = 2.4576 MHz. A 4-bit binary counter (74LS161) counts PCLK
// and a jumper (JP1) picks one of its outputs as the transmit/receive clock
// of the serial controller:
//   sel = 0 (JP1 a): QA = PCLK/2  = 1.2288 MHz = 64 x 19200 baud
//   sel = 1 (JP1 b): QB = PCLK/4  = 614.4 kHz  = 64 x  9600 baud
//   sel = 2 (JP1 c): QC = PCLK/8  = 307.2 kHz  = 64 x  4800 baud
//   sel = 3 (JP1 d): QD = PCLK/16 = 153.6 kHz  = 64 x  2400 baud
// so the controller runs in its divide-by-64 mode.
//
// Here everything runs on CLK: one 5-bit counter whose bit 0 is PCLK and
// whose bits 1..4 are the 74LS161 outputs QA..QD. baud_clk is a square wave
// of period 2^(sel+2) CLK cycles; baud_tick is a one-clock pulse at each of
// its rising edges, for logic that prefers a clock enable.
//
// From the document: crystal frequency, the counter, the four jumper settings
// and their baud rates. This design's choice: deriving PCLK as a counter bit
// on the processor clock rather than a separate clock net, and the reset.
module baud_gen (
  input  logic       clk,        // processor clock CLK
  input  logic       rst_n,
  input  logic [1:0] sel,        // JP1 a..d
  output logic       pclk,       // peripheral clock, CLK/2
  output logic       baud_clk,   // TxC/RxC of the serial controller
  output logic       baud_tick
);

  logic [4:0] cnt;
  logic       baud_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cnt    <= '0;
      baud_q <= 1'b0;
    end else begin
      cnt    <= cnt + 1'b1;
      baud_q <= baud_clk;
    end
  end

  assign pclk      = cnt[0];
  assign baud_clk  = cnt[3'd1 + 3'(sel)];
  assign baud_tick = baud_clk && !baud_q;

endmodule
