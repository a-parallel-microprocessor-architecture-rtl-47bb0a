// bus_arbiter: centralized fixed-priority arbiter of the shared system bus.
//
// Up to NUM_BRQ bus masters raise a request line (brq). A priority encoder
// picks the highest-priority request, line 0 first, and a grant register
// (the BG latch) holds that one grant for as long as its owner keeps its
// request up. The register is reloaded on every clock on which the current
// owner is not requesting (or there is no owner), so a release hands the bus
// to the next requester on the following edge and a request that arrives
// while the bus is busy waits. A multiplexer addressed by the encoded grant
// feeds the owner's own request back to decide the reload, as on the board.
//
// Two control inputs override the grant register (power-up sequence):
//   boot = 1, real = 0 : the register's outputs are off and the pull-up /
//                        pull-down resistors on the BG lines grant line 0
//                        only (processor 0 boots alone from ROM).
//   boot = 1, real = 1 : a byte written by software (grant_wr/grant_data)
//                        drives the BG lines; bit i = 1 grants master i. This
//                        lets processor 0 grant the bus to every node at once
//                        to broadcast the kernel into all local memories.
//   boot = 0           : normal arbitration from the grant register.
//
// token is a positive pulse of TOKEN_CYCLES clocks whenever the owner
// releases the bus; the nodes pass it down a daisy chain to the
// highest-priority idle node, telling it new work may be on the heap.
//
// Timing: request at edge n -> grant visible after edge n+1 if the bus is
// free. Release at edge n -> token pulse and next grant after edge n+1.
//
// From the document: eight request lines, fixed priority with 0 highest,
// grant held until the owner stops requesting, Boot/Real override with
// resistors granting processor 0, software-loaded grant byte, Token pulse on
// release. This design's choices: active-high signals (the board uses
// active-low BRQ\ and BG\ and a 1 in the software byte therefore grants
// here), a synchronous one-shot in place of the 74LS221 monostable, and a
// synchronous reset (the clock chip delivers a synchronised reset) that
// clears the grant register.
module bus_arbiter
  import tf_pkg::*;
#(
  parameter int unsigned N            = NUM_BRQ, // request/grant lines
  parameter int unsigned TOKEN_CYCLES = 3        // one-shot width in clocks
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] brq,          // bus requests, active high
  input  logic         boot,         // power-up: only the boot node runs
  input  logic         real_mode,    // with boot: software grant byte drives BG
  input  logic         grant_wr,     // load the software grant byte
  input  logic [N-1:0] grant_data,
  output logic [N-1:0] bg,           // bus grants, active high
  output logic         owner_valid,  // grant register holds an owner
  output logic [$clog2(N)-1:0] owner,
  output logic         token         // positive pulse on every release
);

  localparam int unsigned IW = $clog2(N);
  localparam int unsigned TW = $clog2(TOKEN_CYCLES + 1);

  logic [N-1:0]  g_q;        // grant register (BG latch)
  logic [N-1:0]  sw_q;       // software grant byte
  logic [N-1:0]  g_next;
  logic          owner_req;  // multiplexer: is the owner still requesting?
  logic          reload;
  logic          release_ev;
  logic [TW-1:0] tok_cnt;

  // Priority encoder and decoder: one-hot grant of the lowest-numbered request.
  always_comb begin
    g_next = '0;
    for (int i = N - 1; i >= 0; i--) begin
      if (brq[i]) g_next = N'(1) << i;
    end
  end

  // Encoder of the current grant (which line owns the bus).
  always_comb begin
    owner_valid = |g_q;
    owner       = '0;
    for (int i = 0; i < N; i++) begin
      if (g_q[i]) owner = IW'(i);
    end
  end

  assign owner_req  = owner_valid && brq[owner];
  assign reload     = !owner_req;
  assign release_ev = owner_valid && !brq[owner];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      g_q <= '0;
    end else if (reload) begin
      g_q <= g_next;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sw_q <= '0;
    end else if (grant_wr) begin
      sw_q <= grant_data;
    end
  end

  // Retriggerable one-shot standing in for the monostable.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      tok_cnt <= '0;
    end else if (release_ev) begin
      tok_cnt <= TW'(TOKEN_CYCLES);
    end else if (tok_cnt != '0) begin
      tok_cnt <= tok_cnt - 1'b1;
    end
  end
  assign token = (tok_cnt != '0);

  // BG line drivers: grant register, software byte, or the boot resistors.
  always_comb begin
    if (!boot) begin
      bg = g_q;
    end else if (real_mode) begin
      bg = sw_q;
    end else begin
      bg    = '0;
      bg[0] = 1'b1;
    end
  end

  // In normal operation at most one master holds the bus.
  a_one_owner: assert property (@(posedge clk) disable iff (!rst_n)
    !boot |-> $onehot0(bg));
  // A held grant is never taken away while its owner still requests.
  a_hold: assert property (@(posedge clk) disable iff (!rst_n)
    (owner_valid && brq[owner]) |=> $stable(g_q));

endmodule
