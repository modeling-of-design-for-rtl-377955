// EDT decompressor: a ring generator (a linear finite state machine) fed by the EDT
// scan channel, followed by a phase shifter that drives N_CHAINS scan chains from one
// channel.
//
// Ring generator: RG_W-bit shift ring in Galois form. On each step the state moves one
// position up; bit 0 receives the top bit XOR the channel input, and every bit i whose
// RG_TAPS[i] is 1 also XORs in the top bit. The default taps give the characteristic
// polynomial x^8+x^6+x^5+x^4+1. While scan_en is 0 (capture or functional mode) the
// ring is held at zero, so every scan load starts from a known state.
// Phase shifter: chain c receives the XOR of the ring bits selected by PS_TAPS[c].
// chain_in is combinational from the ring state; step is a one-cycle pulse (the LPCT
// clock edge).
//
// The structure (ring generator plus phase shifter, one channel in) follows the
// document; the ring size, polynomial, taps and the clear-on-capture rule are this
// design's own choices.
module edt_decompressor #(
  parameter int unsigned RG_W     = 8,
  parameter int unsigned N_CHAINS = 4,
  parameter logic [RG_W-1:0] RG_TAPS = 8'b0111_0000,
  parameter logic [N_CHAINS-1:0][RG_W-1:0] PS_TAPS =
    {8'b0101_0000, 8'b1000_0100, 8'b0010_0010, 8'b0000_1001}
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                step,     // advance the ring (LPCT clock pulse)
  input  logic                scan_en,  // 0: hold the ring cleared
  input  logic                ch_in,    // EDT scan channel input
  output logic [N_CHAINS-1:0] chain_in  // to the scan inputs of the chains
);

  logic [RG_W-1:0] state, nxt;

  always_comb begin
    nxt[0] = state[RG_W-1] ^ ch_in;
    for (int i = 1; i < RG_W; i++)
      nxt[i] = state[i-1] ^ (RG_TAPS[i] & state[RG_W-1]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       state <= '0;
    else if (!scan_en) state <= '0;
    else if (step)    state <= nxt;
  end

  always_comb begin
    for (int c = 0; c < N_CHAINS; c++)
      chain_in[c] = ^(state & PS_TAPS[c]);
  end

endmodule
