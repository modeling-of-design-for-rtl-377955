// The device under test after scan insertion: a COUNT_W-bit up-counter whose
// flip-flops are mux-D scan cells stitched into N_CHAINS scan chains.
//
// Function: on every DUT clock pulse (ce) with scan_en=0 the counter clears when cnt_rst
// is 1, otherwise increments when cnt_en is 1. Its OUT_W outputs carry the count value,
// zero-extended. With scan_en=1 each pulse shifts all chains by one position instead.
//
// Chain order: count bit i sits in chain (i mod N_CHAINS). Within a chain the data
// enters at the highest bit index and moves towards the lowest one; the chain's scan
// output is its lowest bit, count[c]. With the defaults (10 bits, 4 chains) chains 0
// and 1 hold 3 cells, chains 2 and 3 hold 2.
//
// The 10-bit width, the 32 outputs and the 4 scan chains are the document's; the
// meaning of the three inputs (clock, synchronous reset, enable), the zero-extended
// outputs and the stitching order are this design's choices.
module counter_scan #(
  parameter int unsigned COUNT_W  = 10,
  parameter int unsigned OUT_W    = 32,
  parameter int unsigned N_CHAINS = 4
) (
  input  logic                clk,      // system clock
  input  logic                ce,       // DUT clock pulse
  input  logic                cnt_rst,  // synchronous reset (on ce)
  input  logic                cnt_en,   // count enable
  input  logic                scan_en,
  input  logic [N_CHAINS-1:0] scan_in,
  output logic [N_CHAINS-1:0] scan_out,
  output logic [OUT_W-1:0]    cnt_out
);

  logic [COUNT_W-1:0] q;       // scan cell outputs
  logic [COUNT_W-1:0] d_func;  // functional next state
  logic [COUNT_W-1:0] si;      // scan input of each cell

  always_comb begin
    if (cnt_rst)     d_func = '0;
    else if (cnt_en) d_func = q + 1'b1;
    else             d_func = q;
  end

  for (genvar i = 0; i < COUNT_W; i++) begin : g_cell
    if (i + N_CHAINS < COUNT_W) begin : g_mid
      assign si[i] = q[i+N_CHAINS];
    end else begin : g_head
      assign si[i] = scan_in[i % N_CHAINS];
    end
    scan_dff u_cell (.clk(clk), .ce(ce), .se(scan_en), .si(si[i]), .d(d_func[i]), .q(q[i]));
  end

  for (genvar c = 0; c < N_CHAINS; c++) begin : g_so
    assign scan_out[c] = q[c];
  end

  assign cnt_out = OUT_W'(q);

  initial begin
    assert (COUNT_W >= N_CHAINS) else $error("every scan chain needs at least one cell");
    assert (OUT_W >= COUNT_W) else $error("outputs narrower than the counter");
  end

endmodule
