// Muxed-D scan cell: a D flip-flop with a 2:1 multiplexer in front of it.
// With se=0 the cell captures its functional input d; with se=1 it captures the scan
// input si, so that cells chained through so->si form a shift register (scan chain).
// so is simply the stored value q.
//
// The cell follows the usual mux-D structure. It runs on the system clock clk and only
// updates in cycles where the clock-enable ce is 1: in this design the clock pin of the
// device under test is an ordinary signal driven by the test bridge, and ce marks the
// cycles in which that pin rises (see edt_counter). The cell has no reset of its own;
// its content is set by the functional logic or by scan load.
module scan_dff (
  input  logic clk,
  input  logic ce,  // one-cycle pulse: the DUT clock edge
  input  logic se,  // scan enable
  input  logic si,  // scan in
  input  logic d,   // functional data in
  output logic q    // data out, also the scan out
);

  always_ff @(posedge clk) begin
    if (ce) q <= se ? si : d;
  end

endmodule
