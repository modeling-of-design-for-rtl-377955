// EDT spatial compactor: folds the scan outputs of N_CHAINS chains into the single
// EDT scan channel output with an XOR tree, so a response bit that differs in exactly
// one chain shows up on the channel. Purely combinational.
// The XOR compaction follows the document's description of the compactor; the masking
// (gating) logic that the document mentions is not part of this block.
module edt_compactor #(
  parameter int unsigned N_CHAINS = 4
) (
  input  logic [N_CHAINS-1:0] chain_out,
  output logic                ch_out
);

  assign ch_out = ^chain_out;

endmodule
