// Internal test data storage of the DFT infrastructure bridge: DEPTH sets of
// {pattern, fault-free response, mask}, SET_W bits each (1095 x 73 bits by default,
// the size of the document's test).
//
// The bridge reads it through a synchronous read port: the set at rd_addr appears on
// rd_data one clock later. The write port fills the storage once, before any internal
// test (it stands for programming the store at production or from non-volatile memory);
// how the store gets its content is this design's choice, the document only says the
// test data is kept inside the bridge.
module dft_ib_store
  import dft_pkg::*;
#(
  parameter int unsigned DEPTH  = 1095,
  parameter int unsigned IDX_W  = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             wr_en,
  input  logic [IDX_W-1:0] wr_addr,
  input  test_set_t        wr_data,
  input  logic [IDX_W-1:0] rd_addr,
  output test_set_t        rd_data
);

  test_set_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (wr_en && 32'(wr_addr) < DEPTH) mem[wr_addr] <= wr_data;
    rd_data <= mem[rd_addr];
  end

endmodule
