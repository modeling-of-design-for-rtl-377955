// Device under test as the test bridge sees it: the scan-inserted counter with its
// EDT logic (decompressor, compactor, bypass). 7 input pins, 33 output pins.
//
// Clocking: the whole block runs on the system clock clk. The DUT's clock pin
// (pins_i.cnt_clk) and the LPCT clock pin (pins_i.lpct_clk) are level signals from the
// bridge's pattern register; a 0->1 change of either, seen against its value in the
// previous cycle, is one clock pulse for the scan cells or for the ring generator.
// The state therefore changes at the end of the first cycle in which the new pattern is
// present, and the outputs show the new state from the next cycle on.
//
// EDT mode (edt_bypass=0): the channel input feeds the decompressor, whose phase shifter
// loads the 4 chains; the compactor XORs the 4 chain outputs onto the channel output.
// Bypass mode (edt_bypass=1): the chains are joined into one chain, channel in -> chain
// 0 -> 1 -> 2 -> 3 -> channel out, and the decompressor is not used.
// Outside scan (scan_en=0) the counter works functionally from cnt_rst and cnt_en.
//
// The pin list (3 counter inputs, 32 outputs, scan enable, one EDT channel pair, EDT
// bypass, LPCT clock) follows the document; the clock-as-data scheme, the use of the
// LPCT clock as the EDT clock and the bypass order are this design's choices.
module edt_counter
  import dft_pkg::*;
#(
  parameter int unsigned COUNT_W  = 10,
  parameter int unsigned N_CHAINS = 4,
  parameter int unsigned RG_W     = 8
) (
  input  logic     clk,
  input  logic     rst_n,   // clears only the clock edge detectors
  input  dut_in_t  pins_i,
  output dut_out_t pins_o
);

  logic cnt_clk_q, lpct_clk_q;
  logic dut_pulse, edt_pulse;
  logic [N_CHAINS-1:0] chain_in, chain_si, chain_so;
  logic                compact_out;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt_clk_q  <= 1'b0;
      lpct_clk_q <= 1'b0;
    end else begin
      cnt_clk_q  <= pins_i.cnt_clk;
      lpct_clk_q <= pins_i.lpct_clk;
    end
  end

  assign dut_pulse = pins_i.cnt_clk  & ~cnt_clk_q;
  assign edt_pulse = pins_i.lpct_clk & ~lpct_clk_q;

  edt_decompressor #(.RG_W(RG_W), .N_CHAINS(N_CHAINS)) u_decomp (
    .clk     (clk),
    .rst_n   (rst_n),
    .step    (edt_pulse),
    .scan_en (pins_i.scan_en),
    .ch_in   (pins_i.edt_ch_in),
    .chain_in(chain_in)
  );

  // Scan input selection: decompressor outputs, or the bypass concatenation.
  always_comb begin
    if (pins_i.edt_bypass) begin
      chain_si[0] = pins_i.edt_ch_in;
      for (int c = 1; c < N_CHAINS; c++) chain_si[c] = chain_so[c-1];
    end else begin
      chain_si = chain_in;
    end
  end

  counter_scan #(.COUNT_W(COUNT_W), .OUT_W(CNT_OUT_W), .N_CHAINS(N_CHAINS)) u_cnt (
    .clk     (clk),
    .ce      (dut_pulse),
    .cnt_rst (pins_i.cnt_rst),
    .cnt_en  (pins_i.cnt_en),
    .scan_en (pins_i.scan_en),
    .scan_in (chain_si),
    .scan_out(chain_so),
    .cnt_out (pins_o.cnt_out)
  );

  edt_compactor #(.N_CHAINS(N_CHAINS)) u_compact (
    .chain_out(chain_so),
    .ch_out   (compact_out)
  );

  assign pins_o.edt_ch_out = pins_i.edt_bypass ? chain_so[N_CHAINS-1] : compact_out;

endmodule
