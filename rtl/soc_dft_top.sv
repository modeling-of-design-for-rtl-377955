// In-field structural test infrastructure of an SoC: the peripheral side of the FPI
// bus with a DFT infrastructure bridge (DFT-IB) wired to a scan/EDT-equipped device
// under test, and an FPI-to-Wishbone translator for the CAN controller that links the
// SoC to an external tester.
//
// The CPU (through its LFI bridge, an FPI master) reaches two slaves through the FPI
// bus multiplexer: slave 0 is the DFT-IB at DFTIB_BASE (5 registers), slave 1 is the
// Wishbone translator at CAN_BASE (a 1 KiB window). The DFT-IB drives the 7 input pins
// of the DUT (a 10-bit counter with 4 scan chains behind one EDT channel) and reads its
// 33 outputs. For an internal test the CPU only writes the command and polls the
// response; for an external test it writes each stimuli set received from the tester,
// issues an apply command and reads back the response.
//
// Outside this block: the CPU, its memories and LFI bridge (fpi_req_i / fpi_rsp_o),
// the CAN controller (the wb_* ports) and whatever fills the internal test store
// (the ld_* ports). t_out_o / t_in_o show the DUT pins.
// The system partitioning follows the document; base addresses lie in the peripheral
// range 0xF000_0000 to 0xF7FF_FFFF that the document lists as usable, their exact
// values are this design's choice.
module soc_dft_top
  import fpi_pkg::*;
  import dft_pkg::*;
#(
  parameter logic [31:0] DFTIB_BASE = 32'hF000_1000,
  parameter logic [31:0] CAN_BASE   = 32'hF000_2000,
  parameter int unsigned DEPTH      = 1095,
  parameter int unsigned IDX_W      = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             rst_n,
  // FPI master (CPU via LFI bridge)
  input  fpi_req_t         fpi_req_i,
  output fpi_rsp_t         fpi_rsp_o,
  // Wishbone to the CAN controller
  output logic             wb_cyc_o,
  output logic             wb_stb_o,
  output logic             wb_we_o,
  output logic [7:0]       wb_adr_o,
  output logic [7:0]       wb_dat_o,
  input  logic [7:0]       wb_dat_i,
  input  logic             wb_ack_i,
  // internal test data store fill
  input  logic             ld_en,
  input  logic [IDX_W-1:0] ld_addr,
  input  test_set_t        ld_data,
  // DUT pins, for observation
  output dut_in_t          t_out_o,
  output dut_out_t         t_in_o
);

  localparam int unsigned N_SLAVES = 2;

  fpi_rsp_t slave_rsp [N_SLAVES];
  logic [N_SLAVES-1:0] sel_unused;
  dut_in_t  t_out;
  dut_out_t t_in;

  dft_ib #(.BASE_ADDR(DFTIB_BASE), .DEPTH(DEPTH), .IDX_W(IDX_W)) u_dftib (
    .clk      (clk),
    .rst_n    (rst_n),
    .fpi_req_i(fpi_req_i),
    .fpi_rsp_o(slave_rsp[0]),
    .t_out    (t_out),
    .t_in     (t_in),
    .ld_en    (ld_en),
    .ld_addr  (ld_addr),
    .ld_data  (ld_data)
  );

  fpi_wb_bridge #(.BASE_ADDR(CAN_BASE), .WIN_W(10), .WB_AW(8), .WB_DW(8)) u_fpi2wb (
    .clk      (clk),
    .rst_n    (rst_n),
    .fpi_req_i(fpi_req_i),
    .fpi_rsp_o(slave_rsp[1]),
    .wb_cyc_o (wb_cyc_o),
    .wb_stb_o (wb_stb_o),
    .wb_we_o  (wb_we_o),
    .wb_adr_o (wb_adr_o),
    .wb_dat_o (wb_dat_o),
    .wb_dat_i (wb_dat_i),
    .wb_ack_i (wb_ack_i)
  );

  fpi_mux #(.N_SLAVES(N_SLAVES)) u_mux (
    .rsp_i(slave_rsp),
    .rsp_o(fpi_rsp_o),
    .sel_o(sel_unused)
  );

  edt_counter u_dut (
    .clk   (clk),
    .rst_n (rst_n),
    .pins_i(t_out),
    .pins_o(t_in)
  );

  assign t_out_o = t_out;
  assign t_in_o  = t_in;

endmodule
