// DFT infrastructure bridge (DFT-IB): an FPI bus slave that gives the CPU access to the
// test pins of one device under test, and that can also run the whole stored test on
// its own.
//
// Registers (32-bit words at BASE_ADDR + 4*n; other addresses are not answered):
//   0 CMD      R/W  command, see dft_pkg::cmd_e; a write starts the command
//   1 CMDRSP   R    [3:0] response code (dft_pkg::rsp_e), [31:16] set index
//   2 STIM     R/W  [6:0] test stimuli for the external test
//   3 RESP_LO  R    test response [31:0] (DUT outputs)
//   4 RESP_HI  R    [0] test response bit 32 (EDT channel out)
//
// Two concurrent state machines, as in the document:
//   * The bus FSM answers every FPI access, also while a test runs: an addressed
//     request is decoded in the cycle it is first seen, and the next cycle returns
//     ready=1 with ACK_NSC (and read data). A CMD write while a command is running is
//     dropped; the CPU is expected to poll CMDRSP until the code is no longer BUSY.
//   * The command FSM watches the command register. EXT_APPLY drives the STIM value on
//     the DUT pins, waits one cycle for the DUT to react and copies the DUT outputs into
//     the response registers (3 cycles). INT_TEST walks through the DEPTH stored sets:
//     read the set, drive its pattern, let the DUT react, compare the outputs with the
//     stored response except where the mask bit is 1. That is 4 clock cycles per set;
//     with the cycle that decodes the command, a full test of 1095 sets takes 4381
//     cycles, 54.76 us at 80 MHz. The first mismatch ends the test with RSP_FAIL and the
//     failing set index; otherwise RSP_PASS with the number of sets applied.
//
// The four registers, the polling operation, the two FSMs, the pin widths (7 in, 33
// out) and the 1095-set store come from the document. Register offsets, codes, the
// stop-at-first-mismatch rule, the mask polarity and the cycle schedule are this
// design's choices (the schedule was picked to match the document's 54.76 us).
module dft_ib
  import fpi_pkg::*;
  import dft_pkg::*;
#(
  parameter logic [31:0] BASE_ADDR = 32'hF000_1000,
  parameter int unsigned DEPTH     = 1095,
  parameter int unsigned IDX_W     = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             rst_n,
  // FPI slave port
  input  fpi_req_t         fpi_req_i,
  output fpi_rsp_t         fpi_rsp_o,
  // DUT pins
  output dut_in_t          t_out,
  input  dut_out_t         t_in,
  // test data store fill port
  input  logic             ld_en,
  input  logic [IDX_W-1:0] ld_addr,
  input  test_set_t        ld_data
);

  // ---------------------------------------------------------------- registers
  cmd_e               cmd_q;
  logic               cmd_new;     // CMD written, not yet taken by the command FSM
  rsp_e               rsp_code_q;
  logic [15:0]        rsp_idx_q;
  dut_in_t            stim_q;
  logic [RESP_W-1:0]  resp_q;

  // ---------------------------------------------------------------- bus FSM
  typedef enum logic {B_IDLE, B_RESP} bus_state_e;
  bus_state_e  bus_st;
  logic [31:0] rdata_q;
  logic        hit;
  logic [2:0]  reg_sel;
  logic        busy;

  assign reg_sel = fpi_req_i.addr[4:2];
  assign hit = fpi_req_i.req
            && fpi_req_i.addr[31:5] == BASE_ADDR[31:5]
            && fpi_req_i.addr[1:0] == 2'b00
            && reg_sel <= REG_RESP_HI;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bus_st  <= B_IDLE;
      rdata_q <= '0;
      cmd_q   <= CMD_NONE;
      cmd_new <= 1'b0;
      stim_q  <= '0;
    end else begin
      if (cmd_new && !busy) cmd_new <= 1'b0;  // taken by the command FSM
      case (bus_st)
        B_IDLE: if (hit) begin
          bus_st <= B_RESP;
          if (fpi_req_i.wr) begin
            unique case (reg_sel)
              REG_CMD: if (!busy && !cmd_new) begin
                cmd_q   <= cmd_e'(fpi_req_i.wdata[3:0]);
                cmd_new <= 1'b1;
              end
              REG_STIM: stim_q <= dut_in_t'(fpi_req_i.wdata[PAT_W-1:0]);
              default: ;  // read-only registers ignore writes
            endcase
          end else begin
            unique case (reg_sel)
              REG_CMD:     rdata_q <= 32'(cmd_q);
              REG_CMDRSP:  rdata_q <= {rsp_idx_q, 12'h000, rsp_code_q};
              REG_STIM:    rdata_q <= 32'(stim_q);
              REG_RESP_LO: rdata_q <= resp_q[31:0];
              REG_RESP_HI: rdata_q <= 32'(resp_q[RESP_W-1:32]);
              default:     rdata_q <= '0;
            endcase
          end
        end
        B_RESP: bus_st <= B_IDLE;
      endcase
    end
  end

  always_comb begin
    fpi_rsp_o       = '0;
    fpi_rsp_o.en    = (bus_st == B_RESP);
    fpi_rsp_o.ready = (bus_st == B_RESP);
    fpi_rsp_o.ack   = ACK_NSC;
    fpi_rsp_o.rdata = (bus_st == B_RESP) ? rdata_q : '0;
  end

  // ---------------------------------------------------------------- test data store
  logic [IDX_W-1:0] idx_q;
  test_set_t        set_q;

  dft_ib_store #(.DEPTH(DEPTH), .IDX_W(IDX_W)) u_store (
    .clk    (clk),
    .wr_en  (ld_en),
    .wr_addr(ld_addr),
    .wr_data(ld_data),
    .rd_addr(idx_q),
    .rd_data(set_q)
  );

  // ---------------------------------------------------------------- command FSM
  typedef enum logic [2:0] {
    C_IDLE, C_INT_RD, C_INT_DRIVE, C_INT_SETTLE, C_INT_CMP, C_EXT_SETTLE, C_EXT_CAP
  } cmd_state_e;
  cmd_state_e        cmd_st;
  logic [RESP_W-1:0] exp_q, mask_q;
  logic              mismatch;

  assign busy     = (cmd_st != C_IDLE);
  assign mismatch = |((t_in ^ exp_q) & ~mask_q);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cmd_st     <= C_IDLE;
      rsp_code_q <= RSP_IDLE;
      rsp_idx_q  <= '0;
      t_out      <= '0;
      resp_q     <= '0;
      idx_q      <= '0;
      exp_q      <= '0;
      mask_q     <= '0;
    end else begin
      unique case (cmd_st)
        C_IDLE: if (cmd_new) begin
          rsp_idx_q <= '0;
          unique case (cmd_q)
            CMD_INT_TEST: begin
              rsp_code_q <= RSP_BUSY;
              idx_q      <= '0;
              cmd_st     <= C_INT_RD;
            end
            CMD_EXT_APPLY: begin
              rsp_code_q <= RSP_BUSY;
              t_out      <= stim_q;
              cmd_st     <= C_EXT_SETTLE;
            end
            CMD_EXT_END: begin
              t_out      <= '0;
              rsp_code_q <= RSP_DONE;
            end
            default: rsp_code_q <= RSP_BAD_CMD;
          endcase
        end
        // internal test: 4 cycles per stored set
        C_INT_RD:     cmd_st <= C_INT_DRIVE;   // store read in flight
        C_INT_DRIVE: begin
          t_out  <= set_q.pattern;
          exp_q  <= set_q.response;
          mask_q <= set_q.mask;
          cmd_st <= C_INT_SETTLE;
        end
        C_INT_SETTLE: cmd_st <= C_INT_CMP;     // DUT takes its clock pulse
        C_INT_CMP: begin
          resp_q <= t_in;
          if (mismatch) begin
            rsp_code_q <= RSP_FAIL;
            rsp_idx_q  <= 16'(idx_q);
            cmd_st     <= C_IDLE;
          end else if (32'(idx_q) == DEPTH - 1) begin
            rsp_code_q <= RSP_PASS;
            rsp_idx_q  <= 16'(DEPTH);
            cmd_st     <= C_IDLE;
          end else begin
            idx_q  <= idx_q + 1'b1;
            cmd_st <= C_INT_RD;
          end
        end
        // external test: one set supplied by the CPU
        C_EXT_SETTLE: cmd_st <= C_EXT_CAP;
        C_EXT_CAP: begin
          resp_q     <= t_in;
          rsp_code_q <= RSP_DONE;
          cmd_st     <= C_IDLE;
        end
        default: cmd_st <= C_IDLE;
      endcase
    end
  end

  // ---------------------------------------------------------------- checks
  // A response is only given for a request that was seen.
  assert property (@(posedge clk) disable iff (!rst_n)
                   fpi_rsp_o.en |-> $past(fpi_req_i.req));
  // The bridge never answers twice in a row: every access gets exactly one response.
  assert property (@(posedge clk) disable iff (!rst_n)
                   fpi_rsp_o.en |=> !fpi_rsp_o.en);

endmodule
