// End-to-end test of the in-field test infrastructure at its default size (1095 test
// data sets), with the testbench playing the CPU (an FPI master), the CAN controller
// (a Wishbone register model) and the production step that fills the test store.
//
// Test data: as in a scan/EDT test, the pin sequence is a functional reset, then 28
// scan patterns (10 shift steps through the EDT decompressor, or through the bypass
// for every fourth pattern, then a capture step with random functional inputs), then
// functional counting up to 1095 sets. A second, separate edt_counter instance is
// driven with that sequence and its outputs are tapped to form the fault-free
// responses; set 0 (state not yet reset) is fully masked.
//
// Scenarios, each counted and required at least once:
//   internal test passing, in 4*1095+1 cycles;
//   internal test failing on a corrupted stored response (reports that set);
//   internal test detecting a stuck-at-0 on the DUT's EDT compactor output;
//   external test: the CPU applies all 1095 sets one by one and compares the
//   responses itself; CAN controller register access through the Wishbone translator,
//   including one retried transfer; bus multiplexer answering for both slaves.
module tb_soc_dft_top;
  import fpi_pkg::*;
  import dft_pkg::*;
  localparam logic [31:0] DFTIB = 32'hF000_1000;
  localparam logic [31:0] CAN   = 32'hF000_2000;
  localparam int DEPTH = 1095;
  localparam int IW = $clog2(DEPTH);

  logic clk = 1'b0, rst_n = 1'b0;
  fpi_req_t req;
  fpi_rsp_t rsp;
  logic wb_cyc, wb_stb, wb_we, wb_ack;
  logic [7:0] wb_adr, wb_dat_o, wb_dat_i;
  logic ld_en;
  logic [IW-1:0] ld_addr;
  test_set_t ld_data;
  dut_in_t  t_out;
  dut_out_t t_in;

  int checks = 0, failures = 0;
  int n_int_pass = 0, n_int_fail = 0, n_stuck = 0, n_ext_sets = 0, n_can = 0,
      n_retry = 0, n_dftib_ans = 0, n_can_ans = 0, n_edt_shift = 0, n_byp_shift = 0;

  soc_dft_top dut (
    .clk(clk), .rst_n(rst_n), .fpi_req_i(req), .fpi_rsp_o(rsp),
    .wb_cyc_o(wb_cyc), .wb_stb_o(wb_stb), .wb_we_o(wb_we), .wb_adr_o(wb_adr),
    .wb_dat_o(wb_dat_o), .wb_dat_i(wb_dat_i), .wb_ack_i(wb_ack),
    .ld_en(ld_en), .ld_addr(ld_addr), .ld_data(ld_data),
    .t_out_o(t_out), .t_in_o(t_in));

  always #6.25 clk = ~clk;  // 80 MHz

  initial begin
    #10ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL: %s", msg); end
  endtask

  // ---------------- golden DUT copy, used only to tap fault-free responses
  dut_in_t  g_in;
  dut_out_t g_out;
  edt_counter golden (.clk(clk), .rst_n(rst_n), .pins_i(g_in), .pins_o(g_out));

  // ---------------- CAN controller stand-in on the Wishbone port
  logic [7:0] can_regs [256];
  always @(posedge clk) begin
    if (wb_cyc && wb_stb && !wb_ack) begin
      wb_ack <= 1'b1;
      wb_dat_i <= can_regs[wb_adr];
      if (wb_we) can_regs[wb_adr] <= wb_dat_o;
    end else wb_ack <= 1'b0;
  end

  // ---------------- FPI master (CPU through the LFI bridge)
  task automatic access(input bit wr, input logic [31:0] addr, input logic [31:0] wdata,
                        input bit drop, output logic [31:0] rdata, output fpi_ack_e ack);
    int e = 0;
    req.req = 1; req.wr = wr; req.addr = addr; req.wdata = wdata;
    do begin
      @(posedge clk); #1;
      e++;
      if (drop && e == 1) req.req = 0;
    end while (!(rsp.en && rsp.ready) && e < 100);
    check(e < 100, $sformatf("bus answer at %h", addr));
    if (addr[31:12] == DFTIB[31:12]) n_dftib_ans++; else n_can_ans++;
    rdata = rsp.rdata; ack = rsp.ack;
    req = '0;
  endtask

  task automatic wr_reg(input logic [2:0] r, input logic [31:0] v);
    logic [31:0] d; fpi_ack_e a;
    access(1, DFTIB + 32'(r) * 4, v, 0, d, a);
  endtask
  task automatic rd_reg(input logic [2:0] r, output logic [31:0] v);
    fpi_ack_e a;
    access(0, DFTIB + 32'(r) * 4, 0, 0, v, a);
  endtask
  task automatic poll(output logic [31:0] v);
    int n = 0;
    do begin rd_reg(REG_CMDRSP, v); n++; end while (v[3:0] == RSP_BUSY && n < 20000);
  endtask

  // ---------------- test data
  dut_in_t   pats [DEPTH];
  test_set_t sets [DEPTH];
  int np;

  task automatic add(dut_in_t p);
    if (np < DEPTH) begin
      pats[np] = p; np++;
      if (p.scan_en && p.cnt_clk) begin
        if (p.edt_bypass) n_byp_shift++; else n_edt_shift++;
      end
    end
  endtask

  // one tester step with a clock pulse: clocks low, then clocks high
  task automatic step(dut_in_t p, bit lpct);
    p.cnt_clk = 0; p.lpct_clk = 0; add(p);
    p.cnt_clk = 1; p.lpct_clk = lpct; add(p);
  endtask

  task automatic make_patterns();
    dut_in_t p;
    np = 0;
    p = '0; p.cnt_rst = 1;
    step(p, 0);
    for (int v = 0; v < 28; v++) begin
      p = '0; p.scan_en = 1; p.edt_bypass = (v % 4 == 3);
      for (int s = 0; s < 10; s++) begin
        p.edt_ch_in = 1'($urandom);
        step(p, !p.edt_bypass);
      end
      p = '0; p.cnt_en = 1'($urandom); p.cnt_rst = (($urandom % 6) == 0);
      step(p, 0);
    end
    p = '0; p.cnt_en = 1;
    while (np < DEPTH) step(p, 0);
  endtask

  // tap the golden copy: pattern applied, one clock for the DUT to react, sample
  task automatic make_responses();
    for (int i = 0; i < DEPTH; i++) begin
      g_in = pats[i];
      @(posedge clk); #1;
      sets[i].pattern  = pats[i];
      sets[i].response = g_out;
      sets[i].mask     = (i == 0) ? '1 : '0;
    end
    g_in = '0;
  endtask

  task automatic load_store();
    ld_en = 1;
    for (int i = 0; i < DEPTH; i++) begin
      ld_addr = IW'(i); ld_data = sets[i];
      @(posedge clk); #1;
    end
    ld_en = 0;
  endtask

  // internal test duration, measured from the CMD write to the result code
  int cyc = 0, t_cmd = 0, t_end = 0;
  rsp_e prev_code = RSP_IDLE;
  always @(posedge clk) begin
    cyc++;
    if (req.req && req.wr && req.addr == DFTIB && !rsp.en) t_cmd = cyc;
    if (dut.u_dftib.rsp_code_q != RSP_BUSY && prev_code == RSP_BUSY) t_end = cyc - 1;
    prev_code = dut.u_dftib.rsp_code_q;
  end

  initial begin
    logic [31:0] v, v2;
    fpi_ack_e a;
    req = '0; ld_en = 0; ld_addr = '0; ld_data = '0; g_in = '0; wb_ack = 0; wb_dat_i = '0;
    for (int i = 0; i < 256; i++) can_regs[i] = '0;
    make_patterns();
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    make_responses();
    load_store();

    // ---- internal test, fault-free DUT
    wr_reg(REG_CMD, CMD_INT_TEST);
    poll(v);
    check(v[3:0] == RSP_PASS && v[31:16] == DEPTH, $sformatf("internal test pass, rsp %h", v));
    check(t_end - t_cmd == 4 * DEPTH + 1,
          $sformatf("internal test %0d cycles, expected %0d", t_end - t_cmd, 4 * DEPTH + 1));
    $display("internal test: %0d cycles = %0.2f us at 80 MHz", t_end - t_cmd, (t_end - t_cmd) / 80.0);
    if (v[3:0] == RSP_PASS) n_int_pass++;

    // ---- internal test, DUT with a stuck-at-0 fault on the compactor output
    force dut.u_dut.compact_out = 1'b0;
    wr_reg(REG_CMD, CMD_INT_TEST);
    poll(v);
    release dut.u_dut.compact_out;
    check(v[3:0] == RSP_FAIL, $sformatf("stuck-at fault detected, rsp %h", v));
    if (v[3:0] == RSP_FAIL) begin
      n_stuck++;
      check(sets[v[31:16]].response[32] == 1'b1 && pats[v[31:16]].edt_bypass == 1'b0,
            "first failing set expects a 1 on the EDT channel");
    end

    // ---- internal test, corrupted stored response
    begin
      int k, b;
      test_set_t bad;
      k = 500 + $urandom % 400;
      bad = sets[k];
      b = $urandom % 10;
      bad.response[b] = ~bad.response[b];
      ld_en = 1; ld_addr = IW'(k); ld_data = bad;
      @(posedge clk); #1; ld_en = 0;
      wr_reg(REG_CMD, CMD_INT_TEST);
      poll(v);
      check(v[3:0] == RSP_FAIL && v[31:16] == 16'(k), $sformatf("corrupted set %0d reported, rsp %h", k, v));
      if (v[3:0] == RSP_FAIL) n_int_fail++;
      ld_en = 1; ld_data = sets[k];
      @(posedge clk); #1; ld_en = 0;
    end

    // ---- external test: the CPU supplies every set and compares the responses
    for (int i = 0; i < DEPTH; i++) begin
      logic [32:0] r;
      wr_reg(REG_STIM, 32'(sets[i].pattern));
      wr_reg(REG_CMD, CMD_EXT_APPLY);
      poll(v);
      check(v[3:0] == RSP_DONE, "external apply done");
      rd_reg(REG_RESP_LO, v);
      rd_reg(REG_RESP_HI, v2);
      r = {v2[0], v};
      check(((r ^ sets[i].response) & ~sets[i].mask) == '0,
            $sformatf("external set %0d: response %h expected %h", i, r, sets[i].response));
      n_ext_sets++;
    end
    wr_reg(REG_CMD, CMD_EXT_END);
    poll(v);
    check(v[3:0] == RSP_DONE && t_out == '0, "external test end");

    // ---- CAN controller registers through the FPI-Wishbone translator
    for (int i = 0; i < 16; i++) begin
      access(1, CAN + 32'(i) * 4, {24'h0, 8'(i * 37 + 1)}, 0, v, a);
      check(a == ACK_NSC, "CAN write ack");
    end
    for (int i = 0; i < 16; i++) begin
      access(0, CAN + 32'(i) * 4, 0, 0, v, a);
      check(a == ACK_NSC && v == {24'h0, 8'(i * 37 + 1)}, $sformatf("CAN read %0d: %h ack %0d", i, v, a));
      n_can++;
    end
    @(posedge clk); #1;  // bus idle for a cycle, then a request that the master drops
    access(1, CAN + 32'd8, 32'hEE, 1, v, a);
    check(a == ACK_RETRY, "dropped request answered with retry");
    if (a == ACK_RETRY) n_retry++;
    access(1, CAN + 32'd8, 32'hEE, 0, v, a);
    check(a == ACK_NSC && can_regs[2] == 8'hEE, "repeated transfer completes");

    check(n_int_pass > 0, "internal pass seen");
    check(n_int_fail > 0, "internal fail on corrupted data seen");
    check(n_stuck > 0, "stuck-at fault detected");
    check(n_ext_sets == DEPTH, "external test over all sets");
    check(n_can > 0 && n_retry > 0, "CAN access and retry seen");
    check(n_dftib_ans > 0 && n_can_ans > 0, "both bus slaves answered");
    check(n_edt_shift > 0 && n_byp_shift > 0, "EDT and bypass shifts in the test data");
    $display("mechanisms: int_pass=%0d int_fail=%0d stuck=%0d ext_sets=%0d can=%0d retry=%0d edt_shift=%0d byp_shift=%0d",
             n_int_pass, n_int_fail, n_stuck, n_ext_sets, n_can, n_retry, n_edt_shift, n_byp_shift);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
