// Self-checking test of the DFT infrastructure bridge at its full store size (1095
// sets), against a stand-in DUT whose 33 outputs are a fixed hash of the 7 input pins,
// registered once (so the response is only right if the bridge samples one cycle after
// driving the pattern).
// Checked: register access over FPI while idle and while a test runs; internal test
// passing over all 1095 sets with masked don't-care bits, in exactly 4*1095+1 = 4381
// cycles (54.76 us at 80 MHz); internal test failing at a corrupted set with that set's
// index; a CMD write while busy is dropped; external apply/capture; external end; bad
// command; no answer outside the register map.
module tb_dft_ib;
  import fpi_pkg::*;
  import dft_pkg::*;
  localparam logic [31:0] BASE = 32'hF000_1000;
  localparam int DEPTH = 1095;
  localparam int IW = $clog2(DEPTH);
  logic clk = 1'b0, rst_n = 1'b0;
  fpi_req_t req;
  fpi_rsp_t rsp;
  dut_in_t  t_out;
  dut_out_t t_in;
  logic ld_en;
  logic [IW-1:0] ld_addr;
  test_set_t ld_data;
  int checks = 0, failures = 0;
  int n_pass = 0, n_fail = 0, n_ext = 0, n_masked = 0, n_busy_read = 0;

  dft_ib #(.BASE_ADDR(BASE)) dut (.*, .fpi_req_i(req), .fpi_rsp_o(rsp));

  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- stand-in DUT
  function automatic logic [32:0] hash(logic [6:0] p);
    logic [31:0] h;
    h = (32'(p) + 32'h1) * 32'h9E37_79B1;
    h = h ^ (h >> 13) ^ (32'(p) << 25);
    return {^p, h};
  endfunction
  always @(posedge clk) t_in <= dut_out_t'(hash(t_out));

  // ---------------- FPI master
  task automatic access(input bit wr, input logic [31:0] addr, input logic [31:0] wdata,
                        output logic [31:0] rdata);
    int e;
    req.req = 1; req.wr = wr; req.addr = addr; req.wdata = wdata;
    e = 0;
    do begin
      @(posedge clk); #1;
      e++;
    end while (!(rsp.en && rsp.ready) && e < 50);
    rdata = rsp.rdata;
    if (e >= 50) begin failures++; $display("no bus answer at %h", addr); end
    req = '0;
  endtask

  task automatic wr(input logic [2:0] r, input logic [31:0] v);
    logic [31:0] d;
    access(1, BASE + 32'(r) * 4, v, d);
  endtask

  task automatic rd(input logic [2:0] r, output logic [31:0] v);
    access(0, BASE + 32'(r) * 4, 0, v);
  endtask

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // polls CMDRSP until not busy, returns the register
  task automatic poll(output logic [31:0] v);
    int n = 0;
    do begin
      rd(REG_CMDRSP, v);
      if (v[3:0] == RSP_BUSY) n_busy_read++;
      n++;
    end while (v[3:0] == RSP_BUSY && n < 10000);
  endtask

  test_set_t sets [DEPTH];

  task automatic load_store();
    ld_en = 1;
    for (int i = 0; i < DEPTH; i++) begin
      ld_addr = IW'(i); ld_data = sets[i];
      @(posedge clk); #1;
    end
    ld_en = 0;
  endtask

  // Cycle count of the internal test: from the edge that takes the CMD write to the
  // edge that writes the PASS code. Values read here are those before the edge.
  int cyc = 0, t_cmd = 0, t_pass_edge = 0;
  rsp_e prev_code = RSP_IDLE;
  always @(posedge clk) begin
    cyc++;
    if (req.req && req.wr && req.addr == BASE && !rsp.en && !dut.busy) t_cmd = cyc;
    if (dut.rsp_code_q == RSP_PASS && prev_code != RSP_PASS) t_pass_edge = cyc - 1;
    prev_code = dut.rsp_code_q;
  end

  initial begin
    logic [31:0] v, v2;
    req = '0; ld_en = 0; ld_addr = '0; ld_data = '0;
    for (int i = 0; i < DEPTH; i++) begin
      logic [6:0] p;
      logic [32:0] m;
      p = 7'($urandom);
      m = ((i % 5) == 0) ? 33'(1) << ($urandom % 33) : '0;  // some don't-care bits
      sets[i].pattern  = dut_in_t'(p);
      sets[i].mask     = m;
      sets[i].response = hash(p) ^ m;  // masked bits deliberately wrong
      if (m != 0) n_masked++;
    end
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    // idle register access
    rd(REG_CMDRSP, v);
    check(v[3:0] == RSP_IDLE, "idle after reset");
    wr(REG_STIM, 32'h55);
    rd(REG_STIM, v);
    check(v == 32'h55, "stimuli register read back");
    // no answer outside the map
    req.req = 1; req.addr = BASE + 32'h20;
    repeat (4) begin @(posedge clk); #1; check(!rsp.en, "no answer at unmapped offset"); end
    req = '0;
    @(posedge clk); #1;
    // ---- internal test, passing
    load_store();
    wr(REG_CMD, CMD_INT_TEST);
    wr(REG_CMD, CMD_EXT_END);  // dropped: a test is running
    rd(REG_CMD, v);
    check(v[3:0] == CMD_INT_TEST, "command written while busy is dropped");
    poll(v);
    check(v[3:0] == RSP_PASS && v[31:16] == DEPTH, $sformatf("internal test pass, rsp %h", v));
    n_pass++;
    begin
      // time from the CMD write to the result: walk back through the recorded code
      int start_edge, done_edge;
      start_edge = t_cmd;
      done_edge = t_pass_edge;
      check(done_edge - start_edge == 4 * DEPTH + 1,
            $sformatf("internal test took %0d cycles, expected %0d", done_edge - start_edge, 4*DEPTH+1));
    end
    // ---- internal test, failing at set k
    begin
      int k;
      k = 700 + $urandom % 300;
      sets[k].response[5] = ~sets[k].response[5];
      sets[k].mask[5] = 1'b0;
      ld_en = 1; ld_addr = IW'(k); ld_data = sets[k];
      @(posedge clk); #1; ld_en = 0;
      wr(REG_CMD, CMD_INT_TEST);
      poll(v);
      check(v[3:0] == RSP_FAIL && v[31:16] == 16'(k), $sformatf("internal test fail at %0d, rsp %h", k, v));
      n_fail++;
    end
    // ---- external test: apply CPU stimuli one at a time
    for (int t = 0; t < 40; t++) begin
      logic [6:0] p;
      logic [32:0] e;
      p = 7'($urandom);
      wr(REG_STIM, 32'(p));
      wr(REG_CMD, CMD_EXT_APPLY);
      poll(v);
      check(v[3:0] == RSP_DONE, "external apply done");
      check(t_out == dut_in_t'(p), "pattern on DUT pins");
      rd(REG_RESP_LO, v);
      rd(REG_RESP_HI, v2);
      e = hash(p);
      check({v2[0], v} == e && v2[31:1] == 0, $sformatf("external response %h%h expected %h", v2, v, e));
      n_ext++;
    end
    wr(REG_CMD, CMD_EXT_END);
    poll(v);
    check(v[3:0] == RSP_DONE && t_out == '0, "external end");
    wr(REG_CMD, 32'h9);
    poll(v);
    check(v[3:0] == RSP_BAD_CMD, "bad command");
    check(n_pass > 0 && n_fail > 0 && n_ext > 0 && n_masked > 0 && n_busy_read > 0,
          "all mechanisms exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
