// Self-checking test of the DUT with its EDT logic (edt_counter), pin-level.
// A reference model kept in the testbench holds the 10 counter bits, the 8-bit ring
// generator and the two clock-pin edge detectors, and computes the 33 outputs for the
// pins applied in each cycle. The stimulus walks through the phases of a scan test:
// functional counting, scan shift through the decompressor (EDT mode), capture, shift
// in bypass mode, plus fully random pin values. Every cycle all 33 outputs are compared.
// Each mechanism (functional count, EDT shift, bypass shift, ring step, ring clear)
// must occur at least once.
module tb_edt_counter;
  import dft_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  dut_in_t  pins_i;
  dut_out_t pins_o;
  int checks = 0, failures = 0;
  int n_func = 0, n_edt_shift = 0, n_byp_shift = 0, n_ring = 0, n_clear = 0;

  edt_counter dut (.clk(clk), .rst_n(rst_n), .pins_i(pins_i), .pins_o(pins_o));

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- reference model
  logic [9:0] cnt;
  logic [7:0] rg;
  logic       pclk, plpct;
  bit         cnt_valid = 0;  // counter state known (after the first reset pulse)

  // chain c, element k <-> counter bit c + 4k; element 0 is the chain output
  function automatic int chain_len(int c);
    return (c < 2) ? 3 : 2;
  endfunction

  function automatic logic [3:0] ps(logic [7:0] st);
    return {st[4] ^ st[6], st[2] ^ st[7], st[1] ^ st[5], st[0] ^ st[3]};
  endfunction

  function automatic logic [3:0] chain_outs(logic [9:0] c);
    return c[3:0];
  endfunction

  function automatic dut_out_t ref_out(dut_in_t p);
    dut_out_t o;
    logic [3:0] so;
    so = chain_outs(cnt);
    o.cnt_out = {22'b0, cnt};
    o.edt_ch_out = p.edt_bypass ? so[3] : ^so;
    return o;
  endfunction

  task automatic ref_step(dut_in_t p);
    logic dpulse, epulse;
    logic [3:0] si, so;
    logic [9:0] nc;
    logic [7:0] nrg;
    dpulse = p.cnt_clk & ~pclk;
    epulse = p.lpct_clk & ~plpct;
    so = chain_outs(cnt);
    if (p.edt_bypass) si = {so[2], so[1], so[0], p.edt_ch_in};
    else              si = ps(rg);
    nc = cnt;
    if (dpulse) begin
      if (p.scan_en) begin
        for (int c = 0; c < 4; c++) begin
          for (int k = 0; k < chain_len(c) - 1; k++) nc[c + 4*k] = cnt[c + 4*(k+1)];
          nc[c + 4*(chain_len(c)-1)] = si[c];
        end
        if (p.edt_bypass) n_byp_shift++; else n_edt_shift++;
      end else begin
        if (p.cnt_rst) begin nc = '0; cnt_valid = 1; end
        else if (p.cnt_en) nc = cnt + 1'b1;
        n_func++;
      end
    end
    nrg = rg;
    if (!p.scan_en) begin
      nrg = '0;
      if (rg != 0) n_clear++;
    end else if (epulse) begin
      nrg = {rg[6], rg[5] ^ rg[7], rg[4] ^ rg[7], rg[3] ^ rg[7], rg[2], rg[1], rg[0], rg[7] ^ p.edt_ch_in};
      n_ring++;
    end
    cnt = nc; rg = nrg; pclk = p.cnt_clk; plpct = p.lpct_clk;
  endtask

  task automatic apply(dut_in_t p);
    dut_out_t e;
    pins_i = p;
    #1;
    e = ref_out(p);
    if (cnt_valid) checks++;
    if (cnt_valid && pins_o !== e) begin
      failures++;
      if (failures < 10) $display("t=%0t pins %b: out %h expected %h", $time, p, pins_o, e);
    end
    @(posedge clk);
    ref_step(p);
    #1;
  endtask

  // one tester step with a clock pulse: clocks low, then the chosen clocks high
  task automatic pulse(dut_in_t p, bit dclk, bit eclk);
    p.cnt_clk = 0; p.lpct_clk = 0;
    apply(p);
    p.cnt_clk = dclk; p.lpct_clk = eclk;
    apply(p);
  endtask

  initial begin
    dut_in_t p;
    pins_i = '0;
    cnt = 'x; rg = '0; pclk = 0; plpct = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    // functional reset and count
    p = '0; p.cnt_rst = 1;
    pulse(p, 1, 0);
    p.cnt_rst = 0; p.cnt_en = 1;
    repeat (30) pulse(p, 1, 0);
    for (int pat = 0; pat < 40; pat++) begin
      // scan load through the decompressor (edt mode), ring and chains clocked together
      p = '0; p.scan_en = 1; p.edt_bypass = (pat % 4 == 3);
      for (int s = 0; s < 8; s++) begin
        p.edt_ch_in = 1'($urandom);
        pulse(p, 1, !p.edt_bypass);
      end
      // capture
      p.scan_en = 0; p.cnt_en = 1'($urandom); p.cnt_rst = (($urandom % 8) == 0);
      pulse(p, 1, 0);
    end
    // fully random pins
    repeat (2000) begin
      p = dut_in_t'($urandom);
      apply(p);
    end
    checks++;
    if (n_func == 0 || n_edt_shift == 0 || n_byp_shift == 0 || n_ring == 0 || n_clear == 0) begin
      failures++;
      $display("mechanism missing: func=%0d edt=%0d byp=%0d ring=%0d clear=%0d",
               n_func, n_edt_shift, n_byp_shift, n_ring, n_clear);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
