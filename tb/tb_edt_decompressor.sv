// Self-checking test of the EDT decompressor with its default 8-bit ring generator
// and 4-output phase shifter. A reference ring written out bit by bit (polynomial
// x^8+x^6+x^5+x^4+1, channel injected at bit 0) is stepped alongside; every cycle
// the four chain inputs must equal the phase-shifter XORs of the reference state
// (chain 0: bits 0,3; chain 1: bits 1,5; chain 2: bits 2,7; chain 3: bits 4,6).
// Also checked: no change without a step, clearing while scan_en=0, and that the
// free-running ring (channel held at 0) has the maximal period 255.
module tb_edt_decompressor;
  logic clk = 1'b0, rst_n = 1'b0;
  logic step, scan_en, ch_in;
  logic [3:0] chain_in;
  logic [7:0] s;           // reference state
  int checks = 0, failures = 0, n_clear = 0;

  edt_decompressor dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [7:0] ref_next(logic [7:0] st, logic in);
    logic [7:0] n;
    n[0] = st[7] ^ in;
    n[1] = st[0];
    n[2] = st[1];
    n[3] = st[2];
    n[4] = st[3] ^ st[7];
    n[5] = st[4] ^ st[7];
    n[6] = st[5] ^ st[7];
    n[7] = st[6];
    return n;
  endfunction

  function automatic logic [3:0] ref_ps(logic [7:0] st);
    return {st[4] ^ st[6], st[2] ^ st[7], st[1] ^ st[5], st[0] ^ st[3]};
  endfunction

  task automatic cmp(string what);
    checks++;
    if (chain_in !== ref_ps(s)) begin
      failures++;
      $display("%s: chain_in=%b expected %b (ref state %h)", what, chain_in, ref_ps(s), s);
    end
  endtask

  initial begin
    step = 0; scan_en = 0; ch_in = 0;
    s = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    cmp("after reset");
    scan_en = 1;
    // random channel data and steps
    for (int t = 0; t < 1500; t++) begin
      step  = ($urandom % 4) != 0;
      ch_in = 1'($urandom);
      if (t % 300 == 299) begin
        scan_en = 0;
      end
      if (!scan_en) begin
        s = '0;
        n_clear++;
      end else if (step) begin
        s = ref_next(s, ch_in);
      end
      @(posedge clk); #1;
      cmp("random");
      scan_en = 1;
    end
    // period: inject one 1, then free-run with ch_in = 0
    step = 1; ch_in = 1; s = ref_next(s, 1'b1);
    @(posedge clk); #1;
    begin
      logic [7:0] start;
      int period;
      ch_in = 0;
      start = s;
      period = 0;
      do begin
        s = ref_next(s, 1'b0);
        period++;
        @(posedge clk); #1;
        cmp("free run");
      end while (s != start && period < 1000);
      checks++;
      if (period != 255) begin
        failures++;
        $display("ring period %0d, expected 255", period);
      end
    end
    checks++; if (n_clear == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
