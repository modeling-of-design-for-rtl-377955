// Self-checking test of the scan-inserted counter (10 bits, 4 chains, 32 outputs).
// Functional phase: reset, count with and without enable, wrap-around at 1023.
// Scan phase: load a known value through the 4 chains (bit i sits in chain i mod 4,
// shifted in from the high end), check the counter holds it, count once, then unload
// and compare the shifted-out bits with the expected value. Also checks that cycles
// without a DUT clock pulse change nothing.
module tb_counter_scan;
  localparam int W = 10, NC = 4, OW = 32;
  logic clk = 1'b0;
  logic ce, cnt_rst, cnt_en, scan_en;
  logic [NC-1:0] scan_in, scan_out;
  logic [OW-1:0] cnt_out;
  int checks = 0, failures = 0;
  int n_wrap = 0, n_load = 0;

  counter_scan #(.COUNT_W(W), .OUT_W(OW), .N_CHAINS(NC)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic pulse();
    ce = 1'b1; @(posedge clk); #1; ce = 1'b0;
  endtask

  task automatic check_out(input logic [W-1:0] exp, input string what);
    checks++;
    if (cnt_out !== OW'(exp)) begin
      failures++;
      $display("%s: cnt_out=%0d expected %0d", what, cnt_out, exp);
    end
  endtask

  // chain length of chain c
  function automatic int clen(int c);
    return (W - c + NC - 1) / NC;
  endfunction

  task automatic scan_load(input logic [W-1:0] v);
    int maxlen = clen(0);
    scan_en = 1'b1;
    // shift maxlen times; chain c receives its bits highest first, padding first
    for (int s = 0; s < maxlen; s++) begin
      for (int c = 0; c < NC; c++) begin
        int pos = maxlen - 1 - s;  // position in chain being fed, from the top
        // element k of chain c is bit c+NC*k; after all shifts, the value entered at
        // shift s ends up at element (clen(c)-1) - (maxlen-1-s) when that is >= 0
        int k = clen(c) - 1 - pos;
        scan_in[c] = (k >= 0) ? v[c + NC*k] : 1'b0;
      end
      pulse();
    end
    scan_en = 1'b0;
  endtask

  task automatic scan_unload_check(input logic [W-1:0] v);
    scan_en = 1'b1;
    scan_in = '0;
    for (int s = 0; s < clen(0); s++) begin
      for (int c = 0; c < NC; c++) begin
        if (s < clen(c)) begin
          checks++;
          if (scan_out[c] !== v[c + NC*s]) begin
            failures++;
            $display("unload chain %0d shift %0d: got %b expected %b", c, s, scan_out[c], v[c+NC*s]);
          end
        end
      end
      pulse();
    end
    scan_en = 1'b0;
  endtask

  logic [W-1:0] model;

  initial begin
    ce = 0; cnt_rst = 1; cnt_en = 0; scan_en = 0; scan_in = '0;
    @(posedge clk); #1;
    pulse();
    model = '0;
    check_out(model, "after reset");
    cnt_rst = 0;
    // count with random enable, 1400 pulses, crossing the wrap
    for (int i = 0; i < 1400; i++) begin
      cnt_en = ($urandom % 8) != 0;
      if (cnt_en) begin
        if (model == '1) n_wrap++;
        model = model + 1'b1;
      end
      pulse();
      check_out(model, "count");
      // an idle cycle without a clock pulse changes nothing
      if (i % 97 == 0) begin
        @(posedge clk); #1;
        check_out(model, "no pulse");
      end
    end
    // scan load / capture / unload, several values
    for (int t = 0; t < 20; t++) begin
      logic [W-1:0] v;
      v = W'($urandom);
      scan_load(v);
      n_load++;
      check_out(v, "after scan load");
      cnt_en = 1'b1; cnt_rst = 1'b0;
      pulse();               // capture cycle: count once
      check_out(v + 1'b1, "after capture");
      scan_unload_check(v + 1'b1);
    end
    checks++; if (n_wrap == 0 || n_load == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
