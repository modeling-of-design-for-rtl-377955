// Self-checking test of the muxed-D scan cell: random ce/se/si/d for 400 cycles,
// compared each cycle with a one-line reference (hold without ce, else se ? si : d).
module tb_scan_dff;
  logic clk = 1'b0;
  logic ce, se, si, d, q;
  logic exp_q;
  int checks = 0, failures = 0;
  int n_shift = 0, n_func = 0;

  scan_dff dut (.clk(clk), .ce(ce), .se(se), .si(si), .d(d), .q(q));

  always #5 clk = ~clk;

  initial begin
    #100000;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ce = 1; se = 0; si = 0; d = 0;
    @(posedge clk); #1;
    exp_q = 1'b0;
    checks++; if (q !== exp_q) failures++;
    repeat (400) begin
      ce = 1'($urandom); se = 1'($urandom); si = 1'($urandom); d = 1'($urandom);
      if (ce) begin
        exp_q = se ? si : d;
        if (se) n_shift++; else n_func++;
      end
      @(posedge clk); #1;
      checks++;
      if (q !== exp_q) begin
        failures++;
        $display("mismatch: ce=%b se=%b si=%b d=%b q=%b exp=%b", ce, se, si, d, q, exp_q);
      end
    end
    checks++; if (n_shift == 0 || n_func == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
