// Self-checking test of the EDT spatial compactor: all 16 chain-output combinations,
// expected channel output = parity counted bit by bit.
module tb_edt_compactor;
  logic [3:0] chain_out;
  logic ch_out;
  int checks = 0, failures = 0;

  edt_compactor #(.N_CHAINS(4)) dut (.chain_out(chain_out), .ch_out(ch_out));

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      int ones;
      chain_out = 4'(v);
      ones = 0;
      for (int b = 0; b < 4; b++) if (v[b]) ones++;
      #1;
      checks++;
      if (ch_out !== 1'(ones % 2)) begin
        failures++;
        $display("mismatch %b -> %b", chain_out, ch_out);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
