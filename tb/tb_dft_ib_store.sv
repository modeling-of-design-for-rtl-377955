// Self-checking test of the DFT-IB test data store at its full size (1095 x 73 bits):
// fill every set with a value computed from its index, read all back in random order
// and check the one-cycle read latency.
module tb_dft_ib_store;
  import dft_pkg::*;
  localparam int DEPTH = 1095;
  localparam int IW = $clog2(DEPTH);
  logic clk = 1'b0;
  logic wr_en;
  logic [IW-1:0] wr_addr, rd_addr;
  test_set_t wr_data, rd_data;
  int checks = 0, failures = 0;

  dft_ib_store #(.DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  function automatic test_set_t gen(int i);
    logic [SET_W-1:0] v;
    v = {SET_W'(i) * 73'h1_2345_6789_ABCD_EF01, 7'(i ^ 5)};
    return test_set_t'(v ^ {SET_W{i[0]}});
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wr_en = 0; wr_addr = '0; rd_addr = '0; wr_data = '0;
    @(posedge clk); #1;
    for (int i = 0; i < DEPTH; i++) begin
      wr_en = 1; wr_addr = IW'(i); wr_data = gen(i);
      @(posedge clk); #1;
    end
    wr_en = 0;
    for (int t = 0; t < 3000; t++) begin
      int a;
      a = (t < DEPTH) ? t : int'($urandom % DEPTH);
      rd_addr = IW'(a);
      @(posedge clk); #1;
      checks++;
      if (rd_data !== gen(a)) begin
        failures++;
        $display("set %0d read %h expected %h", a, rd_data, gen(a));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
