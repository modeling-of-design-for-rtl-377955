// Self-checking test of the FPI bus multiplexer (3 slaves): random enables, ready,
// acknowledge and data; expected output = the enabled slave with the lowest index, or
// the idle value (en=0, ready=1, NSC, 0) when none is enabled.
module tb_fpi_mux;
  import fpi_pkg::*;
  localparam int N = 3;
  fpi_rsp_t rsp_i [N];
  fpi_rsp_t rsp_o;
  logic [N-1:0] sel_o;
  int checks = 0, failures = 0, n_conflict = 0, n_idle = 0;

  fpi_mux #(.N_SLAVES(N)) dut (.rsp_i(rsp_i), .rsp_o(rsp_o), .sel_o(sel_o));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 500; t++) begin
      int w, nen;
      fpi_rsp_t exp;
      nen = 0;
      for (int i = 0; i < N; i++) begin
        rsp_i[i].en    = 1'($urandom);
        rsp_i[i].ready = 1'($urandom);
        rsp_i[i].ack   = fpi_ack_e'($urandom % 3);
        rsp_i[i].rdata = $urandom;
        if (rsp_i[i].en) nen++;
      end
      w = -1;
      for (int i = 0; i < N; i++) if (rsp_i[i].en && w < 0) w = i;
      if (w < 0) begin
        exp = '0; exp.ready = 1'b1; exp.ack = ACK_NSC; n_idle++;
      end else begin
        exp = rsp_i[w];
      end
      if (nen > 1) n_conflict++;
      #1;
      checks++;
      if (rsp_o !== exp || (w >= 0 && sel_o !== N'(1 << w)) || (w < 0 && sel_o !== '0)) begin
        failures++;
        $display("t=%0d winner=%0d got %h expected %h sel=%b", t, w, rsp_o, exp, sel_o);
      end
    end
    checks++; if (n_conflict == 0 || n_idle == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
