// Self-checking test of the FPI-to-Wishbone translator.
// An FPI master task issues single transfers; a Wishbone slave model (256 byte
// registers, programmable wait states, registered ack) answers on the other side.
// Checked: write-then-read data through the translator, the Wishbone address and
// direction, the completion latency (4 cycles + Wishbone wait states, counted in clock
// edges from the request), no answer outside the address window, and the retry
// precaution: a request line found low at the first data-phase cycle or when the
// Wishbone ack arrives is answered with ACK_RETRY, after which the repeated transfer
// completes normally.
module tb_fpi_wb_bridge;
  import fpi_pkg::*;
  localparam logic [31:0] BASE = 32'hF000_2000;
  logic clk = 1'b0, rst_n = 1'b0;
  fpi_req_t req;
  fpi_rsp_t rsp;
  logic wb_cyc, wb_stb, wb_we, wb_ack;
  logic [7:0] wb_adr, wb_dat_o, wb_dat_i;
  int checks = 0, failures = 0, n_retry = 0, n_wait = 0;

  fpi_wb_bridge #(.BASE_ADDR(BASE)) dut (
    .clk(clk), .rst_n(rst_n), .fpi_req_i(req), .fpi_rsp_o(rsp),
    .wb_cyc_o(wb_cyc), .wb_stb_o(wb_stb), .wb_we_o(wb_we), .wb_adr_o(wb_adr),
    .wb_dat_o(wb_dat_o), .wb_dat_i(wb_dat_i), .wb_ack_i(wb_ack));

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- Wishbone slave model
  logic [7:0] regs [256];
  int wb_wait = 0, wcnt = 0, n_wb_writes = 0;
  always @(posedge clk) begin
    if (wb_cyc && wb_stb && !wb_ack) begin
      if (wcnt >= wb_wait) begin
        wb_ack <= 1'b1;
        wb_dat_i <= regs[wb_adr];
        if (wb_we) begin regs[wb_adr] <= wb_dat_o; n_wb_writes++; end
        wcnt <= 0;
      end else wcnt <= wcnt + 1;
    end else begin
      wb_ack <= 1'b0;
      wcnt <= 0;
    end
  end

  // ---------------- FPI master
  // drop: 0 none, 1 drop req after the first edge, 2 drop req after 3 edges
  task automatic access(input bit wr, input logic [31:0] addr, input logic [31:0] wdata,
                        input int drop, output logic [31:0] rdata, output fpi_ack_e ack,
                        output int edges);
    req.req = 1; req.wr = wr; req.addr = addr; req.wdata = wdata;
    edges = 0;
    do begin
      @(posedge clk); #1;
      edges++;
      if (drop == 1 && edges == 1) req.req = 0;
      if (drop == 2 && edges == 3) req.req = 0;
    end while (!(rsp.en && rsp.ready) && edges < 100);
    rdata = rsp.rdata; ack = rsp.ack;
    req = '0;
    @(posedge clk); #1;
  endtask

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    logic [31:0] rd;
    fpi_ack_e ack;
    int e;
    logic [7:0] model [256];
    req = '0; wb_ack = 0; wb_dat_i = '0;
    for (int i = 0; i < 256; i++) begin regs[i] = 8'(i * 7); model[i] = 8'(i * 7); end
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    // random writes and reads with random wait states
    for (int t = 0; t < 300; t++) begin
      int a;
      logic [7:0] v;
      bit wr;
      a = $urandom % 256; v = 8'($urandom); wr = 1'($urandom);
      wb_wait = $urandom % 4;
      if (wb_wait > 0) n_wait++;
      access(wr, BASE + 32'(a) * 4, {24'hABCDEF, v}, 0, rd, ack, e);
      check(ack == ACK_NSC, "ack NSC");
      check(e == 4 + wb_wait, $sformatf("latency %0d, expected %0d", e, 4 + wb_wait));
      if (wr) model[a] = v;
      else check(rd == {24'h0, model[a]}, $sformatf("read %h expected %h", rd, model[a]));
    end
    // outside the window: nobody answers
    req.req = 1; req.wr = 0; req.addr = BASE + 32'h400;
    repeat (6) begin
      @(posedge clk); #1;
      check(!rsp.en && !wb_cyc, "no answer outside window");
    end
    req = '0;
    @(posedge clk); #1;
    // retry at the first data-phase cycle: no Wishbone cycle at all
    begin
      int wr_before;
      wr_before = n_wb_writes;
      wb_wait = 0;
      access(1, BASE + 32'd40, 32'h5A, 1, rd, ack, e);
      check(ack == ACK_RETRY, "retry when request dropped early");
      check(n_wb_writes == wr_before, "no Wishbone write on early retry");
      n_retry++;
      access(1, BASE + 32'd40, 32'h5A, 0, rd, ack, e);  // master repeats
      check(ack == ACK_NSC && regs[10] == 8'h5A, "repeated write completes");
    end
    // retry when the request is low at the Wishbone ack
    wb_wait = 3;
    access(0, BASE + 32'd40, 0, 2, rd, ack, e);
    check(ack == ACK_RETRY, "retry when request dropped during the Wishbone cycle");
    n_retry++;
    access(0, BASE + 32'd40, 0, 0, rd, ack, e);
    check(ack == ACK_NSC && rd == 32'h5A, "repeated read completes");
    check(n_retry == 2 && n_wait > 0, "all mechanisms exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
