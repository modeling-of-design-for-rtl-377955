// FPI to Wishbone bus translator: an FPI slave that turns each FPI access inside its
// address window into one classic Wishbone cycle, so that a Wishbone peripheral (the
// CAN controller) can sit on the FPI bus.
//
// Sequence: in IDLE an addressed request is latched (address, direction, write data).
// The next cycle (CHECK) the translator takes the bus (en=1) with ready=0 to tell the
// master it is busy, and checks that the master still holds its request. It then runs
// the Wishbone cycle (WB: cyc=stb=1) until the slave's ack, capturing read data, and
// answers the FPI master with ready=1 in the following cycle (RESP).
// Retry precaution: if the FPI request line is found deasserted at the CHECK cycle or
// when the Wishbone ack arrives, the transfer is answered with ACK_RETRY instead of
// ACK_NSC, so the master sends the same message again.
// Timing: the request is taken at clock edge 1, CHECK ends at edge 2, the Wishbone
// cycle runs from there until the ack, and the FPI response is given in the cycle after
// the ack. With a Wishbone slave that acks one cycle after the strobe, a transfer
// completes 4 clock edges after the request appears, plus one per Wishbone wait state.
//
// Wishbone side: WB_AW address bits taken from FPI address bits [WB_AW+1:2] (one
// Wishbone register per 32-bit FPI word), WB_DW data bits (the low FPI data bits).
// The defaults of 8/8 fit an 8-bit Wishbone peripheral. The translation sequence and the
// retry precaution follow the document; the address mapping, widths and the exact
// cycles of the retry check are this design's choices.
module fpi_wb_bridge
  import fpi_pkg::*;
#(
  parameter logic [31:0] BASE_ADDR = 32'hF000_2000,
  parameter int unsigned WIN_W     = 10,   // window size 2**WIN_W bytes
  parameter int unsigned WB_AW     = 8,
  parameter int unsigned WB_DW     = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  fpi_req_t         fpi_req_i,
  output fpi_rsp_t         fpi_rsp_o,
  // Wishbone master
  output logic             wb_cyc_o,
  output logic             wb_stb_o,
  output logic             wb_we_o,
  output logic [WB_AW-1:0] wb_adr_o,
  output logic [WB_DW-1:0] wb_dat_o,
  input  logic [WB_DW-1:0] wb_dat_i,
  input  logic             wb_ack_i
);

  typedef enum logic [1:0] {S_IDLE, S_CHECK, S_WB, S_RESP} state_e;
  state_e           st;
  logic             we_q, retry_q;
  logic [WB_AW-1:0] adr_q;
  logic [WB_DW-1:0] wdat_q, rdat_q;
  logic             hit;

  assign hit = fpi_req_i.req && fpi_req_i.addr[31:WIN_W] == BASE_ADDR[31:WIN_W];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st      <= S_IDLE;
      we_q    <= 1'b0;
      retry_q <= 1'b0;
      adr_q   <= '0;
      wdat_q  <= '0;
      rdat_q  <= '0;
    end else begin
      unique case (st)
        S_IDLE: if (hit) begin
          we_q    <= fpi_req_i.wr;
          adr_q   <= fpi_req_i.addr[WB_AW+1:2];
          wdat_q  <= fpi_req_i.wdata[WB_DW-1:0];
          retry_q <= 1'b0;
          st      <= S_CHECK;
        end
        S_CHECK: begin
          if (!fpi_req_i.req) begin
            retry_q <= 1'b1;
            st      <= S_RESP;
          end else begin
            st <= S_WB;
          end
        end
        S_WB: if (wb_ack_i) begin
          rdat_q  <= wb_dat_i;
          retry_q <= !fpi_req_i.req;
          st      <= S_RESP;
        end
        S_RESP: st <= S_IDLE;
      endcase
    end
  end

  assign wb_cyc_o = (st == S_WB);
  assign wb_stb_o = (st == S_WB);
  assign wb_we_o  = we_q;
  assign wb_adr_o = adr_q;
  assign wb_dat_o = wdat_q;

  always_comb begin
    fpi_rsp_o       = '0;
    fpi_rsp_o.en    = (st != S_IDLE);
    fpi_rsp_o.ready = (st == S_RESP);
    fpi_rsp_o.ack   = retry_q ? ACK_RETRY : ACK_NSC;
    fpi_rsp_o.rdata = (st == S_RESP && !we_q) ? 32'(rdat_q) : '0;
  end

  // Wishbone rule: strobe only inside a cycle.
  assert property (@(posedge clk) wb_stb_o |-> wb_cyc_o);
  // Address and direction stay stable while the Wishbone cycle waits for ack.
  assert property (@(posedge clk) disable iff (!rst_n)
                   wb_cyc_o && !wb_ack_i |=> $stable(wb_adr_o) && $stable(wb_we_o));

endmodule
