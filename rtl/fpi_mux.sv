// FPI bus multiplexer: joins the responses of N_SLAVES bus slaves onto the single
// response path back to the bus master (the LFI bridge of the CPU).
//
// Three priority multiplexers pick ready, acknowledge and read data. Each slave raises
// its en signal while it is the addressed slave; the multiplexer passes that slave's
// signals on. If more than one en is high, the slave with the lowest index wins. With
// no en high the bus is idle: en=0, ready=1, ACK_NSC, read data 0.
// Purely combinational.
//
// The three multiplexers, the enable-based selection and the priority rule follow the
// document (three slaves in its figure, hence the default); the idle value and the
// index order of priority are this design's choices.
module fpi_mux
  import fpi_pkg::*;
#(
  parameter int unsigned N_SLAVES = 3
) (
  input  fpi_rsp_t rsp_i [N_SLAVES],
  output fpi_rsp_t rsp_o,
  output logic [N_SLAVES-1:0] sel_o  // one-hot: the slave that was passed on
);

  always_comb begin
    rsp_o       = '0;
    rsp_o.ready = 1'b1;
    rsp_o.ack   = ACK_NSC;
    sel_o       = '0;
    // walk from lowest to highest priority so the highest-priority enable wins
    for (int i = N_SLAVES - 1; i >= 0; i--) begin
      if (rsp_i[i].en) begin
        rsp_o.en    = 1'b1;
        rsp_o.ready = rsp_i[i].ready;
        rsp_o.ack   = rsp_i[i].ack;
        rsp_o.rdata = rsp_i[i].rdata;
        sel_o       = '0;
        sel_o[i]    = 1'b1;
      end
    end
  end

endmodule
