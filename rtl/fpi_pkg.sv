// Shared types of the FPI (Flexible Peripheral Interface) peripheral bus as seen by
// the bus slaves of this design: the request a master drives and the response a slave
// returns, plus the 2-bit acknowledge code.
//
// Transfer protocol used by every slave here (a single-transfer subset of FPI):
//   * The master asserts req together with addr, wr (1 = write) and wdata, and holds all
//     of them stable until the transfer completes.
//   * The addressed slave raises en ("I drive the bus") from the cycle after it saw req.
//     While en=1 and ready=0 the slave is busy and the master keeps waiting.
//   * The transfer completes in the cycle where en=1 and ready=1; ack then tells the
//     outcome and rdata carries read data. The master drops req (or starts the next
//     transfer) in the following cycle.
// Block transfers and sub-word sizes of the real bus are not modelled: every access is
// one 32-bit word. The acknowledge encoding is this design's own choice.
package fpi_pkg;

  localparam int unsigned ADDR_W = 32;
  localparam int unsigned DATA_W = 32;

  // 2-bit acknowledge returned with each completed transfer.
  typedef enum logic [1:0] {
    ACK_NSC   = 2'b00,  // no special condition: transfer done
    ACK_RETRY = 2'b01,  // slave asks the master to repeat the same transfer
    ACK_ERROR = 2'b10   // bus error
  } fpi_ack_e;

  // Master -> slave.
  typedef struct packed {
    logic              req;
    logic              wr;
    logic [ADDR_W-1:0] addr;
    logic [DATA_W-1:0] wdata;
  } fpi_req_t;

  // Slave -> master (one per slave before the bus multiplexer).
  typedef struct packed {
    logic              en;
    logic              ready;
    fpi_ack_e          ack;
    logic [DATA_W-1:0] rdata;
  } fpi_rsp_t;

endpackage
