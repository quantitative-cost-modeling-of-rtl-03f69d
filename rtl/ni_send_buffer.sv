// ni_send_buffer: Send-Buffer of the network-interface send side (used with
// S&W SWE only).
//
// Holds the data words that are sent but not yet acknowledged: WIN words of
// N bits, WIN being the sliding window size.  Words are written at their
// sequence number modulo WIN as they are sent and read back, at the same
// index, when Error-Handling retransmits them.  One write port, one
// asynchronous read port (a register file).  The depth follows the document
// (buffer size = sliding window size); the register-file form is this
// design's choice.
module ni_send_buffer #(
  parameter int N   = 32,
  parameter int WIN = 32,
  localparam int AW = (WIN > 1) ? $clog2(WIN) : 1
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [N-1:0]  wdata,
  input  logic [AW-1:0] raddr,
  output logic [N-1:0]  rdata
);

  logic [N-1:0] mem [1 << AW];

  always_ff @(posedge clk)
    if (we) mem[waddr] <= wdata;

  assign rdata = mem[raddr];

endmodule
