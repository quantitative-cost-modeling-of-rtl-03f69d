// ni_recv_control: Control block of the network-interface receive side
// (circuit switching).
//
// An FK_SETUP flit opens the connection and is answered with BK_CONN_OK on
// the acknowledge path.  While connected, every data word passed on by
// Error-Handling is delivered to the functional unit (fu_valid for one
// cycle, with its error flag; the unit cannot stall the NoC).  FK_TEAR
// closes the connection and pulses fu_end.  Data outside a connection is
// dropped.  The block also counts delivered words.
module ni_recv_control
  import noc_pkg::*;
#(
  parameter int N = 32
) (
  input  logic         clk,
  input  logic         rst_n,
  input  fkind_e       in_kind,
  input  logic [N-1:0] in_data,
  input  logic         in_err,
  output bkind_e       bkind,
  output logic         fu_valid,
  output logic [N-1:0] fu_data,
  output logic         fu_err,
  output logic         fu_end,
  output logic         connected,
  output logic [31:0]  word_cnt
);

  assign bkind    = (in_kind == FK_SETUP) ? BK_CONN_OK : BK_IDLE;
  assign fu_valid = connected && (in_kind == FK_DATA);
  assign fu_data  = in_data;
  assign fu_err   = fu_valid && in_err;
  assign fu_end   = connected && (in_kind == FK_TEAR);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      connected <= 1'b0;
      word_cnt  <= '0;
    end else begin
      if (in_kind == FK_SETUP) connected <= 1'b1;
      else if (in_kind == FK_TEAR) connected <= 1'b0;
      if (fu_valid) word_cnt <= word_cnt + 32'd1;
    end
  end

endmodule
