// ni_send_mux: Mux of the network-interface send side.
//
// Chooses what goes to the ECC/EDC encoder: a word retransmitted by
// Error-Handling (from its own register under S&W, from the Send-Buffer
// under S&W SWE) whenever one is offered, otherwise the flit from Control
// with the sequence number Error-Handling assigns to new words.
// Combinational.  Present only with S&W and S&W SWE, as in the document.
module ni_send_mux
  import noc_pkg::*;
#(
  parameter int N     = 32,
  parameter int SEQ_W = 6
) (
  input  fkind_e           ctl_kind,
  input  logic [N-1:0]     ctl_word,
  input  logic [SEQ_W-1:0] ctl_seq,
  input  logic             retx_valid,
  input  logic [N-1:0]     retx_word,
  input  logic [SEQ_W-1:0] retx_seq,
  output fkind_e           kind,
  output logic [N-1:0]     word,
  output logic [SEQ_W-1:0] seq
);

  always_comb begin
    if (retx_valid) begin
      kind = FK_DATA;
      word = retx_word;
      seq  = retx_seq;
    end else begin
      kind = ctl_kind;
      word = ctl_word;
      seq  = (ctl_kind == FK_DATA) ? ctl_seq : '0;
    end
  end

endmodule
