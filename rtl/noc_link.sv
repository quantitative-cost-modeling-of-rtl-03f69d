// noc_link: one bidirectional NoC link between two blocks (network
// interface to routing switch, or switch to switch).
//
// The forward channel (kind, seq, word) runs from side A to side B and the
// backward acknowledge channel (kind, seq) from B to A.  Each direction is
// one register stage, so a link costs one cycle each way.  For the
// emulation experiments a link can add errors to the data words it carries:
// inj_mask is XORed into the code word of every FK_DATA flit (all zero for
// an error-free link).  The register stage and the injection port are this
// design's choices; the document only names the link as a building block.
module noc_link
  import noc_pkg::*;
#(
  parameter int CW    = 33,
  parameter int SEQ_W = 6
) (
  input  logic             clk,
  input  logic             rst_n,
  // side A
  input  fkind_e           a_fkind,
  input  logic [SEQ_W-1:0] a_fseq,
  input  logic [CW-1:0]    a_fword,
  output bkind_e           a_bkind,
  output logic [SEQ_W-1:0] a_bseq,
  // side B
  output fkind_e           b_fkind,
  output logic [SEQ_W-1:0] b_fseq,
  output logic [CW-1:0]    b_fword,
  input  bkind_e           b_bkind,
  input  logic [SEQ_W-1:0] b_bseq,
  // error injection on data words
  input  logic [CW-1:0]    inj_mask
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      b_fkind <= FK_IDLE;
      b_fseq  <= '0;
      b_fword <= '0;
      a_bkind <= BK_IDLE;
      a_bseq  <= '0;
    end else begin
      b_fkind <= a_fkind;
      b_fseq  <= a_fseq;
      b_fword <= (a_fkind == FK_DATA) ? (a_fword ^ inj_mask) : a_fword;
      a_bkind <= b_bkind;
      a_bseq  <= b_bseq;
    end
  end

endmodule
