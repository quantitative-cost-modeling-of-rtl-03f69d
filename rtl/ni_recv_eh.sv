// ni_recv_eh: Error-Handling of the network-interface receive side.
//
// Gets each decoded flit from the ECC/EDC decoder, with its non-correctable
// error flag, and decides what reaches Control:
//   EH_SF   every data word is passed on, with its error flag (errors are
//           accepted).  No acknowledges.
//   EH_SW / EH_SWE  only the word with the expected sequence number and no
//           non-correctable error is passed on and answered with BK_ACK.
//           The expected word arriving with such an error is answered with
//           BK_NACK (a retransmission request); words with any other
//           sequence number (those following an erroneous one under
//           go-back-N, or duplicates) are dropped silently.
// Set-up and tear-down flits pass unchanged; a set-up restarts the expected
// sequence number.  On the acknowledge path the block merges its own
// answers with those of Control (BK_CONN_OK); both cannot occur in the same
// cycle because each answers a different incoming flit.  Combinational
// outputs, one flit per cycle.
module ni_recv_eh
  import noc_pkg::*;
#(
  parameter int  N     = 32,
  parameter eh_e EH    = EH_SWE,
  parameter int  SEQ_W = 6
) (
  input  logic             clk,
  input  logic             rst_n,
  // from the decoder
  input  fkind_e           in_kind,
  input  logic [SEQ_W-1:0] in_seq,
  input  logic [N-1:0]     in_data,
  input  logic             in_err,
  // to Control
  output fkind_e           out_kind,
  output logic [N-1:0]     out_data,
  output logic             out_err,
  // acknowledge path
  input  bkind_e           ctl_bkind,
  output bkind_e           bkind,
  output logic [SEQ_W-1:0] bseq,
  // statistics
  output logic [15:0]      nack_cnt,
  output logic [15:0]      drop_cnt
);

  logic [SEQ_W-1:0] expect_seq;
  logic             is_data, in_order, accept, nack;

  assign is_data  = (in_kind == FK_DATA);
  assign in_order = (in_seq == expect_seq);
  assign accept   = is_data && ((EH == EH_SF) || (in_order && !in_err));
  assign nack     = is_data && (EH != EH_SF) && in_order && in_err;

  always_comb begin
    out_kind = is_data ? (accept ? FK_DATA : FK_IDLE) : in_kind;
    out_data = in_data;
    out_err  = accept && in_err;
    bkind    = ctl_bkind;
    bseq     = '0;
    if (EH != EH_SF && is_data) begin
      if (accept) begin
        bkind = BK_ACK;
        bseq  = in_seq;
      end else if (nack) begin
        bkind = BK_NACK;
        bseq  = in_seq;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      expect_seq <= '0;
      nack_cnt   <= '0;
      drop_cnt   <= '0;
    end else begin
      if (in_kind == FK_SETUP) expect_seq <= '0;
      else if (accept) expect_seq <= expect_seq + 1'b1;
      if (nack && nack_cnt != '1) nack_cnt <= nack_cnt + 16'd1;
      if (is_data && !accept && !nack && drop_cnt != '1) drop_cnt <= drop_cnt + 16'd1;
    end
  end

endmodule
