// ni_recv: receiving part of a network interface.
//
// Incoming flits pass the ECC/EDC decoder (data flits only), then
// Error-Handling (in-order check, ACK/NACK) and Control (connection state,
// delivery to the functional unit).  Acknowledges travel the other way:
// Control's BK_CONN_OK, merged with Error-Handling's ACK/NACK, leave on the
// backward channel.  All combinational from flit in to word out and to the
// acknowledge out; the attached link registers them.  corr_cnt and
// detect_cnt count corrected and detected errors in data words.
// Block structure per the document's network-interface figure.
module ni_recv
  import noc_pkg::*;
#(
  parameter int    N     = 32,
  parameter code_e CODE  = CODE_SED,
  parameter eh_e   EH    = EH_SWE,
  parameter int    SEQ_W = 6,
  localparam int   CW    = cw_width(CODE, N)
) (
  input  logic             clk,
  input  logic             rst_n,
  // network
  input  fkind_e           fkind,
  input  logic [SEQ_W-1:0] fseq,
  input  logic [CW-1:0]    fword,
  output bkind_e           bkind,
  output logic [SEQ_W-1:0] bseq,
  // functional unit
  output logic             fu_valid,
  output logic [N-1:0]     fu_data,
  output logic             fu_err,
  output logic             fu_end,
  // status
  output logic             connected,
  output logic [31:0]      word_cnt,
  output logic [15:0]      corr_cnt,
  output logic [15:0]      detect_cnt,
  output logic [15:0]      nack_cnt,
  output logic [15:0]      drop_cnt
);

  logic [N-1:0] dec_data, eh_data;
  logic         err_detect, err_corr, err_uncorr, eh_err;
  fkind_e       eh_kind;
  bkind_e       ctl_bkind;

  edc_decoder #(.N(N), .CODE(CODE)) u_dec (
    .cw(fword), .data(dec_data), .err_detect, .err_corr, .err_uncorr);

  ni_recv_eh #(.N(N), .EH(EH), .SEQ_W(SEQ_W)) u_eh (
    .clk, .rst_n, .in_kind(fkind), .in_seq(fseq), .in_data(dec_data),
    .in_err(err_uncorr && fkind == FK_DATA),
    .out_kind(eh_kind), .out_data(eh_data), .out_err(eh_err),
    .ctl_bkind, .bkind, .bseq, .nack_cnt, .drop_cnt);

  ni_recv_control #(.N(N)) u_ctl (
    .clk, .rst_n, .in_kind(eh_kind), .in_data(eh_data), .in_err(eh_err),
    .bkind(ctl_bkind), .fu_valid, .fu_data, .fu_err, .fu_end, .connected, .word_cnt);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      corr_cnt   <= '0;
      detect_cnt <= '0;
    end else if (fkind == FK_DATA) begin
      if (err_corr && corr_cnt != '1) corr_cnt <= corr_cnt + 16'd1;
      if (err_detect && detect_cnt != '1) detect_cnt <= detect_cnt + 16'd1;
    end
  end

endmodule
