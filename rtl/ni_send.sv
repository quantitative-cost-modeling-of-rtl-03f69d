// ni_send: sending part of a network interface.
//
// Data words from the functional unit go through Control, which sets up a
// circuit to the destination (retried by Connection-Failure-Handling when a
// router refuses it), and on to the Mux and the ECC/EDC encoder.
// Error-Handling numbers the words and, for S&W and S&W SWE, keeps them
// (S&W in its own register, S&W SWE in the Send-Buffer) until they are
// acknowledged; retransmitted words reach the encoder through the Mux.
// With S&F there is no Mux and no buffer.  Set-up and tear-down flits are
// not encoded: the set-up carries the destination address in its word.
// Output flits are combinational; the attached link registers them.
// Block structure per the document's network-interface figure.
module ni_send
  import noc_pkg::*;
#(
  parameter int    N           = 32,
  parameter code_e CODE        = CODE_SED,
  parameter eh_e   EH          = EH_SWE,
  parameter int    WIN         = 32,
  parameter int    SEQ_W       = $clog2(WIN) + 1,
  parameter int    TTA         = 64,
  parameter int    RETRY_DELAY = 8,
  parameter int    ADDR_W      = 2,
  localparam int   CW          = cw_width(CODE, N)
) (
  input  logic              clk,
  input  logic              rst_n,
  // functional unit
  input  logic              fu_valid,
  output logic              fu_ready,
  input  logic [N-1:0]      fu_data,
  input  logic              fu_last,
  input  logic [ADDR_W-1:0] fu_dest,
  // network
  output fkind_e            fkind,
  output logic [SEQ_W-1:0]  fseq,
  output logic [CW-1:0]     fword,
  input  bkind_e            bkind,
  input  logic [SEQ_W-1:0]  bseq,
  // status
  output logic              busy,
  output logic [15:0]       conn_fail_cnt,
  output logic [15:0]       retx_cnt,
  output logic [15:0]       timeout_cnt
);

  localparam int AW = (WIN > 1) ? $clog2(WIN) : 1;

  fkind_e           ctl_kind, mux_kind;
  logic [N-1:0]     ctl_word, mux_word, retx_word, buf_wdata, buf_rdata;
  logic [SEQ_W-1:0] next_seq, retx_seq, mux_seq;
  logic             conn_fail, retry, can_send, all_acked, retx_valid, new_word, conn_open;
  logic             buf_we;
  logic [AW-1:0]    buf_waddr, buf_raddr;
  logic [CW-1:0]    cw;

  ni_send_control #(.N(N), .ADDR_W(ADDR_W)) u_ctl (
    .clk, .rst_n, .fu_valid, .fu_ready, .fu_data, .fu_last, .fu_dest,
    .ctl_kind, .ctl_word, .bkind, .conn_fail, .retry,
    .eh_can_send(can_send), .eh_retx(retx_valid), .eh_all_acked(all_acked),
    .new_word, .conn_open, .busy);

  ni_send_cfh #(.RETRY_DELAY(RETRY_DELAY)) u_cfh (
    .clk, .rst_n, .conn_fail, .retry, .fail_cnt(conn_fail_cnt));

  ni_send_eh #(.N(N), .EH(EH), .WIN(WIN), .SEQ_W(SEQ_W), .TTA(TTA)) u_eh (
    .clk, .rst_n, .conn_open, .new_word, .new_data(ctl_word), .next_seq,
    .can_send, .all_acked, .bkind, .bseq, .retx_valid, .retx_word, .retx_seq,
    .buf_we, .buf_waddr, .buf_wdata, .buf_raddr, .buf_rdata, .retx_cnt, .timeout_cnt);

  if (EH == EH_SWE) begin : g_buf
    ni_send_buffer #(.N(N), .WIN(WIN)) u_buf (
      .clk, .we(buf_we), .waddr(buf_waddr), .wdata(buf_wdata), .raddr(buf_raddr), .rdata(buf_rdata));
  end else begin : g_nobuf
    assign buf_rdata = '0;
  end

  if (EH == EH_SF) begin : g_nomux
    assign mux_kind = ctl_kind;
    assign mux_word = ctl_word;
    assign mux_seq  = (ctl_kind == FK_DATA) ? next_seq : '0;
  end else begin : g_mux
    ni_send_mux #(.N(N), .SEQ_W(SEQ_W)) u_mux (
      .ctl_kind, .ctl_word, .ctl_seq(next_seq), .retx_valid, .retx_word, .retx_seq,
      .kind(mux_kind), .word(mux_word), .seq(mux_seq));
  end

  edc_encoder #(.N(N), .CODE(CODE)) u_enc (.data(mux_word), .cw);

  assign fkind = mux_kind;
  assign fseq  = mux_seq;
  assign fword = (mux_kind == FK_DATA) ? cw : CW'(mux_word);

endmodule
