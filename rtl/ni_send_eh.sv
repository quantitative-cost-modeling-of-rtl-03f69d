// ni_send_eh: Error-Handling of the network-interface send side.
//
// Gives every new data word a sequence number (next_seq) and, depending on
// EH, makes sure it arrives:
//   EH_SF   send and forget: no acknowledge expected, nothing kept.
//   EH_SW   send and wait: after a word is sent no new word may go
//           (can_send = 0) until BK_ACK with its sequence number returns.
//           The word is kept in a register here.  A BK_NACK for it, or no
//           answer within TTA cycles (time to acknowledge), makes it go
//           again at once (retx_valid for one cycle).
//   EH_SWE  sliding window: up to WIN words may be unacknowledged; they
//           sit in the Send-Buffer (buf_* ports, index = low log2(WIN) bits of seq).
//           Acknowledges arrive in order and move the window base.  A
//           BK_NACK for the base word, or TTA cycles without progress,
//           starts a go-back-N retransmission: the base word and every
//           word after it are sent again, one per cycle, from the buffer.
// Sequence numbers are SEQ_W = log2(WIN)+1 bits wide so that a full window
// is never ambiguous.  conn_open restarts numbering for a new connection.
// all_acked tells Control that the connection may be torn down.
// The three protocols, the time to acknowledge and the window follow the
// document; the sequence numbers and go-back-N details are this design's.
module ni_send_eh
  import noc_pkg::*;
#(
  parameter int  N     = 32,
  parameter eh_e EH    = EH_SWE,
  parameter int  WIN   = 32,
  parameter int  SEQ_W = $clog2(WIN) + 1,
  parameter int  TTA   = 64,
  localparam int AW    = (WIN > 1) ? $clog2(WIN) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             conn_open,
  // new word from Control
  input  logic             new_word,
  input  logic [N-1:0]     new_data,
  output logic [SEQ_W-1:0] next_seq,
  output logic             can_send,
  output logic             all_acked,
  // acknowledge channel
  input  bkind_e           bkind,
  input  logic [SEQ_W-1:0] bseq,
  // retransmission towards the Mux
  output logic             retx_valid,
  output logic [N-1:0]     retx_word,
  output logic [SEQ_W-1:0] retx_seq,
  // Send-Buffer
  output logic             buf_we,
  output logic [AW-1:0]    buf_waddr,
  output logic [N-1:0]     buf_wdata,
  output logic [AW-1:0]    buf_raddr,
  input  logic [N-1:0]     buf_rdata,
  // statistics
  output logic [15:0]      retx_cnt,
  output logic [15:0]      timeout_cnt
);

  localparam int TW = $clog2(TTA + 1);

  logic [SEQ_W-1:0] nseq;
  logic [TW-1:0]    timer;
  logic             timeout;

  assign next_seq = nseq;

  generate
    if (EH == EH_SW) begin : g_sw
      logic         outstanding;
      logic [N-1:0] hold;
      logic         trig;

      assign timeout    = outstanding && (timer == TW'(TTA));
      assign trig       = outstanding && ((bkind == BK_NACK && bseq == retx_seq) || timeout);
      // the matching acknowledge frees the sender in the cycle it arrives
      assign can_send   = !outstanding || (bkind == BK_ACK && bseq == retx_seq);
      assign all_acked  = !outstanding;
      assign retx_valid = trig;
      assign retx_word  = hold;
      assign buf_we     = 1'b0;
      assign buf_waddr  = '0;
      assign buf_wdata  = '0;
      assign buf_raddr  = '0;

      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n) begin
          outstanding <= 1'b0;
          hold        <= '0;
          retx_seq    <= '0;
          nseq        <= '0;
          timer       <= '0;
          retx_cnt    <= '0;
          timeout_cnt <= '0;
        end else if (conn_open) begin
          outstanding <= 1'b0;
          nseq        <= '0;
        end else begin
          if (new_word) begin
            // (an acknowledge arriving in the same cycle is for the old word)
            outstanding <= 1'b1;
            hold        <= new_data;
            retx_seq    <= nseq;
            nseq        <= nseq + 1'b1;
            timer       <= '0;
          end else if (outstanding && bkind == BK_ACK && bseq == retx_seq) begin
            outstanding <= 1'b0;
          end else if (trig) begin
            timer <= '0;
            if (retx_cnt != '1) retx_cnt <= retx_cnt + 16'd1;
            if (timeout && timeout_cnt != '1) timeout_cnt <= timeout_cnt + 16'd1;
          end else if (outstanding) begin
            timer <= timer + TW'(1);
          end
        end
      end

    end else if (EH == EH_SWE) begin : g_swe
      logic [SEQ_W-1:0] base, rptr;
      logic [SEQ_W-1:0] count;
      logic             active;  // retransmission in progress
      logic             ack_ok, trig;

      assign count      = nseq - base;
      assign ack_ok     = (count != '0) && bkind == BK_ACK && bseq == base;
      assign timeout    = (count != '0) && (timer == TW'(TTA));
      assign trig       = (count != '0) && ((bkind == BK_NACK && bseq == base) || timeout);
      assign can_send   = ((count < SEQ_W'(WIN)) || ack_ok) && !active && !trig;
      assign all_acked  = (count == '0) && !active;
      assign retx_valid = active;
      assign retx_word  = buf_rdata;
      assign retx_seq   = rptr;
      assign buf_we     = new_word;
      assign buf_waddr  = AW'(nseq);
      assign buf_wdata  = new_data;
      assign buf_raddr  = AW'(rptr);

      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n) begin
          base        <= '0;
          nseq        <= '0;
          rptr        <= '0;
          active      <= 1'b0;
          timer       <= '0;
          retx_cnt    <= '0;
          timeout_cnt <= '0;
        end else if (conn_open) begin
          base   <= '0;
          nseq   <= '0;
          active <= 1'b0;
          timer  <= '0;
        end else begin
          if (new_word) nseq <= nseq + 1'b1;
          if (ack_ok) base <= base + 1'b1;
          if (trig) begin
            // go back to the oldest unacknowledged word
            active <= 1'b1;
            rptr   <= ack_ok ? base + 1'b1 : base;
            timer  <= '0;
            if (timeout && timeout_cnt != '1) timeout_cnt <= timeout_cnt + 16'd1;
          end else if (active) begin
            if (retx_cnt != '1) retx_cnt <= retx_cnt + 16'd1;
            rptr <= rptr + 1'b1;
            if (rptr + 1'b1 == nseq) active <= 1'b0;
          end
          if (!trig) begin
            if (ack_ok || count == '0) timer <= '0;
            else timer <= timer + TW'(1);
          end
        end
      end

    end else begin : g_sf
      assign timeout    = 1'b0;
      assign can_send   = 1'b1;
      assign all_acked  = 1'b1;
      assign retx_valid = 1'b0;
      assign retx_word  = '0;
      assign retx_seq   = '0;
      assign buf_we     = 1'b0;
      assign buf_waddr  = '0;
      assign buf_wdata  = '0;
      assign buf_raddr  = '0;
      assign timer      = '0;
      assign retx_cnt    = '0;
      assign timeout_cnt = '0;

      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n)         nseq <= '0;
        else if (conn_open) nseq <= '0;
        else if (new_word)  nseq <= nseq + 1'b1;
      end
    end
  endgenerate

  // the window never holds more than WIN words
  if (EH == EH_SWE) begin : g_chk
    assert property (@(posedge clk) disable iff (!rst_n) (nseq - g_swe.base) <= SEQ_W'(WIN))
      else $error("send window overflow");
  end

endmodule
