// ni_send_control: Control block of the network-interface send side; it
// implements circuit switching for one message at a time.
//
// A message is a run of words from the functional unit (valid/ready stream,
// fu_last on the final word, fu_dest held with the first word).
//   IDLE    -> SETUP   a word is waiting: send an FK_SETUP flit to fu_dest
//   WAIT           wait for BK_CONN_OK (go to DATA) or BK_CONN_FAIL (pulse
//                  conn_fail to Connection-Failure-Handling, go to BACKOFF)
//   BACKOFF        wait for retry, then send the set-up again
//   DATA           pass words on while Error-Handling allows (eh_can_send)
//                  and is not retransmitting (eh_retx); every word sent is
//                  reported with new_word
//   DRAIN          after the last word, wait until Error-Handling reports
//                  every word acknowledged
//   TEAR           send FK_TEAR, which releases the path, back to IDLE
// Outputs ctl_kind/ctl_word are combinational and go to the Mux.  conn_open
// pulses when a connection is established so that Error-Handling starts a
// new sequence.  The state sequence is this design's reading of the
// document's "Control realises the switching technique".
module ni_send_control
  import noc_pkg::*;
#(
  parameter int N      = 32,
  parameter int ADDR_W = 2
) (
  input  logic              clk,
  input  logic              rst_n,
  // functional unit
  input  logic              fu_valid,
  output logic              fu_ready,
  input  logic [N-1:0]      fu_data,
  input  logic              fu_last,
  input  logic [ADDR_W-1:0] fu_dest,
  // towards the Mux
  output fkind_e            ctl_kind,
  output logic [N-1:0]      ctl_word,
  // acknowledge channel
  input  bkind_e            bkind,
  // Connection-Failure-Handling
  output logic              conn_fail,
  input  logic              retry,
  // Error-Handling
  input  logic              eh_can_send,
  input  logic              eh_retx,
  input  logic              eh_all_acked,
  output logic              new_word,
  output logic              conn_open,
  output logic              busy
);

  typedef enum logic [2:0] {S_IDLE, S_SETUP, S_WAIT, S_BACKOFF, S_DATA, S_DRAIN, S_TEAR} state_e;
  state_e            state;
  logic [ADDR_W-1:0] dest;

  always_comb begin
    ctl_kind  = FK_IDLE;
    ctl_word  = '0;
    fu_ready  = 1'b0;
    new_word  = 1'b0;
    conn_fail = 1'b0;
    conn_open = 1'b0;
    case (state)
      S_SETUP: begin
        ctl_kind = FK_SETUP;
        ctl_word = N'(dest);
      end
      S_WAIT: begin
        conn_open = (bkind == BK_CONN_OK);
        conn_fail = (bkind == BK_CONN_FAIL);
      end
      S_DATA: begin
        fu_ready = eh_can_send && !eh_retx;
        if (fu_valid && fu_ready) begin
          ctl_kind = FK_DATA;
          ctl_word = fu_data;
          new_word = 1'b1;
        end
      end
      S_TEAR: ctl_kind = FK_TEAR;
      default: ;
    endcase
  end

  assign busy = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      dest  <= '0;
    end else begin
      case (state)
        S_IDLE:    if (fu_valid) begin dest <= fu_dest; state <= S_SETUP; end
        S_SETUP:   state <= S_WAIT;
        S_WAIT:    if (bkind == BK_CONN_OK) state <= S_DATA;
                   else if (bkind == BK_CONN_FAIL) state <= S_BACKOFF;
        S_BACKOFF: if (retry) state <= S_SETUP;
        S_DATA:    if (new_word && fu_last) state <= S_DRAIN;
        S_DRAIN:   if (eh_all_acked && !eh_retx) state <= S_TEAR;
        S_TEAR:    state <= S_IDLE;
        default:   state <= S_IDLE;
      endcase
    end
  end

endmodule
