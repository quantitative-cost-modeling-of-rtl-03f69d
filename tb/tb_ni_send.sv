// tb_ni_send: the whole sending network interface (SED, S&W SWE, WIN = 4)
// against a modelled network and receiver.  The model answers after a
// fixed delay: the first set-up is refused, the second accepted; data words
// are parity-checked and acknowledged in order, one chosen word is reported
// erroneous (NACK), out-of-order words are dropped.  The test checks the
// set-up address, the retry, that all 20 words arrive once, in order and
// unchanged, that no more than WIN words are ever unacknowledged, and the
// final tear-down.
module tb_ni_send;
  import noc_pkg::*;
  localparam int N = 32, WIN = 4, SW = 3, CW = 33, D = 6, NW = 20;
  logic clk = 0, rst_n = 0;
  logic fu_valid, fu_ready, fu_last;
  logic [N-1:0] fu_data;
  logic [1:0] fu_dest;
  fkind_e fkind;
  logic [SW-1:0] fseq, bseq;
  logic [CW-1:0] fword;
  bkind_e bkind;
  logic busy;
  logic [15:0] conn_fail_cnt, retx_cnt, timeout_cnt;
  int checks = 0, failures = 0;

  ni_send #(.N(N), .CODE(CODE_SED), .EH(EH_SWE), .WIN(WIN), .SEQ_W(SW), .TTA(40), .RETRY_DELAY(3)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s @%0t", what, $time); end
  endtask

  // receiver model with a D-cycle answer delay line
  bkind_e        dk [D];
  logic [SW-1:0] ds [D];
  int setups = 0, expect_n = 0, got = 0, nacked = 0, tears = 0, sent_new = 0, acked = 0;
  logic [N-1:0] rx [NW];
  assign bkind = dk[D-1];
  assign bseq  = ds[D-1];

  always_ff @(posedge clk) begin
    bkind_e a; logic [SW-1:0] s;
    a = BK_IDLE; s = '0;
    if (rst_n) begin
      case (fkind)
        FK_SETUP: begin
          check(fword[1:0] == 2'd2, "set-up carries destination");
          setups++;
          a = (setups == 1) ? BK_CONN_FAIL : BK_CONN_OK;
        end
        FK_DATA: begin
          check(^fword == 1'b0, "parity of code word");
          if (fseq == SW'(expect_n)) begin
            if (expect_n == 7 && !nacked) begin
              nacked = 1; a = BK_NACK; s = fseq;
            end else begin
              rx[expect_n] = fword[N-1:0];
              expect_n++; got++; a = BK_ACK; s = fseq;
            end
          end
        end
        FK_TEAR: tears++;
        default: ;
      endcase
    end
    dk[0] <= a; ds[0] <= s;
    for (int i = 1; i < D; i++) begin dk[i] <= dk[i-1]; ds[i] <= ds[i-1]; end
    if (bkind == BK_ACK) acked++;
    if (fu_valid && fu_ready) sent_new++;
    if (rst_n) check(sent_new - acked <= WIN, "window respected");
  end

  initial begin
    for (int i = 0; i < D; i++) begin dk[i] = BK_IDLE; ds[i] = '0; end
    fu_valid = 0; fu_last = 0; fu_data = '0; fu_dest = 2'd2;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < NW; i++) begin
      @(negedge clk);
      fu_valid = 1; fu_data = 32'h5A00_0000 + 32'(i * 7); fu_last = (i == NW - 1);
      @(posedge clk);
      while (!fu_ready) @(posedge clk);
    end
    @(negedge clk); fu_valid = 0; fu_last = 0;
    wait (!busy);
    @(negedge clk);
    check(setups == 2 && conn_fail_cnt == 1, "one refused set-up, one retry");
    check(got == NW, $sformatf("all words received (%0d)", got));
    for (int i = 0; i < NW; i++) check(rx[i] == 32'h5A00_0000 + 32'(i * 7), "word content and order");
    check(tears == 1, "tear-down sent");
    check(retx_cnt >= 1 && timeout_cnt == 0, "retransmission after NACK, no timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
