// tb_ni_recv: the whole receiving network interface (SED, S&W SWE) fed
// with flits built here: set-up gets CONN_OK; parity-correct in-order
// words are delivered and acknowledged; a word with a flipped bit is
// NACKed and not delivered; the words behind it are dropped until it comes
// again; tear-down ends the message.
module tb_ni_recv;
  import noc_pkg::*;
  localparam int N = 32, SW = 6, CW = 33;
  logic clk = 0, rst_n = 0;
  fkind_e fkind;
  logic [SW-1:0] fseq, bseq;
  logic [CW-1:0] fword;
  bkind_e bkind;
  logic fu_valid, fu_err, fu_end, connected;
  logic [N-1:0] fu_data;
  logic [31:0] word_cnt;
  logic [15:0] corr_cnt, detect_cnt, nack_cnt, drop_cnt;
  int checks = 0, failures = 0;

  ni_recv #(.N(N), .CODE(CODE_SED), .EH(EH_SWE), .SEQ_W(SW)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s @%0t", what, $time); end
  endtask

  task automatic send(input fkind_e k, input int s, input bit corrupt, input bit deliver, input bkind_e b);
    logic [N-1:0] d;
    d = 32'hC0DE_0000 + 32'(s);
    @(negedge clk);
    fkind = k; fseq = SW'(s);
    fword = (k == FK_DATA) ? ({^d, d} ^ (corrupt ? 33'h1_0000 : 33'h0)) : CW'(1);
    #1;
    check(bkind == b && (b != BK_ACK && b != BK_NACK || bseq == SW'(s)), $sformatf("answer to %0d", s));
    if (k == FK_DATA)
      check(fu_valid == deliver && (!deliver || (fu_data == d && !fu_err)), $sformatf("delivery of %0d", s));
  endtask

  initial begin
    fkind = FK_IDLE; fseq = '0; fword = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    send(FK_SETUP, 0, 0, 0, BK_CONN_OK);
    send(FK_DATA, 0, 0, 1, BK_ACK);
    send(FK_DATA, 1, 1, 0, BK_NACK);
    send(FK_DATA, 2, 0, 0, BK_IDLE);
    send(FK_DATA, 1, 0, 1, BK_ACK);
    send(FK_DATA, 2, 0, 1, BK_ACK);
    send(FK_TEAR, 0, 0, 0, BK_IDLE);
    check(fu_end, "end of message");
    @(negedge clk); fkind = FK_IDLE;
    #1;
    check(!connected && word_cnt == 3 && detect_cnt == 1 && nack_cnt == 1 && drop_cnt == 1 && corr_cnt == 0, "status counters");
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
