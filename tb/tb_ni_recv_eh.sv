// tb_ni_recv_eh: receive-side error handling, go-back-N instance (SWE) and
// send-and-forget instance (S&F) fed with the same flits: in-order words
// are acknowledged, the expected word with an error is NACKed, later words
// are dropped until the retransmission arrives; S&F passes everything.
module tb_ni_recv_eh;
  import noc_pkg::*;
  localparam int N = 32, SW = 6;
  logic clk = 0, rst_n = 0;
  fkind_e in_kind, g_kind, f_kind;
  logic [SW-1:0] in_seq, g_bseq, f_bseq;
  logic [N-1:0] in_data, g_data, f_data;
  logic in_err, g_err, f_err;
  bkind_e ctl_bkind, g_bkind, f_bkind;
  logic [15:0] g_nack, g_drop, f_nack, f_drop;
  int checks = 0, failures = 0;

  ni_recv_eh #(.N(N), .EH(EH_SWE), .SEQ_W(SW)) u_g (.clk, .rst_n, .in_kind, .in_seq, .in_data, .in_err,
    .out_kind(g_kind), .out_data(g_data), .out_err(g_err), .ctl_bkind, .bkind(g_bkind), .bseq(g_bseq),
    .nack_cnt(g_nack), .drop_cnt(g_drop));
  ni_recv_eh #(.N(N), .EH(EH_SF), .SEQ_W(SW)) u_f (.clk, .rst_n, .in_kind, .in_seq, .in_data, .in_err,
    .out_kind(f_kind), .out_data(f_data), .out_err(f_err), .ctl_bkind, .bkind(f_bkind), .bseq(f_bseq),
    .nack_cnt(f_nack), .drop_cnt(f_drop));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s @%0t", what, $time); end
  endtask

  // present one flit, check the go-back-N answer and the S&F pass-through
  task automatic flit(input fkind_e k, input int s, input bit e, input bit g_pass, input bkind_e g_b);
    @(negedge clk);
    in_kind = k; in_seq = SW'(s); in_data = 32'hD000 + 32'(s); in_err = e;
    ctl_bkind = (k == FK_SETUP) ? BK_CONN_OK : BK_IDLE;
    #1;
    if (k == FK_DATA) begin
      check((g_kind == FK_DATA) == g_pass && (!g_pass || g_data == in_data), $sformatf("SWE pass seq %0d", s));
      check(g_bkind == g_b && (g_b == BK_IDLE || g_bseq == SW'(s)), $sformatf("SWE answer seq %0d", s));
      check(f_kind == FK_DATA && f_err == e && f_bkind == BK_IDLE, $sformatf("SF pass seq %0d", s));
    end else begin
      check(g_kind == k && f_kind == k, "control flit passes");
      check(g_bkind == ctl_bkind && f_bkind == ctl_bkind, "control answer merged");
    end
  endtask

  initial begin
    in_kind = FK_IDLE; in_seq = '0; in_data = '0; in_err = 0; ctl_bkind = BK_IDLE;
    repeat (2) @(posedge clk);
    rst_n = 1;
    flit(FK_SETUP, 0, 0, 0, BK_IDLE);
    flit(FK_DATA, 0, 0, 1, BK_ACK);
    flit(FK_DATA, 1, 0, 1, BK_ACK);
    flit(FK_DATA, 2, 1, 0, BK_NACK);   // error on the expected word
    flit(FK_DATA, 3, 0, 0, BK_IDLE);   // following words dropped
    flit(FK_DATA, 4, 1, 0, BK_IDLE);
    flit(FK_DATA, 2, 1, 0, BK_NACK);   // retransmission hit again
    flit(FK_DATA, 2, 0, 1, BK_ACK);    // and now good
    flit(FK_DATA, 3, 0, 1, BK_ACK);
    flit(FK_DATA, 1, 0, 0, BK_IDLE);   // stale duplicate
    flit(FK_TEAR, 0, 0, 0, BK_IDLE);
    flit(FK_SETUP, 0, 0, 0, BK_IDLE);  // new connection restarts numbering
    flit(FK_DATA, 0, 0, 1, BK_ACK);
    @(negedge clk); in_kind = FK_IDLE;
    check(g_nack == 2 && g_drop == 3 && f_nack == 0 && f_drop == 0, "counters");
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
