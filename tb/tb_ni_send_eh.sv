// tb_ni_send_eh: the send-side error handling in all three protocols
// (WIN = 4, TTA = 10).  The Send-Buffer is modelled here as a plain array.
//   S&W : one word outstanding; ACK frees, NACK and a TTA timeout resend.
//   SWE : window fills at WIN words; ACKs slide it; a NACK resends the
//         base word and every later one, in order, from the buffer; a
//         timeout does the same.
//   S&F : always ready, never retransmits.
module tb_ni_send_eh;
  import noc_pkg::*;
  localparam int N = 16, WIN = 4, SW = 3, TTA = 10;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;

  // common drive
  logic conn_open, new_word;
  logic [N-1:0] new_data;
  bkind_e bkind;
  logic [SW-1:0] bseq;

  // S&W instance
  logic [SW-1:0] w_next, w_rseq;
  logic w_can, w_all, w_rv;
  logic [N-1:0] w_rword;
  logic [15:0] w_rc, w_tc;
  logic w_we; logic [1:0] w_wa, w_ra; logic [N-1:0] w_wd;
  ni_send_eh #(.N(N), .EH(EH_SW), .WIN(WIN), .SEQ_W(SW), .TTA(TTA)) u_sw (
    .clk, .rst_n, .conn_open, .new_word, .new_data, .next_seq(w_next), .can_send(w_can),
    .all_acked(w_all), .bkind, .bseq, .retx_valid(w_rv), .retx_word(w_rword), .retx_seq(w_rseq),
    .buf_we(w_we), .buf_waddr(w_wa), .buf_wdata(w_wd), .buf_raddr(w_ra), .buf_rdata('0),
    .retx_cnt(w_rc), .timeout_cnt(w_tc));

  // SWE instance with a modelled buffer
  logic [SW-1:0] e_next, e_rseq;
  logic e_can, e_all, e_rv;
  logic [N-1:0] e_rword;
  logic [15:0] e_rc, e_tc;
  logic e_we; logic [1:0] e_wa, e_ra; logic [N-1:0] e_wd;
  logic [N-1:0] mem [WIN];
  ni_send_eh #(.N(N), .EH(EH_SWE), .WIN(WIN), .SEQ_W(SW), .TTA(TTA)) u_swe (
    .clk, .rst_n, .conn_open, .new_word, .new_data, .next_seq(e_next), .can_send(e_can),
    .all_acked(e_all), .bkind, .bseq, .retx_valid(e_rv), .retx_word(e_rword), .retx_seq(e_rseq),
    .buf_we(e_we), .buf_waddr(e_wa), .buf_wdata(e_wd), .buf_raddr(e_ra), .buf_rdata(mem[e_ra]),
    .retx_cnt(e_rc), .timeout_cnt(e_tc));
  always_ff @(posedge clk) if (e_we) mem[e_wa] <= e_wd;

  // S&F instance
  logic [SW-1:0] f_next, f_rseq;
  logic f_can, f_all, f_rv;
  logic [N-1:0] f_rword;
  logic [15:0] f_rc, f_tc;
  logic f_we; logic [1:0] f_wa, f_ra; logic [N-1:0] f_wd;
  ni_send_eh #(.N(N), .EH(EH_SF), .WIN(WIN), .SEQ_W(SW), .TTA(TTA)) u_sf (
    .clk, .rst_n, .conn_open, .new_word, .new_data, .next_seq(f_next), .can_send(f_can),
    .all_acked(f_all), .bkind, .bseq, .retx_valid(f_rv), .retx_word(f_rword), .retx_seq(f_rseq),
    .buf_we(f_we), .buf_waddr(f_wa), .buf_wdata(f_wd), .buf_raddr(f_ra), .buf_rdata('0),
    .retx_cnt(f_rc), .timeout_cnt(f_tc));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s @%0t", what, $time); end
  endtask

  task automatic step(input bit nw, input logic [N-1:0] d, input bkind_e bk, input logic [SW-1:0] bs);
    @(negedge clk);
    new_word = nw; new_data = d; bkind = bk; bseq = bs; conn_open = 0;
  endtask

  task automatic quiet();
    step(0, '0, BK_IDLE, '0);
  endtask

  initial begin
    int n, rc0, tc0;
    conn_open = 0; new_word = 0; new_data = '0; bkind = BK_IDLE; bseq = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk); conn_open = 1;
    quiet();
    // ---------------- S&W ----------------
    check(w_can && w_all && w_next == 0, "SW idle");
    step(1, 16'hA001, BK_IDLE, 0);
    quiet(); #1;
    check(!w_can && !w_all && w_next == 1, "SW waits after a word");
    step(0, '0, BK_NACK, 0); #1;
    check(w_rv && w_rword == 16'hA001 && w_rseq == 0, "SW resends on NACK");
    step(0, '0, BK_ACK, 0);
    quiet(); #1;
    check(w_can && w_all, "SW free after ACK");
    step(1, 16'hA002, BK_IDLE, 0);
    n = 0;
    do begin quiet(); #1; n++; end while (!w_rv && n < 50);
    check(w_rv && w_rword == 16'hA002 && w_rseq == 1 && n == TTA + 1, $sformatf("SW timeout after %0d", n));
    check(w_tc == 0, "SW timeout count before edge");
    quiet(); #1;
    check(w_tc == 1 && w_rc == 2, $sformatf("SW counters %0d %0d", w_tc, w_rc));
    step(0, '0, BK_ACK, 1);
    quiet(); #1;
    check(w_all, "SW all acked");
    // ---------------- S&F ----------------
    check(f_can && f_all && !f_rv && f_next == 2, "SF always ready");
    // ---------------- SWE ----------------
    @(negedge clk); conn_open = 1;
    rc0 = e_rc; tc0 = e_tc;
    quiet(); #1;
    check(e_can && e_all && e_next == 0, "SWE restart");
    for (int i = 0; i < WIN; i++) step(1, 16'hB000 + N'(i), BK_IDLE, 0);
    quiet(); #1;
    check(!e_can && e_next == 4, "SWE window full");
    step(0, '0, BK_ACK, 0); #1;
    check(e_can, "SWE ack frees a window slot at once");
    quiet(); #1;
    check(e_can, "SWE window slid");
    step(1, 16'hB004, BK_IDLE, 0);   // seq 4
    // NACK for base (seq 1): resend 1,2,3,4
    step(0, '0, BK_NACK, 1); #1;
    check(!e_can, "SWE blocks new words on NACK");
    for (int i = 1; i <= 4; i++) begin
      quiet(); #1;
      check(e_rv && e_rseq == SW'(i) && e_rword == 16'hB000 + N'(i), $sformatf("SWE resend %0d", i));
    end
    quiet(); #1;
    check(!e_rv, "SWE resend ends");
    for (int i = 1; i <= 4; i++) step(0, '0, BK_ACK, SW'(i));
    quiet(); #1;
    check(e_all && e_can, "SWE all acked");
    // timeout: one word, no answer
    step(1, 16'hC005, BK_IDLE, 0);
    n = 0;
    do begin quiet(); #1; n++; end while (!e_rv && n < 50);
    check(e_rv && e_rseq == 5 && e_rword == 16'hC005, "SWE timeout resend");
    check(n == TTA + 2, $sformatf("SWE timeout latency %0d", n));
    step(0, '0, BK_ACK, 5);
    quiet(); #1;
    check(e_all && e_tc == tc0 + 1 && e_rc == rc0 + 5, $sformatf("SWE counters %0d %0d %0d", e_all, e_tc, e_rc));
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
