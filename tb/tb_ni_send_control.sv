// tb_ni_send_control: one message of 3 words through the full state
// sequence: set-up refused, retry, set-up accepted, data gated by the
// error-handling signals, drain, tear-down.
module tb_ni_send_control;
  import noc_pkg::*;
  localparam int N = 32, AW = 2;
  logic clk = 0, rst_n = 0;
  logic fu_valid, fu_ready, fu_last;
  logic [N-1:0] fu_data;
  logic [AW-1:0] fu_dest;
  fkind_e ctl_kind;
  logic [N-1:0] ctl_word;
  bkind_e bkind;
  logic conn_fail, retry, eh_can_send, eh_retx, eh_all_acked, new_word, conn_open, busy;
  int checks = 0, failures = 0;

  ni_send_control #(.N(N), .ADDR_W(AW)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s @%0t", what, $time); end
  endtask

  initial begin
    fu_valid = 0; fu_last = 0; fu_data = '0; fu_dest = 2'd3; bkind = BK_IDLE; retry = 0;
    eh_can_send = 1; eh_retx = 0; eh_all_acked = 1;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk); #1;
    check(!busy && ctl_kind == FK_IDLE, "idle");
    fu_valid = 1; fu_data = 32'h11; #1;
    check(!fu_ready, "not ready before connection");
    @(negedge clk); #1;
    check(ctl_kind == FK_SETUP && ctl_word == 32'd3, "setup to dest");
    @(negedge clk); bkind = BK_CONN_FAIL; #1;
    check(conn_fail && !conn_open, "fail reported");
    @(negedge clk); bkind = BK_IDLE; #1;
    check(ctl_kind == FK_IDLE && !fu_ready, "backoff");
    @(negedge clk); retry = 1;
    @(negedge clk); retry = 0; #1;
    check(ctl_kind == FK_SETUP, "setup again after retry");
    @(negedge clk); bkind = BK_CONN_OK; #1;
    check(conn_open, "connection open");
    @(negedge clk); bkind = BK_IDLE; #1;
    check(fu_ready && new_word && ctl_kind == FK_DATA && ctl_word == 32'h11, "word 1");
    @(negedge clk); fu_data = 32'h22; eh_can_send = 0; #1;
    check(!fu_ready && !new_word && ctl_kind == FK_IDLE, "held by window");
    @(negedge clk); eh_can_send = 1; eh_retx = 1; #1;
    check(!fu_ready && !new_word, "held by retransmission");
    @(negedge clk); eh_retx = 0; #1;
    check(new_word && ctl_word == 32'h22, "word 2");
    @(negedge clk); fu_data = 32'h33; fu_last = 1; #1;
    check(new_word && ctl_word == 32'h33, "word 3");
    @(negedge clk); fu_valid = 0; fu_last = 0; eh_all_acked = 0; #1;
    check(ctl_kind == FK_IDLE && busy, "drain");
    @(negedge clk); eh_all_acked = 1;
    @(negedge clk); #1;
    check(ctl_kind == FK_TEAR, "tear down");
    @(negedge clk); #1;
    check(!busy && ctl_kind == FK_IDLE, "back to idle");
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
