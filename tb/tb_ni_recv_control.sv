// tb_ni_recv_control: set-up answered with CONN_OK, words delivered only
// while connected, tear-down ends the message.
module tb_ni_recv_control;
  import noc_pkg::*;
  localparam int N = 32;
  logic clk = 0, rst_n = 0;
  fkind_e in_kind;
  logic [N-1:0] in_data, fu_data;
  logic in_err, fu_valid, fu_err, fu_end, connected;
  bkind_e bkind;
  logic [31:0] word_cnt;
  int checks = 0, failures = 0;

  ni_recv_control #(.N(N)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s @%0t", what, $time); end
  endtask

  task automatic drive(input fkind_e k, input logic [N-1:0] d, input bit e);
    @(negedge clk); in_kind = k; in_data = d; in_err = e; #1;
  endtask

  initial begin
    in_kind = FK_IDLE; in_data = '0; in_err = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    drive(FK_DATA, 32'h1, 0);
    check(!fu_valid, "no delivery before set-up");
    drive(FK_SETUP, 32'h0, 0);
    check(bkind == BK_CONN_OK && !fu_valid, "set-up answered");
    for (int i = 0; i < 5; i++) begin
      drive(FK_DATA, 32'hA0 + 32'(i), (i == 3));
      check(fu_valid && fu_data == 32'hA0 + 32'(i) && fu_err == (i == 3) && bkind == BK_IDLE, "delivery");
    end
    drive(FK_IDLE, '0, 0);
    check(!fu_valid && connected, "idle");
    drive(FK_TEAR, '0, 0);
    check(fu_end, "end of message");
    drive(FK_DATA, 32'h2, 0);
    check(!fu_valid && !connected, "closed");
    check(word_cnt == 32'd5, "word count");
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
