// tb_noc_router: directed test of the circuit-switched router at (1,1) in a
// 4x4 mesh: routing to every direction, data and acknowledge switching,
// refusal of a set-up to a busy port, same-cycle contention, release by
// tear-down and release by a connection failure from further on.
module tb_noc_router;
  import noc_pkg::*;
  localparam int CW = 33, SW = 6;
  logic clk = 0, rst_n = 0;
  fkind_e in_fkind [NPORTS], out_fkind [NPORTS];
  logic [SW-1:0] in_fseq [NPORTS], out_fseq [NPORTS], in_bseq [NPORTS], out_bseq [NPORTS];
  logic [CW-1:0] in_fword [NPORTS], out_fword [NPORTS];
  bkind_e in_bkind [NPORTS], out_bkind [NPORTS];
  logic [15:0] conn_fail_cnt;
  int checks = 0, failures = 0;

  noc_router #(.CW(CW), .SEQ_W(SW), .X_W(2), .Y_W(2), .MY_X(1), .MY_Y(1)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic idle_all();
    for (int p = 0; p < NPORTS; p++) begin
      in_fkind[p] = FK_IDLE; in_fseq[p] = '0; in_fword[p] = '0;
      out_bkind[p] = BK_IDLE; out_bseq[p] = '0;
    end
  endtask

  function automatic logic [CW-1:0] addr(input int x, input int y);
    return CW'((y << 2) | x);
  endfunction

  // set-up from port p to (x,y): expect it on output o in the same cycle
  task automatic setup_ok(input int p, input int x, input int y, input int o);
    @(negedge clk);
    idle_all();
    in_fkind[p] = FK_SETUP; in_fword[p] = addr(x, y);
    #1;
    check(out_fkind[o] == FK_SETUP && out_fword[o] == addr(x, y), $sformatf("setup %0d->%0d", p, o));
    check(in_bkind[p] == BK_IDLE, "no fail on granted setup");
  endtask

  initial begin
    idle_all();
    repeat (2) @(posedge clk);
    rst_n = 1;
    // XY routing to all five directions, each torn down again
    setup_ok(P_LOCAL, 3, 1, P_EAST);
    @(negedge clk); idle_all(); in_fkind[P_LOCAL] = FK_TEAR; #1;
    check(out_fkind[P_EAST] == FK_TEAR, "tear forwarded");
    setup_ok(P_LOCAL, 0, 3, P_WEST);   // x first
    @(negedge clk); idle_all(); in_fkind[P_LOCAL] = FK_TEAR;
    setup_ok(P_WEST, 1, 3, P_SOUTH);
    @(negedge clk); idle_all(); in_fkind[P_WEST] = FK_TEAR;
    setup_ok(P_SOUTH, 1, 0, P_NORTH);
    @(negedge clk); idle_all(); in_fkind[P_SOUTH] = FK_TEAR;
    setup_ok(P_EAST, 1, 1, P_LOCAL);
    // data and acknowledges on the open connection East -> Local
    @(negedge clk); idle_all();
    in_fkind[P_EAST] = FK_DATA; in_fseq[P_EAST] = 6'd5; in_fword[P_EAST] = 33'h1_2345_6789;
    out_bkind[P_LOCAL] = BK_ACK; out_bseq[P_LOCAL] = 6'd4;
    #1;
    check(out_fkind[P_LOCAL] == FK_DATA && out_fseq[P_LOCAL] == 6'd5 && out_fword[P_LOCAL] == 33'h1_2345_6789, "data switched");
    check(in_bkind[P_EAST] == BK_ACK && in_bseq[P_EAST] == 6'd4, "ack switched back");
    check(out_fkind[P_EAST] == FK_IDLE && out_fkind[P_NORTH] == FK_IDLE, "no stray data");
    // a second set-up to the busy local port is refused
    @(negedge clk); idle_all();
    in_fkind[P_NORTH] = FK_SETUP; in_fword[P_NORTH] = addr(1, 1);
    #1;
    check(in_bkind[P_NORTH] == BK_CONN_FAIL, "busy port refused");
    check(out_fkind[P_LOCAL] == FK_IDLE, "refused setup not forwarded");
    // tear-down releases it; the retry succeeds
    @(negedge clk); idle_all(); in_fkind[P_EAST] = FK_TEAR;
    setup_ok(P_NORTH, 1, 1, P_LOCAL);
    // connection failure from further on releases the path
    @(negedge clk); idle_all(); out_bkind[P_LOCAL] = BK_CONN_FAIL;
    #1;
    check(in_bkind[P_NORTH] == BK_CONN_FAIL, "downstream fail passed back");
    setup_ok(P_SOUTH, 1, 1, P_LOCAL);
    @(negedge clk); idle_all(); in_fkind[P_SOUTH] = FK_TEAR;
    // two set-ups for the same output in one cycle: the lower port wins
    @(negedge clk); idle_all();
    in_fkind[P_NORTH] = FK_SETUP; in_fword[P_NORTH] = addr(2, 1);
    in_fkind[P_WEST]  = FK_SETUP; in_fword[P_WEST]  = addr(3, 1);
    #1;
    check(out_fkind[P_EAST] == FK_SETUP && out_fword[P_EAST] == addr(2, 1), "north wins");
    check(in_bkind[P_WEST] == BK_CONN_FAIL && in_bkind[P_NORTH] == BK_IDLE, "west refused");
    @(negedge clk); idle_all();
    check(conn_fail_cnt == 16'd2, "fail counter");
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
