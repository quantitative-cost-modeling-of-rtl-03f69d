// tb_noc_emulator_full: the emulator top at its default configuration
// (two switches, 32-bit words, SED, S&W SWE, 32-word window) through one
// complete experiment: interfaces 0 and 1 send each other a message
// (1000 and 500 words) at the same time while the channel from switch 0 to
// switch 1 corrupts about 1% of the data words.  Both messages must arrive
// whole, in order and without flagged words, the corrupted ones resent.
module tb_noc_emulator_full;
  import noc_pkg::*;
  localparam int NODES = 2, CW = 33;
  logic clk = 0, rst_n = 0;
  logic        src_start [NODES];
  logic [15:0] src_len   [NODES];
  logic [1:0]  src_dest  [NODES];
  logic [7:0]  src_gap   [NODES];
  logic [CW-1:0] inj_ni [NODES], inj_out [NODES][NPORTS];
  logic        src_busy [NODES], ni_busy [NODES];
  logic [31:0] src_sent [NODES], snk_words [NODES], snk_errs [NODES], snk_order [NODES], snk_msgs [NODES];
  logic [47:0] snk_lat_sum [NODES];
  logic [15:0] snk_lat_max [NODES];
  logic [15:0] conn_fail_cnt [NODES], retx_cnt [NODES], timeout_cnt [NODES], corr_cnt [NODES],
               detect_cnt [NODES], nack_cnt [NODES], router_fail_cnt [NODES];
  int checks = 0, failures = 0;

  noc_emulator u_dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  always_ff @(posedge clk) begin
    for (int i = 0; i < NODES; i++) begin
      inj_ni[i] <= '0;
      for (int p = 0; p < NPORTS; p++) inj_out[i][p] <= '0;
    end
    if ($urandom_range(99, 0) == 0) inj_out[0][P_EAST] <= CW'(1) << $urandom_range(CW - 1, 0);
  end

  initial begin
    int n;
    for (int i = 0; i < NODES; i++) begin src_start[i] = 0; src_len[i] = '0; src_dest[i] = '0; src_gap[i] = '0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    src_start[0] = 1; src_len[0] = 16'd1000; src_dest[0] = 2'd1;
    src_start[1] = 1; src_len[1] = 16'd500;  src_dest[1] = 2'd0;
    @(negedge clk);
    src_start[0] = 0; src_start[1] = 0;
    n = 0;
    while (n < 20000 && !(snk_msgs[0] == 1 && snk_msgs[1] == 1 && !ni_busy[0] && !ni_busy[1])) begin
      @(posedge clk); n++;
    end
    $display("full size: %0d cycles; to 1: %0d words, retx %0d, nacks %0d; to 0: %0d words; avg latency %0d / %0d",
             n, snk_words[1], retx_cnt[0], nack_cnt[1], snk_words[0],
             (snk_lat_sum[1] / 48'(snk_words[1] == 0 ? 1 : snk_words[1])),
             (snk_lat_sum[0] / 48'(snk_words[0] == 0 ? 1 : snk_words[0])));
    check(snk_msgs[1] == 1 && snk_words[1] == 1000 && snk_order[1] == 0 && snk_errs[1] == 0, "message 0 -> 1");
    check(snk_msgs[0] == 1 && snk_words[0] == 500 && snk_order[0] == 0 && snk_errs[0] == 0, "message 1 -> 0");
    check(nack_cnt[1] > 0 && retx_cnt[0] > 0, "corrupted words resent");
    check(retx_cnt[1] == 0 && timeout_cnt[0] == 0, "clean direction needs no resend");
    check(n < 1300, "close to one word per cycle");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
