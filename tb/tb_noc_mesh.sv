// tb_noc_mesh: a 2x2 mesh (SED, S&W SWE, WIN = 8) with four simultaneous
// messages: 0 -> 3, 1 -> 3 (both need switch 1's south port, so one
// set-up is refused and retried), 3 -> 0 and 2 -> 2 (to itself).  The
// channel leaving switch 1 southwards flips one random bit in about 3% of
// the data words.  Every receiver must get each message whole, in order,
// from a single sender, without error flags.
module tb_noc_mesh;
  import noc_pkg::*;
  localparam int X = 2, Y = 2, NODES = 4, N = 32, CW = 33, AW = 2;
  logic clk = 0, rst_n = 0;
  logic tx_valid [NODES], tx_ready [NODES], tx_last [NODES];
  logic [N-1:0] tx_data [NODES], rx_data [NODES];
  logic [AW-1:0] tx_dest [NODES];
  logic rx_valid [NODES], rx_err [NODES], rx_end [NODES], tx_busy [NODES];
  logic [CW-1:0] inj_ni [NODES], inj_out [NODES][NPORTS];
  logic [15:0] conn_fail_cnt [NODES], retx_cnt [NODES], timeout_cnt [NODES], corr_cnt [NODES],
               detect_cnt [NODES], nack_cnt [NODES], router_fail_cnt [NODES];
  int checks = 0, failures = 0;

  noc_mesh #(.X_DIM(X), .Y_DIM(Y), .N(N), .CODE(CODE_SED), .EH(EH_SWE), .WIN(8)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s @%0t", what, $time); end
  endtask

  // senders: node i sends len[i] words {i, index} to dst[i]
  int len [NODES] = '{40, 30, 10, 40};
  int dst [NODES] = '{3, 3, 2, 0};
  int idx [NODES];
  always_comb
    for (int i = 0; i < NODES; i++) begin
      tx_valid[i] = rst_n && idx[i] < len[i];
      tx_data[i]  = {8'(i), 24'(idx[i])};
      tx_last[i]  = (idx[i] == len[i] - 1);
      tx_dest[i]  = AW'(dst[i]);
    end
  always_ff @(posedge clk)
    for (int i = 0; i < NODES; i++)
      if (!rst_n) idx[i] <= 0;
      else if (tx_valid[i] && tx_ready[i]) idx[i] <= idx[i] + 1;

  // error injection on switch 1 -> switch 3
  always_ff @(posedge clk)
    for (int i = 0; i < NODES; i++) begin
      inj_ni[i] <= '0;
      for (int p = 0; p < NPORTS; p++)
        inj_out[i][p] <= (i == 1 && p == P_SOUTH && $urandom_range(99, 0) < 3) ? (CW'(1) << $urandom_range(CW - 1, 0)) : '0;
    end

  // receivers
  int msg_src [NODES], msg_idx [NODES], msgs [NODES], words [NODES];
  always_ff @(posedge clk)
    for (int d = 0; d < NODES; d++) begin
      if (!rst_n) begin
        msg_src[d] <= -1; msg_idx[d] <= 0; msgs[d] <= 0; words[d] <= 0;
      end else begin
        if (rx_valid[d]) begin
          int s;
          s = int'(rx_data[d][31:24]);
          check(!rx_err[d], "no error flag");
          check(msg_src[d] < 0 || msg_src[d] == s, "one sender per message");
          check(int'(rx_data[d][23:0]) == msg_idx[d] && dst[s] == d, $sformatf("order at %0d", d));
          msg_src[d] <= s; msg_idx[d] <= msg_idx[d] + 1; words[d] <= words[d] + 1;
        end
        if (rx_end[d]) begin
          check(msg_src[d] >= 0 && msg_idx[d] == len[msg_src[d]], "message complete");
          msg_src[d] <= -1; msg_idx[d] <= 0; msgs[d] <= msgs[d] + 1;
        end
      end
    end

  initial begin
    int n;
    repeat (3) @(posedge clk);
    rst_n = 1;
    n = 0;
    while (n < 5000 && !(msgs[3] == 2 && msgs[0] == 1 && msgs[2] == 1)) begin @(posedge clk); n++; end
    check(msgs[3] == 2 && msgs[0] == 1 && msgs[2] == 1 && msgs[1] == 0, "all messages delivered");
    check(words[3] == 70 && words[0] == 40 && words[2] == 10, "word totals");
    check(router_fail_cnt[1] + router_fail_cnt[3] > 0 && conn_fail_cnt[0] + conn_fail_cnt[1] > 0, "contention refused and retried");
    check(nack_cnt[3] > 0 && retx_cnt[0] + retx_cnt[1] > 0, "errors retransmitted");
    $display("mesh: %0d cycles, fails r1=%0d r3=%0d, nacks=%0d, retx=%0d/%0d", n, router_fail_cnt[1],
             router_fail_cnt[3], nack_cnt[3], retx_cnt[0], retx_cnt[1]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
