// tb_error_rate_sweep: the two-interface experiment (two switches, three
// links, SED) run with send-and-wait and with send-and-wait plus a 32-word
// sliding window, each at non-correctable error probabilities of 0, 0.1,
// 1, 3 and 10 % per data word on one link.  Source 0 generates 300 words
// for interface 1, one every 2 cycles.  Printed per run: cycles for the
// message, average word latency (cycles from generation to delivery, so
// waiting in the source counts), resends.  Checked: all data arrives
// intact; send-and-wait cannot keep up with the offered load (its latency
// is far above the window protocol's); the window protocol's time and
// latency grow with the error rate.  (Only the window run keeps up with the
// source, so its message time stays near 600 cycles.)
module tb_error_rate_sweep;
  import noc_pkg::*;
  localparam int R = 5;
  localparam int RATE [R] = '{0, 10, 100, 300, 1000};  // per 10 000
  logic clk = 0, rst_n = 0;
  logic   done [2][R];
  int     cycles [2][R], words [2][R], errs [2][R], order [2][R], retx [2][R], timeouts [2][R],
          cfails [2][R], corr [2][R], detect [2][R], nacks [2][R], stalls [2][R], injected [2][R];
  longint lat_sum [2][R];
  int checks = 0, failures = 0;

  for (genvar e = 0; e < 2; e++) begin : g_eh
    for (genvar r = 0; r < R; r++) begin : g_rate
      emu_harness #(.CODE(CODE_SED), .EH(e == 0 ? EH_SW : EH_SWE), .WIN(32), .TTA(64), .L(300),
                    .ERR_PER_10K(RATE[r]), .ERR_BITS(1), .CONTEND(0), .GAP(2)) u_run (
        .clk, .rst_n, .done(done[e][r]), .cycles(cycles[e][r]), .words(words[e][r]), .errs(errs[e][r]),
        .order(order[e][r]), .lat_sum(lat_sum[e][r]), .retx(retx[e][r]), .timeouts(timeouts[e][r]),
        .cfails(cfails[e][r]), .corr(corr[e][r]), .detect(detect[e][r]), .nacks(nacks[e][r]),
        .stalls(stalls[e][r]), .injected(injected[e][r]));
    end
  end

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic bit all_done();
    for (int e = 0; e < 2; e++) for (int r = 0; r < R; r++) if (!done[e][r]) return 0;
    return 1;
  endfunction

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    while (!all_done()) @(posedge clk);
    for (int e = 0; e < 2; e++)
      for (int r = 0; r < R; r++) begin
        $display("%-7s error %5.1f%%: %5d cycles, avg latency %4d, nacks %3d, resent %4d",
                 e == 0 ? "S&W" : "S&W SWE", RATE[r] / 100.0, cycles[e][r],
                 int'(lat_sum[e][r] / longint'(words[e][r] == 0 ? 1 : words[e][r])), nacks[e][r], retx[e][r]);
        check(words[e][r] == 300 && order[e][r] == 0 && errs[e][r] == 0, "data intact");
        if (RATE[r] >= 100) check(nacks[e][r] > 0, "errors were hit");
      end
    for (int r = 0; r < 3; r++)
      check(cycles[1][r] * 2 < cycles[0][r], "window far faster at low error rates");
    for (int r = 0; r < R; r++)
      check(lat_sum[0][r] > 10 * lat_sum[1][r], "send-and-wait latency far above window latency");
    check(lat_sum[1][R-1] > 3 * lat_sum[1][0], "window latency grows at 10%");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
