// tb_noc_emulator: end-to-end runs of the emulator top (two interfaces,
// two switches, three links) in eleven configurations side by side.  Each
// run sends one message from interface 0 to interface 1; the checks count
// every mechanism of the design at least once:
//   0  SED, S&W SWE, WIN 32, 1% errors, contention: retransmission after
//      NACK, refused set-up and retry, everything delivered in order
//   1  S&W SWE, no errors: one word per cycle (window >= round trip)
//   2  S&W, no errors: one word per round trip (6 cycles)
//   3  S&W SWE with WIN 4 < round trip: the window stalls the sender,
//      4 words per 6 cycles
//   4  S&F, 2% errors: erroneous words delivered and flagged, no resend
//   5  S&W SWE with time to acknowledge 3 < round trip: timeouts and
//      needless resends, duplicates dropped, data still intact
//   6  S&W, 3% errors: resend after NACK in send-and-wait
//   7  SEC, single errors: corrected, no resend
//   8  SEC/DED, double errors: detected, resent
//   9  DED, double errors: detected, resent
//  10  TED, triple errors: detected, resent
module tb_noc_emulator;
  import noc_pkg::*;
  localparam int V = 11;
  logic clk = 0, rst_n = 0;
  logic   done [V];
  int     cycles [V], words [V], errs [V], order [V], retx [V], timeouts [V], cfails [V],
          corr [V], detect [V], nacks [V], stalls [V], injected [V];
  longint lat_sum [V];
  int checks = 0, failures = 0;

  `define RUN(K, C, E, W, T, LEN, ER, EB, CT) \
    emu_harness #(.CODE(C), .EH(E), .WIN(W), .TTA(T), .L(LEN), .ERR_PER_10K(ER), .ERR_BITS(EB), .CONTEND(CT)) u_run``K ( \
      .clk, .rst_n, .done(done[K]), .cycles(cycles[K]), .words(words[K]), .errs(errs[K]), .order(order[K]), \
      .lat_sum(lat_sum[K]), .retx(retx[K]), .timeouts(timeouts[K]), .cfails(cfails[K]), .corr(corr[K]), \
      .detect(detect[K]), .nacks(nacks[K]), .stalls(stalls[K]), .injected(injected[K]));

  `RUN(0,  CODE_SED,    EH_SWE, 32, 64, 400, 100, 1, 1)
  `RUN(1,  CODE_SED,    EH_SWE, 32, 64, 400,   0, 1, 0)
  `RUN(2,  CODE_SED,    EH_SW,  32, 64, 100,   0, 1, 0)
  `RUN(3,  CODE_SED,    EH_SWE,  4, 64, 400,   0, 1, 0)
  `RUN(4,  CODE_SED,    EH_SF,  32, 64, 400, 200, 1, 0)
  `RUN(5,  CODE_SED,    EH_SWE, 32,  3,  60,   0, 1, 0)
  `RUN(6,  CODE_SED,    EH_SW,  32, 64, 150, 300, 1, 0)
  `RUN(7,  CODE_SEC,    EH_SWE, 32, 64, 400, 200, 1, 0)
  `RUN(8,  CODE_SECDED, EH_SWE, 32, 64, 400, 200, 2, 0)
  `RUN(9,  CODE_DED,    EH_SWE, 32, 64, 400, 200, 2, 0)
  `RUN(10, CODE_TED,    EH_SWE, 32, 64, 400, 200, 3, 0)

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic bit all_done();
    for (int k = 0; k < V; k++) if (!done[k]) return 0;
    return 1;
  endfunction

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    while (!all_done()) @(posedge clk);
    for (int k = 0; k < V; k++)
      $display("run %0d: %0d cycles, %0d words, flagged %0d, order %0d, retx %0d, timeouts %0d, conn fails %0d, corrected %0d, detected %0d, nacks %0d, stalls %0d, avg latency %0d",
               k, cycles[k], words[k], errs[k], order[k], retx[k], timeouts[k], cfails[k], corr[k],
               detect[k], nacks[k], stalls[k], (words[k] > 0) ? int'(lat_sum[k] / longint'(words[k])) : 0);
    // every run delivers its data whole and in order
    for (int k = 0; k < V; k++) begin
      check(words[k] == ((k == 0) ? 600 : (k == 2) ? 100 : (k == 5) ? 60 : (k == 6) ? 150 : 400), $sformatf("run %0d word count", k));
      if (k != 4) check(order[k] == 0, $sformatf("run %0d order", k));
      if (k != 4) check(errs[k] == 0, $sformatf("run %0d no erroneous word delivered", k));
      if (k == 4) check(order[k] <= 2 * errs[k], "S&F: only corrupted words out of order");
    end
    // mechanisms
    check(nacks[0] > 0 && retx[0] > 0, "retransmission after NACK (SWE)");
    check(cfails[0] > 0, "connection failure and retry");
    check(cycles[1] <= 400 + 30, $sformatf("SWE full rate: %0d cycles for 400 words", cycles[1]));
    check(cycles[2] >= 600 && cycles[2] <= 600 + 30, $sformatf("S&W one word per 6 cycles: %0d for 100", cycles[2]));
    check(stalls[3] > 0 && cycles[3] >= 595 && cycles[3] <= 600 + 30, $sformatf("window stall: %0d cycles", cycles[3]));
    check(errs[4] > 0 && retx[4] == 0 && nacks[4] == 0, "S&F accepts flagged words");
    check(timeouts[5] > 0, "time to acknowledge expired");
    check(nacks[6] > 0 && retx[6] > 0, "retransmission after NACK (S&W)");
    check(corr[7] > 0 && nacks[7] == 0 && retx[7] == 0, "SEC corrects single errors");
    check(nacks[8] > 0 && retx[8] > 0, "SEC/DED detects double errors");
    check(nacks[9] > 0, "DED detects double errors");
    check(nacks[10] > 0, "TED detects triple errors");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
