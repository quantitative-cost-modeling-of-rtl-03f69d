// emu_harness: drives one noc_emulator (2 switches, one interface each) in
// the two-interface experiment and reports what happened.  Not a test on
// its own; the end-to-end testbenches instantiate it.
//
// After reset, source 0 sends one message of L words to interface 1, as
// fast as the interface accepts (GAP = 0) or one word generated every GAP
// cycles (GAP > 0, so the time stamps include waiting in the source).  With
// CONTEND set, source 1 sends a message of L/2 words to itself at the same
// moment, so both set-ups need switch 1's local output port and one of them
// is refused and retried.  The channel from switch 0 to switch 1 flips
// ERR_BITS distinct random bits in a data word with probability
// ERR_PER_10K / 10000 per cycle.  done rises when every message has been
// delivered and all interfaces are idle; the statistics then hold.
module emu_harness
  import noc_pkg::*;
#(
  parameter code_e CODE        = CODE_SED,
  parameter eh_e   EH          = EH_SWE,
  parameter int    WIN         = 32,
  parameter int    TTA         = 64,
  parameter int    L           = 100,
  parameter int    ERR_PER_10K = 0,
  parameter int    ERR_BITS    = 1,
  parameter bit    CONTEND     = 0,
  parameter int    GAP         = 0
) (
  input  logic        clk,
  input  logic        rst_n,
  output logic        done,
  output int          cycles,
  output int          words,     // words delivered at interface 1
  output int          errs,      // ... flagged erroneous
  output int          order,     // ... out of order
  output longint      lat_sum,
  output int          retx,
  output int          timeouts,
  output int          cfails,
  output int          corr,
  output int          detect,
  output int          nacks,
  output int          stalls,    // cycles source 0 waited on a connected interface
  output int          injected
);
  localparam int NODES = 2, N = 32;
  localparam int CW = cw_width(CODE, N);

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

  noc_emulator #(.CODE(CODE), .EH(EH), .WIN(WIN), .TTA(TTA)) u_emu (.*);

  int t;
  bit started;
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      t <= 0; started <= 0; cycles <= 0; done <= 0; stalls <= 0; injected <= 0;
      for (int i = 0; i < NODES; i++) begin
        src_start[i] <= 0; src_len[i] <= '0; src_dest[i] <= '0; src_gap[i] <= '0; inj_ni[i] <= '0;
        for (int p = 0; p < NPORTS; p++) inj_out[i][p] <= '0;
      end
    end else begin
      t <= t + 1;
      src_start[0] <= (t == 2);
      src_len[0]   <= 16'(L);
      src_dest[0]  <= 2'd1;
      src_gap[0]   <= 8'(GAP);
      src_start[1] <= CONTEND && (t == 2);
      src_len[1]   <= 16'(L / 2);
      src_dest[1]  <= 2'd1;
      src_gap[1]   <= 8'(GAP);
      if (t == 3) started <= 1;
      // errors on switch 0 -> switch 1
      if ($urandom_range(9999, 0) < ERR_PER_10K) begin
        logic [CW-1:0] m;
        m = '0;
        while ($countones(m) < ERR_BITS) m[$urandom_range(CW - 1, 0)] = 1'b1;
        inj_out[0][P_EAST] <= m;
        if (u_emu.u_noc.g_y[0].g_x[0].u_router.out_fkind[P_EAST] == FK_DATA) injected <= injected + 1;
      end else begin
        inj_out[0][P_EAST] <= '0;
      end
      if (started && !done) begin
        cycles <= cycles + 1;
        if (u_emu.u_noc.g_y[0].g_x[0].u_send.u_ctl.state == 3'd4 && !u_emu.u_noc.tx_ready[0]) stalls <= stalls + 1;
        if (snk_msgs[1] == (CONTEND ? 2 : 1) && !src_busy[0] && !src_busy[1] && !ni_busy[0] && !ni_busy[1])
          done <= 1;
      end
    end
  end

  assign words    = int'(snk_words[1]);
  assign errs     = int'(snk_errs[1]);
  assign order    = int'(snk_order[1]);
  assign lat_sum  = longint'(snk_lat_sum[1]);
  assign retx     = int'(retx_cnt[0]) + int'(retx_cnt[1]);
  assign timeouts = int'(timeout_cnt[0]) + int'(timeout_cnt[1]);
  assign cfails   = int'(conn_fail_cnt[0]) + int'(conn_fail_cnt[1]);
  assign corr     = int'(corr_cnt[1]);
  assign detect   = int'(detect_cnt[1]);
  assign nacks    = int'(nack_cnt[1]);
endmodule
