// noc_emulator: top level.  The NoC mesh with a traffic source and a
// traffic sink at every network interface, as in an FPGA-based NoC
// emulator: sources send messages on command, the NoC carries them (with
// errors added on chosen links), sinks check the data and measure the
// transmission time against a common cycle counter.
//
// The experiment controller (a soft-core processor in the emulator) is not
// part of this design: its commands (start, len, dest, gap), the error masks
// for every link channel and the sinks' and interfaces' statistics are
// ports.  The default configuration is the document's example: 2 switches
// with one interface each (three links between the two interfaces),
// 32-bit words, parity (SED) and send-and-wait with a 32-word sliding
// window.
module noc_emulator
  import noc_pkg::*;
#(
  parameter int    X_DIM       = 2,
  parameter int    Y_DIM       = 1,
  parameter int    N           = 32,
  parameter code_e CODE        = CODE_SED,
  parameter eh_e   EH          = EH_SWE,
  parameter int    WIN         = 32,
  parameter int    TTA         = 64,
  parameter int    RETRY_DELAY = 8,
  localparam int   NODES       = X_DIM * Y_DIM,
  localparam int   X_W         = (X_DIM > 1) ? $clog2(X_DIM) : 1,
  localparam int   Y_W         = (Y_DIM > 1) ? $clog2(Y_DIM) : 1,
  localparam int   ADDR_W      = X_W + Y_W,
  localparam int   CW          = cw_width(CODE, N)
) (
  input  logic              clk,
  input  logic              rst_n,
  // controller: commands
  input  logic              src_start [NODES],
  input  logic [15:0]       src_len   [NODES],
  input  logic [ADDR_W-1:0] src_dest  [NODES],
  input  logic [7:0]        src_gap   [NODES],  // 0: as fast as accepted, G: one word per G cycles
  input  logic [CW-1:0]     inj_ni    [NODES],
  input  logic [CW-1:0]     inj_out   [NODES][NPORTS],
  // controller: results
  output logic              src_busy  [NODES],
  output logic [31:0]       src_sent  [NODES],
  output logic [31:0]       snk_words [NODES],
  output logic [31:0]       snk_errs  [NODES],
  output logic [31:0]       snk_order [NODES],
  output logic [31:0]       snk_msgs  [NODES],
  output logic [47:0]       snk_lat_sum [NODES],
  output logic [15:0]       snk_lat_max [NODES],
  output logic              ni_busy       [NODES],
  output logic [15:0]       conn_fail_cnt [NODES],
  output logic [15:0]       retx_cnt      [NODES],
  output logic [15:0]       timeout_cnt   [NODES],
  output logic [15:0]       corr_cnt      [NODES],
  output logic [15:0]       detect_cnt    [NODES],
  output logic [15:0]       nack_cnt      [NODES],
  output logic [15:0]       router_fail_cnt [NODES]
);

  logic [15:0] now;

  logic              tx_valid [NODES], tx_ready [NODES], tx_last [NODES];
  logic [N-1:0]      tx_data  [NODES], rx_data  [NODES];
  logic [ADDR_W-1:0] tx_dest  [NODES];
  logic              rx_valid [NODES], rx_err [NODES], rx_end [NODES];

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) now <= '0;
    else        now <= now + 16'd1;

  noc_mesh #(.X_DIM(X_DIM), .Y_DIM(Y_DIM), .N(N), .CODE(CODE), .EH(EH), .WIN(WIN),
             .TTA(TTA), .RETRY_DELAY(RETRY_DELAY)) u_noc (
    .clk, .rst_n, .tx_valid, .tx_ready, .tx_data, .tx_last, .tx_dest,
    .rx_valid, .rx_data, .rx_err, .rx_end, .inj_ni, .inj_out,
    .tx_busy(ni_busy), .conn_fail_cnt, .retx_cnt, .timeout_cnt, .corr_cnt, .detect_cnt,
    .nack_cnt, .router_fail_cnt);

  for (genvar i = 0; i < NODES; i++) begin : g_node
    traffic_source #(.N(N), .ADDR_W(ADDR_W)) u_src (
      .clk, .rst_n, .now, .start(src_start[i]), .len(src_len[i]), .dest(src_dest[i]), .gap(src_gap[i]),
      .busy(src_busy[i]), .sent_cnt(src_sent[i]),
      .fu_valid(tx_valid[i]), .fu_ready(tx_ready[i]), .fu_data(tx_data[i]),
      .fu_last(tx_last[i]), .fu_dest(tx_dest[i]));

    traffic_sink #(.N(N)) u_snk (
      .clk, .rst_n, .now, .fu_valid(rx_valid[i]), .fu_data(rx_data[i]), .fu_err(rx_err[i]),
      .fu_end(rx_end[i]), .word_cnt(snk_words[i]), .err_cnt(snk_errs[i]), .order_cnt(snk_order[i]),
      .msg_cnt(snk_msgs[i]), .lat_sum(snk_lat_sum[i]), .lat_max(snk_lat_max[i]));
  end

endmodule
