// noc_mesh: the Network-on-Chip, an X_DIM x Y_DIM mesh of routing switches,
// each with one network interface (a sending and a receiving part),
// joined by links.
//
// Node i = y * X_DIM + x has address {y, x}.  Every connection between two
// blocks is a pair of noc_link channels, one per data direction, each with
// its acknowledge channel running back: network interface <-> its switch,
// and switch <-> neighbouring switch.  A neighbour-to-neighbour path thus
// crosses three links (NI -> switch, switch -> switch, switch -> NI), one
// cycle each way, so a word's acknowledge returns 6 cycles after it left.
// Every channel can add errors to the data words it carries: inj_ni[i] on
// the channel from NI i to its switch, inj_out[i][p] on the channel leaving
// switch i through port p (port 0 leads to NI i).  Ports at the mesh edge
// are tied off; destinations must lie inside the mesh.
// The mesh form follows the document's emulator figure; the size and the
// per-channel error injection are this design's choices.
module noc_mesh
  import noc_pkg::*;
#(
  parameter int    X_DIM       = 2,
  parameter int    Y_DIM       = 1,
  parameter int    N           = 32,
  parameter code_e CODE        = CODE_SED,
  parameter eh_e   EH          = EH_SWE,
  parameter int    WIN         = 32,
  parameter int    SEQ_W       = $clog2(WIN) + 1,
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
  // functional units: sending side
  input  logic              tx_valid [NODES],
  output logic              tx_ready [NODES],
  input  logic [N-1:0]      tx_data  [NODES],
  input  logic              tx_last  [NODES],
  input  logic [ADDR_W-1:0] tx_dest  [NODES],
  // functional units: receiving side
  output logic              rx_valid [NODES],
  output logic [N-1:0]      rx_data  [NODES],
  output logic              rx_err   [NODES],
  output logic              rx_end   [NODES],
  // error injection
  input  logic [CW-1:0]     inj_ni   [NODES],
  input  logic [CW-1:0]     inj_out  [NODES][NPORTS],
  // status
  output logic              tx_busy       [NODES],
  output logic [15:0]       conn_fail_cnt [NODES],
  output logic [15:0]       retx_cnt      [NODES],
  output logic [15:0]       timeout_cnt   [NODES],
  output logic [15:0]       corr_cnt      [NODES],
  output logic [15:0]       detect_cnt    [NODES],
  output logic [15:0]       nack_cnt      [NODES],
  output logic [15:0]       router_fail_cnt [NODES]
);

  // router port wiring
  fkind_e           rin_fkind  [NODES][NPORTS];
  logic [SEQ_W-1:0] rin_fseq   [NODES][NPORTS];
  logic [CW-1:0]    rin_fword  [NODES][NPORTS];
  bkind_e           rin_bkind  [NODES][NPORTS];
  logic [SEQ_W-1:0] rin_bseq   [NODES][NPORTS];
  fkind_e           rout_fkind [NODES][NPORTS];
  logic [SEQ_W-1:0] rout_fseq  [NODES][NPORTS];
  logic [CW-1:0]    rout_fword [NODES][NPORTS];
  bkind_e           rout_bkind [NODES][NPORTS];
  logic [SEQ_W-1:0] rout_bseq  [NODES][NPORTS];

  // network-interface side of the local channels
  fkind_e           s_fkind [NODES];
  logic [SEQ_W-1:0] s_fseq  [NODES], s_bseq [NODES], r_fseq [NODES], r_bseq [NODES];
  logic [CW-1:0]    s_fword [NODES], r_fword [NODES];
  bkind_e           s_bkind [NODES], r_bkind [NODES];
  fkind_e           r_fkind [NODES];

  // neighbour of node (x,y) through port p, -1 at the edge
  function automatic int nbr(input int x, input int y, input int p);
    case (p)
      P_NORTH: return (y > 0)         ? (y - 1) * X_DIM + x : -1;
      P_EAST:  return (x < X_DIM - 1) ? y * X_DIM + x + 1   : -1;
      P_SOUTH: return (y < Y_DIM - 1) ? (y + 1) * X_DIM + x : -1;
      P_WEST:  return (x > 0)         ? y * X_DIM + x - 1   : -1;
      default: return -1;
    endcase
  endfunction

  function automatic int opp(input int p);
    case (p)
      P_NORTH: return P_SOUTH;
      P_EAST:  return P_WEST;
      P_SOUTH: return P_NORTH;
      default: return P_EAST;
    endcase
  endfunction

  for (genvar y = 0; y < Y_DIM; y++) begin : g_y
    for (genvar x = 0; x < X_DIM; x++) begin : g_x
      localparam int I = y * X_DIM + x;

      ni_send #(.N(N), .CODE(CODE), .EH(EH), .WIN(WIN), .SEQ_W(SEQ_W), .TTA(TTA),
                .RETRY_DELAY(RETRY_DELAY), .ADDR_W(ADDR_W)) u_send (
        .clk, .rst_n, .fu_valid(tx_valid[I]), .fu_ready(tx_ready[I]), .fu_data(tx_data[I]),
        .fu_last(tx_last[I]), .fu_dest(tx_dest[I]),
        .fkind(s_fkind[I]), .fseq(s_fseq[I]), .fword(s_fword[I]), .bkind(s_bkind[I]), .bseq(s_bseq[I]),
        .busy(tx_busy[I]), .conn_fail_cnt(conn_fail_cnt[I]), .retx_cnt(retx_cnt[I]),
        .timeout_cnt(timeout_cnt[I]));

      ni_recv #(.N(N), .CODE(CODE), .EH(EH), .SEQ_W(SEQ_W)) u_recv (
        .clk, .rst_n, .fkind(r_fkind[I]), .fseq(r_fseq[I]), .fword(r_fword[I]),
        .bkind(r_bkind[I]), .bseq(r_bseq[I]),
        .fu_valid(rx_valid[I]), .fu_data(rx_data[I]), .fu_err(rx_err[I]), .fu_end(rx_end[I]),
        .connected(), .word_cnt(), .corr_cnt(corr_cnt[I]), .detect_cnt(detect_cnt[I]),
        .nack_cnt(nack_cnt[I]), .drop_cnt());

      noc_router #(.CW(CW), .SEQ_W(SEQ_W), .X_W(X_W), .Y_W(Y_W), .MY_X(x), .MY_Y(y)) u_router (
        .clk, .rst_n,
        .in_fkind(rin_fkind[I]), .in_fseq(rin_fseq[I]), .in_fword(rin_fword[I]),
        .in_bkind(rin_bkind[I]), .in_bseq(rin_bseq[I]),
        .out_fkind(rout_fkind[I]), .out_fseq(rout_fseq[I]), .out_fword(rout_fword[I]),
        .out_bkind(rout_bkind[I]), .out_bseq(rout_bseq[I]),
        .conn_fail_cnt(router_fail_cnt[I]));

      // NI -> switch
      noc_link #(.CW(CW), .SEQ_W(SEQ_W)) u_link_up (
        .clk, .rst_n,
        .a_fkind(s_fkind[I]), .a_fseq(s_fseq[I]), .a_fword(s_fword[I]),
        .a_bkind(s_bkind[I]), .a_bseq(s_bseq[I]),
        .b_fkind(rin_fkind[I][P_LOCAL]), .b_fseq(rin_fseq[I][P_LOCAL]), .b_fword(rin_fword[I][P_LOCAL]),
        .b_bkind(rin_bkind[I][P_LOCAL]), .b_bseq(rin_bseq[I][P_LOCAL]),
        .inj_mask(inj_ni[I]));

      // switch -> NI
      noc_link #(.CW(CW), .SEQ_W(SEQ_W)) u_link_down (
        .clk, .rst_n,
        .a_fkind(rout_fkind[I][P_LOCAL]), .a_fseq(rout_fseq[I][P_LOCAL]), .a_fword(rout_fword[I][P_LOCAL]),
        .a_bkind(rout_bkind[I][P_LOCAL]), .a_bseq(rout_bseq[I][P_LOCAL]),
        .b_fkind(r_fkind[I]), .b_fseq(r_fseq[I]), .b_fword(r_fword[I]),
        .b_bkind(r_bkind[I]), .b_bseq(r_bseq[I]),
        .inj_mask(inj_out[I][P_LOCAL]));

      // switch -> neighbouring switch, one channel per mesh port
      for (genvar p = 1; p < NPORTS; p++) begin : g_port
        localparam int J = nbr(x, y, p);
        if (J >= 0) begin : g_link
          noc_link #(.CW(CW), .SEQ_W(SEQ_W)) u_link (
            .clk, .rst_n,
            .a_fkind(rout_fkind[I][p]), .a_fseq(rout_fseq[I][p]), .a_fword(rout_fword[I][p]),
            .a_bkind(rout_bkind[I][p]), .a_bseq(rout_bseq[I][p]),
            .b_fkind(rin_fkind[J][opp(p)]), .b_fseq(rin_fseq[J][opp(p)]), .b_fword(rin_fword[J][opp(p)]),
            .b_bkind(rin_bkind[J][opp(p)]), .b_bseq(rin_bseq[J][opp(p)]),
            .inj_mask(inj_out[I][p]));
        end else begin : g_edge
          // nothing leaves or enters here
          assign rout_bkind[I][p] = BK_IDLE;
          assign rout_bseq[I][p]  = '0;
          assign rin_fkind[I][p]  = FK_IDLE;
          assign rin_fseq[I][p]   = '0;
          assign rin_fword[I][p]  = '0;
        end
      end
    end
  end

endmodule
