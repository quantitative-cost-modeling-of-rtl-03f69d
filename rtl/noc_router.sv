// noc_router: circuit-switched routing switch with five ports
// (local network interface, north, east, south, west) and XY routing.
//
// A connection is built by an FK_SETUP flit whose word carries the
// destination address {y, x} in its low X_W+Y_W bits.  The switch routes it
// first along x, then along y.  If the chosen output port is free, the
// input is tied to that output and the set-up flit is passed on in the same
// cycle; if the port is held by another connection (or another input claims
// it in the same cycle: lower port numbers win), the switch answers
// BK_CONN_FAIL on the backward channel of the requesting input.  While a
// connection stands, forward flits pass input -> output and backward flits
// output -> input unchanged.  The connection is released after an FK_TEAR
// flit has passed, or when a BK_CONN_FAIL from further on passes back.
// The switch adds no register: the links carry the pipeline stages.
// Circuit switching and XY routing are this design's choices among those the
// document names as NoC parameters (switching technique, routing algorithm).
module noc_router
  import noc_pkg::*;
#(
  parameter int CW    = 33,
  parameter int SEQ_W = 6,
  parameter int X_W   = 1,
  parameter int Y_W   = 1,
  parameter int MY_X  = 0,
  parameter int MY_Y  = 0
) (
  input  logic             clk,
  input  logic             rst_n,
  // input side of every port
  input  fkind_e           in_fkind [NPORTS],
  input  logic [SEQ_W-1:0] in_fseq  [NPORTS],
  input  logic [CW-1:0]    in_fword [NPORTS],
  output bkind_e           in_bkind [NPORTS],
  output logic [SEQ_W-1:0] in_bseq  [NPORTS],
  // output side of every port
  output fkind_e           out_fkind [NPORTS],
  output logic [SEQ_W-1:0] out_fseq  [NPORTS],
  output logic [CW-1:0]    out_fword [NPORTS],
  input  bkind_e           out_bkind [NPORTS],
  input  logic [SEQ_W-1:0] out_bseq  [NPORTS],
  // number of set-up requests refused here (saturating)
  output logic [15:0]      conn_fail_cnt
);

  typedef logic [2:0] port_t;

  logic [NPORTS-1:0] in_conn;            // input holds a connection
  port_t             in_out   [NPORTS];  // ... to this output
  logic [NPORTS-1:0] out_busy;           // output held by a connection
  port_t             out_own  [NPORTS];  // ... of this input

  port_t             route    [NPORTS];
  logic [NPORTS-1:0] grant, fail, release_c;

  function automatic port_t xy_route(input logic [CW-1:0] w);
    int dx, dy;
    dx = int'(w[X_W-1:0]);
    dy = int'(w[X_W+Y_W-1:X_W]);
    if (dx > MY_X)      return port_t'(P_EAST);
    else if (dx < MY_X) return port_t'(P_WEST);
    else if (dy > MY_Y) return port_t'(P_SOUTH);
    else if (dy < MY_Y) return port_t'(P_NORTH);
    else                return port_t'(P_LOCAL);
  endfunction

  always_comb begin
    logic [NPORTS-1:0] claimed;
    claimed = out_busy;
    grant   = '0;
    fail    = '0;
    for (int p = 0; p < NPORTS; p++) begin
      route[p] = xy_route(in_fword[p]);
      if (in_fkind[p] == FK_SETUP && !in_conn[p]) begin
        if (!claimed[route[p]]) begin
          grant[p] = 1'b1;
          claimed[route[p]] = 1'b1;
        end else begin
          fail[p] = 1'b1;
        end
      end
    end
  end

  // forward switching
  always_comb begin
    for (int o = 0; o < NPORTS; o++) begin
      out_fkind[o] = FK_IDLE;
      out_fseq[o]  = '0;
      out_fword[o] = '0;
      if (out_busy[o]) begin
        out_fkind[o] = in_fkind[out_own[o]];
        out_fseq[o]  = in_fseq[out_own[o]];
        out_fword[o] = in_fword[out_own[o]];
      end
    end
    for (int p = 0; p < NPORTS; p++)
      if (grant[p]) begin
        out_fkind[route[p]] = in_fkind[p];
        out_fseq[route[p]]  = in_fseq[p];
        out_fword[route[p]] = in_fword[p];
      end
  end

  // backward switching and connection release
  always_comb begin
    for (int p = 0; p < NPORTS; p++) begin
      in_bkind[p]  = BK_IDLE;
      in_bseq[p]   = '0;
      release_c[p] = 1'b0;
      if (in_conn[p]) begin
        in_bkind[p]  = out_bkind[in_out[p]];
        in_bseq[p]   = out_bseq[in_out[p]];
        release_c[p] = (in_fkind[p] == FK_TEAR) || (out_bkind[in_out[p]] == BK_CONN_FAIL);
      end else if (fail[p]) begin
        in_bkind[p] = BK_CONN_FAIL;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_conn       <= '0;
      out_busy      <= '0;
      conn_fail_cnt <= '0;
      for (int p = 0; p < NPORTS; p++) begin
        in_out[p]  <= '0;
        out_own[p] <= '0;
      end
    end else begin
      for (int p = 0; p < NPORTS; p++) begin
        if (release_c[p]) begin
          in_conn[p]          <= 1'b0;
          out_busy[in_out[p]] <= 1'b0;
        end
        if (grant[p]) begin
          in_conn[p]         <= 1'b1;
          in_out[p]          <= route[p];
          out_busy[route[p]] <= 1'b1;
          out_own[route[p]]  <= port_t'(p);
        end
      end
      if (|fail && conn_fail_cnt != '1) conn_fail_cnt <= conn_fail_cnt + 16'd1;
    end
  end

  // a connection is always entered in both tables
  assert property (@(posedge clk) disable iff (!rst_n)
                   $countones(in_conn) == $countones(out_busy))
    else $error("router connection tables disagree");

endmodule
