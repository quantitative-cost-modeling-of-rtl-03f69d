// ni_send_cfh: Connection-Failure-Handling of the network-interface send
// side.
//
// When a connection set-up is refused because a router's output port is in
// use (conn_fail, one-cycle pulse from Control), this block waits
// RETRY_DELAY cycles and then pulses retry, on which Control sends a new
// set-up.  It counts the failures it handled.  The document gives the
// block's purpose (start a new attempt after a failed one); the fixed wait
// is this design's choice.
module ni_send_cfh #(
  parameter int RETRY_DELAY = 8
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        conn_fail,
  output logic        retry,
  output logic [15:0] fail_cnt
);

  localparam int TW = $clog2(RETRY_DELAY + 1);

  logic          waiting;
  logic [TW-1:0] timer;

  assign retry = waiting && (timer == TW'(RETRY_DELAY));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      waiting  <= 1'b0;
      timer    <= '0;
      fail_cnt <= '0;
    end else begin
      if (conn_fail) begin
        waiting <= 1'b1;
        timer   <= TW'(1);
        if (fail_cnt != '1) fail_cnt <= fail_cnt + 16'd1;
      end else if (retry) begin
        waiting <= 1'b0;
      end else if (waiting) begin
        timer <= timer + TW'(1);
      end
    end
  end

endmodule
