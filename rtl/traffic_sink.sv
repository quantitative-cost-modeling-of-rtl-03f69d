// traffic_sink: data sink of the NoC emulator.
//
// Takes the words a network interface delivers and checks them against the
// source's format: the index field must count 0, 1, 2, ... within a
// message (restarting after fu_end), and a word flagged by the interface
// as erroneous is counted as such.  For every word it measures the
// transmission time, now - time stamp (16-bit, wrapping), and keeps the
// sum and the maximum for the controller, which divides for the average.
// The document gives the sink's role (check data, measure transmission
// time); the word format and statistics are this design's choice.  For
// words shorter than 32 bits the stamp is N/2 bits wide and the latency
// wraps accordingly.
module traffic_sink #(
  parameter int N = 32
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [15:0]  now,
  input  logic         fu_valid,
  input  logic [N-1:0] fu_data,
  input  logic         fu_err,
  input  logic         fu_end,
  output logic [31:0]  word_cnt,
  output logic [31:0]  err_cnt,    // words flagged erroneous
  output logic [31:0]  order_cnt,  // words out of order or with a wrong index
  output logic [31:0]  msg_cnt,
  output logic [47:0]  lat_sum,
  output logic [15:0]  lat_max
);

  localparam int TS_W = (N >= 32) ? 16 : N / 2;

  logic [N-TS_W-1:0] expect_idx;
  logic [TS_W-1:0]   lat_n;
  logic [15:0]       lat;

  assign lat_n = now[TS_W-1:0] - fu_data[TS_W-1:0];
  assign lat   = 16'(lat_n);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      expect_idx <= '0;
      word_cnt   <= '0;
      err_cnt    <= '0;
      order_cnt  <= '0;
      msg_cnt    <= '0;
      lat_sum    <= '0;
      lat_max    <= '0;
    end else begin
      if (fu_valid) begin
        word_cnt   <= word_cnt + 32'd1;
        expect_idx <= fu_data[N-1:TS_W] + 1'b1;
        lat_sum    <= lat_sum + 48'(lat);
        if (lat > lat_max) lat_max <= lat;
        if (fu_err) err_cnt <= err_cnt + 32'd1;
        if (fu_data[N-1:TS_W] != expect_idx) order_cnt <= order_cnt + 32'd1;
      end
      if (fu_end) begin
        msg_cnt    <= msg_cnt + 32'd1;
        expect_idx <= '0;
      end
    end
  end

endmodule
