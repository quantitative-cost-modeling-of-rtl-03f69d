// tb_traffic_sink: words with known time stamps and indices, one out of
// order and one flagged erroneous; checks counts, latency sum and maximum.
module tb_traffic_sink;
  localparam int N = 32;
  logic clk = 0, rst_n = 0;
  logic [15:0] now, lat_max;
  logic fu_valid, fu_err, fu_end;
  logic [N-1:0] fu_data;
  logic [31:0] word_cnt, err_cnt, order_cnt, msg_cnt;
  logic [47:0] lat_sum;
  int checks = 0, failures = 0;

  traffic_sink #(.N(N)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s @%0t", what, $time); end
  endtask

  task automatic word(input int idx, input int stamp, input int t, input bit e);
    @(negedge clk);
    fu_valid = 1; fu_data = {16'(idx), 16'(stamp)}; now = 16'(t); fu_err = e; fu_end = 0;
  endtask

  initial begin
    fu_valid = 0; fu_data = '0; fu_err = 0; fu_end = 0; now = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    word(0, 100, 110, 0);   // latency 10
    word(1, 101, 120, 0);   // 19
    word(2, 65535, 4, 1);   // wraps: 5, flagged
    word(4, 130, 140, 0);   // out of order, 10
    @(negedge clk); fu_valid = 0; fu_end = 1;
    word(0, 200, 203, 0);   // new message restarts at 0: 3
    @(negedge clk); fu_valid = 0; fu_end = 0;
    @(negedge clk);
    check(word_cnt == 5 && msg_cnt == 1, "counts");
    check(err_cnt == 1, "error flag counted");
    check(order_cnt == 1, "order error counted");
    check(lat_sum == 48'd47, $sformatf("latency sum %0d", lat_sum));
    check(lat_max == 16'd19, "latency max");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
