// tb_ni_send_cfh: a failure pulse must give exactly one retry pulse
// RETRY_DELAY cycles later, and the failures must be counted.
module tb_ni_send_cfh;
  localparam int D = 5;
  logic clk = 0, rst_n = 0, conn_fail = 0, retry;
  logic [15:0] fail_cnt;
  int checks = 0, failures = 0;

  ni_send_cfh #(.RETRY_DELAY(D)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 3; k++) begin
      int n, pulses;
      @(negedge clk); conn_fail = 1;
      @(negedge clk); conn_fail = 0;
      n = 1; pulses = 0;
      while (n < 30) begin
        if (retry) begin
          pulses++;
          checks++;
          if (n != D) begin failures++; $display("FAIL retry after %0d", n); end
        end
        @(negedge clk); n++;
      end
      checks++;
      if (pulses != 1) begin failures++; $display("FAIL %0d pulses", pulses); end
    end
    checks++;
    if (fail_cnt != 16'd3) begin failures++; $display("FAIL count %0d", fail_cnt); end
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
