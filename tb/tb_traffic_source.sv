// tb_traffic_source: a message of 10 words under random back-pressure:
// indices count up, a word is held unchanged until taken, its time stamp
// is the cycle it was first offered, fu_last marks word 10, a start while
// busy is ignored.  Then a message of 8 words with gap 3: word i is
// stamped and offered from cycle g0 + 3 i on (g0 = first cycle after the
// start), never earlier, also when the receiver falls behind.
module tb_traffic_source;
  localparam int N = 32, AW = 2;
  logic clk = 0, rst_n = 0;
  logic [15:0] now = 0, len;
  logic [7:0] gap;
  logic start, busy, fu_valid, fu_ready, fu_last;
  logic [AW-1:0] dest, fu_dest;
  logic [31:0] sent_cnt;
  logic [N-1:0] fu_data;
  int checks = 0, failures = 0;

  traffic_source #(.N(N), .ADDR_W(AW)) dut (.*);
  always #5 clk = ~clk;
  always_ff @(posedge clk) now <= now + 16'd1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s @%0t", what, $time); end
  endtask

  initial begin
    int idx;
    logic [15:0] first_seen;
    bit seen;
    start = 0; len = 16'd10; dest = 2'd1; fu_ready = 0; gap = 8'd0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk); start = 1;
    @(negedge clk); start = 0; len = 16'd99;
    check(busy && fu_dest == 2'd1, "busy after start");
    idx = 0; seen = 1; first_seen = now;
    while (idx < 10) begin
      @(negedge clk);
      if (fu_valid && !seen) begin first_seen = now; seen = 1; end
      fu_ready = ($urandom_range(2, 0) != 0);
      start = 1;  // ignored while busy
      #1;
      check(fu_valid && fu_data[31:16] == 16'(idx) && fu_data[15:0] == first_seen, $sformatf("word %0d", idx));
      check(fu_last == (idx == 9), "last flag");
      @(posedge clk);
      if (fu_ready) begin idx++; seen = 0; end
    end
    @(negedge clk); start = 0; fu_ready = 0;
    check(!busy && !fu_valid && sent_cnt == 10, "done after len words");
    // generated traffic, one word every 3 cycles
    len = 16'd8; gap = 8'd3; start = 1;
    @(negedge clk); start = 0; gap = 8'd0;
    first_seen = now;  // g0
    idx = 0;
    while (idx < 8) begin
      @(negedge clk);
      fu_ready = (idx < 4) ? 1'b1 : ($urandom_range(4, 0) == 0);
      #1;
      check(fu_valid == (now >= first_seen + 16'(3 * idx)), $sformatf("gap word %0d valid at %0d", idx, now));
      if (fu_valid)
        check(fu_data[31:16] == 16'(idx) && fu_data[15:0] == first_seen + 16'(3 * idx), $sformatf("gap word %0d stamp", idx));
      @(posedge clk);
      if (fu_valid && fu_ready) idx++;
    end
    @(negedge clk); fu_ready = 0;
    check(!busy && sent_cnt == 18, "done after gap message");
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
