// tb_ni_send_buffer: writes random words at random indices and compares
// every read with a reference array.
module tb_ni_send_buffer;
  localparam int N = 32, WIN = 32;
  logic clk = 0, we;
  logic [4:0] waddr, raddr;
  logic [N-1:0] wdata, rdata;
  logic [N-1:0] ref_mem [WIN];
  logic [WIN-1:0] valid = '0;
  int checks = 0, failures = 0;

  ni_send_buffer #(.N(N), .WIN(WIN)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    we = 0; waddr = 0; raddr = 0; wdata = 0;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      if (valid[raddr]) begin
        checks++;
        if (rdata != ref_mem[raddr]) begin failures++; $display("FAIL addr %0d", raddr); end
      end
      we = ($urandom_range(1, 0) == 1); waddr = 5'($urandom); wdata = $urandom;
      raddr = 5'($urandom);
      @(posedge clk);
      if (we) begin ref_mem[waddr] = wdata; valid[waddr] = 1'b1; end
    end
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
