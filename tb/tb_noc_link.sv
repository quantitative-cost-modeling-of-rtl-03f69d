// tb_noc_link: random flits in both directions; each must come out one
// cycle later, data words XORed with the injection mask, other kinds never.
module tb_noc_link;
  import noc_pkg::*;
  localparam int CW = 33, SW = 6;
  logic clk = 0, rst_n = 0;
  fkind_e a_fkind, b_fkind;
  logic [SW-1:0] a_fseq, b_fseq, a_bseq, b_bseq;
  logic [CW-1:0] a_fword, b_fword, inj_mask;
  bkind_e a_bkind, b_bkind;
  int checks = 0, failures = 0;

  noc_link #(.CW(CW), .SEQ_W(SW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    fkind_e pk; logic [SW-1:0] ps, pbs; logic [CW-1:0] pw, pm; bkind_e pb;
    a_fkind = FK_IDLE; a_fseq = '0; a_fword = '0; b_bkind = BK_IDLE; b_bseq = '0; inj_mask = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 500; t++) begin
      @(negedge clk);
      pk = fkind_e'($urandom_range(3, 0)); ps = SW'($urandom); pw = {$urandom, $urandom} [CW-1:0];
      pm = ($urandom_range(1, 0) == 1) ? (CW'(1) << $urandom_range(CW - 1, 0)) : '0;
      pb = bkind_e'($urandom_range(4, 0)); pbs = SW'($urandom);
      a_fkind = pk; a_fseq = ps; a_fword = pw; inj_mask = pm; b_bkind = pb; b_bseq = pbs;
      @(negedge clk);
      checks++;
      if (b_fkind != pk || b_fseq != ps || a_bkind != pb || a_bseq != pbs ||
          b_fword != ((pk == FK_DATA) ? (pw ^ pm) : pw)) begin
        failures++;
        $display("FAIL t=%0d", t);
      end
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
