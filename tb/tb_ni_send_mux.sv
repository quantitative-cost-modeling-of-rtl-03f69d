// tb_ni_send_mux: random inputs; a retransmission must win, otherwise the
// Control flit passes with the new-word sequence number on data flits.
module tb_ni_send_mux;
  import noc_pkg::*;
  localparam int N = 32, SW = 6;
  fkind_e ctl_kind, kind;
  logic [N-1:0] ctl_word, retx_word, word;
  logic [SW-1:0] ctl_seq, retx_seq, seq;
  logic retx_valid;
  int checks = 0, failures = 0;

  ni_send_mux #(.N(N), .SEQ_W(SW)) dut (.*);

  initial begin
    for (int t = 0; t < 1000; t++) begin
      ctl_kind = fkind_e'($urandom_range(3, 0)); ctl_word = $urandom; ctl_seq = SW'($urandom);
      retx_valid = ($urandom_range(2, 0) == 0); retx_word = $urandom; retx_seq = SW'($urandom);
      #1;
      checks++;
      if (retx_valid ? (kind != FK_DATA || word != retx_word || seq != retx_seq)
                     : (kind != ctl_kind || word != ctl_word ||
                        seq != ((ctl_kind == FK_DATA) ? ctl_seq : '0))) begin
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
