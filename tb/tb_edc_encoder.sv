// tb_edc_encoder: checks the encoder for every code at N = 32.
// The expected check bits are worked out here from the definition: the
// Hamming word is rebuilt in its interleaved layout (check bits at the
// power-of-two positions) and every parity group over it must be even; the
// enhanced code must also have even parity over the whole word.
module tb_edc_encoder;
  import noc_pkg::*;
  localparam int N = 32;
  localparam int R = 6;

  logic [N-1:0] data;
  logic [N:0]       cw_sed;
  logic [N+R-1:0]   cw_sec, cw_ded;
  logic [N+R:0]     cw_secded, cw_ted;
  logic [N-1:0]     cw_none;
  int checks = 0, failures = 0;

  edc_encoder #(.N(N), .CODE(CODE_SED))    u_sed    (.data, .cw(cw_sed));
  edc_encoder #(.N(N), .CODE(CODE_SEC))    u_sec    (.data, .cw(cw_sec));
  edc_encoder #(.N(N), .CODE(CODE_DED))    u_ded    (.data, .cw(cw_ded));
  edc_encoder #(.N(N), .CODE(CODE_SECDED)) u_secded (.data, .cw(cw_secded));
  edc_encoder #(.N(N), .CODE(CODE_TED))    u_ted    (.data, .cw(cw_ted));
  edc_encoder #(.N(N), .CODE(CODE_NONE))   u_none   (.data, .cw(cw_none));

  // true if the systematic word {p, d} is a valid Hamming code word
  function automatic bit ham_ok(input logic [N-1:0] d, input logic [R-1:0] p);
    logic [63:0] w;  // interleaved layout, bit k = position k
    int j, pos;
    w = '0;
    j = 0;
    for (pos = 1; j < N; pos++) begin
      if ((pos & (pos - 1)) == 0) w[pos] = p[$clog2(pos)];
      else begin w[pos] = d[j]; j++; end
    end
    for (int i = 0; i < R; i++) begin
      logic s;
      s = 1'b0;
      for (int k = 1; k < 64; k++) if (k[i]) s ^= w[k];
      if (s) return 1'b0;
    end
    return 1'b1;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s data=%h", what, data);
    end
  endtask

  initial begin
    if (cw_width(CODE_SEC, N) != N + R) $display("FAIL width");
    for (int t = 0; t < 400; t++) begin
      data = (t < 32) ? (32'h1 << t) : {$urandom, $urandom} [N-1:0];
      if (t == 32) data = '0;
      if (t == 33) data = '1;
      #1;
      check(cw_sed[N-1:0] == data && cw_sed[N] == ^data, "SED");
      check(cw_sec[N-1:0] == data && ham_ok(data, cw_sec[N+R-1:N]), "SEC");
      check(cw_ded == cw_sec, "DED");
      check(cw_secded[N+R-1:0] == cw_sec && (^cw_secded) == 1'b0, "SECDED");
      check(cw_ted == cw_secded, "TED");
      check(cw_none == data, "NONE");
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
