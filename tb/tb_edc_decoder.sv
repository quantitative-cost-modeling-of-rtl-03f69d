// tb_edc_decoder: checks the decoder for every code at N = 32.
// Code words are built here from the interleaved Hamming definition, then
// 0, 1, 2 or 3 random bits are flipped and the data output and the flags
// are compared with what each code promises.
module tb_edc_decoder;
  import noc_pkg::*;
  localparam int N = 32;
  localparam int R = 6;

  logic [N:0]     cw_sed;
  logic [N+R-1:0] cw_sec, cw_ded;
  logic [N+R:0]   cw_secded, cw_ted;
  logic [N-1:0] d_sed, d_sec, d_ded, d_secded, d_ted;
  logic [4:0] det, cor, unc;
  int checks = 0, failures = 0;

  edc_decoder #(.N(N), .CODE(CODE_SED))    u_sed    (.cw(cw_sed),    .data(d_sed),    .err_detect(det[0]), .err_corr(cor[0]), .err_uncorr(unc[0]));
  edc_decoder #(.N(N), .CODE(CODE_SEC))    u_sec    (.cw(cw_sec),    .data(d_sec),    .err_detect(det[1]), .err_corr(cor[1]), .err_uncorr(unc[1]));
  edc_decoder #(.N(N), .CODE(CODE_DED))    u_ded    (.cw(cw_ded),    .data(d_ded),    .err_detect(det[2]), .err_corr(cor[2]), .err_uncorr(unc[2]));
  edc_decoder #(.N(N), .CODE(CODE_SECDED)) u_secded (.cw(cw_secded), .data(d_secded), .err_detect(det[3]), .err_corr(cor[3]), .err_uncorr(unc[3]));
  edc_decoder #(.N(N), .CODE(CODE_TED))    u_ted    (.cw(cw_ted),    .data(d_ted),    .err_detect(det[4]), .err_corr(cor[4]), .err_uncorr(unc[4]));

  // Hamming check bits: bit i covers the interleaved positions with bit i set
  function automatic logic [R-1:0] checks_of(input logic [N-1:0] d);
    logic [R-1:0] p;
    int j, pos;
    p = '0;
    j = 0;
    for (pos = 3; j < N; pos++)
      if ((pos & (pos - 1)) != 0) begin
        for (int i = 0; i < R; i++) if (pos[i]) p[i] ^= d[j];
        j++;
      end
    return p;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // mask with k distinct random bits set among the low w bits
  function automatic logic [N+R:0] rmask(input int k, input int w);
    logic [N+R:0] m;
    m = '0;
    while ($countones(m) < k) m[$urandom_range(w - 1, 0)] = 1'b1;
    return m;
  endfunction

  initial begin
    logic [N-1:0] d;
    logic [R-1:0] p;
    logic [N+R:0] m;
    for (int t = 0; t < 2000; t++) begin
      int k;
      d = $urandom;
      p = checks_of(d);
      k = t % 4;  // number of flipped bits
      m = rmask(k, N + 1);
      cw_sed = {^d, d} ^ m[N:0];
      m = rmask(k, N + R);
      cw_sec = {p, d} ^ m[N+R-1:0];
      cw_ded = cw_sec;
      m = rmask(k, N + R + 1);
      cw_secded = {(^p) ^ (^d), p, d} ^ m;
      cw_ted = cw_secded;
      #1;
      case (k)
        0: begin
          check(det == '0 && cor == '0 && unc == '0, "clean flags");
          check(d_sed == d && d_sec == d && d_ded == d && d_secded == d && d_ted == d, "clean data");
        end
        1: begin
          check(unc[0] && det[0], "SED detects single");
          check(d_sec == d && cor[1] && !unc[1], "SEC corrects single");
          check(unc[2] && !cor[2], "DED detects single");
          check(d_secded == d && cor[3] && !unc[3], "SECDED corrects single");
          check(unc[4], "TED detects single");
        end
        2: begin
          check(!det[0], "SED misses double");
          check(unc[2], "DED detects double");
          check(unc[3] && !cor[3], "SECDED detects double");
          check(unc[4], "TED detects double");
        end
        default: begin
          check(unc[0], "SED detects triple");
          check(unc[4], "TED detects triple");
        end
      endcase
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
