// tb_edc_word_length: the ECC/EDC encoder and decoder of every code over
// the data word lengths 16, 32, 64, 128 and 255 bits (the range over which
// the error-protection blocks are sized).  For each length and code an
// encoder feeds a decoder through an error mask.  Each step sends a random
// word with 0, 1, 2 or 3 distinct bits flipped and compares the decoder's
// data and flags with what the code promises:
//   SED     1 error detected; 0 errors pass clean
//   SEC     1 error corrected
//   DED     1 or 2 errors detected, none corrected
//   SEC/DED 1 error corrected, 2 errors detected
//   TED     1, 2 or 3 errors detected
// Cases a code does not cover (2 errors under SED, 2 or 3 under SEC, ...)
// are sent but not judged.  The code word width is checked against the
// check-bit count r (smallest r with 2^r >= n + r + 1) worked out here.
module tb_edc_word_length;
  import noc_pkg::*;
  localparam int NL = 5;
  localparam int NS [NL] = '{16, 32, 64, 128, 255};
  localparam int RS [NL] = '{5, 6, 7, 8, 9};  // check bits, by hand
  localparam int NC = 5;                      // codes SED .. TED
  localparam int MAXW = 256 + 10;

  logic [255:0]    data  [NL];
  logic [MAXW-1:0] mask  [NL][NC];
  logic [255:0]    dout  [NL][NC];
  logic            det   [NL][NC], cor [NL][NC], unc [NL][NC];
  int              width [NL][NC];
  int checks = 0, failures = 0;

  for (genvar k = 0; k < NL; k++) begin : g_len
    for (genvar c = 0; c < NC; c++) begin : g_code
      localparam code_e CODE = code_e'(c + 1);
      localparam int    CW   = cw_width(CODE, NS[k]);
      logic [CW-1:0]    cw;
      logic [NS[k]-1:0] d;
      edc_encoder #(.N(NS[k]), .CODE(CODE)) u_enc (.data(data[k][NS[k]-1:0]), .cw);
      edc_decoder #(.N(NS[k]), .CODE(CODE)) u_dec (.cw(cw ^ mask[k][c][CW-1:0]), .data(d),
        .err_detect(det[k][c]), .err_corr(cor[k][c]), .err_uncorr(unc[k][c]));
      assign dout[k][c]  = 256'(d);
      assign width[k][c] = CW;
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    int ne;
    for (int k = 0; k < NL; k++) begin
      check(width[k][0] == NS[k] + 1, $sformatf("SED width n=%0d", NS[k]));
      check(width[k][1] == NS[k] + RS[k] && width[k][2] == NS[k] + RS[k], $sformatf("Hamming width n=%0d", NS[k]));
      check(width[k][3] == NS[k] + RS[k] + 1 && width[k][4] == NS[k] + RS[k] + 1, $sformatf("enhanced width n=%0d", NS[k]));
    end
    for (int step = 0; step < 400; step++) begin
      ne = step % 4;
      for (int k = 0; k < NL; k++) begin
        for (int w = 0; w < 8; w++) data[k][32*w +: 32] = $urandom;
        data[k] &= (256'(1) << NS[k]) - 256'(1);
        for (int c = 0; c < NC; c++) begin
          mask[k][c] = '0;
          while ($countones(mask[k][c]) < ne) mask[k][c][$urandom_range(width[k][c] - 1, 0)] = 1'b1;
        end
      end
      #1;
      for (int k = 0; k < NL; k++) begin
        string tag;
        tag = $sformatf("n=%0d errors=%0d step %0d", NS[k], ne, step);
        // SED
        if (ne == 0) check(!det[k][0] && !unc[k][0] && dout[k][0] == data[k], {"SED clean ", tag});
        if (ne == 1) check(det[k][0] && unc[k][0] && !cor[k][0], {"SED detect ", tag});
        // SEC
        if (ne <= 1) check(dout[k][1] == data[k] && !unc[k][1] && cor[k][1] == (ne == 1), {"SEC ", tag});
        // DED
        if (ne == 0) check(!det[k][2] && dout[k][2] == data[k], {"DED clean ", tag});
        if (ne == 1 || ne == 2) check(det[k][2] && unc[k][2] && !cor[k][2], {"DED detect ", tag});
        // SEC/DED
        if (ne <= 1) check(dout[k][3] == data[k] && !unc[k][3] && cor[k][3] == (ne == 1), {"SECDED correct ", tag});
        if (ne == 2) check(det[k][3] && unc[k][3] && !cor[k][3], {"SECDED detect ", tag});
        // TED
        if (ne == 0) check(!det[k][4] && dout[k][4] == data[k], {"TED clean ", tag});
        if (ne >= 1) check(det[k][4] && unc[k][4] && !cor[k][4], {"TED detect ", tag});
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
