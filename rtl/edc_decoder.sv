// edc_decoder: ECC/EDC decoder of the network-interface receive side.
//
// A detecting stage recomputes the check bits of the received data part and
// compares them with the received ones (the syndrome).  For the correcting
// codes a correcting stage then flips the data bit the syndrome points at.
//   CODE_SED     parity mismatch                 -> err_uncorr
//   CODE_SEC     syndrome != 0                   -> correct that bit
//                (a syndrome pointing past the word -> err_uncorr)
//   CODE_DED     syndrome != 0                   -> err_uncorr
//   CODE_SECDED  overall parity wrong            -> single error, corrected
//                overall parity right, syndrome!=0 -> double error, err_uncorr
//   CODE_TED     syndrome != 0 or overall wrong  -> err_uncorr
// err_detect is set for any error seen, err_corr when a correction was made.
// The code word layout matches edc_encoder.  Purely combinational.
module edc_decoder
  import noc_pkg::*;
#(
  parameter int    N    = 32,
  parameter code_e CODE = CODE_SED,
  localparam int   CW   = cw_width(CODE, N)
) (
  input  logic [CW-1:0] cw,
  output logic [N-1:0]  data,
  output logic          err_detect,
  output logic          err_corr,
  output logic          err_uncorr
);

  localparam int R = ham_r(N);

  function automatic logic [R-1:0] ham_checks(input logic [N-1:0] d);
    logic [R-1:0] p;
    p = '0;
    for (int j = 0; j < N; j++)
      for (int i = 0; i < R; i++)
        if (((ham_pos(j) >> i) & 1) != 0) p[i] ^= d[j];
    return p;
  endfunction

  // flip the data bit at Hamming position syn (check-bit positions and
  // positions outside the word leave the data alone)
  function automatic logic [N-1:0] ham_correct(input logic [N-1:0] d, input logic [R-1:0] syn);
    logic [N-1:0] o;
    o = d;
    for (int j = 0; j < N; j++)
      if (int'(syn) == ham_pos(j)) o[j] = ~d[j];
    return o;
  endfunction

  // highest Hamming position in use: a larger syndrome cannot be one error
  localparam int MAXPOS = N + R;

  generate
    if (CODE == CODE_SED) begin : g_sed
      assign data       = cw[N-1:0];
      assign err_detect = ^cw;
      assign err_corr   = 1'b0;
      assign err_uncorr = ^cw;
    end else if (CODE == CODE_SEC || CODE == CODE_DED) begin : g_ham
      logic [R-1:0] syn;
      assign syn = ham_checks(cw[N-1:0]) ^ cw[N+R-1:N];
      assign err_detect = (syn != '0);
      if (CODE == CODE_SEC) begin : g_sec
        assign data       = ham_correct(cw[N-1:0], syn);
        assign err_corr   = (syn != '0) && (int'(syn) <= MAXPOS);
        assign err_uncorr = (int'(syn) > MAXPOS);
      end else begin : g_ded
        assign data       = cw[N-1:0];
        assign err_corr   = 1'b0;
        assign err_uncorr = (syn != '0);
      end
    end else if (CODE == CODE_SECDED || CODE == CODE_TED) begin : g_eham
      logic [R-1:0] syn;
      logic         ovp;  // overall parity over the whole code word
      assign syn = ham_checks(cw[N-1:0]) ^ cw[N+R-1:N];
      assign ovp = ^cw;
      assign err_detect = (syn != '0) || ovp;
      if (CODE == CODE_SECDED) begin : g_secded
        assign data       = ovp ? ham_correct(cw[N-1:0], syn) : cw[N-1:0];
        assign err_corr   = ovp && (int'(syn) <= MAXPOS);
        assign err_uncorr = (!ovp && (syn != '0)) || (ovp && (int'(syn) > MAXPOS));
      end else begin : g_ted
        assign data       = cw[N-1:0];
        assign err_corr   = 1'b0;
        assign err_uncorr = (syn != '0) || ovp;
      end
    end else begin : g_none
      assign data       = cw;
      assign err_detect = 1'b0;
      assign err_corr   = 1'b0;
      assign err_uncorr = 1'b0;
    end
  endgenerate

endmodule
