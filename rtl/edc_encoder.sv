// edc_encoder: ECC/EDC encoder of the network-interface send side.
//
// Appends check bits to an N-bit data word.  The code word is systematic:
// cw = {overall parity (enhanced Hamming only), Hamming check bits, data}.
//   CODE_SED            one even-parity bit, an XOR tree over the data.
//   CODE_SEC, CODE_DED  Hamming code: check bit i is the XOR of the data
//                       bits whose position in the classic interleaved
//                       Hamming layout (noc_pkg::ham_pos) has bit i set.
//   CODE_SECDED, CODE_TED  enhanced (distance-4) Hamming code: the Hamming
//                       word plus one parity bit over all of it.
//   CODE_NONE           the data word unchanged.
// The codes and the word-level protection follow the document; the
// systematic bit order is this design's choice.  Purely combinational.
module edc_encoder
  import noc_pkg::*;
#(
  parameter int    N    = 32,
  parameter code_e CODE = CODE_SED,
  localparam int   CW   = cw_width(CODE, N)
) (
  input  logic [N-1:0]  data,
  output logic [CW-1:0] cw
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

  generate
    if (CODE == CODE_SED) begin : g_sed
      assign cw = {^data, data};
    end else if (CODE == CODE_SEC || CODE == CODE_DED) begin : g_ham
      assign cw = {ham_checks(data), data};
    end else if (CODE == CODE_SECDED || CODE == CODE_TED) begin : g_eham
      logic [R-1:0] p;
      assign p  = ham_checks(data);
      assign cw = {(^p) ^ (^data), p, data};
    end else begin : g_none
      assign cw = data;
    end
  endgenerate

endmodule
