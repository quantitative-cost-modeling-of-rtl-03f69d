// noc_pkg: types and elaboration-time helpers shared by the error-protected
// circuit-switched NoC.
//
// * code_e selects the word-level error detection/correction code of the
//   network interfaces (parity SED, Hamming SEC or DED, enhanced Hamming
//   SEC/DED or TED, or no code at all).
// * eh_e selects the error-handling protocol: send-and-forget (S&F),
//   send-and-wait (S&W) or send-and-wait with sliding-window enhancement
//   (S&W SWE).
// * fkind_e / bkind_e are the flit kinds travelling forward (sender to
//   receiver) and backward (acknowledge channel) on every link.
// * ham_r / cw_width / ham_pos give the code geometry.  The Hamming code uses
//   the classic count of check bits r, the smallest r with 2^r >= N + r + 1;
//   the enhanced code adds one overall parity bit.
package noc_pkg;

  typedef enum logic [2:0] {
    CODE_NONE   = 3'd0,
    CODE_SED    = 3'd1,  // parity, single error detection
    CODE_SEC    = 3'd2,  // Hamming, single error correction
    CODE_DED    = 3'd3,  // Hamming, double error detection
    CODE_SECDED = 3'd4,  // enhanced Hamming, SEC + DED
    CODE_TED    = 3'd5   // enhanced Hamming, triple error detection
  } code_e;

  typedef enum logic [1:0] {
    EH_SF  = 2'd0,  // send and forget
    EH_SW  = 2'd1,  // send and wait
    EH_SWE = 2'd2   // send and wait, sliding window enhancement
  } eh_e;

  // forward flit kinds
  typedef enum logic [1:0] {
    FK_IDLE  = 2'd0,
    FK_SETUP = 2'd1,  // connection set-up, word[ADDR_W-1:0] = destination
    FK_DATA  = 2'd2,  // encoded data word
    FK_TEAR  = 2'd3   // connection tear-down
  } fkind_e;

  // backward flit kinds
  typedef enum logic [2:0] {
    BK_IDLE      = 3'd0,
    BK_ACK       = 3'd1,  // word seq received correctly
    BK_NACK      = 3'd2,  // word seq received with a non-correctable error
    BK_CONN_OK   = 3'd3,  // connection established
    BK_CONN_FAIL = 3'd4   // a router on the way had its output port in use
  } bkind_e;

  // router port numbering
  localparam int P_LOCAL = 0;
  localparam int P_NORTH = 1;  // towards y-1
  localparam int P_EAST  = 2;  // towards x+1
  localparam int P_SOUTH = 3;  // towards y+1
  localparam int P_WEST  = 4;  // towards x-1
  localparam int NPORTS  = 5;

  // number of Hamming check bits for an n-bit data word
  function automatic int ham_r(input int n);
    int r;
    r = 1;
    while ((1 << r) < n + r + 1) r++;
    return r;
  endfunction

  // code word width for a code and data word length
  function automatic int cw_width(input code_e code, input int n);
    case (code)
      CODE_SED:             return n + 1;
      CODE_SEC, CODE_DED:   return n + ham_r(n);
      CODE_SECDED, CODE_TED: return n + ham_r(n) + 1;
      default:              return n;
    endcase
  endfunction

  // position (1-based) of data bit j in the classic interleaved Hamming
  // layout: the j-th integer >= 3 that is not a power of two
  function automatic int ham_pos(input int j);
    int p, k;
    p = 2;
    k = -1;
    while (k < j) begin
      p++;
      if ((p & (p - 1)) != 0) k++;
    end
    return p;
  endfunction

  function automatic int max_int(input int a, input int b);
    return (a > b) ? a : b;
  endfunction

endpackage
