// traffic_source: data source of the NoC emulator.
//
// On start (one-cycle pulse, ignored while busy) it sends one message of
// len words to dest through the network interface's valid/ready stream,
// fu_last on the final word.  With gap = 0 each word is generated when the
// previous one is taken, so the source sends as fast as the interface
// accepts.  With gap = G > 0 word i is generated G * i cycles after the
// start, whether or not the interface keeps up (offered load 1/G words per
// cycle); a word is offered once it has been generated, so words queue up
// in front of a slow interface (generation times are compared in 16 bits,
// so the backlog must stay below 32768 cycles).  Each word carries its own checkable
// content: the low bits hold its time stamp (cycle of generation, from the
// common cycle counter `now`), the high bits its index in the message.
// For N >= 32 the stamp is 16 bits, otherwise N/2 bits.  The sink uses
// both to check order and measure the transmission time.  The document
// gives the source's role; the word format and the gap are this design's
// choices.
module traffic_source #(
  parameter int N      = 32,
  parameter int ADDR_W = 2
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [15:0]       now,
  // controller
  input  logic              start,
  input  logic [15:0]       len,
  input  logic [ADDR_W-1:0] dest,
  input  logic [7:0]        gap,
  output logic              busy,
  output logic [31:0]       sent_cnt,
  // network interface
  output logic              fu_valid,
  input  logic              fu_ready,
  output logic [N-1:0]      fu_data,
  output logic              fu_last,
  output logic [ADDR_W-1:0] fu_dest
);

  localparam int TS_W = (N >= 32) ? 16 : N / 2;

  logic [15:0] idx, total;
  logic [TS_W-1:0] stamp;
  logic        fresh;    // the current word has not been offered before
  logic [7:0]  gap_q;
  logic [15:0] gen_t;    // generation time of the current word (gap > 0)
  logic [15:0] since;    // cycles since the current word was generated
  logic        ready_w;  // current word generated

  assign since    = now - gen_t;
  assign ready_w  = (gap_q == 8'd0) || !since[15];
  assign fu_valid = busy && ready_w;
  assign fu_data  = {(N - TS_W)'(idx),
                     (gap_q != 8'd0) ? gen_t[TS_W-1:0] : (fresh ? now[TS_W-1:0] : stamp)};
  assign fu_last  = (idx + 16'd1 == total);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy     <= 1'b0;
      idx      <= '0;
      total    <= '0;
      stamp    <= '0;
      fresh    <= 1'b1;
      fu_dest  <= '0;
      sent_cnt <= '0;
      gap_q    <= '0;
      gen_t    <= '0;
    end else if (!busy) begin
      if (start && len != '0) begin
        busy    <= 1'b1;
        gap_q   <= gap;
        gen_t   <= now + 16'd1;
        idx     <= '0;
        total   <= len;
        fu_dest <= dest;
        fresh   <= 1'b1;
      end
    end else if (fu_valid && fu_ready) begin
      idx      <= idx + 16'd1;
      gen_t    <= gen_t + 16'(gap_q);
      fresh    <= 1'b1;
      sent_cnt <= sent_cnt + 32'd1;
      if (fu_last) busy <= 1'b0;
    end else if (fu_valid && fresh) begin
      stamp <= now[TS_W-1:0];
      fresh <= 1'b0;
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) fu_valid && !fu_ready |=> fu_valid && $stable(fu_data))
    else $error("source changed a word that was not taken");

endmodule
