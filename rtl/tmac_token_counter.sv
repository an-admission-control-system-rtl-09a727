// tmac_token_counter: the pool of free tokens.
//
// The counter starts at NUM_TOKENS after reset. Each cycle it adds the
// tokens returned in that cycle (ret_cnt) and subtracts the token
// assigned in that cycle (take, at most one: the token manager assigns a
// single token per clock). Tokens returned in a cycle can be assigned in
// the same cycle, which is what lets an initiator release a token and
// ask for a new one back to back; avail_o therefore counts them already.
//
// Interface: ret_cnt and take are sampled on the rising edge; free_o is
// the registered count, avail_o = free_o + ret_cnt is what may be handed
// out this cycle (combinational). The counting follows the document; the
// same-cycle reuse of returned tokens is how this design reads its
// back-to-back rule. Reset is asynchronous, active low.
module tmac_token_counter #(
  parameter int unsigned NUM_INIT   = 5,
  parameter int unsigned NUM_TOKENS = 3,
  localparam int unsigned CNT_W     = $clog2(NUM_TOKENS + 1),
  localparam int unsigned RET_W     = $clog2(NUM_INIT + 1),
  localparam int unsigned SUM_W     = ((CNT_W > RET_W) ? CNT_W : RET_W) + 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [RET_W-1:0] ret_cnt,
  input  logic             take,
  output logic [CNT_W-1:0] free_o,
  output logic [SUM_W-1:0] avail_o
);

  logic [CNT_W-1:0] free_q;
  logic [SUM_W-1:0] sum;

  assign sum     = SUM_W'(free_q) + SUM_W'(ret_cnt);
  assign avail_o = sum;
  assign free_o  = free_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) free_q <= CNT_W'(NUM_TOKENS);
    else        free_q <= CNT_W'(sum - SUM_W'(take));
  end

  // A token can only be taken when one is available, and no more tokens
  // can come back than were handed out.
  a_take_avail : assert property (@(posedge clk) disable iff (!rst_n)
    take |-> (sum != '0));
  a_no_excess : assert property (@(posedge clk) disable iff (!rst_n)
    sum <= SUM_W'(NUM_TOKENS));

endmodule
