// tmac_prio_mem: the priority memory of the token manager.
//
// One entry per initiator holds its priority level and its token quota,
// the number of tokens it may hold at the same time. The arbiter grants
// higher levels first; a quota of 2 lets an initiator keep two commands
// outstanding, as in the document's two-outstanding-command experiment,
// and a quota of 0 shuts an initiator out.
//
// Interface: a single write port (cfg_we, cfg_idx, cfg_prio, cfg_quota),
// written on the rising clock edge; every entry is read in parallel on
// prio_o / quota_o. Writes to an index >= NUM_INIT are ignored.
// Timing: a write is visible on the outputs from the next cycle.
// Reset (active low, asynchronous, matching the nreset input of the
// token manager): every priority becomes RESET_PRIO and every quota
// RESET_QUOTA. A programmable memory follows the document; the write
// port, the widths and the reset values are this design's own choice.
module tmac_prio_mem #(
  parameter int unsigned NUM_INIT    = 5,
  parameter int unsigned PRIO_W      = 2,
  parameter int unsigned QUOTA_W     = 2,
  parameter int unsigned RESET_PRIO  = 0,
  parameter int unsigned RESET_QUOTA = 1,
  localparam int unsigned IDX_W      = (NUM_INIT > 1) ? $clog2(NUM_INIT) : 1
) (
  input  logic                             clk,
  input  logic                             rst_n,
  input  logic                             cfg_we,
  input  logic [IDX_W-1:0]                 cfg_idx,
  input  logic [PRIO_W-1:0]                cfg_prio,
  input  logic [QUOTA_W-1:0]               cfg_quota,
  output logic [NUM_INIT-1:0][PRIO_W-1:0]  prio_o,
  output logic [NUM_INIT-1:0][QUOTA_W-1:0] quota_o
);

  logic [NUM_INIT-1:0][PRIO_W-1:0]  prio_q;
  logic [NUM_INIT-1:0][QUOTA_W-1:0] quota_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NUM_INIT; i++) begin
        prio_q[i]  <= PRIO_W'(RESET_PRIO);
        quota_q[i] <= QUOTA_W'(RESET_QUOTA);
      end
    end else if (cfg_we && (32'(cfg_idx) < NUM_INIT)) begin
      prio_q[cfg_idx]  <= cfg_prio;
      quota_q[cfg_idx] <= cfg_quota;
    end
  end

  assign prio_o  = prio_q;
  assign quota_o = quota_q;

endmodule
