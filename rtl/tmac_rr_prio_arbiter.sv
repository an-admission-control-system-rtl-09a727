// tmac_rr_prio_arbiter: priority arbiter with round robin between equals.
//
// Each cycle it looks at the eligible initiators, finds the highest
// priority level among them, and picks one initiator of that level. Among
// initiators of the same level the choice rotates: the scan memory keeps,
// for every priority level, the index last granted at that level, and the
// search starts at the next index and wraps around. Only the level that
// won is updated, so high-priority traffic does not disturb the rotation
// of the lower levels.
//
// Interface: elig_i and prio_i are read combinationally; when en_i is high
// (a token is free) and some initiator is eligible, sel_vld_o is high and
// sel_idx_o names the winner in the same cycle. The scan memory is updated
// on the rising edge when a grant is made. Reset (asynchronous, active
// low) sets every pointer to NUM_INIT-1, so the first search at each
// level starts at initiator 0. Priority first and round robin between
// equals follow the document, as does keeping the round-robin state in a
// scan memory; one pointer per level is this design's choice.
module tmac_rr_prio_arbiter #(
  parameter int unsigned NUM_INIT = 5,
  parameter int unsigned PRIO_W   = 2,
  localparam int unsigned IDX_W   = (NUM_INIT > 1) ? $clog2(NUM_INIT) : 1,
  localparam int unsigned LEVELS  = 1 << PRIO_W
) (
  input  logic                            clk,
  input  logic                            rst_n,
  input  logic                            en_i,
  input  logic [NUM_INIT-1:0]             elig_i,
  input  logic [NUM_INIT-1:0][PRIO_W-1:0] prio_i,
  output logic                            sel_vld_o,
  output logic [IDX_W-1:0]                sel_idx_o
);

  logic [LEVELS-1:0][IDX_W-1:0] scan_q;   // scan memory
  logic [PRIO_W-1:0]            top_lvl;
  logic                         any;
  logic [NUM_INIT-1:0]          cand;
  logic [IDX_W-1:0]             win;
  logic                         found;

  always_comb begin
    any     = |elig_i;
    top_lvl = '0;
    for (int i = 0; i < NUM_INIT; i++)
      if (elig_i[i] && (prio_i[i] > top_lvl)) top_lvl = prio_i[i];
    for (int i = 0; i < NUM_INIT; i++)
      cand[i] = elig_i[i] && (prio_i[i] == top_lvl);
  end

  always_comb begin
    int unsigned start, j;
    start = 32'(scan_q[top_lvl]);
    win   = '0;
    found = 1'b0;
    for (int unsigned k = 1; k <= NUM_INIT; k++) begin
      j = start + k;
      if (j >= NUM_INIT) j = j - NUM_INIT;
      if (!found && cand[j]) begin
        found = 1'b1;
        win   = IDX_W'(j);
      end
    end
  end

  assign sel_vld_o = en_i && any;
  assign sel_idx_o = win;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int l = 0; l < LEVELS; l++) scan_q[l] <= IDX_W'(NUM_INIT - 1);
    end else if (sel_vld_o) begin
      scan_q[top_lvl] <= win;
    end
  end

  a_found : assert property (@(posedge clk) disable iff (!rst_n)
    any |-> found);

endmodule
