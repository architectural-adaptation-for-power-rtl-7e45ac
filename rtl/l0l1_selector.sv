// l0l1_selector: dynamic L0/L1 cache selection for instruction fetch.
//
// Instruction streams hit or miss the small L0 in runs: once a fetch hits
// L0, the rest of its basic block tends to hit too, and once one misses,
// the rest tends to miss. The selector therefore sends the next fetch to L0
// if the current fetch hit in L0 and to L1 (bypassing L0) if it missed.
// The outcome comes from the decoupled L0 tag array, so the prediction is
// updated even for fetches that went to L1.
//
// Interface and timing: `upd` in a cycle where a fetch's L0 tag outcome
// `l0_hit` is known. `sel` is the choice for a fetch issued in the same
// cycle: it follows the outcome being reported when `upd` is high
// (combinational forwarding, so back-to-back fetches use the newest
// outcome) and the stored prediction otherwise. The prediction register
// takes the outcome at the clock edge. Starting in L1 after reset (L0 is
// empty then) is this design's choice.
module l0l1_selector
  import mem_hier_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       upd,
  input  logic       l0_hit,
  output cache_sel_e sel
);
  cache_sel_e pred_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   pred_q <= SEL_L1;
    else if (upd) pred_q <= l0_hit ? SEL_L0 : SEL_L1;
  end

  always_comb begin
    if (upd) sel = l0_hit ? SEL_L0 : SEL_L1;
    else     sel = pred_q;
  end

endmodule
