// ifetch_unit: instruction fetch through an L0 cache with predicted bypass.
//
// A small L0 saves power because a hit avoids the larger L1 access, but a
// fetch that misses L0 pays an extra cycle before L1 is tried. This unit
// lets fetches that are unlikely to hit L0 go straight to L1. The
// l0l1_selector predicts, per fetch, L0 if the previous fetch hit L0 and L1
// if it missed. The L0 tag array is decoupled from its data array and is
// looked up on every fetch, so the hit/miss outcome (and with it the next
// prediction) is known also for fetches served by L1. A multiplexer returns
// either the L0 or the L1 data to the CPU.
//
// Fetch paths (cycle of acceptance = t):
//   predicted L0, L0 hit  : data at t+1 from L0; next fetch can be accepted at t+1.
//   predicted L0, L0 miss : L1 is requested at t+1; data at t+2 on an L1 hit;
//                           the line is written into L0.
//   predicted L1 (bypass) : L1 is requested at t; data at t+1 on an L1 hit.
//                           L0 data is not read. If the L0 tag missed, the
//                           line is also written into L0.
// L1 misses stretch the L1 paths by the L2 refill time.
//
// Interface: req_valid/req_ready/req_addr (16-byte fetch block address) and
// resp_valid/resp_data from/to the CPU; l1_* is the request/response port
// of l1_icache. The ev_* outputs pulse once per event for counting:
// ev_l0_hit (served by L0), ev_l0_miss (predicted L0 but missed),
// ev_bypass (sent to L1 directly), ev_bypass_l0hit (sent to L1 although L0
// held the line), ev_l0_fill (L0 line written). sel_o shows the current
// prediction.
//
// The prediction rule, the decoupled tag/data arrays and the bypass
// multiplexer follow the design. Refilling L0 on bypassed fetches that miss
// the L0 tag, the reset prediction (L1) and the handshake are this design's
// own choices.
module ifetch_unit
  import mem_hier_pkg::*;
#(
  parameter int unsigned L0_BYTES = 256
) (
  input  logic       clk,
  input  logic       rst_n,
  // CPU side
  input  logic       req_valid,
  output logic       req_ready,
  input  faddr_t     req_addr,
  output logic       resp_valid,
  output fblk_t      resp_data,
  // L1 side
  output logic       l1_req_valid,
  input  logic       l1_req_ready,
  output faddr_t     l1_req_addr,
  input  logic       l1_resp_valid,
  input  fblk_t      l1_resp_data,
  // status and events
  output cache_sel_e sel_o,
  output logic       ev_l0_hit,
  output logic       ev_l0_miss,
  output logic       ev_bypass,
  output logic       ev_bypass_l0hit,
  output logic       ev_l0_fill
);
  typedef enum logic [1:0] {S_IDLE, S_WAIT_L0, S_RETRY_L1, S_WAIT_L1} state_e;
  state_e state_q, state_d;

  faddr_t     addr_q;
  logic       bypass_q, bypass_d;
  logic       tag_hit;
  fblk_t      l0_rd_data;
  cache_sel_e sel;
  logic       upd, upd_hit;
  logic       can_take, accept, fill;

  // Selector update: once per fetch, when its L0 tag outcome is used.
  always_comb begin
    upd     = 1'b0;
    upd_hit = tag_hit;
    if (state_q == S_WAIT_L0) upd = 1'b1;
    if (state_q == S_WAIT_L1 && bypass_q && l1_resp_valid) upd = 1'b1;
  end

  l0l1_selector u_sel (
    .clk    (clk),
    .rst_n  (rst_n),
    .upd    (upd),
    .l0_hit (upd_hit),
    .sel    (sel)
  );

  assign can_take = (state_q == S_IDLE)
                 || (state_q == S_WAIT_L0 && tag_hit)
                 || (state_q == S_WAIT_L1 && l1_resp_valid);
  assign req_ready = can_take && (sel == SEL_L0 || l1_req_ready);
  assign accept    = req_valid && req_ready;

  // The L1 line arrives: write it into L0 if the L0 tag did not hold it.
  assign fill = (state_q == S_WAIT_L1) && l1_resp_valid && !tag_hit;

  l0_tag_array #(.L0_BYTES(L0_BYTES)) u_tag (
    .clk     (clk),
    .rst_n   (rst_n),
    .rd_en   (accept),
    .rd_addr (req_addr),
    .hit     (tag_hit),
    .wr_en   (fill),
    .wr_addr (addr_q)
  );

  l0_data_array #(.L0_BYTES(L0_BYTES)) u_data (
    .clk     (clk),
    .rd_en   (accept && sel == SEL_L0),
    .rd_addr (req_addr),
    .rd_data (l0_rd_data),
    .wr_en   (fill),
    .wr_addr (addr_q),
    .wr_data (l1_resp_data)
  );

  // L1 request: a new bypassed fetch, or the retry of an L0 miss.
  always_comb begin
    l1_req_valid = 1'b0;
    l1_req_addr  = addr_q;
    if (state_q == S_WAIT_L0 && !tag_hit) l1_req_valid = 1'b1;
    if (state_q == S_RETRY_L1)            l1_req_valid = 1'b1;
    if (can_take && req_valid && sel == SEL_L1) begin
      l1_req_valid = 1'b1;
      l1_req_addr  = req_addr;
    end
  end

  // Bypass multiplexer towards the CPU.
  assign resp_valid = (state_q == S_WAIT_L0 && tag_hit)
                   || (state_q == S_WAIT_L1 && l1_resp_valid);
  assign resp_data  = (state_q == S_WAIT_L0) ? l0_rd_data : l1_resp_data;

  always_comb begin
    state_d  = state_q;
    bypass_d = bypass_q;
    unique case (state_q)
      S_IDLE:     ;
      S_WAIT_L0:  if (!tag_hit) begin
                    state_d  = l1_req_ready ? S_WAIT_L1 : S_RETRY_L1;
                    bypass_d = 1'b0;
                  end else begin
                    state_d = S_IDLE;
                  end
      S_RETRY_L1: if (l1_req_ready) state_d = S_WAIT_L1;
      S_WAIT_L1:  if (l1_resp_valid) state_d = S_IDLE;
      default:    state_d = S_IDLE;
    endcase
    if (accept) begin
      state_d  = (sel == SEL_L0) ? S_WAIT_L0 : S_WAIT_L1;
      bypass_d = (sel == SEL_L1);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q  <= S_IDLE;
      addr_q   <= '0;
      bypass_q <= 1'b0;
    end else begin
      state_q  <= state_d;
      bypass_q <= bypass_d;
      if (accept) addr_q <= req_addr;
    end
  end

  assign sel_o           = sel;
  assign ev_l0_hit       = (state_q == S_WAIT_L0) && tag_hit;
  assign ev_l0_miss      = (state_q == S_WAIT_L0) && !tag_hit;
  assign ev_bypass       = accept && sel == SEL_L1;
  assign ev_bypass_l0hit = (state_q == S_WAIT_L1) && bypass_q && l1_resp_valid && tag_hit;
  assign ev_l0_fill      = fill;

endmodule
