// l1_icache: set-associative L1 instruction cache (32KB, 4-way, 32B lines).
//
// Serves 16-byte fetch blocks to the fetch unit. Each line holds two fetch
// blocks; the low bit of the fetch block address picks the half. A hit is
// answered one cycle after the request (1-cycle latency), and a new request
// may be accepted in the cycle a hit is answered, so hits stream at one per
// cycle. On a miss the cache requests the 32-byte line from L2, installs it
// and answers from the returned line in the cycle it arrives; it accepts no
// request in that cycle. After reset the cache spends one cycle per set
// (256 at the default size) clearing its valid bits before it accepts the
// first request. Every array (per-way tags and data, per-set valid bits and
// round-robin pointers) is a RAM with a registered read port: the set is
// read at the edge that accepts the request, and compared in the next
// cycle.
//
// Interface: req_valid/req_ready/req_addr (fetch block address) and
// resp_valid/resp_data towards the fetch unit; l2_req_valid/l2_req_ready/
// l2_req_addr (L1 line address) and l2_resp_valid/l2_resp_data towards L2.
// hit_o and miss_o pulse once per lookup for event counting.
//
// Size, associativity, line size and the 1-cycle hit follow the design's
// cache configuration. The replacement policy (an invalid way first, else a
// per-set round-robin pointer), the synchronous RAM reads, and the
// answer-on-refill timing are this design's own choices.
module l1_icache
  import mem_hier_pkg::*;
#(
  parameter int unsigned L1_BYTES = 32768,
  parameter int unsigned WAYS     = 4
) (
  input  logic    clk,
  input  logic    rst_n,
  // fetch side
  input  logic    req_valid,
  output logic    req_ready,
  input  faddr_t  req_addr,
  output logic    resp_valid,
  output fblk_t   resp_data,
  // L2 side
  output logic    l2_req_valid,
  input  logic    l2_req_ready,
  output l1addr_t l2_req_addr,
  input  logic    l2_resp_valid,
  input  l1line_t l2_resp_data,
  // events
  output logic    hit_o,
  output logic    miss_o
);
  localparam int unsigned SETS  = L1_BYTES / (L1LINE_B * WAYS);
  localparam int unsigned IDX_W = $clog2(SETS);
  localparam int unsigned TAG_W = L1ADDR_W - IDX_W;
  localparam int unsigned WAY_W = (WAYS > 1) ? $clog2(WAYS) : 1;

  typedef enum logic [1:0] {S_IDLE, S_LOOKUP, S_MISS_REQ, S_MISS_WAIT} state_e;
  state_e state_q, state_d;

  logic [WAYS-1:0]   valid_mem [SETS];   // one valid bit per way
  logic [WAY_W-1:0]  rr_mem    [SETS];   // round-robin victim pointer

  // After reset the valid bits and pointers are cleared one set per cycle.
  logic              init_q;
  logic [IDX_W-1:0]  init_idx_q;

  faddr_t            addr_q;
  l1addr_t           line_addr;
  logic [IDX_W-1:0]  idx, rd_idx;
  logic [TAG_W-1:0]  tag;
  logic              half;
  logic              accept, lookup_hit, fill;

  assign line_addr = addr_q[FADDR_W-1:1];
  assign half      = addr_q[0];
  assign idx       = line_addr[IDX_W-1:0];
  assign tag       = line_addr[L1ADDR_W-1:IDX_W];
  assign accept    = req_valid && req_ready;

  // All arrays are read synchronously: the set of a newly accepted request,
  // otherwise the set of the current one.
  assign rd_idx = accept ? req_addr[IDX_W:1] : idx;

  logic [TAG_W-1:0] rd_tag  [WAYS];
  l1line_t          rd_line [WAYS];
  logic [WAYS-1:0]  set_valid;
  logic [WAY_W-1:0] set_rr;
  logic [WAY_W-1:0] victim;

  for (genvar w = 0; w < WAYS; w++) begin : g_way
    logic [TAG_W-1:0] tag_mem  [SETS];
    l1line_t          data_mem [SETS];
    always_ff @(posedge clk) begin
      if (fill && victim == WAY_W'(w)) begin
        tag_mem[idx]  <= tag;
        data_mem[idx] <= l2_resp_data;
      end
      rd_tag[w]  <= tag_mem[rd_idx];
      rd_line[w] <= data_mem[rd_idx];
    end
  end

  // Valid bits and pointers: cleared by the sweep, updated on refill.
  always_ff @(posedge clk) begin
    if (init_q) begin
      valid_mem[init_idx_q] <= '0;
      rr_mem[init_idx_q]    <= '0;
    end else if (fill) begin
      valid_mem[idx] <= set_valid | (WAYS'(1) << victim);
      rr_mem[idx]    <= victim + 1'b1;
    end
    set_valid <= valid_mem[rd_idx];
    set_rr    <= rr_mem[rd_idx];
  end

  // Hit detection over all ways of the set.
  logic             hit;
  logic [WAY_W-1:0] hit_way;
  always_comb begin
    hit     = 1'b0;
    hit_way = '0;
    for (int w = 0; w < WAYS; w++) begin
      if (set_valid[w] && rd_tag[w] == tag) begin
        hit     = 1'b1;
        hit_way = WAY_W'(w);
      end
    end
  end

  // Victim: first invalid way, otherwise the round-robin pointer.
  always_comb begin
    victim = set_rr;
    for (int w = WAYS - 1; w >= 0; w--) begin
      if (!set_valid[w]) victim = WAY_W'(w);
    end
  end

  l1line_t hit_line;
  assign hit_line = rd_line[hit_way];

  assign lookup_hit = (state_q == S_LOOKUP) && hit;
  assign fill       = (state_q == S_MISS_WAIT) && l2_resp_valid;

  assign req_ready    = !init_q && ((state_q == S_IDLE) || lookup_hit);
  assign resp_valid   = lookup_hit || fill;
  assign resp_data    = fill ? (half ? l2_resp_data[L1LINE_W-1:FBLK_W] : l2_resp_data[FBLK_W-1:0])
                             : (half ? hit_line[L1LINE_W-1:FBLK_W]     : hit_line[FBLK_W-1:0]);
  assign l2_req_valid = (state_q == S_MISS_REQ);
  assign l2_req_addr  = line_addr;
  assign hit_o        = lookup_hit;
  assign miss_o       = (state_q == S_LOOKUP) && !hit;

  always_comb begin
    state_d = state_q;
    unique case (state_q)
      S_IDLE:      if (req_valid && !init_q) state_d = S_LOOKUP;
      S_LOOKUP:    if (!hit)                state_d = S_MISS_REQ;
                   else if (!req_valid)     state_d = S_IDLE;
      S_MISS_REQ:  if (l2_req_ready)        state_d = S_MISS_WAIT;
      S_MISS_WAIT: if (l2_resp_valid)       state_d = S_IDLE;
      default:     state_d = S_IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q    <= S_IDLE;
      addr_q     <= '0;
      init_q     <= 1'b1;
      init_idx_q <= '0;
    end else begin
      state_q <= state_d;
      if (accept) addr_q <= req_addr;
      if (init_q) begin
        init_idx_q <= init_idx_q + 1'b1;
        if (init_idx_q == IDX_W'(SETS - 1)) init_q <= 1'b0;
      end
    end
  end

endmodule
