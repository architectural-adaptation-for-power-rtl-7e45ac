// l2_cache: unified L2 (512KB, 4-way, 64B lines, 8-cycle latency) whose
// miss-fetch size is set at run time.
//
// In most caches one miss-fetch fills one line. Here the fetch size is a
// separate parameter that can be a multiple of the line: a miss brings in
// 1, 2, 4 or 8 consecutive 64-byte lines (64B to 512B) in one memory burst,
// chosen per miss by the fetch size input (driven by fetch_size_profiler).
// Long fetches help code and data with good spatial locality; short ones
// keep more distinct lines for good temporal locality. The line size itself
// never changes, so no flush is needed when the fetch size does.
//
// Operation: a request (32-byte L1 line address) is looked up for LATENCY
// cycles; on a hit the requested half line is returned LATENCY cycles after
// acceptance. On a miss the block of N lines containing the missed line,
// aligned to N*64 bytes, is requested from memory; each returned line is
// written into its own set unless that set already holds it (a way that is
// invalid first, else a per-set round-robin pointer). After the last beat
// the requested half line is returned. One request is handled at a time.
// After reset the cache clears its valid bits one set per cycle (2048
// cycles at the default size) before accepting requests; valid bits and
// replacement pointers live in per-set memories, not resettable flops.
// Every array is a RAM with a registered read port; the set a lookup or a
// burst beat needs is read one edge ahead. Consecutive beats of a burst go
// to different sets, so a beat's write never meets the next beat's read.
//
// Interface: req_*/resp_* towards the L1 side; mem_req_valid/ready with the
// first line address and the line count, then mem_resp_valid beats, one
// 64-byte line each, in address order. access_o and miss_o pulse together
// at the end of each lookup, for the profiler.
//
// Geometry, latency and the fetch sizes follow the design. Alignment of the
// burst, skipping lines already present, the replacement policy, answering
// after the whole burst, and read-only operation (the L1 sides only read)
// are this design's own choices.
module l2_cache
  import mem_hier_pkg::*;
#(
  parameter int unsigned L2_BYTES = 524288,
  parameter int unsigned WAYS     = 4,
  parameter int unsigned LATENCY  = 8
) (
  input  logic        clk,
  input  logic        rst_n,
  // L1 side
  input  logic        req_valid,
  output logic        req_ready,
  input  l1addr_t     req_addr,
  output logic        resp_valid,
  output l1line_t     resp_data,
  // fetch size for the next miss-fetch
  input  fsize_e      fsize,
  // memory side
  output logic        mem_req_valid,
  input  logic        mem_req_ready,
  output l2addr_t     mem_req_addr,
  output logic [3:0]  mem_req_lines,
  input  logic        mem_resp_valid,
  input  l2line_t     mem_resp_data,
  // events
  output logic        access_o,
  output logic        miss_o
);
  localparam int unsigned SETS  = L2_BYTES / (L2LINE_B * WAYS);
  localparam int unsigned IDX_W = $clog2(SETS);
  localparam int unsigned TAG_W = L2ADDR_W - IDX_W;
  localparam int unsigned WAY_W = (WAYS > 1) ? $clog2(WAYS) : 1;
  localparam int unsigned LAT_W = $clog2(LATENCY + 1);

  typedef enum logic [2:0] {S_IDLE, S_LOOKUP, S_MEM_REQ, S_MEM_FILL, S_RESP} state_e;
  state_e state_q, state_d;

  logic [WAYS-1:0]  valid_mem [SETS];   // one bit per way
  logic [WAY_W-1:0] rr_mem    [SETS];   // round-robin victim pointer

  // After reset the valid bits and pointers are cleared one set per cycle.
  logic             init_q;
  logic [IDX_W-1:0] init_idx_q;

  l1addr_t          addr_q;
  l2addr_t          req_line;
  logic [LAT_W-1:0] lat_q;
  l2addr_t          fill_line_q;   // line of the next memory beat
  logic [3:0]       beats_left_q;
  logic [3:0]       nlines_q;
  l2addr_t          base_q;
  l2line_t          line_q;        // line returned to the requester

  assign req_line = addr_q[L1ADDR_W-1:1];

  // Tag match in the set of `line` (used for lookup and for fill).
  l2addr_t          probe_line;
  logic [IDX_W-1:0] probe_idx;
  logic [TAG_W-1:0] probe_tag;
  logic             probe_hit;
  logic [WAY_W-1:0] probe_way, victim;

  assign probe_line = (state_q == S_MEM_FILL) ? fill_line_q : req_line;
  assign probe_idx  = probe_line[IDX_W-1:0];
  assign probe_tag  = probe_line[L2ADDR_W-1:IDX_W];

  // All arrays are read synchronously. The read address is the line the
  // probe will look at in the next cycle: a newly accepted request, the
  // first line of a burst, or the next line of a burst being filled.
  logic             accept, lookup_done, fill_beat, fill_write;
  l2addr_t          fill_line_d, probe_line_d;
  logic [IDX_W-1:0] rd_idx;
  l2addr_t          aligned_base;
  logic [3:0]       nlines;

  assign accept       = req_valid && req_ready;
  assign aligned_base = req_line & ~(L2ADDR_W'(nlines) - 1'b1);

  always_comb begin
    fill_line_d = fill_line_q;
    if (lookup_done && !probe_hit) fill_line_d = aligned_base;
    else if (fill_beat)            fill_line_d = fill_line_q + 1'b1;
    if (state_d == S_MEM_FILL)     probe_line_d = fill_line_d;
    else if (accept)               probe_line_d = req_addr[L1ADDR_W-1:1];
    else                           probe_line_d = req_line;
  end
  assign rd_idx = probe_line_d[IDX_W-1:0];

  logic [TAG_W-1:0] rd_tag  [WAYS];
  l2line_t          rd_line [WAYS];
  logic [WAYS-1:0]  set_valid;
  logic [WAY_W-1:0] set_rr;

  for (genvar w = 0; w < WAYS; w++) begin : g_way
    logic [TAG_W-1:0] tag_mem  [SETS];
    l2line_t          data_mem [SETS];
    always_ff @(posedge clk) begin
      if (fill_write && victim == WAY_W'(w)) begin
        tag_mem[probe_idx]  <= probe_tag;
        data_mem[probe_idx] <= mem_resp_data;
      end
      rd_tag[w]  <= tag_mem[rd_idx];
      rd_line[w] <= data_mem[rd_idx];
    end
  end

  always_comb begin
    probe_hit = 1'b0;
    probe_way = '0;
    for (int w = 0; w < WAYS; w++) begin
      if (set_valid[w] && rd_tag[w] == probe_tag) begin
        probe_hit = 1'b1;
        probe_way = WAY_W'(w);
      end
    end
    victim = set_rr;
    for (int w = WAYS - 1; w >= 0; w--) begin
      if (!set_valid[w]) victim = WAY_W'(w);
    end
  end

  assign lookup_done = (state_q == S_LOOKUP) && (lat_q == LAT_W'(1));
  assign fill_beat   = (state_q == S_MEM_FILL) && mem_resp_valid;
  assign fill_write  = fill_beat && !probe_hit;

  // Number of lines per miss-fetch: 2**fsize.
  assign nlines = 4'(1) << fsize;

  assign req_ready     = (state_q == S_IDLE) && !init_q;
  assign mem_req_valid = (state_q == S_MEM_REQ);
  assign mem_req_addr  = base_q;
  assign mem_req_lines = nlines_q;
  assign access_o      = lookup_done;
  assign miss_o        = lookup_done && !probe_hit;

  l2line_t out_line;
  assign out_line   = (state_q == S_LOOKUP) ? rd_line[probe_way] : line_q;
  assign resp_valid = (lookup_done && probe_hit) || (state_q == S_RESP);
  assign resp_data  = addr_q[0] ? out_line[L2LINE_W-1:L1LINE_W] : out_line[L1LINE_W-1:0];

  always_comb begin
    state_d = state_q;
    unique case (state_q)
      S_IDLE:     if (req_valid && !init_q) state_d = S_LOOKUP;
      S_LOOKUP:   if (lookup_done) state_d = probe_hit ? S_IDLE : S_MEM_REQ;
      S_MEM_REQ:  if (mem_req_ready) state_d = S_MEM_FILL;
      S_MEM_FILL: if (fill_beat && beats_left_q == 4'd1) state_d = S_RESP;
      S_RESP:     state_d = S_IDLE;
      default:    state_d = S_IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q      <= S_IDLE;
      addr_q       <= '0;
      lat_q        <= '0;
      fill_line_q  <= '0;
      beats_left_q <= '0;
      nlines_q     <= 4'd1;
      base_q       <= '0;
      init_q       <= 1'b1;
      init_idx_q   <= '0;
    end else begin
      state_q <= state_d;
      if (init_q) begin
        init_idx_q <= init_idx_q + 1'b1;
        if (init_idx_q == IDX_W'(SETS - 1)) init_q <= 1'b0;
      end
      if (accept) begin
        addr_q <= req_addr;
        lat_q  <= LAT_W'(LATENCY);
      end
      if (state_q == S_LOOKUP) lat_q <= lat_q - 1'b1;
      if (lookup_done && !probe_hit) begin
        nlines_q     <= nlines;
        beats_left_q <= nlines;
        base_q       <= aligned_base;
      end
      if (fill_beat) beats_left_q <= beats_left_q - 1'b1;
      fill_line_q <= fill_line_d;
    end
  end

  // Valid bits and pointers: cleared by the sweep, updated on refill.
  always_ff @(posedge clk) begin
    if (init_q) begin
      valid_mem[init_idx_q] <= '0;
      rr_mem[init_idx_q]    <= '0;
    end else if (fill_write) begin
      valid_mem[probe_idx] <= set_valid | (WAYS'(1) << victim);
      rr_mem[probe_idx]    <= victim + 1'b1;
    end
    set_valid <= valid_mem[rd_idx];
    set_rr    <= rr_mem[rd_idx];
  end

  always_ff @(posedge clk) begin
    if (fill_beat && fill_line_q == req_line) line_q <= mem_resp_data;
  end

endmodule
