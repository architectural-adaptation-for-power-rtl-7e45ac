// adaptive_mem_hier: instruction memory hierarchy with two run-time
// adaptations, one for power and one for performance.
//
//   CPU fetch --> ifetch_unit (L0 tag + L0 data + L0/L1 selector + bypass mux)
//                    |
//                 l1_icache (32KB, 4-way, 32B lines, 1 cycle)
//                    |
//   data side --> l2_arbiter --> l2_cache (512KB, 4-way, 64B lines, 8 cycles)
//                                  |          ^ fetch size
//                                  |   fetch_size_profiler
//                               memory port (bursts of 1..8 lines)
//
// Power: a 256-byte direct-mapped L0 sits in front of L1. Each fetch is
// predicted to hit L0 (if the previous fetch did) or sent straight to L1
// (if the previous fetch missed L0), so runs of L0 misses do not each pay
// the extra L0 cycle, while runs of L0 hits keep L1 idle.
// Performance: the number of lines the L2 brings in per miss is profiled at
// run time (64B..512B) and the size with the fewest misses is used for a
// long stable interval.
//
// Interface: cpu_* fetch port (16-byte fetch block address, 128-bit data;
// valid/ready request, response pulse); d_* port for an L1 data cache to
// read 32-byte lines from L2; mem_* burst port to main memory; cfg_* to
// load the profiling and stable interval lengths; status (prediction, fetch
// size, profiler phase and recorded miss counts) and event outputs
// for counting accesses per level (e.g. to estimate cache energy).
//
// The structure, sizes and latencies follow the design; the processor, the
// L1 data cache and main memory are outside this module. The L2 here
// serves read requests only: write-back from a data cache is not modelled.
module adaptive_mem_hier
  import mem_hier_pkg::*;
#(
  parameter int unsigned L0_BYTES    = 256,
  parameter int unsigned L1_BYTES    = 32768,
  parameter int unsigned L1_WAYS     = 4,
  parameter int unsigned L2_BYTES    = 524288,
  parameter int unsigned L2_WAYS     = 4,
  parameter int unsigned L2_LATENCY  = 8,
  parameter int unsigned CNT_W       = 32,
  parameter int unsigned PROFILE_LEN = 1000,
  parameter int unsigned STABLE_LEN  = 100000
) (
  input  logic             clk,
  input  logic             rst_n,
  // CPU instruction fetch
  input  logic             cpu_req_valid,
  output logic             cpu_req_ready,
  input  faddr_t           cpu_req_addr,
  output logic             cpu_resp_valid,
  output fblk_t            cpu_resp_data,
  // data side (L1 data cache line reads)
  input  logic             d_req_valid,
  output logic             d_req_ready,
  input  l1addr_t          d_req_addr,
  output logic             d_resp_valid,
  output l1line_t          d_resp_data,
  // main memory
  output logic             mem_req_valid,
  input  logic             mem_req_ready,
  output l2addr_t          mem_req_addr,
  output logic [3:0]       mem_req_lines,
  input  logic             mem_resp_valid,
  input  l2line_t          mem_resp_data,
  // interval length registers
  input  logic             cfg_we,
  input  logic [CNT_W-1:0] cfg_profile_len,
  input  logic [CNT_W-1:0] cfg_stable_len,
  // status and events
  output cache_sel_e       fetch_sel,
  output fsize_e           fetch_size,
  output logic             profiling,
  output logic [CNT_W-1:0] prof_miss_rec [NUM_FSIZES],
  output logic             ev_l0_hit,
  output logic             ev_l0_miss,
  output logic             ev_bypass,
  output logic             ev_bypass_l0hit,
  output logic             ev_l0_fill,
  output logic             ev_l1_hit,
  output logic             ev_l1_miss,
  output logic             ev_l2_access,
  output logic             ev_l2_miss
);
  // fetch unit <-> L1
  logic    l1_req_valid, l1_req_ready, l1_resp_valid;
  faddr_t  l1_req_addr;
  fblk_t   l1_resp_data;
  // L1 <-> arbiter
  logic    il2_req_valid, il2_req_ready, il2_resp_valid;
  l1addr_t il2_req_addr;
  l1line_t il2_resp_data;
  // arbiter <-> L2
  logic    l2_req_valid, l2_req_ready, l2_resp_valid;
  l1addr_t l2_req_addr;
  l1line_t l2_resp_data;
  logic    arb_req_valid [2], arb_req_ready [2], arb_resp_valid [2];
  l1addr_t arb_req_addr  [2];
  l1line_t arb_resp_data [2];

  ifetch_unit #(.L0_BYTES(L0_BYTES)) u_ifetch (
    .clk             (clk),
    .rst_n           (rst_n),
    .req_valid       (cpu_req_valid),
    .req_ready       (cpu_req_ready),
    .req_addr        (cpu_req_addr),
    .resp_valid      (cpu_resp_valid),
    .resp_data       (cpu_resp_data),
    .l1_req_valid    (l1_req_valid),
    .l1_req_ready    (l1_req_ready),
    .l1_req_addr     (l1_req_addr),
    .l1_resp_valid   (l1_resp_valid),
    .l1_resp_data    (l1_resp_data),
    .sel_o           (fetch_sel),
    .ev_l0_hit       (ev_l0_hit),
    .ev_l0_miss      (ev_l0_miss),
    .ev_bypass       (ev_bypass),
    .ev_bypass_l0hit (ev_bypass_l0hit),
    .ev_l0_fill      (ev_l0_fill)
  );

  l1_icache #(.L1_BYTES(L1_BYTES), .WAYS(L1_WAYS)) u_l1i (
    .clk           (clk),
    .rst_n         (rst_n),
    .req_valid     (l1_req_valid),
    .req_ready     (l1_req_ready),
    .req_addr      (l1_req_addr),
    .resp_valid    (l1_resp_valid),
    .resp_data     (l1_resp_data),
    .l2_req_valid  (il2_req_valid),
    .l2_req_ready  (il2_req_ready),
    .l2_req_addr   (il2_req_addr),
    .l2_resp_valid (il2_resp_valid),
    .l2_resp_data  (il2_resp_data),
    .hit_o         (ev_l1_hit),
    .miss_o        (ev_l1_miss)
  );

  assign arb_req_valid[0] = il2_req_valid;
  assign arb_req_addr[0]  = il2_req_addr;
  assign il2_req_ready    = arb_req_ready[0];
  assign il2_resp_valid   = arb_resp_valid[0];
  assign il2_resp_data    = arb_resp_data[0];
  assign arb_req_valid[1] = d_req_valid;
  assign arb_req_addr[1]  = d_req_addr;
  assign d_req_ready      = arb_req_ready[1];
  assign d_resp_valid     = arb_resp_valid[1];
  assign d_resp_data      = arb_resp_data[1];

  l2_arbiter u_arb (
    .clk           (clk),
    .rst_n         (rst_n),
    .req_valid     (arb_req_valid),
    .req_ready     (arb_req_ready),
    .req_addr      (arb_req_addr),
    .resp_valid    (arb_resp_valid),
    .resp_data     (arb_resp_data),
    .l2_req_valid  (l2_req_valid),
    .l2_req_ready  (l2_req_ready),
    .l2_req_addr   (l2_req_addr),
    .l2_resp_valid (l2_resp_valid),
    .l2_resp_data  (l2_resp_data)
  );

  l2_cache #(.L2_BYTES(L2_BYTES), .WAYS(L2_WAYS), .LATENCY(L2_LATENCY)) u_l2 (
    .clk            (clk),
    .rst_n          (rst_n),
    .req_valid      (l2_req_valid),
    .req_ready      (l2_req_ready),
    .req_addr       (l2_req_addr),
    .resp_valid     (l2_resp_valid),
    .resp_data      (l2_resp_data),
    .fsize          (fetch_size),
    .mem_req_valid  (mem_req_valid),
    .mem_req_ready  (mem_req_ready),
    .mem_req_addr   (mem_req_addr),
    .mem_req_lines  (mem_req_lines),
    .mem_resp_valid (mem_resp_valid),
    .mem_resp_data  (mem_resp_data),
    .access_o       (ev_l2_access),
    .miss_o         (ev_l2_miss)
  );

  fetch_size_profiler #(
    .CNT_W       (CNT_W),
    .PROFILE_LEN (PROFILE_LEN),
    .STABLE_LEN  (STABLE_LEN)
  ) u_prof (
    .clk             (clk),
    .rst_n           (rst_n),
    .access          (ev_l2_access),
    .miss            (ev_l2_miss),
    .cfg_we          (cfg_we),
    .cfg_profile_len (cfg_profile_len),
    .cfg_stable_len  (cfg_stable_len),
    .fsize           (fetch_size),
    .profiling_o     (profiling),
    .miss_rec_o      (prof_miss_rec)
  );

endmodule
