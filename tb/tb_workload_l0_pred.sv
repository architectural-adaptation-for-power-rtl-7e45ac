// tb_workload_l0_pred: a synthetic program of tight loops and straight-line
// code run on the hierarchy at its default sizes (256B L0) to show how the
// L0/L1 prediction places fetches.
//
// Each of 24 segments runs a loop of L consecutive 16-byte blocks
// (L = 2..16, so it fits the L0) for R iterations, then falls through into
// S blocks of straight-line code that are never revisited. Under the rule
// "fetch from L0 only after an L0 hit", the expected counts per segment
// follow without a model of the hardware:
//   loop: iteration 1 misses the L0 everywhere and goes to L1 (and fills
//   the L0); the first fetch of iteration 2 is still sent to L1 but finds
//   its line in L0, so every later fetch of the loop is served by L0:
//   L0 hits = (R-1)*L - 1, bypassed fetches = L + 1, L0 misses = 0.
//   straight-line: the first block is tried in L0 (the last loop fetch hit)
//   and misses; every other block bypasses: L0 misses = 1, bypasses = S-1.
// The testbench checks these counts and all fetched data, and reports the
// miss penalties of a hierarchy that always tries the L0 first (one per
// fetch whose line is not in L0), which the predicted bypass must beat.
module tb_workload_l0_pred;
  import mem_hier_pkg::*;
  logic clk = 0, rst_n = 0;
  logic cpu_req_valid = 0, cpu_req_ready, cpu_resp_valid;
  faddr_t cpu_req_addr = '0;
  fblk_t cpu_resp_data;
  logic d_req_valid = 0, d_req_ready, d_resp_valid;
  l1addr_t d_req_addr = '0;
  l1line_t d_resp_data;
  logic mem_req_valid, mem_req_ready, mem_resp_valid;
  l2addr_t mem_req_addr;
  logic [3:0] mem_req_lines;
  l2line_t mem_resp_data;
  logic cfg_we = 0;
  logic [31:0] cfg_profile_len = '0, cfg_stable_len = '0;
  cache_sel_e fetch_sel;
  fsize_e fetch_size;
  logic profiling;
  logic [31:0] prof_miss_rec [NUM_FSIZES];
  logic ev_l0_hit, ev_l0_miss, ev_bypass, ev_bypass_l0hit, ev_l0_fill;
  logic ev_l1_hit, ev_l1_miss, ev_l2_access, ev_l2_miss;
  int bursts, lines;
  int checks = 0, failures = 0;

  adaptive_mem_hier dut (.*);

  main_memory_model #(.LATENCY(30)) u_mem (
    .clk, .rst_n, .req_valid(mem_req_valid), .req_ready(mem_req_ready),
    .req_addr(mem_req_addr), .req_lines(mem_req_lines),
    .resp_valid(mem_resp_valid), .resp_data(mem_resp_data), .bursts, .lines
  );

  always #5 clk = ~clk;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int n_l0hit = 0, n_l0miss = 0, n_bypass = 0, n_bypass_hit = 0;
  always @(posedge clk) if (rst_n) begin
    n_l0hit      += int'(ev_l0_hit);
    n_l0miss     += int'(ev_l0_miss);
    n_bypass     += int'(ev_bypass);
    n_bypass_hit += int'(ev_bypass_l0hit);
  end

  function automatic fblk_t blk_of(faddr_t f);
    l2line_t l = u_mem.line_word(f[FADDR_W-1:2]);
    return l[f[1:0]*128 +: 128];
  endfunction

  task automatic fetch(faddr_t a);
    bit acc;
    cpu_req_valid = 1'b1;
    cpu_req_addr  = a;
    do begin
      #1;
      acc = cpu_req_ready;
      @(negedge clk);
    end while (!acc);
    cpu_req_valid = 1'b0;
    forever begin
      #1;
      if (cpu_resp_valid) break;
      @(negedge clk);
    end
    checks++;
    if (cpu_resp_data !== blk_of(a)) begin
      failures++; $display("FAIL fetch data at %h", a);
    end
  endtask

  task automatic expect_eq(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++; $display("FAIL %s: %0d, expected %0d", what, got, exp);
    end
  endtask

  initial begin
    faddr_t base;
    int len, reps, slen, h0, m0, b0, bh0;
    int tot_fetch, tra_pen;
    tot_fetch = 0;
    tra_pen   = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int seg = 0; seg < 24; seg++) begin
      base = faddr_t'(seg) << 12;
      len  = $urandom_range(2, 16);
      reps = $urandom_range(3, 40);
      slen = $urandom_range(4, 120);
      // loop
      h0 = n_l0hit; m0 = n_l0miss; b0 = n_bypass; bh0 = n_bypass_hit;
      for (int r = 0; r < reps; r++)
        for (int i = 0; i < len; i++) fetch(base + faddr_t'(i));
      @(negedge clk);
      expect_eq("loop L0 hits", n_l0hit - h0, (reps - 1) * len - 1);
      expect_eq("loop L0 misses", n_l0miss - m0, 0);
      expect_eq("loop bypasses", n_bypass - b0, len + 1);
      expect_eq("loop bypasses finding L0 line", n_bypass_hit - bh0, 1);
      tra_pen += len;
      // straight-line code after the loop
      h0 = n_l0hit; m0 = n_l0miss; b0 = n_bypass;
      for (int i = 0; i < slen; i++) fetch(base + faddr_t'(len + i));
      @(negedge clk);
      expect_eq("straight L0 hits", n_l0hit - h0, 0);
      expect_eq("straight L0 misses", n_l0miss - m0, 1);
      expect_eq("straight bypasses", n_bypass - b0, slen - 1);
      tra_pen += slen;
      tot_fetch += reps * len + slen;
    end
    $display("%0d fetches: %0d served by L0, %0d sent to L1, %0d L0 miss penalties",
             tot_fetch, n_l0hit, n_bypass, n_l0miss);
    $display("always trying L0 first would pay %0d L0 miss penalties", tra_pen);
    checks++;
    if (!(n_l0miss < tra_pen)) begin
      failures++; $display("FAIL prediction pays no fewer penalties than always-L0");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
