// tb_workload_fetch_size: two synthetic programs run on the adaptive
// hierarchy to show that the L2 fetch size follows the program.
//
// Phase A streams through straight-line code much larger than the L2 and
// never returns: every extra line a miss-fetch brings is used next, so the
// profiling round must pick the largest size (512B). As soon as the stable
// interval begins, the program switches to phase B, which revisits 300
// lines scattered at random over a wide range of addresses, a little more
// than the L2 holds (256 lines here). Lines brought in beside a missed line
// are then useless and push out lines that will be reused, so the next
// profiling round, run entirely in phase B, must pick the smallest size
// (64B). Every fetched block is compared with the memory contents.
//
// The profiling interval is the default 1,000 L2 accesses; L1 (4KB), L2
// (16KB) and the stable interval (3,000 accesses) are reduced so that the
// working set of phase B exceeds the L2 and the run stays short.
module tb_workload_fetch_size;
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

  localparam int WSET = 300;

  adaptive_mem_hier #(
    .L1_BYTES(4096), .L2_BYTES(16384), .STABLE_LEN(3000)
  ) dut (.*);

  main_memory_model #(.LATENCY(30)) u_mem (
    .clk, .rst_n, .req_valid(mem_req_valid), .req_ready(mem_req_ready),
    .req_addr(mem_req_addr), .req_lines(mem_req_lines),
    .resp_valid(mem_resp_valid), .resp_data(mem_resp_data), .bursts, .lines
  );

  always #5 clk = ~clk;

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Each start of a stable interval: record the chosen size and check it
  // against the recorded miss counts.
  int n_stable = 0;
  fsize_e chosen [2];
  logic prof_q = 1'b1;
  always @(posedge clk) if (rst_n) begin
    if (prof_q && !profiling) begin
      int best;
      best = 0;
      for (int i = 1; i < 4; i++) if (prof_miss_rec[i] < prof_miss_rec[best]) best = i;
      checks++;
      if (int'(fetch_size) != best) begin
        failures++; $display("FAIL stable size %0d, fewest misses at %0d", fetch_size, best);
      end
      $display("round %0d: misses 64B/128B/256B/512B = %0d/%0d/%0d/%0d -> %0dB",
               n_stable, prof_miss_rec[0], prof_miss_rec[1], prof_miss_rec[2],
               prof_miss_rec[3], 64 << int'(fetch_size));
      if (n_stable < 2) chosen[n_stable] = fetch_size;
      n_stable++;
    end
    prof_q <= profiling;
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

  l2addr_t wset [WSET];
  initial begin
    faddr_t pc;
    int n_a, n_b;
    for (int i = 0; i < WSET; i++)
      wset[i] = l2addr_t'(26'h0800000 + 26'($urandom_range(0, 1048575)));
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    // phase A: straight-line code
    pc = 28'h0;
    n_a = 0;
    while (n_stable == 0) begin
      fetch(pc);
      pc++;
      n_a++;
    end
    // phase B: random reuse of scattered lines
    n_b = 0;
    while (n_stable < 2) begin
      l2addr_t ln;
      ln = wset[$urandom_range(0, WSET - 1)];
      fetch({ln, 2'($urandom_range(0, 3))});
      n_b++;
    end
    $display("phase A %0d fetches, phase B %0d fetches", n_a, n_b);
    checks++;
    if (chosen[0] != FS_512B) begin
      failures++; $display("FAIL straight-line code chose %0dB, expected 512B", 64 << int'(chosen[0]));
    end
    checks++;
    if (chosen[1] != FS_64B) begin
      failures++; $display("FAIL scattered reuse chose %0dB, expected 64B", 64 << int'(chosen[1]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
