// tb_adaptive_mem_hier: end-to-end test of the adaptive instruction memory
// hierarchy with a behavioural main memory (30-cycle latency).
//
// The L0 is the 512-byte variant; other sizes are reduced (L1 4KB, L2 16KB, profiling 40 / stable 400 L2
// accesses) so that every mechanism happens many times in a short run. A
// CPU process fetches an instruction stream made of loops (L0 hits),
// straight-line code (L0 misses, bypassed fetches) and sweeps over a large
// footprint (L1 and L2 misses); a data-side process reads lines from L2 at
// the same time. Every fetched block and data line is compared with the
// memory contents; fetches that do not miss L1 are checked for their cycle
// count (1 for an L0 hit, 2 for a predicted L0 miss, 1 when bypassed).
// Each mechanism is counted and must occur: L0 hit, L0 miss, bypass,
// bypass of a fetch that L0 held, L0 refill, L1 hit/miss, L2 hit/miss,
// memory bursts of 1, 2, 4 and 8 lines, the profiler's switch to a stable
// interval, and both L2 requesters waiting at once.
module tb_adaptive_mem_hier;
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
  int checks = 0, failures = 0, cycle = 0;

  adaptive_mem_hier #(
    .L0_BYTES(512), .L1_BYTES(4096), .L2_BYTES(16384), .PROFILE_LEN(40), .STABLE_LEN(400)
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

  // Mechanism counters
  int n_l0hit = 0, n_l0miss = 0, n_bypass = 0, n_bypass_hit = 0, n_fill = 0;
  int n_l1hit = 0, n_l1miss = 0, n_l2acc = 0, n_l2miss = 0, n_stable = 0, n_contend = 0;
  int n_burst [4] = '{0, 0, 0, 0};
  logic prof_q = 1'b1;
  always @(posedge clk) if (rst_n) begin
    n_l0hit      += int'(ev_l0_hit);
    n_l0miss     += int'(ev_l0_miss);
    n_bypass     += int'(ev_bypass);
    n_bypass_hit += int'(ev_bypass_l0hit);
    n_fill       += int'(ev_l0_fill);
    n_l1hit      += int'(ev_l1_hit);
    n_l1miss     += int'(ev_l1_miss);
    n_l2acc      += int'(ev_l2_access);
    n_l2miss     += int'(ev_l2_miss);
    if (prof_q && !profiling) n_stable++;
    prof_q <= profiling;
    if (dut.u_arb.req_valid[0] && dut.u_arb.req_valid[1]) n_contend++;
    if (mem_req_valid && mem_req_ready) begin
      case (mem_req_lines)
        4'd1: n_burst[0]++;
        4'd2: n_burst[1]++;
        4'd4: n_burst[2]++;
        4'd8: n_burst[3]++;
        default: begin failures++; $display("FAIL burst of %0d lines", mem_req_lines); end
      endcase
    end
  end

  function automatic fblk_t blk_of(faddr_t f);
    l2line_t l = u_mem.line_word(f[FADDR_W-1:2]);
    return l[f[1:0]*128 +: 128];
  endfunction

  function automatic l1line_t dline_of(l1addr_t d);
    l2line_t l = u_mem.line_word(d[L1ADDR_W-1:1]);
    return l[d[0]*256 +: 256];
  endfunction

  // CPU fetch process
  task automatic fetch(faddr_t a);
    int c0, l1m0;
    cache_sel_e used;
    bit acc;
    cpu_req_valid = 1'b1;
    cpu_req_addr  = a;
    l1m0 = n_l1miss;
    do begin
      #1;
      used = fetch_sel;
      acc  = cpu_req_ready;
      @(negedge clk);
      cycle++;
    end while (!acc);
    cpu_req_valid = 1'b0;
    c0 = cycle - 1;
    forever begin
      #1;
      if (cpu_resp_valid) break;
      @(negedge clk);
      cycle++;
    end
    checks++;
    if (cpu_resp_data !== blk_of(a)) begin
      failures++; $display("FAIL fetch data at %h", a);
    end
    if (n_l1miss == l1m0) begin
      int exp_lat;
      if (used == SEL_L1) exp_lat = 1;
      else exp_lat = ev_l0_hit ? 1 : 2;
      checks++;
      if (cycle - c0 != exp_lat) begin
        failures++;
        $display("FAIL fetch %h took %0d cycles, expected %0d (sel %0d)", a, cycle - c0, exp_lat, used);
      end
    end
  endtask

  bit cpu_done = 0;
  int n_fetch = 0;
  initial begin
    faddr_t pc;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    pc = 28'h0100;
    for (int phase = 0; phase < 3; phase++) begin
      for (int b = 0; b < 400; b++) begin
        int len, reps;
        len  = $urandom_range(2, 10);
        reps = ($urandom_range(0, 2) == 0) ? $urandom_range(2, 6) : 1;
        for (int r = 0; r < reps; r++)
          for (int i = 0; i < len; i++) begin
            fetch(pc + faddr_t'(i));
            n_fetch++;
          end
        case (phase)
          0: pc = pc + faddr_t'(len);                               // sequential sweep
          1: pc = faddr_t'($urandom_range(0, 4095)) << 2;           // scattered code
          default: pc = (b % 2 == 0) ? pc + faddr_t'(len) : 28'h0100 + faddr_t'($urandom_range(0, 255));
        endcase
      end
    end
    cpu_done = 1;
  end

  // Data-side process
  int n_dread = 0;
  initial begin
    l1addr_t a;
    bit acc;
    repeat (5) @(negedge clk);
    while (!cpu_done) begin
      repeat ($urandom_range(0, 20)) @(negedge clk);
      a = l1addr_t'($urandom_range(0, 65535)) | 27'h400000;
      d_req_valid = 1'b1;
      d_req_addr  = a;
      do begin
        #1;
        acc = d_req_ready;
        @(negedge clk);
      end while (!acc);
      d_req_valid = 1'b0;
      forever begin
        #1;
        if (d_resp_valid) break;
        @(negedge clk);
      end
      checks++;
      if (d_resp_data !== dline_of(a)) begin
        failures++; $display("FAIL data-side line %h", a);
      end
      n_dread++;
      @(negedge clk);
    end
  end

  task automatic need(int n, string what);
    checks++;
    if (n == 0) begin
      failures++; $display("FAIL mechanism never happened: %s", what);
    end
  endtask

  initial begin
    wait (cpu_done);
    repeat (200) @(negedge clk);
    need(n_l0hit, "L0 hit");
    need(n_l0miss, "predicted L0 miss");
    need(n_bypass, "L0 bypass");
    need(n_bypass_hit, "bypass of a line L0 held");
    need(n_fill, "L0 refill");
    need(n_l1hit, "L1 hit");
    need(n_l1miss, "L1 miss");
    need(n_l2acc - n_l2miss, "L2 hit");
    need(n_l2miss, "L2 miss");
    need(n_burst[0], "64B miss-fetch");
    need(n_burst[1], "128B miss-fetch");
    need(n_burst[2], "256B miss-fetch");
    need(n_burst[3], "512B miss-fetch");
    need(n_stable, "stable interval");
    need(n_contend, "L2 contention");
    need(n_dread, "data-side read");
    $display("fetches=%0d L0 hit=%0d L0 miss=%0d bypass=%0d bypass-held=%0d fills=%0d",
             n_fetch, n_l0hit, n_l0miss, n_bypass, n_bypass_hit, n_fill);
    $display("L1 hit=%0d miss=%0d  L2 access=%0d miss=%0d  bursts 64/128/256/512B=%0d/%0d/%0d/%0d",
             n_l1hit, n_l1miss, n_l2acc, n_l2miss, n_burst[0], n_burst[1], n_burst[2], n_burst[3]);
    $display("stable intervals=%0d contention cycles=%0d data reads=%0d memory lines=%0d",
             n_stable, n_contend, n_dread, lines);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
