// tb_ifetch_unit: instruction fetch through L0 with predicted bypass, with a
// behavioural L1 behind it (1-cycle answer, sometimes 4 cycles as for an L1
// miss). A reference L0 (16 direct-mapped 16-byte lines, refilled whenever
// a fetch misses its tag) gives, for each fetch, the expected L0 outcome,
// the expected prediction (L0 only if the previous fetch hit L0), and the
// expected latency: 1 cycle for a predicted L0 hit, 1 + L1 time for a
// predicted L0 miss, L1 time for a bypassed fetch. Data is checked too.
// The address stream mixes short loops (L0 hits) and jumps (L0 misses);
// each path must be seen.
module tb_ifetch_unit;
  import mem_hier_pkg::*;
  localparam int unsigned ENTRIES = 16;
  logic clk = 0, rst_n = 0;
  logic req_valid = 0, req_ready, resp_valid;
  faddr_t req_addr = '0;
  fblk_t resp_data;
  logic l1_req_valid, l1_req_ready, l1_resp_valid;
  faddr_t l1_req_addr;
  fblk_t l1_resp_data;
  cache_sel_e sel_o;
  logic ev_l0_hit, ev_l0_miss, ev_bypass, ev_bypass_l0hit, ev_l0_fill;
  int checks = 0, failures = 0, cycle = 0;
  int n_l0hit = 0, n_l0miss = 0, n_bypass = 0, n_bypass_hit = 0, n_fill = 0;

  ifetch_unit dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic fblk_t blk_of(faddr_t f);
    return {f ^ 28'h5a5a5a5, 4'h1, f * 28'h3779b1, 4'h2, ~f, 4'h3, f + 28'h1234567, 4'h4};
  endfunction

  // Behavioural L1: answers `lat` cycles after acceptance.
  logic   l1_pend = 0;
  int     l1_cnt = 0, l1_last_lat = 1, l1_accepts = 0;
  faddr_t l1_addr;
  assign l1_resp_valid = l1_pend && l1_cnt == 0;
  assign l1_resp_data  = blk_of(l1_addr);
  assign l1_req_ready  = !l1_pend || l1_resp_valid;
  always @(posedge clk) begin
    if (l1_req_valid && l1_req_ready) begin
      int lat;
      lat = ($urandom_range(0, 4) == 0) ? 4 : 1;
      l1_pend     <= 1'b1;
      l1_cnt      <= lat - 1;
      l1_addr     <= l1_req_addr;
      l1_last_lat <= lat;
      l1_accepts  <= l1_accepts + 1;
    end else if (l1_resp_valid) begin
      l1_pend <= 1'b0;
    end else if (l1_pend) begin
      l1_cnt <= l1_cnt - 1;
    end
  end

  always @(posedge clk) if (rst_n) begin
    n_l0hit      += int'(ev_l0_hit);
    n_l0miss     += int'(ev_l0_miss);
    n_bypass     += int'(ev_bypass);
    n_bypass_hit += int'(ev_bypass_l0hit);
    n_fill       += int'(ev_l0_fill);
  end

  // Reference L0 and predictor.
  faddr_t     ref_tag [ENTRIES];
  bit         ref_v   [ENTRIES];
  cache_sel_e ref_pred;
  bit         acc;

  task automatic tick();
    #1;
    acc = req_valid && req_ready;
    @(negedge clk);
    cycle++;
  endtask

  task automatic fetch(faddr_t a);
    bit l0hit;
    cache_sel_e used;
    int c0, exp_lat;
    l0hit = ref_v[a % ENTRIES] && ref_tag[a % ENTRIES] == a;
    req_valid = 1'b1;
    req_addr  = a;
    #1;
    used = sel_o;
    checks++;
    if (used != ref_pred) begin
      failures++; $display("FAIL prediction for %h: %0d expected %0d", a, used, ref_pred);
    end
    do tick(); while (!acc);
    req_valid = 1'b0;
    c0 = cycle - 1;
    while (!resp_valid) begin
      #1;
      if (resp_valid) break;
      @(negedge clk);
      cycle++;
    end
    #1;
    if (used == SEL_L0) exp_lat = l0hit ? 1 : 1 + l1_last_lat;
    else                exp_lat = l1_last_lat;
    checks += 2;
    if (resp_data !== blk_of(a)) begin
      failures++; $display("FAIL data for %h", a);
    end
    if (cycle - c0 != exp_lat) begin
      failures++; $display("FAIL latency for %h: %0d expected %0d (sel %0d, l0hit %0d)",
                           a, cycle - c0, exp_lat, used, l0hit);
    end
    if (!l0hit) begin
      ref_tag[a % ENTRIES] = a;
      ref_v[a % ENTRIES]   = 1;
    end
    ref_pred = l0hit ? SEL_L0 : SEL_L1;
    // Back-to-back: the next fetch is presented in the response cycle.
  endtask

  initial begin
    faddr_t base;
    int len;
    foreach (ref_v[i]) ref_v[i] = 0;
    ref_pred = SEL_L1;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    base = 28'h100;
    len  = 4;
    for (int r = 0; r < 600; r++) begin
      int reps;
      case ($urandom_range(0, 3))
        0: begin base = faddr_t'($urandom_range(0, 4095)); len = $urandom_range(2, 12); end
        1: len = $urandom_range(2, 12);
        default: ;
      endcase
      reps = $urandom_range(1, 4);
      for (int k = 0; k < reps; k++)
        for (int i = 0; i < len; i++) fetch(base + faddr_t'(i));
    end
    checks++;
    if (n_l0hit == 0 || n_l0miss == 0 || n_bypass == 0 || n_bypass_hit == 0 || n_fill == 0) begin
      failures++;
    end
    $display("L0 hits=%0d L0 misses=%0d bypassed=%0d bypassed-but-in-L0=%0d L0 fills=%0d",
             n_l0hit, n_l0miss, n_bypass, n_bypass_hit, n_fill);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
