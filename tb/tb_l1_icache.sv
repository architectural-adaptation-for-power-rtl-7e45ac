// tb_l1_icache: drives fetch-block reads into the L1 I-cache with a
// behavioural L2 behind it (random refill latency, line contents a known
// function of the address). Checks every returned block, the 1-cycle hit
// latency, that hits stream one per cycle, that a line is requested from L2
// only on a miss, and the full 32KB / 4-way capacity: 1024 distinct lines
// (four per set) are loaded and then all re-read without a single miss.
module tb_l1_icache;
  import mem_hier_pkg::*;
  logic clk = 0, rst_n = 0;
  logic req_valid = 0, req_ready, resp_valid;
  faddr_t req_addr = '0;
  fblk_t resp_data;
  logic l2_req_valid, l2_req_ready, l2_resp_valid;
  l1addr_t l2_req_addr;
  l1line_t l2_resp_data;
  logic hit_o, miss_o;
  int checks = 0, failures = 0, cycle = 0;
  int l2_reqs = 0, hits = 0, misses = 0;

  l1_icache dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic l1line_t line_of(l1addr_t a);
    l1line_t l;
    for (int k = 0; k < 8; k++) l[k*32 +: 32] = {a[26:0], 5'(k)} * 32'h9E3779B1;
    return l;
  endfunction

  function automatic fblk_t blk_of(faddr_t f);
    l1line_t l = line_of(f[FADDR_W-1:1]);
    return f[0] ? l[255:128] : l[127:0];
  endfunction

  // Behavioural L2: accepts when idle, answers after 3..12 cycles.
  l1addr_t pend_addr;
  int      pend_cnt = -1;
  assign l2_req_ready = (pend_cnt < 0);
  always @(posedge clk) begin
    l2_resp_valid <= 1'b0;
    if (l2_req_valid && l2_req_ready) begin
      pend_addr <= l2_req_addr;
      pend_cnt  <= $urandom_range(2, 11);
      l2_reqs++;
    end else if (pend_cnt == 0) begin
      l2_resp_valid <= 1'b1;
      l2_resp_data  <= line_of(pend_addr);
      pend_cnt      <= -1;
    end else if (pend_cnt > 0) begin
      pend_cnt <= pend_cnt - 1;
    end
  end
  always @(posedge clk) begin
    if (rst_n && hit_o) hits++;
    if (rst_n && miss_o) misses++;
  end

  // Driver and checker run at the falling edge: inputs are set, then after
  // a short settle the outputs of this cycle are checked and the handshake
  // that the next rising edge completes is recorded.
  faddr_t exp_q[$];
  int     acc_cycle_q[$];
  int     l2_at_acc_q[$];
  bit     acc;

  task automatic tick();
    #1;
    if (resp_valid) begin
      faddr_t a;
      int c, l2;
      checks++;
      if (exp_q.size() == 0) begin
        failures++; $display("FAIL unexpected response");
      end else begin
        a  = exp_q.pop_front();
        c  = acc_cycle_q.pop_front();
        l2 = l2_at_acc_q.pop_front();
        if (resp_data !== blk_of(a)) begin
          failures++; $display("FAIL data for %h", a);
        end
        if (l2 == l2_reqs) begin
          checks++;
          if (cycle - c != 1) begin
            failures++; $display("FAIL hit latency %0d for %h", cycle - c, a);
          end
        end
      end
    end
    acc = req_valid && req_ready;
    if (acc) begin
      exp_q.push_back(req_addr);
      acc_cycle_q.push_back(cycle);
      l2_at_acc_q.push_back(l2_reqs + int'(l2_req_valid && l2_req_ready));
    end
    @(negedge clk);
    cycle++;
  endtask

  task automatic fetch(faddr_t a);
    req_valid = 1'b1;
    req_addr  = a;
    do tick(); while (!acc);
    req_valid = 1'b0;
  endtask

  task automatic drain();
    while (exp_q.size() != 0) tick();
  endtask

  int m0, r0;
  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    // Capacity: 256 sets x 4 tags, both halves of each line.
    for (int t = 0; t < 4; t++)
      for (int s = 0; s < 256; s++) begin
        fetch({19'(t * 7 + 1), 8'(s), 1'b0});
      end
    drain();
    checks++;
    if (l2_reqs != 1024) begin
      failures++; $display("FAIL loads %0d expected 1024", l2_reqs);
    end
    m0 = misses; r0 = l2_reqs;
    // Re-read everything (other half too) back to back: all hits.
    for (int s = 0; s < 256; s++)
      for (int t = 0; t < 4; t++) begin
        fetch({19'(t * 7 + 1), 8'(s), 1'b1});
      end
    drain();
    checks++;
    if (misses != m0 || l2_reqs != r0) begin
      failures++; $display("FAIL capacity: %0d misses on re-read", misses - m0);
    end
    // Streaming: 64 hits back to back must take 64 cycles plus one.
    begin
      int c0;
      c0 = cycle;
      for (int i = 0; i < 64; i++) fetch({19'(1), 8'(i), 1'(i)});
      drain();
      checks++;
      if (cycle - c0 > 66) begin
        failures++; $display("FAIL streaming took %0d cycles", cycle - c0);
      end
    end
    // A fifth tag in a set evicts one line (round robin), then random mix.
    for (int i = 0; i < 3000; i++) begin
      fetch(faddr_t'($urandom_range(0, 8191)));
      if ($urandom_range(0, 3) == 0) tick();
    end
    drain();
    checks++;
    if (hits == 0 || misses == 0) begin
      failures++; $display("FAIL hits %0d misses %0d", hits, misses);
    end
    $display("L1 hits=%0d misses=%0d l2_reqs=%0d", hits, misses, l2_reqs);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
