// tb_l2_cache: the L2 with a behavioural main memory (30 cycles to the first
// line of a burst, then one 64-byte line per cycle). The L2 is shrunk to
// 8KB here so that evictions happen often. Checks: returned data; the
// 8-cycle hit latency; that every miss asks memory for 2**fsize lines from
// an address aligned to that many lines and containing the missed line;
// that after a miss-fetch every other line of the burst hits without a
// memory request; that miss_o pulses exactly for the requests that go to
// memory and access_o once per request.
module tb_l2_cache;
  import mem_hier_pkg::*;
  localparam int LAT = 8, MEM_LAT = 30;
  logic clk = 0, rst_n = 0;
  logic req_valid = 0, req_ready, resp_valid;
  l1addr_t req_addr = '0;
  l1line_t resp_data;
  fsize_e fsize = FS_64B;
  logic mem_req_valid, mem_req_ready, mem_resp_valid;
  l2addr_t mem_req_addr;
  logic [3:0] mem_req_lines;
  l2line_t mem_resp_data;
  logic access_o, miss_o;
  int checks = 0, failures = 0, cycle = 0;
  int n_acc = 0, n_miss = 0, n_memreq = 0;

  l2_cache #(.L2_BYTES(8192)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic l2line_t line_of(l2addr_t a);
    l2line_t l;
    for (int k = 0; k < 16; k++) l[k*32 +: 32] = {a[25:0], 6'(k)} * 32'h2545F491;
    return l;
  endfunction

  // Behavioural memory
  logic    m_busy = 0;
  int      m_cnt = 0, m_left = 0;
  l2addr_t m_addr;
  int      last_lines;
  l2addr_t last_base;
  assign mem_req_ready  = !m_busy;
  assign mem_resp_valid = m_busy && m_cnt == 0;
  assign mem_resp_data  = line_of(m_addr);
  always @(posedge clk) begin
    if (mem_req_valid && mem_req_ready) begin
      m_busy     <= 1'b1;
      m_cnt      <= MEM_LAT - 1;
      m_addr     <= mem_req_addr;
      m_left     <= int'(mem_req_lines);
      last_lines <= int'(mem_req_lines);
      last_base  <= mem_req_addr;
      n_memreq++;
    end else if (mem_resp_valid) begin
      m_addr <= m_addr + 1'b1;
      m_left <= m_left - 1;
      if (m_left == 1) m_busy <= 1'b0;
    end else if (m_busy) begin
      m_cnt <= m_cnt - 1;
    end
  end

  always @(posedge clk) if (rst_n) begin
    n_acc  += int'(access_o);
    n_miss += int'(miss_o);
  end

  bit acc;
  task automatic tick();
    #1;
    acc = req_valid && req_ready;
    @(negedge clk);
    cycle++;
  endtask

  // One request; returns whether memory was asked.
  task automatic read(l1addr_t a, fsize_e fs, output bit went_to_mem);
    int c0, mr0;
    fsize = fs;
    req_valid = 1'b1;
    req_addr  = a;
    mr0 = n_memreq;
    do tick(); while (!acc);
    req_valid = 1'b0;
    c0 = cycle - 1;
    forever begin
      #1;
      if (resp_valid) break;
      @(negedge clk);
      cycle++;
    end
    went_to_mem = (n_memreq != mr0);
    checks++;
    if (resp_data !== (a[0] ? line_of(a[26:1])[511:256] : line_of(a[26:1])[255:0])) begin
      failures++; $display("FAIL data for %h", a);
    end
    if (!went_to_mem) begin
      checks++;
      if (cycle - c0 != LAT) begin
        failures++; $display("FAIL hit latency %0d", cycle - c0);
      end
    end else begin
      l2addr_t ln = a[26:1];
      checks += 2;
      if (last_lines != (1 << int'(fs))) begin
        failures++; $display("FAIL burst of %0d lines for fsize %0d", last_lines, fs);
      end
      if ((int'(last_base) % last_lines) != 0 || ln < last_base || ln >= last_base + l2addr_t'(last_lines)) begin
        failures++; $display("FAIL burst base %h for line %h", last_base, ln);
      end
    end
    @(negedge clk);
    cycle++;
  endtask

  initial begin
    bit m;
    int misses_seen = 0, bursts_checked = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int i = 0; i < 600; i++) begin
      l1addr_t a;
      fsize_e fs;
      a  = l1addr_t'($urandom_range(0, 4095));
      fs = fsize_e'($urandom_range(0, 3));
      read(a, fs, m);
      if (m) begin
        // Every line of the burst is now present.
        l2addr_t base;
        int n;
        base = last_base;
        n    = last_lines;
        misses_seen++;
        for (int k = 0; k < n; k++) begin
          bit m2;
          read({base + l2addr_t'(k), 1'($urandom_range(0, 1))}, FS_64B, m2);
          checks++;
          if (m2) begin
            failures++; $display("FAIL line %h of burst not present", base + l2addr_t'(k));
          end
        end
        bursts_checked++;
      end
    end
    checks += 2;
    if (n_miss != n_memreq) begin
      failures++; $display("FAIL miss pulses %0d memory requests %0d", n_miss, n_memreq);
    end
    if (misses_seen < 50 || n_acc < 600) begin
      failures++; $display("FAIL coverage misses %0d accesses %0d", misses_seen, n_acc);
    end
    $display("accesses=%0d misses=%0d bursts=%0d", n_acc, n_miss, bursts_checked);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
