// tb_l2_arbiter: two requesters with random traffic share one behavioural
// L2 port that answers after a random delay. Checks that only one request
// is outstanding at a time, that every answer goes back to the requester
// that asked (address-derived data), that simultaneous requests alternate,
// and that a lone requester gets every grant.
module tb_l2_arbiter;
  import mem_hier_pkg::*;
  logic clk = 0, rst_n = 0;
  logic    req_valid [2], req_ready [2], resp_valid [2];
  l1addr_t req_addr [2];
  l1line_t resp_data [2];
  logic    l2_req_valid, l2_req_ready, l2_resp_valid;
  l1addr_t l2_req_addr;
  l1line_t l2_resp_data;
  int checks = 0, failures = 0, both_wait = 0, alternations = 0;

  l2_arbiter dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic l1line_t line_of(l1addr_t a);
    return {8{a[26:0] * 32'h01000193}};
  endfunction

  // Behavioural L2: one request at a time, answer after 1..6 cycles.
  logic    busy = 0;
  int      cnt = 0, outstanding = 0;
  l1addr_t addr;
  assign l2_req_ready  = !busy;
  assign l2_resp_valid = busy && cnt == 0;
  assign l2_resp_data  = line_of(addr);
  always @(posedge clk) begin
    if (l2_req_valid && l2_req_ready) begin
      busy <= 1'b1; cnt <= $urandom_range(0, 5); addr <= l2_req_addr;
    end else if (l2_resp_valid) busy <= 1'b0;
    else if (busy) cnt <= cnt - 1;
  end

  // Requesters: each holds one request until answered.
  bit      waiting [2];
  bit      issued  [2];
  int      last_gnt = -1, served [2];
  initial begin
    for (int i = 0; i < 2; i++) begin
      req_valid[i] = 0; req_addr[i] = '0; waiting[i] = 0; issued[i] = 0; served[i] = 0;
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int c = 0; c < 6000; c++) begin
      // new requests (requester 1 idle in the last 1000 cycles)
      for (int i = 0; i < 2; i++)
        if (!waiting[i] && (i == 0 || c < 5000) && $urandom_range(0, 2) == 0) begin
          waiting[i] = 1; issued[i] = 0; req_valid[i] = 1;
          req_addr[i] = l1addr_t'({$urandom(), 1'(i)});
        end
      #1;
      if (req_valid[0] && req_valid[1] && !busy) both_wait++;
      for (int i = 0; i < 2; i++) begin
        if (resp_valid[i]) begin
          checks++;
          if (!waiting[i] || !issued[i] || resp_data[i] !== line_of(req_addr[i])) begin
            failures++; $display("FAIL answer to %0d", i);
          end
          waiting[i] = 0;
          outstanding--;
        end
        if (req_valid[i] && req_ready[i]) begin
          checks++;
          if (req_valid[0] && req_valid[1] && last_gnt == i) begin
            failures++; $display("FAIL %0d granted twice in a row under contention", i);
          end
          if (req_valid[0] && req_valid[1]) alternations++;
          if (outstanding != 0) begin
            failures++; $display("FAIL second request while one is outstanding");
          end
          issued[i] = 1; last_gnt = i; served[i]++;
          outstanding++;
        end
      end
      @(negedge clk);
      for (int i = 0; i < 2; i++) if (issued[i]) req_valid[i] = 0;
    end
    checks++;
    if (alternations < 20 || served[0] < 100 || served[1] < 100) begin
      failures++; $display("FAIL coverage %0d %0d %0d", alternations, served[0], served[1]);
    end
    $display("grants: %0d / %0d, contended=%0d", served[0], served[1], alternations);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
