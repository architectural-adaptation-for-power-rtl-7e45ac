// tb_fetch_size_profiler: feeds L2 access/miss events whose miss
// probability depends on the fetch size in use, with short intervals
// (20 accesses profiling, 200 stable). A reference walks the same schedule:
// 64B, 128B, 256B, 512B for one profiling interval each, then the size with
// the fewest recorded misses (ties to the smaller) for the stable interval,
// then profiling again. Checks the fetch size every cycle, the recorded
// miss counts, the phase flag, a tie, and a change of interval lengths.
module tb_fetch_size_profiler;
  import mem_hier_pkg::*;
  localparam int PL = 20, SL = 200;
  logic clk = 0, rst_n = 0, access = 0, miss = 0, cfg_we = 0;
  logic [31:0] cfg_profile_len = '0, cfg_stable_len = '0;
  fsize_e fsize;
  logic profiling_o;
  logic [31:0] miss_rec_o [NUM_FSIZES];
  int checks = 0, failures = 0;

  fetch_size_profiler #(.PROFILE_LEN(PL), .STABLE_LEN(SL)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference state
  int  r_len_p, r_len_s, r_cnt, r_miss, r_size, r_rec [4], stable_seen [4];
  bit  r_prof;
  int  pmiss [4];   // miss probability in percent, per fetch size
  int  rounds;

  function automatic int ref_best();
    int b = 0;
    for (int i = 1; i < 4; i++) if (r_rec[i] < r_rec[b]) b = i;
    return b;
  endfunction

  task automatic step(bit a, bit m);
    access = a; miss = m;
    #1;
    checks++;
    if (int'(fsize) != r_size || profiling_o != r_prof) begin
      failures++;
      $display("FAIL size %0d/%0d profiling %0d/%0d", fsize, r_size, profiling_o, r_prof);
    end
    @(posedge clk);
    // reference update
    if (a) begin
      r_cnt++;
      r_miss += int'(m);
      if (r_cnt >= (r_prof ? r_len_p : r_len_s)) begin
        if (r_prof) begin
          r_rec[r_size] = r_miss;
          if (r_size == 3) begin r_prof = 0; r_size = ref_best(); stable_seen[r_size]++; rounds++; end
          else r_size++;
        end else begin
          r_prof = 1; r_size = 0;
        end
        r_cnt = 0; r_miss = 0;
      end
    end else begin
      r_miss += int'(m);
    end
    @(negedge clk);
    for (int i = 0; i < 4; i++) begin
      checks++;
      if (miss_rec_o[i] != 32'(r_rec[i])) begin
        failures++; $display("FAIL record %0d: %0d expected %0d", i, miss_rec_o[i], r_rec[i]);
      end
    end
  endtask

  initial begin
    r_len_p = PL; r_len_s = SL; r_cnt = 0; r_miss = 0; r_size = 0; r_prof = 1; rounds = 0;
    for (int i = 0; i < 4; i++) begin r_rec[i] = 0; stable_seen[i] = 0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    // Phase A: 128B is clearly best.
    pmiss = '{60, 5, 40, 80};
    for (int i = 0; i < 2 * (4 * PL + SL); i++) begin
      bit a;
      a = ($urandom_range(0, 9) < 7);
      step(a, a && ($urandom_range(0, 99) < pmiss[r_size]));
    end
    // Phase B: locality changes, 512B is best.
    pmiss = '{90, 70, 30, 2};
    for (int i = 0; i < 2 * (4 * PL + SL); i++) begin
      bit a;
      a = ($urandom_range(0, 9) < 7);
      step(a, a && ($urandom_range(0, 99) < pmiss[r_size]));
    end
    // Phase C: no misses at all: every size ties, 64B must win.
    pmiss = '{0, 0, 0, 0};
    for (int i = 0; i < 2 * (4 * PL + SL); i++) step(1'b1, 1'b0);
    // New interval lengths take effect.
    @(negedge clk);
    cfg_we = 1; cfg_profile_len = 10; cfg_stable_len = 50;
    step(1'b0, 1'b0);
    cfg_we = 0;
    r_len_p = 10; r_len_s = 50;
    pmiss = '{50, 50, 5, 50};
    for (int i = 0; i < 4 * (4 * 10 + 50); i++) begin
      step(1'b1, ($urandom_range(0, 99) < pmiss[r_size]));
    end
    checks++;
    if (stable_seen[0] == 0 || stable_seen[1] == 0 || stable_seen[2] == 0 || stable_seen[3] == 0) begin
      failures++; $display("FAIL stable sizes seen %p", stable_seen);
    end
    $display("profiling rounds=%0d stable sizes chosen=%p", rounds, stable_seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
