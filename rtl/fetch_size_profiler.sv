// fetch_size_profiler: run-time choice of the L2 miss-fetch size.
//
// How many L2 lines one miss-fetch brings in (64B, 128B, 256B or 512B) is
// chosen at run time. Locality changes slowly, so the fetch size with the
// lowest miss rate over a short profiling interval is taken to be the best
// for a much longer stable interval:
//   1. each of the four fetch sizes is applied, in turn, for one profiling
//      interval, and the misses seen in that interval are recorded;
//   2. the fetch size with the fewest misses is then applied for the stable
//      interval;
//   3. after the stable interval, profiling starts again.
// Every interval is measured in L2 accesses, so equal access counts make the
// miss count a direct stand-in for the miss rate. Ties go to the smaller
// fetch size.
//
// Hardware: the current fetch size register, two interval length registers
// (profiling, stable), a profiling interval counter and a stable interval
// counter (each counts L2 accesses in its own phase), a miss counter for the
// running profiling interval, and one miss record register per fetch size.
//
// Interface: `access` pulses once per L2 access, `miss` once per L2 miss
// (in the same or a later cycle). fsize is the fetch size to apply to the
// next miss-fetch. cfg_we loads new interval lengths; they apply at once, the
// running interval ending when its count reaches the new length. Reset loads
// PROFILE_LEN and STABLE_LEN. profiling_o is high
// during profiling; miss_rec_o shows the recorded miss counts.
//
// The scheme, the list of sizes and the default lengths (1,000 and 100,000
// accesses) follow the design. Counter widths, tie-break, the order of the
// sizes and the reset state (profiling from 64B) are this design's choices.
module fetch_size_profiler
  import mem_hier_pkg::*;
#(
  parameter int unsigned CNT_W       = 32,
  parameter int unsigned PROFILE_LEN = 1000,
  parameter int unsigned STABLE_LEN  = 100000
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             access,
  input  logic             miss,
  input  logic             cfg_we,
  input  logic [CNT_W-1:0] cfg_profile_len,
  input  logic [CNT_W-1:0] cfg_stable_len,
  output fsize_e           fsize,
  output logic             profiling_o,
  output logic [CNT_W-1:0] miss_rec_o [NUM_FSIZES]
);
  logic [CNT_W-1:0] profile_len_q, stable_len_q;
  logic [CNT_W-1:0] prof_cnt_q, stable_cnt_q, miss_cnt_q;
  logic [CNT_W-1:0] miss_rec_q [NUM_FSIZES];
  fsize_e           fsize_q;
  logic             profiling_q;

  logic [CNT_W-1:0] prof_next, stable_next, miss_next;
  logic             interval_end;

  assign prof_next    = prof_cnt_q + CNT_W'(access);
  assign stable_next  = stable_cnt_q + CNT_W'(access);
  assign miss_next    = miss_cnt_q + CNT_W'(miss);
  assign interval_end = access && (profiling_q ? (prof_next >= profile_len_q)
                                               : (stable_next >= stable_len_q));

  // Fetch size with the fewest misses, the last profiled size taking its
  // final count from miss_next.
  fsize_e best;
  always_comb begin
    logic [CNT_W-1:0] best_cnt, cnt;
    best     = FS_64B;
    best_cnt = miss_rec_q[0];
    for (int i = 1; i < NUM_FSIZES; i++) begin
      cnt = (i == NUM_FSIZES - 1) ? miss_next : miss_rec_q[i];
      if (cnt < best_cnt) begin
        best_cnt = cnt;
        best     = fsize_e'(i);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      profile_len_q <= CNT_W'(PROFILE_LEN);
      stable_len_q  <= CNT_W'(STABLE_LEN);
      prof_cnt_q    <= '0;
      stable_cnt_q  <= '0;
      miss_cnt_q    <= '0;
      fsize_q       <= FS_64B;
      profiling_q   <= 1'b1;
      for (int i = 0; i < NUM_FSIZES; i++) miss_rec_q[i] <= '0;
    end else begin
      if (cfg_we) begin
        profile_len_q <= cfg_profile_len;
        stable_len_q  <= cfg_stable_len;
      end
      if (interval_end) begin
        prof_cnt_q   <= '0;
        stable_cnt_q <= '0;
        miss_cnt_q   <= '0;
        if (profiling_q) begin
          miss_rec_q[fsize_q] <= miss_next;
          if (fsize_q == FS_512B) begin
            profiling_q <= 1'b0;
            fsize_q     <= best;
          end else begin
            fsize_q <= fsize_e'(fsize_q + 2'd1);
          end
        end else begin
          profiling_q <= 1'b1;
          fsize_q     <= FS_64B;
        end
      end else if (profiling_q) begin
        prof_cnt_q <= prof_next;
        miss_cnt_q <= miss_next;
      end else begin
        stable_cnt_q <= stable_next;
      end
    end
  end

  assign fsize       = fsize_q;
  assign profiling_o = profiling_q;
  assign miss_rec_o  = miss_rec_q;

endmodule
