// tb_l0_tag_array: random lookups and refills of the L0 tag array, compared
// with a reference tag store; covers reset (all miss), hits after refill,
// conflict replacement in a direct-mapped entry, write-first on the same
// entry, and that `hit` holds while no lookup is issued.
module tb_l0_tag_array;
  import mem_hier_pkg::*;
  localparam int unsigned ENTRIES = 256 / FBLK_B;
  logic clk = 0, rst_n = 0, rd_en = 0, wr_en = 0, hit;
  faddr_t rd_addr = '0, wr_addr = '0;
  int checks = 0, failures = 0, hits_seen = 0, misses_seen = 0;

  faddr_t ref_tag [ENTRIES];
  bit     ref_v   [ENTRIES];
  bit     exp_hit;

  l0_tag_array dut (.clk, .rst_n, .rd_en, .rd_addr, .hit, .wr_en, .wr_addr);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic faddr_t rnd_addr();
    // small address space: 16 entries x 3 tags
    return faddr_t'($urandom_range(0, 3 * ENTRIES - 1));
  endfunction

  initial begin
    foreach (ref_v[i]) ref_v[i] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    exp_hit = 0;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      rd_en   = ($urandom_range(0, 3) != 0);
      wr_en   = ($urandom_range(0, 2) == 0);
      rd_addr = rnd_addr();
      wr_addr = ($urandom_range(0, 3) == 0) ? rd_addr : rnd_addr();
      @(posedge clk);
      if (wr_en) begin
        ref_tag[wr_addr % ENTRIES] = wr_addr;
        ref_v[wr_addr % ENTRIES]   = 1;
      end
      if (rd_en) exp_hit = ref_v[rd_addr % ENTRIES] && ref_tag[rd_addr % ENTRIES] == rd_addr;
      #1;
      checks++;
      if (hit !== exp_hit) begin
        failures++;
        $display("FAIL cycle %0d: addr %h hit=%0d expected %0d", i, rd_addr, hit, exp_hit);
      end
      if (rd_en && exp_hit) hits_seen++;
      if (rd_en && !exp_hit) misses_seen++;
    end
    checks++;
    if (hits_seen < 100 || misses_seen < 100) begin
      failures++;
      $display("FAIL coverage: hits=%0d misses=%0d", hits_seen, misses_seen);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
