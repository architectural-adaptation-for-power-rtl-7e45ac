// tb_l0_data_array: random reads and writes of the L0 data array compared
// with a reference store, including a read of the entry written in the
// same cycle (must return the new line) and rd_data holding when idle.
module tb_l0_data_array;
  import mem_hier_pkg::*;
  localparam int unsigned ENTRIES = 256 / FBLK_B;
  logic clk = 0, rd_en = 0, wr_en = 0;
  faddr_t rd_addr = '0, wr_addr = '0;
  fblk_t  rd_data, wr_data = '0;
  int checks = 0, failures = 0;

  fblk_t ref_mem [ENTRIES];
  bit    ref_v   [ENTRIES];
  fblk_t exp_data;
  bit    exp_known;

  l0_data_array dut (.clk, .rd_en, .rd_addr, .rd_data, .wr_en, .wr_addr, .wr_data);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (ref_v[i]) ref_v[i] = 0;
    exp_known = 0;
    exp_data  = '0;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      rd_en   = ($urandom_range(0, 3) != 0);
      wr_en   = ($urandom_range(0, 1) == 0);
      rd_addr = faddr_t'($urandom());
      wr_addr = ($urandom_range(0, 3) == 0) ? rd_addr : faddr_t'($urandom());
      wr_data = {$urandom(), $urandom(), $urandom(), $urandom()};
      @(posedge clk);
      if (rd_en) begin
        if (wr_en && wr_addr % ENTRIES == rd_addr % ENTRIES) begin
          exp_data = wr_data; exp_known = 1;
        end else begin
          exp_data = ref_mem[rd_addr % ENTRIES]; exp_known = ref_v[rd_addr % ENTRIES];
        end
      end
      if (wr_en) begin
        ref_mem[wr_addr % ENTRIES] = wr_data;
        ref_v[wr_addr % ENTRIES]   = 1;
      end
      #1;
      if (exp_known) begin
        checks++;
        if (rd_data !== exp_data) begin
          failures++;
          $display("FAIL cycle %0d: data %h expected %h", i, rd_data, exp_data);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
