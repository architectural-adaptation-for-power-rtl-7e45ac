// tb_l0l1_selector: checks the L0/L1 prediction rule against a reference:
// L1 after reset, next = L0 after a reported L0 hit, L1 after a miss, and the
// same-cycle forwarding of a reported outcome.
module tb_l0l1_selector;
  import mem_hier_pkg::*;
  logic clk = 0, rst_n = 0, upd = 0, l0_hit = 0;
  cache_sel_e sel;
  int checks = 0, failures = 0;
  cache_sel_e model;

  l0l1_selector dut (.clk, .rst_n, .upd, .l0_hit, .sel);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(cache_sel_e exp, string what);
    checks++;
    if (sel !== exp) begin
      failures++;
      $display("FAIL %s: sel=%0d expected %0d", what, sel, exp);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 check(SEL_L1, "reset");
    rst_n = 1;
    model = SEL_L1;
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      upd    = ($urandom_range(0, 2) != 0);
      l0_hit = $urandom_range(0, 1)[0];
      #1;
      if (upd) check(l0_hit ? SEL_L0 : SEL_L1, "forward");
      else     check(model, "hold");
      @(posedge clk);
      if (upd) model = l0_hit ? SEL_L0 : SEL_L1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
