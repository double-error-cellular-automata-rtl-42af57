// kcell_ca_tb: checks the 7-cell CA against a hand-written cell-equation model:
// reset to zero, load (init), work steps from random states, hold when ce is
// low, and the three-step trajectory 0101001 -> 0001101 -> 1010111 -> 0010111
// of the decoder example.
module kcell_ca_tb;
  import caecc_ref_pkg::*;

  logic clk = 0, rst_n = 0, ce = 0, load = 0;
  logic [0:6] d = '0, q, expq;
  int checks = 0, failures = 0;

  kcell_ca dut (.clk, .rst_n, .ce, .load, .d, .q);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string what, logic [0:6] exp);
    checks++;
    if (q !== exp) begin
      failures++;
      $display("FAIL %s: q=%b expected %b", what, q, exp);
    end
  endtask

  initial begin
    @(posedge clk); #1 rst_n = 1;
    chk("reset", 7'b0);
    // decoder example trajectory
    d = 7'b0101001; ce = 1; load = 1;
    @(posedge clk); #1 chk("init", 7'b0101001);
    load = 0;
    @(posedge clk); #1 chk("work1", 7'b0001101);
    @(posedge clk); #1 chk("work2", 7'b1010111);
    @(posedge clk); #1 chk("work3", 7'b0010111);
    ce = 0;
    @(posedge clk); #1 chk("hold", 7'b0010111);
    // random
    for (int t = 0; t < 200; t++) begin
      d = 7'($urandom); ce = 1; load = 1;
      @(posedge clk); #1 chk("load", d);
      expq = d; load = 0;
      for (int s = 0; s < 1 + $urandom_range(4); s++) begin
        expq = ref_ca_step(expq);
        @(posedge clk); #1 chk("step", expq);
      end
      ce = 0;
      @(posedge clk); #1 chk("hold", expq);
    end
    rst_n = 0;
    @(posedge clk); #1 chk("reset2", 7'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
