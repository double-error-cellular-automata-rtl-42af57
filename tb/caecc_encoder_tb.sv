// caecc_encoder_tb: encodes all 128 information vectors and checks cb = T * m
// and the 4-cycle latency (1 init + 3 work) from the start edge to done; also
// checks the example m = 0101101 -> cb = 11011101 and back-to-back starts.
module caecc_encoder_tb;
  import caecc_ref_pkg::*;

  logic clk = 0, rst_n = 0, start = 0, busy, done;
  logic [0:6] m = '0, q;
  logic [0:7] cb;
  int checks = 0, failures = 0;

  caecc_encoder dut (.clk, .rst_n, .start, .m, .busy, .done, .cb, .q);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic encode(logic [0:6] mi, logic [0:7] exp);
    int cyc = 0;
    m = mi; start = 1;
    @(posedge clk); #1 start = 0; m = 7'($urandom);
    while (!done) begin @(posedge clk); #1 cyc++; end
    checks += 2;
    if (cyc != 3) begin   // done visible after 4 edges counting the start edge
      failures++; $display("FAIL latency %0d edges", cyc + 1);
    end
    if (cb !== exp) begin
      failures++; $display("FAIL m=%b cb=%b expected %b", mi, cb, exp);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    encode(7'b0101101, 8'b11011101);
    encode(7'b0101001, 8'b10100011);
    for (int i = 0; i < 128; i++) encode(7'(i), ref_cb(7'(i)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
