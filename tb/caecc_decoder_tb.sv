// caecc_decoder_tb: code-offset reconstruction of single 15-bit blocks.
// Runs the worked example (w' = 010100111010101 -> S = 01110110,
// Saug = 0000100, E = 000010000001000, m = 0101101), then random blocks with
// helper h = c ^ T*m and 0, 1 or 2 random bit errors, which must all be
// corrected, and 3-error patterns, which must be flagged or mapped to the
// weight <= 2 pattern with the same syndrome. Checks the 7-cycle latency from start to done.
module caecc_decoder_tb;
  import caecc_ref_pkg::*;

  logic clk = 0, rst_n = 0, start = 0, busy, done, unc;
  logic [0:6] m_in = '0, saug, m_corr, ca_q;
  logic [0:7] c_in = '0, h_in = '0, syn;
  logic [0:14] e;
  int checks = 0, failures = 0;
  int nerr_seen [4] = '{0, 0, 0, 0};

  caecc_decoder dut (.clk, .rst_n, .start, .m_in, .c_in, .h_in, .busy, .done,
                     .syn, .saug, .e, .m_corr, .uncorrectable(unc), .ca_q);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(logic [0:6] mi, logic [0:7] ci, logic [0:7] hi);
    int cyc = 1;
    m_in = mi; c_in = ci; h_in = hi; start = 1;
    @(posedge clk); #1 start = 0; m_in = 7'($urandom); c_in = 8'($urandom); h_in = 8'($urandom);
    while (!done) begin @(posedge clk); #1 cyc++; end
    checks++;
    if (cyc != 7) begin failures++; $display("FAIL latency %0d", cyc); end
  endtask

  initial begin
    logic [0:6] m;
    logic [0:7] c, h;
    logic [0:14] err;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    // worked example: h = 0 so the check part of w' is c' itself
    run(7'b0101001, 8'b11010101, 8'b0);
    checks += 5;
    if (syn !== 8'b01110110)          begin failures++; $display("FAIL ex S=%b", syn); end
    if (saug !== 7'b0000100)          begin failures++; $display("FAIL ex Saug=%b", saug); end
    if (e !== 15'b000010000001000)    begin failures++; $display("FAIL ex E=%b", e); end
    if (m_corr !== 7'b0101101)        begin failures++; $display("FAIL ex m=%b", m_corr); end
    if (ca_q !== 7'b0010111)          begin failures++; $display("FAIL ex Q=%b", ca_q); end
    for (int t = 0; t < 3000; t++) begin
      int nerr;
      nerr = t % 4;
      m = 7'($urandom); c = 8'($urandom);
      h = c ^ ref_cb(m);
      err = '0;
      while ($countones(err) < nerr) err[$urandom_range(14)] = 1'b1;
      run(m ^ err[0:6], c ^ err[7:14], h);
      checks++;
      if (nerr <= 2) begin
        if (m_corr !== m || e !== err || unc) begin
          failures++;
          $display("FAIL nerr=%0d m=%b got %b e=%b exp %b unc=%b", nerr, m, m_corr, e, err, unc);
        end else nerr_seen[nerr]++;
      end else begin
        // beyond the code: either flagged (info bits left as read) or replaced
        // by the weight <= 2 pattern with the same syndrome
        if (unc) begin
          if (m_corr !== (m ^ err[0:6])) begin failures++; $display("FAIL flagged block altered"); end
        end else if ($countones(e) > 2 ||
                     (ref_cb(e[0:6]) ^ e[7:14]) !== (ref_cb(err[0:6]) ^ err[7:14])) begin
          failures++; $display("FAIL 3-error block: e=%b err=%b", e, err);
        end
        nerr_seen[3]++;
      end
    end
    $display("corrected: 0 err %0d, 1 err %0d, 2 err %0d; 3-error blocks %0d",
             nerr_seen[0], nerr_seen[1], nerr_seen[2], nerr_seen[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
