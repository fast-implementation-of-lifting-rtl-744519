// tb_lift_step: drives the lifting processing element with random samples
// and all lifting coefficients, forward and inverse, and compares with the
// reference rounded product; checks the CW + 2 cycle latency and that an
// inverse step undoes a forward step.
module tb_lift_step;
  import dwt_pkg::*;
  import dwt_ref_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, sub = 0;
  sample_t a, b, c, y;
  coef_t coef;
  logic busy, done;
  int checks = 0, failures = 0;

  coef_t cs [6];
  int    ks [6];

  always #5 clk = ~clk;

  lift_step dut (.*);

  task automatic run(input sample_t ta, tb_, tc, input int ci, input logic s,
                     output sample_t ty);
    int cyc = 0;
    @(negedge clk);
    a = ta; b = tb_; c = tc; coef = cs[ci]; sub = s; start = 1;
    @(negedge clk);
    start = 0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    ty = y;
    checks++;
    if (cyc != CW + 2) begin failures++; $display("FAIL latency %0d", cyc); end
  endtask

  initial begin
    sample_t r1, r2, aa, bb, cc;
    int exp1;
    cs = '{C_ALPHA, C_BETA, C_GAMMA, C_DELTA, C_ZETA, C_INV_ZETA};
    ks = '{K_ALPHA, K_BETA, K_GAMMA, K_DELTA, K_ZETA, K_IZETA};
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 300; i++) begin
      int ci;
      ci = i % 6;
      if (i < 12) begin
        aa = (i % 2) ? 16'sh7fff : -16'sh8000; bb = aa; cc = sample_t'(i);
      end else begin
        aa = sample_t'($urandom % 4096) - 16'sd2048;
        bb = sample_t'($urandom % 4096) - 16'sd2048;
        cc = sample_t'($urandom);
      end
      run(aa, bb, cc, ci, 1'b0, r1);
      exp1 = wrap16(cc + rmul(ks[ci], longint'(aa) + bb));
      checks++;
      if (int'(r1) != exp1) begin
        failures++; $display("FAIL fwd a=%0d b=%0d c=%0d k=%0d: %0d exp %0d", aa, bb, cc, ks[ci], r1, exp1);
      end
      run(aa, bb, r1, ci, 1'b1, r2);
      checks++;
      if (r2 != cc) begin failures++; $display("FAIL inverse %0d exp %0d", r2, cc); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
