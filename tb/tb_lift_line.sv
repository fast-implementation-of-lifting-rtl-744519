// tb_lift_line: loads random lines of several lengths into the line
// processor, runs forward, inverse and scaling passes with different
// coefficients and compares the whole buffer with the reference model. It
// checks that forward followed by inverse restores the line and that each
// pass takes the documented number of cycles: (steps) * (CW + 4) + 1, with
// m + 2 steps for lifting and m steps for scaling (m = n/2).
module tb_lift_line;
  import dwt_pkg::*;
  import dwt_ref_pkg::*;
  localparam int MAXN = 16;
  localparam int NW   = $clog2(MAXN) + 1;
  logic clk = 0, rst_n = 0, shift_in = 0, start = 0;
  logic [NW-1:0] n, raddr;
  sample_t din, rdata;
  line_op_e op;
  coef_t coef1, coef2;
  logic busy, done;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  lift_line #(.MAXN(MAXN)) dut (.*);

  task automatic load(input int x[], input int len);
    n = NW'(len);
    for (int i = 0; i < len; i++) begin
      @(negedge clk); shift_in = 1; din = sample_t'(x[i]);
    end
    @(negedge clk); shift_in = 0;
  endtask

  task automatic pass(input line_op_e o, input coef_t c1, input coef_t c2, input int len);
    int cyc, steps;
    @(negedge clk); op = o; coef1 = c1; coef2 = c2; start = 1;
    @(negedge clk); start = 0; cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    steps = (o == OP_SCALE) ? len / 2 : len / 2 + 2;
    checks++;
    if (cyc != steps * (CW + 4) + 1) begin
      failures++; $display("FAIL pass cycles %0d, expected %0d", cyc, steps * (CW + 4) + 1);
    end
  endtask

  task automatic compare(input int x[], input int len, input string what);
    for (int i = 0; i < len; i++) begin
      raddr = NW'(i); #1;
      checks++;
      if (int'(rdata) != x[i]) begin
        failures++; $display("FAIL %s n=%0d [%0d] = %0d, expected %0d", what, len, i, rdata, x[i]);
      end
    end
  endtask

  initial begin
    int x[], ref_x[], orig[];
    int lens[4] = '{2, 4, 10, 16};
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 12; t++) begin
      int len;
      len = lens[t % 4];
      x = new[len]; orig = new[len];
      for (int i = 0; i < len; i++) begin
        x[i] = int'($urandom % 512) - 256;
        if (t == 3) x[i] = 255;   // flat line
        orig[i] = x[i];
      end
      ref_x = new[len](x);
      load(x, len);
      pass(OP_FWD, C_ALPHA, C_BETA, len);
      fwd(ref_x, len, K_ALPHA, K_BETA);
      compare(ref_x, len, "fwd a/b");
      pass(OP_FWD, C_GAMMA, C_DELTA, len);
      fwd(ref_x, len, K_GAMMA, K_DELTA);
      compare(ref_x, len, "fwd g/d");
      pass(OP_INV, C_GAMMA, C_DELTA, len);
      pass(OP_INV, C_ALPHA, C_BETA, len);
      compare(orig, len, "round trip");
      pass(OP_SCALE, C_ZETA, C_INV_ZETA, len);
      scale(orig, len, K_ZETA, K_IZETA);
      compare(orig, len, "scale");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
