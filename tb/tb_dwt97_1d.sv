// tb_dwt97_1d: transforms random 8-sample lines (and a constant and an
// impulse line) with the 9/7 unit and checks every output against the
// integer reference model, and against a floating-point 9/7 transform with
// the unrounded coefficients (within a small rounding tolerance). It also
// checks the line latency of LAT cycles from start to done.
module tb_dwt97_1d;
  import dwt_pkg::*;
  import dwt_ref_pkg::*;
  localparam int N   = 8;
  localparam int NW  = $clog2(N) + 1;
  // three passes: (m+2) + (m+2) + m steps of CW + 4 cycles, plus sequencing
  localparam int LAT = (3 * (N / 2) + 4) * (CW + 4) + 7;
  logic clk = 0, rst_n = 0, in_valid = 0, start = 0;
  sample_t in_data, rdata;
  logic [NW-1:0] raddr;
  logic busy, done;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  dwt97_1d #(.N(N)) dut (.*);

  initial begin
    int x[];
    real xr[];
    int cyc;
    x = new[N]; xr = new[N];
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 40; t++) begin
      for (int i = 0; i < N; i++) begin
        case (t)
          0:       x[i] = 200;
          1:       x[i] = (i == 3) ? 255 : 0;
          default: x[i] = int'($urandom % 256);
        endcase
        xr[i] = real'(x[i]);
      end
      for (int i = 0; i < N; i++) begin
        @(negedge clk); in_valid = 1; in_data = sample_t'(x[i]);
      end
      @(negedge clk); in_valid = 0; start = 1;
      @(negedge clk); start = 0; cyc = 1;
      while (!done) begin @(negedge clk); cyc++; end
      checks++;
      if (cyc != LAT) begin failures++; $display("FAIL latency %0d expected %0d", cyc, LAT); end
      dwt97(x, N);
      dwt97_real(xr, N);
      for (int i = 0; i < N; i++) begin
        raddr = NW'(i); #1;
        checks += 2;
        if (int'(rdata) != x[i]) begin
          failures++; $display("FAIL line %0d [%0d] = %0d expected %0d", t, i, rdata, x[i]);
        end
        if ((real'(rdata) - xr[i]) > 3.0 || (xr[i] - real'(rdata)) > 3.0) begin
          failures++; $display("FAIL line %0d [%0d] = %0d, real %f", t, i, rdata, xr[i]);
        end
      end
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
