// tb_dwt3d: loads random 8 x 8 x 8 video blocks (and a constant block),
// runs the one-level 3-D DWT and compares all 512 outputs with a reference
// that applies the integer 9/7 line transform along x, then y, then z and
// stores low halves before high halves on each axis. For the constant block
// every high band must be (close to) zero. The run time is checked against
//   3 axes * N*N lines * (2N + 1 + LAT1D) + 4,
// LAT1D being the latency of one 1-D line transform.
module tb_dwt3d;
  import dwt_pkg::*;
  import dwt_ref_pkg::*;
  localparam int N  = 8;
  localparam int LN = $clog2(N);
  localparam int AW = 3 * LN;
  localparam int LAT1D = (3 * (N / 2) + 4) * (CW + 4) + 7;
  localparam int CYC = 3 * N * N * (2 * N + 1 + LAT1D) + 4;
  logic clk = 0, rst_n = 0, in_we = 0, start = 0;
  logic [AW-1:0] in_addr, out_addr;
  sample_t in_data, out_data;
  logic busy, done;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  dwt3d #(.N(N)) dut (.*);

  function automatic int idx(int x, int y, int z);
    return (z * N + y) * N + x;
  endfunction

  function automatic void ref_3d(ref int v[]);
    int line[];
    line = new[N];
    for (int d = 0; d < 3; d++)
      for (int p = 0; p < N; p++)
        for (int q = 0; q < N; q++) begin
          for (int e = 0; e < N; e++)
            line[e] = v[d == 0 ? idx(e, q, p) : d == 1 ? idx(q, e, p) : idx(q, p, e)];
          dwt97(line, N);
          for (int e = 0; e < N; e++) begin
            int o = (e % 2) ? N / 2 + e / 2 : e / 2;
            v[d == 0 ? idx(o, q, p) : d == 1 ? idx(q, o, p) : idx(q, p, o)] = line[e];
          end
        end
  endfunction

  initial begin
    int v[];
    int cyc;
    v = new[N * N * N];
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 3; t++) begin
      for (int i = 0; i < N * N * N; i++) begin
        v[i] = (t == 0) ? 100 : int'($urandom % 256);
        @(negedge clk); in_we = 1; in_addr = AW'(i); in_data = sample_t'(v[i]);
      end
      @(negedge clk); in_we = 0; start = 1;
      @(negedge clk); start = 0; cyc = 1;
      while (!done) begin @(negedge clk); cyc++; end
      checks++;
      if (cyc != CYC) begin failures++; $display("FAIL cycles %0d expected %0d", cyc, CYC); end
      ref_3d(v);
      for (int i = 0; i < N * N * N; i++) begin
        out_addr = AW'(i); #1;
        checks++;
        if (int'(out_data) != v[i]) begin
          failures++;
          if (failures < 10) $display("FAIL block %0d [%0d] = %0d expected %0d", t, i, out_data, v[i]);
        end
        if (t == 0 && i != 0 && (i % N >= N / 2 || (i / N) % N >= N / 2 || i / (N * N) >= N / 2)) begin
          checks++;
          if (out_data > 2 || out_data < -2) begin
            failures++; $display("FAIL constant block high band [%0d] = %0d", i, out_data);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
