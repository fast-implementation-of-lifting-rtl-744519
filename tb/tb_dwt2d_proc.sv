// tb_dwt2d_proc: runs the 2-D processor on a 16 x 16 frame held in a
// behavioural two-port memory. A random image is transformed forward with
// 1, 2 and 3 levels and compared word by word with the reference model
// (rows then columns, each level on the ll quadrant); the inverse transform
// must then restore the image exactly. The run time of each transform is
// checked against the cycle formula
//   1 + sum over levels of (n + n/2) lines * (2n + 4 + (n/2 + 2) * (CW + 4)).
module tb_dwt2d_proc;
  import dwt_pkg::*;
  import dwt_ref_pkg::*;
  localparam int N  = 16;
  localparam int LN = $clog2(N);
  localparam int AW = 2 * LN;
  logic clk = 0, rst_n = 0, start = 0, inverse = 0;
  logic [3:0] levels;
  logic busy, done;
  logic we_a, we_b;
  logic [AW-1:0] addr_a, addr_b;
  sample_t wdata_a, wdata_b, rdata_a, rdata_b;
  sample_t mem [N * N];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  always_ff @(posedge clk) begin
    if (we_a) mem[addr_a] <= wdata_a;
    if (we_b) mem[addr_b] <= wdata_b;
  end
  assign rdata_a = mem[addr_a];
  assign rdata_b = mem[addr_b];

  dwt2d_proc #(.N(N)) dut (.*);

  function automatic int expected_cycles(int lev);
    int tot = 1;
    for (int l = 0; l < lev; l++) begin
      int n = N >> l;
      tot += (n + n / 2) * (2 * n + 4 + (n / 2 + 2) * (CW + 4));
    end
    return tot;
  endfunction

  // reference forward / inverse transforms of the whole frame
  function automatic void ref_2d(ref int img[], input int lev, input bit inv_dir);
    int line[];
    for (int l0 = 0; l0 < lev; l0++) begin
      int l = inv_dir ? lev - 1 - l0 : l0;
      int n = N >> l;
      line = new[n];
      for (int pass = 0; pass < 2; pass++) begin
        bit col = inv_dir ? (pass == 0) : (pass == 1);
        for (int j = 0; j < n; j++) begin
          for (int e = 0; e < n; e++) begin
            int src = inv_dir ? ((e % 2) ? n / 2 + e / 2 : e / 2) : e;
            line[e] = col ? img[src * N + j] : img[j * N + src];
          end
          if (inv_dir) inv(line, n, K_ALPHA, K_BETA);
          else         fwd(line, n, K_ALPHA, K_BETA);
          for (int e = 0; e < n; e++) begin
            int dst = inv_dir ? e : ((e % 2) ? n / 2 + e / 2 : e / 2);
            if (col) img[dst * N + j] = line[e];
            else     img[j * N + dst] = line[e];
          end
        end
      end
    end
  endfunction

  task automatic run(input bit inv_dir, input int lev);
    int cyc;
    @(negedge clk);
    inverse = inv_dir; levels = 4'(lev); start = 1;
    @(negedge clk); start = 0; cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    checks++;
    if (cyc != expected_cycles(lev)) begin
      failures++; $display("FAIL cycles %0d expected %0d", cyc, expected_cycles(lev));
    end
  endtask

  initial begin
    int img[], orig[];
    img = new[N * N]; orig = new[N * N];
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int lev = 1; lev <= 3; lev++) begin
      for (int i = 0; i < N * N; i++) begin
        orig[i] = int'($urandom % 256);
        img[i]  = orig[i];
        mem[i]  = sample_t'(orig[i]);
      end
      run(1'b0, lev);
      ref_2d(img, lev, 1'b0);
      for (int i = 0; i < N * N; i++) begin
        checks++;
        if (int'(mem[i]) != img[i]) begin
          failures++;
          if (failures < 10) $display("FAIL dwt lev=%0d [%0d,%0d] = %0d expected %0d", lev, i / N, i % N, mem[i], img[i]);
        end
      end
      run(1'b1, lev);
      for (int i = 0; i < N * N; i++) begin
        checks++;
        if (int'(mem[i]) != orig[i]) begin
          failures++;
          if (failures < 10) $display("FAIL idwt lev=%0d [%0d,%0d] = %0d expected %0d", lev, i / N, i % N, mem[i], orig[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
