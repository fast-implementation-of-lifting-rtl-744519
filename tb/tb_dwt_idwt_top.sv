// tb_dwt_idwt_top: end-to-end test of the wavelet IP at a reduced image size
// (32 x 32; the 3-D part at its 8 x 8 x 8 default). Through the top's ports
// only, it loads an image, runs a 2-level 2-D DWT while a 3-D DWT of a video
// block runs at the same time, reads both results and compares them with the
// reference models, then runs the 2-level IDWT and checks that the image
// comes back exactly; a 1-level round trip follows. It counts how often each
// mechanism of the design happened (multiplier add and adder bypass, row and
// column passes, forward and inverse runs, levels beyond the first, each
// 3-D axis) and fails any that never did; each 3-D axis must run exactly once.
module tb_dwt_idwt_top;
  import dwt_pkg::*;
  import dwt_ref_pkg::*;
  localparam int N2D = 32;
  localparam int N3D = 8;
  localparam int AW2D = 2 * $clog2(N2D);
  localparam int AW3D = 3 * $clog2(N3D);

  logic clk = 0, rst_n = 0;
  logic img_we = 0, start2d = 0, inverse = 0, vol_we = 0, start3d = 0;
  logic [AW2D-1:0] img_waddr, img_raddr;
  logic [AW3D-1:0] vol_waddr, vol_raddr;
  sample_t img_wdata, img_rdata, vol_wdata, vol_rdata;
  logic [3:0] levels;
  logic busy2d, done2d, busy3d, done3d;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  dwt_idwt_top #(.N2D(N2D)) dut (.*);

  // mechanism counters
  int n_add = 0, n_bypass = 0, n_row = 0, n_col = 0, n_fwd = 0, n_inv = 0, n_deep = 0;
  int n_axis[3] = '{0, 0, 0};
  always @(posedge clk) if (rst_n) begin
    if (dut.u_dwt2d.u_row.u_pe0.u_mult.busy) begin
      if (dut.u_dwt2d.u_row.u_pe0.u_mult.bsel) n_add++;
      else n_bypass++;
    end
    if (dut.u_dwt2d.st_row) n_row++;
    if (dut.u_dwt2d.st_col) n_col++;
    if (dut.u_dwt2d.st_row && dut.u_dwt2d.lv != 0) n_deep++;
    if (start2d && !busy2d) begin if (inverse) n_inv++; else n_fwd++; end
    if (dut.u_dwt3d.g_stage[0].u_stage.done) n_axis[0]++;
    if (dut.u_dwt3d.g_stage[1].u_stage.done) n_axis[1]++;
    if (dut.u_dwt3d.g_stage[2].u_stage.done) n_axis[2]++;
  end

  function automatic void ref_2d(ref int img[], input int lev, input bit inv_dir);
    int line[];
    for (int l0 = 0; l0 < lev; l0++) begin
      int l = inv_dir ? lev - 1 - l0 : l0;
      int n = N2D >> l;
      line = new[n];
      for (int pass = 0; pass < 2; pass++) begin
        bit col = inv_dir ? (pass == 0) : (pass == 1);
        for (int j = 0; j < n; j++) begin
          for (int e = 0; e < n; e++) begin
            int src = inv_dir ? ((e % 2) ? n / 2 + e / 2 : e / 2) : e;
            line[e] = col ? img[src * N2D + j] : img[j * N2D + src];
          end
          if (inv_dir) inv(line, n, K_ALPHA, K_BETA);
          else         fwd(line, n, K_ALPHA, K_BETA);
          for (int e = 0; e < n; e++) begin
            int dst = inv_dir ? e : ((e % 2) ? n / 2 + e / 2 : e / 2);
            if (col) img[dst * N2D + j] = line[e];
            else     img[j * N2D + dst] = line[e];
          end
        end
      end
    end
  endfunction

  function automatic int vidx(int x, int y, int z);
    return (z * N3D + y) * N3D + x;
  endfunction

  function automatic void ref_3d(ref int v[]);
    int line[];
    line = new[N3D];
    for (int d = 0; d < 3; d++)
      for (int p = 0; p < N3D; p++)
        for (int q = 0; q < N3D; q++) begin
          for (int e = 0; e < N3D; e++)
            line[e] = v[d == 0 ? vidx(e, q, p) : d == 1 ? vidx(q, e, p) : vidx(q, p, e)];
          dwt97(line, N3D);
          for (int e = 0; e < N3D; e++) begin
            int o = (e % 2) ? N3D / 2 + e / 2 : e / 2;
            v[d == 0 ? vidx(o, q, p) : d == 1 ? vidx(q, o, p) : vidx(q, p, o)] = line[e];
          end
        end
  endfunction

  task automatic check_image(input int expv[], input string what);
    for (int i = 0; i < N2D * N2D; i++) begin
      img_raddr = AW2D'(i); #1;
      checks++;
      if (int'(img_rdata) != expv[i]) begin
        failures++;
        if (failures < 10) $display("FAIL %s [%0d,%0d] = %0d expected %0d", what, i / N2D, i % N2D, img_rdata, expv[i]);
      end
    end
  endtask

  // cycles of a 2-D run: each level of side n has n row lines and n/2
  // column line pairs of 2n + 4 + (n/2 + 2)*(CW + 4) cycles; plus one
  function automatic int cycles2d(int lev);
    int tot = 1;
    for (int l = 0; l < lev; l++) begin
      int n = N2D >> l;
      tot += (n + n / 2) * (2 * n + 4 + (n / 2 + 2) * (CW + 4));
    end
    return tot;
  endfunction

  task automatic run2d(input bit inv_dir, input int lev);
    int cyc;
    @(negedge clk); inverse = inv_dir; levels = 4'(lev); start2d = 1;
    @(negedge clk); start2d = 0; cyc = 1;
    while (!done2d) begin @(negedge clk); cyc++; end
    checks++;
    if (cyc != cycles2d(lev)) begin
      failures++; $display("FAIL 2-D run took %0d cycles, expected %0d", cyc, cycles2d(lev));
    end
    $display("2-D run, inverse=%0d, %0d levels: %0d cycles", inv_dir, lev, cyc);
  endtask

  initial begin
    int img[], orig[], vol[];
    img = new[N2D * N2D]; orig = new[N2D * N2D]; vol = new[N3D * N3D * N3D];
    repeat (2) @(negedge clk);
    rst_n = 1;
    // load image and video block
    for (int i = 0; i < N2D * N2D; i++) begin
      // smooth gradient plus noise, like a natural image
      orig[i] = ((i / N2D) * 4 + (i % N2D) * 3 + int'($urandom % 32)) % 256;
      img[i] = orig[i];
      @(negedge clk); img_we = 1; img_waddr = AW2D'(i); img_wdata = sample_t'(orig[i]);
      if (i < N3D * N3D * N3D) begin
        vol[i] = int'($urandom % 256);
        vol_we = 1; vol_waddr = AW3D'(i); vol_wdata = sample_t'(vol[i]);
      end else vol_we = 0;
    end
    @(negedge clk); img_we = 0; vol_we = 0;
    // 3-D and 2-D forward transforms side by side
    @(negedge clk); start3d = 1;
    @(negedge clk); start3d = 0;
    run2d(1'b0, 2);
    ref_2d(img, 2, 1'b0);
    check_image(img, "2-D DWT");
    while (busy3d) @(negedge clk);
    ref_3d(vol);
    for (int i = 0; i < N3D * N3D * N3D; i++) begin
      vol_raddr = AW3D'(i); #1;
      checks++;
      if (int'(vol_rdata) != vol[i]) begin
        failures++;
        if (failures < 10) $display("FAIL 3-D DWT [%0d] = %0d expected %0d", i, vol_rdata, vol[i]);
      end
    end
    // inverse restores the image
    run2d(1'b1, 2);
    check_image(orig, "2-D IDWT");
    // one-level round trip
    run2d(1'b0, 1);
    run2d(1'b1, 1);
    check_image(orig, "1-level round trip");

    checks += 10;
    if (n_add == 0)    begin failures++; $display("FAIL multiplier never added"); end
    if (n_bypass == 0) begin failures++; $display("FAIL multiplier adder never bypassed"); end
    if (n_row == 0)    begin failures++; $display("FAIL no row pass"); end
    if (n_col == 0)    begin failures++; $display("FAIL no column pass"); end
    if (n_fwd == 0)    begin failures++; $display("FAIL no forward run"); end
    if (n_inv == 0)    begin failures++; $display("FAIL no inverse run"); end
    if (n_deep == 0)   begin failures++; $display("FAIL no second level"); end
    for (int d = 0; d < 3; d++)
      if (n_axis[d] != 1) begin failures++; $display("FAIL 3-D axis %0d ran %0d times", d, n_axis[d]); end
    $display("mechanisms: add=%0d bypass=%0d row=%0d col=%0d fwd=%0d inv=%0d level2-rows=%0d axes=%0d/%0d/%0d",
             n_add, n_bypass, n_row, n_col, n_fwd, n_inv, n_deep, n_axis[0], n_axis[1], n_axis[2]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
