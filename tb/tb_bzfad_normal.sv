// tb_bzfad_normal: runs the 8-bit BZ-FAD multiplier on normally distributed
// operands (mean 128, standard deviation about 37, made by summing twelve
// uniform numbers), the input statistics used to compare multiplier power.
// Every product is checked. As a switching-activity measure, it also counts:
//  * cycles in which the adder is bypassed (multiplier bit 0) versus used;
//  * bit flips of the ring counter versus the flips of a 3-bit binary
//    counter over the same iterations (reported only: a one-hot counter
//    flips two bits per step, a 3-bit binary counter 1.75 on average);
//  * bit flips of the low product half, which is written bit by bit in
//    place, versus a low half that is shifted right every cycle.
// The in-place low half must flip fewer bits than the shifted one, and the
// bypass count must match the number of zero multiplier bits.
module tb_bzfad_normal;
  localparam int W = 8;
  localparam int OPS = 2000;
  logic clk = 0, rst_n = 0, start = 0;
  logic [W-1:0] a, b;
  logic ready, done;
  logic [2*W-1:0] p;
  int checks = 0, failures = 0;
  longint n_bypass = 0, n_add = 0, zero_bits = 0;
  longint ring_flips = 0, bin_flips = 0, lo_flips = 0, shift_flips = 0;
  logic [W-1:0] ring_prev, lo_prev;

  always #5 clk = ~clk;

  bzfad_mult #(.W(W)) dut (.*);

  always @(posedge clk) if (rst_n) begin
    if (dut.busy) begin
      if (dut.bsel) n_add++; else n_bypass++;
    end
    ring_flips += $countones(dut.ring ^ ring_prev);
    lo_flips   += $countones(dut.lo_q ^ lo_prev);
    ring_prev = dut.ring;
    lo_prev   = dut.lo_q;
  end

  function automatic int normal8();
    int s = 0;
    for (int i = 0; i < 12; i++) s += int'($urandom % 64);
    s = (s - 378) + 128;  // 12 * 31.5 = 378
    return s < 0 ? 0 : s > 255 ? 255 : s;
  endfunction

  initial begin
    logic [2*W:0] acc, acc_next;
    ring_prev = '0; lo_prev = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < OPS; t++) begin
      logic [W-1:0] x, y;
      x = W'(normal8()); y = W'(normal8());
      zero_bits += W - $countones(y);
      // reference textbook shift-add: count flips of its shifting low half
      // and of a binary iteration counter
      acc = '0;
      for (int i = 0; i < W; i++) begin
        acc_next = ((y[i] ? (acc + ((2*W+1)'(x) << W)) : acc) >> 1);
        shift_flips += $countones(acc_next[W-1:0] ^ acc[W-1:0]);
        bin_flips   += $countones(3'(i) ^ 3'(i + 1));
        acc = acc_next;
      end
      @(negedge clk); a = x; b = y; start = 1;
      @(negedge clk); start = 0;
      while (!done) @(negedge clk);
      checks++;
      if (p !== (2*W)'(x) * (2*W)'(y)) begin
        failures++; $display("FAIL %0d * %0d = %0d", x, y, p);
      end
      checks++;
      if (acc[2*W-1:0] !== p) begin failures++; $display("FAIL shift-add model %0d", acc); end
    end
    checks += 2;
    if (n_bypass != zero_bits) begin
      failures++; $display("FAIL bypass cycles %0d, zero multiplier bits %0d", n_bypass, zero_bits);
    end
    if (lo_flips >= shift_flips) begin
      failures++; $display("FAIL low product flips %0d not below shifted %0d", lo_flips, shift_flips);
    end
    $display("%0d products: adder used %0d cycles, bypassed %0d cycles", OPS, n_add, n_bypass);
    $display("counter bit flips: ring %0d, binary %0d; low product bit flips: in place %0d, shifted %0d",
             ring_flips, bin_flips, lo_flips, shift_flips);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (OPS * 12 + 100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
