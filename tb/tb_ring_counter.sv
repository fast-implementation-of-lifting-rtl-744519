// tb_ring_counter: checks that the ring counter is one-hot after reset and
// clear, rotates by one position per enabled clock, holds when not enabled,
// flags the last position and wraps around.
module tb_ring_counter;
  localparam int W = 8;
  logic clk = 0, rst_n = 0, clear = 0, en = 0;
  logic [W-1:0] q;
  logic last;
  int checks = 0, failures = 0;
  int pos;

  always #5 clk = ~clk;

  ring_counter #(.W(W)) dut (.*);

  task automatic expect_pos(input int p);
    checks++;
    if (q !== W'(1) << p || last !== (p == W - 1)) begin
      failures++; $display("FAIL q=%b expected position %0d", q, p);
    end
  endtask

  initial begin
    @(negedge clk); rst_n = 1;
    expect_pos(0);
    pos = 0;
    for (int i = 0; i < 200; i++) begin
      en    = ($urandom % 3) != 0;
      clear = ($urandom % 17) == 0;
      @(negedge clk);
      if (clear) pos = 0;
      else if (en) pos = (pos + 1) % W;
      expect_pos(pos);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
