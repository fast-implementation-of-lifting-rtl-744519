// tb_bzfad_mult: checks the BZ-FAD multiplier against the * operator for
// corner operands and random operands, checks that the product arrives
// exactly W + 1 cycles after start, that ready is low meanwhile and that a
// start while busy is ignored.
module tb_bzfad_mult;
  localparam int W = 8;
  logic clk = 0, rst_n = 0, start = 0;
  logic [W-1:0] a, b;
  logic ready, done;
  logic [2*W-1:0] p;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  bzfad_mult #(.W(W)) dut (.*);

  task automatic mul(input logic [W-1:0] x, input logic [W-1:0] y);
    int cyc;
    @(negedge clk);
    a = x; b = y; start = 1;
    @(negedge clk);
    start = 0;
    a = ~x; b = ~y;       // a start while busy must be ignored
    start = 1;
    cyc = 1;
    while (!done) begin
      checks++;
      if (ready) begin failures++; $display("ready high while busy"); end
      @(negedge clk);
      start = 0;
      cyc++;
    end
    checks += 2;
    if (p !== (2*W)'(x) * (2*W)'(y)) begin
      failures++; $display("FAIL %0d * %0d = %0d, got %0d", x, y, (2*W)'(x) * (2*W)'(y), p);
    end
    if (cyc != W + 1) begin
      failures++; $display("FAIL latency %0d, expected %0d", cyc, W + 1);
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    mul(0, 0); mul(255, 255); mul(1, 255); mul(255, 1); mul(128, 2); mul(85, 170);
    for (int i = 0; i < 400; i++) mul(W'($urandom), W'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
