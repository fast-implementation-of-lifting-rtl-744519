// tb_rca: exhaustive check of the 8-bit ripple carry adder against the
// + operator, with and without carry in.
module tb_rca;
  localparam int W = 8;
  logic [W-1:0] a, b, s;
  logic cin, cout;
  int checks = 0, failures = 0;

  rca #(.W(W)) dut (.*);

  initial begin
    for (int i = 0; i < 256; i++)
      for (int j = 0; j < 256; j++)
        for (int c = 0; c < 2; c++) begin
          a = W'(i); b = W'(j); cin = c[0];
          #1;
          checks++;
          if ({cout, s} !== 9'(i + j + c)) begin
            failures++;
            if (failures < 10) $display("FAIL %0d + %0d + %0d = %0d", i, j, c, {cout, s});
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
