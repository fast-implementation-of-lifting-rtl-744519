// tb_bank_mem: writes random words through both ports of a small memory,
// reads them back through both ports, checks the asynchronous read and that
// port B wins a same-address write.
module tb_bank_mem;
  import dwt_pkg::*;
  localparam int DEPTH = 64;
  localparam int AW = $clog2(DEPTH);
  logic clk = 0, we_a = 0, we_b = 0;
  logic [AW-1:0] addr_a, addr_b;
  sample_t wdata_a, wdata_b, rdata_a, rdata_b;
  sample_t model [DEPTH];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  bank_mem #(.DEPTH(DEPTH)) dut (.*);

  initial begin
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      we_a = 1; addr_a = AW'(i); wdata_a = sample_t'($urandom); model[i] = wdata_a;
    end
    for (int t = 0; t < 500; t++) begin
      @(negedge clk);
      we_a = $urandom % 2; we_b = $urandom % 2;
      addr_a = AW'($urandom); addr_b = (t % 7 == 0) ? addr_a : AW'($urandom);
      wdata_a = sample_t'($urandom); wdata_b = sample_t'($urandom);
      #1;
      checks += 2;
      if (rdata_a !== model[addr_a]) begin failures++; $display("FAIL read A"); end
      if (rdata_b !== model[addr_b]) begin failures++; $display("FAIL read B"); end
      if (we_a) model[addr_a] = wdata_a;
      if (we_b) model[addr_b] = wdata_b;
    end
    @(negedge clk); we_a = 0; we_b = 0;
    for (int i = 0; i < DEPTH; i++) begin
      addr_a = AW'(i); addr_b = AW'(DEPTH - 1 - i); #1;
      checks += 2;
      if (rdata_a !== model[i]) begin failures++; $display("FAIL final A %0d", i); end
      if (rdata_b !== model[DEPTH - 1 - i]) begin failures++; $display("FAIL final B %0d", i); end
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
