// bank_mem: two-port sample memory used for the frame (sub-band) memory of
// the 2-D transform and the input, intermediate and output memories of the
// 3-D transform.
//
// Each port has its own address, a synchronous write (`we_*`, `wdata_*`
// stored at the rising edge) and an asynchronous read (`rdata_*` follows
// `addr_*` in the same cycle). Two ports let the two column processors of the
// 2-D transform read and write two columns at once. If both ports write the
// same word in one cycle, port B wins. The array is not reset. The port
// organisation is this design's choice.
module bank_mem
  import dwt_pkg::*;
#(
  parameter int DEPTH = 512 * 512,
  parameter int AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          we_a,
  input  logic [AW-1:0] addr_a,
  input  sample_t       wdata_a,
  output sample_t       rdata_a,
  input  logic          we_b,
  input  logic [AW-1:0] addr_b,
  input  sample_t       wdata_b,
  output sample_t       rdata_b
);

  sample_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we_a) mem[addr_a] <= wdata_a;
    if (we_b) mem[addr_b] <= wdata_b;
  end

  assign rdata_a = mem[addr_a];
  assign rdata_b = mem[addr_b];

endmodule
