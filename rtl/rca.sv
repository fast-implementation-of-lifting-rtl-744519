// rca: W-bit ripple carry adder made of full-adder cells.
//
// The ripple carry adder has the fewest transitions per addition among the
// common adder styles, which is why the low-power multiplier uses it. Each
// bit is a full adder; the carry ripples from bit 0 to bit W-1.
//
// Interface: s = a + b + cin (low W bits), cout = carry out. Purely
// combinational.
module rca #(
  parameter int W = 8
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] s,
  output logic         cout
);

  logic [W:0] c;

  assign c[0] = cin;
  for (genvar i = 0; i < W; i++) begin : g_fa
    assign s[i]   = a[i] ^ b[i] ^ c[i];
    assign c[i+1] = (a[i] & b[i]) | (a[i] & c[i]) | (b[i] & c[i]);
  end
  assign cout = c[W];

endmodule
