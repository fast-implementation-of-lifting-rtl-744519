// ring_counter: one-hot ring counter that sequences the BZ-FAD multiplier.
//
// It replaces the binary iteration counter of a shift-and-add multiplier:
// only two bits change per step, which lowers switching activity. Bit i being
// set means "iteration i": it selects multiplier bit B[i] and the product
// latch that receives bit i of the low product half.
//
// Interface: `clear` loads 0..01 (iteration 0) and has priority; `en` rotates
// the one-hot value left by one position each clock. `last` is high while
// the counter is in the final position (bit W-1). Reset loads iteration 0.
module ring_counter #(
  parameter int W = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clear,
  input  logic         en,
  output logic [W-1:0] q,
  output logic         last
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      q <= W'(1);
    else if (clear)  q <= W'(1);
    else if (en)     q <= {q[W-2:0], q[W-1]};
  end

  assign last = q[W-1];

endmodule
