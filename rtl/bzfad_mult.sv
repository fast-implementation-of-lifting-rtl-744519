// bzfad_mult: modified BZ-FAD low-power sequential multiplier (p = a * b).
//
// It is a shift-and-add multiplier rearranged to toggle fewer nodes:
//  * the multiplier register B is never shifted: a one-hot ring counter
//    walks over its bits and mux M1 picks the current bit B[i];
//  * the multiplicand A goes to the adder directly, unshifted;
//  * when B[i] is 0 mux M2 bypasses the ripple carry adder, so the upper
//    partial product is passed on with a zero entering at its top (the same
//    value a right shift would give) and no addition is done;
//  * the low half of the product is not shifted either: the bit that leaves
//    the adder in iteration i is written straight into product latch i,
//    selected by the ring counter.
// A binary cycle counter is not needed; the ring counter's last position
// ends the operation and raises `ready` again.
//
// Interface: when `ready` is high, a one-cycle `start` captures `a` and `b`.
// Operands are unsigned, W bits each. After exactly W + 1 clock edges
// (one to load, W iterations) `done` pulses for one cycle and `p` holds the
// 2W-bit product until the next start. `start` while busy is ignored.
// The operand width default of 8 bits follows the 8-bit multiplier that is
// characterised; the handshake and the ordering of product latches are this
// design's choice.
module bzfad_mult #(
  parameter int W = 8
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  logic [W-1:0]   a,
  input  logic [W-1:0]   b,
  output logic           ready,
  output logic           done,
  output logic [2*W-1:0] p
);

  logic [W-1:0] a_q, b_q;    // multiplicand and multiplier, never shifted
  logic [W-1:0] hi_q;        // upper partial product
  logic [W-1:0] lo_q;        // low product latches, one written per iteration
  logic         busy;
  logic [W-1:0] ring;
  logic         ring_last;

  logic         accept;
  logic         bsel;        // M1: selected multiplier bit
  logic [W-1:0] sum;
  logic         cout;
  logic [W:0]   nxt;         // M2 output: adder result or bypassed partial product

  assign accept = start && !busy;

  ring_counter #(.W(W)) u_ring (
    .clk  (clk),
    .rst_n(rst_n),
    .clear(accept),
    .en   (busy),
    .q    (ring),
    .last (ring_last)
  );

  assign bsel = |(b_q & ring);

  rca #(.W(W)) u_add (
    .a   (hi_q),
    .b   (a_q),
    .cin (1'b0),
    .s   (sum),
    .cout(cout)
  );

  assign nxt = bsel ? {cout, sum} : {1'b0, hi_q};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_q  <= '0;
      b_q  <= '0;
      hi_q <= '0;
      lo_q <= '0;
      busy <= 1'b0;
      done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (accept) begin
        a_q  <= a;
        b_q  <= b;
        hi_q <= '0;
        lo_q <= '0;
        busy <= 1'b1;
      end else if (busy) begin
        hi_q <= nxt[W:1];
        lo_q <= lo_q | (ring & {W{nxt[0]}});
        if (ring_last) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  assign ready = !busy;
  assign p     = {hi_q, lo_q};

endmodule
