// lift_step: one lifting processing element, y = c +/- coef * (a + b).
//
// This is the arithmetic of every predict, update and scaling step of the
// lifting scheme: two neighbouring samples are added, the sum is multiplied
// by a lifting coefficient and the product is added to (forward) or
// subtracted from (inverse, `sub` = 1) the sample being lifted. A scaling
// step is the same operation with a = sample, b = 0, c = 0.
//
// The product is formed by a BZ-FAD sequential multiplier on magnitudes
// (sign-magnitude arithmetic): |a + b| times the coefficient magnitude, then
// rounded to the nearest integer (half away from zero) by dropping FRAC
// bits. Because the rounded product depends only on a + b, a forward step
// followed by the inverse step restores c exactly. The result wraps to DW
// bits (modular arithmetic keeps that inverse exact as well).
//
// Interface: `start` (while `busy` is low) samples a, b, c, coef and sub.
// `done` pulses CW + 2 cycles later with `y` valid; y holds until the next
// start. Rounding, wrap-around and the handshake are this design's choice.
module lift_step
  import dwt_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    start,
  input  sample_t a,
  input  sample_t b,
  input  sample_t c,
  input  coef_t   coef,
  input  logic    sub,
  output logic    busy,
  output logic    done,
  output sample_t y
);

  localparam int PW = 2 * CW;

  logic signed [DW:0] s;
  logic [CW-1:0]      s_mag;
  logic               mult_ready, mult_done;
  logic [PW-1:0]      prod;
  logic [PW-1:0]      rounded;
  sample_t            c_q;
  logic               neg_q;
  logic               pend;

  assign s     = (DW+1)'(a) + (DW+1)'(b);
  assign s_mag = s[DW] ? CW'(-s) : CW'(s);

  bzfad_mult #(.W(CW)) u_mult (
    .clk  (clk),
    .rst_n(rst_n),
    .start(start && !busy),
    .a    (coef.mag),
    .b    (s_mag),
    .ready(mult_ready),
    .done (mult_done),
    .p    (prod)
  );

  assign rounded = (prod + PW'(1 << (FRAC - 1))) >> FRAC;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      c_q   <= '0;
      neg_q <= 1'b0;
      pend  <= 1'b0;
      done  <= 1'b0;
      y     <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        c_q   <= c;
        neg_q <= s[DW] ^ coef.neg ^ sub;
        pend  <= 1'b1;
      end else if (mult_done) begin
        y    <= neg_q ? sample_t'(c_q - sample_t'(rounded)) : sample_t'(c_q + sample_t'(rounded));
        done <= 1'b1;
        pend <= 1'b0;
      end
    end
  end

  assign busy = pend || !mult_ready;

endmodule
