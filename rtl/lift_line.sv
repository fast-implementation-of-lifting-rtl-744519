// lift_line: 1-D lifting line processor with one predict and one update
// processing element working side by side on a line buffer.
//
// A line of n samples (n even, 2 <= n <= MAXN) is shifted in serially, one
// sample per `shift_in` pulse, through a shift register whose tail is at
// index n-1, so after n pulses sample k sits at index k. The buffer keeps
// even samples at even indices and odd samples at odd indices throughout
// ("in-place" lifting), so the caller reads low-band results at even and
// high-band results at odd indices.
//
// A pass (`start` with `op`, `coef1`, `coef2`) runs over m = n/2 sample
// pairs in steps. In each step both processing elements run one lifting
// operation at once, each on a different pair:
//   OP_FWD   element 0: predict h(k) = x(2k+1) + coef1*(x(2k) + x(2k+2)), k = step
//            element 1: update  l(k) = x(2k)   + coef2*(h(k) + h(k-1)),   k = step-2
//   OP_INV   element 0: x(2k)   = l(k) - coef2*(h(k) + h(k-1)),           k = step
//            element 1: x(2k+1) = h(k) - coef1*(x(2k) + x(2k+2)),         k = step-2
//   OP_SCALE element 0: x(2k) = coef1*x(2k); element 1: x(2k+1) = coef2*x(2k+1), k = step
// The second element trails the first by two pairs so that everything it
// reads has already been written. Line ends use symmetric extension:
// x(n) is taken as x(n-2) and h(-1) as h(0). A lifting pass takes m + 2
// steps, a scaling pass m steps; a step lasts CW + 4 clock cycles (issue,
// CW + 2 for the processing elements, write-back), and `done` pulses one
// cycle after the final write-back.
//
// The predict/update pairing and the equations follow the one-step lifting
// processor of the 2-D architecture; the step schedule, the serial shift-in
// and the symmetric extension are this design's choices.
module lift_line
  import dwt_pkg::*;
#(
  parameter int MAXN = 512,
  parameter int NW   = $clog2(MAXN) + 1,
  parameter int IW   = $clog2(MAXN)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [NW-1:0] n,
  // serial line load
  input  logic          shift_in,
  input  sample_t       din,
  // pass control
  input  logic          start,
  input  line_op_e      op,
  input  coef_t         coef1,
  input  coef_t         coef2,
  output logic          busy,
  output logic          done,
  // result read-out (combinational)
  input  logic [NW-1:0] raddr,
  output sample_t       rdata
);

  typedef enum logic [1:0] {S_IDLE, S_ISSUE, S_WAIT} state_e;

  typedef struct packed {
    logic [NW-1:0] ia;     // first neighbour (or the sample itself for scaling)
    logic [NW-1:0] ib;     // second neighbour
    logic [NW-1:0] ic;     // sample being lifted, also the write address
    logic          zbc;    // scaling: b and c are zero
  } idx_t;

  sample_t       buf_q [MAXN];
  state_e        state;
  line_op_e      op_q;
  coef_t         c1_q, c2_q;
  logic [NW-1:0] step, nsteps, m;
  logic [NW:0]   k0, k1;          // pair index of each element (may be negative)
  logic          act0, act1;
  role_e         role0, role1;
  idx_t          x0, x1;
  logic          st;              // start both elements
  logic          d0_q, d1_q, d0, d1;
  sample_t       y0, y1;
  logic          b0, b1;

  assign m = n >> 1;

  function automatic idx_t index(role_e role, logic [NW:0] k, logic [NW-1:0] mm);
    idx_t r;
    logic [NW-1:0] kk;
    kk    = k[NW-1:0];
    r     = '0;
    case (role)
      ROLE_P: begin
        r.ia = NW'(2 * kk);
        r.ib = (kk == mm - 1) ? NW'(2 * kk) : NW'(2 * kk + 2);
        r.ic = NW'(2 * kk + 1);
      end
      ROLE_U: begin
        r.ia = NW'(2 * kk + 1);
        r.ib = (kk == 0) ? NW'(1) : NW'(2 * kk - 1);
        r.ic = NW'(2 * kk);
      end
      ROLE_SE: begin
        r.ia  = NW'(2 * kk);
        r.ib  = r.ia;
        r.ic  = r.ia;
        r.zbc = 1'b1;
      end
      default: begin
        r.ia  = NW'(2 * kk + 1);
        r.ib  = r.ia;
        r.ic  = r.ia;
        r.zbc = 1'b1;
      end
    endcase
    return r;
  endfunction

  always_comb begin
    k0 = {1'b0, step};
    case (op_q)
      OP_FWD:  begin role0 = ROLE_P;  role1 = ROLE_U;  k1 = {1'b0, step} - 2; end
      OP_INV:  begin role0 = ROLE_U;  role1 = ROLE_P;  k1 = {1'b0, step} - 2; end
      default: begin role0 = ROLE_SE; role1 = ROLE_SO; k1 = {1'b0, step};     end
    endcase
    act0 = !k0[NW] && (k0[NW-1:0] < m);
    act1 = !k1[NW] && (k1[NW-1:0] < m);
    x0   = index(role0, k0, m);
    x1   = index(role1, k1, m);
  end

  assign st = (state == S_ISSUE);

  lift_step u_pe0 (
    .clk  (clk),
    .rst_n(rst_n),
    .start(st),
    .a    (buf_q[IW'(x0.ia)]),
    .b    (x0.zbc ? sample_t'(0) : buf_q[IW'(x0.ib)]),
    .c    (x0.zbc ? sample_t'(0) : buf_q[IW'(x0.ic)]),
    .coef ((op_q == OP_INV) ? c2_q : c1_q),
    .sub  (op_q == OP_INV),
    .busy (b0),
    .done (d0),
    .y    (y0)
  );

  lift_step u_pe1 (
    .clk  (clk),
    .rst_n(rst_n),
    .start(st),
    .a    (buf_q[IW'(x1.ia)]),
    .b    (x1.zbc ? sample_t'(0) : buf_q[IW'(x1.ib)]),
    .c    (x1.zbc ? sample_t'(0) : buf_q[IW'(x1.ic)]),
    .coef ((op_q == OP_INV) ? c1_q : c2_q),
    .sub  (op_q == OP_INV),
    .busy (b1),
    .done (d1),
    .y    (y1)
  );

  // control
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= S_IDLE;
      op_q   <= OP_FWD;
      c1_q   <= '0;
      c2_q   <= '0;
      step   <= '0;
      nsteps <= '0;
      d0_q   <= 1'b0;
      d1_q   <= 1'b0;
      done   <= 1'b0;
    end else begin
      done <= 1'b0;
      case (state)
        S_IDLE: if (start) begin
          op_q   <= op;
          c1_q   <= coef1;
          c2_q   <= coef2;
          step   <= '0;
          nsteps <= (op == OP_SCALE) ? m : m + 2;
          state  <= S_ISSUE;
        end
        S_ISSUE: begin
          d0_q  <= 1'b0;
          d1_q  <= 1'b0;
          state <= S_WAIT;
        end
        default: begin  // S_WAIT
          if (d0) d0_q <= 1'b1;
          if (d1) d1_q <= 1'b1;
          if (d0_q && d1_q) begin
            if (step == nsteps - 1) begin
              state <= S_IDLE;
              done  <= 1'b1;
            end else begin
              step  <= step + 1;
              state <= S_ISSUE;
            end
          end
        end
      endcase
    end
  end

  // line buffer: serial shift-in and lifting write-back
  always_ff @(posedge clk) begin
    if (shift_in && state == S_IDLE) begin
      for (int i = 0; i < MAXN - 1; i++)
        buf_q[i] <= (NW'(i) == n - 1) ? din : buf_q[i+1];
      if (NW'(MAXN) == n) buf_q[MAXN-1] <= din;
    end else if (state == S_WAIT && d0_q && d1_q) begin
      if (act0) buf_q[IW'(x0.ic)] <= y0;
      if (act1) buf_q[IW'(x1.ic)] <= y1;
    end
  end

  // handshake rule: a step is issued only to idle processing elements, and
  // the line is not reloaded during a pass
  always_ff @(posedge clk) begin
    if (rst_n && st) assert (!b0 && !b1) else $error("lift_line: step issued to a busy element");
    if (rst_n && shift_in) assert (state == S_IDLE) else $error("lift_line: shift-in during a pass");
  end

  assign busy  = (state != S_IDLE);
  assign rdata = buf_q[IW'(raddr)];

endmodule
