// dwt97_1d: one-level 1-D discrete wavelet transform with the 9/7 filter,
// computed by lifting.
//
// The line is split into even and odd samples and then passes through the
// six stages of the 9/7 lifting scheme in order:
//   P1  d1(i) = x(2i+1) + alpha*(x(2i) + x(2i+2))
//   U1  a1(i) = x(2i)   + beta *(d1(i) + d1(i-1))
//   P2  d2(i) = d1(i)   + gamma*(a1(i) + a1(i+1))
//   U2  a2(i) = a1(i)   + delta*(d2(i) + d2(i-1))
//   S   a(i)  = zeta * a2(i),  d(i) = d2(i) / zeta
// Split is implicit (even and odd samples keep their places in the line
// buffer of a lift_line processor). P1/U1 and P2/U2 are each one forward pass
// of that processor, the scaling is its scaling pass; this module sequences
// the three passes.
//
// Interface: with `busy` low, shift the N samples of a line in serially with
// `in_valid`/`in_data`, then pulse `start`. `done` pulses when the line is
// transformed; afterwards `rdata` = approximation a(i) at `raddr` = 2i and
// detail d(i) at `raddr` = 2i+1. The default N = 8 is the 8-sample line of
// the 8x8x8 video block. Timing: 3*(N/2) + 4 lifting steps of CW + 4 = 21
// cycles each, plus a few cycles of sequencing.
module dwt97_1d
  import dwt_pkg::*;
#(
  parameter int N  = 8,
  parameter int NW = $clog2(N) + 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  sample_t       in_data,
  input  logic          start,
  output logic          busy,
  output logic          done,
  input  logic [NW-1:0] raddr,
  output sample_t       rdata
);

  typedef enum logic [2:0] {
    S_IDLE, S_PU1, S_PU1_W, S_PU2, S_PU2_W, S_SC, S_SC_W
  } state_e;

  state_e   state;
  logic     ll_start, ll_busy, ll_done;
  line_op_e ll_op;
  coef_t    ll_c1, ll_c2;

  always_comb begin
    ll_start = 1'b0;
    ll_op    = OP_FWD;
    ll_c1    = C_ALPHA;
    ll_c2    = C_BETA;
    case (state)
      S_PU1:  ll_start = 1'b1;
      S_PU2:  begin ll_start = 1'b1; ll_c1 = C_GAMMA; ll_c2 = C_DELTA; end
      S_SC:   begin ll_start = 1'b1; ll_op = OP_SCALE; ll_c1 = C_ZETA; ll_c2 = C_INV_ZETA; end
      default: ;
    endcase
  end

  lift_line #(.MAXN(N), .NW(NW)) u_line (
    .clk     (clk),
    .rst_n   (rst_n),
    .n       (NW'(N)),
    .shift_in(in_valid && state == S_IDLE),
    .din     (in_data),
    .start   (ll_start),
    .op      (ll_op),
    .coef1   (ll_c1),
    .coef2   (ll_c2),
    .busy    (ll_busy),
    .done    (ll_done),
    .raddr   (raddr),
    .rdata   (rdata)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      case (state)
        S_IDLE:  if (start) state <= S_PU1;
        S_PU1:   state <= S_PU1_W;
        S_PU1_W: if (ll_done) state <= S_PU2;
        S_PU2:   state <= S_PU2_W;
        S_PU2_W: if (ll_done) state <= S_SC;
        S_SC:    state <= S_SC_W;
        S_SC_W:  if (ll_done) begin state <= S_IDLE; done <= 1'b1; end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE) || ll_busy;

endmodule
