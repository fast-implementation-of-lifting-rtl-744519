// dwt3d_stage: one direction of the 3-D transform. It runs a 1-D 9/7 DWT
// over every line of an N x N x N volume along one axis, reading the lines
// from a source memory and writing them to a destination memory.
//
// DIM selects the axis: 0 = x (along a row), 1 = y (down a column),
// 2 = z (through the frames, the time axis). Memory address of sample
// (x, y, z) is z*N*N + y*N + x. Each of the N*N lines is read serially,
// one sample per cycle, into the 1-D unit, transformed, and written back
// with the approximation samples in the lower half of the axis (0 .. N/2-1)
// and the detail samples in the upper half, so that after all three axes
// the volume holds the eight sub-bands as octants.
//
// Interface: `start` pulse, `done` pulse when the last line is written;
// `src_addr`/`src_rdata` is an asynchronous-read port of the source memory,
// `dst_we`/`dst_addr`/`dst_wdata` a write port of the destination memory.
// Timing per line: N load cycles, one start cycle, the 1-D transform and
// N store cycles. The per-axis memory order is this design's choice.
module dwt3d_stage
  import dwt_pkg::*;
#(
  parameter int N   = 8,
  parameter int DIM = 0,
  parameter int LN  = $clog2(N),
  parameter int AW  = 3 * LN
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  output logic          busy,
  output logic          done,
  output logic [AW-1:0] src_addr,
  input  sample_t       src_rdata,
  output logic          dst_we,
  output logic [AW-1:0] dst_addr,
  output sample_t       dst_wdata
);

  typedef enum logic [2:0] {S_IDLE, S_LOAD, S_RUN, S_WAIT, S_STORE} state_e;

  state_e          state;
  logic [2*LN-1:0] line;    // {outer, inner} coordinates of the line
  logic [LN:0]     k;
  logic [LN-1:0]   e;       // coordinate along the axis
  logic [LN-1:0]   pos_k;
  logic            u_busy, u_done;

  assign pos_k = k[0] ? LN'(N / 2) + (k[LN-1:0] >> 1) : (k[LN-1:0] >> 1);
  assign e     = (state == S_STORE) ? pos_k : k[LN-1:0];

  function automatic logic [AW-1:0] addr_of(logic [2*LN-1:0] l, logic [LN-1:0] ax);
    logic [LN-1:0] hi, lo;
    hi = l[2*LN-1:LN];
    lo = l[LN-1:0];
    case (DIM)
      0:       return {hi, lo, ax};  // z = hi, y = lo, x = ax
      1:       return {hi, ax, lo};  // z = hi, y = ax, x = lo
      default: return {ax, hi, lo};  // z = ax, y = hi, x = lo
    endcase
  endfunction

  assign src_addr = addr_of(line, e);
  assign dst_addr = addr_of(line, e);
  assign dst_we   = (state == S_STORE);

  dwt97_1d #(.N(N)) u_dwt (
    .clk     (clk),
    .rst_n   (rst_n),
    .in_valid(state == S_LOAD),
    .in_data (src_rdata),
    .start   (state == S_RUN),
    .busy    (u_busy),
    .done    (u_done),
    .raddr   (k),
    .rdata   (dst_wdata)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      line  <= '0;
      k     <= '0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      case (state)
        S_IDLE: if (start) begin
          line  <= '0;
          k     <= '0;
          state <= S_LOAD;
        end
        S_LOAD: begin
          if (k == (LN+1)'(N - 1)) begin
            k     <= '0;
            state <= S_RUN;
          end else k <= k + 1;
        end
        S_RUN:  state <= S_WAIT;
        S_WAIT: if (u_done) state <= S_STORE;
        default: begin  // S_STORE
          if (k == (LN+1)'(N - 1)) begin
            k <= '0;
            if (line == '1) begin
              state <= S_IDLE;
              done  <= 1'b1;
            end else begin
              line  <= line + 1;
              state <= S_LOAD;
            end
          end else k <= k + 1;
        end
      endcase
    end
  end

  // handshake rule: the 1-D unit is loaded and started only while idle
  always_ff @(posedge clk) begin
    if (rst_n && (state == S_LOAD || state == S_RUN))
      assert (!u_busy) else $error("dwt3d_stage: 1-D unit busy");
  end

  assign busy = (state != S_IDLE);

endmodule
