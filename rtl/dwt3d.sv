// dwt3d: one-level 3-D discrete wavelet transform of an N x N x N block of
// video (N frames of N x N pixels, default 8 x 8 x 8) with the 9/7 lifting
// filter.
//
// The 3-D transform is three 1-D transforms, one along each axis: x and y
// inside a frame, then z across frames (time). Each axis has its own 1-D
// 9/7 unit (dwt3d_stage / dwt97_1d), and intermediate memories between them
// reorder the samples, because the second and third axes need the first
// axis's results in a different order:
//   input memory -> x stage -> memory X -> y stage -> memory Y -> z stage -> output memory
// The result is eight sub-bands stored as octants of the output volume:
// an axis coordinate below N/2 is the low (L) band of that axis, at or above
// N/2 the high (H) band. For example LLL is x, y, z < N/2 and HHH is
// x, y, z >= N/2.
//
// Interface: the host writes the input volume through `in_we`/`in_addr`/
// `in_data` (address z*N*N + y*N + x) while `busy` is low, pulses `start`,
// waits for `done`, and reads the result through `out_addr`/`out_data`
// (asynchronous read). The three stages run one after the other on one
// volume. Timing: 3 * N*N lines of 2N + 1 + L cycles each (N to load, one
// to start, L for the 1-D transform, N to store) plus 4 cycles of hand-over;
// L = (3N/2 + 4)*(CW + 4) + 7 = 343 cycles for N = 8, so a block takes
// 69,124 cycles. The three-stage structure with
// intermediate memories follows the described architecture; memory layout,
// the host ports and the stage hand-over are this design's choices.
module dwt3d
  import dwt_pkg::*;
#(
  parameter int N     = 8,
  parameter int LN    = $clog2(N),
  parameter int AW    = 3 * LN,
  parameter int DEPTH = N * N * N
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_we,
  input  logic [AW-1:0] in_addr,
  input  sample_t       in_data,
  input  logic          start,
  output logic          busy,
  output logic          done,
  input  logic [AW-1:0] out_addr,
  output sample_t       out_data
);

  typedef enum logic [1:0] {S_IDLE, S_X, S_Y, S_Z} state_e;

  state_e        state;
  logic [2:0]    st_start, st_busy, st_done;
  logic [AW-1:0] src_addr [3];
  logic [AW-1:0] dst_addr [3];
  sample_t       src_data [3];
  sample_t       dst_data [3];
  logic [2:0]    dst_we;
  sample_t       unused_rd [4];

  // memory 0: input volume (host writes on B, x stage reads on A)
  bank_mem #(.DEPTH(DEPTH), .AW(AW)) u_mem_in (
    .clk(clk),
    .we_a(1'b0), .addr_a(src_addr[0]), .wdata_a('0), .rdata_a(src_data[0]),
    .we_b(in_we), .addr_b(in_addr), .wdata_b(in_data), .rdata_b(unused_rd[0])
  );
  // memory 1: after x (x stage writes on B, y stage reads on A)
  bank_mem #(.DEPTH(DEPTH), .AW(AW)) u_mem_x (
    .clk(clk),
    .we_a(1'b0), .addr_a(src_addr[1]), .wdata_a('0), .rdata_a(src_data[1]),
    .we_b(dst_we[0]), .addr_b(dst_addr[0]), .wdata_b(dst_data[0]), .rdata_b(unused_rd[1])
  );
  // memory 2: after y (y stage writes on B, z stage reads on A)
  bank_mem #(.DEPTH(DEPTH), .AW(AW)) u_mem_y (
    .clk(clk),
    .we_a(1'b0), .addr_a(src_addr[2]), .wdata_a('0), .rdata_a(src_data[2]),
    .we_b(dst_we[1]), .addr_b(dst_addr[1]), .wdata_b(dst_data[1]), .rdata_b(unused_rd[2])
  );
  // memory 3: output sub-bands (z stage writes on B, host reads on A)
  bank_mem #(.DEPTH(DEPTH), .AW(AW)) u_mem_out (
    .clk(clk),
    .we_a(1'b0), .addr_a(out_addr), .wdata_a('0), .rdata_a(out_data),
    .we_b(dst_we[2]), .addr_b(dst_addr[2]), .wdata_b(dst_data[2]), .rdata_b(unused_rd[3])
  );

  for (genvar d = 0; d < 3; d++) begin : g_stage
    dwt3d_stage #(.N(N), .DIM(d), .LN(LN), .AW(AW)) u_stage (
      .clk      (clk),
      .rst_n    (rst_n),
      .start    (st_start[d]),
      .busy     (st_busy[d]),
      .done     (st_done[d]),
      .src_addr (src_addr[d]),
      .src_rdata(src_data[d]),
      .dst_we   (dst_we[d]),
      .dst_addr (dst_addr[d]),
      .dst_wdata(dst_data[d])
    );
  end

  always_comb begin
    st_start    = '0;
    st_start[0] = (state == S_IDLE) && start;
    st_start[1] = (state == S_X) && st_done[0];
    st_start[2] = (state == S_Y) && st_done[1];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      case (state)
        S_IDLE: if (start) state <= S_X;
        S_X:    if (st_done[0]) state <= S_Y;
        S_Y:    if (st_done[1]) state <= S_Z;
        default: if (st_done[2]) begin state <= S_IDLE; done <= 1'b1; end
      endcase
    end
  end

  assign busy = (state != S_IDLE) || (|st_busy);

endmodule
