// dwt_idwt_top: lifting-based wavelet transform IP with a 2-D DWT/IDWT for
// images and a 3-D DWT for video blocks.
//
// 2-D part: an N2D x N2D frame memory (default 512 x 512, 16-bit samples)
// and the multilevel 2-D lifting processor (two row and four column
// processors, all built on BZ-FAD multipliers). The host loads an image
// through the image write port, starts a forward (`inverse` = 0) or inverse
// (`inverse` = 1) transform of `levels` levels, and reads the frame back
// through the image read port; the transform is done in place, so a forward
// run leaves the sub-bands in the frame memory and an inverse run on them
// restores the image. The host ports reach the frame memory only while the
// processor is idle (`busy2d` low).
//
// 3-D part: a one-level 3-D 9/7 DWT of an N3D x N3D x N3D block (default
// 8 x 8 x 8) with its own input, intermediate and output memories. It runs
// independently of the 2-D part.
//
// Interface timing: all memory reads are asynchronous (data follows the
// address in the same cycle), writes happen at the rising clock edge.
// `start2d`/`start3d` are one-cycle pulses accepted while the matching busy
// is low, `done2d`/`done3d` pulse once when a run finishes. Sizes follow the
// 512 x 512 image and the 8 x 8 x 8 video block; the port structure and the
// sharing of one processor for DWT and IDWT are this design's choices.
module dwt_idwt_top
  import dwt_pkg::*;
#(
  parameter int N2D  = 512,
  parameter int N3D  = 8,
  parameter int AW2D = 2 * $clog2(N2D),
  parameter int AW3D = 3 * $clog2(N3D)
) (
  input  logic            clk,
  input  logic            rst_n,
  // 2-D DWT / IDWT
  input  logic            img_we,
  input  logic [AW2D-1:0] img_waddr,
  input  sample_t         img_wdata,
  input  logic [AW2D-1:0] img_raddr,
  output sample_t         img_rdata,
  input  logic            start2d,
  input  logic            inverse,
  input  logic [3:0]      levels,
  output logic            busy2d,
  output logic            done2d,
  // 3-D DWT
  input  logic            vol_we,
  input  logic [AW3D-1:0] vol_waddr,
  input  sample_t         vol_wdata,
  input  logic [AW3D-1:0] vol_raddr,
  output sample_t         vol_rdata,
  input  logic            start3d,
  output logic            busy3d,
  output logic            done3d
);

  logic            p_we_a, p_we_b;
  logic [AW2D-1:0] p_addr_a, p_addr_b;
  sample_t         p_wdata_a, p_wdata_b, rdata_a, rdata_b;

  dwt2d_proc #(.N(N2D)) u_dwt2d (
    .clk    (clk),
    .rst_n  (rst_n),
    .start  (start2d),
    .inverse(inverse),
    .levels (levels),
    .busy   (busy2d),
    .done   (done2d),
    .we_a   (p_we_a),
    .addr_a (p_addr_a),
    .wdata_a(p_wdata_a),
    .rdata_a(rdata_a),
    .we_b   (p_we_b),
    .addr_b (p_addr_b),
    .wdata_b(p_wdata_b),
    .rdata_b(rdata_b)
  );

  // frame memory: processor on both ports while busy, host otherwise
  // (host writes on port A, host reads on port B)
  bank_mem #(.DEPTH(N2D * N2D), .AW(AW2D)) u_frame (
    .clk    (clk),
    .we_a   (busy2d ? p_we_a : img_we),
    .addr_a (busy2d ? p_addr_a : img_waddr),
    .wdata_a(busy2d ? p_wdata_a : img_wdata),
    .rdata_a(rdata_a),
    .we_b   (busy2d && p_we_b),
    .addr_b (busy2d ? p_addr_b : img_raddr),
    .wdata_b(p_wdata_b),
    .rdata_b(rdata_b)
  );

  assign img_rdata = rdata_b;

  dwt3d #(.N(N3D)) u_dwt3d (
    .clk     (clk),
    .rst_n   (rst_n),
    .in_we   (vol_we),
    .in_addr (vol_waddr),
    .in_data (vol_wdata),
    .start   (start3d),
    .busy    (busy3d),
    .done    (done3d),
    .out_addr(vol_raddr),
    .out_data(vol_rdata)
  );

endmodule
