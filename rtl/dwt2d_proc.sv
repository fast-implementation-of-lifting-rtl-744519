// dwt2d_proc: multilevel 2-D lifting DWT and IDWT processor, row-column,
// one level at a time, working in place on an N x N frame memory.
//
// One level of the forward transform filters every row with a predict and
// an update lifting step,
//   h(i) = x(2i+1) + alpha*(x(2i) + x(2i+2)),   l(i) = x(2i) + beta*(h(i) + h(i-1)),
// and stores each row as [l | h]. It then filters every column the same way:
// the left (L) half gives lh (predict) and ll (update), the right (H) half gives
// hh (predict) and hl (update). The frame ends up in the usual quadrant layout
// (ll top-left, hl top-right, lh bottom-left, hh bottom-right). Each further
// level repeats this on the ll quadrant, whose side is halved. The inverse
// transform runs the levels in reverse order, columns first, undoing update
// then predict (x(2i) = l(i) - beta*(...), x(2i+1) = h(i) - alpha*(...)), which
// restores the frame exactly because each lifting step is inverted with the
// same rounded product.
//
// Processors: one lift_line for rows (its two elements are the two row
// processors, predict and update) and two lift_line for columns (four column
// processors: lh, ll on an L column and hh, hl on the matching H column, run
// side by side on memory ports A and B). A line is read from memory into a
// processor, lifted, and written back (de)interleaved. Rows and columns are
// processed one after the other, not overlapped.
//
// Interface: `start` with `inverse` (0 = DWT, 1 = IDWT) and `levels`
// (1 .. log2(N)-1) begins; `busy` is high until `done` pulses. The two memory
// ports drive a two-port memory with asynchronous read (address row*N + col).
// Timing: a line of n samples costs 2n + 4 + (n/2 + 2)*(CW + 4) cycles (n to
// read it, n to write it back, n/2 + 2 lifting steps of CW + 4 cycles, four
// cycles of control). A level of side n has n row lines and n/2 column line
// pairs; a run takes one cycle more than the sum over its levels. The structure (two row and
// four column processors, equations, multilevel in-place operation) follows
// the described architecture; line buffering, memory order, symmetric
// extension at the edges and the non-overlapped schedule are this design's
// choices.
module dwt2d_proc
  import dwt_pkg::*;
#(
  parameter int N  = 512,
  parameter int LN = $clog2(N),
  parameter int NW = LN + 1,
  parameter int AW = 2 * LN
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic          inverse,
  input  logic [3:0]    levels,
  output logic          busy,
  output logic          done,
  // memory port A (rows, and L columns)
  output logic          we_a,
  output logic [AW-1:0] addr_a,
  output sample_t       wdata_a,
  input  sample_t       rdata_a,
  // memory port B (H columns)
  output logic          we_b,
  output logic [AW-1:0] addr_b,
  output sample_t       wdata_b,
  input  sample_t       rdata_b
);

  typedef enum logic [2:0] {S_IDLE, S_LOAD, S_RUN, S_WAIT, S_UNLOAD, S_NEXT} state_e;

  state_e        state;
  logic          inv_q;
  logic [3:0]    lev_q, lv;
  logic          col_pass;
  logic [NW-1:0] line, k, n, half, nlines;
  logic [NW-1:0] e_load, e_store, e;
  logic [NW-1:0] pos_k;
  logic          rdone_q, ldone_q, hdone_q;

  logic          row_busy, row_done, cl_busy, cl_done, ch_busy, ch_done;
  sample_t       row_rd, cl_rd, ch_rd;
  logic          sh_row, sh_col, st_row, st_col;
  line_op_e      op;

  assign n      = NW'(N) >> lv;
  assign half   = n >> 1;
  assign nlines = col_pass ? half : n;
  assign pos_k  = k[0] ? half + (k >> 1) : (k >> 1);
  assign e_load  = inv_q ? pos_k : k;
  assign e_store = inv_q ? k : pos_k;
  assign e       = (state == S_UNLOAD) ? e_store : e_load;
  assign op      = inv_q ? OP_INV : OP_FWD;

  // memory addressing: row r, column c -> r*N + c
  always_comb begin
    if (col_pass) begin
      addr_a = {e[LN-1:0], line[LN-1:0]};
      addr_b = {e[LN-1:0], LN'(line + half)};
    end else begin
      addr_a = {line[LN-1:0], e[LN-1:0]};
      addr_b = addr_a;
    end
  end

  assign we_a    = (state == S_UNLOAD);
  assign we_b    = (state == S_UNLOAD) && col_pass;
  assign wdata_a = col_pass ? cl_rd : row_rd;
  assign wdata_b = ch_rd;

  assign sh_row = (state == S_LOAD) && !col_pass;
  assign sh_col = (state == S_LOAD) && col_pass;
  assign st_row = (state == S_RUN) && !col_pass;
  assign st_col = (state == S_RUN) && col_pass;

  lift_line #(.MAXN(N), .NW(NW)) u_row (
    .clk(clk), .rst_n(rst_n), .n(n),
    .shift_in(sh_row), .din(rdata_a),
    .start(st_row), .op(op), .coef1(C_ALPHA), .coef2(C_BETA),
    .busy(row_busy), .done(row_done),
    .raddr(k), .rdata(row_rd)
  );

  lift_line #(.MAXN(N), .NW(NW)) u_col_l (
    .clk(clk), .rst_n(rst_n), .n(n),
    .shift_in(sh_col), .din(rdata_a),
    .start(st_col), .op(op), .coef1(C_ALPHA), .coef2(C_BETA),
    .busy(cl_busy), .done(cl_done),
    .raddr(k), .rdata(cl_rd)
  );

  lift_line #(.MAXN(N), .NW(NW)) u_col_h (
    .clk(clk), .rst_n(rst_n), .n(n),
    .shift_in(sh_col), .din(rdata_b),
    .start(st_col), .op(op), .coef1(C_ALPHA), .coef2(C_BETA),
    .busy(ch_busy), .done(ch_done),
    .raddr(k), .rdata(ch_rd)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      inv_q    <= 1'b0;
      lev_q    <= 4'd1;
      lv       <= '0;
      col_pass <= 1'b0;
      line     <= '0;
      k        <= '0;
      rdone_q  <= 1'b0;
      ldone_q  <= 1'b0;
      hdone_q  <= 1'b0;
      done     <= 1'b0;
    end else begin
      done <= 1'b0;
      case (state)
        S_IDLE: if (start) begin
          inv_q    <= inverse;
          lev_q    <= levels;
          lv       <= inverse ? levels - 4'd1 : 4'd0;
          col_pass <= inverse;
          line     <= '0;
          k        <= '0;
          state    <= S_LOAD;
        end
        S_LOAD: begin
          if (k == n - 1) begin
            k     <= '0;
            state <= S_RUN;
          end else begin
            k <= k + 1;
          end
        end
        S_RUN: begin
          rdone_q <= 1'b0;
          ldone_q <= 1'b0;
          hdone_q <= 1'b0;
          state   <= S_WAIT;
        end
        S_WAIT: begin
          if (row_done) rdone_q <= 1'b1;
          if (cl_done)  ldone_q <= 1'b1;
          if (ch_done)  hdone_q <= 1'b1;
          if (col_pass ? (ldone_q && hdone_q) : rdone_q) state <= S_UNLOAD;
        end
        S_UNLOAD: begin
          if (k == n - 1) begin
            k     <= '0;
            state <= S_NEXT;
          end else begin
            k <= k + 1;
          end
        end
        default: begin  // S_NEXT
          if (line != nlines - 1) begin
            line  <= line + 1;
            state <= S_LOAD;
          end else begin
            line <= '0;
            if (col_pass != inv_q) begin
              // second pass of this level finished
              if (inv_q ? (lv == 0) : (lv == lev_q - 1)) begin
                state <= S_IDLE;
                done  <= 1'b1;
              end else begin
                lv       <= inv_q ? lv - 1 : lv + 1;
                col_pass <= inv_q;
                state    <= S_LOAD;
              end
            end else begin
              col_pass <= !col_pass;
              state    <= S_LOAD;
            end
          end
        end
      endcase
    end
  end

  // handshake rule: lines are loaded into and started on idle processors only
  always_ff @(posedge clk) begin
    if (rst_n && (state == S_LOAD || state == S_RUN))
      assert (!row_busy && !cl_busy && !ch_busy) else $error("dwt2d_proc: line processor busy");
  end

  assign busy = (state != S_IDLE);

endmodule
