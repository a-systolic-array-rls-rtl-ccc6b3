// boundary_cell: diagonal cell of the square-root-free QR-RLS array.
//
// The cell keeps one real value x, the exponentially weighted energy of the
// column it sits on. For each valid row it takes the element u_in from above
// and the real scale delta_in from the cell above-left, and computes, as
// the array's algorithm prescribes:
//   if u_in = 0 or delta_in = 0:  x <- beta2*x, s = 0, z = u_in, delta_out = delta_in
//   otherwise:                    x' = beta2*x + delta_in*|u_in|^2,
//                                 c = beta2*x/x', s = delta_in*u_in/x',
//                                 z = u_in, delta_out = c*delta_in, x <- x'
// s and z go to the internal cells on the right, delta_out down the diagonal.
//
// Choices of this design: a row tagged `freeze` (weight flushing) leaves x
// untouched and passes z = u_in, s = 0, delta_out = delta_in; a row tagged
// `first` starts from x = 0 (exact initialisation). If x' rounds to zero or
// below in fixed point, the zero branch is taken so that nothing divides by
// zero.
//
// Timing: one row per clock; outputs are registered, one cycle after the
// inputs. Rows without `valid` change nothing and leave invalid outputs.
module boundary_cell
  import rls_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  fix_t  beta2,      // forgetting factor beta^2, 0 < beta2 <= 1
  input  cplx_t u_in,       // element from above
  input  tag_t  tag_in,     // tag of the row u_in belongs to
  input  fix_t  delta_in,   // from the diagonal
  output cplx_t s_out,      // rotation to the right
  output cplx_t z_out,      // data to the right (= u_in)
  output tag_t  tag_out,    // tag travelling with s/z and delta
  output fix_t  delta_out,  // down the diagonal
  output fix_t  x_out       // stored energy, for observation
);

  fix_t  x_q;
  fix_t  x_old, x_dec, x_new, x_nxt;
  cplx_t s_nxt;
  fix_t  d_nxt;
  logic  zero_branch;

  always_comb begin
    x_old = tag_in.first ? '0 : x_q;
    x_dec = fmul(beta2, x_old);
    x_new = fadd(x_dec, fmul(delta_in, cabs2(u_in)));
    zero_branch = cplx_is_zero(u_in) || (delta_in == '0) || (x_new <= '0);
    if (tag_in.freeze) begin
      x_nxt = x_q;
      s_nxt = CPLX_ZERO;
      d_nxt = delta_in;
    end else if (zero_branch) begin
      x_nxt = x_dec;
      s_nxt = CPLX_ZERO;
      d_nxt = delta_in;
    end else begin
      x_nxt    = x_new;
      s_nxt.re = fmuldiv(delta_in, u_in.re, x_new);
      s_nxt.im = fmuldiv(delta_in, u_in.im, x_new);
      // delta_out = c*delta_in with c = beta2*x/x'
      d_nxt    = fmul(fmuldiv(beta2, x_old, x_new), delta_in);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x_q       <= '0;
      s_out     <= CPLX_ZERO;
      z_out     <= CPLX_ZERO;
      delta_out <= '0;
      tag_out   <= TAG_NONE;
    end else begin
      tag_out <= tag_in;
      if (tag_in.valid) begin
        x_q       <= x_nxt;
        s_out     <= s_nxt;
        z_out     <= u_in;
        delta_out <= d_nxt;
      end
    end
  end

  assign x_out = x_q;

endmodule
