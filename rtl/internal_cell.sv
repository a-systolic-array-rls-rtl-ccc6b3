// internal_cell: off-diagonal cell of the square-root-free QR-RLS array.
//
// The cell keeps one complex value x (an element of the unit upper triangular
// factor, or of the transformed reference in the last column). For each
// valid row it takes u_in from above and the pair s, z from the left and
// computes, as the array's algorithm prescribes:
//   u_out = u_in - z*x        (sent down)
//   x    <- conj(s)*u_out + x (stored)
// s and z are passed on unchanged to the right.
//
// Choices of this design: a row tagged `freeze` (weight flushing) computes
// u_out but leaves x untouched; a row tagged `first` starts from x = 0.
// The tag arrives twice, with u_in and with s/z; both copies belong to the
// same row, which an assertion checks, and the cell acts on the copy from
// above.
//
// Timing: one row per clock; all outputs registered, one cycle after the
// inputs.
module internal_cell
  import rls_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  cplx_t u_in,
  input  tag_t  utag_in,
  input  cplx_t s_in,
  input  cplx_t z_in,
  input  tag_t  stag_in,
  output cplx_t u_out,
  output tag_t  utag_out,
  output cplx_t s_out,
  output cplx_t z_out,
  output tag_t  stag_out,
  output cplx_t x_out     // stored value, for observation
);

  cplx_t x_q, x_old, uo_nxt, x_nxt;

  always_comb begin
    x_old  = utag_in.first ? CPLX_ZERO : x_q;
    uo_nxt = csub(u_in, cmul(z_in, x_old));
    x_nxt  = utag_in.freeze ? x_q : cadd(cmul_conj(s_in, uo_nxt), x_old);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x_q      <= CPLX_ZERO;
      u_out    <= CPLX_ZERO;
      s_out    <= CPLX_ZERO;
      z_out    <= CPLX_ZERO;
      utag_out <= TAG_NONE;
      stag_out <= TAG_NONE;
    end else begin
      utag_out <= utag_in;
      stag_out <= stag_in;
      if (utag_in.valid) begin
        x_q   <= x_nxt;
        u_out <= uo_nxt;
        s_out <= s_in;
        z_out <= z_in;
      end
    end
  end

  assign x_out = x_q;

  // Data from above and from the left must belong to the same row.
  a_rows_aligned: assert property (@(posedge clk) disable iff (!rst_n)
    utag_in.valid |-> (stag_in == utag_in));

endmodule
