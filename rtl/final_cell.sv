// final_cell: the two-input multiplier at the foot of the QR-RLS array.
//
// It multiplies the real scale delta_in arriving down the diagonal with the
// complex element u_in leaving the reference column: e = delta_in * u_in.
// During training e is the a-posteriori estimation error; during weight
// flushing (delta_in = 1) it is -conj(w_i).
//
// Timing: registered output one cycle after a valid input; the row tag
// travels with e.
module final_cell
  import rls_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  fix_t  delta_in,
  input  cplx_t u_in,
  input  tag_t  tag_in,
  output cplx_t e_out,
  output tag_t  tag_out
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      e_out   <= CPLX_ZERO;
      tag_out <= TAG_NONE;
    end else begin
      tag_out <= tag_in;
      if (tag_in.valid) e_out <= rmul(delta_in, u_in);
    end
  end

endmodule
