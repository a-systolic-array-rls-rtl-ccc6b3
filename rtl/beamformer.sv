// beamformer: the adaptive-array combiner of the receiver. Each antenna
// element output is multiplied by its weight and the products are summed:
//   y = sum_i conj(w_i) * x_i = w^H x,
// the same combination whose error the RLS processor minimises during
// training (e = d - w^H u). Sums saturate to the word range.
//
// Timing: y is registered, one clock after a valid input; y_valid follows
// x_valid with that delay. The weights are used as they are at the input
// clock.
module beamformer
  import rls_pkg::*;
#(
  parameter int unsigned NELEM = 10
) (
  input  logic  clk,
  input  logic  rst_n,
  input  cplx_t w     [NELEM],
  input  cplx_t x     [NELEM],
  input  logic  x_valid,
  output cplx_t y,
  output logic  y_valid
);

  cplx_t acc;

  always_comb begin
    acc = CPLX_ZERO;
    for (int i = 0; i < NELEM; i++) acc = cadd(acc, cmul_conj(w[i], x[i]));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      y       <= CPLX_ZERO;
      y_valid <= 1'b0;
    end else begin
      y_valid <= x_valid;
      if (x_valid) y <= acc;
    end
  end

endmodule
