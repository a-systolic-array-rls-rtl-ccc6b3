// input_skew: turns a row presented all at once into the staggered form the
// systolic array consumes.
//
// Column j (0..NCOL-1) of a row is delayed by j clocks, so that each column
// meets the s/z and delta values of the same row inside the array. Each
// column carries a copy of the row's tag, so rows may arrive with gaps.
// Delay lines are plain shift registers.
//
// Timing: column 0 passes straight through (no delay), column j appears j
// clocks after the row was presented.
module input_skew
  import rls_pkg::*;
#(
  parameter int unsigned NCOL = 11
) (
  input  logic  clk,
  input  logic  rst_n,
  input  cplx_t row_in  [NCOL],
  input  tag_t  tag_in,
  output cplx_t col_out [NCOL],
  output tag_t  ctag_out[NCOL]
);

  assign col_out[0]  = row_in[0];
  assign ctag_out[0] = tag_in;

  for (genvar j = 1; j < NCOL; j++) begin : g_col
    cplx_t dl_d [j];
    tag_t  dl_t [j];
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        for (int k = 0; k < j; k++) begin
          dl_d[k] <= CPLX_ZERO;
          dl_t[k] <= TAG_NONE;
        end
      end else begin
        dl_d[0] <= row_in[j];
        dl_t[0] <= tag_in;
        for (int k = 1; k < j; k++) begin
          dl_d[k] <= dl_d[k-1];
          dl_t[k] <= dl_t[k-1];
        end
      end
    end
    assign col_out[j]  = dl_d[j-1];
    assign ctag_out[j] = dl_t[j-1];
  end

endmodule
