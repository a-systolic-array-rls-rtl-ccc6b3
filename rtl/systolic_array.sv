// systolic_array: triangular square-root-free QR-RLS array for NPARAM
// complex parameters.
//
// Structure (row i = 0..NPARAM-1, column j = 0..NPARAM, column NPARAM being
// the reference signal d):
//   * boundary cell at (i,i), internal cells at (i,j) for j > i, so the
//     reference column holds one internal cell per row;
//   * u flows down the columns, s/z flow right along the rows;
//   * the scale delta enters boundary cell 0 as the constant 1 and runs down
//     the diagonal from boundary cell to boundary cell through a storage
//     element, and from the last boundary cell to the final cell;
//   * the final cell multiplies delta with the reference-column output and
//     gives the estimation error e.
//
// Input: one row per clock, already skewed: column j of a row must arrive j
// clocks after column 0, each with the row's tag (see input_skew). A row with
// u = 0 in some columns leaves those columns transparent, which is how fewer
// than NPARAM parameters are estimated.
//
// Output: e of a row is registered 2*NPARAM clock edges after the edge that
// takes in column 0 of that row (each cell and each storage element is one
// register stage), with the row's tag. Training rows give the a-posteriori error;
// a flushing row (tag.freeze) with u = unit vector i and d = 0 gives
// -conj(w_i) without changing any stored value.
module systolic_array
  import rls_pkg::*;
#(
  parameter int unsigned NPARAM = 10
) (
  input  logic  clk,
  input  logic  rst_n,
  input  fix_t  beta2,
  input  cplx_t col_in  [NPARAM+1],  // skewed row, index NPARAM = d
  input  tag_t  ctag_in [NPARAM+1],
  output cplx_t e_out,
  output tag_t  etag_out
);

  // Vertical links: input of row i, column j.
  cplx_t v_u [NPARAM+1][NPARAM+1];
  tag_t  v_t [NPARAM+1][NPARAM+1];
  // Horizontal links: s/z input of row i, column j.
  cplx_t h_s [NPARAM][NPARAM+2];
  cplx_t h_z [NPARAM][NPARAM+2];
  tag_t  h_t [NPARAM][NPARAM+2];
  // Diagonal: delta into boundary cell i (i = NPARAM: into the final cell).
  fix_t  dg_d [NPARAM+1];
  tag_t  dg_t [NPARAM+1];   // tag delivered with dg_d (unused for i = 0)
  // Boundary cell outputs before the storage element.
  fix_t  bd_d [NPARAM];
  tag_t  bd_t [NPARAM];

  assign dg_d[0] = FIX_ONE;
  assign dg_t[0] = TAG_NONE;

  for (genvar j = 0; j <= NPARAM; j++) begin : g_top
    assign v_u[0][j] = col_in[j];
    assign v_t[0][j] = ctag_in[j];
  end

  for (genvar i = 0; i < NPARAM; i++) begin : g_row
    assign h_s[i][0] = CPLX_ZERO;
    assign h_z[i][0] = CPLX_ZERO;
    assign h_t[i][0] = TAG_NONE;

    for (genvar j = 0; j <= NPARAM; j++) begin : g_col
      if (j < i) begin : g_none
        assign v_u[i+1][j]   = CPLX_ZERO;
        assign v_t[i+1][j]   = TAG_NONE;
        assign h_s[i][j+1]   = CPLX_ZERO;
        assign h_z[i][j+1]   = CPLX_ZERO;
        assign h_t[i][j+1]   = TAG_NONE;
      end else if (j == i) begin : g_bnd
        fix_t x_unused;
        boundary_cell u_bc (
          .clk, .rst_n, .beta2,
          .u_in     (v_u[i][i]),
          .tag_in   (v_t[i][i]),
          .delta_in (dg_d[i]),
          .s_out    (h_s[i][i+1]),
          .z_out    (h_z[i][i+1]),
          .tag_out  (h_t[i][i+1]),
          .delta_out(bd_d[i]),
          .x_out    (x_unused)
        );
        assign bd_t[i]     = h_t[i][i+1];
        assign v_u[i+1][i] = CPLX_ZERO;
        assign v_t[i+1][i] = TAG_NONE;

        storage_element u_se (
          .clk, .rst_n,
          .d_in   (bd_d[i]),
          .tag_in (bd_t[i]),
          .d_out  (dg_d[i+1]),
          .tag_out(dg_t[i+1])
        );
      end else begin : g_int
        cplx_t x_unused;
        internal_cell u_ic (
          .clk, .rst_n,
          .u_in    (v_u[i][j]),
          .utag_in (v_t[i][j]),
          .s_in    (h_s[i][j]),
          .z_in    (h_z[i][j]),
          .stag_in (h_t[i][j]),
          .u_out   (v_u[i+1][j]),
          .utag_out(v_t[i+1][j]),
          .s_out   (h_s[i][j+1]),
          .z_out   (h_z[i][j+1]),
          .stag_out(h_t[i][j+1]),
          .x_out   (x_unused)
        );
      end
    end
  end

  final_cell u_fc (
    .clk, .rst_n,
    .delta_in(dg_d[NPARAM]),
    .u_in    (v_u[NPARAM][NPARAM]),
    .tag_in  (v_t[NPARAM][NPARAM]),
    .e_out,
    .tag_out (etag_out)
  );

  // The diagonal delta must meet the row it belongs to.
  for (genvar i = 1; i <= NPARAM; i++) begin : g_chk
    a_diag_aligned: assert property (@(posedge clk) disable iff (!rst_n)
      v_t[i][i].valid |-> (dg_t[i] == v_t[i][i]));
  end

endmodule
