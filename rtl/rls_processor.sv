// rls_processor: the systolic-array RLS processor, from input samples and
// settings to the estimated weight vector.
//
// It estimates up to NPARAM complex parameters w minimising the
// exponentially weighted error |d(n) - w^H u(n)|^2 over a block of training
// (unique-word) samples, using a square-root-free QR-decomposition array,
// then reads the weights out by serial weight flushing.
//
// Data path: config_regs (host settings) -> flush_sequencer (training rows,
// then unit-vector flushing rows) -> input_skew -> systolic_array ->
// weight_collector (w_i = -conj(e_i)).
//
// Interface: `in_valid/in_ready` handshake for one (u, d) sample per clock;
// in_ready is low for num_param clocks while the flushing rows are issued.
// Host port: cfg_we/cfg_addr/cfg_wdata/cfg_rdata (see config_regs).
// Results: w_update pulses with the new weight vector on w_out; err/err_valid
// stream the a-posteriori errors of the training rows.
//
// Timing (in clock edges after the edge that accepts a sample): its
// a-posteriori error leaves on err 2*NPARAM+2 edges later; w_update is
// registered num_param + 2*NPARAM + 2 edges after the last training sample
// of an estimation was accepted. Input is accepted at one sample per clock
// except for the num_param clocks of flushing.
module rls_processor
  import rls_pkg::*;
#(
  parameter int unsigned NPARAM = 10
) (
  input  logic        clk,
  input  logic        rst_n,
  // host settings
  input  logic        cfg_we,
  input  logic [1:0]  cfg_addr,
  input  logic [31:0] cfg_wdata,
  output logic [31:0] cfg_rdata,
  // training samples
  input  logic        in_valid,
  output logic        in_ready,
  input  cplx_t       in_u [NPARAM],
  input  cplx_t       in_d,
  // results
  output cplx_t       w_out [NPARAM],
  output logic        w_update,
  output cplx_t       err,
  output logic        err_valid
);

  fix_t        beta2;
  logic [7:0]  num_param;
  logic [15:0] num_uw;
  cplx_t       row   [NPARAM+1];
  tag_t        rtag;
  cplx_t       col   [NPARAM+1];
  tag_t        ctag  [NPARAM+1];
  cplx_t       e;
  tag_t        etag;

  config_regs #(.NPARAM(NPARAM)) u_cfg (
    .clk, .rst_n,
    .we(cfg_we), .addr(cfg_addr), .wdata(cfg_wdata), .rdata(cfg_rdata),
    .beta2, .num_param, .num_uw
  );

  flush_sequencer #(.NPARAM(NPARAM)) u_seq (
    .clk, .rst_n, .num_param, .num_uw,
    .in_valid, .in_ready, .in_u, .in_d,
    .row_out(row), .tag_out(rtag)
  );

  input_skew #(.NCOL(NPARAM+1)) u_skew (
    .clk, .rst_n,
    .row_in(row), .tag_in(rtag),
    .col_out(col), .ctag_out(ctag)
  );

  systolic_array #(.NPARAM(NPARAM)) u_arr (
    .clk, .rst_n, .beta2,
    .col_in(col), .ctag_in(ctag),
    .e_out(e), .etag_out(etag)
  );

  weight_collector #(.NPARAM(NPARAM)) u_col (
    .clk, .rst_n,
    .e_in(e), .etag_in(etag),
    .w_out, .w_update, .err, .err_valid
  );

endmodule
