// rls_array_receiver: MMSE adaptive-array receiver built around the
// systolic-array RLS processor.
//
// Every symbol period the NELEM antenna element outputs arrive together.
// Samples that belong to the unique word (x_uw = 1) go, with the known
// unique-word symbol as reference d, to the RLS processor, which estimates
// the array weights. Samples of the information sequence (x_uw = 0) are
// combined by the beamformer with the weights and decided by the QPSK
// detector.
//
// Weights become available only after the processor has flushed them, so
// the information samples pass through a delay line of INFO_DELAY clocks
// first; with the default, information samples that follow the unique word
// directly are combined with the weights estimated from that same unique
// word. The delay line, the switch on x_uw and the detector mapping are this
// design's choices.
//
// Interface: one element vector per clock with x_valid; the host port sets
// beta^2, the number of parameters and the unique-word length (see
// config_regs). A unique-word sample must not arrive while the processor is
// issuing flushing rows (uw_ready = 0); such a sample is dropped and counted
// in uw_dropped.
//
// Timing: the decided bits of an information sample are registered
// INFO_DELAY + 1 clock edges after the edge that takes the sample in.
module rls_array_receiver
  import rls_pkg::*;
#(
  parameter int unsigned NELEM      = 10,
  parameter int unsigned INFO_DELAY = 3 * NELEM + 4
) (
  input  logic        clk,
  input  logic        rst_n,
  // host settings
  input  logic        cfg_we,
  input  logic [1:0]  cfg_addr,
  input  logic [31:0] cfg_wdata,
  output logic [31:0] cfg_rdata,
  // antenna element outputs
  input  logic        x_valid,
  input  logic        x_uw,        // sample belongs to the unique word
  input  cplx_t       x     [NELEM],
  input  cplx_t       d_ref,       // known unique-word symbol
  output logic        uw_ready,
  output logic [15:0] uw_dropped,
  // results
  output cplx_t       w_out [NELEM],
  output logic        w_update,
  output cplx_t       err,
  output logic        err_valid,
  output cplx_t       y,
  output logic        y_valid,
  output logic [1:0]  bits,
  output logic        bits_valid
);

  logic  uw_valid, info_valid;
  cplx_t dl_x [INFO_DELAY][NELEM];
  logic  dl_v [INFO_DELAY];

  assign uw_valid   = x_valid &&  x_uw;
  assign info_valid = x_valid && !x_uw;

  rls_processor #(.NPARAM(NELEM)) u_rls (
    .clk, .rst_n,
    .cfg_we, .cfg_addr, .cfg_wdata, .cfg_rdata,
    .in_valid(uw_valid), .in_ready(uw_ready),
    .in_u(x), .in_d(d_ref),
    .w_out, .w_update, .err, .err_valid
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      uw_dropped <= '0;
      for (int k = 0; k < INFO_DELAY; k++) begin
        dl_v[k] <= 1'b0;
        for (int i = 0; i < NELEM; i++) dl_x[k][i] <= CPLX_ZERO;
      end
    end else begin
      if (uw_valid && !uw_ready) uw_dropped <= uw_dropped + 16'd1;
      dl_v[0] <= info_valid;
      dl_x[0] <= x;
      for (int k = 1; k < INFO_DELAY; k++) begin
        dl_v[k] <= dl_v[k-1];
        dl_x[k] <= dl_x[k-1];
      end
    end
  end

  beamformer #(.NELEM(NELEM)) u_bf (
    .clk, .rst_n,
    .w(w_out), .x(dl_x[INFO_DELAY-1]), .x_valid(dl_v[INFO_DELAY-1]),
    .y, .y_valid
  );

  qpsk_detector u_det (
    .clk, .rst_n,
    .y, .y_valid,
    .bits, .bits_valid
  );

endmodule
