// weight_collector: reads the estimation results off the array output.
//
// During weight flushing the array output for unit-vector row i is
// e = -conj(w_i), so w_i = -conj(e). The collector numbers the flushed
// outputs 0, 1, ... of an estimation, stores w_i in a shadow vector and,
// on the output tagged `last`, publishes the whole weight vector at once
// (w_update pulses for one clock; w_out holds until the next update).
// Entries beyond the number of flushed rows read as zero. Outputs of
// training rows are passed out as the a-posteriori error stream.
//
// Timing: w_out/w_update and err/err_valid are registered, one clock after
// the array output.
module weight_collector
  import rls_pkg::*;
#(
  parameter int unsigned NPARAM = 10
) (
  input  logic  clk,
  input  logic  rst_n,
  input  cplx_t e_in,
  input  tag_t  etag_in,
  output cplx_t w_out [NPARAM],
  output logic  w_update,
  output cplx_t err,
  output logic  err_valid
);

  localparam int unsigned IW = $clog2(NPARAM + 1);

  cplx_t         shadow [NPARAM];
  cplx_t         w_now;
  logic [IW-1:0] idx_q;

  assign w_now = cneg_conj(e_in);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      idx_q     <= '0;
      w_update  <= 1'b0;
      err       <= CPLX_ZERO;
      err_valid <= 1'b0;
      for (int i = 0; i < NPARAM; i++) begin
        shadow[i] <= CPLX_ZERO;
        w_out[i]  <= CPLX_ZERO;
      end
    end else begin
      w_update  <= 1'b0;
      err_valid <= 1'b0;
      if (etag_in.valid && !etag_in.freeze) begin
        err       <= e_in;
        err_valid <= 1'b1;
        idx_q     <= '0;
      end
      if (etag_in.valid && etag_in.freeze) begin
        for (int i = 0; i < NPARAM; i++) begin
          if (i == int'(idx_q)) shadow[i] <= w_now;
          else if (idx_q == 0)  shadow[i] <= CPLX_ZERO;
        end
        idx_q <= idx_q + 1'b1;
        if (etag_in.last) begin
          idx_q    <= '0;
          w_update <= 1'b1;
          for (int i = 0; i < NPARAM; i++) begin
            if (i == int'(idx_q))     w_out[i] <= w_now;
            else if (i > int'(idx_q)) w_out[i] <= CPLX_ZERO;
            else                      w_out[i] <= shadow[i];
          end
        end
      end
    end
  end

endmodule
