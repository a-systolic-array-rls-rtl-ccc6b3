// qpsk_detector: hard decision on the combined QPSK signal.
//
// The symbol is decided by quadrant: bit 0 is set when the in-phase part is
// negative, bit 1 when the quadrature part is negative (a Gray mapping, one
// bit per axis; the mapping is this design's choice). Zero counts as
// positive.
//
// Timing: registered, one clock after a valid input.
module qpsk_detector
  import rls_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  cplx_t      y,
  input  logic       y_valid,
  output logic [1:0] bits,
  output logic       bits_valid
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bits       <= '0;
      bits_valid <= 1'b0;
    end else begin
      bits_valid <= y_valid;
      if (y_valid) bits <= {y.im[DATA_W-1], y.re[DATA_W-1]};
    end
  end

endmodule
