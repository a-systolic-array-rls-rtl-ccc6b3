// tb_beamformer: random weights and element samples; checks
// y = sum conj(w_i) x_i against a real-valued model, the one-clock latency
// and that y holds on idle clocks.
module tb_beamformer;
  import rls_pkg::*;
  import tb_rls_pkg::*;

  localparam int NE = 6;

  logic  clk = 1'b0;
  logic  rst_n = 1'b0;
  cplx_t w [NE];
  cplx_t x [NE];
  logic  x_valid;
  cplx_t y;
  logic  y_valid;

  int checks = 0, failures = 0;

  beamformer #(.NELEM(NE)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rc_t acc, yexp;
    x_valid = 1'b0;
    for (int i = 0; i < NE; i++) begin w[i] = CPLX_ZERO; x[i] = CPLX_ZERO; end
    yexp = rc(0.0, 0.0);
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      x_valid = ($urandom_range(3) != 0);
      acc = rc(0.0, 0.0);
      for (int i = 0; i < NE; i++) begin
        w[i] = rc2c(rc(urand(-2.0, 2.0), urand(-2.0, 2.0)));
        x[i] = rc2c(rc(urand(-1.0, 1.0), urand(-1.0, 1.0)));
        acc = rcadd(acc, rcmul(rcconj(c2rc(w[i])), c2rc(x[i])));
      end
      if (x_valid) yexp = acc;
      @(posedge clk);
      #1;
      checks++;
      if (y_valid != x_valid || !cnear(c2rc(y), yexp, 1e-4)) begin
        failures++;
        $display("FAIL n=%0d", n);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
