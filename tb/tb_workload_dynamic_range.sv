// tb_workload_dynamic_range: accuracy of the 32-bit fixed-point processor
// against floating point, on the kind of data used to choose the word
// format: random inputs whose amplitudes spread uniformly (in dB) over a
// 40 dB range with uniformly distributed phase. Each of 20 trials
// estimates 10 parameters from 31 training samples (41 rows with flushing)
// at beta^2 = 0.99. The fixed-point weights must lie within 5% (relative
// vector error) of the real-valued least-squares solution. The number of
// clocks from the first sample to the published weights (62) is checked
// too.
module tb_workload_dynamic_range;
  import rls_pkg::*;
  import tb_rls_pkg::*;

  localparam int  N      = 10;
  localparam int  NUW    = 31;
  localparam int  TRIALS = 20;
  localparam real PI     = 3.14159265358979;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        cfg_we;
  logic [1:0]  cfg_addr;
  logic [31:0] cfg_wdata, cfg_rdata;
  logic        in_valid, in_ready;
  cplx_t       in_u [N];
  cplx_t       in_d;
  cplx_t       w_out [N];
  logic        w_update;
  cplx_t       err;
  logic        err_valid;

  int checks = 0, failures = 0;
  int cyc = 0, upd_cyc = 0, n_upd = 0;

  rls_processor dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && w_update) begin
      n_upd++;
      upd_cyc = cyc;
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at cycle %0d", what, cyc);
    end
  endtask

  // amplitude uniform in dB over [-40, 0] dB, phase uniform
  function automatic rc_t sample40();
    real a, ph;
    a = 10.0 ** (-2.0 * urand(0.0, 1.0));
    ph = 2.0 * PI * urand(0.0, 1.0);
    return rc(a * $cos(ph), a * $sin(ph));
  endfunction

  rc_t U[MAXROW][MAXN];
  rc_t D[MAXROW];

  initial begin
    real worst;
    worst = 0.0;
    cfg_we = 1'b0; cfg_addr = '0; cfg_wdata = '0;
    in_valid = 1'b0; in_d = CPLX_ZERO;
    for (int j = 0; j < N; j++) in_u[j] = CPLX_ZERO;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int tr = 0; tr < TRIALS; tr++) begin
      rc_t xt[MAXN], x[MAXN];
      int  first_acc, u0;
      real num, den, rel;
      for (int j = 0; j < N; j++) xt[j] = sample40();
      for (int k = 0; k < NUW; k++) begin
        rc_t acc;
        acc = rcscale(0.1, sample40());
        for (int j = 0; j < N; j++) begin
          U[k][j] = c2rc(rc2c(sample40()));
          acc = rcadd(acc, rcmul(xt[j], U[k][j]));
        end
        D[k] = c2rc(rc2c(acc));
      end
      ls_ref(N, NUW, f2r(r2f(0.99)), U, D, x);
      u0 = n_upd;
      for (int k = 0; k < NUW; k++) begin
        @(negedge clk);
        in_valid = 1'b1;
        for (int j = 0; j < N; j++) in_u[j] = rc2c(U[k][j]);
        in_d = rc2c(D[k]);
        @(posedge clk);
        if (k == 0) first_acc = cyc;
        check(in_ready, "sample accepted");
      end
      @(negedge clk);
      in_valid = 1'b0;
      wait (n_upd == u0 + 1);
      @(negedge clk);
      // clocks from the edge accepting the first sample to the edge
      // registering w_update (upd_cyc is sampled one edge later)
      check(upd_cyc - 1 - first_acc == (NUW - 1) + N + 2 * N + 2, "clocks per estimation");
      num = 0.0; den = 0.0;
      for (int i = 0; i < N; i++) begin
        rc_t dlt, wexp;
        wexp = rcconj(x[i]);
        dlt = rcsub(c2rc(w_out[i]), wexp);
        num += dlt.re * dlt.re + dlt.im * dlt.im;
        den += wexp.re * wexp.re + wexp.im * wexp.im;
      end
      rel = $sqrt(num / den);
      if (rel > worst) worst = rel;
      check(rel < 0.05, "relative weight error below 5%");
    end
    $display("worst relative weight error over %0d trials: %f", TRIALS, worst);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
