// tb_rls_processor: the processor at its default size (10 parameters).
// Settings are written over the host port, training samples are offered one
// per clock through the in_valid/in_ready handshake, and each published
// weight vector is compared with the exponentially weighted least-squares
// solution computed here in real arithmetic (w = conj(x), x solving the
// normal equations). Three estimations: 10 parameters / 31 samples /
// beta^2 = 0.99; 4 parameters / 20 samples / beta^2 = 0.95; 10 parameters /
// 41 samples. Also checked: the count of a-posteriori errors, the clocks
// in_ready is low, and the clock at which w_update is registered.
module tb_rls_processor;
  import rls_pkg::*;
  import tb_rls_pkg::*;

  localparam int N = 10;

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
  int cyc = 0;
  int n_err = 0, n_upd = 0, n_notready = 0, upd_cyc = 0;

  rls_processor dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && err_valid) n_err++;
    if (rst_n && !in_ready) n_notready++;
    if (rst_n && w_update) begin
      n_upd++;
      upd_cyc = cyc;   // value before this edge's increment
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

  task automatic cfg(logic [1:0] a, logic [31:0] d);
    @(negedge clk);
    cfg_we = 1'b1; cfg_addr = a; cfg_wdata = d;
    @(negedge clk);
    cfg_we = 1'b0;
  endtask

  rc_t U[MAXROW][MAXN];
  rc_t D[MAXROW];

  task automatic estimate(int np, int nuw, real b2);
    rc_t xt[MAXN];
    rc_t x[MAXN];
    int  last_acc, e0, u0, nr0;
    cfg(2'd0, 32'(r2f(b2)));
    cfg(2'd1, 32'(np));
    cfg(2'd2, 32'(nuw));
    for (int j = 0; j < N; j++) xt[j] = rc(urand(-1.0, 1.0), urand(-1.0, 1.0));
    for (int k = 0; k < nuw; k++) begin
      rc_t acc;
      acc = rc(urand(-0.3, 0.3), urand(-0.3, 0.3));
      for (int j = 0; j < N; j++) begin
        U[k][j] = c2rc(rc2c(rc(urand(-1.0, 1.0), urand(-1.0, 1.0))));
        if (j < np) acc = rcadd(acc, rcmul(xt[j], U[k][j]));
      end
      D[k] = c2rc(rc2c(acc));
    end
    ls_ref(np, nuw, f2r(r2f(b2)), U, D, x);
    e0 = n_err; u0 = n_upd; nr0 = n_notready;
    for (int k = 0; k < nuw; k++) begin
      @(negedge clk);
      in_valid = 1'b1;
      for (int j = 0; j < N; j++) in_u[j] = rc2c(U[k][j]);
      in_d = rc2c(D[k]);
      @(posedge clk);
      while (!in_ready) @(posedge clk);
      last_acc = cyc;     // cycle count before the accepting edge
    end
    @(negedge clk);
    in_valid = 1'b0;
    wait (n_upd == u0 + 1);
    @(negedge clk);
    // upd_cyc is sampled on the edge after the one that registered w_update
    check(upd_cyc - 1 - last_acc == np + 2 * N + 2, "weight latency");
    check(n_notready - nr0 == np, "in_ready low for num_param clocks");
    repeat (3) @(negedge clk);
    check(n_err - e0 == nuw, "error count");
    check(n_upd == u0 + 1, "one update");
    for (int i = 0; i < N; i++) begin
      rc_t wexp;
      wexp = (i < np) ? rcconj(x[i]) : rc(0.0, 0.0);
      check(cnear(c2rc(w_out[i]), wexp, 5e-3), "weight");
      if (!cnear(c2rc(w_out[i]), wexp, 5e-3))
        $display("  w[%0d] got %f %f exp %f %f", i, f2r(w_out[i].re), f2r(w_out[i].im),
                 wexp.re, wexp.im);
    end
  endtask

  initial begin
    cfg_we = 1'b0; cfg_addr = '0; cfg_wdata = '0;
    in_valid = 1'b0; in_d = CPLX_ZERO;
    for (int j = 0; j < N; j++) in_u[j] = CPLX_ZERO;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    cfg_addr = 2'd2; #1;
    check(cfg_rdata == 31, "default unique-word length");
    estimate(10, 31, 0.99);
    estimate(4, 20, 0.95);
    estimate(10, 41, 0.99);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
