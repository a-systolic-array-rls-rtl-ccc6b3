// tb_rls_array_receiver: end-to-end test of the adaptive-array receiver at
// its default size (10 elements), no parameter overrides.
//
// A QPSK burst system is modelled in real arithmetic: each frame has a
// 31-symbol unique word followed by 384 information symbols. One desired
// user arrives from 0 degrees and three interferers of equal power from 10,
// 30 and 40 degrees on a half-wavelength linear array; each user gets a new
// random complex path gain per frame, and Gaussian noise is added. Frames use
// 8, 4, 2, 1 and 10 elements (the number of parameters is written over the
// host port, the other elements are ignored) and beta^2 = 0.99.
//
// Checks per frame: the weight vector against the least-squares solution
// computed here; every detected symbol against the decision made with those
// reference weights (where the reference is not within a small margin of a
// decision boundary), which also shows that each frame's information part is
// combined with the weights of its own unique word; and the bit error count
// for frames with at least 4 elements. Each mechanism of the design is
// counted and must occur: estimations, flushing clocks, fresh starts of the
// array state, transparent (unused) columns, host writes and a dropped
// unique-word sample offered while the processor was flushing.
module tb_rls_array_receiver;
  import rls_pkg::*;
  import tb_rls_pkg::*;

  localparam int NE   = 10;
  localparam int NUW  = 31;
  localparam int NINF = 384;
  localparam real PI  = 3.14159265358979;
  localparam real AMP = 0.2;     // QPSK amplitude per axis
  localparam real SIG = 0.01;    // noise standard deviation per axis

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        cfg_we;
  logic [1:0]  cfg_addr;
  logic [31:0] cfg_wdata, cfg_rdata;
  logic        x_valid, x_uw;
  cplx_t       x [NE];
  cplx_t       d_ref;
  logic        uw_ready;
  logic [15:0] uw_dropped;
  cplx_t       w_out [NE];
  logic        w_update;
  cplx_t       err;
  logic        err_valid;
  cplx_t       y;
  logic        y_valid;
  logic [1:0]  bits;
  logic        bits_valid;

  int checks = 0, failures = 0;

  rls_array_receiver dut (.*);

  always #5 clk = ~clk;

  // mechanism counters
  int n_update = 0, n_flush_clk = 0, n_fresh = 0, n_transparent = 0, n_cfg = 0;
  int n_bits = 0, n_errbits = 0, n_err_stream = 0;

  always @(posedge clk) begin
    if (rst_n && w_update) n_update++;
    if (rst_n && !uw_ready) n_flush_clk++;
    if (rst_n && err_valid) n_err_stream++;
    if (rst_n && cfg_we) n_cfg++;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic cfg(logic [1:0] a, logic [31:0] d);
    @(negedge clk);
    cfg_we = 1'b1; cfg_addr = a; cfg_wdata = d;
    @(negedge clk);
    cfg_we = 1'b0;
  endtask

  function automatic real gauss();
    real u1, u2;
    u1 = urand(1e-9, 1.0);
    u2 = urand(0.0, 1.0);
    return $sqrt(-2.0 * $ln(u1)) * $cos(2.0 * PI * u2);
  endfunction

  function automatic rc_t qpsk(logic [1:0] b);
    return rc(b[0] ? -AMP : AMP, b[1] ? -AMP : AMP);
  endfunction

  // Expected detector outputs.
  typedef struct {
    logic [1:0] ref_bits;
    logic [1:0] tx_bits;
    bit         sure;
    int         nel;
  } det_t;
  det_t detq[$];

  always @(posedge clk) begin
    #1;
    if (rst_n && bits_valid) begin
      det_t e;
      if (detq.size() == 0) check(1'b0, "unexpected decision");
      else begin
        e = detq.pop_front();
        if (e.sure) check(bits == e.ref_bits, "decision");
        n_bits += 2;
        if (bits[0] != e.tx_bits[0]) n_errbits++;
        if (bits[1] != e.tx_bits[1]) n_errbits++;
      end
    end
  end

  rc_t U[MAXROW][MAXN];
  rc_t D[MAXROW];

  task automatic frame(int nel, bit drop_one);
    real  doa[4];
    rc_t  steer[4][MAXN];
    rc_t  gain[4];
    rc_t  xr[MAXN], xs[MAXN];
    logic [1:0] sym[4];
    int   errs0, bits0;
    doa = '{0.0, 10.0, 30.0, 40.0};
    for (int l = 0; l < 4; l++) begin
      real ph;
      ph = 2.0 * PI * urand(0.0, 1.0);
      gain[l] = rcscale($sqrt(urand(0.5, 1.5)), rc($cos(ph), $sin(ph)));
      for (int i = 0; i < NE; i++) begin
        real a;
        a = PI * i * $sin(doa[l] * PI / 180.0);
        steer[l][i] = rc($cos(a), $sin(a));
      end
    end
    cfg(2'd1, 32'(nel));
    if (nel < NE) n_transparent++;
    if (n_update > 0) n_fresh++;
    errs0 = n_errbits; bits0 = n_bits;
    for (int k = 0; k < NUW + NINF; k++) begin
      rc_t xe[MAXN];
      for (int l = 0; l < 4; l++) sym[l] = 2'($urandom_range(3));
      for (int i = 0; i < NE; i++) begin
        xe[i] = rc(SIG * gauss(), SIG * gauss());
        for (int l = 0; l < 4; l++)
          xe[i] = rcadd(xe[i], rcmul(rcmul(gain[l], steer[l][i]), qpsk(sym[l])));
        xe[i] = c2rc(rc2c(xe[i]));
      end
      if (k == NUW) begin
        // weights of this frame from the least-squares reference
        ls_ref(nel, NUW, f2r(r2f(0.99)), U, D, xs);
        if (drop_one) begin
          @(negedge clk);
          x_valid = 1'b1; x_uw = 1'b1;
          @(negedge clk);
          x_valid = 1'b0;
        end
      end
      if (k < NUW) begin
        for (int i = 0; i < NE; i++) U[k][i] = xe[i];
        D[k] = c2rc(rc2c(qpsk(sym[0])));
      end else begin
        det_t e;
        rc_t  yr;
        yr = rc(0.0, 0.0);
        for (int i = 0; i < nel; i++) yr = rcadd(yr, rcmul(xs[i], xe[i]));
        e.ref_bits = {(yr.im < 0.0), (yr.re < 0.0)};
        e.tx_bits = sym[0];
        e.sure = (rabs(yr.re) > 0.03) && (rabs(yr.im) > 0.03);
        e.nel = nel;
        detq.push_back(e);
      end
      @(negedge clk);
      x_valid = 1'b1;
      x_uw = (k < NUW);
      for (int i = 0; i < NE; i++) x[i] = rc2c(xe[i]);
      d_ref = (k < NUW) ? rc2c(qpsk(sym[0])) : CPLX_ZERO;
      @(posedge clk);
      if (k < NUW) check(uw_ready, "unique-word sample accepted");
      if (k == NUW + 40) begin
        // weights of this frame are in place by now
        for (int i = 0; i < NE; i++) begin
          rc_t wexp;
          real tol;
          wexp = (i < nel) ? rcconj(xs[i]) : rc(0.0, 0.0);
          tol = 5e-3 + 0.01 * ($sqrt(wexp.re * wexp.re + wexp.im * wexp.im));
          check(cnear(c2rc(w_out[i]), wexp, tol), "weight");
          if (!cnear(c2rc(w_out[i]), wexp, tol))
            $display("  N=%0d w[%0d] got %f %f exp %f %f", nel, i, f2r(w_out[i].re),
                     f2r(w_out[i].im), wexp.re, wexp.im);
        end
      end
    end
    @(negedge clk);
    x_valid = 1'b0;
    repeat (3 * NE + 10) @(negedge clk);
    $display("N=%0d elements: %0d bit errors in %0d bits", nel, n_errbits - errs0,
             n_bits - bits0);
    if (nel >= 4) check(n_errbits - errs0 <= (n_bits - bits0) / 100, "bit error rate");
  endtask

  initial begin
    cfg_we = 1'b0; cfg_addr = '0; cfg_wdata = '0;
    x_valid = 1'b0; x_uw = 1'b0; d_ref = CPLX_ZERO;
    for (int i = 0; i < NE; i++) x[i] = CPLX_ZERO;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    frame(8, 1'b0);
    frame(4, 1'b0);
    frame(2, 1'b0);
    frame(1, 1'b1);
    frame(10, 1'b0);
    check(detq.size() == 0, "all decisions seen");
    check(n_err_stream == 5 * NUW, "a-posteriori error count");
    check(uw_dropped == 1, "dropped sample counted");
    check(n_update == 5, "estimations");
    check(n_flush_clk == 8 + 4 + 2 + 1 + 10, "flushing clocks");
    check(n_fresh > 0 && n_transparent > 0 && n_cfg > 0, "mechanisms occurred");
    $display("mechanisms: estimations=%0d flush_clocks=%0d fresh_starts=%0d transparent=%0d cfg_writes=%0d dropped=%0d",
             n_update, n_flush_clk, n_fresh, n_transparent, n_cfg, uw_dropped);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
