// tb_systolic_array: end-to-end test of the QR-RLS array for a small size
// (NPARAM = 3), fed through input_skew.
//
// Estimation 1: 20 random training rows (with an idle gap), then the unit-
// matrix flushing rows twice in a row; both flushes must give -x where x is
// the exponentially weighted least-squares solution computed here in real
// arithmetic, which also shows that flushing rows change no stored value.
// The a-posteriori error of the last training row is checked against the
// same solution. Estimation 2 starts with a `first` row (fresh state) and
// leaves column 1 zero, so only parameters 0 and 2 are estimated.
// Estimation 3 uses beta^2 = 0.9. The latency of every row is checked.
module tb_systolic_array;
  import rls_pkg::*;
  import tb_rls_pkg::*;

  localparam int N = 3;
  localparam int LAT = 2 * N;   // clock edges from row input to e output

  logic  clk = 1'b0;
  logic  rst_n = 1'b0;
  fix_t  beta2;
  cplx_t row [N+1];
  tag_t  rtag;
  cplx_t col [N+1];
  tag_t  ctag [N+1];
  cplx_t e_out;
  tag_t  etag_out;

  int checks = 0, failures = 0;
  int cyc = 0;

  input_skew #(.NCOL(N+1)) u_skew (.clk, .rst_n, .row_in(row), .tag_in(rtag),
                                   .col_out(col), .ctag_out(ctag));
  systolic_array #(.NPARAM(N)) dut (.clk, .rst_n, .beta2, .col_in(col), .ctag_in(ctag),
                                    .e_out, .etag_out);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (5000) @(posedge clk);
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

  // Expected outputs, queued in input order.
  typedef struct {
    int  due;
    bit  chk;
    rc_t e;
    tag_t t;
  } exp_t;
  exp_t expq[$];
  int   nout = 0;

  always @(posedge clk) begin
    #1;
    if (etag_out.valid) begin
      exp_t x;
      nout++;
      if (expq.size() == 0) check(1'b0, "unexpected output");
      else begin
        x = expq.pop_front();
        check(cyc == x.due, "latency");
        check(etag_out == x.t, "tag");
        if (x.chk) begin
          check(cnear(c2rc(e_out), x.e, 5e-3), "e value");
          if (!cnear(c2rc(e_out), x.e, 5e-3))
            $display("  got %f %f exp %f %f", f2r(e_out.re), f2r(e_out.im), x.e.re, x.e.im);
        end
      end
    end
  end

  task automatic send(rc_t u[MAXN], rc_t d, tag_t t, bit chk, rc_t e);
    exp_t x;
    @(negedge clk);
    for (int j = 0; j < N; j++) row[j] = rc2c(u[j]);
    row[N] = rc2c(d);
    rtag = t;
    x.due = cyc + 1 + LAT;
    x.chk = chk;
    x.e = e;
    x.t = t;
    expq.push_back(x);
    @(negedge clk);
    rtag = TAG_NONE;
  endtask

  rc_t U[MAXROW][MAXN];
  rc_t D[MAXROW];
  rc_t xs[MAXN];

  // One estimation: nrow training rows using the columns in mask, then
  // nflush rounds of flushing for those columns.
  task automatic estimate(int nrow, real lambda, bit [N-1:0] mask, int nflush);
    rc_t xt[MAXN];
    rc_t Um[MAXROW][MAXN];
    rc_t xm[MAXN];
    int  idx[MAXN];
    int  nm;
    rc_t u[MAXN];
    rc_t ep;
    tag_t t;
    nm = 0;
    for (int j = 0; j < N; j++) begin
      xt[j] = rc(urand(-1.0, 1.0), urand(-1.0, 1.0));
      if (mask[j]) begin idx[nm] = j; nm++; end
    end
    for (int k = 0; k < nrow; k++) begin
      rc_t acc;
      acc = rc(urand(-0.3, 0.3), urand(-0.3, 0.3));
      for (int j = 0; j < N; j++) begin
        U[k][j] = mask[j] ? c2rc(rc2c(rc(urand(-1.0, 1.0), urand(-1.0, 1.0)))) : rc(0.0, 0.0);
        acc = rcadd(acc, rcmul(xt[j], U[k][j]));
      end
      D[k] = c2rc(rc2c(acc));
      for (int m = 0; m < nm; m++) Um[k][m] = U[k][idx[m]];
    end
    ls_ref(nm, nrow, lambda, Um, D, xm);
    for (int j = 0; j < N; j++) xs[j] = rc(0.0, 0.0);
    for (int m = 0; m < nm; m++) xs[idx[m]] = xm[m];
    for (int k = 0; k < nrow; k++) begin
      for (int j = 0; j < N; j++) u[j] = U[k][j];
      ep = D[k];
      for (int j = 0; j < N; j++) ep = rcsub(ep, rcmul(xs[j], U[k][j]));
      t = '{valid: 1'b1, freeze: 1'b0, first: (k == 0), last: 1'b0};
      send(u, D[k], t, (k == nrow - 1), ep);
      if (k == 7) repeat (3) @(negedge clk);   // idle gap
    end
    for (int f = 0; f < nflush; f++) begin
      for (int m = 0; m < nm; m++) begin
        for (int j = 0; j < N; j++) u[j] = rc(j == idx[m] ? 1.0 : 0.0, 0.0);
        t = '{valid: 1'b1, freeze: 1'b1, first: 1'b0, last: (m == nm - 1)};
        send(u, rc(0.0, 0.0), t, 1'b1, rc(-xs[idx[m]].re, -xs[idx[m]].im));
      end
    end
  endtask

  initial begin
    int sent;
    beta2 = r2f(0.99);
    for (int j = 0; j <= N; j++) row[j] = CPLX_ZERO;
    rtag = TAG_NONE;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    estimate(20, f2r(r2f(0.99)), 3'b111, 2);
    estimate(12, f2r(r2f(0.99)), 3'b101, 1);
    beta2 = r2f(0.9);
    estimate(25, f2r(r2f(0.9)), 3'b111, 1);
    sent = 20 + 6 + 12 + 2 + 25 + 3;
    repeat (LAT + 4) @(posedge clk);
    check(nout == sent && expq.size() == 0, "output count");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
