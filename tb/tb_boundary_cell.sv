// tb_boundary_cell: drives the boundary cell with random rows (including
// zero inputs, zero delta, `first`, `freeze` and idle clocks) and compares
// x, s, z and delta_out with a real-valued model of the cell equations.
// Also checks the one-clock latency and that idle clocks change nothing.
module tb_boundary_cell;
  import rls_pkg::*;
  import tb_rls_pkg::*;

  logic  clk = 1'b0;
  logic  rst_n = 1'b0;
  fix_t  beta2;
  cplx_t u_in;
  tag_t  tag_in;
  fix_t  delta_in;
  cplx_t s_out, z_out;
  tag_t  tag_out;
  fix_t  delta_out, x_out;

  int checks = 0, failures = 0;

  boundary_cell dut (.*);

  always #5 clk = ~clk;

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
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    real xr, b2, dl, xo, xd, xn, u2;
    rc_t u, s_exp;
    real d_exp;
    tag_t t;
    beta2 = r2f(0.99);
    u_in = CPLX_ZERO; tag_in = TAG_NONE; delta_in = '0;
    xr = 0.0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 600; n++) begin
      @(negedge clk);
      b2 = (n < 300) ? 0.99 : 0.9;
      beta2 = r2f(b2);
      u  = rc(urand(-1.0, 1.0), urand(-1.0, 1.0));
      if ($urandom_range(9) == 0) u = rc(0.0, 0.0);
      dl = urand(0.1, 1.0);
      if ($urandom_range(9) == 0) dl = 0.0;
      t.valid  = ($urandom_range(7) != 0);
      t.first  = (n == 0) || ($urandom_range(40) == 0);
      t.freeze = !t.first && ($urandom_range(6) == 0);
      t.last   = 1'b0;
      u_in = rc2c(u);
      u = c2rc(u_in);
      delta_in = r2f(dl);
      dl = f2r(delta_in);
      tag_in = t;
      // reference
      xo = t.first ? 0.0 : xr;
      xd = b2 * xo;
      u2 = u.re*u.re + u.im*u.im;
      xn = xd + dl * u2;
      if (t.freeze) begin
        s_exp = rc(0.0, 0.0); d_exp = dl;
      end else if (u2 == 0.0 || dl == 0.0) begin
        s_exp = rc(0.0, 0.0); d_exp = dl;
        if (t.valid) xr = xd;
      end else begin
        s_exp = rcscale(dl / xn, u); d_exp = b2 * xo / xn * dl;
        if (t.valid) xr = xn;
      end
      @(posedge clk);
      #1;
      check(tag_out == t, "tag");
      if (t.valid) begin
        check(near(f2r(x_out), xr, 1e-4 + 1e-4 * xr), "x");
        check(cnear(c2rc(s_out), s_exp, 2e-4 + 1e-3 * rabs(s_exp.re) + 1e-3 * rabs(s_exp.im)), "s");
        check(cnear(c2rc(z_out), u, 1e-9), "z");
        check(near(f2r(delta_out), d_exp, 2e-4), "delta");
      end else begin
        check(near(f2r(x_out), xr, 1e-4 + 1e-4 * xr), "x idle");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
