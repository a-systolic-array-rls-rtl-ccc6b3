// tb_internal_cell: drives the internal cell with random rows (with
// `first`, `freeze` and idle clocks) and compares u_out, the passed-on s/z
// and the stored x with a real-valued model of
//   u_out = u_in - z*x,  x <- conj(s)*u_out + x.
module tb_internal_cell;
  import rls_pkg::*;
  import tb_rls_pkg::*;

  logic  clk = 1'b0;
  logic  rst_n = 1'b0;
  cplx_t u_in, s_in, z_in, u_out, s_out, z_out, x_out;
  tag_t  utag_in, stag_in, utag_out, stag_out;

  int checks = 0, failures = 0;

  internal_cell dut (.*);

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
    rc_t xr, xo, u, s, z, uo;
    tag_t t;
    u_in = CPLX_ZERO; s_in = CPLX_ZERO; z_in = CPLX_ZERO;
    utag_in = TAG_NONE; stag_in = TAG_NONE;
    xr = rc(0.0, 0.0);
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 600; n++) begin
      @(negedge clk);
      u = rc(urand(-1.0, 1.0), urand(-1.0, 1.0));
      // s = g*z with 0 <= conj(s)*z < 1, as the boundary cell produces it
      z = rc(urand(-1.0, 1.0), urand(-1.0, 1.0));
      s = rcscale(urand(0.0, 0.9) / (z.re*z.re + z.im*z.im + 0.5), z);
      t.valid  = ($urandom_range(7) != 0);
      t.first  = (n == 0) || ($urandom_range(30) == 0);
      t.freeze = !t.first && ($urandom_range(5) == 0);
      t.last   = 1'b0;
      u_in = rc2c(u); u = c2rc(u_in);
      s_in = rc2c(s); s = c2rc(s_in);
      z_in = rc2c(z); z = c2rc(z_in);
      utag_in = t; stag_in = t;
      xo = t.first ? rc(0.0, 0.0) : xr;
      uo = rcsub(u, rcmul(z, xo));
      if (t.valid && !t.freeze) xr = rcadd(rcmul(rcconj(s), uo), xo);
      @(posedge clk);
      #1;
      check(utag_out == t && stag_out == t, "tags");
      if (t.valid) begin
        check(cnear(c2rc(u_out), uo, 1e-4), "u_out");
        check(cnear(c2rc(s_out), s, 1e-9) && cnear(c2rc(z_out), z, 1e-9), "s/z pass");
      end
      check(cnear(c2rc(x_out), xr, 1e-4), "x");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
