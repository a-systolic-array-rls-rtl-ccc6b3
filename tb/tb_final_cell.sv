// tb_final_cell: checks e = delta_in * u_in on random inputs, the one-clock
// latency, tag passing, and that an idle clock holds e.
module tb_final_cell;
  import rls_pkg::*;
  import tb_rls_pkg::*;

  logic  clk = 1'b0;
  logic  rst_n = 1'b0;
  fix_t  delta_in;
  cplx_t u_in, e_out;
  tag_t  tag_in, tag_out;

  int checks = 0, failures = 0;

  final_cell dut (.*);

  always #5 clk = ~clk;

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
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    rc_t u, e_exp;
    real dl;
    tag_t t;
    delta_in = '0; u_in = CPLX_ZERO; tag_in = TAG_NONE;
    e_exp = rc(0.0, 0.0);
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      u = rc(urand(-4.0, 4.0), urand(-4.0, 4.0));
      dl = urand(0.0, 1.0);
      t = '{valid: ($urandom_range(4) != 0), freeze: $urandom_range(1), first: 1'b0,
            last: $urandom_range(1)};
      u_in = rc2c(u); u = c2rc(u_in);
      delta_in = r2f(dl); dl = f2r(delta_in);
      tag_in = t;
      if (t.valid) e_exp = rcscale(dl, u);
      @(posedge clk);
      #1;
      check(tag_out == t, "tag");
      check(cnear(c2rc(e_out), e_exp, 1e-5), "e");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
