// tb_weight_collector: feeds tagged array outputs: training errors, then
// flushed outputs e_i, and checks that err passes training outputs, that
// w_update pulses once per estimation on the `last` output and that
// w_out[i] = -conj(e_i), with unflushed entries zero.
module tb_weight_collector;
  import rls_pkg::*;
  import tb_rls_pkg::*;

  localparam int NP = 5;

  logic  clk = 1'b0;
  logic  rst_n = 1'b0;
  cplx_t e_in;
  tag_t  etag_in;
  cplx_t w_out [NP];
  logic  w_update;
  cplx_t err;
  logic  err_valid;

  int checks = 0, failures = 0;

  weight_collector #(.NPARAM(NP)) dut (.*);

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

  task automatic put(cplx_t e, tag_t t);
    @(negedge clk);
    e_in = e; etag_in = t;
    @(posedge clk);
    #1;
    check(err_valid == (t.valid && !t.freeze), "err_valid");
    if (t.valid && !t.freeze) check(err == e, "err value");
    check(w_update == (t.valid && t.freeze && t.last), "w_update");
  endtask

  initial begin
    cplx_t e, ex [NP];
    int np;
    e_in = CPLX_ZERO; etag_in = TAG_NONE;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int est = 0; est < 12; est++) begin
      np = $urandom_range(NP, 1);
      for (int k = 0; k < 6; k++) begin
        e = '{re: fix_t'($urandom), im: fix_t'($urandom)};
        put(e, '{valid: 1'b1, freeze: 1'b0, first: (k == 0), last: 1'b0});
        if ($urandom_range(2) == 0) put(CPLX_ZERO, TAG_NONE);
      end
      for (int i = 0; i < np; i++) begin
        ex[i] = '{re: fix_t'($urandom_range(32'h0FFF_FFFF)), im: fix_t'($urandom)};
        put(ex[i], '{valid: 1'b1, freeze: 1'b1, first: 1'b0, last: (i == np - 1)});
        if ($urandom_range(3) == 0) put(CPLX_ZERO, TAG_NONE);
      end
      for (int i = 0; i < NP; i++) begin
        if (i < np) check(w_out[i].re == -ex[i].re && w_out[i].im == ex[i].im, "weight");
        else        check(w_out[i] == CPLX_ZERO, "unused weight zero");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
