// tb_qpsk_detector: checks the quadrant decision on random points, on the
// axes and on idle clocks, and the one-clock latency.
module tb_qpsk_detector;
  import rls_pkg::*;

  logic       clk = 1'b0;
  logic       rst_n = 1'b0;
  cplx_t      y;
  logic       y_valid;
  logic [1:0] bits;
  logic       bits_valid;

  int checks = 0, failures = 0;

  qpsk_detector dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [1:0] bexp;
    y = CPLX_ZERO; y_valid = 1'b0;
    bexp = 2'b00;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      y_valid = ($urandom_range(3) != 0);
      y.re = (n % 17 == 0) ? '0 : fix_t'($urandom);
      y.im = (n % 13 == 0) ? '0 : fix_t'($urandom);
      if (y_valid) bexp = {(y.im < 0), (y.re < 0)};
      @(posedge clk);
      #1;
      checks++;
      if (bits_valid != y_valid || bits != bexp) begin
        failures++;
        $display("FAIL n=%0d", n);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
