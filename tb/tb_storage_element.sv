// tb_storage_element: checks the one-clock delay of delta and its tag, and
// that delta holds on clocks without a valid tag.
module tb_storage_element;
  import rls_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  fix_t d_in, d_out;
  tag_t tag_in, tag_out;

  int checks = 0, failures = 0;

  storage_element dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    fix_t held;
    tag_t t;
    d_in = '0; tag_in = TAG_NONE;
    held = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      t = tag_t'($urandom_range(15));
      d_in = fix_t'($urandom);
      tag_in = t;
      if (t.valid) held = d_in;
      @(posedge clk);
      #1;
      checks++;
      if (tag_out != t || d_out != held) begin
        failures++;
        $display("FAIL n=%0d", n);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
