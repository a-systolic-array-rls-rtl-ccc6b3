// tb_input_skew: presents random rows (with idle clocks) and checks that
// column j of each row appears exactly j clocks later with the row's tag.
module tb_input_skew;
  import rls_pkg::*;

  localparam int NC = 5;

  logic  clk = 1'b0;
  logic  rst_n = 1'b0;
  cplx_t row_in [NC];
  tag_t  tag_in;
  cplx_t col_out [NC];
  tag_t  ctag_out [NC];

  int checks = 0, failures = 0;
  int cyc = 0;

  cplx_t hist_d [int][NC];
  tag_t  hist_t [int];

  input_skew #(.NCOL(NC)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int j = 0; j < NC; j++) row_in[j] = CPLX_ZERO;
    tag_in = TAG_NONE;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 200; n++) begin
      // drive row n at this negedge, remember it
      for (int j = 0; j < NC; j++) row_in[j] = '{re: fix_t'($urandom), im: fix_t'($urandom)};
      tag_in = tag_t'($urandom_range(15));
      hist_d[n] = row_in;
      hist_t[n] = tag_in;
      #1;
      // column j now shows row n-j
      for (int j = 0; j < NC; j++) begin
        if (n - j >= 0) begin
          checks++;
          if (col_out[j] != hist_d[n-j][j] || ctag_out[j] != hist_t[n-j]) begin
            failures++;
            $display("FAIL row %0d col %0d", n - j, j);
          end
        end
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
