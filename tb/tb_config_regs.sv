// tb_config_regs: checks reset values, writes, read-back and the clipping
// of the parameter count and unique-word length.
module tb_config_regs;
  import rls_pkg::*;
  import tb_rls_pkg::*;

  localparam int NP = 10;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        we;
  logic [1:0]  addr;
  logic [31:0] wdata, rdata;
  fix_t        beta2;
  logic [7:0]  num_param;
  logic [15:0] num_uw;

  int checks = 0, failures = 0;

  config_regs #(.NPARAM(NP)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic wr(logic [1:0] a, logic [31:0] d);
    @(negedge clk);
    we = 1'b1; addr = a; wdata = d;
    @(negedge clk);
    we = 1'b0;
  endtask

  initial begin
    we = 1'b0; addr = '0; wdata = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    #1;
    check(near(f2r(beta2), 0.99, 1e-6), "beta2 reset");
    check(num_param == NP, "num_param reset");
    check(num_uw == 31, "num_uw reset");
    addr = 2'd2; #1; check(rdata == 31, "read num_uw");
    wr(2'd0, 32'(r2f(0.95)));
    check(beta2 == r2f(0.95), "beta2 write");
    addr = 2'd0; #1; check(rdata == 32'(r2f(0.95)), "read beta2");
    wr(2'd1, 32'd4);  check(num_param == 4, "num_param 4");
    wr(2'd1, 32'd0);  check(num_param == 1, "num_param clip low");
    wr(2'd1, 32'd99); check(num_param == NP, "num_param clip high");
    wr(2'd1, 32'd8);  addr = 2'd1; #1; check(rdata == 8, "read num_param");
    wr(2'd2, 32'd41); check(num_uw == 41, "num_uw 41");
    wr(2'd2, 32'd0);  check(num_uw == 1, "num_uw clip low");
    wr(2'd2, 32'h12345); check(num_uw == 16'hFFFF, "num_uw clip high");
    wr(2'd3, 32'd7);  check(num_param == 8 && num_uw == 16'hFFFF && beta2 == r2f(0.95), "addr 3 ignored");
    addr = 2'd3; #1; check(rdata == 0, "read addr 3");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
