// tb_flush_sequencer: offers training samples continuously (with random
// idle clocks) and checks the row stream: masked training rows tagged
// `first` on the first row, then exactly num_param unit-vector rows tagged
// `freeze` with `last` on the final one, in_ready low while flushing, and
// settings sampled at the start of each estimation.
module tb_flush_sequencer;
  import rls_pkg::*;
  import tb_rls_pkg::*;

  localparam int NP = 4;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic [7:0]  num_param;
  logic [15:0] num_uw;
  logic        in_valid, in_ready;
  cplx_t       in_u [NP];
  cplx_t       in_d;
  cplx_t       row_out [NP+1];
  tag_t        tag_out;

  int checks = 0, failures = 0;

  flush_sequencer #(.NPARAM(NP)) dut (.*);

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

  // Expected row stream.
  typedef struct {
    cplx_t r [NP+1];
    tag_t  t;
  } row_t;
  row_t expq[$];

  int est = 0;
  int np_cur, nuw_cur;
  int cnt = 0;

  always @(posedge clk) begin
    #1;
    if (tag_out.valid) begin
      row_t x;
      if (expq.size() == 0) check(1'b0, "unexpected row");
      else begin
        x = expq.pop_front();
        check(tag_out == x.t, "tag");
        check(row_out == x.r, "row data");
      end
    end
  end

  // Model: on each accepted sample build the expected rows.
  always @(posedge clk) begin
    if (rst_n && in_valid && in_ready) begin
      row_t x;
      if (cnt == 0) begin
        np_cur = num_param;
        nuw_cur = num_uw;
      end
      for (int j = 0; j < NP; j++) x.r[j] = (j < np_cur) ? in_u[j] : CPLX_ZERO;
      x.r[NP] = in_d;
      x.t = '{valid: 1'b1, freeze: 1'b0, first: (cnt == 0), last: 1'b0};
      expq.push_back(x);
      cnt++;
      if (cnt == nuw_cur) begin
        for (int i = 0; i < np_cur; i++) begin
          for (int j = 0; j <= NP; j++)
            x.r[j] = (j == i) ? '{re: FIX_ONE, im: '0} : CPLX_ZERO;
          x.t = '{valid: 1'b1, freeze: 1'b1, first: 1'b0, last: (i == np_cur - 1)};
          expq.push_back(x);
        end
        cnt = 0;
        est++;
      end
    end
  end

  int ready_low = 0;
  always @(posedge clk) if (rst_n && !in_ready) ready_low++;

  initial begin
    num_param = 8'd3; num_uw = 16'd5;
    in_valid = 1'b0; in_d = CPLX_ZERO;
    for (int j = 0; j < NP; j++) in_u[j] = CPLX_ZERO;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      in_valid = ($urandom_range(4) != 0);
      for (int j = 0; j < NP; j++) in_u[j] = '{re: fix_t'($urandom), im: fix_t'($urandom)};
      in_d = '{re: fix_t'($urandom), im: fix_t'($urandom)};
      // change the settings now and then, also mid-estimation
      if ($urandom_range(20) == 0) begin
        num_param = 8'($urandom_range(NP, 1));
        num_uw = 16'($urandom_range(9, 1));
      end
    end
    @(negedge clk);
    in_valid = 1'b0;
    repeat (NP + 3) @(negedge clk);
    check(expq.size() == 0, "all rows seen");
    check(est >= 10, "several estimations");
    check(ready_low > 0, "in_ready dropped during flushing");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
