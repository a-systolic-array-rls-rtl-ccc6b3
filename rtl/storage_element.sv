// storage_element: one step of delay on the diagonal path of the array.
//
// The diagonal of the array carries the scale delta from one boundary cell
// to the next (and from the last one to the final cell). Each boundary cell
// already registers its output; this element adds the second step, so that
// delta leaves boundary cell i two clocks before it meets the row that the
// internal cell between them has transformed. It holds delta for the row
// whose tag is valid and passes the tag along.
//
// Timing: output one cycle after the input.
module storage_element
  import rls_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  fix_t d_in,
  input  tag_t tag_in,
  output fix_t d_out,
  output tag_t tag_out
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      d_out   <= '0;
      tag_out <= TAG_NONE;
    end else begin
      tag_out <= tag_in;
      if (tag_in.valid) d_out <= d_in;
    end
  end

endmodule
