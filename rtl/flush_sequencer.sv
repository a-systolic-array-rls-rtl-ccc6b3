// flush_sequencer: builds the row stream that drives the array for one
// estimation: first the unique-word rows, then the weight-flushing rows.
//
// Training phase: each accepted input (u, d) becomes one array row; the
// columns at or beyond num_param are forced to zero, which makes them
// transparent in the array. The first row of an estimation is tagged
// `first`. After num_uw rows the sequencer stops accepting input
// (in_ready = 0) and emits num_param flushing rows by itself: row i has
// u = unit vector i, d = 0 and the tag `freeze`, so the array outputs
// -conj(w_i) without updating anything; the last one is tagged `last`.
// Then it accepts the next estimation's training rows at once.
//
// num_param and num_uw are sampled when the first row of an estimation is
// accepted and hold for that whole estimation.
//
// Timing: the row leaves one clock after the input was accepted (registered
// output). Training and flushing rows follow back to back, one per clock.
module flush_sequencer
  import rls_pkg::*;
#(
  parameter int unsigned NPARAM = 10
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [7:0]  num_param,
  input  logic [15:0] num_uw,
  input  logic        in_valid,
  output logic        in_ready,
  input  cplx_t       in_u [NPARAM],
  input  cplx_t       in_d,
  output cplx_t       row_out [NPARAM+1],   // index NPARAM = d
  output tag_t        tag_out
);

  typedef enum logic {S_TRAIN, S_FLUSH} state_e;

  state_e      state_q;
  logic [15:0] cnt_q;       // training rows accepted in this estimation
  logic [7:0]  idx_q;       // flushing row index
  logic [7:0]  np_q;
  logic [15:0] nuw_q;
  logic [7:0]  np_now;
  logic [15:0] nuw_now;

  assign in_ready = (state_q == S_TRAIN);
  // Settings in force for the row being accepted.
  assign np_now  = (cnt_q == 0) ? num_param : np_q;
  assign nuw_now = (cnt_q == 0) ? num_uw    : nuw_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= S_TRAIN;
      cnt_q   <= '0;
      idx_q   <= '0;
      np_q    <= 8'd1;
      nuw_q   <= 16'd1;
      tag_out <= TAG_NONE;
      for (int j = 0; j <= NPARAM; j++) row_out[j] <= CPLX_ZERO;
    end else begin
      tag_out <= TAG_NONE;
      unique case (state_q)
        S_TRAIN: begin
          if (in_valid) begin
            for (int j = 0; j < NPARAM; j++)
              row_out[j] <= (j < int'(np_now)) ? in_u[j] : CPLX_ZERO;
            row_out[NPARAM] <= in_d;
            tag_out <= '{valid: 1'b1, freeze: 1'b0, first: (cnt_q == 0), last: 1'b0};
            if (cnt_q == 0) begin
              np_q  <= num_param;
              nuw_q <= num_uw;
            end
            if (cnt_q + 16'd1 >= nuw_now) begin
              cnt_q   <= '0;
              idx_q   <= '0;
              state_q <= S_FLUSH;
            end else begin
              cnt_q <= cnt_q + 16'd1;
            end
          end
        end
        S_FLUSH: begin
          for (int j = 0; j < NPARAM; j++)
            row_out[j] <= (j == int'(idx_q)) ? '{re: FIX_ONE, im: '0} : CPLX_ZERO;
          row_out[NPARAM] <= CPLX_ZERO;
          tag_out <= '{valid: 1'b1, freeze: 1'b1, first: 1'b0,
                       last: (idx_q + 8'd1 >= np_q)};
          if (idx_q + 8'd1 >= np_q) state_q <= S_TRAIN;
          idx_q <= idx_q + 8'd1;
        end
        default: state_q <= S_TRAIN;
      endcase
    end
  end

endmodule
