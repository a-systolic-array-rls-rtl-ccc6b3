// config_regs: the settings a host PC writes into the processor.
//
// Three registers, selected by a 2-bit address on a simple synchronous write
// port (write strobe, address, data) with a combinational read-back:
//   0  BETA2      forgetting factor beta^2, a fixed-point word (rls_pkg)
//   1  NUM_PARAM  number of parameters to estimate, clipped to 1..NPARAM
//   2  NUM_UW     number of unique-word (training) symbols per estimation,
//                 clipped to 1..65535
// The three settings themselves come from the processor description; the
// register map, the port and the clipping are this design's choice. Reset
// values: beta^2 = 0.99, NPARAM parameters, 31 unique-word symbols (the
// settings of the reported experiments). Address 3 reads as zero.
//
// Timing: a write takes effect on the clock edge that samples it.
module config_regs
  import rls_pkg::*;
#(
  parameter int unsigned NPARAM = 10
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        we,
  input  logic [1:0]  addr,
  input  logic [31:0] wdata,
  output logic [31:0] rdata,
  output fix_t        beta2,
  output logic [7:0]  num_param,
  output logic [15:0] num_uw
);

  localparam int unsigned NUW_RESET  = 31;
  // 0.99 in the word format, rounded to nearest.
  localparam fix_t BETA2_RESET = fix_t'((99 * (64'sd1 <<< FRAC_W) + 50) / 100);

  typedef enum logic [1:0] {
    REG_BETA2     = 2'd0,
    REG_NUM_PARAM = 2'd1,
    REG_NUM_UW    = 2'd2
  } reg_addr_e;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      beta2     <= BETA2_RESET;
      num_param <= 8'(NPARAM);
      num_uw    <= 16'(NUW_RESET);
    end else if (we) begin
      unique case (addr)
        REG_BETA2:     beta2 <= fix_t'(wdata);
        REG_NUM_PARAM: num_param <= (wdata == 0)      ? 8'd1 :
                                    (wdata > NPARAM)  ? 8'(NPARAM) : wdata[7:0];
        REG_NUM_UW:    num_uw <= (wdata == 0)       ? 16'd1 :
                                 (wdata > 32'hFFFF) ? 16'hFFFF : wdata[15:0];
        default: ;
      endcase
    end
  end

  always_comb begin
    unique case (addr)
      REG_BETA2:     rdata = 32'(beta2);
      REG_NUM_PARAM: rdata = 32'(num_param);
      REG_NUM_UW:    rdata = 32'(num_uw);
      default:       rdata = '0;
    endcase
  end

endmodule
