// mfpga_lb: MFPGA logic block, one LUT_K-input look-up table followed by a
// bypassable D flip-flop.
//
// Configuration (LUT_K = 4: 17 bits, shifted in through cfg_in/cfg_out):
//   cfg[2**LUT_K-1:0]  LUT mask; the LUT output is mask[in]
//   cfg[2**LUT_K]      1: the output comes from the flip-flop, 0: from the LUT
// The flip-flop samples the LUT on every rising clk edge outside configuration;
// it is cleared by rst_n and held at 0 while cfg_en is high, so a freshly
// loaded circuit starts from all-zero state. The output is combinational from `in` when bypassed
// and one cycle late when registered.
//
// While cfg_en is high or rst_n is low the block output is held at 0. Every
// loop in the routing network passes through a logic block, so this hold
// keeps partly loaded (or not yet cleared) configurations from forming
// oscillating rings. The hold, the clearing
// and the reset are choices of this implementation; the 4-LUT with a bypass flip-flop
// is the logic block of the published architecture.
module mfpga_lb
  import mfpga_pkg::*;
#(
  parameter int LUT_K = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             cfg_en,
  input  logic             cfg_in,
  output logic             cfg_out,
  input  logic [LUT_K-1:0] in,
  output logic             out
);
  localparam int CW = lb_cfg_bits(LUT_K);

  logic [CW-1:0] cfg;
  logic [(1<<LUT_K)-1:0] mask;
  logic          lut_y;
  logic          ff_q;

  mfpga_cfg_reg #(.W(CW)) u_cfg (
    .clk, .rst_n, .cfg_en, .cfg_in, .cfg_out, .q(cfg)
  );

  assign mask  = cfg[(1<<LUT_K)-1:0];
  assign lut_y = mask[in];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      ff_q <= 1'b0;
    else if (cfg_en) ff_q <= 1'b0;
    else             ff_q <= lut_y;
  end

  assign out = (cfg_en || !rst_n) ? 1'b0 : (cfg[CW-1] ? ff_q : lut_y);
endmodule
