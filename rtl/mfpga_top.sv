// mfpga_top: multilevel hierarchical FPGA (MFPGA) fabric N_0 x ... x N_{n-1},
// given by ARITY (hex digit i = N_i, level 0 lowest; see mfpga_pkg). The
// default 32'h444 is the 4 x 4 x 4 device: 64 logic blocks (4-LUT +
// bypassable flip-flop), 64 input pads, 64 output pads, Rent exponent p = 1,
// 3584 routing switches, 3136 configuration bits.
//
// Two unidirectional networks connect the logic blocks. The downward network
// is a butterfly fat tree: every switch box is split into mini switch boxes
// (MSBs), each a set of multiplexers, and exactly one downward path leads
// from an MSB to a given logic block pin. The upward network takes each logic
// block output and each input pad to one MSB at every level, so a signal
// climbs to the lowest level common to source and destination (or higher)
// and then descends.
//
// Ports: pad_in[g] is input pad g, which belongs to level-0 cluster g / N_0.
// pad_out[g] is output pad g, wired straight to logic block g, since the
// number of output pads equals the number of logic blocks.
// Configuration: hold cfg_en high and shift CFG_BITS bits into cfg_in, one
// per clk, the bit destined for the highest chain position first; cfg_out is
// the end of the chain. Chain order is depth-first: in each cluster its
// children (or logic blocks), then its switch box MSB by MSB. rst_n clears
// configuration and flip-flops. After configuration the fabric is the user
// circuit: combinational paths from pad_in to pad_out, registered through
// the logic blocks that use their flip-flop.
//
// Lint reports circular combinational logic in the switch boxes: a logic
// block output can be routed back to a logic block input, so the routing
// network holds structural loops. A loop is only closed by a user circuit
// that is itself combinationally cyclic; outputs are held at 0 during reset
// and configuration so none can oscillate then. CFG_BITS and SWITCHES
// document the chain length and the switch count.
//
// The published architecture uses 4-input LUTs, N_0 = 4 pads of each kind per
// level-0 cluster and arities 2 and 4; this implementation requires
// N_0 == LUT_K and every 2*N_i to be a multiple of LUT_K.
module mfpga_top
  import mfpga_pkg::*;
#(
  parameter logic [31:0] ARITY = 32'h444,
  parameter int          LUT_K = 4,
  localparam int LEVELS   = num_levels(ARITY),
  localparam int NLB      = blocks(ARITY, LEVELS - 1),
  localparam int NPAD     = NLB,
  localparam int CFG_BITS = cluster_cfg_bits(ARITY, LUT_K, LEVELS - 1, 1'b1),
  localparam int SWITCHES = cluster_switches(ARITY, LUT_K, LEVELS - 1, 1'b1)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            cfg_en,
  input  logic            cfg_in,
  output logic            cfg_out,
  input  logic [NPAD-1:0] pad_in,
  output logic [NLB-1:0]  pad_out
);
  if (arity(ARITY, 0) != LUT_K) begin : g_bad_n0
    $error("mfpga_top needs N_0 == LUT_K");
  end
  for (genvar i = 0; i < LEVELS; i++) begin : g_chk
    if ((2 * arity(ARITY, i)) % LUT_K != 0) begin : g_bad_ni
      $error("mfpga_top needs 2*N_i to be a multiple of LUT_K");
    end
  end

  logic [NLB-1:0] lb_out;

  mfpga_cluster #(
    .ARITY(ARITY), .LUT_K(LUT_K), .LEVEL(LEVELS - 1), .TOP(1'b1)
  ) u_root (
    .clk, .rst_n, .cfg_en, .cfg_in, .cfg_out,
    .down_in(1'b0),
    .pad_in (pad_in),
    .lb_out (lb_out)
  );

  // Output pads: one per logic block, no switching needed.
  assign pad_out = lb_out;
endmodule
