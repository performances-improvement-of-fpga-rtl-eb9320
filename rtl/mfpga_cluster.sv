// mfpga_cluster: level-LEVEL cluster of the MFPGA, built recursively.
//
// Level 0: N_0 logic blocks (with N_0 input pads) and one level-0 switch box;
// MSB m of the switch box drives input pin m of every logic block. Level
// i > 0: N_i level-(i-1) clusters and one level-i switch box whose MSB
// outputs feed the children's downward inputs. The switch box also takes every logic block output of the
// cluster (lb_out) and every input pad (pad_in) as upward feedback, so one
// signal can climb to any level and come down the butterfly fat tree.
//
// Ports (B = blocks of this cluster, see mfpga_pkg): down_in are the LUT_K*B
// wires from the parent switch box (unused when TOP), pad_in the B input pads
// of the cluster, lb_out the B logic block outputs, child 0's lowest.
// Configuration chain order: child 0 .. child N_LEVEL-1, then the switch box.
//
// The routing network contains structural combinational loops (a logic
// block output can be routed back to an input); they are inherent to a
// programmable fabric and are only closed by a user configuration that
// bypasses every flip-flop on a cycle. Logic block outputs are held at 0
// during configuration so that no loop can oscillate then.
module mfpga_cluster
  import mfpga_pkg::*;
#(
  parameter logic [31:0] ARITY = 32'h444,
  parameter int          LUT_K = 4,
  parameter int          LEVEL = 0,
  parameter bit          TOP   = 1'b0,
  localparam int KL   = arity(ARITY, LEVEL),
  localparam int NLB  = blocks(ARITY, LEVEL),
  localparam int NPAD = NLB,
  localparam int NMSB = LUT_K * blocks(ARITY, LEVEL - 1),
  localparam int NDIN = TOP ? 1 : LUT_K * NLB
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            cfg_en,
  input  logic            cfg_in,
  output logic            cfg_out,
  input  logic [NDIN-1:0] down_in,
  input  logic [NPAD-1:0] pad_in,
  output logic [NLB-1:0]  lb_out
);
  logic [KL*NMSB-1:0] child_in;
  logic [KL:0]        chain;
  assign chain[0] = cfg_in;

  if (LEVEL == 0) begin : g_leaf
    for (genvar c = 0; c < KL; c++) begin : g_lb
      mfpga_lb #(.LUT_K(LUT_K)) u_lb (
        .clk, .rst_n, .cfg_en,
        .cfg_in (chain[c]),
        .cfg_out(chain[c+1]),
        .in     (child_in[c*LUT_K +: LUT_K]),
        .out    (lb_out[c])
      );
    end
  end else begin : g_node
    localparam int CNLB  = NLB / KL;
    localparam int CNPAD = NPAD / KL;
    localparam int CNDIN = NMSB;
    for (genvar c = 0; c < KL; c++) begin : g_child
      mfpga_cluster #(
        .ARITY(ARITY), .LUT_K(LUT_K), .LEVEL(LEVEL - 1), .TOP(1'b0)
      ) u_child (
        .clk, .rst_n, .cfg_en,
        .cfg_in (chain[c]),
        .cfg_out(chain[c+1]),
        .down_in(child_in[c*CNDIN +: CNDIN]),
        .pad_in (pad_in[c*CNPAD +: CNPAD]),
        .lb_out (lb_out[c*CNLB +: CNLB])
      );
    end
  end

  mfpga_switchbox #(
    .ARITY(ARITY), .LUT_K(LUT_K), .LEVEL(LEVEL), .TOP(TOP)
  ) u_sb (
    .clk, .rst_n, .cfg_en,
    .cfg_in  (chain[KL]),
    .cfg_out (cfg_out),
    .down_in (down_in),
    .fb_in   (lb_out),
    .pad_in  (pad_in),
    .child_in(child_in)
  );
endmodule
