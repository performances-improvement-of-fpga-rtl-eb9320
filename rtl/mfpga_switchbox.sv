// mfpga_switchbox: switch box of one level-LEVEL cluster.
//
// It holds NMSB = LUT_K*B(LEVEL-1) mini switch boxes with KL = N_LEVEL
// outputs each (B and N as in mfpga_pkg). Output c of MSB m drives input m of
// child c (child = level-(LEVEL-1) cluster, or at level 0 input pin m of
// logic block c); child_in is packed child-major: child_in[c*NMSB + m].
//
// Inputs of MSB m, in select order:
//   non-top: down_in[m*KL +: KL] (downward wires from the parent), then its
//            NUP upward inputs (mfpga_pkg::up_is_pad, up_index)
//   top:     only the NUP upward inputs
// With N_LEVEL = 4 and LUT_K = 4 that is 4 downward inputs, one feedback and
// one input pad. The upward inputs are the upward network: each logic block
// output and each input pad of the cluster reaches exactly one MSB of this
// level, on a pin index rotated by LEVEL.
//
// The MSB structure and all counts follow the published architecture (they
// reproduce its switch counts); the order of the downward inputs across MSBs,
// the exact rotation and the top-level input set are this implementation's
// reading of those counts. Purely combinational except for the configuration
// chain, which runs through MSB 0 .. NMSB-1 in order. In the top switch box
// down_in is unused (there is no parent). Lint reports circular logic
// through msb_in/msb_out: feedback inputs come from logic blocks that the
// same switch box drives, the structural loop of any programmable fabric.
module mfpga_switchbox
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
  input  logic               clk,
  input  logic               rst_n,
  input  logic               cfg_en,
  input  logic               cfg_in,
  output logic               cfg_out,
  input  logic [NDIN-1:0]    down_in,
  input  logic [NLB-1:0]     fb_in,
  input  logic [NPAD-1:0]    pad_in,
  output logic [KL*NMSB-1:0] child_in
);
  localparam int NUP = up_inputs(ARITY, LUT_K, LEVEL);
  localparam int NIN = msb_inputs(ARITY, LUT_K, LEVEL, TOP);
  localparam int ND  = TOP ? 0 : KL;

  logic [NMSB:0] chain;
  assign chain[0] = cfg_in;
  assign cfg_out  = chain[NMSB];

  for (genvar m = 0; m < NMSB; m++) begin : g_msb
    logic [NIN-1:0] msb_in;
    logic [KL-1:0]  msb_out;

    if (!TOP) begin : g_down
      assign msb_in[KL-1:0] = down_in[m*KL +: KL];
    end

    for (genvar j = 0; j < NUP; j++) begin : g_up
      localparam bit IS_PAD = up_is_pad(ARITY, LUT_K, LEVEL, m, j);
      localparam int SRC    = up_index(ARITY, LUT_K, LEVEL, m, j);
      if (IS_PAD) begin : g_pad
        assign msb_in[ND + j] = pad_in[SRC];
      end else begin : g_fb
        assign msb_in[ND + j] = fb_in[SRC];
      end
    end

    mfpga_msb #(.N_IN(NIN), .N_OUT(KL)) u_msb (
      .clk, .rst_n, .cfg_en,
      .cfg_in (chain[m]),
      .cfg_out(chain[m+1]),
      .in     (msb_in),
      .out    (msb_out)
    );

    for (genvar c = 0; c < KL; c++) begin : g_out
      assign child_in[c*NMSB + m] = msb_out[c];
    end
  end

endmodule
