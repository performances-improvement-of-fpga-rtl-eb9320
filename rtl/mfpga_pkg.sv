// mfpga_pkg: sizes and wiring rules shared by the multilevel hierarchical
// FPGA (MFPGA) fabric.
//
// A fabric N_0 x N_1 x ... x N_{n-1} is described by one 32-bit parameter,
// ARITY, holding N_i in hex digit i (level 0 in the lowest digit): the
// 4 x 4 x 4 device is 32'h444, 4 x 2 x 2 x 4 is 32'h4224. The number of
// levels is the number of non-zero digits.
//
// With Rent exponent p = 1, c_in = LUT_K and c_out = 1, a level-i cluster
// holds B(i) = N_0*...*N_i logic blocks (LBs) and B(i) input pads (the pads
// per level-0 cluster equal N_0), receives LUT_K*B(i) downward wires from
// its parent and owns a switch box of LUT_K*B(i-1) mini switch boxes (MSBs),
// B(-1) = 1. Each MSB has N_i outputs, one per child, and N_i downward inputs.
//
// Upward network: the B(i) feedbacks and B(i) pads of a level-i cluster are
// spread over the MSBs, 2*N_i/LUT_K of them per MSB (one feedback and one pad
// when N_i = 4, one of either when N_i = 2). MSB m of level i leads down to LB
// input pin m / B(i-1). The block or pad with local index l = 4*v + a0
// (a0 = its position in its level-0 cluster) enters level i on a pin
// rotated by the level, pin (a0 + i) mod LUT_K, so each level gives a path to
// a different input pin. The j-th upward input of MSB m (P = B(i-1),
// H = B(i)/LUT_K) is source u = m mod P + j*P: feedback v = u if u < H,
// else pad v = u - H. Multiplexer select 0 means "output unused, drive 0";
// select j+1 picks input j (downward inputs first, then the upward ones).
package mfpga_pkg;

  // Arity of level i.
  function automatic int arity(input logic [31:0] ar, input int i);
    return (i < 0 || i > 7) ? 1 : int'(ar[4*i +: 4]);
  endfunction

  // Number of levels.
  function automatic int num_levels(input logic [31:0] ar);
    int n = 0;
    while (n < 8 && ar[4*n +: 4] != 4'd0) n++;
    return n;
  endfunction

  // Logic blocks in a level-i cluster; 1 for i = -1.
  function automatic int blocks(input logic [31:0] ar, input int i);
    int r = 1;
    for (int j = 0; j <= i; j++) r = r * arity(ar, j);
    return r;
  endfunction

  // Upward inputs (feedbacks + pads) of one MSB of level i.
  function automatic int up_inputs(input logic [31:0] ar, input int lut_k, input int i);
    return 2 * arity(ar, i) / lut_k;
  endfunction

  // Inputs of one MSB of level i.
  function automatic int msb_inputs(input logic [31:0] ar, input int lut_k,
                                    input int i, input bit top);
    return (top ? 0 : arity(ar, i)) + up_inputs(ar, lut_k, i);
  endfunction

  // Width of one multiplexer select (off code + one code per input).
  function automatic int sel_width(input logic [31:0] ar, input int lut_k,
                                   input int i, input bit top);
    return $clog2(msb_inputs(ar, lut_k, i, top) + 1);
  endfunction

  // Configuration bits of a logic block: LUT mask plus flip-flop use bit.
  function automatic int lb_cfg_bits(input int lut_k);
    return (1 << lut_k) + 1;
  endfunction

  // Configuration bits of a whole level-i cluster.
  function automatic int cluster_cfg_bits(input logic [31:0] ar, input int lut_k,
                                          input int i, input bit top);
    int child;
    if (i == 0) child = lb_cfg_bits(lut_k);
    else        child = cluster_cfg_bits(ar, lut_k, i - 1, 1'b0);
    return arity(ar, i) * child
         + lut_k * blocks(ar, i - 1) * arity(ar, i) * sel_width(ar, lut_k, i, top);
  endfunction

  // Routing switches (multiplexer inputs) of a level-i cluster.
  function automatic int cluster_switches(input logic [31:0] ar, input int lut_k,
                                          input int i, input bit top);
    int child;
    if (i == 0) child = 0;
    else        child = cluster_switches(ar, lut_k, i - 1, 1'b0);
    return arity(ar, i) * child
         + lut_k * blocks(ar, i - 1) * arity(ar, i) * msb_inputs(ar, lut_k, i, top);
  endfunction

  // The j-th upward input of MSB m of level i comes from an input pad (1)
  // or from a logic block output (0) ...
  function automatic bit up_is_pad(input logic [31:0] ar, input int lut_k,
                                   input int i, input int m, input int j);
    int p = blocks(ar, i - 1);
    int h = blocks(ar, i) / lut_k;
    return ((m % p) + j * p) >= h;
  endfunction

  // ... with this local index inside the level-i cluster.
  function automatic int up_index(input logic [31:0] ar, input int lut_k,
                                  input int i, input int m, input int j);
    int p   = blocks(ar, i - 1);
    int h   = blocks(ar, i) / lut_k;
    int pin = m / p;
    int u   = (m % p) + j * p;
    return (u % h) * lut_k + ((pin - (i % lut_k) + lut_k) % lut_k);
  endfunction

endpackage
