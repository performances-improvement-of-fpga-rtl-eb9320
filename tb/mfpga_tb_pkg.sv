// mfpga_tb_pkg: reference model, netlist generator and router used by the
// cluster- and top-level testbenches of the MFPGA fabric.
//
// The class `fabric` describes one root cluster (arity N_i per level, given
// as in the RTL by a 32-bit value with N_i in hex digit i; LUT_K-input logic
// blocks). It holds
//   * a random user netlist: for every logic block a truth table over its
//     logical input slots, a flip-flop use bit and the source of each slot
//     (a logic block output, an input pad or, for a non-top root, one of the
//     root's downward inputs);
//   * a router that maps every slot onto the fabric: it climbs from the source
//     to the lowest common level (or higher, if that path is taken) and walks
//     the single downward path to the destination, refusing to reuse a
//     multiplexer output or a logic-block pin for a different signal;
//   * the configuration bitstream in chain order (position 0 nearest cfg_in);
//   * a cycle model of the netlist, written independently of the fabric: it
//     evaluates the truth tables on logical slots, never the routed pins.
// The wiring rules are re-derived here from the architecture description,
// not taken from the RTL package: MSB m of level i serves pin m / B(i-1)
// (B(i) = blocks of a level-i cluster); block or pad l = 4*v + a0 enters
// level i on pin (a0 + i) mod 4, as upward source u = v (blocks) or
// u = B(i)/4 + v (pads), at MSB pin*B(i-1) + u mod B(i-1), upward input
// u / B(i-1).
package mfpga_tb_pkg;

  localparam int SRC_NONE = 0;
  localparam int SRC_LB   = 1;
  localparam int SRC_PAD  = 2;
  localparam int SRC_DOWN = 3;

  // logic blocks of a fabric whose arity N_i is hex digit i of ar
  function automatic int ar_blocks(input logic [31:0] ar);
    int r = 1;
    for (int i = 0; i < 8 && ar[4*i +: 4] != 0; i++) r *= int'(ar[4*i +: 4]);
    return r;
  endfunction

  function automatic int tpow(input int b, input int e);
    int r = 1;
    for (int i = 0; i < e; i++) r *= b;
    return r;
  endfunction

  class fabric;
    logic [31:0] ar;
    int lut_k, levels;
    bit top;
    int nlb, npad, ndown;

    // routing state
    int sel[longint];        // multiplexer output -> select code
    int pin_src[longint];    // (block, pin) -> source id
    // user netlist
    bit        used[];
    bit        use_ff[];
    bit [63:0] func[];
    int        slot_kind[];
    int        slot_idx[];
    int        slot_pin[];
    // model state
    bit        state[];
    // statistics
    int routes_at_level[];
    int routes_from_pad, routes_from_lb, routes_from_down, route_fail;
    int alt_level_routes;
    // when >= 0, block-output sources may only be routed through this level
    int force_level = -1;

    function new(logic [31:0] ar_, int lut_k_, bit top_);
      ar = ar_; lut_k = lut_k_; top = top_;
      levels = 0;
      while (levels < 8 && ar[4*levels +: 4] != 0) levels++;
      nlb   = blk(levels - 1);
      npad  = nlb;                    // N_0 pads per level-0 cluster
      ndown = top ? 0 : lut_k * nlb;
      used = new[nlb]; use_ff = new[nlb]; func = new[nlb]; state = new[nlb];
      slot_kind = new[nlb * lut_k]; slot_idx = new[nlb * lut_k];
      slot_pin = new[nlb * lut_k];
      routes_at_level = new[levels];
      foreach (slot_kind[i]) begin
        slot_kind[i] = SRC_NONE; slot_idx[i] = 0; slot_pin[i] = -1;
      end
      foreach (state[i]) state[i] = 1'b0;
    endfunction

    function int ka(int i);
      return (i < 0) ? 1 : int'(ar[4*i +: 4]);
    endfunction

    function int blk(int i);
      int r = 1;
      for (int j = 0; j <= i; j++) r *= ka(j);
      return r;
    endfunction

    // downward inputs of one MSB of level i (0 at the top)
    function int nd(int i);
      return (top && i == levels - 1) ? 0 : ka(i);
    endfunction

    function longint mux_key(int i, int q, int m, int c);
      return ((longint'(i) * (64'd1 << 20) + longint'(q)) * (64'd1 << 20) + longint'(m)) * 256 + longint'(c);
    endfunction

    function int sel_width(int i);
      return $clog2(nd(i) + 2 * ka(i) / lut_k + 1);
    endfunction

    // Downward walk from MSB m_start of level i_start (select s_start) to
    // block h. Returns the pin reached, or -1 when a multiplexer output is
    // already taken by another signal. Commits only when `commit` is set.
    function int walk(int i_start, int m_start, int s_start, int h, bit commit);
      int m = m_start, s = s_start;
      for (int j = i_start; j >= 0; j--) begin
        int q = h / blk(j);
        int c = (h / blk(j - 1)) % ka(j);
        longint key = mux_key(j, q, m, c);
        if (sel.exists(key) && sel[key] != s) return -1;
        if (commit) sel[key] = s;
        if (j > 0) begin
          s = (m % ka(j - 1)) + 1;
          m = m / ka(j - 1);
        end
      end
      return m;
    endfunction

    // Route source (kind, idx) to some pin of block h; returns the pin or -1.
    function int route(int kind, int idx, int h);
      int src_id = kind * 1000000 + idx;
      if (kind == SRC_DOWN) begin
        int m = idx / ka(levels - 1);
        int s = (idx % ka(levels - 1)) + 1;
        int pin = walk(levels - 1, m, s, h, 1'b0);
        longint pk = longint'(h) * 64 + longint'(pin);
        if (pin < 0) return -1;
        if (pin_src.exists(pk) && pin_src[pk] != src_id) return -1;
        void'(walk(levels - 1, m, s, h, 1'b1));
        pin_src[pk] = src_id;
        routes_from_down++;
        routes_at_level[levels - 1]++;
        return pin;
      end
      begin
        int lca = 0;
        while (idx / blk(lca) != h / blk(lca)) lca++;
        for (int i = lca; i < levels; i++) begin
          int l   = idx % blk(i);
          int pp  = blk(i - 1);
          int u   = l / lut_k + ((kind == SRC_PAD) ? blk(i) / lut_k : 0);
          int m   = ((l % lut_k + i) % lut_k) * pp + u % pp;
          int s   = nd(i) + u / pp + 1;
          int pin = walk(i, m, s, h, 1'b0);
          longint pk = longint'(h) * 64 + longint'(pin);
          if (kind == SRC_LB && force_level >= 0 && i != force_level) continue;
          if (pin < 0) continue;
          if (pin_src.exists(pk) && pin_src[pk] != src_id) continue;
          void'(walk(i, m, s, h, 1'b1));
          pin_src[pk] = src_id;
          routes_at_level[i]++;
          if (i != lca) alt_level_routes++;
          if (kind == SRC_LB) routes_from_lb++; else routes_from_pad++;
          return pin;
        end
      end
      return -1;
    endfunction

    // Random source near block h: level d chosen at random, then a block or
    // pad inside h's level-d cluster.
    function void pick_source(int g, output int kind, output int idx);
      for (int tries = 0; tries < 20; tries++) begin
        int d    = $urandom % levels;
        int span = blk(d);
        int j    = (g / span) * span + ($urandom % span);
        int r    = $urandom % 100;
        if (!top && r < 15) begin
          kind = SRC_DOWN; idx = $urandom % ndown; return;
        end
        if (r < 45) begin
          kind = SRC_PAD; idx = j; return;
        end
        if (used[j] && (j < g || use_ff[j])) begin
          kind = SRC_LB; idx = j; return;
        end
      end
      kind = SRC_PAD; idx = $urandom % npad;
    endfunction

    // Random netlist with roughly occ_pct % of the blocks used.
    function void random_netlist(int occ_pct, int ff_pct);
      foreach (used[g]) used[g] = ($urandom % 100) < occ_pct;
      fill_netlist(ff_pct);
    endfunction

    // Random netlist on exactly n blocks placed at random.
    function void random_netlist_n(int n, int ff_pct);
      int perm[] = new[nlb];
      foreach (perm[i]) perm[i] = i;
      for (int i = nlb - 1; i > 0; i--) begin
        int j = $urandom % (i + 1);
        int t = perm[i];
        perm[i] = perm[j];
        perm[j] = t;
      end
      foreach (used[g]) used[g] = 1'b0;
      for (int i = 0; i < n && i < nlb; i++) used[perm[i]] = 1'b1;
      fill_netlist(ff_pct);
    endfunction

    function void fill_netlist(int ff_pct);
      foreach (used[g]) begin
        use_ff[g] = used[g] && (($urandom % 100) < ff_pct);
        func[g]   = {$urandom, $urandom};
      end
      foreach (used[g]) begin
        if (!used[g]) continue;
        for (int s = 0; s < lut_k; s++) begin
          int kind, idx;
          pick_source(g, kind, idx);
          slot_kind[g*lut_k + s] = kind;
          slot_idx[g*lut_k + s]  = idx;
        end
      end
    endfunction

    // Route every slot; an unroutable slot is dropped (it reads 0).
    function void route_all();
      foreach (used[g]) begin
        if (!used[g]) continue;
        for (int s = 0; s < lut_k; s++) begin
          int p;
          if (slot_kind[g*lut_k + s] == SRC_NONE) continue;
          p = route(slot_kind[g*lut_k + s], slot_idx[g*lut_k + s], g);
          slot_pin[g*lut_k + s] = p;
          if (p < 0) begin
            route_fail++;
            slot_kind[g*lut_k + s] = SRC_NONE;
          end
        end
      end
    endfunction

    // Physical LUT mask: the truth table re-indexed from logical slots to the
    // pins the router picked.
    function bit [63:0] phys_mask(int g);
      bit [63:0] pm = '0;
      if (!used[g]) return pm;
      for (int x = 0; x < (1 << lut_k); x++) begin
        int y = 0;
        for (int s = 0; s < lut_k; s++) begin
          int p = slot_pin[g*lut_k + s];
          if (p >= 0 && ((x >> p) & 1) != 0) y |= (1 << s);
        end
        pm[x] = func[g][y];
      end
      return pm;
    endfunction

    function void emit_cluster(int i, int q, bit t, ref bit bits[$]);
      for (int c = 0; c < ka(i); c++) begin
        if (i == 0) begin
          int g = q * ka(0) + c;
          bit [63:0] pm = phys_mask(g);
          for (int b = 0; b < (1 << lut_k); b++) bits.push_back(pm[b]);
          bits.push_back(use_ff[g]);
        end else begin
          emit_cluster(i - 1, q * ka(i) + c, 1'b0, bits);
        end
      end
      for (int m = 0; m < lut_k * blk(i - 1); m++)
        for (int c = 0; c < ka(i); c++) begin
          longint key = mux_key(i, q, m, c);
          int s  = sel.exists(key) ? sel[key] : 0;
          int sw = sel_width(i);
          for (int b = 0; b < sw; b++) bits.push_back(1'((s >> b) & 1));
        end
    endfunction

    // Configuration vector, bits[p] = chain position p.
    function void bitstream(ref bit bits[$]);
      bits.delete();
      emit_cluster(levels - 1, 0, top, bits);
    endfunction

    function bit src_val(int kind, int idx, const ref bit out[], const ref bit pads[],
                         const ref bit down[]);
      case (kind)
        SRC_LB:   return out[idx];
        SRC_PAD:  return pads[idx];
        SRC_DOWN: return down[idx];
        default:  return 1'b0;
      endcase
    endfunction

    function bit lut_val(int g, const ref bit out[], const ref bit pads[], const ref bit down[]);
      int y = 0;
      for (int s = 0; s < lut_k; s++)
        if (src_val(slot_kind[g*lut_k + s], slot_idx[g*lut_k + s], out, pads, down))
          y |= (1 << s);
      return func[g][y];
    endfunction

    // Block outputs for the current pads / downward inputs and state.
    function void eval(const ref bit pads[], const ref bit down[], ref bit out[]);
      out = new[nlb];
      foreach (out[g]) out[g] = used[g] && use_ff[g] && state[g];
      foreach (out[g])
        if (used[g] && !use_ff[g]) out[g] = lut_val(g, out, pads, down);
    endfunction

    // Clock edge: every used flip-flop samples its LUT.
    function void clock(const ref bit pads[], const ref bit down[], const ref bit out[]);
      bit nxt[] = new[nlb];
      foreach (nxt[g]) nxt[g] = (used[g] && use_ff[g]) ? lut_val(g, out, pads, down) : 1'b0;
      state = nxt;
    endfunction

    function void reset_state();
      foreach (state[g]) state[g] = 1'b0;
    endfunction
  endclass

endpackage
