// tb_mfpga_top: end-to-end test of the MFPGA fabric at its default size
// (4 x 4 x 4: 64 logic blocks, 64 input pads, 64 output pads).
//
// Flow: reset (all outputs must read 0), shift a bitstream for a random
// user netlist into the configuration chain (outputs must stay 0 while
// cfg_en is high), shift the same bitstream again and compare everything
// that comes out of cfg_out with it (checks chain length and contents),
// then run random input-pad vectors and compare every output pad, every
// cycle, with the netlist model of mfpga_tb_pkg. A second netlist with
// a different occupancy is then loaded over the first, and a reset in the
// middle must clear the fabric. Mechanisms counted: configuration hold,
// readback, routes through each level (including routes taken above the
// lowest common level), pad and feedback sources, registered and bypassed
// logic blocks, flip-flops seen at 1, reset clearing.
module tb_mfpga_top;
  import mfpga_tb_pkg::*;

  localparam logic [31:0] ARITY = 32'h444;
  localparam int K = 4, LUT_K = 4, LEVELS = 3;
  localparam int NLB = 64, NPAD = 64;

  logic clk = 1'b0, rst_n = 1'b0, cfg_en = 1'b0, cfg_in = 1'b0;
  logic cfg_out;
  logic [NPAD-1:0] pad_in = '0;
  logic [NLB-1:0]  pad_out;

  int checks = 0, failures = 0;
  int n_hold = 0, n_readback = 0, n_ff_ones = 0, n_comb = 0, n_reset = 0;
  int n_level_path = 0;

  mfpga_top dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  task automatic load(ref bit bits[$]);
    int t = bits.size();
    @(negedge clk);
    cfg_en = 1'b1;
    for (int p = t - 1; p >= 0; p--) begin
      cfg_in = bits[p];
      @(negedge clk);
      if (p % 97 == 0) begin
        check(pad_out == '0, "outputs not held during configuration");
        n_hold++;
      end
    end
    // second pass: the chain must give back exactly what was loaded
    for (int p = t - 1; p >= 0; p--) begin
      check(cfg_out == bits[p], $sformatf("readback bit %0d", p));
      n_readback++;
      cfg_in = bits[p];
      @(negedge clk);
    end
    cfg_en = 1'b0;
  endtask

  task automatic run(fabric f, int cycles);
    bit pads[] = new[NPAD];
    bit down[] = new[1];
    bit out[];
    // one rising edge has passed since cfg_en fell: flip-flops started at 0
    // and sampled the pads that were applied during configuration
    foreach (pads[i]) pads[i] = pad_in[i];
    f.eval(pads, down, out);
    f.clock(pads, down, out);
    for (int n = 0; n < cycles; n++) begin
      @(negedge clk);
      foreach (pads[i]) begin
        pads[i] = 1'($urandom);
        pad_in[i] = pads[i];
      end
      #1;
      f.eval(pads, down, out);
      for (int g = 0; g < NLB; g++) begin
        check(pad_out[g] == out[g],
              $sformatf("cycle %0d pad_out[%0d]=%0b model %0b", n, g, pad_out[g], out[g]));
        if (f.used[g] && f.use_ff[g] && out[g]) n_ff_ones++;
        if (f.used[g] && !f.use_ff[g]) n_comb++;
      end
      f.clock(pads, down, out);
    end
  endtask

  initial begin
    fabric f;
    bit bits[$];

    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(pad_out == '0, "outputs not 0 after reset");

    for (int round = 0; round < 2; round++) begin
      f = new(ARITY, LUT_K, 1'b1);
      f.random_netlist(round == 0 ? 60 : 90, 30);
      f.route_all();
      f.bitstream(bits);
      check(bits.size() == 3136, $sformatf("bitstream size %0d", bits.size()));
      load(bits);
      f.reset_state();
      run(f, 300);
      $display("round %0d: routes per level %p, from pads %0d, from blocks %0d, above LCA %0d, dropped %0d",
               round, f.routes_at_level, f.routes_from_pad, f.routes_from_lb,
               f.alt_level_routes, f.route_fail);
      for (int i = 0; i < LEVELS; i++)
        check(f.routes_at_level[i] > 0, $sformatf("no route through level %0d", i));
      check(f.routes_from_pad > 0 && f.routes_from_lb > 0, "pad or feedback source never used");
      check(f.alt_level_routes > 0, "no route above the lowest common level");
    end

    // One source, one destination in the same level-0 cluster, one path per
    // level: block A (5) buffers input pad 5, block B (6) buffers A, and the
    // route A -> B is forced through level 0, 1 and 2 in turn. B must follow
    // A each time, and the three routes must land on three different pins.
    begin
      int pins[$];
      for (int lv = 0; lv < LEVELS; lv++) begin
        f = new(ARITY, LUT_K, 1'b1);
        foreach (f.used[g]) begin f.used[g] = 1'b0; f.use_ff[g] = 1'b0; end
        f.used[5] = 1'b1; f.func[5] = 64'hAAAA;           // out = slot 0
        f.slot_kind[5*LUT_K] = SRC_PAD; f.slot_idx[5*LUT_K] = 5;
        f.used[6] = 1'b1; f.func[6] = 64'h5555;           // out = !slot 0
        f.slot_kind[6*LUT_K] = SRC_LB;  f.slot_idx[6*LUT_K] = 5;
        f.force_level = lv;
        f.route_all();
        check(f.route_fail == 0, $sformatf("A -> B not routable through level %0d", lv));
        pins.push_back(f.slot_pin[6*LUT_K]);
        f.bitstream(bits);
        load(bits);
        run(f, 20);
        n_level_path++;
      end
      $display("A -> B pins through levels 0..2: %p", pins);
      check(pins[0] != pins[1] && pins[1] != pins[2] && pins[0] != pins[2],
            "paths through different levels reach the same pin");
      check(pins[0] == 1 && pins[1] == 2 && pins[2] == 3, "pins are not a0, a0+1, a0+2");
    end

    // reset in the middle of operation clears configuration and state
    @(negedge clk);
    rst_n = 1'b0;
    #1;
    check(pad_out == '0, "reset did not clear the fabric");
    n_reset++;
    @(negedge clk);
    rst_n = 1'b1;

    check(n_hold > 0, "configuration hold never checked");
    check(n_readback > 0, "readback never checked");
    check(n_ff_ones > 0, "no registered block ever output 1");
    check(n_comb > 0, "no bypassed block exercised");
    check(n_level_path == LEVELS, "not every level carried the A -> B path");
    $display("hold=%0d readback=%0d ff_ones=%0d comb=%0d reset=%0d",
             n_hold, n_readback, n_ff_ones, n_comb, n_reset);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
