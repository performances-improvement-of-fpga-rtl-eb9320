// tb_mfpga_cluster: test of one non-top level-1 cluster (16 logic blocks,
// 16 input pads, 64 downward inputs from a parent switch box).
//
// A random netlist whose block inputs come from input pads, other blocks
// and the cluster's downward inputs is routed with the mfpga_tb_pkg router
// (the switch boxes use their K+2-input MSBs here, including the downward
// ports), loaded through the configuration chain and run against the
// netlist model with random pads and downward inputs. The block outputs
// are compared every cycle. Each mechanism (downward-input route, routes
// at both levels, pad and feedback routes, registered blocks) must occur.
module tb_mfpga_cluster;
  import mfpga_tb_pkg::*;

  localparam int LUT_K = 4, LEVEL = 1;
  localparam int NLB = 16, NPAD = 16, NDIN = 64;

  logic clk = 1'b0, rst_n = 1'b0, cfg_en = 1'b0, cfg_in = 1'b0;
  logic cfg_out;
  logic [NDIN-1:0] down_in = '0;
  logic [NPAD-1:0] pad_in = '0;
  logic [NLB-1:0]  lb_out;

  int checks = 0, failures = 0, n_ff_ones = 0;

  mfpga_cluster #(.ARITY(32'h44), .LUT_K(LUT_K), .LEVEL(LEVEL), .TOP(1'b0)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
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

  initial begin
    fabric f;
    bit bits[$];
    bit pads[] = new[NPAD];
    bit down[] = new[NDIN];
    bit out[];

    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    for (int round = 0; round < 3; round++) begin
      f = new(32'h44, LUT_K, 1'b0);
      f.random_netlist(70, 30);
      f.route_all();
      f.bitstream(bits);
      check(bits.size() == 656, $sformatf("bitstream size %0d", bits.size()));
      @(negedge clk);
      cfg_en = 1'b1;
      for (int p = bits.size() - 1; p >= 0; p--) begin
        cfg_in = bits[p];
        @(negedge clk);
      end
      cfg_en = 1'b0;
      foreach (pads[i]) pads[i] = pad_in[i];
      foreach (down[i]) down[i] = down_in[i];
      f.eval(pads, down, out);
      f.clock(pads, down, out);
      for (int n = 0; n < 200; n++) begin
        @(negedge clk);
        foreach (pads[i]) begin pads[i] = 1'($urandom); pad_in[i] = pads[i]; end
        foreach (down[i]) begin down[i] = 1'($urandom); down_in[i] = down[i]; end
        #1;
        f.eval(pads, down, out);
        for (int g = 0; g < NLB; g++) begin
          check(lb_out[g] == out[g], $sformatf("round %0d cycle %0d lb_out[%0d]", round, n, g));
          if (f.used[g] && f.use_ff[g] && out[g]) n_ff_ones++;
        end
        f.clock(pads, down, out);
      end
      $display("round %0d: level routes %p pads %0d blocks %0d down %0d dropped %0d",
               round, f.routes_at_level, f.routes_from_pad, f.routes_from_lb,
               f.routes_from_down, f.route_fail);
      check(f.routes_from_down > 0, "no downward-input route");
      check(f.routes_at_level[0] > 0 && f.routes_at_level[1] > 0, "a level unused");
      check(f.routes_from_pad > 0 && f.routes_from_lb > 0, "pad or feedback unused");
    end
    check(n_ff_ones > 0, "no registered block output 1");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
