// tb_mfpga_lb: checks the logic block (4-LUT + bypassable flip-flop).
// For random masks it loads the 17 configuration bits serially, then checks
// the combinational output for all 16 input values (bypass), the one-cycle
// latency of the registered output, the output hold at 0 while cfg_en is
// high, the flip-flop clear during configuration, and the clear on reset.
module tb_mfpga_lb;
  localparam int LUT_K = 4, CW = 17;
  logic clk = 1'b0, rst_n = 1'b0, cfg_en = 1'b0, cfg_in = 1'b0;
  logic cfg_out, out;
  logic [LUT_K-1:0] in = '0;
  int checks = 0, failures = 0, n_ff = 0, n_comb = 0;

  mfpga_lb #(.LUT_K(LUT_K)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  task automatic load(input logic [CW-1:0] v);
    @(negedge clk);
    cfg_en = 1'b1;
    for (int p = CW - 1; p >= 0; p--) begin
      cfg_in = v[p];
      @(negedge clk);
      check(out == 1'b0, "output not held during configuration");
    end
    cfg_en = 1'b0;
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 40; t++) begin
      logic [15:0] mask;
      bit ff;
      logic prev;
      mask = 16'($urandom);
      ff   = t[0];
      load({ff, mask});
      if (!ff) begin
        for (int x = 0; x < 16; x++) begin
          in = 4'(x);
          #1;
          check(out == mask[x], $sformatf("comb mask %h in %0d", mask, x));
          n_comb++;
        end
      end else begin
        // first edge after configuration: flip-flop was cleared
        check(out == 1'b0, "flip-flop not cleared by configuration");
        prev = mask[in];
        for (int n = 0; n < 30; n++) begin
          @(negedge clk);
          check(out == prev, $sformatf("registered output mask %h", mask));
          n_ff++;
          in = 4'($urandom);
          #1;
          prev = mask[in];
        end
      end
    end
    // reset clears both the configuration and the flip-flop
    load({1'b1, 16'hFFFF});
    repeat (2) @(negedge clk);
    check(out == 1'b1, "registered constant 1 not seen");
    rst_n = 1'b0;
    #1;
    check(out == 1'b0, "reset did not clear the block");
    rst_n = 1'b1;
    check(n_ff > 0 && n_comb > 0, "a mode was never exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
