// tb_mfpga_msb: checks a mini switch box with 6 inputs and 4 outputs (the
// size used in non-top switch boxes). Random select codes, including the
// "off" code 0, are shifted in; for random input vectors every output must
// equal the selected input, or 0 when off.
module tb_mfpga_msb;
  localparam int N_IN = 6, N_OUT = 4, SW = 3;
  logic clk = 1'b0, rst_n = 1'b0, cfg_en = 1'b0, cfg_in = 1'b0;
  logic cfg_out;
  logic [N_IN-1:0]  in = '0;
  logic [N_OUT-1:0] out;
  int checks = 0, failures = 0, n_off = 0;

  mfpga_msb #(.N_IN(N_IN), .N_OUT(N_OUT)) dut (.*);

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

  initial begin
    int sel [N_OUT];
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    #1;
    check(out == '0, "outputs not off after reset");
    for (int t = 0; t < 50; t++) begin
      logic [N_OUT*SW-1:0] v;
      foreach (sel[o]) begin
        sel[o] = $urandom % (N_IN + 1);
        v[o*SW +: SW] = SW'(sel[o]);
      end
      @(negedge clk);
      cfg_en = 1'b1;
      for (int p = N_OUT*SW - 1; p >= 0; p--) begin
        cfg_in = v[p];
        @(negedge clk);
      end
      cfg_en = 1'b0;
      for (int n = 0; n < 20; n++) begin
        in = N_IN'($urandom);
        #1;
        foreach (sel[o]) begin
          logic exp;
          exp = (sel[o] == 0) ? 1'b0 : in[sel[o] - 1];
          check(out[o] == exp, $sformatf("output %0d select %0d", o, sel[o]));
          if (sel[o] == 0) n_off++;
        end
      end
    end
    check(n_off > 0, "off code never tried");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
