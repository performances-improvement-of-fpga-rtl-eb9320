// tb_mfpga_cfg_reg: checks one configuration segment (W = 8): clear on
// reset, one-bit-per-clock shifting from cfg_in through q to cfg_out,
// hold while cfg_en is low, and a W-cycle delay from cfg_in to cfg_out.
module tb_mfpga_cfg_reg;
  localparam int W = 8;
  logic clk = 1'b0, rst_n = 1'b0, cfg_en = 1'b0, cfg_in = 1'b0;
  logic cfg_out;
  logic [W-1:0] q;
  int checks = 0, failures = 0;

  mfpga_cfg_reg #(.W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    logic [W-1:0] model;
    bit hist[$];
    repeat (2) @(negedge clk);
    check(q == '0 && cfg_out == 1'b0, "not cleared by reset");
    rst_n = 1'b1;
    model = '0;
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      check(q == model, $sformatf("cycle %0d q=%h model %h", n, q, model));
      check(cfg_out == model[W-1], "cfg_out is not the top bit");
      cfg_en = 1'($urandom % 4 != 0);
      cfg_in = 1'($urandom);
      @(posedge clk);
      if (cfg_en) begin
        model = {model[W-2:0], cfg_in};
        hist.push_back(cfg_in);
      end
    end
    // the bit shifted in W enabled cycles ago is on cfg_out now
    @(negedge clk);
    check(cfg_out == hist[hist.size() - W], "delay through the segment is not W");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
