// tb_mfpga_run: one workload run on an mfpga_top with per-level arity ARITY
// (N_i in hex digit i, 4-input LUTs).
// It places a random netlist of N_LUTS logic blocks at random, routes it
// with the mfpga_tb_pkg router, loads the bitstream (checking the outputs
// stay at 0 meanwhile and reading it back through cfg_out), then applies
// CYCLES random input-pad vectors and compares every output pad with the
// netlist model. Results are reported on checks/failures/done; routed and
// dropped input connections are printed.
module tb_mfpga_run #(
  parameter logic [31:0] ARITY = 32'h444,
  parameter int    N_LUTS = 32,
  parameter int    CYCLES = 100,
  parameter string NAME   = "workload"
) (
  output int checks,
  output int failures,
  output bit done
);
  import mfpga_tb_pkg::*;

  localparam int K = 4;
  localparam int NLB = ar_blocks(ARITY);

  logic clk = 1'b0, rst_n = 1'b0, cfg_en = 1'b0, cfg_in = 1'b0;
  logic cfg_out;
  logic [NLB-1:0] pad_in = '0;
  logic [NLB-1:0] pad_out;

  mfpga_top #(.ARITY(ARITY), .LUT_K(K)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s: %s", NAME, what);
    end
  endtask

  initial begin
    fabric f;
    bit bits[$];
    bit pads[] = new[NLB];
    bit down[] = new[1];
    bit out[];
    int routed;
    checks = 0; failures = 0; done = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    f = new(ARITY, K, 1'b1);
    f.random_netlist_n(N_LUTS, 30);
    f.route_all();
    f.bitstream(bits);

    @(negedge clk);
    cfg_en = 1'b1;
    for (int p = bits.size() - 1; p >= 0; p--) begin
      cfg_in = bits[p];
      @(negedge clk);
      if (p % 211 == 0) check(pad_out == '0, "outputs not held during configuration");
    end
    for (int p = bits.size() - 1; p >= 0; p--) begin
      if (p % 7 == 0) check(cfg_out == bits[p], $sformatf("readback bit %0d", p));
      cfg_in = bits[p];
      @(negedge clk);
    end
    cfg_en = 1'b0;

    foreach (pads[i]) pads[i] = pad_in[i];
    f.eval(pads, down, out);
    f.clock(pads, down, out);
    for (int n = 0; n < CYCLES; n++) begin
      @(negedge clk);
      foreach (pads[i]) begin pads[i] = 1'($urandom); pad_in[i] = pads[i]; end
      #1;
      f.eval(pads, down, out);
      for (int g = 0; g < NLB; g++)
        check(pad_out[g] == out[g], $sformatf("cycle %0d pad_out[%0d]", n, g));
      f.clock(pads, down, out);
    end
    routed = f.routes_from_pad + f.routes_from_lb;
    $display("%s: %0d LUTs on %0d blocks (%0d levels), %0d config bits, %0d inputs routed, %0d dropped, routes per level %p",
             NAME, N_LUTS, NLB, f.levels, bits.size(), routed, f.route_fail, f.routes_at_level);
    done = 1'b1;
  end
endmodule
