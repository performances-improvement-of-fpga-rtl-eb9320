// tb_mfpga_switchbox: checks two switch boxes.
//   dut_mid: level-1, non-top (16 MSBs with 4 downward inputs, one feedback
//            and one input pad each; 64 outputs to four children)
//   dut_top: level-0 top switch box of a one-level fabric (4 MSBs whose
//            only inputs are a feedback and an input pad)
// Random select codes are loaded and random inputs applied; every child input
// is compared with a model. Then the upward taps are probed one-hot: each
// feedback and each pad must reach exactly one MSB, and that MSB must lead
// to pin (a0 + level) mod K of the destination block (a0 = the source's
// index in its level-0 cluster), which is what gives every level a path to a
// different input pin.
module tb_mfpga_switchbox;
  localparam int K = 4;
  localparam int NM1 = 16, NIN1 = 6, SW1 = 3;
  localparam int NM0 = 4,  NIN0 = 2, SW0 = 2;

  logic clk = 1'b0, rst_n = 1'b0, cfg_en = 1'b0;
  logic cfg_in1 = 1'b0, cfg_in0 = 1'b0, cfg_out1, cfg_out0;
  logic [63:0] down1 = '0;
  logic [15:0] fb1 = '0, pad1 = '0;
  logic [63:0] child1;
  logic [3:0]  fb0 = '0, pad0 = '0;
  logic [15:0] child0;
  int checks = 0, failures = 0;

  mfpga_switchbox #(.ARITY(32'h444), .LUT_K(K), .LEVEL(1), .TOP(1'b0)) dut_mid (
    .clk, .rst_n, .cfg_en, .cfg_in(cfg_in1), .cfg_out(cfg_out1),
    .down_in(down1), .fb_in(fb1), .pad_in(pad1), .child_in(child1));

  mfpga_switchbox #(.ARITY(32'h4), .LUT_K(K), .LEVEL(0), .TOP(1'b1)) dut_top (
    .clk, .rst_n, .cfg_en, .cfg_in(cfg_in0), .cfg_out(cfg_out0),
    .down_in(1'b0), .fb_in(fb0), .pad_in(pad0), .child_in(child0));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  // local index climbing to MSB m of a level-`lv` switch box (rotation rule)
  function automatic int src_of(int lv, int m);
    int kl = (lv == 0) ? 1 : K;
    return (m % kl) * K + (((m / kl) - lv + K) % K);
  endfunction

  int sel1 [NM1][K];
  int sel0 [NM0][K];

  task automatic load_both();
    logic [NM1*K*SW1-1:0] v1;
    logic [NM0*K*SW0-1:0] v0;
    for (int m = 0; m < NM1; m++)
      for (int c = 0; c < K; c++) v1[(m*K + c)*SW1 +: SW1] = SW1'(sel1[m][c]);
    for (int m = 0; m < NM0; m++)
      for (int c = 0; c < K; c++) v0[(m*K + c)*SW0 +: SW0] = SW0'(sel0[m][c]);
    @(negedge clk);
    cfg_en = 1'b1;
    for (int p = NM1*K*SW1 - 1; p >= 0; p--) begin
      cfg_in1 = v1[p];
      cfg_in0 = (p < NM0*K*SW0) ? v0[p] : 1'b0;
      @(negedge clk);
    end
    cfg_en = 1'b0;
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;

    // random selects, random inputs
    for (int t = 0; t < 20; t++) begin
      foreach (sel1[m, c]) sel1[m][c] = $urandom % (NIN1 + 1);
      foreach (sel0[m, c]) sel0[m][c] = $urandom % (NIN0 + 1);
      load_both();
      for (int n = 0; n < 20; n++) begin
        down1 = {$urandom, $urandom};
        fb1 = 16'($urandom); pad1 = 16'($urandom);
        fb0 = 4'($urandom);  pad0 = 4'($urandom);
        #1;
        for (int m = 0; m < NM1; m++)
          for (int c = 0; c < K; c++) begin
            logic e;
            int s;
            s = sel1[m][c];
            if (s == 0)           e = 1'b0;
            else if (s <= K)      e = down1[m*K + s - 1];
            else if (s == K + 1)  e = fb1[src_of(1, m)];
            else                  e = pad1[src_of(1, m)];
            check(child1[c*NM1 + m] == e, $sformatf("mid MSB %0d out %0d sel %0d", m, c, s));
          end
        for (int m = 0; m < NM0; m++)
          for (int c = 0; c < K; c++) begin
            logic e;
            int s;
            s = sel0[m][c];
            if (s == 0)      e = 1'b0;
            else if (s == 1) e = fb0[src_of(0, m)];
            else             e = pad0[src_of(0, m)];
            check(child0[c*NM0 + m] == e, $sformatf("top MSB %0d out %0d sel %0d", m, c, s));
          end
      end
    end

    // one-hot probing of the upward taps: output 0 = feedback, output 1 = pad
    foreach (sel1[m, c]) sel1[m][c] = (c == 0) ? K + 1 : (c == 1) ? K + 2 : 0;
    foreach (sel0[m, c]) sel0[m][c] = (c == 0) ? 1 : (c == 1) ? 2 : 0;
    load_both();
    down1 = '0;
    for (int l = 0; l < 16; l++) begin
      int hits_fb, hits_pad, m_fb, m_pad;
      fb1 = 16'(1) << l; pad1 = '0;
      #1;
      hits_fb = 0; m_fb = -1;
      for (int m = 0; m < NM1; m++) if (child1[m]) begin hits_fb++; m_fb = m; end
      fb1 = '0; pad1 = 16'(1) << l;
      #1;
      hits_pad = 0; m_pad = -1;
      for (int m = 0; m < NM1; m++) if (child1[NM1 + m]) begin hits_pad++; m_pad = m; end
      check(hits_fb == 1 && hits_pad == 1, $sformatf("level-1 tap %0d reaches %0d/%0d MSBs", l, hits_fb, hits_pad));
      check(m_fb / K == (l % K + 1) % K, $sformatf("feedback %0d leads to pin %0d", l, m_fb / K));
      check(m_pad == m_fb, "pad and feedback taps differ");
    end
    for (int l = 0; l < 4; l++) begin
      fb0 = 4'(1) << l; pad0 = '0;
      #1;
      check(child0[3:0] == (4'(1) << l), $sformatf("level-0 feedback %0d", l));
      fb0 = '0; pad0 = 4'(1) << l;
      #1;
      check(child0[7:4] == (4'(1) << l), $sformatf("level-0 pad %0d", l));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
