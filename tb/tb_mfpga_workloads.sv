// tb_mfpga_workloads: runs random netlists with the logic-block counts of the
// MCNC benchmarks on the fabric sizes the architecture study mapped them to
// (up to four levels): 4 (one level), 4 x 4, 4 x 4 x 4 and 4 x 4 x 4 x 4,
// plus the mixed-arity fabrics 4 x 2 x 2 x 4 (pcle) and 4 x 4 x 2 x 2
// (count), written N_0 first. The netlists are random, not the benchmarks
// themselves; each run checks configuration, readback and every output pad
// against the netlist model (see tb_mfpga_run).
module tb_mfpga_workloads;
  localparam int NRUN = 10;
  int  c [NRUN];
  int  f [NRUN];
  bit  d [NRUN];

  tb_mfpga_run #(.ARITY(32'h4), .N_LUTS(4),   .NAME("b1"))       r0  (.checks(c[0]),  .failures(f[0]),  .done(d[0]));
  tb_mfpga_run #(.ARITY(32'h44), .N_LUTS(9),   .NAME("cm138a"))   r1  (.checks(c[1]),  .failures(f[1]),  .done(d[1]));
  tb_mfpga_run #(.ARITY(32'h44), .N_LUTS(10),  .NAME("cm42a"))    r2  (.checks(c[2]),  .failures(f[2]),  .done(d[2]));
  tb_mfpga_run #(.ARITY(32'h4224), .N_LUTS(29), .NAME("pcle"))     r3  (.checks(c[3]),  .failures(f[3]),  .done(d[3]));
  tb_mfpga_run #(.ARITY(32'h444), .N_LUTS(32),  .NAME("decod"))    r4  (.checks(c[4]),  .failures(f[4]),  .done(d[4]));
  tb_mfpga_run #(.ARITY(32'h444), .N_LUTS(33),  .NAME("cc"))       r5  (.checks(c[5]),  .failures(f[5]),  .done(d[5]));
  tb_mfpga_run #(.ARITY(32'h2244), .N_LUTS(37), .NAME("count"))    r6  (.checks(c[6]),  .failures(f[6]),  .done(d[6]));
  tb_mfpga_run #(.ARITY(32'h444), .N_LUTS(49),  .NAME("my_adder")) r7  (.checks(c[7]),  .failures(f[7]),  .done(d[7]));
  tb_mfpga_run #(.ARITY(32'h444), .N_LUTS(61),  .NAME("b9"))       r8  (.checks(c[8]),  .failures(f[8]),  .done(d[8]));
  tb_mfpga_run #(.ARITY(32'h4444), .N_LUTS(110), .NAME("i4"))       r9  (.checks(c[9]),  .failures(f[9]),  .done(d[9]));

  int checks = 0, failures = 0;

  initial begin : watchdog
    #3ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (d.and() == 1'b1);
    for (int i = 0; i < NRUN; i++) begin
      checks += c[i];
      failures += f[i];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
