// mfpga_msb: mini switch box (MSB), the unit of every switch box.
//
// N_OUT unidirectional multiplexers, one per output, each choosing one of the
// N_IN inputs. Output o is driven by in[sel_o - 1], where sel_o is the o-th
// SW-bit field of the configuration (SW = clog2(N_IN + 1)); sel_o = 0 (or an
// unused code) leaves the output unused at 0. The path is purely
// combinational. Configuration is N_OUT*SW bits shifted through cfg_in/cfg_out,
// output 0's field lowest.
//
// The published architecture defines the MSB as one multiplexer per output; the "off" code
// is this implementation's choice. A simulation-only assertion checks, once
// out of reset and configuration, that every select code names an input;
// because it looks at rst_n synchronously, lint reports rst_n as used both
// synchronously and asynchronously, which concerns the check only.
module mfpga_msb #(
  parameter int N_IN  = 6,
  parameter int N_OUT = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             cfg_en,
  input  logic             cfg_in,
  output logic             cfg_out,
  input  logic [N_IN-1:0]  in,
  output logic [N_OUT-1:0] out
);
  localparam int SW = $clog2(N_IN + 1);

  logic [N_OUT*SW-1:0] cfg;

  mfpga_cfg_reg #(.W(N_OUT*SW)) u_cfg (
    .clk, .rst_n, .cfg_en, .cfg_in, .cfg_out, .q(cfg)
  );

  always_comb begin
    for (int o = 0; o < N_OUT; o++) begin
      logic [SW-1:0] sel;
      sel    = cfg[o*SW +: SW];
      out[o] = 1'b0;
      for (int j = 0; j < N_IN; j++)
        if (int'(sel) == j + 1) out[o] = in[j];
    end
  end

  // Once configured, every select must be "off" or name an existing input.
  always_ff @(posedge clk) begin
    if (rst_n && !cfg_en)
      for (int o = 0; o < N_OUT; o++)
        a_sel_legal : assert (int'(cfg[o*SW +: SW]) <= N_IN)
          else $error("MSB output %0d select out of range", o);
  end
endmodule
