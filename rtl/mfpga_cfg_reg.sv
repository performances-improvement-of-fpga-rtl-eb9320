// mfpga_cfg_reg: one segment of the configuration memory.
//
// The configuration SRAM of the fabric (LUT masks, flip-flop bypass bits and
// multiplexer selects) is modelled as a chain of these segments. While cfg_en
// is high the segment shifts one bit per clock: cfg_in enters at q[0], every
// bit moves one place up, and q[W-1] leaves on cfg_out towards the next
// segment. While cfg_en is low the contents hold and drive q. An active-low
// asynchronous reset clears the segment, which puts every multiplexer in its
// "off" state and every LUT at constant 0 (a power-on clear).
//
// The published MFPGA architecture only says that the fabric is built mostly
// from SRAM cells and multiplexers; the serial chain, its bit order and the
// clear on reset are choices of this implementation.
module mfpga_cfg_reg #(
  parameter int W = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         cfg_en,
  input  logic         cfg_in,
  output logic         cfg_out,
  output logic [W-1:0] q
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      q <= '0;
    else if (cfg_en) q <= {q[W-2:0], cfg_in};
  end

  assign cfg_out = q[W-1];
endmodule
