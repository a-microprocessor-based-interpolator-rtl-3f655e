// io_regs: the 24-bit registers of the interpolator's I/O unit.
//
// The input register takes a 24-bit word assembled by the host's parallel
// ports when the host strobes FBSTB, and feeds it to the CPU's D input. The
// X-position and Z-position registers take the CPU's Y output when the
// decoder raises D0 or D1. While the host holds Sample high neither position
// register changes, so the host can read both as one consistent pair. The
// registers, strobes and the purpose of Sample are the design's; the clear on
// INIT and the exact gating (load = strobe and not Sample) are this
// implementation's.
//
// Timing: all three registers load on the rising clock edge.
module io_regs
  import interp_pkg::*;
(
  input  logic              clk,
  input  logic              init,
  input  logic              fbstb,
  input  logic [DATA_W-1:0] host_data,
  input  logic              sample,
  input  logic              ld_x,     // D0
  input  logic              ld_z,     // D1
  input  logic [DATA_W-1:0] cpu_y,
  output logic [DATA_W-1:0] cpu_d,
  output logic [DATA_W-1:0] x_pos,
  output logic [DATA_W-1:0] z_pos
);

  always_ff @(posedge clk) begin
    if (init) begin
      cpu_d <= '0;
      x_pos <= '0;
      z_pos <= '0;
    end else begin
      if (fbstb)          cpu_d <= host_data;
      if (ld_x && !sample) x_pos <= cpu_y;
      if (ld_z && !sample) z_pos <= cpu_y;
    end
  end

endmodule
