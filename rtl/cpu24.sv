// cpu24: the interpolator's 24-bit CPU.
//
// Six 4-bit ALU slices share the CPU control field of the microword (source,
// function, destination, A and B register addresses, carry-in); a lookahead
// carry generator supplies each slice's carry-in from the lower slices'
// generate/propagate outputs. D is the 24-bit word from the input register,
// Y the word offered to the X and Z position registers. The four flags are
// the carry out of the top slice, F == 0 (all slices zero), the sign F[23] and
// the top slice's overflow. The slice count and word width follow the design;
// everything else is in the slices.
//
// Timing: Y and the flags are combinational; the register file and Q are
// written on the rising clock edge.
module cpu24
  import interp_pkg::*;
#(
  parameter int unsigned NSLICE = SLICES
) (
  input  logic                  clk,
  input  alu_src_e              src,
  input  alu_fn_e               fn,
  input  alu_dst_e              dst,
  input  logic [3:0]            a_addr,
  input  logic [3:0]            b_addr,
  input  logic                  cin,
  input  logic [4*NSLICE-1:0]   d,
  output logic [4*NSLICE-1:0]   y,
  output flags_t                flags
);

  logic [NSLICE-1:0] g_n, p_n, c, cn4, ovr, fz, f3;
  logic g_all_n, p_all_n;

  for (genvar i = 0; i < int'(NSLICE); i++) begin : g_slice
    logic [3:0] f_unused;
    alu_slice4 u_slice (
      .clk, .src, .fn, .dst, .a_addr, .b_addr,
      .d(d[4*i +: 4]), .cn(c[i]),
      .y(y[4*i +: 4]), .f(f_unused),
      .g_n(g_n[i]), .p_n(p_n[i]), .cn4(cn4[i]), .ovr(ovr[i]),
      .f_zero(fz[i]), .f3(f3[i])
    );
  end

  carry_lookahead #(.GROUPS(NSLICE)) u_cla (
    .cn(cin), .g_n, .p_n, .c, .g_out_n(g_all_n), .p_out_n(p_all_n)
  );

  assign flags.c = cn4[NSLICE-1];
  assign flags.z = &fz;
  assign flags.n = f3[NSLICE-1];
  assign flags.v = ovr[NSLICE-1];

endmodule
