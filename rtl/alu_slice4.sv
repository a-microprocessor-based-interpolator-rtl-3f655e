// alu_slice4: one 4-bit slice of the interpolator's CPU.
//
// Six of these slices, joined by a lookahead carry generator, form the 24-bit
// ALU. Each slice holds a 16-word by 4-bit two-port register file (read ports A
// and B, write port B), a Q register, the operand selector (R, S from A, B, Q,
// D or zero), the eight-function ALU and the destination control. Source and
// function encodings follow the 2901 bit-slice family; the design drives only a
// 2-bit destination field, so the slice implements four destinations
// (no write, RAM[B] <= F with Y = F, Q <= F, RAM[B] <= F with Y = A) and no
// shifter.
//
// Timing: register-file reads, the ALU and all outputs are combinational from
// the microword and D; RAM[B] and Q are written on the rising clock edge.
// g_n / p_n are the active-low generate and propagate of the slice's arithmetic
// operands (with R or S inverted for the two subtractions) and are valid for
// every function; cn4 and ovr therefore describe the arithmetic sum even when a
// logic function is selected, and only arithmetic results should be tested on
// them.
module alu_slice4
  import interp_pkg::*;
(
  input  logic       clk,
  input  alu_src_e   src,
  input  alu_fn_e    fn,
  input  alu_dst_e   dst,
  input  logic [3:0] a_addr,
  input  logic [3:0] b_addr,
  input  logic [3:0] d,
  input  logic       cn,
  output logic [3:0] y,
  output logic [3:0] f,
  output logic       g_n,
  output logic       p_n,
  output logic       cn4,
  output logic       ovr,
  output logic       f_zero,
  output logic       f3
);

  logic [3:0] ram [16];
  logic [3:0] q;
  logic [3:0] a_val, b_val, r, s, rr, ss;
  logic [4:0] sum;
  logic [3:0] low3;
  logic [3:0] g, p;

  assign a_val = ram[a_addr];
  assign b_val = ram[b_addr];

  always_comb begin
    unique case (src)
      SRC_AQ: begin r = a_val; s = q;     end
      SRC_AB: begin r = a_val; s = b_val; end
      SRC_ZQ: begin r = '0;    s = q;     end
      SRC_ZB: begin r = '0;    s = b_val; end
      SRC_ZA: begin r = '0;    s = a_val; end
      SRC_DA: begin r = d;     s = a_val; end
      SRC_DQ: begin r = d;     s = q;     end
      default: begin r = d;    s = '0;    end // SRC_DZ
    endcase
  end

  // Arithmetic operands: SUBR adds ~R, SUBS adds ~S.
  assign rr = (fn == FN_SUBR) ? ~r : r;
  assign ss = (fn == FN_SUBS) ? ~s : s;
  assign sum  = {1'b0, rr} + {1'b0, ss} + {4'b0, cn};
  assign low3 = {1'b0, rr[2:0]} + {1'b0, ss[2:0]} + {3'b0, cn};
  assign g = rr & ss;
  assign p = rr | ss;
  assign g_n = ~(g[3] | (p[3] & g[2]) | (p[3] & p[2] & g[1]) | (p[3] & p[2] & p[1] & g[0]));
  assign p_n = ~(&p);
  assign cn4 = sum[4];
  assign ovr = low3[3] ^ sum[4];

  always_comb begin
    unique case (fn)
      FN_ADD, FN_SUBR, FN_SUBS: f = sum[3:0];
      FN_OR:    f = r | s;
      FN_AND:   f = r & s;
      FN_NOTRS: f = ~r & s;
      FN_EXOR:  f = r ^ s;
      default:  f = ~(r ^ s);   // FN_EXNOR
    endcase
  end

  assign f_zero = (f == 4'd0);
  assign f3 = f[3];
  assign y = (dst == DST_RAMA) ? a_val : f;

  always_ff @(posedge clk) begin
    if (dst == DST_RAMF || dst == DST_RAMA) ram[b_addr] <= f;
    if (dst == DST_QREG) q <= f;
  end

endmodule
