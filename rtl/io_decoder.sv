// io_decoder: decoder of the microword's 3-bit I/O control field.
//
// To save microprogram bits the design encodes its I/O strobes in three bits
// and decodes them into eight lines D0..D7, of which exactly one is high:
// D0 load X-reg, D1 load Z-reg, D2 X-axis pulse, D3 Z-axis pulse, D4
// distribution end, D5 clear Ipulse, D6 clear PMSI. D7 has no use and serves
// as the idle code. Combinational; since the field comes from the pipeline
// register, each strobe lasts exactly one microcycle.
module io_decoder
  import interp_pkg::*;
(
  input  io_code_e   code,
  output logic [7:0] d
);

  always_comb begin
    d = '0;
    d[code] = 1'b1;
  end

endmodule
