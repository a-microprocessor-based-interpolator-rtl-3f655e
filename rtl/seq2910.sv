// seq2910: microprogram sequencer of the interpolator (2910 instruction set).
//
// Each cycle the sequencer picks the next microprogram address Y from the
// microprogram counter (uPC), the branch input D, the register/counter R or
// the top of a five-deep subroutine stack, under the 4-bit instruction field
// and the condition. The condition passes when CC_n is low, or regardless of
// CC_n when the condition enable CCEN_n is low: the design states that with
// CCEN low the jump is unconditional, and this block follows that. (The 2910
// data sheet has the opposite polarity for CCEN.) The sixteen instructions are
// those of the 2910: JZ, CJS, JMAP, CJP, PUSH, JSRP, CJV, JRP, RFCT, RPCT,
// CRTN, CJPP, LDCT, LOOP, CONT, TWB. pl_n, map_n and vect_n are the active-low
// enables of the three sources that may drive D: pl_n for the branch field of
// the pipeline register, map_n for the command start-address register.
//
// Timing: Y and the enables are combinational from the instruction, CC and
// the internal state; uPC (Y + 1), R and the stack change on the rising clock
// edge. There is no reset: JZ (which the pipeline register holds after INIT)
// sends Y to zero and empties the stack.
module seq2910
  import interp_pkg::*;
#(
  parameter int unsigned AW = UADDR_W,
  parameter int unsigned DEPTH = 5
) (
  input  logic          clk,
  input  seq_op_e       op,
  input  logic          cc_n,
  input  logic          ccen_n,
  input  logic          rld_n,    // load R from D regardless of instruction
  input  logic          ci,       // increment of the uPC
  input  logic [AW-1:0] d,
  output logic [AW-1:0] y,
  output logic          pl_n,
  output logic          map_n,
  output logic          vect_n,
  output logic          full_n
);

  localparam int unsigned SPW = $clog2(DEPTH + 1);

  logic [AW-1:0] upc, r;
  logic [AW-1:0] stack [DEPTH];
  logic [SPW-1:0] sp;          // number of entries on the stack
  logic [AW-1:0] tos;
  logic pass, r_zero;
  logic do_push, do_pop, do_clear, load_r, dec_r;

  assign pass = ~ccen_n | ~cc_n;
  assign r_zero = (r == '0);
  assign tos = (sp == '0 || sp > SPW'(DEPTH)) ? '0 : stack[sp - 1'b1];
  assign full_n = (sp != SPW'(DEPTH));

  always_comb begin
    y = upc;
    pl_n = 1'b0; map_n = 1'b1; vect_n = 1'b1;
    do_push = 1'b0; do_pop = 1'b0; do_clear = 1'b0;
    load_r = 1'b0; dec_r = 1'b0;
    unique case (op)
      SEQ_JZ:   begin y = '0; do_clear = 1'b1; end
      SEQ_CJS:  if (pass) begin y = d; do_push = 1'b1; end
      SEQ_JMAP: begin y = d; pl_n = 1'b1; map_n = 1'b0; end
      SEQ_CJP:  if (pass) y = d;
      SEQ_PUSH: begin do_push = 1'b1; load_r = pass; end
      SEQ_JSRP: begin do_push = 1'b1; y = pass ? d : r; end
      SEQ_CJV:  begin pl_n = 1'b1; vect_n = 1'b0; if (pass) y = d; end
      SEQ_JRP:  y = pass ? d : r;
      SEQ_RFCT: if (!r_zero) begin y = tos; dec_r = 1'b1; end
                else do_pop = 1'b1;
      SEQ_RPCT: if (!r_zero) begin y = d; dec_r = 1'b1; end
      SEQ_CRTN: if (pass) begin y = tos; do_pop = 1'b1; end
      SEQ_CJPP: if (pass) begin y = d; do_pop = 1'b1; end
      SEQ_LDCT: load_r = 1'b1;
      SEQ_LOOP: if (pass) do_pop = 1'b1; else y = tos;
      SEQ_CONT: ;
      default: begin // SEQ_TWB
        if (pass) do_pop = 1'b1;
        else if (!r_zero) begin y = tos; dec_r = 1'b1; end
        else begin y = d; do_pop = 1'b1; end
      end
    endcase
  end

  always_ff @(posedge clk) begin
    upc <= y + AW'(ci);
    if (!rld_n || load_r) r <= d;
    else if (dec_r) r <= r - 1'b1;
    if (do_clear) sp <= '0;
    else if (do_push) begin
      if (sp < SPW'(DEPTH)) begin
        stack[sp] <= upc;
        sp <= sp + 1'b1;
      end else begin
        stack[DEPTH-1] <= upc;   // full: overwrite the top entry
        if (sp > SPW'(DEPTH)) sp <= SPW'(DEPTH);
      end
    end else if (do_pop && sp != '0) sp <= sp - 1'b1;
  end

endmodule
