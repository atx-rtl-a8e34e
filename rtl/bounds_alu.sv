// bounds_alu: Bounds ALU of a Stream Unit's Repetition Initializer.
//
// Computes one bound expression (bexp) of the form Op1(I1, Op2(I2, I3)), where
// each operator is an addition, multiplication, unsigned less-than comparison or
// left shift, and each input is picked by a 4-bit specifier: one of the task's
// runtime constants c0..c6, the parent data parent[i] or parent[i+1] at the head
// of the Parent Data Queue, the repetition index i, the element size, zero or one.
// The form of the expression and the operator set follow the design; the bit
// layout and specifier codes are defined in atx_pkg.
// Purely combinational: the bound is valid in the same cycle as its inputs.
module bounds_alu
  import atx_pkg::*;
(
  input  bexp_t             bexp,
  input  consts_t           c,
  input  logic [WORD_W-1:0] p0,      // parent[i]
  input  logic [WORD_W-1:0] p1,      // parent[i+1]
  input  logic [WORD_W-1:0] rep,     // repetition index i
  input  logic [3:0]        esize,
  output logic [WORD_W-1:0] result
);

  function automatic logic [WORD_W-1:0] pick(logic [3:0] s, consts_t cc,
                                             logic [WORD_W-1:0] a0, logic [WORD_W-1:0] a1,
                                             logic [WORD_W-1:0] r, logic [3:0] es);
    if (s < 4'(NCONST)) return cc[s[2:0]];
    unique case (s)
      SPEC_P0:    return a0;
      SPEC_P1:    return a1;
      SPEC_REP:   return r;
      SPEC_ESIZE: return WORD_W'(es);
      SPEC_ONE:   return WORD_W'(1);
      default:    return '0;
    endcase
  endfunction

  logic [WORD_W-1:0] v1, v2, v3, inner;

  always_comb begin
    v1     = pick(bexp.i1, c, p0, p1, rep, esize);
    v2     = pick(bexp.i2, c, p0, p1, rep, esize);
    v3     = pick(bexp.i3, c, p0, p1, rep, esize);
    inner  = bop(bexp.op2, v2, v3);
    result = bop(bexp.op1, v1, inner);
  end

endmodule
