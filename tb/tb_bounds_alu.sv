// tb_bounds_alu: random test of the Bounds ALU.
//
// Drives random bound expressions (both operators, every operand kind:
// constants, zero, one, parent[i], parent[i+1], the repetition index and the
// element size) and compares the result with Op1(I1, Op2(I2, I3)) worked out
// here from its own operator table. Also checks the row-sum bounds of the
// example task: vals + parent[i]*4 and vals + parent[i+1]*4.
module tb_bounds_alu;
  import atx_pkg::*;

  bexp_t bexp;
  consts_t c;
  logic [63:0] p0, p1, rep, result;
  logic [3:0] esize;
  int checks = 0, failures = 0;

  bounds_alu dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [63:0] val(logic [3:0] s);
    if (s < 7) return c[s];
    case (s)
      4'd7:  return 64'd0;
      4'd8:  return p0;
      4'd9:  return p1;
      4'd10: return rep;
      4'd11: return 64'(esize);
      4'd12: return 64'd1;
      default: return 64'd0;
    endcase
  endfunction

  function automatic logic [63:0] ref_op(logic [1:0] op, logic [63:0] a, logic [63:0] b);
    case (op)
      2'd0: return a + b;
      2'd1: return a * b;
      2'd2: return (a < b) ? 64'd1 : 64'd0;
      default: return a << b[5:0];
    endcase
  endfunction

  initial begin
    logic [63:0] exp;
    for (int n = 0; n < 2000; n++) begin
      for (int k = 0; k < NCONST; k++) c[k] = {$urandom, $urandom};
      p0 = {$urandom, $urandom}; p1 = {$urandom, $urandom};
      if (n % 3 == 0) begin p0 = $urandom % 100; p1 = $urandom % 100; end
      rep = $urandom % 64; esize = 4'd1 << ($urandom % 4);
      bexp.op1 = bop_e'($urandom % 4); bexp.op2 = bop_e'($urandom % 4);
      bexp.i1 = 4'($urandom % 13); bexp.i2 = 4'($urandom % 13); bexp.i3 = 4'($urandom % 13);
      #1;
      exp = ref_op(bexp.op1, val(bexp.i1), ref_op(bexp.op2, val(bexp.i2), val(bexp.i3)));
      checks++;
      if (result !== exp) begin
        failures++;
        if (failures < 10) $display("bexp %h: got %h expected %h", bexp, result, exp);
      end
    end
    // example task: S2 bounds from parent[i] and parent[i+1]
    c[2] = 64'h20_0000; c[3] = 64'd4; p0 = 64'd17; p1 = 64'd23;
    bexp = '{op1: OP_ADD, op2: OP_MUL, i1: 4'd2, i2: SPEC_P0, i3: 4'd3}; #1;
    checks++; if (result !== 64'h20_0044) begin failures++; $display("row begin %h", result); end
    bexp.i2 = SPEC_P1; #1;
    checks++; if (result !== 64'h20_005c) begin failures++; $display("row end %h", result); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
