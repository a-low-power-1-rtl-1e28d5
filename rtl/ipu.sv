// Integer processing unit lane: one 64b word of element-wise vector integer
// arithmetic per cycle.
//
// The word is split into 8, 4, 2 or 1 elements by the element width (SEW)
// and every element is computed independently: add, sub, and, or, xor,
// shift left/right logical (shift amount modulo SEW), multiply (low half),
// multiply-accumulate (vd + vs1*vs2), signed min and max. Operand a is the
// vs2 element, b is vs1 (or the replicated scalar), c is the old vd.
// The unit is combinational. The operation set is the subset of the RVV
// integer instructions supported by this design; the published cluster only
// names the unit.
module ipu
  import buckbeak_pkg::*;
(
  input  ipu_op_e     op_i,
  input  sew_e        sew_i,
  input  logic [63:0] a_i,
  input  logic [63:0] b_i,
  input  logic [63:0] c_i,
  output logic [63:0] res_o
);

  function automatic logic [63:0] elem_op(ipu_op_e op, logic [63:0] a, logic [63:0] b,
                                          logic [63:0] c, int unsigned w);
    logic [63:0] m, r, sa, sb;
    logic [5:0]  sh;
    m  = (w == 64) ? '1 : ((64'd1 << w) - 64'd1);
    a  = a & m;
    b  = b & m;
    c  = c & m;
    sh = 6'(b & 64'(w - 1));
    // sign-extend for min/max
    sa = a; sb = b;
    if (a[w-1]) sa = a | ~m;
    if (b[w-1]) sb = b | ~m;
    unique case (op)
      IPU_ADD:  r = a + b;
      IPU_SUB:  r = a - b;
      IPU_AND:  r = a & b;
      IPU_OR:   r = a | b;
      IPU_XOR:  r = a ^ b;
      IPU_SLL:  r = a << sh;
      IPU_SRL:  r = a >> sh;
      IPU_MUL:  r = a * b;
      IPU_MACC: r = c + a * b;
      IPU_MIN:  r = ($signed(sa) < $signed(sb)) ? a : b;
      IPU_MAX:  r = ($signed(sa) < $signed(sb)) ? b : a;
      default:  r = '0;
    endcase
    return r & m;
  endfunction

  always_comb begin
    res_o = '0;
    unique case (sew_i)
      SEW8:  for (int i = 0; i < 8; i++)
               res_o[i*8 +: 8]   = 8'(elem_op(op_i, 64'(a_i[i*8 +: 8]), 64'(b_i[i*8 +: 8]),
                                              64'(c_i[i*8 +: 8]), 8));
      SEW16: for (int i = 0; i < 4; i++)
               res_o[i*16 +: 16] = 16'(elem_op(op_i, 64'(a_i[i*16 +: 16]), 64'(b_i[i*16 +: 16]),
                                               64'(c_i[i*16 +: 16]), 16));
      SEW32: for (int i = 0; i < 2; i++)
               res_o[i*32 +: 32] = 32'(elem_op(op_i, 64'(a_i[i*32 +: 32]), 64'(b_i[i*32 +: 32]),
                                               64'(c_i[i*32 +: 32]), 32));
      default: res_o = elem_op(op_i, a_i, b_i, c_i, 64);
    endcase
  end

endmodule
