// Encoders for the RVV instructions used by the testbenches, written from
// the RISC-V "V" 1.0 instruction formats.
package tb_rvv_pkg;
  localparam logic [6:0] OP_V = 7'b1010111, LOAD_FP = 7'b0000111, STORE_FP = 7'b0100111;

  // sew: 0..3 for 8..64 bit; lmul: log2 of LMUL (0..3)
  function automatic logic [31:0] vsetvli(int rd, int rs1, int sew, int lmul);
    return {1'b0, 3'b0, 2'b11, 3'(sew), 3'(lmul), 5'(rs1), 3'b111, 5'(rd), OP_V};
  endfunction
  function automatic logic [31:0] vsetivli(int rd, int uimm, int sew, int lmul);
    return {2'b11, 2'b0, 2'b11, 3'(sew), 3'(lmul), 5'(uimm), 3'b111, 5'(rd), OP_V};
  endfunction
  function automatic logic [2:0] width(int sew);
    case (sew) 0: return 3'b000; 1: return 3'b101; 2: return 3'b110; default: return 3'b111; endcase
  endfunction
  function automatic logic [31:0] vle(int vd, int rs1, int sew);
    return {3'b0, 1'b0, 2'b00, 1'b1, 5'b0, 5'(rs1), width(sew), 5'(vd), LOAD_FP};
  endfunction
  function automatic logic [31:0] vse(int vs3, int rs1, int sew);
    return {3'b0, 1'b0, 2'b00, 1'b1, 5'b0, 5'(rs1), width(sew), 5'(vs3), STORE_FP};
  endfunction
  // funct3: 0 .vv, 3 .vi, 4 .vx (OPIVx); 2 .vv, 6 .vx (OPMVx)
  function automatic logic [31:0] opv(int funct6, int funct3, int vd, int vs2, int vs1);
    return {6'(funct6), 1'b1, 5'(vs2), 5'(vs1), 3'(funct3), 5'(vd), OP_V};
  endfunction

  localparam int F_ADD = 6'b000000, F_SUB = 6'b000010, F_MIN = 6'b000101, F_MAX = 6'b000111,
                 F_AND = 6'b001001, F_OR = 6'b001010, F_XOR = 6'b001011, F_SLL = 6'b100101,
                 F_SRL = 6'b101000, F_SLIDEUP = 6'b001110, F_SLIDEDOWN = 6'b001111,
                 F_MUL = 6'b100101, F_MACC = 6'b101101;
endpackage
