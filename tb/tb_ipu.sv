// Self-checking test of the IPU lane: random operands for every operation
// and element width, compared with a per-element reference computed here.
module tb_ipu;
  import buckbeak_pkg::*;
  int checks = 0, failures = 0;
  ipu_op_e op; sew_e sew;
  logic [63:0] a, b, c, r;

  ipu dut (.op_i(op), .sew_i(sew), .a_i(a), .b_i(b), .c_i(c), .res_o(r));

  function automatic longint unsigned ref_elem(ipu_op_e o, longint unsigned x, longint unsigned y,
                                               longint unsigned z, int w);
    longint unsigned m, res; longint sx, sy;
    m  = (w == 64) ? 64'hffff_ffff_ffff_ffff : ((64'd1 << w) - 1);
    sx = longint'(x << (64 - w)) >>> (64 - w);
    sy = longint'(y << (64 - w)) >>> (64 - w);
    case (o)
      IPU_ADD:  res = x + y;
      IPU_SUB:  res = x - y;
      IPU_AND:  res = x & y;
      IPU_OR:   res = x | y;
      IPU_XOR:  res = x ^ y;
      IPU_SLL:  res = x << (y % w);
      IPU_SRL:  res = x >> (y % w);
      IPU_MUL:  res = x * y;
      IPU_MACC: res = z + x * y;
      IPU_MIN:  res = (sx < sy) ? x : y;
      IPU_MAX:  res = (sx < sy) ? y : x;
      default:  res = 0;
    endcase
    return res & m;
  endfunction

  initial begin #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    for (int it = 0; it < 4000; it++) begin
      int w; logic [63:0] exp_r;
      op  = ipu_op_e'($urandom_range(0, 10));
      sew = sew_e'($urandom_range(0, 3));
      a = {$urandom, $urandom}; b = {$urandom, $urandom}; c = {$urandom, $urandom};
      if (it % 7 == 0) b = a;   // equal operands for min/max
      #1;
      w = 8 << sew;
      exp_r = '0;
      for (int e = 0; e < 64 / w; e++) begin
        longint unsigned m; m = (w == 64) ? '1 : ((64'd1 << w) - 1);
        exp_r |= ref_elem(op, (a >> (e*w)) & m, (b >> (e*w)) & m, (c >> (e*w)) & m, w) << (e*w);
      end
      checks++;
      if (r !== exp_r) begin
        failures++;
        if (failures < 10) $display("FAIL op=%s sew=%0d a=%h b=%h c=%h got %h exp %h",
                                    op.name(), w, a, b, c, r, exp_r);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
