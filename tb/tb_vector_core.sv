// Self-checking test of one vector core in split mode, plus its merge-mode
// vl and share computation. A random program of vsetvli, unit-stride
// loads and stores, integer arithmetic and slides runs against a memory
// with random stalls; a reference model of the register file and memory
// in this testbench executes the same program, and the memories are
// compared at the end. The execution time of every arithmetic instruction
// (ceil(bytes/32) cycles, four 64b lanes) and the vl returned by every
// vsetvli are checked as well.
module tb_vector_core;
  import buckbeak_pkg::*;
  import tb_rvv_pkg::*;

  localparam int MEM = 8192;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic merge = 0, half = 0;
  vreq_t req; logic valid, ready, rsp_valid, idle, illegal;
  vrsp_t rsp;
  logic [31:0] vl_o;
  logic [3:0] m_req, m_gnt, m_rvalid;
  tcdm_req_t m_data [4];
  logic [63:0] m_rdata [4];

  vector_core #(.VLEN(512), .NR_VREGS(32), .NR_BANKS(4)) dut (
    .clk_i(clk), .rst_ni(rst_n), .merge_i(merge), .half_i(half),
    .req_i(req), .valid_i(valid), .ready_o(ready), .rsp_o(rsp), .rsp_valid_o(rsp_valid),
    .mem_req_o(m_req), .mem_data_o(m_data), .mem_gnt_i(m_gnt), .mem_rvalid_i(m_rvalid),
    .mem_rdata_i(m_rdata), .idle_o(idle), .vl_o(vl_o), .illegal_o(illegal));

  tb_mem_model #(.NP(4), .SIZE(MEM), .GNT_PCT(75)) u_mem (
    .clk_i(clk), .req_i(m_req), .data_i(m_data), .gnt_o(m_gnt), .rvalid_o(m_rvalid),
    .rdata_o(m_rdata));

  always #5 clk = ~clk;

  // reference state
  logic [7:0] rvrf [32*64];
  logic [7:0] rmem [MEM];
  int vl = 0, sew = 3, lmul = 0;
  int n_alu = 0, n_ld = 0, n_st = 0, n_sld = 0, n_cfg = 0, n_ill = 0;

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL: %s (t=%0t)", what, $time); end
  endtask

  function automatic longint unsigned get_el(int v, int e, int sb);
    longint unsigned x = 0;
    for (int i = 0; i < sb; i++) x |= longint'(rvrf[(v*64 + e*sb + i) % 2048]) << (8*i);
    return x;
  endfunction
  task automatic set_el(int v, int e, int sb, longint unsigned x);
    for (int i = 0; i < sb; i++) rvrf[(v*64 + e*sb + i) % 2048] = 8'(x >> (8*i));
  endtask

  function automatic longint unsigned alu(int f6, bit mv, longint unsigned a, longint unsigned b,
                                          longint unsigned c, int w);
    longint unsigned m, r; longint sa, sb2;
    m = (w == 64) ? '1 : ((64'd1 << w) - 1);
    a &= m; b &= m; c &= m;
    sa = longint'(a << (64 - w)) >>> (64 - w);
    sb2 = longint'(b << (64 - w)) >>> (64 - w);
    if (mv) r = (f6 == F_MUL) ? a * b : c + a * b;
    else case (f6)
      F_ADD: r = a + b;  F_SUB: r = a - b;  F_AND: r = a & b;  F_OR: r = a | b;
      F_XOR: r = a ^ b;  F_SLL: r = a << (b % w);  F_SRL: r = a >> (b % w);
      F_MIN: r = (sa < sb2) ? a : b;  F_MAX: r = (sa < sb2) ? b : a;
      default: r = 0;
    endcase
    return r & m;
  endfunction

  // send one instruction; returns the number of cycles the core stays busy
  task automatic issue(input logic [31:0] instr, input logic [31:0] rs1, input logic [31:0] rs2,
                       output int busy);
    @(negedge clk);
    req = '{instr: instr, rs1: rs1, rs2: rs2}; valid = 1;
    while (!ready) @(negedge clk);
    @(negedge clk);
    valid = 0;
    busy = 0;
    while (!ready) begin busy++; @(negedge clk); end
  endtask

  initial begin repeat (200000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  // vsetvli responses and illegal flags
  int exp_q [$];
  always @(posedge clk) if (rst_n) begin
    if (rsp_valid) begin
      chk(exp_q.size() > 0 && rsp.data == exp_q[0], $sformatf("vsetvli response %0d", rsp.data));
      if (exp_q.size() > 0) void'(exp_q.pop_front());
    end
    if (illegal) n_ill++;
  end

  initial begin
    int busy;
    valid = 0; req = '0;
    for (int i = 0; i < MEM; i++) begin
      rmem[i] = 8'($urandom); u_mem.mem[i] = rmem[i];
    end
    for (int i = 0; i < 2048; i++) rvrf[i] = 0;
    repeat (3) @(posedge clk); #1 rst_n = 1;

    for (int it = 0; it < 300; it++) begin
      int kind; kind = $urandom_range(0, 9);
      if (it == 0 || kind == 0) begin
        int avl, vlmax;
        sew = $urandom_range(0, 3); lmul = $urandom_range(0, 2);
        vlmax = (512 << lmul) / (8 << sew);
        avl = $urandom_range(0, vlmax + 10);
        if ($urandom_range(0, 3) == 0) avl = vlmax + 1000;
        vl = avl < vlmax ? avl : vlmax;
        exp_q.push_back(vl);
        issue(vsetvli(5, 7, sew, lmul), avl, 0, busy);
        chk(vl_o == vl, "vl CSR");
        n_cfg++;
      end else begin
        int g, vd, vs1, vs2, sb, base;
        g = 1 << lmul; sb = 1 << sew;
        vd  = $urandom_range(0, 32 / g - 1) * g;
        vs1 = $urandom_range(0, 32 / g - 1) * g;
        vs2 = $urandom_range(0, 32 / g - 1) * g;
        if (kind <= 2) begin                        // load
          base = $urandom_range(0, 511) * 8;
          issue(vle(vd, 10, sew), base, 0, busy);
          for (int i = 0; i < vl * sb; i++) rvrf[vd*64 + i] = rmem[(base + i) % MEM];
          n_ld++;
        end else if (kind == 3) begin               // store
          base = $urandom_range(0, 1023) * 8;
          issue(vse(vd, 10, sew), base, 0, busy);
          for (int i = 0; i < vl * sb; i++) rmem[(base + i) % MEM] = rvrf[vd*64 + i];
          n_st++;
        end else if (kind == 4) begin               // slide
          int off, vlmax; bit up;
          up = 1'($urandom); off = $urandom_range(0, 20);
          vlmax = (512 << lmul) / (8 << sew);
          while (vs2 == vd) vs2 = $urandom_range(0, 32 / g - 1) * g;
          issue(opv(up ? F_SLIDEUP : F_SLIDEDOWN, 4, vd, vs2, 11), off, 0, busy);
          for (int i = 0; i < vl; i++) begin
            if (up) begin
              if (i >= off) set_el(vd, i, sb, get_el(vs2, i - off, sb));
            end else set_el(vd, i, sb, (i + off < vlmax) ? get_el(vs2, i + off, sb) : 0);
          end
          n_sld++;
        end else begin                              // arithmetic
          int f6, f3; bit mv; longint unsigned sc, a, b, c;
          int ops [11] = '{F_ADD, F_SUB, F_MIN, F_MAX, F_AND, F_OR, F_XOR, F_SLL, F_SRL, F_MUL, F_MACC};
          int k; k = $urandom_range(0, 10);
          f6 = ops[k]; mv = k >= 9;
          if (mv) f3 = $urandom_range(0, 1) ? 2 : 6;
          else begin
            f3 = $urandom_range(0, 2); f3 = (f3 == 0) ? 0 : (f3 == 1) ? 3 : 4;
            if (f6 == F_SUB && f3 == 3) f3 = 4;
          end
          sc = {$urandom, $urandom};
          issue(opv(f6, f3, vd, vs2, (f3 == 3) ? int'(sc[4:0]) : vs1), sc[31:0], 0, busy);
          if (f3 == 3) sc = longint'(signed'(5'(sc[4:0])));
          else sc = longint'(signed'(sc[31:0]));
          for (int i = 0; i < vl; i++) begin
            a = get_el(vs2, i, sb); c = get_el(vd, i, sb);
            b = (f3 == 0 || f3 == 2) ? get_el(vs1, i, sb) : sc;
            set_el(vd, i, sb, alu(f6, mv, a, b, c, 8 * sb));
          end
          chk(busy == (vl * sb + 31) / 32, $sformatf("ALU cycles %0d for %0d bytes", busy, vl * sb));
          n_alu++;
        end
      end
    end
    // dump every register to memory to compare the register files too
    exp_q.push_back(64);
    issue(vsetvli(1, 0, 3, 3), 0, 0, busy);      // SEW 64, LMUL 8, vl = VLMAX
    for (int v = 0; v < 32; v += 8) begin
      issue(vse(v, 10, 3), 4096 + v * 64, 0, busy);
      for (int i = 0; i < 512; i++) rmem[(4096 + v * 64 + i) % MEM] = rvrf[v*64 + i];
    end
    while (!idle) @(negedge clk);
    repeat (3) @(negedge clk);
    for (int i = 0; i < MEM; i++) chk(u_mem.mem[i] == rmem[i], $sformatf("memory byte %0d", i));
    // illegal encoding: masked add
    issue(opv(F_ADD, 0, 1, 2, 3) & ~32'h0200_0000, 0, 0, busy);
    repeat (2) @(negedge clk);
    chk(n_ill == 1, "masked instruction flagged illegal");
    // merge-mode share: vl against 1024b, upper half keeps bytes 64..127 of each 128
    merge = 1; half = 1;
    exp_q.push_back(24);
    issue(vsetvli(5, 7, 3, 1), 24, 0, busy);      // VL=24, LMUL=2, SEW=64
    chk(vl_o == 24, "merged vl");
    exp_q.push_back(32);
    issue(vsetvli(5, 7, 3, 1), 100, 0, busy);     // VLMAX = 1024*2/64 = 32
    merge = 0; half = 0;
    chk(n_alu > 50 && n_ld > 20 && n_st > 10 && n_sld > 10, "instruction mix");
    chk(u_mem.stalls > 0, "memory stalls seen");
    repeat (2) @(negedge clk);
    chk(exp_q.size() == 0, "all vsetvli answered");
    $display("alu %0d ld %0d st %0d slide %0d cfg %0d stalls %0d", n_alu, n_ld, n_st, n_sld, n_cfg, u_mem.stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
