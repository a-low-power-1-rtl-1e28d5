// Self-checking test of the vector slide unit with a real register file:
// random vslideup/vslidedown for every SEW, LMUL 1..4, offsets and vector
// lengths, compared with a byte model of the register file. Also checks
// that a slide takes one cycle per written element.
module tb_vsldu;
  import buckbeak_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic start, up, busy; logic [31:0] off; sew_e sew; logic [15:0] vl, vlmax;
  logic [4:0] vd, vs2;
  logic [5:0] raddr [4][3]; logic [63:0] rdata [4][3]; logic [63:0] port0 [4];
  logic [5:0] s_raddr, s_waddr; logic [3:0] we; logic [63:0] s_wdata; logic [7:0] s_wbe;
  logic [5:0] waddr [4]; logic [63:0] wdata [4]; logic [7:0] wbe [4];
  logic [5:0] tb_raddr; logic tb_wr; logic [5:0] tb_waddr; logic [63:0] tb_wdata;

  vsldu #(.NR_BANKS(4), .VLEN(512), .ROWW(6)) dut (
    .clk_i(clk), .rst_ni(rst_n), .start_i(start), .up_i(up), .off_i(off), .sew_i(sew),
    .vl_i(vl), .vlmax_i(vlmax), .vd_i(vd), .vs2_i(vs2), .busy_o(busy),
    .vrf_raddr_o(s_raddr), .vrf_rdata_i(port0), .vrf_we_o(we), .vrf_waddr_o(s_waddr),
    .vrf_wdata_o(s_wdata), .vrf_wbe_o(s_wbe));

  logic [3:0] we_m;
  vrf #(.NR_VREGS(32), .VLEN(512), .NR_BANKS(4), .NR_RPORTS(3)) u_vrf (
    .clk_i(clk), .rst_ni(rst_n), .raddr_i(raddr), .rdata_o(rdata), .we_i(we_m),
    .waddr_i(waddr), .wdata_i(wdata), .wbe_i(wbe));

  always_comb for (int b = 0; b < 4; b++) begin
    raddr[b][0] = s_raddr; raddr[b][1] = tb_raddr; raddr[b][2] = '0;
    port0[b] = rdata[b][0];
    we_m[b]  = tb_wr ? 1'b1 : we[b];
    waddr[b] = tb_wr ? tb_waddr : s_waddr;
    wdata[b] = tb_wr ? tb_wdata ^ 64'(b) : s_wdata;
    wbe[b]   = tb_wr ? 8'hff : s_wbe;
  end

  always #5 clk = ~clk;
  logic [7:0] rvrf [2048];

  function automatic longint unsigned get_el(int v, int e, int sb);
    longint unsigned x = 0;
    for (int i = 0; i < sb; i++) x |= longint'(rvrf[v*64 + e*sb + i]) << (8*i);
    return x;
  endfunction
  task automatic set_el(int v, int e, int sb, longint unsigned x);
    for (int i = 0; i < sb; i++) rvrf[v*64 + e*sb + i] = 8'(x >> (8*i));
  endtask

  initial begin repeat (500000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    start = 0; up = 0; off = 0; sew = SEW64; vl = 0; vlmax = 0; vd = 0; vs2 = 0;
    tb_raddr = 0; tb_wr = 0; tb_waddr = 0; tb_wdata = 0;
    repeat (3) @(posedge clk); #1 rst_n = 1;
    // fill the register file with known data (bank b row r: {r, b} pattern)
    for (int r = 0; r < 64; r++) begin
      logic [63:0] d; d = {$urandom, $urandom};
      @(negedge clk); tb_wr = 1; tb_waddr = 6'(r); tb_wdata = d;
      for (int b = 0; b < 4; b++)
        for (int i = 0; i < 8; i++) rvrf[(r / 2) * 64 + (r % 2) * 32 + b * 8 + i] = 8'((d ^ 64'(b)) >> (8*i));
    end
    @(negedge clk); tb_wr = 0;
    for (int it = 0; it < 150; it++) begin
      int lm, sb, g, cyc, exp_cyc;
      @(negedge clk);
      sew = sew_e'($urandom_range(0, 3)); lm = $urandom_range(0, 2); g = 1 << lm; sb = 1 << sew;
      vlmax = 16'((512 << lm) / (8 * sb));
      vl = 16'($urandom_range(0, vlmax));
      off = $urandom_range(0, 40); up = 1'($urandom);
      vd = 5'($urandom_range(0, 32 / g - 1) * g);
      vs2 = vd; while (vs2 == vd) vs2 = 5'($urandom_range(0, 32 / g - 1) * g);
      start = 1;
      @(negedge clk); start = 0;
      cyc = 0;
      while (busy) begin cyc++; @(negedge clk); end
      exp_cyc = up ? ((int'(vl) > int'(off)) ? int'(vl) - int'(off) : 0) : int'(vl);
      checks++;
      if (cyc != exp_cyc) begin failures++; $display("FAIL cycles %0d exp %0d", cyc, exp_cyc); end
      for (int i = 0; i < int'(vl); i++)
        if (up) begin if (i >= int'(off)) set_el(vd, i, sb, get_el(vs2, i - int'(off), sb)); end
        else set_el(vd, i, sb, (i + int'(off) < int'(vlmax)) ? get_el(vs2, i + int'(off), sb) : 0);
      for (int w = 0; w < 8 * g; w++) begin
        tb_raddr = 6'(2 * vd + w / 4); #1;
        for (int i = 0; i < 8; i++) begin
          checks++;
          if (rdata[w % 4][1][i*8 +: 8] !== rvrf[vd*64 + w*8 + i]) begin
            failures++; if (failures < 10) $display("FAIL v%0d byte %0d (up=%0d off=%0d sew=%0d)", vd, w*8+i, up, off, sb);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
