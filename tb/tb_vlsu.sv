// Self-checking test of the vector load/store unit with a real register
// file and a memory with random stalls. Random unit-stride loads and
// stores in split mode and in merge mode (both halves) are checked against
// a byte model of the VRF and of memory; in merge mode a core must touch
// only bytes [64*half, 64*half+64) of every 128-byte slice.
module tb_vlsu;
  import buckbeak_pkg::*;
  localparam int MEM = 8192;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic start, store, merge, half, busy;
  logic [31:0] base; logic [15:0] nbytes; logic [4:0] vd;
  logic [5:0] raddr [4][3]; logic [63:0] rdata [4][3];
  logic [5:0] l_raddr [4]; logic [63:0] port0 [4];
  logic [3:0] we; logic [5:0] waddr [4]; logic [63:0] wdata [4]; logic [7:0] wbe [4];
  logic [3:0] m_req, m_gnt, m_rvalid; tcdm_req_t m_data [4]; logic [63:0] m_rdata [4];
  logic [5:0] tb_raddr [4];

  vlsu #(.NR_BANKS(4), .VLEN(512), .ROWW(6)) dut (
    .clk_i(clk), .rst_ni(rst_n), .start_i(start), .store_i(store), .base_i(base),
    .nbytes_i(nbytes), .vd_i(vd), .merge_i(merge), .half_i(half), .busy_o(busy),
    .vrf_raddr_o(l_raddr), .vrf_rdata_i(port0), .vrf_we_o(we), .vrf_waddr_o(waddr),
    .vrf_wdata_o(wdata), .vrf_wbe_o(wbe), .mem_req_o(m_req), .mem_data_o(m_data),
    .mem_gnt_i(m_gnt), .mem_rvalid_i(m_rvalid), .mem_rdata_i(m_rdata));

  vrf #(.NR_VREGS(32), .VLEN(512), .NR_BANKS(4), .NR_RPORTS(3)) u_vrf (
    .clk_i(clk), .rst_ni(rst_n), .raddr_i(raddr), .rdata_o(rdata), .we_i(we),
    .waddr_i(waddr), .wdata_i(wdata), .wbe_i(wbe));

  tb_mem_model #(.NP(4), .SIZE(MEM), .GNT_PCT(60)) u_mem (
    .clk_i(clk), .req_i(m_req), .data_i(m_data), .gnt_o(m_gnt), .rvalid_o(m_rvalid),
    .rdata_o(m_rdata));

  always_comb for (int b = 0; b < 4; b++) begin
    raddr[b][0] = l_raddr[b]; raddr[b][1] = tb_raddr[b]; raddr[b][2] = '0;
    port0[b] = rdata[b][0];
  end

  always #5 clk = ~clk;

  logic [7:0] rvrf [2048]; logic [7:0] rmem [MEM];

  function automatic int gbyte(int i, bit mg, bit h);
    int w; w = i / 8;
    if (mg) w = (w / 8) * 16 + (h ? 8 : 0) + w % 8;
    return w * 8 + i % 8;
  endfunction

  initial begin repeat (200000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    start = 0; store = 0; merge = 0; half = 0; base = 0; nbytes = 0; vd = 0;
    for (int b = 0; b < 4; b++) tb_raddr[b] = '0;
    for (int i = 0; i < MEM; i++) begin rmem[i] = 8'($urandom); u_mem.mem[i] = rmem[i]; end
    for (int i = 0; i < 2048; i++) rvrf[i] = 0;
    repeat (3) @(posedge clk); #1 rst_n = 1;
    for (int it = 0; it < 200; it++) begin
      @(negedge clk);
      store = (it % 3 == 2); merge = 1'($urandom); half = 1'($urandom);
      vd = 5'($urandom_range(0, 3) * 8);
      nbytes = 16'($urandom_range(0, 512));
      base = $urandom_range(0, (store ? 2047 : 1023) - 256) * 8 + (store ? 2048 : 0);
      start = 1;
      @(negedge clk); start = 0;
      while (busy) @(negedge clk);
      for (int i = 0; i < int'(nbytes); i++)
        if (store) rmem[(base + gbyte(i, merge, half)) % MEM] = rvrf[vd*64 + i];
        else       rvrf[vd*64 + i] = rmem[(base + gbyte(i, merge, half)) % MEM];
      // compare the register group (all 512 bytes) through read port 1
      for (int w = 0; w < 64; w++) begin
        for (int b = 0; b < 4; b++) tb_raddr[b] = 6'(2 * vd + w / 4);
        #1;
        for (int i = 0; i < 8; i++) begin
          checks++;
          if (rdata[w % 4][1][i*8 +: 8] !== rvrf[vd*64 + w*8 + i]) begin
            failures++;
            if (failures < 10) $display("FAIL vrf v%0d byte %0d", vd, w*8 + i);
          end
        end
      end
    end
    repeat (3) @(negedge clk);
    for (int i = 0; i < MEM; i++) begin
      checks++;
      if (u_mem.mem[i] !== rmem[i]) begin failures++; if (failures < 20) $display("FAIL mem %0d", i); end
    end
    checks++; if (u_mem.stalls == 0) begin failures++; $display("FAIL no stalls"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
