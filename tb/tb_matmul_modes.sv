// Workload test: matrix multiplication C = A x B (32-bit integers) on the
// cluster in both modes, as in the split-versus-merge scaling study. The
// original study uses FP32; this cluster has no FPUs, so the same data flow
// runs on the integer path (vle, vmacc.vx, vse).
//   split mode: SC0/VC0 and SC1/VC1 each run one N x N kernel, concurrently
//   merge mode: SC0 runs both kernels in succession on the 1024b unit
// Row i of C is accumulated as sum_k A[i][k] * B[k][:], with A[i][k] read
// by the scalar core from L1 and each row of B loaded as a vector. Results
// are checked and the cycle counts of both modes printed, for N = 8, 16
// and 32 (a row of 32 elements fills a merged 1024b register).
module tb_matmul_modes;
  import buckbeak_pkg::*;
  import tb_rvv_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  vreq_t sc_req [2]; logic [1:0] sc_valid, sc_ready, sc_rsp_valid;
  vrsp_t sc_rsp [2];
  logic [1:0] mem_req, mem_gnt, mem_rvalid; tcdm_req_t mem_data [2]; logic [63:0] mem_rdata [2];
  logic [1:0] bar_req, bar_kind, bar_ack, vc_idle, vc_ill;
  logic csr_mode; mif_state_e mst [2]; logic [4:0] confl;

  buckbeak_cluster dut (
    .clk_i(clk), .rst_ni(rst_n),
    .sc_req_i(sc_req), .sc_valid_i(sc_valid), .sc_ready_o(sc_ready), .sc_rsp_o(sc_rsp),
    .sc_rsp_valid_o(sc_rsp_valid),
    .sc_mem_req_i(mem_req), .sc_mem_data_i(mem_data), .sc_mem_gnt_o(mem_gnt),
    .sc_mem_rvalid_o(mem_rvalid), .sc_mem_rdata_o(mem_rdata),
    .sc_bar_req_i(bar_req), .sc_bar_kind_i(bar_kind), .sc_bar_ack_o(bar_ack),
    .csr_mode_o(csr_mode), .mif_state_o(mst), .vc_idle_o(vc_idle), .vc_illegal_o(vc_ill),
    .l1_conflicts_o(confl));

  always #5 clk = ~clk;

  // kernel k: A at 'h4000*k*2, B at +'h1000, C at +'h2000 (32-bit elements)
  function automatic int abase(int k); return 'h8000 * k; endfunction
  logic [31:0] ma [2][32][32], mb [2][32][32];

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL: %s (t=%0t)", what, $time); end
  endtask

  task automatic vissue(input int c, input logic [31:0] instr, input logic [31:0] rs1);
    @(negedge clk);
    sc_req[c] = '{instr: instr, rs1: rs1, rs2: 0}; sc_valid[c] = 1;
    #1;
    while (!sc_ready[c]) begin @(negedge clk); #1; end
    @(negedge clk);
    sc_valid[c] = 0;
  endtask

  task automatic smem(input int c, input logic we, input int addr, input logic [63:0] wd,
                      output logic [63:0] rd);
    @(negedge clk);
    mem_req[c] = 1; mem_data[c] = '{we: we, addr: addr & ~7, wdata: wd, be: 8'hff};
    #1;   // let the other core drive its port before looking at the grant
    while (!mem_gnt[c]) begin @(negedge clk); #1; end
    @(negedge clk); mem_req[c] = 0;
    rd = mem_rdata[c];
  endtask

  task automatic sync(input int c, output int lat);
    @(negedge clk);
    bar_req[c] = 1; bar_kind[c] = 1; lat = 0;
    while (!bar_ack[c]) begin @(negedge clk); lat++; end
    bar_req[c] = 0;
  endtask

  // one N x N kernel k driven by scalar core c
  task automatic kernel(input int c, input int k, input int n);
    logic [63:0] d;
    int a0; a0 = abase(k);
    // SEW 32; LMUL 2 when a row does not fit one register (N=32, split)
    vissue(c, vsetvli(5, 6, 2, (n * 4 > (csr_mode ? 128 : 64)) ? 1 : 0), n);
    for (int i = 0; i < n; i++) begin
      vissue(c, opv(F_AND, 3, 8, 8, 0), 0);                // v8 = 0
      for (int kk = 0; kk < n; kk++) begin
        smem(c, 0, a0 + 4 * (i * n + kk), 0, d);           // scalar load of A[i][kk]
        vissue(c, vle(2, 10, 2), a0 + 'h1000 + 4 * kk * n); // row kk of B
        vissue(c, opv(F_MACC, 6, 8, 2, 0),
               ((a0 + 4 * (i * n + kk)) % 8 == 4) ? d[63:32] : d[31:0]);
      end
      vissue(c, vse(8, 10, 2), a0 + 'h2000 + 4 * i * n);
    end
  endtask

  task automatic fill(input int n);
    logic [63:0] d;
    for (int k = 0; k < 2; k++)
      for (int i = 0; i < n; i++)
        for (int j = 0; j < n; j += 2) begin
          ma[k][i][j] = $urandom_range(0, 999); ma[k][i][j+1] = $urandom_range(0, 999);
          mb[k][i][j] = $urandom_range(0, 999); mb[k][i][j+1] = $urandom_range(0, 999);
          smem(k, 1, abase(k) + 4 * (i * n + j), {ma[k][i][j+1], ma[k][i][j]}, d);
          smem(k, 1, abase(k) + 'h1000 + 4 * (i * n + j), {mb[k][i][j+1], mb[k][i][j]}, d);
          smem(k, 1, abase(k) + 'h2000 + 4 * (i * n + j), '0, d);
        end
  endtask

  task automatic verify(input int n, input string tag);
    logic [63:0] d;
    for (int k = 0; k < 2; k++)
      for (int i = 0; i < n; i++)
        for (int j = 0; j < n; j += 2) begin
          logic [31:0] e0, e1; e0 = 0; e1 = 0;
          for (int kk = 0; kk < n; kk++) begin
            e0 += ma[k][i][kk] * mb[k][kk][j]; e1 += ma[k][i][kk] * mb[k][kk][j+1];
          end
          smem(0, 0, abase(k) + 'h2000 + 4 * (i * n + j), 0, d);
          chk(d == {e1, e0}, $sformatf("%s N=%0d C%0d[%0d][%0d] got %h exp %h", tag, n, k, i, j, d, {e1, e0}));
        end
  endtask

  initial begin repeat (3000000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    int lat0, lat1, t0, t_split, t_merge;
    int sizes [3] = '{8, 16, 32};
    sc_valid = 0; mem_req = 0; bar_req = 0; bar_kind = 0;
    for (int c = 0; c < 2; c++) begin sc_req[c] = '0; mem_data[c] = '0; end
    repeat (3) @(posedge clk); #1 rst_n = 1;
    foreach (sizes[s]) begin
      int n; n = sizes[s];
      // split mode: both kernels at once
      fill(n);
      t0 = $time;
      fork kernel(0, 0, n); kernel(1, 1, n); join
      while (vc_idle != 2'b11) @(negedge clk);
      t_split = ($time - t0) / 10;
      verify(n, "split");
      // merge mode: both kernels one after the other on SC0
      fork sync(0, lat0); sync(1, lat1); join
      chk(csr_mode == 1, "merge mode");
      fill(n);
      t0 = $time;
      kernel(0, 0, n); kernel(0, 1, n);
      while (vc_idle != 2'b11) @(negedge clk);
      t_merge = ($time - t0) / 10;
      verify(n, "merge");
      fork sync(0, lat0); sync(1, lat1); join
      chk(csr_mode == 0, "split mode");
      $display("MatMul N=%0d: split %0d cycles, merge %0d cycles (two kernels each)", n, t_split, t_merge);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
