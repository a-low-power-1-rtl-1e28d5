// Self-checking test of the L1 interconnect with 16 real banks: ten masters
// issue random reads and writes, hold them until granted, and check read
// data (one cycle after the grant) against a memory model. Also checks one
// grant per bank per cycle, that conflicts occur and are counted, and that
// round robin serves every waiting master within NR_MASTERS cycles.
module tb_tcdm_interconnect;
  import buckbeak_pkg::*;
  localparam int NM = 10, NB = 16, WORDS = 64;
  int checks = 0, failures = 0, conflict_cycles = 0;
  logic clk = 0, rst_n = 0;
  logic [NM-1:0] req, gnt, rvalid;
  tcdm_req_t data [NM];
  logic [63:0] rdata [NM];
  logic [NB-1:0] b_req, b_we;
  logic [5:0] b_addr [NB];
  logic [63:0] b_wdata [NB], b_rdata [NB];
  logic [7:0] b_be [NB];
  logic [4:0] conflicts;
  logic [63:0] model [NB*WORDS];
  logic [63:0] expect_q [NM];
  logic [NM-1:0] expect_v;
  int wait_cnt [NM];
  logic [NM-1:0] gnt_s;

  tcdm_interconnect #(.NR_MASTERS(NM), .NR_BANKS(NB), .BANK_WORDS(WORDS)) dut (
    .clk_i(clk), .rst_ni(rst_n), .m_req_i(req), .m_data_i(data), .m_gnt_o(gnt),
    .m_rvalid_o(rvalid), .m_rdata_o(rdata), .b_req_o(b_req), .b_we_o(b_we),
    .b_addr_o(b_addr), .b_wdata_o(b_wdata), .b_be_o(b_be), .b_rdata_i(b_rdata),
    .conflicts_o(conflicts));

  for (genvar b = 0; b < NB; b++) begin : g_b
    l1_bank #(.WORDS(WORDS)) i_bank (.clk_i(clk), .req_i(b_req[b]), .we_i(b_we[b]),
      .addr_i(b_addr[b]), .wdata_i(b_wdata[b]), .be_i(b_be[b]), .rdata_o(b_rdata[b]));
  end

  always #5 clk = ~clk;

  function automatic tcdm_req_t rnd_req(bit init, int idx);
    tcdm_req_t r;
    r.we = init ? 1'b1 : 1'($urandom);
    // few rows so that masters collide often
    r.addr = init ? 32'(idx * 8) : 32'($urandom_range(0, NB * 4 - 1) * 8);
    r.wdata = {$urandom, $urandom};
    r.be = init ? 8'hff : 8'($urandom);
    return r;
  endfunction

  initial begin repeat (50000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    int k;
    req = '0; expect_v = '0;
    for (int m = 0; m < NM; m++) begin data[m] = '0; wait_cnt[m] = 0; end
    repeat (2) @(posedge clk); #1 rst_n = 1;
    // initialise all words of the first rows through master 0
    for (int i = 0; i < NB * 4; i++) begin
      @(negedge clk); req = '0; req[0] = 1; data[0] = rnd_req(1, i);
      model[i] = data[0].wdata;
    end
    @(negedge clk); req = '0; gnt_s = '0;
    for (int cyc = 0; cyc < 4000; cyc++) begin
      @(negedge clk);
      req = req & ~gnt_s;
      for (int m = 0; m < NM; m++)
        if (!req[m] && $urandom_range(0, 3) != 0) begin req[m] = 1; data[m] = rnd_req(0, 0); end
      #1;
      for (int m = 0; m < NM; m++) begin
        if (expect_v[m]) begin
          checks++;
          if (!rvalid[m] || rdata[m] !== expect_q[m]) begin
            failures++; $display("FAIL read master %0d", m);
          end
          expect_v[m] = 1'b0;
        end else begin
          checks++; if (rvalid[m]) begin failures++; $display("FAIL spurious rvalid"); end
        end
      end
      // one grant per bank, grants only to requesters
      for (int b = 0; b < NB; b++) begin
        k = 0;
        for (int m = 0; m < NM; m++) if (gnt[m] && data[m].addr[6:3] == 4'(b)) k++;
        checks++; if (k > 1) begin failures++; $display("FAIL two grants bank %0d", b); end
      end
      checks++; if ((gnt & ~req) != 0) begin failures++; $display("FAIL grant without request"); end
      k = 0; for (int m = 0; m < NM; m++) if (req[m] && !gnt[m]) k++;
      checks++; if (k != int'(conflicts)) begin failures++; $display("FAIL conflict count"); end
      if (k > 0) conflict_cycles++;
      gnt_s = gnt;
      @(posedge clk);
      for (int m = 0; m < NM; m++) begin
        int a; a = int'(data[m].addr[31:3]) % (NB*WORDS);
        if (req[m] && gnt_s[m]) begin
          wait_cnt[m] = 0;
          if (data[m].we) begin
            for (int i = 0; i < 8; i++) if (data[m].be[i]) model[a][i*8 +: 8] = data[m].wdata[i*8 +: 8];
          end else begin
            expect_v[m] = 1'b1; expect_q[m] = model[a];
          end
        end else if (req[m]) begin
          wait_cnt[m]++;
          checks++; if (wait_cnt[m] > NM) begin failures++; $display("FAIL starvation %0d", m); end
        end
      end
      #1;
    end
    checks++; if (conflict_cycles == 0) begin failures++; $display("FAIL no conflicts seen"); end
    $display("conflict cycles: %0d", conflict_cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
