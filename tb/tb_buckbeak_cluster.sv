// End-to-end test of the merge-split cluster at its default size.
//
// Two scalar-core models drive the cluster's ports:
//  1. both fill two 32-element vectors A and B (64-bit) in L1 with scalar
//     stores;
//  2. split mode: SC0 computes C0 = A + B on VC0 while SC1 computes
//     C1 = A * B on VC1 (512b VLEN, vl = 8);
//  3. both call the barrier, then request merge mode (5-cycle switch);
//  4. merge mode: SC0 alone computes C2 = A + B with vl = 24, LMUL = 2 on
//     the 1024b merged unit while SC1 does scalar work on L1 and is refused
//     vector instructions; the register layout of both VCs is inspected;
//  5. both request split mode again and SC1 runs a slide on VC1.
// Memory results are checked against values computed here, and each
// mechanism (mode switches, barrier, MIF broadcast, SC1 detached, L1 bank
// conflicts, VC back-pressure, tail handling) is counted and must occur.
module tb_buckbeak_cluster;
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

  localparam int A = 'h0000, B = 'h0400, C0 = 'h0800, C1 = 'h0c00, C2 = 'h1000, D = 'h1800,
                 S = 'h2000;
  longint unsigned va [32], vb [32];
  int n_conflict = 0, n_backpressure = 0, n_broadcast = 0, n_detached = 0, n_to_merge = 0,
      n_to_split = 0, n_barrier = 0, n_tail = 0, n_split_vec = 0;
  int vl_seen [2][$];

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL: %s (t=%0t)", what, $time); end
  endtask

  // ---------------------------------------------------------- monitors
  logic prev_mode = 0;
  always @(posedge clk) if (rst_n) begin
    if (confl != 0) n_conflict++;
    for (int c = 0; c < 2; c++) begin
      if (sc_valid[c] && !sc_ready[c] && csr_mode == 0) n_backpressure++;
      if (sc_rsp_valid[c]) vl_seen[c].push_back(int'(sc_rsp[c].data));
    end
    if (dut.vc_valid[0] && dut.vc_ready[0]) begin
      if (csr_mode) begin
        chk(dut.vc_valid[1] && dut.vc_ready[1] && dut.vc_req[1] == dut.vc_req[0], "broadcast lockstep");
        n_broadcast++;
      end
    end
    if (csr_mode && sc_valid[1]) begin chk(!sc_ready[1], "SC1 detached"); n_detached++; end
    if (csr_mode != prev_mode) begin if (csr_mode) n_to_merge++; else n_to_split++; end
    prev_mode <= csr_mode;
    chk(vc_ill == 0, "no illegal instruction");
  end

  // ---------------------------------------------------------- SC models
  task automatic vissue(input int c, input logic [31:0] instr, input logic [31:0] rs1);
    @(negedge clk);
    sc_req[c] = '{instr: instr, rs1: rs1, rs2: 0}; sc_valid[c] = 1;
    #1;
    while (!sc_ready[c]) begin @(negedge clk); #1; end
    @(negedge clk);
    sc_valid[c] = 0;
  endtask

  task automatic swrite(input int c, input int addr, input logic [63:0] d);
    @(negedge clk);
    mem_req[c] = 1; mem_data[c] = '{we: 1, addr: addr, wdata: d, be: 8'hff};
    #1;   // let the other core drive its port before looking at the grant
    while (!mem_gnt[c]) begin @(negedge clk); #1; end
    @(negedge clk); mem_req[c] = 0;
  endtask

  task automatic sread(input int c, input int addr, output logic [63:0] d);
    @(negedge clk);
    mem_req[c] = 1; mem_data[c] = '{we: 0, addr: addr, wdata: 0, be: 8'hff};
    #1;   // let the other core drive its port before looking at the grant
    while (!mem_gnt[c]) begin @(negedge clk); #1; end
    @(negedge clk); mem_req[c] = 0;
    chk(mem_rvalid[c], "scalar read response one cycle after grant");
    d = mem_rdata[c];
  endtask

  // barrier / mode switch, returns cycles from request to acknowledge
  task automatic sync(input int c, input logic kind, output int lat);
    @(negedge clk);
    bar_req[c] = 1; bar_kind[c] = kind; lat = 0;
    while (!bar_ack[c]) begin @(negedge clk); lat++; end
    bar_req[c] = 0;
  endtask

  task automatic wait_idle();
    @(negedge clk);
    while (vc_idle != 2'b11) @(negedge clk);
  endtask

  initial begin repeat (20000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    int lat0, lat1;
    logic [63:0] d;
    sc_valid = 0; mem_req = 0; bar_req = 0; bar_kind = 0;
    for (int c = 0; c < 2; c++) begin sc_req[c] = '0; mem_data[c] = '0; end
    for (int i = 0; i < 32; i++) begin va[i] = {$urandom, $urandom}; vb[i] = {$urandom, $urandom}; end
    repeat (3) @(posedge clk); #1 rst_n = 1;
    #1 chk(csr_mode == 0 && mst[0] == MIF_SPLIT && mst[1] == MIF_SPLIT, "reset in split mode");

    // 1. fill A and B, also clear the result areas (C2 tail must stay)
    fork
      for (int i = 0; i < 32; i++) begin swrite(0, A + 8*i, va[i]); swrite(0, C2 + 8*i, 64'hdead); end
      for (int i = 0; i < 32; i++) swrite(1, B + 8*i, vb[i]);
    join

    // 2. split mode, both pairs at once
    fork
      begin
        vissue(0, vsetvli(5, 6, 3, 0), 8);
        vissue(0, vle(1, 10, 3), A);
        vissue(0, vle(2, 10, 3), B);
        vissue(0, opv(F_ADD, 0, 3, 1, 2), 0);
        vissue(0, vse(3, 10, 3), C0);
      end
      begin
        vissue(1, vsetvli(5, 6, 3, 0), 8);
        vissue(1, vle(1, 10, 3), A);
        vissue(1, vle(2, 10, 3), B);
        vissue(1, opv(F_MUL, 2, 3, 1, 2), 0);
        vissue(1, vse(3, 10, 3), C1);
      end
    join
    wait_idle();
    n_split_vec++;

    // 3. barrier, then merge mode
    fork sync(0, 0, lat0); begin repeat (3) @(negedge clk); sync(1, 0, lat1); end join
    n_barrier++;
    chk(csr_mode == 0, "barrier keeps the mode");
    fork sync(0, 1, lat0); begin repeat (2) @(negedge clk); sync(1, 1, lat1); end join
    chk(lat1 == 5, $sformatf("mode switch takes 5 cycles after the last request (%0d)", lat1));
    chk(csr_mode == 1 && mst[0] == MIF_MAN && mst[1] == MIF_SUB, "merge mode states");

    // 4. merge mode: SC0 drives both VCs, SC1 works on scalars
    fork
      begin
        vissue(0, vsetvli(5, 6, 3, 1), 24);      // VL=24, LMUL=2, SEW=64
        vissue(0, vle(0, 10, 3), A);
        vissue(0, vle(2, 10, 3), B);
        vissue(0, opv(F_ADD, 0, 4, 0, 2), 0);
        vissue(0, vse(4, 10, 3), C2);
        vissue(0, vsetvli(5, 0, 3, 0), 0);       // VLMAX at LMUL=1: 1024/64
      end
      begin
        // SC1 tries a vector instruction: refused for a while, then gives up
        @(negedge clk); sc_req[1] = '{instr: vsetvli(5, 6, 3, 0), rs1: 8, rs2: 0}; sc_valid[1] = 1;
        repeat (4) @(negedge clk); sc_valid[1] = 0;
        for (int i = 0; i < 16; i++) begin
          sread(1, A + 8*i, d);
          chk(d == va[i], "scalar read in merge mode");
          swrite(1, D + 8*i, d ^ 64'hffff);
        end
      end
    join
    wait_idle();
    n_tail++;
    // merged layout: element e of v0 group sits in VC (e/8)%2, local word
    // (e/16)*8 + e%8; word w is in bank w%4, row 2v + w/4
    chk(dut.g_core[0].i_vc.i_vrf.g_bank[0].mem[0] == va[0],  "VC0 v0 holds element 0");
    chk(dut.g_core[1].i_vc.i_vrf.g_bank[0].mem[0] == va[8],  "VC1 v0 holds element 8");
    chk(dut.g_core[0].i_vc.i_vrf.g_bank[0].mem[2] == va[16], "VC0 v1 holds element 16");
    chk(dut.g_core[1].i_vc.i_vrf.g_bank[0].mem[2] != va[24] || va[24] == 0, "VC1 v1 not loaded");

    // 5. back to split mode; SC1 slides on its own VC again
    fork sync(0, 1, lat0); sync(1, 1, lat1); join
    chk(csr_mode == 0 && mst[1] == MIF_SPLIT, "split mode again");
    vissue(1, vsetvli(5, 6, 3, 0), 8);
    vissue(1, vle(1, 10, 3), A);
    vissue(1, opv(F_SLIDEDOWN, 3, 6, 1, 3), 0);  // vslidedown.vi v6, v1, 3
    vissue(1, vse(6, 10, 3), S);
    wait_idle();
    n_split_vec++;

    // results
    repeat (3) @(negedge clk);
    for (int i = 0; i < 8; i++) begin
      sread(0, C0 + 8*i, d); chk(d == va[i] + vb[i], $sformatf("split C0[%0d]", i));
      sread(0, C1 + 8*i, d); chk(d == va[i] * vb[i], $sformatf("split C1[%0d]", i));
      sread(0, S + 8*i, d);  chk(d == ((i + 3 < 8) ? va[i+3] : 0), $sformatf("slide S[%0d]", i));
    end
    for (int i = 0; i < 32; i++) begin
      sread(0, C2 + 8*i, d);
      chk(d == ((i < 24) ? va[i] + vb[i] : 64'hdead), $sformatf("merge C2[%0d]", i));
    end
    for (int i = 0; i < 16; i++) begin
      sread(0, D + 8*i, d); chk(d == (va[i] ^ 64'hffff), "scalar results");
    end
    chk(vl_seen[0].size() == 3 && vl_seen[0][0] == 8 && vl_seen[0][1] == 24 && vl_seen[0][2] == 16,
        "vl returned to SC0 (8, merged 24, merged VLMAX 16)");
    chk(vl_seen[1].size() == 2 && vl_seen[1][0] == 8 && vl_seen[1][1] == 8, "vl returned to SC1");
    $display("conflicts %0d backpressure %0d broadcast %0d detached %0d to_merge %0d to_split %0d",
             n_conflict, n_backpressure, n_broadcast, n_detached, n_to_merge, n_to_split);
    chk(n_conflict > 0, "L1 bank conflicts happened");
    chk(n_backpressure > 0, "VC back-pressure happened");
    chk(n_broadcast >= 6, "merge-mode broadcast happened");
    chk(n_detached > 0, "SC1 detached in merge mode");
    chk(n_to_merge == 1 && n_to_split == 1, "one switch each way");
    chk(n_barrier == 1 && n_tail == 1 && n_split_vec == 2, "barrier, tail, split runs");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
