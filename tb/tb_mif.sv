// Self-checking test of the merge interface: decoding of the state from
// {csr_mode, core_id} and the routing of requests, readies and responses
// in SPLIT, MANAGER and SUBORDINATE states. Two MIFs are connected back to
// back as in the cluster; VC readiness is randomised.
module tb_mif;
  import buckbeak_pkg::*;

  int checks = 0, failures = 0;
  logic csr_mode;
  mif_state_e st [2];
  vreq_t sc_req [2], vc_req [2], link_req [2];
  logic [1:0] sc_valid, sc_ready, sc_rsp_valid, vc_valid, vc_ready, vc_rsp_valid;
  logic [1:0] link_valid, link_ready;
  vrsp_t sc_rsp [2], vc_rsp [2];

  for (genvar c = 0; c < 2; c++) begin : g
    mif dut (
      .csr_mode_i(csr_mode), .core_id_i(1'(c)), .state_o(st[c]),
      .sc_req_i(sc_req[c]), .sc_valid_i(sc_valid[c]), .sc_ready_o(sc_ready[c]),
      .sc_rsp_o(sc_rsp[c]), .sc_rsp_valid_o(sc_rsp_valid[c]),
      .vc_req_o(vc_req[c]), .vc_valid_o(vc_valid[c]), .vc_ready_i(vc_ready[c]),
      .vc_rsp_i(vc_rsp[c]), .vc_rsp_valid_i(vc_rsp_valid[c]),
      .link_req_o(link_req[c]), .link_valid_o(link_valid[c]), .link_ready_i(link_ready[1-c]),
      .link_req_i(link_req[1-c]), .link_valid_i(link_valid[1-c]), .link_ready_o(link_ready[c])
    );
  end

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int it = 0; it < 400; it++) begin
      csr_mode = it[0];
      for (int c = 0; c < 2; c++) begin
        sc_req[c] = '{instr: $urandom, rs1: $urandom, rs2: $urandom};
        vc_rsp[c] = '{rd: 5'($urandom), data: $urandom};
      end
      sc_valid = 2'($urandom); vc_ready = 2'($urandom); vc_rsp_valid = 2'($urandom);
      #1;
      if (!csr_mode) begin
        chk(st[0] == MIF_SPLIT && st[1] == MIF_SPLIT, "split state");
        for (int c = 0; c < 2; c++) begin
          chk(vc_req[c] == sc_req[c] && vc_valid[c] == sc_valid[c], "split request");
          chk(sc_ready[c] == vc_ready[c], "split ready");
          chk(sc_rsp_valid[c] == vc_rsp_valid[c] &&
              (!vc_rsp_valid[c] || sc_rsp[c] == vc_rsp[c]), "split response");
          chk(link_valid[c] == 1'b0, "split link idle");
        end
      end else begin
        chk(st[0] == MIF_MAN && st[1] == MIF_SUB, "merge states");
        // both VCs see SC0's instruction, taken only when both are ready
        chk(vc_req[0] == sc_req[0] && vc_req[1] == sc_req[0], "merge broadcast");
        chk(vc_valid[0] == (sc_valid[0] && vc_ready[1]), "manager valid");
        chk(vc_valid[1] == (sc_valid[0] && vc_ready[0]), "subordinate valid");
        chk(sc_ready[0] == (vc_ready[0] && vc_ready[1]), "manager ready");
        chk(sc_ready[1] == 1'b0 && sc_rsp_valid[1] == 1'b0, "SC1 detached");
        chk(sc_rsp_valid[0] == vc_rsp_valid[0] &&
            (!vc_rsp_valid[0] || sc_rsp[0] == vc_rsp[0]), "manager response");
        // a transfer happens on both VCs or on neither
        chk((vc_valid[0] && vc_ready[0]) == (vc_valid[1] && vc_ready[1]), "lockstep");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
